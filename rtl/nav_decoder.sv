// nav_decoder: turns the tracker's 1 ms NAV symbols into GPS time.
//
// Bit sync: while the tracker reports lock, the decoder first lets STABLE_MS
// symbols pass, then waits for a sign change between two consecutive
// milliseconds; that change is a NAV bit boundary. From there every 20
// symbols form one 50 bit/s NAV bit (majority vote).
//
// Frame sync: the last 92 bits are kept in a shift register: two bits of the
// previous word (its D29, D30) followed by three 30-bit words. When the first
// eight bits of the three-word window are the preamble 1000 1011 or its
// inverse (a Costas loop locks with either sign), the window is taken in that
// polarity, and the three words (TLM, HOW, word 3) are checked with the six
// GPS parity equations, each using D29/D30 of the word before. If all three
// pass, the HOW gives the 17-bit time-of-week count (TOW); seconds = 6 * TOW,
// the time of week at the start of the next subframe (21 bits, seconds since
// Sunday 00:00). If the HOW's subframe id is 1, word 3 bits 1-10 give the
// 10-bit week number; week = WEEK_ERA * 1024 + that number (11 bits), since
// the 10-bit count rolls over every 1024 weeks (about 19.6 years).
//
// Outputs pulse tow_valid / week_valid for one clock with the new value, one
// clock after the bit that completed the window.
module nav_decoder #(
  parameter int unsigned MS_PER_BIT = 20,
  parameter int unsigned STABLE_MS  = 40,
  parameter int unsigned WEEK_ERA   = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        nav_valid,
  input  logic        nav_sym,
  output logic        bit_valid,
  output logic        nav_bit,
  output logic        bit_synced,
  output logic        frame_found,
  output logic        tow_valid,
  output logic [20:0] seconds,
  output logic        week_valid,
  output logic [10:0] week
);

  localparam logic [7:0] PREAMBLE = 8'b1000_1011;

  typedef enum logic [1:0] {S_STABLE, S_EDGE, S_BITS} state_e;
  state_e state;

  logic [$clog2(STABLE_MS+1)-1:0] stable_cnt;
  logic [$clog2(MS_PER_BIT)-1:0]  ms_cnt;
  logic [$clog2(MS_PER_BIT+1)-1:0] ones;
  logic                           prev_sym;
  logic [91:0]                    sr;
  logic                           check;

  // ---------------- parity ----------------
  localparam logic [23:0] PMASK [6] = '{24'hEC7CD2, 24'h763E69, 24'hBB1F34,
                                        24'h5D8F9A, 24'hAEC7CD, 24'h2DEA27};

  // word: D1 in bit 29 ... D30 in bit 0; p29/p30: D29*, D30* of the word before
  function automatic logic parity_ok(input logic [29:0] word, input logic p29, input logic p30);
    logic [23:0] d;
    logic [5:0]  calc;
    d = word[29:6] ^ {24{p30}};
    // D25, D27, D29 include D30*; D26, D28, D30 include D29*
    for (int j = 0; j < 6; j++)
      calc[5 - j] = ^(d & PMASK[j]) ^ ((j % 2 == 0) ? p30 : p29);
    return calc == word[5:0];
  endfunction

  logic [91:0] win;
  logic        pol_ok, ok1, ok2, ok3;
  logic [23:0] d2, d3;

  always_comb begin
    pol_ok = (sr[89:82] == PREAMBLE) || (sr[89:82] == ~PREAMBLE);
    win    = (sr[89:82] == ~PREAMBLE) ? ~sr : sr;
    ok1    = parity_ok(win[89:60], win[91], win[90]);
    ok2    = parity_ok(win[59:30], win[61], win[60]);
    ok3    = parity_ok(win[29:0],  win[31], win[30]);
    d2     = win[59:36] ^ {24{win[60]}};
    d3     = win[29:6]  ^ {24{win[30]}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_STABLE;
      stable_cnt <= '0; ms_cnt <= '0; ones <= '0; prev_sym <= 1'b0;
      sr <= '0; check <= 1'b0;
      bit_valid <= 1'b0; nav_bit <= 1'b0; bit_synced <= 1'b0; frame_found <= 1'b0;
      tow_valid <= 1'b0; seconds <= '0; week_valid <= 1'b0; week <= '0;
    end else begin
      bit_valid  <= 1'b0;
      tow_valid  <= 1'b0;
      week_valid <= 1'b0;
      check      <= 1'b0;
      if (!enable) begin
        state      <= S_STABLE;
        stable_cnt <= '0;
        bit_synced <= 1'b0;
      end else if (nav_valid) begin
        prev_sym <= nav_sym;
        case (state)
          S_STABLE: begin
            if (stable_cnt == ($clog2(STABLE_MS+1))'(STABLE_MS)) state <= S_EDGE;
            else stable_cnt <= stable_cnt + 1'b1;
          end
          S_EDGE: if (nav_sym != prev_sym) begin
            state      <= S_BITS;
            bit_synced <= 1'b1;
            ms_cnt     <= ($clog2(MS_PER_BIT))'(1);
            ones       <= ($clog2(MS_PER_BIT+1))'(nav_sym);
          end
          default: begin
            if (ms_cnt == ($clog2(MS_PER_BIT))'(MS_PER_BIT - 1)) begin
              logic [$clog2(MS_PER_BIT+1)-1:0] tot;
              tot       = ones + ($clog2(MS_PER_BIT+1))'(nav_sym);
              nav_bit   <= (tot > ($clog2(MS_PER_BIT+1))'(MS_PER_BIT / 2));
              sr        <= {sr[90:0], (tot > ($clog2(MS_PER_BIT+1))'(MS_PER_BIT / 2))};
              bit_valid <= 1'b1;
              check     <= 1'b1;
              ms_cnt    <= '0;
              ones      <= '0;
            end else begin
              ms_cnt <= ms_cnt + 1'b1;
              ones   <= ones + ($clog2(MS_PER_BIT+1))'(nav_sym);
            end
          end
        endcase
      end
      if (check && pol_ok && ok1 && ok2 && ok3) begin
        frame_found <= 1'b1;
        tow_valid   <= 1'b1;
        seconds     <= 21'(d2[23:7]) * 21'd6;
        if (d2[4:2] == 3'd1) begin
          week_valid <= 1'b1;
          week       <= 11'(WEEK_ERA * 1024) + 11'(d3[23:14]);
        end
      end
    end
  end

endmodule

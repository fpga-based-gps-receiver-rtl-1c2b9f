// seven_seg: driver for an 8-digit, common-anode, multiplexed seven-segment
// display (segments and anodes active low).
//
// mode selects what is shown (digit 7 is the leftmost):
//   0  time of week   "d HH MM" : day of week, hour, minute (decimal)
//   1  date           "YYYY  MM": year and month (decimal)
//   2  tracker        "ss L dddd": satellite PRN (hex), lock (1/0), Doppler (hex)
//   3  tracker        "ss L  ppp": satellite PRN (hex), lock, code phase (hex)
// Digits are scanned one at a time for 2^SCAN_BITS clocks each
// (about 1.3 ms at 100 MHz with the default). Which values the document's
// display shows comes from its block diagram; the digit layout is this
// design's.
module seven_seg #(
  parameter int unsigned SCAN_BITS = 17
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [1:0]         mode,
  input  logic [2:0]         day,
  input  logic [4:0]         hour,
  input  logic [5:0]         minute,
  input  logic [10:0]        year,
  input  logic [3:0]         month,
  input  logic [4:0]         sat_id,
  input  logic               lock,
  input  logic [15:0]        doppler,
  input  logic [11:0]        phase,
  output logic [6:0]         seg,      // {g,f,e,d,c,b,a}, active low
  output logic [7:0]         an        // active low
);

  localparam logic [4:0] BLANK = 5'h10;

  logic [SCAN_BITS+2:0] scan;
  logic [2:0]           digit;
  logic [4:0]           val [8];   // 0-15 hex value, BLANK for off
  logic [4:0]           cur;

  always_ff @(posedge clk) begin
    if (rst) scan <= '0;
    else     scan <= scan + 1'b1;
  end
  assign digit = scan[SCAN_BITS+2:SCAN_BITS];

  function automatic logic [4:0] dec(input int unsigned v, input int unsigned pos);
    int unsigned q;
    q = v;
    for (int unsigned k = 0; k < pos; k++) q = q / 10;
    return 5'(q % 10);
  endfunction

  always_comb begin
    logic [5:0] sat;
    sat = 6'(sat_id) + 6'd1;      // PRN = id + 1
    for (int k = 0; k < 8; k++) val[k] = BLANK;
    case (mode)
      2'd0: begin
        val[7] = 5'(day);
        val[4] = dec(int'(hour), 1);   val[3] = dec(int'(hour), 0);
        val[1] = dec(int'(minute), 1); val[0] = dec(int'(minute), 0);
      end
      2'd1: begin
        val[7] = dec(int'(year), 3); val[6] = dec(int'(year), 2);
        val[5] = dec(int'(year), 1); val[4] = dec(int'(year), 0);
        val[1] = dec(int'(month), 1); val[0] = dec(int'(month), 0);
      end
      2'd2: begin
        val[7] = 5'(sat[5:4]); val[6] = 5'(sat[3:0]);
        val[5] = 5'(lock);
        val[3] = 5'(doppler[15:12]); val[2] = 5'(doppler[11:8]);
        val[1] = 5'(doppler[7:4]);   val[0] = 5'(doppler[3:0]);
      end
      default: begin
        val[7] = 5'(sat[5:4]); val[6] = 5'(sat[3:0]);
        val[5] = 5'(lock);
        val[2] = 5'(phase[11:8]); val[1] = 5'(phase[7:4]); val[0] = 5'(phase[3:0]);
      end
    endcase
    cur = val[digit];
  end

  // hex digit patterns, active high {g..a}
  function automatic logic [6:0] pattern(input logic [4:0] v);
    case (v)
      5'h0: return 7'b0111111;  5'h1: return 7'b0000110;  5'h2: return 7'b1011011;
      5'h3: return 7'b1001111;  5'h4: return 7'b1100110;  5'h5: return 7'b1101101;
      5'h6: return 7'b1111101;  5'h7: return 7'b0000111;  5'h8: return 7'b1111111;
      5'h9: return 7'b1101111;  5'hA: return 7'b1110111;  5'hB: return 7'b1111100;
      5'hC: return 7'b0111001;  5'hD: return 7'b1011110;  5'hE: return 7'b1111001;
      5'hF: return 7'b1110001;  default: return 7'b0000000;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      seg <= '1;
      an  <= '1;
    end else begin
      seg <= ~pattern(cur);
      an  <= ~(8'b1 << digit);
    end
  end

endmodule

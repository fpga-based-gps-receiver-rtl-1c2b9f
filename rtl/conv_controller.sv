// conv_controller: sequencer of the two-dimensional acquisition search.
//
// For every Doppler bin from bin_lo to bin_hi, and inside it for every code
// phase p = 0..N_PHASE-1, it walks n = 0..N_CORR-1 and presents, one per
// clock, the sample index n + p (buf_idx, into the capture buffer) and the
// code index n (ca_idx, into the C/A ROM). first and last mark the ends of
// each correlation. So a pass over the whole space takes
// bins * N_PHASE * N_CORR clocks with no idle cycles (the document's
// 8000 x 4000 x 100 operations, done for 32 satellites at once).
//
// Bin k stands for Doppler (k - N_BINS/2) * BIN_HZ hertz (bins of 200 Hz over
// +-10 kHz); fcw is the matching NCO frequency word k' * round(BIN_HZ*2^32/FS).
// All outputs are registers. start is taken while idle; done pulses for one
// clock after the last index of the pass has been presented.
module conv_controller
  import gps_pkg::*;
#(
  parameter int unsigned N_CORR  = 8000,
  parameter int unsigned N_PHASE = 4000,
  parameter int unsigned N_BINS  = 100,
  parameter int unsigned BIN_HZ  = 200,
  parameter int unsigned FS      = 4_000_000,
  localparam int unsigned BUF_AW = $clog2(N_CORR + N_PHASE),
  localparam int unsigned CA_AW  = $clog2(N_CORR)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [7:0]        bin_lo,
  input  logic [7:0]        bin_hi,
  output logic              busy,
  output logic              active,
  output logic              first,
  output logic              last,
  output logic [BUF_AW-1:0] buf_idx,
  output logic [CA_AW-1:0]  ca_idx,
  output code_phase_t       phase,
  output logic [7:0]        bin,
  output doppler_t          doppler,
  output logic [31:0]       fcw,
  output logic              done
);

  localparam longint FCW_STEP = ((longint'(BIN_HZ) << 32) + longint'(FS) / 2) / longint'(FS);
  localparam int     CENTER   = int'(N_BINS / 2);

  logic [CA_AW-1:0]   n;
  logic [PHASE_W-1:0] p;
  logic [7:0]         b, hi;

  function automatic logic [31:0] bin_fcw(input logic [7:0] k);
    longint off;
    off = longint'(int'(k) - CENTER) * FCW_STEP;
    return off[31:0];
  endfunction

  function automatic doppler_t bin_hz(input logic [7:0] k);
    int hz;
    hz = (int'(k) - CENTER) * int'(BIN_HZ);
    return hz[DOP_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; active <= 1'b0; first <= 1'b0; last <= 1'b0; done <= 1'b0;
      n <= '0; p <= '0; b <= '0; hi <= '0;
      buf_idx <= '0; ca_idx <= '0; phase <= '0; bin <= '0; doppler <= '0; fcw <= '0;
    end else begin
      done   <= 1'b0;
      active <= busy;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          n <= '0; p <= '0;
          b  <= (bin_lo < 8'(N_BINS)) ? bin_lo : 8'(N_BINS - 1);
          hi <= (bin_hi < 8'(N_BINS)) ? bin_hi : 8'(N_BINS - 1);
        end
      end else begin
        // present the current index triple
        buf_idx <= BUF_AW'(n) + BUF_AW'(p);
        ca_idx  <= n;
        phase   <= p;
        bin     <= b;
        doppler <= bin_hz(b);
        fcw     <= bin_fcw(b);
        first   <= (n == '0);
        last    <= (n == CA_AW'(N_CORR - 1));
        // advance
        if (n == CA_AW'(N_CORR - 1)) begin
          n <= '0;
          if (p == PHASE_W'(N_PHASE - 1)) begin
            p <= '0;
            if (b >= hi) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              b <= b + 8'd1;
            end
          end else begin
            p <= p + 1'b1;
          end
        end else begin
          n <= n + 1'b1;
        end
      end
    end
  end

endmodule

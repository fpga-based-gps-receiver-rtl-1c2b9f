// peak_detector: running maximum of one satellite's correlation over a search
// pass.
//
// clear starts a pass (maximum forgotten). Each valid strobe offers one cell of
// the search space: its squared correlation magnitude with the cell's code
// phase and Doppler; a strictly larger value replaces the stored peak. found
// is high while the stored peak exceeds THRESHOLD, the detection rule of the
// document ("the correlation has overcome a threshold value"). The threshold
// value itself is this design's choice (a parameter).
module peak_detector
  import gps_pkg::*;
#(
  parameter int unsigned SQ_W      = 28,
  parameter int unsigned THRESHOLD = 256000
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clear,
  input  logic            valid,
  input  logic [SQ_W-1:0] abs_sq,
  input  code_phase_t     phase,
  input  doppler_t        doppler,
  output logic [SQ_W-1:0] peak,
  output code_phase_t     peak_phase,
  output doppler_t        peak_doppler,
  output logic            found
);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      peak         <= '0;
      peak_phase   <= '0;
      peak_doppler <= '0;
    end else if (valid && abs_sq > peak) begin
      peak         <= abs_sq;
      peak_phase   <= phase;
      peak_doppler <= doppler;
    end
  end

  assign found = peak > SQ_W'(THRESHOLD);

endmodule

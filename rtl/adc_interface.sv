// adc_interface: brings the 1-bit I/Q lines and the sample clock of the
// external sample source (an SDR front end or a microcontroller replaying a
// recording, about 4 Msps) into the system clock domain.
//
// All three lines pass through two-flop synchronisers; a rising edge of the
// synchronised sample clock produces a one-cycle sample_valid with the I and Q
// signs taken from the same synchroniser stage. The sample source is assumed
// to change I/Q away from the rising edge of its clock, and the system clock
// must be at least four times the sample rate. Samples are also counted
// modulo SAMPLES_PER_MS; sync marks the first sample of every millisecond, the
// common time reference of the search and the trackers. The synchroniser and
// the epoch counter are this design's own construction.
module adc_interface #(
  parameter int unsigned SAMPLES_PER_MS = 4000,
  localparam int unsigned CW            = $clog2(SAMPLES_PER_MS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          adc_i,
  input  logic          adc_q,
  input  logic          adc_clk,
  output logic          sample_valid,
  output logic          i_neg,
  output logic          q_neg,
  output logic          sync,
  output logic [CW-1:0] sample_count
);

  logic [2:0] i_s, q_s, c_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      i_s <= '0; q_s <= '0; c_s <= '0;
      sample_valid <= 1'b0; i_neg <= 1'b0; q_neg <= 1'b0; sync <= 1'b0;
      sample_count <= '0;
    end else begin
      i_s <= {i_s[1:0], adc_i};
      q_s <= {q_s[1:0], adc_q};
      c_s <= {c_s[1:0], adc_clk};
      sample_valid <= 1'b0;
      if (c_s[1] && !c_s[2]) begin
        sample_valid <= 1'b1;
        i_neg        <= i_s[1];
        q_neg        <= q_s[1];
        sync         <= (sample_count == '0);
        sample_count <= (sample_count == CW'(SAMPLES_PER_MS - 1)) ? '0 : sample_count + 1'b1;
      end
    end
  end

endmodule

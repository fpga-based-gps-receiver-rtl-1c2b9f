// carrier_nco: numerically controlled oscillator for the local carrier.
//
// A 32-bit phase accumulator advances by the frequency control word fcw on
// every enabled clock; fcw = f * 2^32 / fs, signed, so negative Doppler runs
// the phase backwards. The outputs are the signs of cos and sin of the phase
// (a 1-bit carrier, 1 = negative), taken from the two top phase bits:
// cos < 0 in the second and third quadrant, sin < 0 in the third and fourth.
// The 1-bit carrier is this design's choice; it matches the 1-bit samples and
// keeps the millisecond sums within 14 bits.
//
// Controls, in priority order: clear sets the phase to 0; otherwise the phase
// becomes phase + (en ? fcw : 0) + (adj_en ? adj : 0). adj is the explicit
// phase feedback the tracker's Costas loop applies.
module carrier_nco (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        en,
  input  logic [31:0] fcw,
  input  logic        adj_en,
  input  logic [31:0] adj,
  output logic [31:0] phase,
  output logic        cos_neg,
  output logic        sin_neg
);

  always_ff @(posedge clk) begin
    if (rst || clear) phase <= '0;
    else              phase <= phase + (en ? fcw : 32'd0) + (adj_en ? adj : 32'd0);
  end

  assign cos_neg = phase[31] ^ phase[30];
  assign sin_neg = phase[31];

endmodule

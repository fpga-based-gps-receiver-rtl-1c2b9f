// sample_buffer: one bank of the search's capture memory, 2 bits (I and Q
// sign) per sample.
//
// The search correlates 8000 samples against each of 4000 code phases, so it
// reads samples 0..11999 of a capture; the bank is therefore 12000 deep (the
// "2 bit x 12K" buffer of the search). Two banks are used in ping-pong: one is
// filled from the ADC while the other is searched.
//
// Interface: one write port (we, waddr, wdata) and one read port whose data
// is registered, valid one clock after raddr.
module sample_buffer #(
  parameter int unsigned DEPTH = 12000,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [1:0]    wdata,   // {I sign, Q sign}
  input  logic [AW-1:0] raddr,
  output logic [1:0]    rdata
);

  logic [1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

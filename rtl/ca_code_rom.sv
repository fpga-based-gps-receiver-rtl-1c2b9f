// ca_code_rom: sampled C/A codes of all 32 GPS satellites.
//
// Word n holds, for every PRN p (bit p-1), the sign of the chip that is on
// air at sample n of the code period: chip floor((n mod SPM) * 1023 / SPM).
// With the default 4000 samples per millisecond the table is 32 bits x 4000
// (the tracker's size); the search instantiates it 8000 deep to cover its
// 2 ms correlation. The contents are computed from the Gold code generator
// of gps_pkg when the memory is initialised instead of being loaded from a
// file, which is this design's choice.
//
// Interface: N_RD independent read ports, each with a registered output, so
// data appears one clock after the address (block-RAM timing).
module ca_code_rom
  import gps_pkg::*;
#(
  parameter int unsigned DEPTH          = 4000,
  parameter int unsigned SAMPLES_PER_MS = 4000,
  parameter int unsigned N_RD           = 1,
  localparam int unsigned AW            = $clog2(DEPTH)
) (
  input  logic                         clk,
  input  logic [N_RD-1:0][AW-1:0]      addr,
  output logic [N_RD-1:0][NUM_SATS-1:0] data
);

  logic [NUM_SATS-1:0] mem [DEPTH];

  initial begin
    logic [CA_CHIPS-1:0] code [NUM_SATS];
    for (int p = 0; p < int'(NUM_SATS); p++) code[p] = ca_code(p + 1);
    for (int n = 0; n < int'(DEPTH); n++) begin
      int unsigned chip;
      chip = ((n % SAMPLES_PER_MS) * CA_CHIPS) / SAMPLES_PER_MS;
      for (int p = 0; p < int'(NUM_SATS); p++) mem[n][p] = code[p][chip];
    end
  end

  for (genvar r = 0; r < int'(N_RD); r++) begin : g_rd
    always_ff @(posedge clk) data[r] <= mem[addr[r]];
  end

endmodule

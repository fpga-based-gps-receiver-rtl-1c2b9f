// ca_code_rom_tb: reads the whole ROM (4000 x 32) and compares every bit with
// C/A codes built by the G2-delay method, and checks the first ten chips of
// PRN 1-4 against their well-known octal values (1440, 1620, 1710, 1744).
// Also checks the one-clock read latency and a second read port.
`timescale 1ns/1ps
module ca_code_rom_tb;
  import gps_pkg::*;
  import gps_tb_pkg::*;

  localparam int D = 4000;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0][11:0] addr;
  logic [1:0][31:0] data;

  ca_code_rom #(.DEPTH(D), .SAMPLES_PER_MS(D), .N_RD(2)) dut (.clk(clk), .addr(addr), .data(data));

  int checks = 0, failures = 0;
  logic [1022:0] ref_codes [32];

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    logic [9:0] first10;
    const logic [9:0] OCT [4] = '{10'o1440, 10'o1620, 10'o1710, 10'o1744};
    for (int p = 0; p < 32; p++) ref_codes[p] = ref_ca(p + 1);
    for (int p = 0; p < 4; p++) begin
      for (int k = 0; k < 10; k++) first10[9 - k] = ref_codes[p][k];
      checks++;
      if (first10 != OCT[p]) begin failures++; $display("FAIL ref PRN%0d first chips %o", p + 1, first10); end
    end
    bad = 0;
    for (int n = 0; n < D; n++) begin
      addr[0] <= 12'(n);
      addr[1] <= 12'(D - 1 - n);
      @(posedge clk);
      #1;
      for (int p = 0; p < 32; p++) begin
        if (data[0][p] !== ref_codes[p][(n * 1023) / D]) bad++;
        if (data[1][p] !== ref_codes[p][((D - 1 - n) * 1023) / D]) bad++;
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d ROM bits differ", bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// carrier_nco_tb: runs the NCO at fcw for 1 kHz at 4 Msps and a negative
// frequency, compares the phase with k*fcw and the cos/sin sign outputs with
// $cos/$sin of the same phase; checks clear and the phase-adjust input.
`timescale 1ns/1ps
module carrier_nco_tb;
  logic clk = 0, rst = 1, clear = 0, en = 0, adj_en = 0;
  logic [31:0] fcw, adj, phase;
  logic cos_neg, sin_neg;
  always #5 clk = ~clk;
  carrier_nco dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int bad;
    longint unsigned expect_ph;
    fcw = 32'd1073742;           // 1 kHz at 4 Msps
    adj = '0;
    repeat (2) @(posedge clk);
    rst <= 0; en <= 1;
    bad = 0;
    for (int k = 1; k <= 6000; k++) begin
      real ang;
      @(posedge clk); #1;
      expect_ph = (longint'(k) * 1073742) & 64'hFFFF_FFFF;
      if (phase !== expect_ph[31:0]) bad++;
      ang = 2.0 * 3.14159265358979 * real'(phase) / 4294967296.0;
      // skip samples within a hair of a zero crossing
      if ($cos(ang) > 1e-3 && cos_neg) bad++;
      if ($cos(ang) < -1e-3 && !cos_neg) bad++;
      if ($sin(ang) > 1e-3 && sin_neg) bad++;
      if ($sin(ang) < -1e-3 && !sin_neg) bad++;
    end
    check(bad == 0, "phase accumulation and quadrant signs");
    clear <= 1; @(posedge clk); clear <= 0; #1;
    check(phase == 0, "clear");
    fcw <= -32'sd1073742;
    @(posedge clk); #1;
    check(phase == -32'sd1073742, "negative frequency runs backwards");
    check(cos_neg == 0 && sin_neg == 1, "fourth quadrant signs");
    en <= 0; adj_en <= 1; adj <= 32'h4000_0000;
    @(posedge clk); #1;
    check(phase == 32'h4000_0000 - 32'd1073742, "phase adjust adds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

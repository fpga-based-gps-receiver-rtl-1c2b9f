// peak_detector_tb: offers 500 random cells, checks that the stored peak,
// its phase and Doppler are those of the largest value, that ties keep the
// first, that found follows the threshold and that clear forgets the peak.
`timescale 1ns/1ps
module peak_detector_tb;
  import gps_pkg::*;
  logic clk = 0, rst = 1, clear = 0, valid = 0;
  logic [27:0] abs_sq = 0, peak;
  code_phase_t phase = 0, peak_phase;
  doppler_t doppler = 0, peak_doppler;
  logic found;
  always #5 clk = ~clk;
  peak_detector #(.SQ_W(28), .THRESHOLD(1000)) dut (.*);
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
    int best, bp, bd;
    repeat (2) @(posedge clk);
    rst <= 0;
    best = 0; bp = 0; bd = 0;
    for (int k = 0; k < 500; k++) begin
      int v;
      v = $urandom_range(0, 900);
      if (k == 123) v = 950;
      if (k == 300) v = 950;   // tie: first one stays
      valid <= 1; abs_sq <= 28'(v); phase <= 12'(k); doppler <= 16'(k * 3 - 700);
      if (v > best) begin best = v; bp = k; bd = k * 3 - 700; end
      @(posedge clk);
    end
    valid <= 0; @(posedge clk); #1;
    check(peak == 28'(best) && peak_phase == 12'(bp) && peak_doppler == 16'(bd), "largest cell kept");
    check(bp == 123, "tie keeps the first");
    check(!found, "below threshold");
    valid <= 1; abs_sq <= 28'd1001; phase <= 12'd77; @(posedge clk); valid <= 0; #1;
    check(found && peak_phase == 12'd77, "above threshold");
    clear <= 1; @(posedge clk); clear <= 0; #1;
    check(peak == 0 && !found, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

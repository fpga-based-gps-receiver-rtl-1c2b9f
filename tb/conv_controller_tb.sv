// conv_controller_tb: small search (N_CORR 5, N_PHASE 3, bins 48..50 of 100)
// compared step by step with three nested loops: buf_idx = n + p, ca_idx = n,
// first/last, phase, Doppler in Hz and fcw = k * round(200*2^32/4e6); checks
// the total cycle count bins*N_PHASE*N_CORR, done, and bin clipping.
`timescale 1ns/1ps
module conv_controller_tb;
  import gps_pkg::*;
  localparam int NC = 5, NP = 3;
  logic clk = 0, rst = 1, start = 0;
  logic [7:0] bin_lo = 0, bin_hi = 0, bin;
  logic busy, active, first, last, done;
  logic [2:0] buf_idx;
  logic [2:0] ca_idx;
  code_phase_t phase;
  doppler_t doppler;
  logic [31:0] fcw;
  always #5 clk = ~clk;
  conv_controller #(.N_CORR(NC), .N_PHASE(NP)) dut (.*);
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
    int bad, cycles;
    repeat (2) @(posedge clk);
    rst <= 0;
    bin_lo <= 8'd48; bin_hi <= 8'd50; start <= 1;
    @(posedge clk); start <= 0;
    bad = 0; cycles = 0;
    for (int b = 48; b <= 50; b++)
      for (int p = 0; p < NP; p++)
        for (int n = 0; n < NC; n++) begin
          do begin @(posedge clk); #1; end while (!active);
          cycles++;
          if (buf_idx != 3'(n + p) || ca_idx != 3'(n) || phase != 12'(p)) bad++;
          if (first != (n == 0) || last != (n == NC - 1)) bad++;
          if (int'(doppler) != (b - 50) * 200) bad++;
          if (fcw != 32'((b - 50) * 214748)) bad++;
          if (done != (b == 50 && p == NP - 1 && n == NC - 1)) bad++;
        end
    check(bad == 0, $sformatf("index sequence (%0d mismatches)", bad));
    @(posedge clk); #1;
    check(!active && !busy, "idle after the pass");
    check(cycles == 3 * NP * NC, "cycle count");
    // clipping of an out-of-range window
    bin_lo <= 8'd99; bin_hi <= 8'd200; start <= 1;
    @(posedge clk); start <= 0;
    do begin @(posedge clk); #1; end while (!active);
    check(int'(doppler) == 49 * 200, "upper bin clipped to 99");
    while (!done) begin @(posedge clk); #1; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

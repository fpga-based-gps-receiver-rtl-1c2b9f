// corr_accumulator_tb: random integrations of 8000 and of 5 samples with
// random code bits, compared with a software sum; checks the dump strobe,
// the 14-bit sums, |sum|^2 and an all-ones 8000-sample case (largest value).
`timescale 1ns/1ps
module corr_accumulator_tb;
  logic clk = 0, rst = 1, en = 0, first = 0, last = 0, code_neg = 0;
  logic signed [1:0] re = 0, im = 0;
  logic signed [13:0] sum_re, sum_im;
  logic [27:0] abs_sq;
  logic done;
  always #5 clk = ~clk;
  corr_accumulator dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input int len, input bit all_ones);
    int er, ei;
    er = 0; ei = 0;
    for (int k = 0; k < len; k++) begin
      int r, i, c;
      r = all_ones ? 1 : $urandom_range(0, 2) - 1;
      i = all_ones ? -1 : $urandom_range(0, 2) - 1;
      c = all_ones ? 0 : $urandom_range(0, 1);
      re <= 2'(r); im <= 2'(i); code_neg <= 1'(c);
      en <= 1; first <= (k == 0); last <= (k == len - 1);
      er += c ? -r : r; ei += c ? -i : i;
      @(posedge clk);
      // idle gap in the middle of the integration
      if (k == 3) begin en <= 0; @(posedge clk); end
    end
    en <= 0; last <= 0; first <= 0;
    #1;
    check(done, "done one clock after last");
    check(int'(sum_re) == er && int'(sum_im) == ei, $sformatf("sums %0d %0d vs %0d %0d", sum_re, sum_im, er, ei));
    check(abs_sq == 28'(er * er + ei * ei), "abs_sq");
    @(posedge clk); #1;
    check(!done, "done is a single pulse");
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    run(8000, 0);
    run(5, 0);
    run(8000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cmplx_mult_tb: exhaustive check of the 16 sign combinations against
// (sI + j sQ)(c - j s)/2 computed with integers.
`timescale 1ns/1ps
module cmplx_mult_tb;
  logic i_neg, q_neg, cos_neg, sin_neg;
  logic signed [1:0] re, im;
  cmplx_mult dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      int si, sq, c, s, er, ei;
      {i_neg, q_neg, cos_neg, sin_neg} = 4'(v);
      si = i_neg ? -1 : 1; sq = q_neg ? -1 : 1; c = cos_neg ? -1 : 1; s = sin_neg ? -1 : 1;
      er = (si * c + sq * s) / 2;
      ei = (sq * c - si * s) / 2;
      #1;
      checks++;
      if (int'(re) != er || int'(im) != ei) begin
        failures++; $display("FAIL v=%0d re=%0d im=%0d expect %0d %0d", v, re, im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

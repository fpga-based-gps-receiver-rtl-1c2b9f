// cmplx_mult: carrier wipe-off of one 1-bit complex sample.
//
// Computes (sI + j sQ) * (c - j s) / 2 where every operand is +1 or -1
// (inputs are sign bits, 1 = -1) and c, s are the local cos and sin. The
// result has re = (sI*c + sQ*s)/2 and im = (sQ*c - sI*s)/2, each -1, 0 or +1,
// as 2-bit signed numbers. Halving keeps a 4000-sample sum within 14 bits.
// Purely combinational.
module cmplx_mult (
  input  logic              i_neg,
  input  logic              q_neg,
  input  logic              cos_neg,
  input  logic              sin_neg,
  output logic signed [1:0] re,
  output logic signed [1:0] im
);

  // Each product term is +1 when the two signs agree.
  logic ic_neg, qs_neg, qc_neg, is_neg;

  always_comb begin
    ic_neg = i_neg ^ cos_neg;   // sI*c
    qs_neg = q_neg ^ sin_neg;   // sQ*s
    qc_neg = q_neg ^ cos_neg;   // sQ*c
    is_neg = i_neg ^ sin_neg;   // sI*s, subtracted
    if (ic_neg != qs_neg) re = 2'sd0;
    else                  re = ic_neg ? -2'sd1 : 2'sd1;
    if (qc_neg == is_neg) im = 2'sd0;
    else                  im = qc_neg ? -2'sd1 : 2'sd1;
  end

endmodule

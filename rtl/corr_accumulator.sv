// corr_accumulator: integrate-and-dump correlator for one code replica.
//
// Each enabled clock adds the wiped-off sample (re, im in -1..1), multiplied
// by the code chip (code_neg = 1 for -1), to a real and an imaginary sum.
// first starts a new sum with the current sample; last closes it: the two
// sums are latched into sum_re / sum_im, done pulses on the next clock and
// abs_sq = sum_re^2 + sum_im^2 is available from then until the next dump.
// Widths follow the document: 14-bit sums and a 28-bit squared magnitude,
// enough for 8000 samples of magnitude at most 1.
module corr_accumulator #(
  parameter int unsigned ACC_W = 14,
  localparam int unsigned SQ_W = 2 * ACC_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic                    last,
  input  logic                    code_neg,
  input  logic signed [1:0]       re,
  input  logic signed [1:0]       im,
  output logic signed [ACC_W-1:0] sum_re,
  output logic signed [ACC_W-1:0] sum_im,
  output logic [SQ_W-1:0]         abs_sq,
  output logic                    done
);

  logic signed [ACC_W-1:0] acc_re, acc_im, nxt_re, nxt_im;
  logic signed [ACC_W-1:0] p_re, p_im;

  always_comb begin
    p_re   = code_neg ? ACC_W'(-re) : ACC_W'(re);
    p_im   = code_neg ? ACC_W'(-im) : ACC_W'(im);
    nxt_re = (first ? '0 : acc_re) + p_re;
    nxt_im = (first ? '0 : acc_im) + p_im;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_re <= '0; acc_im <= '0;
      sum_re <= '0; sum_im <= '0;
      done   <= 1'b0;
    end else begin
      done <= en && last;
      if (en) begin
        acc_re <= nxt_re;
        acc_im <= nxt_im;
        if (last) begin
          sum_re <= nxt_re;
          sum_im <= nxt_im;
        end
      end
    end
  end

  logic signed [SQ_W-1:0] wide_re, wide_im;
  always_comb begin
    wide_re = SQ_W'(sum_re);
    wide_im = SQ_W'(sum_im);
    abs_sq  = wide_re * wide_re + wide_im * wide_im;
  end

endmodule

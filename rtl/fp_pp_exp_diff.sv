// fp_pp_exp_diff -- exponent step of the adder (step 1).
//
// Subtracts the R-bit unsigned exponents, A - B, with one extra bit so that the
// borrow out of the top position is the sign of the difference: diff_sign=0
// means A >= B, diff_sign=1 means A < B. diff carries the low R bits of the
// two's complement difference, S_{A-B}; when diff_sign=1 the true distance
// B - A equals (~diff)+1 modulo 2^R, which the inverted-address shifter uses
// without computing it. The result exponent s_exp is A or B, chosen by
// diff_sign, i.e. max(A, B).
//
// Purely combinational. Treating the exponents as unsigned (biased) values is
// this design's choice; the subtraction-based comparison and the choice of
// the exponent by the sign follow the method.
module fp_pp_exp_diff #(
  parameter int unsigned R = fp_pp_pkg::R_EXP
) (
  input  logic [R-1:0] a_exp,      // exponent A
  input  logic [R-1:0] b_exp,      // exponent B
  output logic [R-1:0] diff,       // S_{A-B}, low R bits of A - B
  output logic         diff_sign,  // S_SIGN, 1 when A < B
  output logic [R-1:0] s_exp       // S = max(A, B)
);

  logic [R:0] wide_diff;

  always_comb begin
    wide_diff = {1'b0, a_exp} - {1'b0, b_exp};
    diff      = wide_diff[R-1:0];
    diff_sign = wide_diff[R];
    s_exp     = diff_sign ? b_exp : a_exp;
  end

endmodule

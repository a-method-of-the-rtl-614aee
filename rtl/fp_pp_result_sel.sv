// fp_pp_result_sel -- choice of the result from the prepared sums (step 4).
//
// A row of N+1 2:1 multiplexors: s_mant = s_m1 when diff_sign=0 (A >= B, B's
// mantissa was aligned) and s_mant = s_m2 when diff_sign=1 (A < B, A's
// mantissa was aligned). It replaces the choice of operands ahead of a single
// adder with a choice of results behind two adders. Purely combinational.
module fp_pp_result_sel #(
  parameter int unsigned N = fp_pp_pkg::N_MANT
) (
  input  logic [N:0] s_m1,       // a_M + b_SHIFT
  input  logic [N:0] s_m2,       // b_M + a_SHIFT
  input  logic       diff_sign,  // S_SIGN
  output logic [N:0] s_mant      // chosen sum
);

  always_comb s_mant = diff_sign ? s_m2 : s_m1;

endmodule

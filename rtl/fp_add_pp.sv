// fp_add_pp -- floating-point adder with partial preparation of results.
//
// Adds a_M*2^A + b_M*2^B and returns s_M*2^S with S = max(A, B) and s_M the
// sum of the mantissas after the one with the smaller exponent has been
// shifted right by |A-B| (arithmetic shift, low bits lost). A conventional
// adder compares the exponents, then shifts the chosen mantissa, then adds, all
// in series. Here the exponent subtraction, both alignments and both additions
// run at once, and the comparison only picks one of two prepared results:
//
//   step 1  fp_pp_exp_diff   S_{A-B}=A-B, S_SIGN, S = A or B
//   step 2  fp_pp_shifter x2 b_SHIFT = b_M >>> S_{A-B}
//                            a_SHIFT = a_M >>> ((~S_{A-B})+1)  (inverted address)
//   step 3  fp_pp_mant_adder x2  s_M1 = a_M + b_SHIFT, s_M2 = b_M + a_SHIFT
//   step 4  fp_pp_result_sel s_M = S_SIGN ? s_M2 : s_M1
//
// Both shifters start as soon as the low bit of S_{A-B} is known, so the
// exponent subtraction overlaps the shift rather than preceding it.
//
// Interface: a_mant/b_mant are N-bit two's complement mantissas, a_exp/b_exp
// R-bit unsigned exponents; s_mant is the (N+1)-bit two's complement sum and
// s_exp the result exponent. diff_sign is brought out as a status (1 when
// A < B). The block is purely combinational, as in the method, which covers the
// four steps up to the sum of the aligned mantissas; normalization of s_mant
// comes after it and is not part of this block. Unsigned exponents and
// two's complement mantissas with an (N+1)-bit sum are this design's reading.
// The shifter needs 2^R >= N so that a full shift leaves only sign bits.
module fp_add_pp #(
  parameter int unsigned N = fp_pp_pkg::N_MANT,
  parameter int unsigned R = fp_pp_pkg::R_EXP
) (
  input  logic [N-1:0] a_mant,     // a_M
  input  logic [R-1:0] a_exp,      // A
  input  logic [N-1:0] b_mant,     // b_M
  input  logic [R-1:0] b_exp,      // B
  output logic [N:0]   s_mant,     // s_M
  output logic [R-1:0] s_exp,      // S
  output logic         diff_sign   // S_SIGN, 1 when A < B
);

  if (!fp_pp_pkg::shifter_covers(N, R)) begin : g_size_check
    $error("fp_add_pp: 2^R must be at least N");
  end

  logic [R-1:0] diff;
  logic [N-1:0] b_shift, a_shift;
  logic [N:0]   s_m1, s_m2;

  // step 1
  fp_pp_exp_diff #(.R(R)) u_exp (
    .a_exp    (a_exp),
    .b_exp    (b_exp),
    .diff     (diff),
    .diff_sign(diff_sign),
    .s_exp    (s_exp)
  );

  // step 2: both alignments, addressed by the same S_{A-B}
  fp_pp_shifter #(.N(N), .R(R), .INV_ADDR(1'b0)) u_shift_b (
    .din (b_mant),
    .sh  (diff),
    .dout(b_shift)
  );

  fp_pp_shifter #(.N(N), .R(R), .INV_ADDR(1'b1)) u_shift_a (
    .din (a_mant),
    .sh  (diff),
    .dout(a_shift)
  );

  // step 3: both prepared sums
  fp_pp_mant_adder #(.N(N)) u_add_1 (
    .x  (a_mant),
    .y  (b_shift),
    .sum(s_m1)
  );

  fp_pp_mant_adder #(.N(N)) u_add_2 (
    .x  (b_mant),
    .y  (a_shift),
    .sum(s_m2)
  );

  // step 4
  fp_pp_result_sel #(.N(N)) u_sel (
    .s_m1     (s_m1),
    .s_m2     (s_m2),
    .diff_sign(diff_sign),
    .s_mant   (s_mant)
  );

  // The chosen exponent is never below either input exponent.
  always_comb begin
    assert (s_exp >= a_exp && s_exp >= b_exp)
      else $error("fp_add_pp: result exponent below an input exponent");
  end

endmodule

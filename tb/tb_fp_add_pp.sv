// tb_fp_add_pp -- end-to-end test of the adder with every parameter of the adder at its default (N=15, R=4).
//
// Every pair of exponents is applied with corner mantissas (zero, -1, the two
// extremes, one) and random mantissas, and the mantissa sum and exponent are
// compared with a reference that aligns the mantissa of the smaller exponent
// by floor division and adds (fp_pp_ref_pkg), the order a conventional adder
// follows. The adder is combinational; results are sampled one clock after the
// inputs change. The test counts how often each case of the method happened
// and fails if one never did:
//   A > B    (sum s_M1 chosen, B's mantissa aligned)
//   A < B    (sum s_M2 chosen, A's mantissa aligned through inverted address)
//   A = B    (no alignment)
//   |A-B| >= N (aligned mantissa reduced to its sign bits)
//   carry into bit N (sum outside the N-bit range)
//   low bits lost in the alignment
module tb_fp_add_pp;
  import fp_pp_ref_pkg::*;
  localparam int unsigned N = fp_pp_pkg::N_MANT;
  localparam int unsigned R = fp_pp_pkg::R_EXP;

  logic [N-1:0] a_mant, b_mant;
  logic [R-1:0] a_exp, b_exp, s_exp;
  logic [N:0]   s_mant;
  logic         diff_sign;
  int checks = 0, failures = 0;
  int n_gt = 0, n_lt = 0, n_eq = 0, n_far = 0, n_wide = 0, n_lost = 0;
  logic clk = 1'b0;

  fp_add_pp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] am, int unsigned ae, logic [N-1:0] bm, int unsigned be);
    longint av, bv, sm, got, lo_m;
    int unsigned se, d;
    a_mant = am;
    b_mant = bm;
    a_exp  = R'(ae);
    b_exp  = R'(be);
    @(posedge clk);
    av = sval(longint'(am), N);
    bv = sval(longint'(bm), N);
    ref_add(av, ae, bv, be, sm, se);
    got = sval(longint'(s_mant), N + 1);
    checks++;
    if (got != sm || int'(s_exp) != int'(se) || diff_sign !== (ae < be)) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%0d*2^%0d b=%0d*2^%0d: got %0d*2^%0d sign=%0b, expected %0d*2^%0d",
                 av, ae, bv, be, got, s_exp, diff_sign, sm, se);
    end
    d    = (ae > be) ? ae - be : be - ae;
    lo_m = (ae >= be) ? bv : av;
    if (ae > be) n_gt++;
    if (ae < be) n_lt++;
    if (ae == be) n_eq++;
    if (d >= N) n_far++;
    if (sm >= (64'sd1 <<< (N - 1)) || sm < -(64'sd1 <<< (N - 1))) n_wide++;
    if (d > 0 && floor_shift(lo_m, d) * (64'sd1 <<< d) != lo_m) n_lost++;
  endtask

  initial begin
    logic [N-1:0] corner [5];
    corner = '{'0, '1, N'(1), {1'b0, {(N-1){1'b1}}}, {1'b1, {(N-1){1'b0}}}};
    for (int unsigned ae = 0; ae < 2 ** R; ae++) begin
      for (int unsigned be = 0; be < 2 ** R; be++) begin
        foreach (corner[i]) foreach (corner[j]) apply(corner[i], ae, corner[j], be);
        for (int k = 0; k < 8; k++) apply(N'({$urandom, $urandom}), ae, N'({$urandom, $urandom}), be);
      end
    end
    for (int k = 0; k < 20000; k++)
      apply(N'({$urandom, $urandom}), $urandom % (2 ** R), N'({$urandom, $urandom}), $urandom % (2 ** R));
    $display("cases: A>B %0d, A<B %0d, A=B %0d, |A-B|>=N %0d, carry into bit N %0d, bits lost %0d",
             n_gt, n_lt, n_eq, n_far, n_wide, n_lost);
    if (n_gt == 0 || n_lt == 0 || n_eq == 0 || n_far == 0 || n_wide == 0 || n_lost == 0) begin
      failures++;
      $display("FAIL: a case of the method was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

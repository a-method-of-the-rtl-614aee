// tb_fp_pp_exp_diff -- exhaustive test of the exponent step.
//
// Applies every pair of R-bit exponents and checks the sign (A < B), the low
// bits of A - B worked out with integer arithmetic, and S = max(A, B).
module tb_fp_pp_exp_diff;
  localparam int unsigned R = 4;

  logic [R-1:0] a_exp, b_exp, diff, s_exp;
  logic         diff_sign;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_pp_exp_diff #(.R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** R; a++) begin
      for (int b = 0; b < 2 ** R; b++) begin
        int exp_diff;
        a_exp = R'(a);
        b_exp = R'(b);
        @(posedge clk);
        exp_diff = (a - b) % (2 ** R);
        if (exp_diff < 0) exp_diff += 2 ** R;
        checks++;
        if (diff_sign !== (a < b) || int'(diff) != exp_diff ||
            int'(s_exp) != ((a > b) ? a : b)) begin
          failures++;
          $display("FAIL A=%0d B=%0d diff=%0d sign=%0b S=%0d", a, b, diff, diff_sign, s_exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

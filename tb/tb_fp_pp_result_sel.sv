// tb_fp_pp_result_sel -- test of the result choice.
//
// Random pairs of prepared sums with both values of the sign; the output must
// be the first sum for sign 0 and the second for sign 1.
module tb_fp_pp_result_sel;
  localparam int unsigned N = 15;

  logic [N:0] s_m1, s_m2, s_mant;
  logic       diff_sign;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_pp_result_sel #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      s_m1      = (N+1)'($urandom);
      s_m2      = (N+1)'($urandom);
      diff_sign = k[0];
      @(posedge clk);
      checks++;
      if (s_mant !== (diff_sign ? s_m2 : s_m1)) begin
        failures++;
        $display("FAIL sign=%0b m1=%h m2=%h out=%h", diff_sign, s_m1, s_m2, s_mant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_pp_shifter -- test of both shifter forms.
//
// For every shift address and a set of random and corner mantissas, checks
// the plain shifter against floor(m / 2^sh) and the inverted-address shifter
// against floor(m / 2^(2^R - sh)), a shift by the two's complement negation of
// sh (by 2^R when sh=0, which leaves only sign bits).
module tb_fp_pp_shifter;
  import fp_pp_ref_pkg::*;
  localparam int unsigned N = 15;
  localparam int unsigned R = 4;

  logic [N-1:0] din, dout_p, dout_i;
  logic [R-1:0] sh;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_pp_shifter #(.N(N), .R(R), .INV_ADDR(1'b0)) dut_p (.din(din), .sh(sh), .dout(dout_p));
  fp_pp_shifter #(.N(N), .R(R), .INV_ADDR(1'b1)) dut_i (.din(din), .sh(sh), .dout(dout_i));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] m);
    longint mv, ep, ei;
    for (int s = 0; s < 2 ** R; s++) begin
      din = m;
      sh  = R'(s);
      @(posedge clk);
      mv = sval(longint'(m), N);
      ep = floor_shift(mv, s);
      ei = floor_shift(mv, (s == 0) ? 2 ** R : 2 ** R - s);
      checks++;
      if (sval(longint'(dout_p), N) != ep || sval(longint'(dout_i), N) != ei) begin
        failures++;
        $display("FAIL m=%0d sh=%0d plain=%0d (exp %0d) inv=%0d (exp %0d)", mv, s,
                 sval(longint'(dout_p), N), ep, sval(longint'(dout_i), N), ei);
      end
    end
  endtask

  initial begin
    check('0);
    check('1);
    check({1'b0, {(N-1){1'b1}}});
    check({1'b1, {(N-1){1'b0}}});
    check(N'(1));
    for (int k = 0; k < 300; k++) check(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

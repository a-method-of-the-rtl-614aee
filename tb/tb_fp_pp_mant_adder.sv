// tb_fp_pp_mant_adder -- test of the (N+1)-bit mantissa adder.
//
// Corner values (both extremes, mixed signs) and random pairs; the sum is
// compared with the integer sum of the two's complement values, which must fit
// in N+1 bits without wrapping.
module tb_fp_pp_mant_adder;
  import fp_pp_ref_pkg::*;
  localparam int unsigned N = 15;

  logic [N-1:0] x, y;
  logic [N:0]   sum;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  fp_pp_mant_adder #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] xa, logic [N-1:0] ya);
    longint e;
    x = xa;
    y = ya;
    @(posedge clk);
    e = sval(longint'(xa), N) + sval(longint'(ya), N);
    checks++;
    if (sval(longint'(sum), N + 1) != e) begin
      failures++;
      $display("FAIL x=%h y=%h sum=%h exp=%0d", xa, ya, sum, e);
    end
  endtask

  initial begin
    logic [N-1:0] corner [5];
    corner = '{'0, '1, N'(1), {1'b0, {(N-1){1'b1}}}, {1'b1, {(N-1){1'b0}}}};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    for (int k = 0; k < 5000; k++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

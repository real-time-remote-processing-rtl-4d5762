// tb_fp_add: random and corner-case additions against real arithmetic.
module tb_fp_add;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  logic clk = 0, rst_n = 0, v = 0, mv;
  fp_t a, b, y;
  int checks = 0, failures = 0;
  fp_add dut (.clk, .rst_n, .subordinate_valid(v), .a, .b, .manager_valid(mv), .y);
  always #5 clk = ~clk;
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input real ra, input real rb);
    real want, got;
    a = r2fp(ra); b = r2fp(rb);
    want = fp2r(a) + fp2r(b);
    @(negedge clk) v = 1;
    @(negedge clk) v = 0;
    checks++;
    got = fp2r(y);
    // the smaller operand is truncated when aligned: allow 2 ulp of the larger
    if (!mv || !close(got, want, 1.0e-6,
                      4.8e-7 * ((rabs(fp2r(a)) > rabs(fp2r(b))) ? rabs(fp2r(a)) : rabs(fp2r(b))))) begin
      failures++;
      $display("FAIL %g + %g = %g want %g (mv=%0d)", fp2r(a), fp2r(b), got, want, mv);
    end
  endtask
  initial begin
    a = FP_ZERO; b = FP_ZERO;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1.5, 2.25); run(-3.0, 1.0); run(1.0, -1.0); run(0.0, -7.5);
    run(1.0e-5, 300.0); run(-0.125, -0.375); run(1.0, -0.9999);
    for (int i = 0; i < 2000; i++) run(rnd(-100.0, 100.0) * (2.0 ** rnd(-10.0, 10.0)),
                                         rnd(-100.0, 100.0) * (2.0 ** rnd(-10.0, 10.0)));
    // subtraction of near-equal values: cancellation keeps the exact result
    for (int i = 0; i < 200; i++) begin
      real x; x = rnd(1.0, 2.0); run(x, -(x + rnd(0.0, 1.0e-3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mat_inv2: inverses of random symmetric positive-definite 2x2 matrices
// compared with the closed-form inverse in real arithmetic.
module tb_mat_inv2;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fp_t a11, a12, a22, i11, i12, i22;
  int checks = 0, failures = 0;
  mat_inv2 dut (.clk, .rst_n, .start, .a11, .a12, .a22, .busy, .done, .i11, .i12, .i22);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input real x11, input real x12, input real x22);
    real det, w11, w12, w22, tol;
    int lat;
    a11 = r2fp(x11); a12 = r2fp(x12); a22 = r2fp(x22);
    det = fp2r(a11) * fp2r(a22) - fp2r(a12) * fp2r(a12);
    w11 = fp2r(a22) / det; w12 = -fp2r(a12) / det; w22 = fp2r(a11) / det;
    // conditioning: cancellation in det amplifies truncation errors
    tol = 1.0e-5 * (fp2r(a11) * fp2r(a22)) / rabs(det);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 4;
    if (!close(fp2r(i11), w11, tol, 0.0)) begin failures++; $display("FAIL i11 %g %g", fp2r(i11), w11); end
    if (!close(fp2r(i12), w12, tol, 1.0e-9 * rabs(w11))) begin failures++; $display("FAIL i12 %g %g", fp2r(i12), w12); end
    if (!close(fp2r(i22), w22, tol, 0.0)) begin failures++; $display("FAIL i22 %g %g", fp2r(i22), w22); end
    if (lat != 19) begin failures++; $display("FAIL latency %0d", lat); end
  endtask
  initial begin
    a11 = FP_ZERO; a12 = FP_ZERO; a22 = FP_ZERO;
    repeat (3) @(negedge clk); rst_n = 1;
    run(2.0, 0.0, 4.0); run(1.0, 0.5, 1.0); run(0.01, -0.002, 0.03);
    for (int i = 0; i < 500; i++) begin
      real l1, l2, l3;
      l1 = rnd(0.01, 2.0); l2 = rnd(-1.0, 1.0); l3 = rnd(0.01, 2.0);
      run(l1 * l1, l1 * l2, l2 * l2 + l3 * l3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

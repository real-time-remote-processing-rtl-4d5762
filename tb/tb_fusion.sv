// tb_fusion: random panel estimates (inverse covariance and mean) fed at the
// prefusion's rate of one per 40 clocks; the fused covariance and mean are
// compared with the conflation formulas in real arithmetic. Also checks that
// consecutive inferences are fused without loss (one result per 160 clocks)
// and the latency after the last panel.
module tb_fusion;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  localparam int P = 4;
  localparam int NINF = 40;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  fp_t c1, c2, c3, m1, m2, f1, f2, f3, fm1, fm2;
  int checks = 0, failures = 0;
  real e1 [NINF], e2 [NINF], e3 [NINF], em1 [NINF], em2 [NINF];
  int t_last [NINF];
  int cyc = 0, nout = 0;

  fusion #(.P(P)) dut (.clk, .rst_n, .in_valid, .in_ready,
    .inv_cov_1(c1), .inv_cov_2(c2), .inv_cov_3(c3), .mean_1(m1), .mean_2(m2),
    .out_valid, .f_cov_1(f1), .f_cov_2(f2), .f_cov_3(f3), .f_mean_1(fm1), .f_mean_2(fm2));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    c1 = FP_ZERO; c2 = FP_ZERO; c3 = FP_ZERO; m1 = FP_ZERO; m2 = FP_ZERO;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < NINF; n++) begin
      real s11, s12, s22, v1, v2, det;
      s11 = 0; s12 = 0; s22 = 0; v1 = 0; v2 = 0;
      for (int p = 0; p < P; p++) begin
        real l1, l2, l3;
        l1 = rnd(1.0, 50.0); l2 = rnd(-20.0, 20.0); l3 = rnd(1.0, 50.0);
        c1 = r2fp(l1 * l1); c2 = r2fp(l1 * l2); c3 = r2fp(l2 * l2 + l3 * l3);
        m1 = r2fp(rnd(-5.0, 5.0)); m2 = r2fp(rnd(-5.0, 5.0));
        s11 += fp2r(c1); s12 += fp2r(c2); s22 += fp2r(c3);
        v1 += fp2r(c1) * fp2r(m1) + fp2r(c2) * fp2r(m2);
        v2 += fp2r(c2) * fp2r(m1) + fp2r(c3) * fp2r(m2);
        checks++;
        if (!in_ready) begin failures++; $display("FAIL not ready"); end
        in_valid = 1;
        @(negedge clk) in_valid = 0;
        if (p == P - 1) t_last[n] = cyc;
        repeat (39) @(negedge clk);
      end
      det = s11 * s22 - s12 * s12;
      e1[n] = s22 / det; e2[n] = -s12 / det; e3[n] = s11 / det;
      em1[n] = e1[n] * v1 + e2[n] * v2; em2[n] = e2[n] * v1 + e3[n] * v2;
    end
    repeat (200) @(negedge clk);
    checks++;
    if (nout != NINF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real tol;
    tol = 1.0e-4;
    checks += 6;
    if (!close(fp2r(f1), e1[nout], tol, 0.0)) begin failures++; $display("FAIL f1 %g %g", fp2r(f1), e1[nout]); end
    if (!close(fp2r(f2), e2[nout], tol, 1.0e-4 * rabs(e1[nout]))) begin failures++; $display("FAIL f2 %g %g", fp2r(f2), e2[nout]); end
    if (!close(fp2r(f3), e3[nout], tol, 0.0)) begin failures++; $display("FAIL f3 %g %g", fp2r(f3), e3[nout]); end
    if (!close(fp2r(fm1), em1[nout], tol, 1.0e-4)) begin failures++; $display("FAIL m1 %g %g", fp2r(fm1), em1[nout]); end
    if (!close(fp2r(fm2), em2[nout], tol, 1.0e-4)) begin failures++; $display("FAIL m2 %g %g", fp2r(fm2), em2[nout]); end
    if (cyc - t_last[nout] > 80) begin failures++; $display("FAIL latency %0d", cyc - t_last[nout]); end
    if (nout == 0) $display("fusion latency after last panel: %0d clocks", cyc - t_last[nout]);
    nout++;
  end
endmodule

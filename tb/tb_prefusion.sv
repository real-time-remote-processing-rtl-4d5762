// tb_prefusion: streams random NN output tuples back to back through the
// prefusion and checks the inverse covariance against a real-arithmetic
// model of softplus (with the same polynomial approximations), scale*scale^T
// and the 2x2 inverse; checks the means, the one-tuple-per-stage rate and the
// three-stage latency.
module tb_prefusion;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  localparam int STAGE = 40;
  localparam int N = 60;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  fp_t s1, s2, s3, m1, m2, c1, c2, c3, mo1, mo2;
  int checks = 0, failures = 0;
  real w1 [N], w2 [N], w3 [N], wm1 [N], wm2 [N];
  int  t_in [N];
  int  cyc = 0, nin = 0, nout = 0;

  prefusion #(.STAGE(STAGE)) dut (.clk, .rst_n, .in_valid, .in_ready,
    .scale_1(s1), .scale_2(s2), .scale_3(s3), .mean_1(m1), .mean_2(m2),
    .out_valid, .inv_cov_1(c1), .inv_cov_2(c2), .inv_cov_3(c3),
    .mean_1_o(mo1), .mean_2_o(mo2));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic make(input int k);
    real l1, l3, a11, a12, a22, det;
    s1 = r2fp(rnd(-3.0, 0.0)); s2 = r2fp(rnd(-0.3, 0.3)); s3 = r2fp(rnd(-3.0, 0.0));
    m1 = r2fp(rnd(-5.0, 5.0)); m2 = r2fp(rnd(-5.0, 5.0));
    l1 = log1p_model(exp_model(fp2r(s1))) + 1.0e-5;
    l3 = log1p_model(exp_model(fp2r(s3))) + 1.0e-5;
    a11 = l1 * l1; a12 = l1 * fp2r(s2); a22 = fp2r(s2) * fp2r(s2) + l3 * l3;
    det = a11 * a22 - a12 * a12;
    w1[k] = a22 / det; w2[k] = -a12 / det; w3[k] = a11 / det;
    wm1[k] = fp2r(m1); wm2[k] = fp2r(m2);
  endtask

  // driver: present tuples continuously
  initial begin
    s1 = FP_ZERO; s2 = FP_ZERO; s3 = FP_ZERO; m1 = FP_ZERO; m2 = FP_ZERO;
    repeat (3) @(negedge clk); rst_n = 1;
    make(0); in_valid = 1;
    while (nin < N) begin
      @(posedge clk);
      if (in_valid && in_ready) begin
        t_in[nin] = cyc; nin++;
        #1;
        if (nin < N) make(nin); else in_valid = 0;
      end
    end
  end

  // monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    real tol;
    tol = 2.0e-4;
    checks += 6;
    if (!close(fp2r(c1), w1[nout], tol, 0.0)) begin failures++; $display("FAIL c1 %g %g", fp2r(c1), w1[nout]); end
    if (!close(fp2r(c2), w2[nout], tol, 1.0e-4 * rabs(w1[nout]))) begin failures++; $display("FAIL c2 %g %g", fp2r(c2), w2[nout]); end
    if (!close(fp2r(c3), w3[nout], tol, 0.0)) begin failures++; $display("FAIL c3 %g %g", fp2r(c3), w3[nout]); end
    if (fp2r(mo1) != wm1[nout] || fp2r(mo2) != wm2[nout]) begin failures++; $display("FAIL mean"); end
    // latency: three stages after acceptance
    if (cyc - t_in[nout] != 3 * STAGE + 2) begin failures++; $display("FAIL latency %0d", cyc - t_in[nout]); end
    // rate: one per stage
    if (nout > 0 && t_in[nout] - t_in[nout-1] != STAGE) begin failures++; $display("FAIL rate"); end
    nout++;
    if (nout == N) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule

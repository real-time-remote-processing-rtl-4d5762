// tb_fp_exp: exponential unit against the same nested polynomial in real
// arithmetic, plus a coarse check against exp() near the expansion point,
// and the latency.
module tb_fp_exp;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fp_t x, y;
  int checks = 0, failures = 0;
  fp_exp dut (.clk, .rst_n, .start, .x, .busy, .done, .y);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input real v);
    int lat;
    real want;
    x = r2fp(v); want = exp_model(fp2r(x));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (!close(fp2r(y), want, 2.0e-5, 1.0e-6)) begin
      failures++; $display("FAIL exp(%g) = %g want %g", fp2r(x), fp2r(y), want);
    end
    if (lat != 29) begin failures++; $display("FAIL latency %0d", lat); end
    if (v > -1.7 && v < -1.3) begin
      checks++;
      if (!close(fp2r(y), $exp(v), 1.0e-3, 0.0)) begin
        failures++; $display("FAIL exp(%g) = %g vs exp %g", v, fp2r(y), $exp(v));
      end
    end
  endtask
  initial begin
    x = FP_ZERO;
    repeat (3) @(negedge clk); rst_n = 1;
    run(-1.5); run(-1.4); run(-1.6); run(0.0); run(-3.0);
    for (int i = 0; i < 400; i++) run(rnd(-3.5, 0.5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

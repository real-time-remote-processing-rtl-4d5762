// tb_fp_log1p: logarithm unit against the same nested polynomial in real
// arithmetic, plus a coarse check against exp() near the expansion point,
// and the latency.
module tb_fp_log1p;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fp_t x, y;
  int checks = 0, failures = 0;
  fp_log1p dut (.clk, .rst_n, .start, .x, .busy, .done, .y);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input real v);
    int lat;
    real want;
    x = r2fp(v); want = log1p_model(fp2r(x));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (!close(fp2r(y), want, 2.0e-5, 1.0e-6)) begin
      failures++; $display("FAIL log1p(%g) = %g want %g", fp2r(x), fp2r(y), want);
    end
    if (lat != 37) begin failures++; $display("FAIL latency %0d", lat); end
    if (v > 0.45 && v < 0.8) begin
      checks++;
      if (!close(fp2r(y), $ln(1.0 + v), 1.0e-3, 0.0)) begin
        failures++; $display("FAIL log1p(%g) = %g vs ln %g", v, fp2r(y), $ln(1.0 + v));
      end
    end
  endtask
  initial begin
    x = FP_ZERO;
    repeat (3) @(negedge clk); rst_n = 1;
    run(0.625); run(0.5); run(0.75); run(0.2); run(1.2);
    for (int i = 0; i < 400; i++) run(rnd(0.1, 1.4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

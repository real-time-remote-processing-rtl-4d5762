// tb_fp_recip: reciprocals of random values over a wide range; checks the
// relative error after three Newton-Raphson iterations and the latency.
module tb_fp_recip;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fp_t d, y;
  int checks = 0, failures = 0;
  fp_recip dut (.clk, .rst_n, .start, .d, .busy, .done, .y);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input real v);
    int lat;
    real want;
    d = r2fp(v); want = 1.0 / fp2r(d);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (!close(fp2r(y), want, 1.0e-6, 0.0)) begin
      failures++; $display("FAIL 1/%g = %g want %g", fp2r(d), fp2r(y), want);
    end
    if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
  endtask
  initial begin
    d = FP_ZERO;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1.0); run(2.0); run(-3.0); run(1.9999999); run(1.0e-4); run(12345.0);
    for (int i = 0; i < 3000; i++) run((($urandom & 1) ? -1.0 : 1.0) * rnd(1.0, 2.0) * (2.0 ** rnd(-60.0, 60.0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dual_int8_mul: all 2^16 (x, wa) pairs with random wb, and random
// triples; both products compared with ordinary multiplication.
module tb_dual_int8_mul;
  logic clk = 0;
  logic signed [7:0] x, wa, wb;
  logic signed [15:0] pa, pb;
  int checks = 0, failures = 0;
  dual_int8_mul dut (.clk, .x, .wa, .wb, .pa, .pb);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(input int a, input int b, input int c);
    @(negedge clk) begin x = 8'(a); wa = 8'(b); wb = 8'(c); end
    @(negedge clk);
    checks += 2;
    if (pa != 16'(a * b)) begin failures++; if (failures < 10) $display("FAIL pa %0d*%0d=%0d", a, b, pa); end
    if (pb != 16'(a * c)) begin failures++; if (failures < 10) $display("FAIL pb %0d*%0d=%0d", a, c, pb); end
  endtask
  initial begin
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++)
        run(a, b, $signed(8'($urandom)));
    run(-128, -128, -128); run(127, -128, 127); run(-128, 127, -128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

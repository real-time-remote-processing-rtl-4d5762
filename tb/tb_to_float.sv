// tb_to_float: every 16-bit input (Q8.8) converted and compared exactly
// with the real value, which the 23-bit mantissa holds without loss.
module tb_to_float;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic signed [15:0] x;
  fp_t y;
  int checks = 0, failures = 0;
  to_float #(.W(16), .FRAC(8)) dut (.clk, .rst_n, .in_valid(iv), .x, .out_valid(ov), .y);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    x = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = -32768; i < 32768; i++) begin
      @(negedge clk) begin x = 16'(i); iv = 1; end
      @(negedge clk) iv = 0;
      checks++;
      if (!ov || fp2r(y) != real'(i) / 256.0 || (i != 0 && !y.man[22])) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %g", i, fp2r(y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

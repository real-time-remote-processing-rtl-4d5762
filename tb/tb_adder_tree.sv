// tb_adder_tree: a 13-input tree (not a power of two, so padding is used)
// with a new random vector every clock; sums and latency are checked.
module tb_adder_tree;
  localparam int N = 13, IW = 16, OW = 21, LAT = 2;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [N*IW-1:0] in;
  logic signed [OW-1:0] sum;
  int checks = 0, failures = 0, nin = 0, nout = 0;
  longint exp_q [$];
  adder_tree #(.N(N), .IW(IW), .OW(OW), .REG_EVERY(3)) dut (
    .clk, .rst_n, .in_valid(iv), .in, .out_valid(ov), .sum);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      longint s; s = 0;
      @(negedge clk);
      iv = ($urandom % 4) != 0;
      for (int i = 0; i < N; i++) begin
        in[i*IW +: IW] = 16'($urandom);
        s += longint'($signed(in[i*IW +: IW]));
      end
      if (iv) exp_q.push_back(s);
    end
    @(negedge clk) iv = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d sums missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // latency: valid must come out exactly LAT clocks after it went in
  logic [LAT-1:0] vline;
  always_ff @(posedge clk) vline <= rst_n ? {vline[LAT-2:0], iv} : '0;
  always @(posedge clk) if (rst_n) begin
    if (ov != vline[LAT-1]) begin failures++; $display("FAIL latency"); end
    if (ov) begin
      longint w;
      w = exp_q.pop_front();
      checks++;
      if (longint'(sum) != w) begin failures++; $display("FAIL sum %0d want %0d", sum, w); end
    end
  end
endmodule

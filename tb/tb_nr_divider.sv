// tb_nr_divider: a new random division every clock (24-bit dividend,
// 16-bit divisor, 3 iterations per stage = 8 stages); quotient, tag and
// latency checked; includes a zero divisor and edge values.
module tb_nr_divider;
  localparam int NW = 24, DW = 16, LAT = 8;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [NW-1:0] n, q;
  logic [DW-1:0] d;
  logic [7:0] tin, tout;
  int checks = 0, failures = 0, k = 0;
  longint eq [$];
  int     et [$];
  nr_divider #(.NW(NW), .DW(DW), .ITER(3), .TW(8)) dut (
    .clk, .rst_n, .in_valid(iv), .n, .d, .in_tag(tin), .out_valid(ov), .q, .out_tag(tout));
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    n = '0; d = '0; tin = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (k = 0; k < 5000; k++) begin
      @(negedge clk);
      iv = 1; tin = 8'(k);
      case (k)
        0: begin n = '1; d = 16'd1; end
        1: begin n = '1; d = '1; end
        2: begin n = 24'd12345; d = 16'd0; end
        3: begin n = 24'd0; d = 16'd7; end
        default: begin n = 24'($urandom); d = 16'($urandom >> ($urandom % 16)); end
      endcase
      eq.push_back((d == 0) ? 64'hffffff : longint'(n) / longint'(d));
      et.push_back(k % 256);
    end
    @(negedge clk) iv = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (eq.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [LAT-1:0] vline;
  always_ff @(posedge clk) vline <= rst_n ? {vline[LAT-2:0], iv} : '0;
  always @(posedge clk) if (rst_n) begin
    if (ov != vline[LAT-1]) begin failures++; $display("FAIL latency"); end
    if (ov) begin
      longint w; int t;
      w = eq.pop_front(); t = et.pop_front();
      checks += 2;
      if (longint'(q) != w) begin failures++; $display("FAIL q %0d want %0d", q, w); end
      if (int'(tout) != t) begin failures++; $display("FAIL tag"); end
    end
  end
endmodule

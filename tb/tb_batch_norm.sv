// tb_batch_norm: random constants for 200 neurons (some with tiny sd to
// force saturation) and one random input per clock; every output compared
// with the reference formula and the 11-clock latency checked.
module tb_batch_norm;
  import nn_model_pkg::*;
  localparam int N = 200, LAT = 11;
  logic clk = 0, rst_n = 0;
  logic p_we = 0; logic [9:0] p_addr = 0; logic signed [15:0] p_data = 0;
  logic iv = 0, ov; logic [7:0] ii, oi; logic signed [15:0] x, y;
  int checks = 0, failures = 0;
  shortint mean [N], sd [N], g [N], b [N];
  int eq [$], ei [$];
  batch_norm #(.N(N)) dut (.clk, .rst_n, .p_we, .p_addr, .p_data,
    .in_valid(iv), .in_idx(ii), .x, .out_valid(ov), .out_idx(oi), .y);
  always #5 clk = ~clk;
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int ref_bn(int k, int xv);
    longint d, ad, asd, q, qs;
    d   = nn_model#()::sat16(longint'(xv) - longint'(mean[k]));
    ad  = (d < 0) ? -d : d;
    asd = (sd[k] < 0) ? -longint'(sd[k]) : longint'(sd[k]);
    q   = (asd == 0) ? 64'hffffff : (ad * 256) / asd;
    qs  = (q > 32767) ? 32767 : q;
    if ((d < 0) != (sd[k] < 0)) qs = -qs;
    return int'(nn_model#()::sat16(((qs * longint'(g[k])) >>> 8) + longint'(b[k])));
  endfunction
  task automatic wr(int addr, int data);
    @(negedge clk) begin p_we = 1; p_addr = 10'(addr); p_data = 16'(data); end
  endtask
  initial begin
    ii = 0; x = 0;
    for (int k = 0; k < N; k++) begin
      mean[k] = shortint'($urandom_range(4000)) - 16'sd1000;
      sd[k]   = shortint'($urandom_range(3000)) - 16'sd500;
      if (k % 17 == 3) sd[k] = shortint'($urandom_range(3));
      g[k]    = shortint'($urandom_range(2000)) - 16'sd1000;
      b[k]    = shortint'($urandom_range(2000)) - 16'sd1000;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < N; k++) begin
      wr(k*4, mean[k]); wr(k*4+1, sd[k]); wr(k*4+2, g[k]); wr(k*4+3, b[k]);
    end
    @(negedge clk) p_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      iv = 1; ii = 8'($urandom_range(N - 1)); x = 16'($urandom);
      if (n % 5 == 0) x = 16'($urandom_range(3000));
      eq.push_back(ref_bn(int'(ii), int'(x))); ei.push_back(int'(ii));
    end
    @(negedge clk) iv = 0;
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (eq.size() != 0) begin failures++; $display("FAIL missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [LAT-1:0] vline;
  always_ff @(posedge clk) vline <= rst_n ? {vline[LAT-2:0], iv} : '0;
  always @(posedge clk) if (rst_n) begin
    if (ov != vline[LAT-1]) begin failures++; $display("FAIL latency"); end
    if (ov) begin
      int w, wi;
      w = eq.pop_front(); wi = ei.pop_front();
      checks += 2;
      if (int'(y) != w) begin failures++; if (failures < 10) $display("FAIL y %0d want %0d", y, w); end
      if (int'(oi) != wi) begin failures++; $display("FAIL idx"); end
    end
  end
endmodule

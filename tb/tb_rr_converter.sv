// tb_rr_converter: panels 2 and 3 arrive on the local stream, panels 0 and 1
// on the remote stream, in random order, with random gaps, for four
// estimates sent without waiting, so later tuples must be stalled until
// their slot is free. The receiver takes tuples with a random ready. Each
// estimate must come out as panels 0..3 in order, every value converted
// exactly (value / 256); stalls must have happened.
module tb_rr_converter;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  localparam int NE = 4;
  logic clk = 0, rst_n = 0;
  logic av = 0, bv = 0, al = 0, bl = 0, ar, br, ov, ordy = 0, stall, bad;
  logic [31:0] ad = 0, bd = 0;
  fp_t m1, m2, s1, s2, s3;
  int checks = 0, failures = 0, nout = 0, stalls = 0;
  shortint val [NE][4][5];
  rr_converter #(.N_PANEL(4)) dut (.clk, .rst_n,
    .a_tvalid(av), .a_tready(ar), .a_tdata(ad), .a_tlast(al),
    .b_tvalid(bv), .b_tready(br), .b_tdata(bd), .b_tlast(bl),
    .out_valid(ov), .out_ready(ordy), .mean_1(m1), .mean_2(m2),
    .scale_1(s1), .scale_2(s2), .scale_3(s3), .stall, .bad_id(bad));
  always #5 clk = ~clk;
  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) ordy <= ($urandom_range(2) == 0);
  always @(posedge clk) if (rst_n && stall) stalls++;
  always @(posedge clk) if (rst_n && ov && ordy) begin
    int e, p; fp_t g [5];
    e = nout / 4; p = nout % 4;
    g = '{m1, m2, s1, s2, s3};
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (fp2r(g[k]) != real'(val[e][p][k]) / 256.0) begin
        failures++; $display("FAIL e%0d p%0d k%0d %f want %f", e, p, k, fp2r(g[k]), real'(val[e][p][k]) / 256.0);
      end
    end
    nout++;
  end
  task automatic send_a(input logic [31:0] w, input logic last);
    @(negedge clk) begin av = 1; ad = w; al = last; end
    @(posedge clk); while (!ar) @(posedge clk);
    @(negedge clk) av = 0;
    repeat ($urandom_range(2)) @(negedge clk);
  endtask
  task automatic send_b(input logic [31:0] w, input logic last);
    @(negedge clk) begin bv = 1; bd = w; bl = last; end
    @(posedge clk); while (!br) @(posedge clk);
    @(negedge clk) bv = 0;
    repeat ($urandom_range(2)) @(negedge clk);
  endtask
  initial begin
    foreach (val[e, p, k]) val[e][p][k] = shortint'($urandom);
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      for (int e = 0; e < NE; e++)
        for (int i = 0; i < 2; i++) begin
          int p; p = (e % 2 == 0) ? 2 + i : 3 - i;
          send_a({val[e][p][1], val[e][p][0]}, 0);
          send_a({val[e][p][3], val[e][p][2]}, 0);
          send_a({16'(p), val[e][p][4]}, 1);
        end
      for (int e = 0; e < NE; e++)
        for (int i = 0; i < 2; i++) begin
          int p; p = (e % 2 == 1) ? i : 1 - i;
          send_b({val[e][p][1], val[e][p][0]}, 0);
          send_b({val[e][p][3], val[e][p][2]}, 0);
          send_b({16'(p), val[e][p][4]}, 1);
        end
    join
    repeat (50) @(negedge clk);
    checks++;
    if (nout != 4 * NE) begin failures++; $display("FAIL %0d tuples out", nout); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall"); end
    $display("stall cycles %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rr_packer: two producers pulse random tuples (at most one outstanding
// each) while the sink drops TREADY at random. Every tuple must come out
// once, in order per producer, packed as {v1,v0},{v3,v2},{id,v4} with TLAST
// on the third word; when both producers wait, grants must alternate. At
// the end a second tuple is pushed into a full holding register and the
// overflow flag must rise.
module tb_rr_packer;
  logic clk = 0, rst_n = 0;
  logic [1:0] iv = 0; logic [159:0] id = 0;
  logic tv, tr = 0, tl, ovf; logic [31:0] td;
  int checks = 0, failures = 0, got = 0, last_id = -1, alternations = 0;
  logic [79:0] q [2][$];
  logic [31:0] w [3]; int wn = 0;
  rr_packer #(.N_NN(2), .PANEL_BASE(2)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id),
    .m_tvalid(tv), .m_tready(tr), .m_tdata(td), .m_tlast(tl), .overflow(ovf));
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) tr <= ($urandom_range(3) != 0);
  always @(posedge clk) if (rst_n && tv && tr) begin
    checks++;
    if (tl != (wn == 2)) begin failures++; $display("FAIL tlast at word %0d", wn); end
    w[wn] = td; wn++;
    if (wn == 3) begin
      int p; logic [79:0] e;
      wn = 0; p = int'(w[2][31:16]) - 2;
      checks++;
      if (p < 0 || p > 1 || q[p].size() == 0) begin failures++; $display("FAIL id %0d", p); end
      else begin
        e = q[p].pop_front();
        if ({w[2][15:0], w[1], w[0]} != e) begin failures++; $display("FAIL data p%0d", p); end
        if (last_id >= 0 && p != last_id) alternations++;
        last_id = p; got++;
      end
    end
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      iv = 0;
      for (int p = 0; p < 2; p++)
        if (!dut.full[p] && $urandom_range(2) == 0) begin
          logic [79:0] t; t = {$urandom, $urandom, $urandom};
          id[p*80 +: 80] = t; iv[p] = 1; q[p].push_back(t);
        end
    end
    @(negedge clk) iv = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (q[0].size() + q[1].size() != 0 || ovf) begin failures++; $display("FAIL left %0d ovf %0d", q[0].size() + q[1].size(), ovf); end
    checks++;
    if (alternations < got / 4) begin failures++; $display("FAIL alternations %0d of %0d", alternations, got); end
    // overflow: hold the sink, fill producer 0 twice
    tr = 0; force tr = 0;
    @(negedge clk) begin iv = 2'b01; id[79:0] = '1; end
    @(negedge clk) iv = 2'b01;
    @(negedge clk) iv = 2'b01;
    @(negedge clk) iv = 0;
    checks++;
    if (!ovf) begin failures++; $display("FAIL no overflow"); end
    $display("tuples %0d alternations %0d", got, alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

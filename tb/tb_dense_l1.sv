// tb_dense_l1: a reduced layer 1 (64 inputs, 8 neurons, 16 inputs per
// clock) with random INT8 weights and inputs, three vectors back to back.
// Checks every neuron's ReLU'd, scaled sum, the pair order, one pair every
// N_IN/PARA_IN clocks and no gap between vectors.
module tb_dense_l1;
  localparam int N_IN = 64, N_OUT = 8, PARA_IN = 16, SH = 6, CH = N_IN / PARA_IN;
  localparam int AW = $clog2(N_OUT / 2 * CH) + $clog2(PARA_IN) + 1;
  logic clk = 0, rst_n = 0;
  logic w_we = 0; logic [AW-1:0] w_addr = 0; logic [7:0] w_data = 0;
  logic start = 0, ready; logic [N_IN*8-1:0] x = 0;
  logic ov; logic [1:0] op; logic signed [15:0] oa, ob;
  int checks = 0, failures = 0, cyc = 0, nout = 0, last_t = 0;
  byte w [N_IN][N_OUT];
  int  want [$];
  dense_l1 #(.N_IN(N_IN), .N_OUT(N_OUT), .PARA_IN(PARA_IN), .OUT_SHIFT(SH)) dut (
    .clk, .rst_n, .w_we, .w_addr, .w_data, .start, .ready, .x,
    .out_valid(ov), .out_pair(op), .out_a(oa), .out_b(ob));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (w[i, o]) begin
      int t;
      w[i][o] = byte'($urandom);
      t = (o / 2) * CH + i / PARA_IN;
      @(negedge clk) begin
        w_we = 1; w_addr = AW'((t << ($clog2(PARA_IN) + 1)) | ((i % PARA_IN) << 1) | (o % 2));
        w_data = w[i][o];
      end
    end
    @(negedge clk) w_we = 0;
    for (int v = 0; v < 3; v++) begin
      for (int i = 0; i < N_IN; i++) x[i*8 +: 8] = 8'($urandom);
      for (int o = 0; o < N_OUT; o++) begin
        longint acc; acc = 0;
        for (int i = 0; i < N_IN; i++) acc += longint'($signed(x[i*8 +: 8])) * longint'(w[i][o]);
        acc = acc >>> SH;
        want.push_back(acc < 0 ? 0 : (acc > 32767 ? 32767 : int'(acc)));
      end
      start = 1;
      @(posedge clk); while (!ready) @(posedge clk);
      @(negedge clk) start = 0;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (nout != 12) begin failures++; $display("FAIL %0d pairs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && ov) begin
    int wa, wb;
    wa = want.pop_front(); wb = want.pop_front();
    checks += 3;
    if (int'(oa) != wa || int'(ob) != wb) begin failures++; $display("FAIL pair %0d: %0d %0d want %0d %0d", op, oa, ob, wa, wb); end
    if (int'(op) != nout % 4) begin failures++; $display("FAIL pair index"); end
    if (nout > 0 && cyc - last_t != CH) begin failures++; $display("FAIL spacing %0d", cyc - last_t); end
    last_t = cyc; nout++;
  end
endmodule

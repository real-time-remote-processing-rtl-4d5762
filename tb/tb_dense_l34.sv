// tb_dense_l34: layers 3 and 4 at full size (100 -> 20 -> 5) with random
// weights; four vectors started back to back. Outputs compared with the
// reference and the result interval checked (200 clocks).
module tb_dense_l34;
  localparam int N_IN = 100, N_MID = 20, N_OUT = 5, P = 10, CH = 10;
  logic clk = 0, rst_n = 0;
  logic w3_we = 0, w4_we = 0; logic [11:0] w3_addr = 0; logic [7:0] w4_addr = 0;
  logic signed [15:0] w3_data = 0, w4_data = 0;
  logic start = 0, ready, ov; logic [N_IN*16-1:0] h = 0; logic [N_OUT*16-1:0] y;
  int checks = 0, failures = 0, nout = 0, cyc = 0, t_prev = 0;
  shortint w3 [N_IN][N_MID], w4 [N_MID][N_OUT];
  int want [4][N_OUT];
  dense_l34 dut (.clk, .rst_n, .w3_we, .w3_addr, .w3_data, .w4_we, .w4_addr, .w4_data,
                 .start, .ready, .h, .out_valid(ov), .y);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [N_IN*16-1:0] hv [4];
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (w3[i, o]) begin
      w3[i][o] = shortint'($urandom_range(400)) - 16'sd200;
      @(negedge clk) begin w3_we = 1; w3_addr = 12'(((o * CH + i / P) << 4) | (i % P)); w3_data = w3[i][o]; end
    end
    @(negedge clk) w3_we = 0;
    foreach (w4[o, k]) begin
      w4[o][k] = shortint'($urandom_range(400)) - 16'sd200;
      @(negedge clk) begin w4_we = 1; w4_addr = 8'((o << 3) | k); w4_data = w4[o][k]; end
    end
    @(negedge clk) w4_we = 0;
    for (int v = 0; v < 4; v++) begin
      int h3 [N_MID];
      for (int i = 0; i < N_IN; i++) hv[v][i*16 +: 16] = 16'($urandom_range(3000));
      for (int o = 0; o < N_MID; o++) begin
        longint acc; acc = 0;
        for (int i = 0; i < N_IN; i++) acc += longint'($signed(hv[v][i*16 +: 16])) * longint'(w3[i][o]);
        acc = acc >>> 8;
        h3[o] = acc < 0 ? 0 : (acc > 32767 ? 32767 : int'(acc));
      end
      for (int k = 0; k < N_OUT; k++) begin
        longint acc; acc = 0;
        for (int o = 0; o < N_MID; o++) acc += longint'(h3[o]) * longint'(w4[o][k]);
        acc = acc >>> 8;
        want[v][k] = acc > 32767 ? 32767 : (acc < -32768 ? -32768 : int'(acc));
      end
    end
    for (int v = 0; v < 4; v++) begin
      h = hv[v]; start = 1;
      @(posedge clk); while (!ready) @(posedge clk);
      @(negedge clk) start = 0;
    end
    repeat (300) @(negedge clk);
    checks++;
    if (nout != 4) begin failures++; $display("FAIL %0d vectors", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && ov) begin
    for (int k = 0; k < N_OUT; k++) begin
      checks++;
      if (int'($signed(y[k*16 +: 16])) != want[nout][k]) begin
        failures++; $display("FAIL v%0d k%0d %0d want %0d", nout, k, $signed(y[k*16 +: 16]), want[nout][k]);
      end
    end
    if (nout > 0) begin
      checks++;
      if (cyc - t_prev != 200) begin failures++; $display("FAIL interval %0d", cyc - t_prev); end
    end
    t_prev = cyc; nout++;
  end
endmodule

// tb_dense_l2: layer 2 at full size (200 -> 100) with random weights; three
// input vectors streamed at one value per clock without gaps. Every output
// neuron is checked against the reference sum (scaled, saturated, ReLU).
module tb_dense_l2;
  localparam int N_IN = 200, N_OUT = 100;
  logic clk = 0, rst_n = 0;
  logic w_we = 0; logic [14:0] w_addr = 0; logic signed [15:0] w_data = 0;
  logic iv = 0; logic [7:0] ii = 0; logic signed [15:0] x = 0;
  logic ov; logic [N_OUT*16-1:0] h;
  int checks = 0, failures = 0, nout = 0, cyc = 0, t_last = 0;
  shortint w [N_IN][N_OUT];
  int want [3][N_OUT];
  dense_l2 dut (.clk, .rst_n, .w_we, .w_addr, .w_data, .in_valid(iv), .in_idx(ii), .x,
                .out_valid(ov), .h);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    shortint xv [3][N_IN];
    repeat (3) @(negedge clk); rst_n = 1;
    foreach (w[k, j]) begin
      w[k][j] = shortint'($urandom_range(200)) - 16'sd100;
      @(negedge clk) begin w_we = 1; w_addr = 15'((k << 7) | j); w_data = w[k][j]; end
    end
    @(negedge clk) w_we = 0;
    for (int v = 0; v < 3; v++) begin
      foreach (xv[v][k]) xv[v][k] = shortint'($urandom);
      for (int j = 0; j < N_OUT; j++) begin
        longint acc; acc = 0;
        for (int k = 0; k < N_IN; k++) acc += longint'(xv[v][k]) * longint'(w[k][j]);
        acc = acc >>> 8;
        want[v][j] = acc < 0 ? 0 : (acc > 32767 ? 32767 : int'(acc));
      end
    end
    for (int v = 0; v < 3; v++)
      for (int k = 0; k < N_IN; k++) begin
        @(negedge clk) begin iv = 1; ii = 8'(k); x = xv[v][k]; end
        if (k == N_IN - 1) t_last = cyc;
      end
    @(negedge clk) iv = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != 3) begin failures++; $display("FAIL %0d vectors", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (rst_n && ov) begin
    for (int j = 0; j < N_OUT; j++) begin
      checks++;
      if (int'($signed(h[j*16 +: 16])) != want[nout][j]) begin
        failures++; if (failures < 10) $display("FAIL v%0d n%0d %0d want %0d", nout, j, $signed(h[j*16 +: 16]), want[nout][j]);
      end
    end
    nout++;
  end
endmodule

// tb_nn_accel: the accelerator at its full size (1024-200-100-20-5) with
// random parameters, fed NV random CSI vectors back to back. Every output is
// compared bit for bit with the integer reference model. It also checks the
// throughput (one result every 200 clocks once the pipeline is full),
// reports the latency, and counts input back-pressure cycles.
module tb_nn_accel;
  import nn_model_pkg::*;
  localparam int NV = 6;
  localparam int N_IN = 1024, N_H1 = 200, N_H2 = 100, N_H3 = 20, N_OUT = 5;
  logic clk = 0, rst_n = 0;
  logic p_we = 0; logic [2:0] p_sel = 0; logic [17:0] p_addr = 0; logic [15:0] p_data = 0;
  logic s_tvalid = 0, s_tready, s_tlast = 0; logic [63:0] s_tdata = 0;
  logic out_valid; logic [N_OUT*16-1:0] y;
  int checks = 0, failures = 0, cyc = 0, nout = 0, stalls = 0;
  int t_first_beat [NV];
  int t_out [NV];
  byte     xs [NV][N_IN];
  shortint ys [NV][N_OUT];
  nn_model #() m;

  nn_accel dut (.clk, .rst_n, .p_we, .p_sel, .p_addr, .p_data,
                .s_tvalid, .s_tready, .s_tdata, .s_tlast, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (s_tvalid && !s_tready) stalls++;
  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int sel, input int addr, input int data);
    @(negedge clk);
    p_we = 1; p_sel = 3'(sel); p_addr = 18'(addr); p_data = 16'(data);
  endtask

  initial begin
    m = new();
    m.randomize_params();
    for (int v = 0; v < NV; v++) begin
      foreach (xs[v][i]) xs[v][i] = byte'($urandom);
      begin
        byte xx [N_IN]; shortint yy [N_OUT];
        xx = xs[v]; m.infer(xx, yy); ys[v] = yy;
      end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N_IN; i++) for (int o = 0; o < N_H1; o++) wr(0, m.a1(i, o), int'(m.w1[i][o]));
    for (int k = 0; k < N_H1; k++) begin
      wr(1, m.abn(k, 0), m.bn_mean[k]); wr(1, m.abn(k, 1), m.bn_sd[k]);
      wr(1, m.abn(k, 2), m.bn_g[k]);    wr(1, m.abn(k, 3), m.bn_b[k]);
    end
    for (int k = 0; k < N_H1; k++) for (int j = 0; j < N_H2; j++) wr(2, m.a2(k, j), m.w2[k][j]);
    for (int i = 0; i < N_H2; i++) for (int o = 0; o < N_H3; o++) wr(3, m.a3(i, o), m.w3[i][o]);
    for (int o = 0; o < N_H3; o++) for (int k = 0; k < N_OUT; k++) wr(4, m.a4(o, k), m.w4[o][k]);
    @(negedge clk) p_we = 0;
    // stream the vectors back to back
    for (int v = 0; v < NV; v++) begin
      for (int b = 0; b < N_IN / 8; b++) begin
        s_tvalid = 1;
        for (int l = 0; l < 8; l++) s_tdata[l*8 +: 8] = xs[v][b*8 + l];
        s_tlast = (b == N_IN / 8 - 1);
        if (b == 0) t_first_beat[v] = cyc;
        @(posedge clk);
        while (!s_tready) @(posedge clk);
        @(negedge clk);
      end
    end
    s_tvalid = 0; s_tlast = 0;
    repeat (1000) @(negedge clk);
    checks++;
    if (nout != NV) begin failures++; $display("FAIL %0d outputs", nout); end
    // the accelerator must have pushed back on the input at least once
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no back-pressure seen"); end
    $display("input stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    for (int k = 0; k < N_OUT; k++) begin
      checks++;
      if ($signed(y[k*16 +: 16]) != ys[nout][k]) begin
        failures++;
        $display("FAIL vec %0d out %0d: %0d want %0d", nout, k, $signed(y[k*16 +: 16]), ys[nout][k]);
      end
    end
    t_out[nout] = cyc;
    if (nout == 0) $display("latency from first input beat: %0d clocks", cyc - t_first_beat[0]);
    if (nout >= 2) begin
      checks++;
      if (t_out[nout] - t_out[nout-1] != 200) begin
        failures++; $display("FAIL interval %0d", t_out[nout] - t_out[nout-1]);
      end
    end
    nout++;
  end
endmodule

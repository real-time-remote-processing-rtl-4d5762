// tb_lis_top: the whole system at its default sizes, end to end. Four
// networks get their own random parameters and four memories their own
// random CSI vectors; all four memories are enabled at once and send their
// 16 vectors. The testbench closes the loops the vendor blocks would close:
// memory -> network streams are wired straight through (FIFO), the local
// round-robin stream reaches the converter through a behavioural FIFO of
// 64 words, and the sending
// board's stream reaches the receiving board's DMA input through a delay
// line with random gaps (FIFO, DMA, processing systems and Ethernet).
// Checks: every tuple on both round-robin streams against a bit-exact model
// of its network; every fused estimate against a real-valued model built on
// those tuples (same polynomial exp/log as the hardware); 16 estimates in
// all. Counted mechanisms, each of which must occur: input back-pressure
// from a network, a tuple waiting for the round-robin grant, a tuple
// crossing the link, a converter stall, the prefusion holding the converter
// off, and fused results.
module tb_lis_top;
  import lis_pkg::*;
  import lis_tb_pkg::*;
  import nn_model_pkg::*;
  localparam int NP = 4, NV = 16, N_IN = 1024, L = 8, BEATS = N_IN / L, LINK_DELAY = 700;
  typedef nn_model #() model_t;

  logic clk = 0, rst_n = 0;
  logic p_we = 0; logic [1:0] p_nn = 0; logic [2:0] p_sel = 0; logic [17:0] p_addr = 0; logic [15:0] p_data = 0;
  logic c_we = 0; logic [1:0] c_src = 0; logic [10:0] c_addr = 0; logic [63:0] c_data = 0; logic [NP-1:0] c_enable = 0;
  logic [NP-1:0] csi_tvalid, csi_tready, csi_tlast;
  logic [NP-1:0][63:0] csi_tdata;
  logic tx_tvalid, tx_tready, tx_tlast, lrr_tvalid, lrr_tready = 0, lrr_tlast;
  logic lcv_tvalid = 0, lcv_tlast = 0, lcv_tready, rx_tvalid = 0, rx_tready, rx_tlast = 0;
  logic [31:0] tx_tdata, lrr_tdata, rx_tdata = 0, lcv_tdata = 0;
  logic out_valid, cv_stall, cv_bad_id;
  fp_t f1, f2, f3, fm1, fm2;
  logic [NP-1:0][15:0] bursts; logic [NP-1:0] late; logic [1:0] ovf;

  lis_top dut (.clk, .rst_n, .p_we, .p_nn, .p_sel, .p_addr, .p_data,
    .c_we, .c_src, .c_addr, .c_data, .c_enable,
    .csi_tvalid, .csi_tready, .csi_tdata, .csi_tlast,
    .nn_tvalid(csi_tvalid), .nn_tready(csi_tready), .nn_tdata(csi_tdata), .nn_tlast(csi_tlast),
    .tx_tvalid, .tx_tready, .tx_tdata, .tx_tlast,
    .lrr_tvalid, .lrr_tready, .lrr_tdata, .lrr_tlast,
    .lcv_tvalid, .lcv_tready, .lcv_tdata, .lcv_tlast,
    .rx_tvalid, .rx_tready, .rx_tdata, .rx_tlast,
    .out_valid, .f_cov_1(f1), .f_cov_2(f2), .f_cov_3(f3), .f_mean_1(fm1), .f_mean_2(fm2),
    .csi_bursts(bursts), .csi_late(late), .rr_overflow(ovf), .cv_stall, .cv_bad_id);

  // ---- FIFO between the receiving board's round-robin router and converter
  localparam int FIFO_DEPTH = 64;
  logic [32:0] fifo_q [$];
  int fifo_max = 0;
  always @(posedge clk) if (rst_n) begin
    if (lcv_tvalid && lcv_tready) void'(fifo_q.pop_front());
    if (lrr_tvalid && lrr_tready) fifo_q.push_back({lrr_tlast, lrr_tdata});
    if (fifo_q.size() > fifo_max) fifo_max = fifo_q.size();
  end
  always @(negedge clk) begin
    lrr_tready = fifo_q.size() < FIFO_DEPTH;
    lcv_tvalid = fifo_q.size() > 0;
    if (fifo_q.size() > 0) {lcv_tlast, lcv_tdata} = fifo_q[0];
  end

  model_t  m [NP];
  byte     xs [NP][NV][N_IN];
  shortint ys [NP][NV][5];
  int checks = 0, failures = 0, cyc = 0, nfused = 0;
  int ntup [NP];
  int n_in_stall = 0, n_rr_wait = 0, n_link = 0, n_cv_stall = 0, n_pf_hold = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 3_000_000) begin
      failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
    end
  end

  // ---- link: sending board stream -> delay line -> receiving board DMA input
  logic [32:0] link_q [$];
  int          link_t [$];
  assign tx_tready = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (tx_tvalid) begin link_q.push_back({tx_tlast, tx_tdata}); link_t.push_back(cyc + LINK_DELAY); end
    if (rx_tvalid && rx_tready) begin void'(link_q.pop_front()); void'(link_t.pop_front()); end
  end
  always @(negedge clk) begin
    rx_tvalid = link_q.size() > 0 && link_t[0] <= cyc && $urandom_range(3) != 0;
    if (link_q.size() > 0) {rx_tlast, rx_tdata} = link_q[0];
  end

  // ---- tuple monitors on both round-robin streams
  task automatic tuple_check(input logic [31:0] w [3]);
    int p, n;
    p = int'(w[2][31:16]);
    n = ntup[p];
    checks++;
    if (p >= NP || n >= NV) begin
      failures++; $display("FAIL unexpected tuple, panel %0d", p); return;
    end
    if ({w[2][15:0], w[1], w[0]} != {ys[p][n][4], ys[p][n][3], ys[p][n][2], ys[p][n][1], ys[p][n][0]}) begin
      failures++; $display("FAIL tuple panel %0d vec %0d", p, n);
    end
    ntup[p]++;
  endtask
  logic [31:0] tw [3], lw [3]; int twn = 0, lwn = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_tvalid && tx_tready) begin
      tw[twn] = tx_tdata; twn++;
      if (twn == 3) begin twn = 0; tuple_check(tw); end
    end
    if (lrr_tvalid && lrr_tready) begin
      lw[lwn] = lrr_tdata; lwn++;
      if (lwn == 3) begin lwn = 0; tuple_check(lw); end
    end
    if (rx_tvalid && rx_tready && rx_tlast) n_link++;
    if (|(csi_tvalid & ~csi_tready)) n_in_stall++;
    if ((dut.u_rr_tx.full != 0 && dut.u_rr_tx.busy) || (dut.u_rr_rx.full != 0 && dut.u_rr_rx.busy)) n_rr_wait++;
    if (cv_stall) n_cv_stall++;
    if (dut.cv_valid && !dut.pf_ready) n_pf_hold++;
  end

  // ---- reference of the fusion, from the tuples
  task automatic fused_model(input int e, output real r [5]);
    real s11, s12, s22, v1, v2, det, c1, c2, c3;
    s11 = 0; s12 = 0; s22 = 0; v1 = 0; v2 = 0;
    for (int p = 0; p < NP; p++) begin
      real mu1, mu2, a1, a2, a3, l1, l3, a11, a12, a22, d;
      mu1 = real'(ys[p][e][0]) / 256.0; mu2 = real'(ys[p][e][1]) / 256.0;
      a1  = real'(ys[p][e][2]) / 256.0; a2  = real'(ys[p][e][3]) / 256.0;
      a3  = real'(ys[p][e][4]) / 256.0;
      l1 = log1p_model(exp_model(a1)) + 1.0e-5;
      l3 = log1p_model(exp_model(a3)) + 1.0e-5;
      a11 = l1 * l1; a12 = l1 * a2; a22 = a2 * a2 + l3 * l3;
      d = a11 * a22 - a12 * a12;
      c1 = a22 / d; c2 = -a12 / d; c3 = a11 / d;
      s11 += c1; s12 += c2; s22 += c3;
      v1 += c1 * mu1 + c2 * mu2; v2 += c2 * mu1 + c3 * mu2;
    end
    det = s11 * s22 - s12 * s12;
    r[0] = s22 / det; r[1] = -s12 / det; r[2] = s11 / det;
    r[3] = r[0] * v1 + r[1] * v2; r[4] = r[1] * v1 + r[2] * v2;
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    real r [5], g [5];
    fused_model(nfused, r);
    g = '{fp2r(f1), fp2r(f2), fp2r(f3), fp2r(fm1), fp2r(fm2)};
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (!close(g[k], r[k], 2.0e-2, 1.0e-3 * (rabs(r[0]) + rabs(r[2]) + (k >= 3 ? 1.0 : 0.0)))) begin
        failures++; $display("FAIL estimate %0d value %0d: %g want %g", nfused, k, g[k], r[k]);
      end
    end
    if (nfused == 0) $display("first estimate: mean (%g, %g), cov (%g, %g, %g)", g[3], g[4], g[0], g[1], g[2]);
    nfused++;
  end

  task automatic wr(input int nn, input int sel, input int addr, input int data);
    @(negedge clk);
    p_we = 1; p_nn = 2'(nn); p_sel = 3'(sel); p_addr = 18'(addr); p_data = 16'(data);
  endtask

  initial begin
    int t0;
    for (int p = 0; p < NP; p++) begin
      m[p] = new();
      m[p].randomize_params();
      // keep the outputs in the range a trained network would give
      foreach (m[p].w4[o, k]) m[p].w4[o][k] = shortint'(model_t::srand(-3, 3));
      for (int v = 0; v < NV; v++) begin
        byte xx [N_IN]; shortint yy [5];
        foreach (xx[i]) begin xx[i] = byte'($urandom); xs[p][v][i] = xx[i]; end
        m[p].infer(xx, yy);
        foreach (yy[k]) ys[p][v][k] = yy[k];
      end
      ntup[p] = 0;
    end
    $display("panel 0 vector 0 outputs: %0d %0d %0d %0d %0d", ys[0][0][0], ys[0][0][1], ys[0][0][2], ys[0][0][3], ys[0][0][4]);
    repeat (3) @(negedge clk); rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      for (int i = 0; i < N_IN; i++) for (int o = 0; o < 200; o++) wr(p, 0, m[p].a1(i, o), int'(m[p].w1[i][o]));
      for (int k = 0; k < 200; k++) begin
        wr(p, 1, m[p].abn(k, 0), m[p].bn_mean[k]); wr(p, 1, m[p].abn(k, 1), m[p].bn_sd[k]);
        wr(p, 1, m[p].abn(k, 2), m[p].bn_g[k]);    wr(p, 1, m[p].abn(k, 3), m[p].bn_b[k]);
      end
      for (int k = 0; k < 200; k++) for (int j = 0; j < 100; j++) wr(p, 2, m[p].a2(k, j), m[p].w2[k][j]);
      for (int i = 0; i < 100; i++) for (int o = 0; o < 20; o++) wr(p, 3, m[p].a3(i, o), m[p].w3[i][o]);
      for (int o = 0; o < 20; o++) for (int k = 0; k < 5; k++) wr(p, 4, m[p].a4(o, k), m[p].w4[o][k]);
      for (int v = 0; v < NV; v++)
        for (int b = 0; b < BEATS; b++) begin
          @(negedge clk);
          c_we = 1; c_src = 2'(p); c_addr = 11'(v * BEATS + b);
          for (int l = 0; l < L; l++) c_data[l*8 +: 8] = xs[p][v][b*L + l];
        end
    end
    @(negedge clk) begin p_we = 0; c_we = 0; end
    t0 = cyc;
    c_enable = '1;
    while (nfused < NV && cyc - t0 < 20000) @(negedge clk);
    repeat (20) @(negedge clk);
    $display("burst to last estimate: %0d clocks", cyc - t0);
    checks++; if (nfused != NV) begin failures++; $display("FAIL %0d estimates", nfused); end
    for (int p = 0; p < NP; p++) begin
      checks++; if (ntup[p] != NV) begin failures++; $display("FAIL panel %0d sent %0d tuples", p, ntup[p]); end
    end
    checks++; if (ovf != 0 || late != 0) begin failures++; $display("FAIL overflow %b late %b", ovf, late); end
    $display("largest FIFO fill: %0d words", fifo_max);
    $display("mechanisms: input stall %0d, rr wait %0d, link tuples %0d, converter stall %0d, prefusion hold %0d, estimates %0d",
             n_in_stall, n_rr_wait, n_link, n_cv_stall, n_pf_hold, nfused);
    checks++; if (n_in_stall == 0) begin failures++; $display("FAIL no input stall"); end
    checks++; if (n_rr_wait == 0)  begin failures++; $display("FAIL no round-robin wait"); end
    checks++; if (n_link != 2 * NV) begin failures++; $display("FAIL link tuples %0d", n_link); end
    checks++; if (n_cv_stall == 0) begin failures++; $display("FAIL no converter stall"); end
    checks++; if (n_pf_hold == 0)  begin failures++; $display("FAIL no prefusion hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

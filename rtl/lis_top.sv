// lis_top: the distributed LIS positioning system, both boards side by side.
//   Sending board:   M1, M2 (csi_source) -> NN 0, NN 1 (nn_accel) -> RR
//                    (rr_packer, panel ids 0, 1) -> 32-bit stream out (tx_*),
//                    which the FIFO, DMA and processing system forward over
//                    Ethernet.
//   Receiving board: M3, M4 -> NN 2, NN 3 -> RR (panel ids 2, 3) -> local
//                    stream out (lrr_*); the RR-and-converter takes that
//                    stream back (lcv_*) together with the DMA stream of the
//                    tuples received over Ethernet (rx_*), converts to
//                    floating point and feeds prefusion -> fusion, whose
//                    fused mean and covariance leave on the out_* ports.
// The FIFOs, the DMAs and the processing systems with the Ethernet link are
// vendor IP and software, so every place where one of them sits is a pair of
// stream ports: csi_* out / nn_* in between each memory and its network
// (FIFO), lrr_* out / lcv_* in on the receiving board (FIFO), tx_* out on the
// sending board (FIFO + DMA) and rx_* in on the receiving board (DMA).
// The arrangement of the blocks follows the description of the two boards;
// port grouping, the shared parameter/CSI load ports (with a select for the
// target network or memory) and the panel numbering are this design's own.
// Timing: one inference per NN every 200 clocks; each memory sends 16 vectors
// every PERIOD clocks; one fused estimate per four panel tuples.
module lis_top
  import lis_pkg::*;
#(
  parameter int unsigned N_IN     = 1024,
  parameter int unsigned N_H1     = 200,
  parameter int unsigned PARA_IN1 = 512,
  parameter int unsigned IN_LANES = 8,
  parameter int unsigned NV       = 16,
  parameter int unsigned PERIOD   = 250000,
  parameter int unsigned STAGE    = 40,
  localparam int unsigned NP      = 4,
  localparam int unsigned CW      = $clog2(NV * (N_IN / IN_LANES))
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // trained parameters (p_nn selects the network, p_sel/p_addr as nn_accel)
  input  logic                          p_we,
  input  logic [1:0]                    p_nn,
  input  logic [2:0]                    p_sel,
  input  logic [17:0]                   p_addr,
  input  logic [15:0]                   p_data,
  // CSI memories M1..M4 (c_src selects) and their enable bits
  input  logic                          c_we,
  input  logic [1:0]                    c_src,
  input  logic [CW-1:0]                 c_addr,
  input  logic [IN_LANES*8-1:0]         c_data,
  input  logic [NP-1:0]                 c_enable,
  // memory -> FIFO
  output logic [NP-1:0]                 csi_tvalid,
  input  logic [NP-1:0]                 csi_tready,
  output logic [NP-1:0][IN_LANES*8-1:0] csi_tdata,
  output logic [NP-1:0]                 csi_tlast,
  // FIFO -> network
  input  logic [NP-1:0]                 nn_tvalid,
  output logic [NP-1:0]                 nn_tready,
  input  logic [NP-1:0][IN_LANES*8-1:0] nn_tdata,
  input  logic [NP-1:0]                 nn_tlast,
  // sending board: RR -> FIFO -> DMA
  output logic                          tx_tvalid,
  input  logic                          tx_tready,
  output logic [31:0]                   tx_tdata,
  output logic                          tx_tlast,
  // receiving board: RR -> FIFO
  output logic                          lrr_tvalid,
  input  logic                          lrr_tready,
  output logic [31:0]                   lrr_tdata,
  output logic                          lrr_tlast,
  // receiving board: FIFO -> RR and converter
  input  logic                          lcv_tvalid,
  output logic                          lcv_tready,
  input  logic [31:0]                   lcv_tdata,
  input  logic                          lcv_tlast,
  // receiving board: DMA (tuples received over Ethernet) -> RR and converter
  input  logic                          rx_tvalid,
  output logic                          rx_tready,
  input  logic [31:0]                   rx_tdata,
  input  logic                          rx_tlast,
  // fused estimate -> FIFO -> DMA
  output logic                          out_valid,
  output fp_t                           f_cov_1,
  output fp_t                           f_cov_2,
  output fp_t                           f_cov_3,
  output fp_t                           f_mean_1,
  output fp_t                           f_mean_2,
  // status
  output logic [NP-1:0][15:0]           csi_bursts,
  output logic [NP-1:0]                 csi_late,
  output logic [1:0]                    rr_overflow,
  output logic                          cv_stall,
  output logic                          cv_bad_id
);
  logic [NP-1:0]        nn_ov;
  logic [NP-1:0][79:0]  nn_y;

  for (genvar k = 0; k < NP; k++) begin : g_panel
    csi_source #(.N_IN(N_IN), .NV(NV), .IN_LANES(IN_LANES), .PERIOD(PERIOD)) u_csi (
      .clk, .rst_n,
      .l_we(c_we && c_src == 2'(k)), .l_addr(c_addr), .l_data(c_data), .enable(c_enable[k]),
      .m_tvalid(csi_tvalid[k]), .m_tready(csi_tready[k]), .m_tdata(csi_tdata[k]),
      .m_tlast(csi_tlast[k]), .bursts(csi_bursts[k]), .late(csi_late[k]));

    nn_accel #(.N_IN(N_IN), .N_H1(N_H1), .PARA_IN1(PARA_IN1), .IN_LANES(IN_LANES)) u_nn (
      .clk, .rst_n,
      .p_we(p_we && p_nn == 2'(k)), .p_sel, .p_addr, .p_data,
      .s_tvalid(nn_tvalid[k]), .s_tready(nn_tready[k]), .s_tdata(nn_tdata[k]),
      .s_tlast(nn_tlast[k]), .out_valid(nn_ov[k]), .y(nn_y[k]));
  end

  // sending board
  rr_packer #(.N_NN(2), .PANEL_BASE(0)) u_rr_tx (
    .clk, .rst_n, .in_valid(nn_ov[1:0]), .in_data({nn_y[1], nn_y[0]}),
    .m_tvalid(tx_tvalid), .m_tready(tx_tready), .m_tdata(tx_tdata), .m_tlast(tx_tlast),
    .overflow(rr_overflow[0]));

  // receiving board
  rr_packer #(.N_NN(2), .PANEL_BASE(2)) u_rr_rx (
    .clk, .rst_n, .in_valid(nn_ov[3:2]), .in_data({nn_y[3], nn_y[2]}),
    .m_tvalid(lrr_tvalid), .m_tready(lrr_tready), .m_tdata(lrr_tdata), .m_tlast(lrr_tlast),
    .overflow(rr_overflow[1]));

  logic cv_valid, pf_ready, pf_valid, fu_ready;
  fp_t  cv_m1, cv_m2, cv_s1, cv_s2, cv_s3;
  fp_t  pf_c1, pf_c2, pf_c3, pf_m1, pf_m2;

  rr_converter #(.N_PANEL(NP)) u_conv (
    .clk, .rst_n,
    .a_tvalid(lcv_tvalid), .a_tready(lcv_tready), .a_tdata(lcv_tdata), .a_tlast(lcv_tlast),
    .b_tvalid(rx_tvalid), .b_tready(rx_tready), .b_tdata(rx_tdata), .b_tlast(rx_tlast),
    .out_valid(cv_valid), .out_ready(pf_ready),
    .mean_1(cv_m1), .mean_2(cv_m2), .scale_1(cv_s1), .scale_2(cv_s2), .scale_3(cv_s3),
    .stall(cv_stall), .bad_id(cv_bad_id));

  prefusion #(.STAGE(STAGE)) u_pre (
    .clk, .rst_n, .in_valid(cv_valid), .in_ready(pf_ready),
    .scale_1(cv_s1), .scale_2(cv_s2), .scale_3(cv_s3), .mean_1(cv_m1), .mean_2(cv_m2),
    .out_valid(pf_valid), .inv_cov_1(pf_c1), .inv_cov_2(pf_c2), .inv_cov_3(pf_c3),
    .mean_1_o(pf_m1), .mean_2_o(pf_m2));

  fusion #(.P(NP)) u_fus (
    .clk, .rst_n, .in_valid(pf_valid), .in_ready(fu_ready),
    .inv_cov_1(pf_c1), .inv_cov_2(pf_c2), .inv_cov_3(pf_c3), .mean_1(pf_m1), .mean_2(pf_m2),
    .out_valid, .f_cov_1, .f_cov_2, .f_cov_3, .f_mean_1, .f_mean_2);

  // the prefusion delivers one tuple per STAGE clocks, the fusion takes one
  // per 24: a tuple is never offered to a busy fusion
  property p_fusion_takes;
    @(posedge clk) disable iff (!rst_n) pf_valid |-> fu_ready;
  endproperty
  assert property (p_fusion_takes);
endmodule

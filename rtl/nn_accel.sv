// nn_accel: the positioning network of one LIS panel, 1024 CSI features ->
// 200 -> 100 -> 20 -> 5 outputs (two means and the three entries of the
// lower-triangular scale matrix), built as two big pipeline stages that each
// take CCY = 200 clocks per inference:
//   stage 1: layer 1 (INT8, 512 inputs x 2 neurons per clock) -> batch
//            normalisation (one value per clock) -> layer 2 (one input x 100
//            neurons per clock); layers 1 and 2 overlap, layer 2 starting on
//            each layer-1 neuron as soon as it is done;
//   stage 2: layer 3 (10 inputs x 1 neuron per clock) -> layer 4 (one
//            multiply per clock), again overlapped.
// The "layer 2 results" register between the stages lets both work on
// different inferences at the same time, so the accelerator accepts one
// input vector every 200 clocks.
// Input: an AXI-Stream of IN_LANES INT8 features per beat (TLAST on the last
// beat of a vector) into an input buffer; the buffer is handed to layer 1 as
// soon as layer 1 is free, so the next vector can arrive while the current
// one is computed. TREADY is low only while a full buffer waits for layer 1.
// Output: out_valid pulses with y = {v4, v3, v2, v1, v0} (16-bit Q8.8,
// v0 in the low bits). Trained parameters are written through the load port:
// p_sel 0 layer 1 (byte, see dense_l1), 1 batch norm, 2 layer 2, 3 layer 3,
// 4 layer 4; p_addr as described in each layer's module.
// Widths, the input beat width and the fixed-point scalings are this
// design's choices; layer sizes and parallelism follow the description.
module nn_accel #(
  parameter int unsigned N_IN     = 1024,
  parameter int unsigned N_H1     = 200,
  parameter int unsigned N_H2     = 100,
  parameter int unsigned N_H3     = 20,
  parameter int unsigned N_OUT    = 5,
  parameter int unsigned PARA_IN1 = 512,
  parameter int unsigned PARA_IN3 = 10,
  parameter int unsigned IN_LANES = 8,
  parameter int unsigned L1_SHIFT = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // parameter load
  input  logic                    p_we,
  input  logic [2:0]              p_sel,
  input  logic [17:0]             p_addr,
  input  logic [15:0]             p_data,
  // CSI input stream
  input  logic                    s_tvalid,
  output logic                    s_tready,
  input  logic [IN_LANES*8-1:0]   s_tdata,
  input  logic                    s_tlast,
  // result
  output logic                    out_valid,
  output logic [N_OUT*16-1:0]     y
);
  localparam int unsigned BEATS = N_IN / IN_LANES;
  localparam int unsigned BW    = $clog2(BEATS + 1);
  localparam int unsigned H1W   = $clog2(N_H1);

  // ---- input buffer
  logic [N_IN*8-1:0] ibuf;
  logic [BW-1:0]     beat;
  logic              full;
  logic              l1_ready, l1_start;
  assign s_tready = !full;
  assign l1_start = full && l1_ready;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ibuf <= '0; beat <= '0; full <= 1'b0;
    end else begin
      if (l1_start) full <= 1'b0;
      if (s_tvalid && s_tready) begin
        ibuf[beat * IN_LANES * 8 +: IN_LANES * 8] <= s_tdata;
        if (s_tlast || beat == BW'(BEATS - 1)) begin
          beat <= '0;
          full <= 1'b1;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

  // ---- layer 1
  localparam int unsigned A1W = $clog2((N_H1 / 2) * (N_IN / PARA_IN1))
                              + ((PARA_IN1 <= 1) ? 1 : $clog2(PARA_IN1)) + 1;
  logic                      l1_v;
  logic [$clog2(N_H1/2)-1:0] l1_pair;
  logic signed [15:0]        l1_a, l1_b;
  dense_l1 #(.N_IN(N_IN), .N_OUT(N_H1), .PARA_IN(PARA_IN1), .OUT_SHIFT(L1_SHIFT)) u_l1 (
    .clk, .rst_n,
    .w_we(p_we && p_sel == 3'd0), .w_addr(p_addr[A1W-1:0]), .w_data(p_data[7:0]),
    .start(l1_start), .ready(l1_ready), .x(ibuf),
    .out_valid(l1_v), .out_pair(l1_pair), .out_a(l1_a), .out_b(l1_b));

  // the two neurons of a pair go to the batch normalisation on two clocks
  logic               hold_v;
  logic signed [15:0] hold_x;
  logic [H1W-1:0]     hold_i;
  logic               bn_in_v;
  logic [H1W-1:0]     bn_in_i;
  logic signed [15:0] bn_in_x;
  always_comb begin
    if (l1_v) begin
      bn_in_v = 1'b1; bn_in_i = {l1_pair, 1'b0}; bn_in_x = l1_a;
    end else begin
      bn_in_v = hold_v; bn_in_i = hold_i; bn_in_x = hold_x;
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin hold_v <= 1'b0; hold_x <= '0; hold_i <= '0; end
    else begin
      hold_v <= l1_v;
      if (l1_v) begin hold_x <= l1_b; hold_i <= {l1_pair, 1'b1}; end
    end
  end

  // ---- batch normalisation
  logic               bn_v;
  logic [H1W-1:0]     bn_i;
  logic signed [15:0] bn_y;
  batch_norm #(.N(N_H1)) u_bn (
    .clk, .rst_n,
    .p_we(p_we && p_sel == 3'd1), .p_addr(p_addr[H1W+1:0]), .p_data(p_data),
    .in_valid(bn_in_v), .in_idx(bn_in_i), .x(bn_in_x),
    .out_valid(bn_v), .out_idx(bn_i), .y(bn_y));

  // ---- layer 2
  localparam int unsigned A2W = $clog2(N_H1) + $clog2(N_H2);
  logic                l2_v;
  logic [N_H2*16-1:0]  l2_h;
  dense_l2 #(.N_IN(N_H1), .N_OUT(N_H2)) u_l2 (
    .clk, .rst_n,
    .w_we(p_we && p_sel == 3'd2), .w_addr(p_addr[A2W-1:0]), .w_data(p_data),
    .in_valid(bn_v), .in_idx(bn_i), .x(bn_y),
    .out_valid(l2_v), .h(l2_h));

  // ---- layers 3 and 4
  localparam int unsigned A3W = $clog2(N_H3 * (N_H2 / PARA_IN3))
                              + ((PARA_IN3 <= 1) ? 1 : $clog2(PARA_IN3));
  localparam int unsigned A4W = $clog2(N_H3) + ((N_OUT <= 1) ? 1 : $clog2(N_OUT));
  logic l34_ready;
  dense_l34 #(.N_IN(N_H2), .N_MID(N_H3), .N_OUT(N_OUT), .PARA_IN(PARA_IN3)) u_l34 (
    .clk, .rst_n,
    .w3_we(p_we && p_sel == 3'd3), .w3_addr(p_addr[A3W-1:0]), .w3_data(p_data),
    .w4_we(p_we && p_sel == 3'd4), .w4_addr(p_addr[A4W-1:0]), .w4_data(p_data),
    .start(l2_v), .ready(l34_ready), .h(l2_h),
    .out_valid, .y);

  // stage 2 is never slower than stage 1, so it is free for every new vector
  property p_stage2_free; @(posedge clk) disable iff (!rst_n) l2_v |-> l34_ready; endproperty
  assert property (p_stage2_free);
endmodule

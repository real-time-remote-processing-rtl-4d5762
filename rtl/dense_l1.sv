// dense_l1: first fully connected layer of the positioning network,
// N_IN INT8 inputs -> N_OUT outputs, ReLU, result narrowed to 16 bits.
// Work per clock: PARA_IN inputs times PARA_OUT = 2 output neurons. The
// weight matrix is walked column-wise: output neurons are finished two at a
// time, each pair after N_IN/PARA_IN clocks, so the next layer can start on
// them at once. Every multiplier (dual_int8_mul) shares one input between
// the two neurons of the pair, which is what allows two INT8 products per
// DSP. Each neuron's PARA_IN products are summed by a pipelined adder tree
// and the chunks are accumulated. No bias (the layer's parameter count is
// exactly N_IN*N_OUT).
// Weight memory: ROWS = N_OUT*N_IN/(2*PARA_IN) words, one per clock of an
// inference; word t holds, for neuron pair p = t / CH and input chunk
// c = t % CH (CH = N_IN/PARA_IN), lane i = {w[c*PARA_IN+i][2p+1],
// w[c*PARA_IN+i][2p]}. It is written one byte at a time: w_addr =
// {t, i, neuron bit}.
// Output scaling: the accumulated sum of INT8 products is shifted right by
// OUT_SHIFT, saturated to 16 bits and passed through ReLU.
// Interface: start (with the whole input vector x) when ready; out_valid
// pulses every CH clocks with out_a (neuron 2p) and out_b (neuron 2p+1),
// out_pair = p. A full vector takes ROWS clocks (200 by default).
module dense_l1 #(
  parameter int unsigned N_IN      = 1024,
  parameter int unsigned N_OUT     = 200,
  parameter int unsigned PARA_IN   = 512,
  parameter int unsigned OUT_SHIFT = 6,
  localparam int unsigned CH    = N_IN / PARA_IN,
  localparam int unsigned ROWS  = (N_OUT / 2) * CH,
  localparam int unsigned RW_   = $clog2(ROWS),
  localparam int unsigned LW_   = (PARA_IN <= 1) ? 1 : $clog2(PARA_IN),
  localparam int unsigned AW    = RW_ + LW_ + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // parameter load
  input  logic                  w_we,
  input  logic [AW-1:0]         w_addr,
  input  logic [7:0]            w_data,
  // input vector
  input  logic                  start,
  output logic                  ready,
  input  logic [N_IN*8-1:0]     x,
  // results
  output logic                  out_valid,
  output logic [$clog2(N_OUT/2)-1:0] out_pair,
  output logic signed [15:0]    out_a,
  output logic signed [15:0]    out_b
);
  localparam int unsigned SW    = 16 + $clog2(PARA_IN) + 1;  // tree sum
  localparam int unsigned ACW   = 16 + $clog2(N_IN) + 1;     // accumulator
  localparam int unsigned CW    = (CH <= 1) ? 1 : $clog2(CH);
  localparam int unsigned PW    = $clog2(N_OUT / 2);

  // ---- weight memory
  logic [PARA_IN*16-1:0] wmem [ROWS];
  always_ff @(posedge clk) begin
    if (w_we)
      wmem[w_addr[AW-1 -: RW_]][{w_addr[LW_:1], w_addr[0]} * 8 +: 8] <= w_data;
  end

  // ---- sequencing
  logic [N_IN*8-1:0] xr;
  logic              run;
  logic [RW_-1:0]    t;
  // a new vector may start in the last clock of the current one, so
  // consecutive vectors follow each other without a gap
  assign ready = !run || (t == RW_'(ROWS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; t <= '0; xr <= '0;
    end else if (ready) begin
      if (start) begin xr <= x; run <= 1'b1; t <= '0; end
      else run <= 1'b0;
    end else begin
      t <= t + 1'b1;
    end
  end

  // ---- stage 1: weight read, input chunk select
  logic [PARA_IN*16-1:0] wrow;
  logic [PARA_IN*8-1:0]  xchunk;
  logic                  v1, last1;
  logic [PW-1:0]         p1;
  logic [CW-1:0]         c_of_t;
  logic [PW-1:0]         p_of_t;
  always_comb begin
    c_of_t = CW'(t % RW_'(CH));
    p_of_t = PW'(t / RW_'(CH));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; last1 <= 1'b0; p1 <= '0; wrow <= '0; xchunk <= '0;
    end else begin
      v1     <= run;
      last1  <= (c_of_t == CW'(CH - 1));
      p1     <= p_of_t;
      wrow   <= wmem[t];
      xchunk <= xr[c_of_t * PARA_IN * 8 +: PARA_IN * 8];
    end
  end

  // ---- stage 2: products, two per shared input
  logic [PARA_IN*16-1:0] prod_a, prod_b;
  for (genvar i = 0; i < PARA_IN; i++) begin : g_mul
    dual_int8_mul u_m (
      .clk,
      .x (xchunk[i*8 +: 8]),
      .wa(wrow[i*16 +: 8]),
      .wb(wrow[i*16+8 +: 8]),
      .pa(prod_a[i*16 +: 16]),
      .pb(prod_b[i*16 +: 16]));
  end
  logic v2, last2;
  logic [PW-1:0] p2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v2 <= 1'b0; last2 <= 1'b0; p2 <= '0; end
    else begin v2 <= v1; last2 <= last1; p2 <= p1; end
  end

  // ---- stage 3: adder trees; side band delayed by the tree latency
  logic tv_a, tv_b;
  logic signed [SW-1:0] sum_a, sum_b;
  adder_tree #(.N(PARA_IN), .IW(16), .OW(SW)) u_ta (
    .clk, .rst_n, .in_valid(v2), .in(prod_a), .out_valid(tv_a), .sum(sum_a));
  adder_tree #(.N(PARA_IN), .IW(16), .OW(SW)) u_tb (
    .clk, .rst_n, .in_valid(v2), .in(prod_b), .out_valid(tv_b), .sum(sum_b));

  // side band: a small circular buffer written when a chunk enters the
  // trees and read when its sum leaves them keeps the tags aligned whatever
  // the tree latency
  localparam int unsigned TL = 16;
  logic [PW:0] tag_line [TL];
  logic [$clog2(TL)-1:0] wr_ptr, rd_ptr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0;
      for (int i = 0; i < int'(TL); i++) tag_line[i] <= '0;
    end else begin
      if (v2) begin tag_line[wr_ptr] <= {last2, p2}; wr_ptr <= wr_ptr + 1'b1; end
      if (tv_a) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // ---- stage 4: accumulate over the input chunks, scale, ReLU
  logic signed [ACW-1:0] acc_a, acc_b, tot_a, tot_b;
  logic                  t_last;
  logic [PW-1:0]         t_pair;
  always_comb begin
    {t_last, t_pair} = tag_line[rd_ptr];
    tot_a = acc_a + ACW'(sum_a);
    tot_b = acc_b + ACW'(sum_b);
  end

  function automatic logic signed [15:0] scale_relu(input logic signed [ACW-1:0] v);
    logic signed [63:0] s;
    s = 64'(v >>> OUT_SHIFT);
    if (s < 0) return '0;
    return lis_pkg::sat16(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_a <= '0; acc_b <= '0; out_valid <= 1'b0; out_pair <= '0;
      out_a <= '0; out_b <= '0;
    end else begin
      out_valid <= 1'b0;
      if (tv_a) begin
        if (t_last) begin
          acc_a     <= '0;
          acc_b     <= '0;
          out_valid <= 1'b1;
          out_pair  <= t_pair;
          out_a     <= scale_relu(tot_a);
          out_b     <= scale_relu(tot_b);
        end else begin
          acc_a <= tot_a;
          acc_b <= tot_b;
        end
      end
    end
  end

  // both trees run in lock step
  property p_trees_aligned; @(posedge clk) disable iff (!rst_n) tv_a == tv_b; endproperty
  assert property (p_trees_aligned);
endmodule

// dense_l34: the second big pipeline stage of the network, layer 3
// (N_IN -> N_MID, 100 -> 20, ReLU) followed by layer 4 (N_MID -> N_OUT,
// 20 -> 5, linear).
// Layer 3 finishes one output neuron at a time (column-wise walk): each
// clock PARA_IN = 10 inputs are multiplied by that neuron's weights and
// summed in a pipelined adder tree, and N_IN/PARA_IN chunks are accumulated.
// As soon as a layer-3 neuron is done (scaled to Q8.8, ReLU) layer 4 takes
// it as its single input (PARA_IN = PARA_OUT = 1): one multiplier steps
// through the N_OUT weights of that input, one per clock, into N_OUT
// accumulators. A vector takes N_MID*N_IN/PARA_IN clocks (200).
// Weight memories: layer 3 has N_MID*N_IN/PARA_IN words of PARA_IN x 16
// bits, word o*CH + c holding inputs c*PARA_IN.. of neuron o, written with
// w3_addr = {word, lane}; layer 4 has N_MID*N_OUT weights, w4_addr =
// {input, output}.
// Interface: start with the layer-2 vector h (N_IN x 16 bits) when ready;
// out_valid pulses with y (N_OUT x 16 bits Q8.8).
module dense_l34 #(
  parameter int unsigned N_IN    = 100,
  parameter int unsigned N_MID   = 20,
  parameter int unsigned N_OUT   = 5,
  parameter int unsigned PARA_IN = 10,
  parameter int unsigned FR      = 8,
  localparam int unsigned CH   = N_IN / PARA_IN,
  localparam int unsigned R3   = N_MID * CH,
  localparam int unsigned R3W  = $clog2(R3),
  localparam int unsigned LW   = (PARA_IN <= 1) ? 1 : $clog2(PARA_IN),
  localparam int unsigned A3W  = R3W + LW,
  localparam int unsigned MW   = $clog2(N_MID),
  localparam int unsigned OW   = (N_OUT <= 1) ? 1 : $clog2(N_OUT),
  localparam int unsigned A4W  = MW + OW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 w3_we,
  input  logic [A3W-1:0]       w3_addr,
  input  logic signed [15:0]   w3_data,
  input  logic                 w4_we,
  input  logic [A4W-1:0]       w4_addr,
  input  logic signed [15:0]   w4_data,
  input  logic                 start,
  output logic                 ready,
  input  logic [N_IN*16-1:0]   h,
  output logic                 out_valid,
  output logic [N_OUT*16-1:0]  y
);
  localparam int unsigned SW   = 32 + $clog2(PARA_IN) + 1;
  localparam int unsigned ACW  = 32 + $clog2(N_IN) + 1;
  localparam int unsigned AC4W = 32 + $clog2(N_MID) + 1;
  localparam int unsigned CW   = (CH <= 1) ? 1 : $clog2(CH);

  // ---- memories
  logic [PARA_IN*16-1:0] w3mem [R3];
  logic signed [15:0]    w4mem [N_MID*N_OUT];
  always_ff @(posedge clk) begin
    if (w3_we) w3mem[w3_addr[A3W-1:LW]][w3_addr[LW-1:0]*16 +: 16] <= w3_data;
    if (w4_we) w4mem[int'(w4_addr[A4W-1:OW]) * int'(N_OUT) + int'(w4_addr[OW-1:0])] <= w4_data;
  end

  // ---- layer 3 sequencing
  logic [N_IN*16-1:0] hr;
  logic               run;
  logic [R3W-1:0]     t;
  // a new vector may start in the last clock of the current one
  assign ready = !run || (t == R3W'(R3 - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin run <= 1'b0; t <= '0; hr <= '0; end
    else if (ready) begin
      if (start) begin hr <= h; run <= 1'b1; t <= '0; end
      else run <= 1'b0;
    end else begin
      t <= t + 1'b1;
    end
  end

  // stage 1: read weights, select inputs
  logic                  v1, last1;
  logic [MW-1:0]         o1;
  logic [PARA_IN*16-1:0] w1r, x1r;
  logic [CW-1:0]         c_of_t;
  always_comb c_of_t = CW'(t % R3W'(CH));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v1 <= 1'b0; last1 <= 1'b0; o1 <= '0; w1r <= '0; x1r <= '0; end
    else begin
      v1    <= run;
      last1 <= (c_of_t == CW'(CH - 1));
      o1    <= MW'(t / R3W'(CH));
      w1r   <= w3mem[t];
      x1r   <= hr[c_of_t * PARA_IN * 16 +: PARA_IN * 16];
    end
  end

  // stage 2: products
  logic [PARA_IN*32-1:0] prod;
  logic                  v2, last2;
  logic [MW-1:0]         o2;
  for (genvar i = 0; i < PARA_IN; i++) begin : g_m
    always_ff @(posedge clk)
      prod[i*32 +: 32] <= $signed(x1r[i*16 +: 16]) * $signed(w1r[i*16 +: 16]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin v2 <= 1'b0; last2 <= 1'b0; o2 <= '0; end
    else begin v2 <= v1; last2 <= last1; o2 <= o1; end
  end

  // stage 3: adder tree (fixed latency) and side-band delay line
  logic                  tv;
  logic signed [SW-1:0]  tsum;
  adder_tree #(.N(PARA_IN), .IW(32), .OW(SW)) u_tree (
    .clk, .rst_n, .in_valid(v2), .in(prod), .out_valid(tv), .sum(tsum));
  localparam int unsigned TL = 8;
  logic [MW:0] tags [TL];
  logic [$clog2(TL)-1:0] wp, rp;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
      for (int i = 0; i < int'(TL); i++) tags[i] <= '0;
    end else begin
      if (v2) begin tags[wp] <= {last2, o2}; wp <= wp + 1'b1; end
      if (tv) rp <= rp + 1'b1;
    end
  end

  // stage 4: accumulate chunks; finished neuron -> layer 4
  logic signed [ACW-1:0] acc3, tot3;
  logic signed [63:0]    sc3;
  logic                  tl;
  logic [MW-1:0]         to;
  always_comb begin
    {tl, to} = tags[rp];
    tot3 = acc3 + ACW'(tsum);
    sc3  = 64'(tot3 >>> FR);
  end
  logic               h3_v;
  logic signed [15:0] h3;
  logic [MW-1:0]      h3_o;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin acc3 <= '0; h3_v <= 1'b0; h3 <= '0; h3_o <= '0; end
    else begin
      h3_v <= 1'b0;
      if (tv) begin
        if (tl) begin
          acc3 <= '0;
          h3_v <= 1'b1;
          h3   <= (sc3 < 0) ? 16'sd0 : lis_pkg::sat16(sc3);
          h3_o <= to;
        end else acc3 <= tot3;
      end
    end
  end

  // ---- layer 4: one multiply per clock over the N_OUT outputs
  logic                  l4_run;
  logic [OW-1:0]         k;
  logic signed [15:0]    x4;
  logic [MW-1:0]         o4;
  logic signed [AC4W-1:0] acc4 [N_OUT];
  logic signed [31:0]    p4;
  always_comb p4 = x4 * w4mem[int'(o4) * int'(N_OUT) + int'(k)];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l4_run <= 1'b0; k <= '0; x4 <= '0; o4 <= '0; out_valid <= 1'b0; y <= '0;
      for (int j = 0; j < int'(N_OUT); j++) acc4[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (h3_v) begin
        l4_run <= 1'b1; k <= '0; x4 <= h3; o4 <= h3_o;
      end else if (l4_run) begin
        if (k == OW'(N_OUT - 1)) begin
          l4_run <= 1'b0;
          if (o4 == MW'(N_MID - 1)) begin
            // last input of the vector: emit and restart the sums
            for (int j = 0; j < int'(N_OUT); j++) begin
              logic signed [AC4W-1:0] tv4;
              tv4 = (j == int'(N_OUT) - 1) ? acc4[j] + AC4W'(p4) : acc4[j];
              y[j*16 +: 16] <= lis_pkg::sat16(64'(tv4 >>> FR));
              acc4[j] <= '0;
            end
            out_valid <= 1'b1;
          end else begin
            acc4[k] <= acc4[k] + AC4W'(p4);
          end
        end else begin
          acc4[k] <= acc4[k] + AC4W'(p4);
        end
        k <= k + 1'b1;
      end
    end
  end

  // layer 4 must finish a neuron before layer 3 delivers the next one
  property p_l4_keeps_up; @(posedge clk) disable iff (!rst_n) h3_v |-> !l4_run; endproperty
  assert property (p_l4_keeps_up);
endmodule

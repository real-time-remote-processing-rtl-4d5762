// adder_tree: pipelined binary adder tree summing N signed inputs.
// The inputs are padded with zeros to the next power of two and added
// pairwise level by level; a register follows every REG_EVERY-th level and
// the last level, which keeps the critical path to REG_EVERY adders.
// Latency: LAT clocks (see the localparam); a valid bit travels alongside.
// Interface: in_valid/in (N x IW bits, element i at [i*IW +: IW]) ->
// out_valid/sum (OW bits).
module adder_tree #(
  parameter int unsigned N         = 16,
  parameter int unsigned IW        = 16,
  parameter int unsigned OW        = 20,
  parameter int unsigned REG_EVERY = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N*IW-1:0]     in,
  output logic                out_valid,
  output logic signed [OW-1:0] sum
);
  localparam int unsigned LEVELS = (N <= 1) ? 1 : $clog2(N);
  localparam int unsigned NP     = 1 << LEVELS;

  function automatic bit is_reg(input int unsigned l);
    return ((l + 1) % REG_EVERY == 0) || (l == LEVELS - 1);
  endfunction

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NO = NP >> (l + 1);
    logic signed [OW-1:0] s [NO];
    logic                 v;
    logic signed [OW-1:0] a [NO];
    logic signed [OW-1:0] b [NO];
    logic                 vin;
    for (genvar i = 0; i < NO; i++) begin : g_node
      if (l == 0) begin : g_leaf
        if (2*i < N) begin : g_a
          assign a[i] = OW'($signed(in[(2*i)*IW +: IW]));
        end else begin : g_az
          assign a[i] = '0;
        end
        if (2*i+1 < N) begin : g_b
          assign b[i] = OW'($signed(in[(2*i+1)*IW +: IW]));
        end else begin : g_bz
          assign b[i] = '0;
        end
      end else begin : g_inner
        assign a[i] = g_lvl[l-1].s[2*i];
        assign b[i] = g_lvl[l-1].s[2*i+1];
      end
      if (is_reg(l)) begin : g_r
        always_ff @(posedge clk) s[i] <= a[i] + b[i];
      end else begin : g_c
        assign s[i] = a[i] + b[i];
      end
    end
    if (l == 0) begin : g_v0
      assign vin = in_valid;
    end else begin : g_vn
      assign vin = g_lvl[l-1].v;
    end
    if (is_reg(l)) begin : g_vr
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) v <= 1'b0; else v <= vin;
    end else begin : g_vc
      assign v = vin;
    end
  end

  assign sum       = g_lvl[LEVELS-1].s[0];
  assign out_valid = g_lvl[LEVELS-1].v;
endmodule

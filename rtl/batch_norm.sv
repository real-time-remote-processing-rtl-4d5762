// batch_norm: batch normalisation of the first layer's outputs at one value
// per clock, y = gamma * (x - mean) / sd + beta, with per-neuron constants
// mean, sd, gamma and beta (signed 16-bit Q8.8). sd is the precomputed
// square root of the training variance, so no square root is needed in
// hardware. The difference x - mean is saturated to 16 bits before the
// division; its magnitude, extended by 8 fraction bits, is divided by |sd|
// in the pipelined non-restoring divider (3 iterations per clock), the sign
// is restored and the quotient saturated to Q8.8, then scaled by gamma and
// offset by beta (both saturating).
// Parameter memory: 4*N words written through p_we/p_addr = {neuron, sel}
// (sel 0 mean, 1 sd, 2 gamma, 3 beta)/p_data.
// Interface: in_valid/in_idx/x -> out_valid/out_idx/y, latency LAT = 11
// clocks, one value per clock.
module batch_norm #(
  parameter int unsigned N = 200
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      p_we,
  input  logic [$clog2(N)+1:0]      p_addr,
  input  logic signed [15:0]        p_data,
  input  logic                      in_valid,
  input  logic [$clog2(N)-1:0]      in_idx,
  input  logic signed [15:0]        x,
  output logic                      out_valid,
  output logic [$clog2(N)-1:0]      out_idx,
  output logic signed [15:0]        y
);
  localparam int unsigned IW = $clog2(N);
  localparam int unsigned FR = 8;

  logic signed [15:0] m_mean [N];
  logic signed [15:0] m_sd   [N];
  logic signed [15:0] m_gam  [N];
  logic signed [15:0] m_bet  [N];
  always_ff @(posedge clk) begin
    if (p_we) begin
      case (p_addr[1:0])
        2'd0: m_mean[p_addr[IW+1:2]] <= p_data;
        2'd1: m_sd  [p_addr[IW+1:2]] <= p_data;
        2'd2: m_gam [p_addr[IW+1:2]] <= p_data;
        default: m_bet[p_addr[IW+1:2]] <= p_data;
      endcase
    end
  end

  // ---- stage A: subtract the mean, read the neuron's constants
  logic               va;
  logic [IW-1:0]      ia;
  logic signed [15:0] da, sda, ga, ba;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va <= 1'b0; ia <= '0; da <= '0; sda <= '0; ga <= '0; ba <= '0;
    end else begin
      va  <= in_valid;
      ia  <= in_idx;
      da  <= lis_pkg::sat16(64'(x) - 64'(m_mean[in_idx]));
      sda <= m_sd[in_idx];
      ga  <= m_gam[in_idx];
      ba  <= m_bet[in_idx];
    end
  end

  // ---- divider: |d| * 2^8 / |sd|; tag carries index, sign, gamma, beta
  localparam int unsigned TW = IW + 1 + 32;
  logic [23:0] dvd;
  logic [15:0] dvs;
  logic        sgn;
  always_comb begin
    dvd = {(da[15] ? 16'(-da) : 16'(da)), 8'h00};
    dvs = sda[15] ? 16'(-sda) : 16'(sda);
    sgn = da[15] ^ sda[15];
  end
  logic          vq;
  logic [23:0]   qq;
  logic [TW-1:0] tq;
  nr_divider #(.NW(24), .DW(16), .ITER(3), .TW(TW)) u_div (
    .clk, .rst_n, .in_valid(va), .n(dvd), .d(dvs), .in_tag({ia, sgn, ga, ba}),
    .out_valid(vq), .q(qq), .out_tag(tq));

  // ---- stage B: sign, saturate, multiply by gamma
  logic               vb;
  logic [IW-1:0]      ib;
  logic signed [31:0] pb;
  logic signed [15:0] bb;
  logic signed [15:0] qs;
  logic [IW-1:0]      iq;
  logic               sq;
  logic signed [15:0] gq, bq;
  always_comb begin
    {iq, sq, gq, bq} = tq;
    if (qq > 24'd32767) qs = sq ? 16'sh8001 : 16'sh7fff;
    else                qs = sq ? -$signed(qq[15:0]) : $signed(qq[15:0]);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vb <= 1'b0; ib <= '0; pb <= '0; bb <= '0;
    end else begin
      vb <= vq; ib <= iq; pb <= qs * gq; bb <= bq;
    end
  end

  // ---- stage C: shift back to Q8.8 and add beta
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_idx <= '0; y <= '0;
    end else begin
      out_valid <= vb;
      out_idx   <= ib;
      y         <= lis_pkg::sat16(64'(pb >>> FR) + 64'(bb));
    end
  end
endmodule

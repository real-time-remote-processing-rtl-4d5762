// nr_divider: fully pipelined unsigned non-restoring divider.
// One quotient bit is produced per iteration: the partial remainder is
// shifted left by one, the next dividend bit brought in, and the divisor
// subtracted when the remainder is non-negative or added when it is
// negative (never both, unlike restoring division); the quotient bit is 1
// when the new remainder is non-negative. ITER iterations are unrolled per
// pipeline stage, so an NW-bit dividend takes ceil(NW/ITER) stages and a
// new division can start every clock. A TW-bit tag travels with each
// operation. A zero divisor yields an all-ones quotient.
// Interface: in_valid/n/d/in_tag -> out_valid/q/out_tag, latency STAGES.
module nr_divider #(
  parameter int unsigned NW   = 24,
  parameter int unsigned DW   = 16,
  parameter int unsigned ITER = 3,
  parameter int unsigned TW   = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NW-1:0] n,
  input  logic [DW-1:0] d,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [NW-1:0] q,
  output logic [TW-1:0] out_tag
);
  localparam int unsigned STAGES = (NW + ITER - 1) / ITER;
  localparam int unsigned RW = DW + 2;   // signed partial remainder

  typedef struct packed {
    logic                 v;
    logic signed [RW-1:0] r;
    logic [NW-1:0]        n;
    logic [NW-1:0]        q;
    logic [DW-1:0]        d;
    logic [TW-1:0]        tag;
  } st_t;

  st_t pipe [STAGES+1];

  always_comb begin
    pipe[0].v   = in_valid;
    pipe[0].r   = '0;
    pipe[0].n   = n;
    pipe[0].q   = '0;
    pipe[0].d   = d;
    pipe[0].tag = in_tag;
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_st
    st_t nxt;
    always_comb begin
      nxt = pipe[s];
      for (int k = 0; k < int'(ITER); k++) begin
        int bitpos;
        bitpos = int'(NW) - 1 - (s * int'(ITER) + k);
        if (bitpos >= 0) begin
          if (nxt.r >= 0) nxt.r = ((nxt.r <<< 1) | RW'(nxt.n[bitpos])) - RW'({2'b00, nxt.d});
          else            nxt.r = ((nxt.r <<< 1) | RW'(nxt.n[bitpos])) + RW'({2'b00, nxt.d});
          nxt.q[bitpos] = (nxt.r >= 0);
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) pipe[s+1] <= '0;
      else        pipe[s+1] <= nxt;
    end
  end

  assign out_valid = pipe[STAGES].v;
  assign q         = pipe[STAGES].q;
  assign out_tag   = pipe[STAGES].tag;
endmodule

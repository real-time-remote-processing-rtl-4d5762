// rr_packer: round-robin router between N_NN neural-network accelerators and
// one 32-bit AXI-Stream towards the FIFO/DMA. Each accelerator delivers its
// five 16-bit results as a single pulse (out_valid with y = {v4..v0}); the
// router keeps one tuple per accelerator in a holding register, picks the
// next full register in round-robin order and sends it as three 32-bit
// words: {v1, v0}, {v3, v2}, {panel id, v4}, TLAST on the third. The grant
// moves on after each tuple, so a busy accelerator cannot starve another.
// Packing two 16-bit values per 32-bit word follows the description; the
// word order, the panel id in the spare half-word (PANEL_BASE + index, so the
// receiving side can tell the panels apart after the Ethernet link) and the
// sticky overflow flag (a tuple arrived while its holding register was still
// full; the new tuple is dropped) are this design's choices.
// Timing: a tuple can leave the clock after it arrives; three words need
// three clocks with TREADY high.
module rr_packer #(
  parameter int unsigned N_NN       = 2,
  parameter int unsigned PANEL_BASE = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_NN-1:0]      in_valid,
  input  logic [N_NN*80-1:0]   in_data,
  output logic                 m_tvalid,
  input  logic                 m_tready,
  output logic [31:0]          m_tdata,
  output logic                 m_tlast,
  output logic                 overflow
);
  localparam int unsigned IW = N_NN > 1 ? $clog2(N_NN) : 1;

  logic [N_NN-1:0]  full;
  logic [79:0]      hold [N_NN];
  logic             busy;
  logic [IW-1:0]    cur, nxt;
  logic [1:0]       word;
  logic             nxt_found;
  logic             done_word;

  assign done_word = busy && m_tready && word == 2'd2;

  // next requester after the last granted one
  always_comb begin
    nxt = cur; nxt_found = 1'b0;
    for (int unsigned k = 1; k <= N_NN; k++) begin
      int unsigned c;
      c = (int'(cur) + k) % N_NN;
      if (!nxt_found && full[c]) begin nxt = IW'(c); nxt_found = 1'b1; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; busy <= 1'b0; cur <= IW'(N_NN - 1); word <= '0; overflow <= 1'b0;
      for (int i = 0; i < N_NN; i++) hold[i] <= '0;
    end else begin
      for (int i = 0; i < N_NN; i++) begin
        logic freed;
        freed = done_word && cur == IW'(i);
        if (in_valid[i]) begin
          if (full[i] && !freed) overflow <= 1'b1;
          else begin hold[i] <= in_data[i*80 +: 80]; full[i] <= 1'b1; end
        end else if (freed) full[i] <= 1'b0;
      end
      if (!busy) begin
        if (nxt_found) begin busy <= 1'b1; cur <= nxt; word <= '0; end
      end else if (m_tready) begin
        if (word == 2'd2) busy <= 1'b0;
        else word <= word + 2'd1;
      end
    end
  end

  always_comb begin
    logic [79:0] t;
    t = hold[cur];
    m_tvalid = busy;
    m_tlast  = busy && word == 2'd2;
    unique case (word)
      2'd0:    m_tdata = t[31:0];
      2'd1:    m_tdata = t[63:32];
      default: m_tdata = {16'(PANEL_BASE + cur), t[79:64]};
    endcase
  end

  property p_axis_stable;
    @(posedge clk) disable iff (!rst_n) (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata));
  endproperty
  assert property (p_axis_stable);
endmodule

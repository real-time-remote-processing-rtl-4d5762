// rr_converter: collects, on the receiving board, the result tuples of all
// N_PANEL panels for one position estimate, from two 32-bit AXI-Streams: the
// local round-robin router and the DMA stream carrying the tuples received
// over Ethernet. Each stream is unpacked (three words per tuple, the panel id
// in the upper half of the third word) and the tuple is stored in the slot of
// its panel. When every slot is full, the tuples are converted one panel at a
// time from 16-bit fixed point to floating point (five to_float units) and
// handed to the prefusion with a valid/ready handshake; then the slots are
// freed for the next estimate.
// Back-pressure: a stream whose third word would overwrite a slot that is
// still full is stalled (TREADY low) until the slot is freed.
// Unpacking, storing and converting follow the description; the slot-per-panel
// buffer, the stall rule and the tuple order [mean 1, mean 2, s1, s2, s3]
// (means in the first two values) are this design's choices.
// Timing: after the last tuple arrives, panel p is offered to the prefusion
// two clocks after panel p-1 was taken (one clock for the conversion).
module rr_converter
  import lis_pkg::*;
#(
  parameter int unsigned N_PANEL = 4,
  parameter int unsigned FRAC    = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // local round-robin stream
  input  logic        a_tvalid,
  output logic        a_tready,
  input  logic [31:0] a_tdata,
  input  logic        a_tlast,
  // stream received over Ethernet (DMA output)
  input  logic        b_tvalid,
  output logic        b_tready,
  input  logic [31:0] b_tdata,
  input  logic        b_tlast,
  // towards the prefusion
  output logic        out_valid,
  input  logic        out_ready,
  output fp_t         mean_1,
  output fp_t         mean_2,
  output fp_t         scale_1,
  output fp_t         scale_2,
  output fp_t         scale_3,
  // counters of events, for observation
  output logic        stall,
  output logic        bad_id
);
  localparam int unsigned PW = N_PANEL > 1 ? $clog2(N_PANEL) : 1;

  logic [79:0]        slot [N_PANEL];
  logic [N_PANEL-1:0] sfull;

  // ---- unpacking, one assembler per stream
  logic [31:0] aw0, aw1, bw0, bw1;
  logic [1:0]  aw, bw;
  logic [15:0] aid, bid;
  logic        a_third, b_third, a_ok, b_ok, a_put, b_put;

  assign aid = a_tdata[31:16];
  assign bid = b_tdata[31:16];
  assign a_third = aw == 2'd2;
  assign b_third = bw == 2'd2;
  assign a_ok = aid < 16'(N_PANEL) && !sfull[aid[PW-1:0]];
  assign b_ok = bid < 16'(N_PANEL) && !sfull[bid[PW-1:0]]
                && !(a_tvalid && a_third && aid == bid);
  assign a_tready = !a_third || a_ok || aid >= 16'(N_PANEL);
  assign b_tready = !b_third || b_ok || bid >= 16'(N_PANEL);
  assign a_put = a_tvalid && a_third && a_ok;
  assign b_put = b_tvalid && b_third && b_ok;
  assign stall  = (a_tvalid && !a_tready) || (b_tvalid && !b_tready);
  assign bad_id = (a_tvalid && a_third && aid >= 16'(N_PANEL))
               || (b_tvalid && b_third && bid >= 16'(N_PANEL));

  // ---- hand-over to the prefusion
  typedef enum logic [1:0] {C_WAIT, C_CONV, C_OFFER} cst_e;
  cst_e        cst;
  logic [PW-1:0] pidx;
  logic        conv_go;
  logic [4:0]  conv_ok;
  fp_t         cv [5];
  logic [79:0] sel;

  assign sel = slot[pidx];
  assign conv_go = cst == C_CONV;

  for (genvar k = 0; k < 5; k++) begin : g_conv
    to_float #(.W(16), .FRAC(FRAC)) u_tf (
      .clk, .rst_n, .in_valid(conv_go), .x(sel[k*16 +: 16]),
      .out_valid(conv_ok[k]), .y(cv[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw <= '0; bw <= '0; aw0 <= '0; aw1 <= '0; bw0 <= '0; bw1 <= '0;
      sfull <= '0; cst <= C_WAIT; pidx <= '0;
      for (int i = 0; i < N_PANEL; i++) slot[i] <= '0;
    end else begin
      if (a_tvalid && a_tready) begin
        if (aw == 2'd0) aw0 <= a_tdata;
        if (aw == 2'd1) aw1 <= a_tdata;
        aw <= (a_third || a_tlast) ? 2'd0 : aw + 2'd1;
      end
      if (b_tvalid && b_tready) begin
        if (bw == 2'd0) bw0 <= b_tdata;
        if (bw == 2'd1) bw1 <= b_tdata;
        bw <= (b_third || b_tlast) ? 2'd0 : bw + 2'd1;
      end
      if (a_put) begin slot[aid[PW-1:0]] <= {a_tdata[15:0], aw1, aw0}; end
      if (b_put) begin slot[bid[PW-1:0]] <= {b_tdata[15:0], bw1, bw0}; end
      unique case (cst)
        C_WAIT:  if (&sfull) begin cst <= C_CONV; pidx <= '0; end
        C_CONV:  cst <= C_OFFER;
        C_OFFER: if (out_ready) begin
                   if (pidx == PW'(N_PANEL - 1)) cst <= C_WAIT;
                   else begin pidx <= pidx + 1'b1; cst <= C_CONV; end
                 end
        default: cst <= C_WAIT;
      endcase
      for (int i = 0; i < N_PANEL; i++) begin
        if ((a_put && aid[PW-1:0] == PW'(i)) || (b_put && bid[PW-1:0] == PW'(i))) sfull[i] <= 1'b1;
        else if (cst == C_OFFER && out_ready && pidx == PW'(N_PANEL - 1)) sfull[i] <= 1'b0;
      end
    end
  end

  assign out_valid = cst == C_OFFER;
  assign mean_1  = cv[0];
  assign mean_2  = cv[1];
  assign scale_1 = cv[2];
  assign scale_2 = cv[3];
  assign scale_3 = cv[4];

  property p_slot_kept;
    @(posedge clk) disable iff (!rst_n) (a_put || b_put) |-> cst == C_WAIT;
  endproperty
  assert property (p_slot_kept);
endmodule

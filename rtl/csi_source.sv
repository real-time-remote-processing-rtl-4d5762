// csi_source: stands in for the channel-state-information front end of one
// LIS panel (the M1..M4 memories). It holds NV input vectors of N_IN INT8
// features, written through a load port, and, while enabled, sends all NV of
// them every PERIOD clocks on an AXI-Stream of IN_LANES features per beat
// (TLAST on the last beat of each vector), to emulate data that is produced
// in real time. The defaults follow the description: 16 vectors every
// 2.5 ms, which is 250000 clocks at 100 MHz.
// Memory layout (this design's choice): word v*BEATS + b holds features
// b*IN_LANES .. b*IN_LANES+IN_LANES-1 of vector v, feature 0 in the low byte.
// The enable bit stands for the register that software sets over AXI-Lite.
// The burst starts on the first clock after enable rises and then at every
// PERIOD boundary; bursts counts them, late is a sticky flag set when a
// burst has not finished by the next boundary (that boundary is skipped).
module csi_source #(
  parameter int unsigned N_IN     = 1024,
  parameter int unsigned NV       = 16,
  parameter int unsigned IN_LANES = 8,
  parameter int unsigned PERIOD   = 250000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // load port
  input  logic                  l_we,
  input  logic [$clog2(NV*(N_IN/IN_LANES))-1:0] l_addr,
  input  logic [IN_LANES*8-1:0] l_data,
  input  logic                  enable,
  // stream towards the network
  output logic                  m_tvalid,
  input  logic                  m_tready,
  output logic [IN_LANES*8-1:0] m_tdata,
  output logic                  m_tlast,
  output logic [15:0]           bursts,
  output logic                  late
);
  localparam int unsigned BEATS = N_IN / IN_LANES;
  localparam int unsigned DEPTH = NV * BEATS;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned TW    = $clog2(PERIOD);

  logic [IN_LANES*8-1:0] mem [DEPTH];
  logic [AW-1:0]         rd;
  logic [TW-1:0]         tick;
  logic                  run, en_q, have;

  always_ff @(posedge clk) if (l_we) mem[l_addr] <= l_data;

  // the word at rd is kept in m_tdata (registered read), have = it is valid
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; tick <= '0; run <= 1'b0; en_q <= 1'b0; have <= 1'b0;
      bursts <= '0; late <= 1'b0; m_tdata <= '0; m_tlast <= 1'b0;
    end else begin
      logic boundary, adv;
      en_q <= enable;
      boundary = enable && (!en_q || tick == TW'(PERIOD - 1));
      tick <= (!enable || boundary) ? '0 : tick + 1'b1;
      adv = run && (!have || m_tready);
      if (adv) begin
        m_tdata <= mem[rd];
        m_tlast <= (int'(rd) % BEATS) == BEATS - 1;
        have    <= 1'b1;
        if (rd == AW'(DEPTH - 1)) begin run <= 1'b0; rd <= '0; end
        else rd <= rd + 1'b1;
      end else if (have && m_tready) have <= 1'b0;
      if (boundary) begin
        if (run) late <= 1'b1;
        else begin run <= 1'b1; rd <= '0; bursts <= bursts + 1'b1; end
      end
    end
  end
  assign m_tvalid = have;

  property p_axis_hold;
    @(posedge clk) disable iff (!rst_n) (m_tvalid && !m_tready) |=> (m_tvalid && $stable(m_tdata));
  endproperty
  assert property (p_axis_hold);
endmodule

// tb_csi_source: a reduced source (64 features, 4 vectors, 8 per beat,
// period 300 clocks) is loaded with random data and enabled. The sink drops
// TREADY at random. Every beat of three bursts is compared with the loaded
// memory, TLAST must mark every 8th beat, bursts must start PERIOD clocks
// apart, and a sink that stalls for a whole period must raise late.
module tb_csi_source;
  localparam int N_IN = 64, NV = 4, L = 8, PERIOD = 300, BEATS = N_IN / L, D = NV * BEATS;
  logic clk = 0, rst_n = 0, we = 0, en = 0, tv, tr = 0, tl, late;
  logic [$clog2(D)-1:0] addr = 0; logic [63:0] data = 0, td; logic [15:0] bursts;
  logic [63:0] mem [D];
  int checks = 0, failures = 0, beat = 0, cyc = 0, first_beat_cyc [$];
  logic hold_sink = 0;
  csi_source #(.N_IN(N_IN), .NV(NV), .IN_LANES(L), .PERIOD(PERIOD)) dut (.clk, .rst_n,
    .l_we(we), .l_addr(addr), .l_data(data), .enable(en),
    .m_tvalid(tv), .m_tready(tr), .m_tdata(td), .m_tlast(tl), .bursts, .late);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(negedge clk) tr <= !hold_sink && ($urandom_range(3) != 0);
  always @(posedge clk) if (rst_n && tv && tr) begin
    int b; b = beat % D;
    if (b == 0) first_beat_cyc.push_back(cyc);
    checks++;
    if (td != mem[b] || tl != (b % BEATS == BEATS - 1)) begin
      failures++; $display("FAIL beat %0d", beat);
    end
    beat++;
  end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < D; i++) begin
      mem[i] = {$urandom, $urandom};
      @(negedge clk) begin we = 1; addr = $bits(addr)'(i); data = mem[i]; end
    end
    @(negedge clk) begin we = 0; en = 1; end
    repeat (3 * PERIOD - 10) @(negedge clk);
    checks++;
    if (beat != 3 * D || bursts != 3 || late) begin failures++; $display("FAIL beats %0d bursts %0d", beat, bursts); end
    for (int i = 1; i < first_beat_cyc.size(); i++) begin
      checks++;
      if (first_beat_cyc[i] - first_beat_cyc[i-1] > PERIOD + 3 || first_beat_cyc[i] - first_beat_cyc[i-1] < PERIOD - 3) begin
        failures++; $display("FAIL burst spacing %0d", first_beat_cyc[i] - first_beat_cyc[i-1]);
      end
    end
    hold_sink = 1;
    repeat (PERIOD + 20) @(negedge clk);
    checks++;
    if (!late) begin failures++; $display("FAIL late not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

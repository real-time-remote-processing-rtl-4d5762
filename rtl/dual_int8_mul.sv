// dual_int8_mul: two signed 8-bit products that share one operand, computed
// with a single wide multiplication as on a 27x18 DSP multiplier.
// The two weights are packed into one 27-bit word, wa in the low byte and
// wb sixteen bits up (eight empty bits between them): packed = wb*2^16 + wa.
// Multiplying by the shared input x gives wb*x*2^16 + wa*x. The low 16 bits
// are wa*x exactly; the upper field is wb*x minus one when wa*x is negative
// (the borrow of its sign extension), which is added back.
// Interface: x, wa, wb in; pa = wa*x and pb = wb*x registered, latency 1.
module dual_int8_mul (
  input  logic               clk,
  input  logic signed [7:0]  x,
  input  logic signed [7:0]  wa,
  input  logic signed [7:0]  wb,
  output logic signed [15:0] pa,
  output logic signed [15:0] pb
);
  logic signed [26:0] packed_w;
  logic signed [17:0] x18;
  logic signed [44:0] p;
  always_comb begin
    packed_w = (27'(wb) <<< 16) + 27'(wa);
    x18      = 18'(x);
    p        = 45'(packed_w) * 45'(x18);
  end
  always_ff @(posedge clk) begin
    pa <= p[15:0];
    pb <= p[31:16] + 16'(p[15]);
  end
endmodule

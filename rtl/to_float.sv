// to_float: converts a signed fixed-point number (16 bits, FRAC fraction
// bits) from the neural network into the fusion's floating-point format.
// The value is split into sign and magnitude, the leading zeros of the
// magnitude are counted from the most significant bit, the magnitude is
// shifted left by that count into the Q1.22 mantissa and the exponent is set
// from the position of the leading one. No rounding is needed (16 bits fit
// the 23-bit mantissa exactly).
// Interface: in_valid/x in, out_valid/y one clock later.
module to_float
  import lis_pkg::*;
#(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output fp_t                 y
);
  logic [W-1:0]       mag;
  logic [$clog2(W+1)-1:0] lz;
  logic [W-1:0]       shifted;
  fp_t                conv;

  always_comb begin
    mag = x[W-1] ? W'(-x) : W'(x);
    lz  = '0;
    for (int i = W - 1; i >= 0; i--) begin
      if (mag[i]) break;
      lz = lz + 1'b1;
    end
    shifted = mag << lz;
    if (mag == '0) begin
      conv = FP_ZERO;
    end else begin
      conv.sign = x[W-1];
      conv.exp  = EXP_W'(int'(W) - 1 - int'(lz) - int'(FRAC));
      conv.man  = MAN_W'({shifted, {(MAN_W - W){1'b0}}});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= FP_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= conv;
    end
  end
endmodule

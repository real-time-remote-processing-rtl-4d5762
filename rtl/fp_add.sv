// fp_add: registered floating-point adder (format in lis_pkg).
// The operation follows the usual flow: compare exponents and shift the
// smaller operand right to the larger exponent, add (or subtract) the
// mantissas and truncate, normalise if needed, store in the output register.
// The sign is that of the operand with the larger magnitude.
// Interface: operands a, b are taken when subordinate_valid is high; the sum
// appears on y one clock later together with a one-cycle manager_valid pulse
// (latency 1, one new operation per clock). Results are truncated, not
// rounded, as in the design description; exponent saturation and zero
// flushing are this design's choice.
module fp_add
  import lis_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic subordinate_valid,
  input  fp_t  a,
  input  fp_t  b,
  output logic manager_valid,
  output fp_t  y
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      manager_valid <= 1'b0;
      y             <= FP_ZERO;
    end else begin
      manager_valid <= subordinate_valid;
      if (subordinate_valid) y <= fp_add_f(a, b);
    end
  end
endmodule

// fp_mul: registered floating-point multiplier (format in lis_pkg).
// No alignment is needed before multiplying: the sign is the XOR of the
// operand signs, the exponent is the sum of the exponents and the Q1.22
// mantissas are multiplied into a Q2.44 product that is normalised (one
// position at most) and truncated to 23 bits.
// Interface: operands taken when subordinate_valid is high, product on y one
// clock later with a one-cycle manager_valid pulse (latency 1, one operation
// per clock).
module fp_mul
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
      if (subordinate_valid) y <= fp_mul_f(a, b);
    end
  end
endmodule

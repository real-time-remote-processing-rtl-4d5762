// fp_uop_engine: small sequencer that evaluates a straight-line program of
// floating-point adds and multiplies, used to compute the Taylor series of
// the exponential and the logarithm (fp_exp, fp_log1p). The program is
// supplied by the parent as a combinational function of the step index.
// Four working registers: X (the input), T, A, B. Each step issues one
// operation to a registered fp_add or fp_mul and writes its result back when
// the unit's manager_valid returns, so one step takes 2 clocks.
// Interface: start/x accepted when busy is low; after NSTEPS steps done
// pulses for one clock and y holds register A. Latency 2*NSTEPS + 1 clocks.
module fp_uop_engine
  import lis_pkg::*;
#(
  parameter int unsigned NSTEPS = 14
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fp_t  x,
  output logic [$clog2(NSTEPS+1)-1:0] step,
  input  uop_t uop,
  output logic busy,
  output logic done,
  output fp_t  y
);
  fp_t r_x, r_t, r_a, r_b;
  logic issue;
  fp_t op_a, op_b, add_y, mul_y;
  logic add_v, mul_v, add_done, mul_done;

  function automatic fp_t rd(input fp_reg_e r, input fp_t vx, input fp_t vt,
                             input fp_t va, input fp_t vb);
    case (r)
      R_X:     return vx;
      R_T:     return vt;
      R_A:     return va;
      default: return vb;
    endcase
  endfunction

  always_comb begin
    op_a  = rd(uop.src_a, r_x, r_t, r_a, r_b);
    op_b  = uop.use_k ? uop.k : rd(uop.src_b, r_x, r_t, r_a, r_b);
    add_v = busy && issue && !uop.is_mul;
    mul_v = busy && issue &&  uop.is_mul;
  end

  fp_add u_add (.clk, .rst_n, .subordinate_valid(add_v), .a(op_a), .b(op_b),
                .manager_valid(add_done), .y(add_y));
  fp_mul u_mul (.clk, .rst_n, .subordinate_valid(mul_v), .a(op_a), .b(op_b),
                .manager_valid(mul_done), .y(mul_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_x <= FP_ZERO; r_t <= FP_ZERO; r_a <= FP_ZERO; r_b <= FP_ZERO;
      step <= '0; issue <= 1'b0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          r_x <= x; busy <= 1'b1; issue <= 1'b1; step <= '0;
        end
      end else if (issue) begin
        issue <= 1'b0;
      end else if (add_done || mul_done) begin
        case (uop.dst)
          R_T:     r_t <= add_done ? add_y : mul_y;
          R_A:     r_a <= add_done ? add_y : mul_y;
          R_B:     r_b <= add_done ? add_y : mul_y;
          default: ;
        endcase
        if (step == ($bits(step))'(NSTEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          step  <= step + 1'b1;
          issue <= 1'b1;
        end
      end
    end
  end

  // the result register is A; make it visible once the last step is written
  assign y = r_a;
endmodule

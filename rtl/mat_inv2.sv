// mat_inv2: inverse of a symmetric 2x2 floating-point matrix
//   [a11 a12; a12 a22]^-1 = (1/det) [a22 -a12; -a12 a11],
//   det = a11*a22 - a12*a12.
// The determinant takes two multiplies and one (subtracting) add, its
// inverse comes from the Newton-Raphson reciprocal (fp_recip) and three
// multiplies scale the adjoint. One fp_mul and one fp_add are shared by all
// steps; every step waits for its unit's manager_valid.
// Interface: start with a11/a12/a22 when busy is low; done pulses with the
// three distinct entries i11/i12/i22 of the inverse. Latency 19 clocks.
module mat_inv2
  import lis_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fp_t  a11,
  input  fp_t  a12,
  input  fp_t  a22,
  output logic busy,
  output logic done,
  output fp_t  i11,
  output fp_t  i12,
  output fp_t  i22
);
  typedef enum logic [2:0] {S_IDLE, S_M0, S_M1, S_SUB, S_RCP, S_S11, S_S12, S_S22} st_e;
  st_e  st;
  logic issue;
  fp_t  r11, r12, r22, p0, p1, det, rdet;
  fp_t  mul_a, mul_b, add_a, add_b, mul_y, add_y, rcp_y;
  logic mul_v, add_v, mul_done, add_done, rcp_start, rcp_busy, rcp_done;

  always_comb begin
    mul_a = r11; mul_b = r22; add_a = p0; add_b = fp_neg(p1);
    case (st)
      S_M0:    begin mul_a = r11;         mul_b = r22;  end
      S_M1:    begin mul_a = r12;         mul_b = r12;  end
      S_S11:   begin mul_a = r22;         mul_b = rdet; end
      S_S12:   begin mul_a = fp_neg(r12); mul_b = rdet; end
      S_S22:   begin mul_a = r11;         mul_b = rdet; end
      default: ;
    endcase
    mul_v     = issue && (st inside {S_M0, S_M1, S_S11, S_S12, S_S22});
    add_v     = issue && (st == S_SUB);
    rcp_start = issue && (st == S_RCP);
  end

  fp_mul  u_mul (.clk, .rst_n, .subordinate_valid(mul_v), .a(mul_a), .b(mul_b),
                 .manager_valid(mul_done), .y(mul_y));
  fp_add  u_add (.clk, .rst_n, .subordinate_valid(add_v), .a(add_a), .b(add_b),
                 .manager_valid(add_done), .y(add_y));
  fp_recip u_rcp (.clk, .rst_n, .start(rcp_start), .d(det), .busy(rcp_busy),
                  .done(rcp_done), .y(rcp_y));

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; issue <= 1'b0; done <= 1'b0;
      r11 <= FP_ZERO; r12 <= FP_ZERO; r22 <= FP_ZERO;
      p0 <= FP_ZERO; p1 <= FP_ZERO; det <= FP_ZERO; rdet <= FP_ZERO;
      i11 <= FP_ZERO; i12 <= FP_ZERO; i22 <= FP_ZERO;
    end else begin
      done  <= 1'b0;
      issue <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          r11 <= a11; r12 <= a12; r22 <= a22; st <= S_M0; issue <= 1'b1;
        end
        S_M0:  if (mul_done) begin p0 <= mul_y; st <= S_M1;  issue <= 1'b1; end
        S_M1:  if (mul_done) begin p1 <= mul_y; st <= S_SUB; issue <= 1'b1; end
        S_SUB: if (add_done) begin det <= add_y; st <= S_RCP; issue <= 1'b1; end
        S_RCP: if (rcp_done) begin rdet <= rcp_y; st <= S_S11; issue <= 1'b1; end
        S_S11: if (mul_done) begin i11 <= mul_y; st <= S_S12; issue <= 1'b1; end
        S_S12: if (mul_done) begin i12 <= mul_y; st <= S_S22; issue <= 1'b1; end
        S_S22: if (mul_done) begin i22 <= mul_y; st <= S_IDLE; done <= 1'b1; end
        default: st <= S_IDLE;
      endcase
    end
  end

  // rcp_busy is only informative here: the reciprocal is started once per
  // inversion and always idle at that point
  property p_rcp_free; @(posedge clk) disable iff (!rst_n) rcp_start |-> !rcp_busy; endproperty
  assert property (p_rcp_free);
endmodule

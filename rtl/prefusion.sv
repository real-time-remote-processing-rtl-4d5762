// prefusion: turns one neural-network output tuple {mean, scale} into the
// inverse covariance needed by the fusion.
//   scale  = [s1 0; s2 s3] (lower triangular, diagonal s1, s3)
//   l1 = ln(1 + e^s1) + 1e-5, l3 = ln(1 + e^s3) + 1e-5   (softplus + epsilon)
//   cov    = L * L^T = [l1^2, l1*s2; l1*s2, s2^2 + l3^2]
//   output = cov^-1 (three distinct entries) and the unchanged mean.
// Four pipeline registers (init, exp, log, inv) separated by three stages of
// STAGE clocks each (40 by default, set by the slowest unit, the logarithm):
// exp stage (two fp_exp), log stage (two fp_log1p, epsilon added as the
// result is registered), matmul+inv stage (shared fp_mul/fp_add, then
// mat_inv2). The means travel alongside so they stay aligned.
// Interface: a tuple is accepted when in_valid && in_ready; in_ready is high
// for one clock per stage period. out_valid pulses 3*STAGE+2 clocks after the
// tuple was accepted, with the result held on the outputs until the next one.
// One tuple per STAGE clocks.
module prefusion
  import lis_pkg::*;
#(
  parameter int unsigned STAGE = 40
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  fp_t  scale_1,
  input  fp_t  scale_2,
  input  fp_t  scale_3,
  input  fp_t  mean_1,
  input  fp_t  mean_2,
  output logic out_valid,
  output fp_t  inv_cov_1,
  output fp_t  inv_cov_2,
  output fp_t  inv_cov_3,
  output fp_t  mean_1_o,
  output fp_t  mean_2_o
);
  localparam fp_t K_EPS = fp_from_real(1.0e-5);

  logic [$clog2(STAGE)-1:0] cnt;
  logic boundary, kick;
  assign boundary = (cnt == '0);
  assign in_ready = boundary;

  typedef struct packed { fp_t s1, s2, s3, m1, m2; } tuple_t;
  tuple_t r_init, r_exp, r_log;
  logic   v_init, v_exp, v_log;

  // ---- exp stage units
  logic e1_busy, e1_done, e3_busy, e3_done;
  fp_t  e1_y, e3_y;
  fp_exp u_exp1 (.clk, .rst_n, .start(kick && v_init), .x(r_init.s1),
                 .busy(e1_busy), .done(e1_done), .y(e1_y));
  fp_exp u_exp3 (.clk, .rst_n, .start(kick && v_init), .x(r_init.s3),
                 .busy(e3_busy), .done(e3_done), .y(e3_y));

  // ---- log stage units
  logic g1_busy, g1_done, g3_busy, g3_done;
  fp_t  g1_y, g3_y;
  fp_log1p u_log1 (.clk, .rst_n, .start(kick && v_exp), .x(r_exp.s1),
                   .busy(g1_busy), .done(g1_done), .y(g1_y));
  fp_log1p u_log3 (.clk, .rst_n, .start(kick && v_exp), .x(r_exp.s3),
                   .busy(g3_busy), .done(g3_done), .y(g3_y));

  // ---- matmul + inverse stage
  typedef enum logic [2:0] {M_IDLE, M_11, M_12, M_22A, M_22B, M_ADD, M_INV} mst_e;
  mst_e mst;
  logic miss;
  fp_t  c11, c12, c22a, c22b, c22;
  fp_t  mm_a, mm_b, mm_y, ad_y;
  logic mm_v, ad_v, mm_done, ad_done, inv_start, inv_busy, inv_done;
  fp_t  i11, i12, i22;

  always_comb begin
    mm_a = r_log.s1; mm_b = r_log.s1;
    case (mst)
      M_12:    begin mm_a = r_log.s1; mm_b = r_log.s2; end
      M_22A:   begin mm_a = r_log.s2; mm_b = r_log.s2; end
      M_22B:   begin mm_a = r_log.s3; mm_b = r_log.s3; end
      default: ;
    endcase
    mm_v      = miss && (mst inside {M_11, M_12, M_22A, M_22B});
    ad_v      = miss && (mst == M_ADD);
    inv_start = miss && (mst == M_INV);
  end

  fp_mul u_mm (.clk, .rst_n, .subordinate_valid(mm_v), .a(mm_a), .b(mm_b),
               .manager_valid(mm_done), .y(mm_y));
  fp_add u_ad (.clk, .rst_n, .subordinate_valid(ad_v), .a(c22a), .b(c22b),
               .manager_valid(ad_done), .y(ad_y));
  mat_inv2 u_inv (.clk, .rst_n, .start(inv_start), .a11(c11), .a12(c12), .a22(c22),
                  .busy(inv_busy), .done(inv_done), .i11, .i12, .i22);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst <= M_IDLE; miss <= 1'b0;
      c11 <= FP_ZERO; c12 <= FP_ZERO; c22a <= FP_ZERO; c22b <= FP_ZERO; c22 <= FP_ZERO;
    end else begin
      miss <= 1'b0;
      case (mst)
        M_IDLE: if (kick && v_log) begin mst <= M_11; miss <= 1'b1; end
        M_11:  if (mm_done) begin c11  <= mm_y; mst <= M_12;  miss <= 1'b1; end
        M_12:  if (mm_done) begin c12  <= mm_y; mst <= M_22A; miss <= 1'b1; end
        M_22A: if (mm_done) begin c22a <= mm_y; mst <= M_22B; miss <= 1'b1; end
        M_22B: if (mm_done) begin c22b <= mm_y; mst <= M_ADD; miss <= 1'b1; end
        M_ADD: if (ad_done) begin c22  <= ad_y; mst <= M_INV; miss <= 1'b1; end
        M_INV: if (inv_done) mst <= M_IDLE;
        default: mst <= M_IDLE;
      endcase
    end
  end

  // ---- stage timing and pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; kick <= 1'b0;
      r_init <= '0; r_exp <= '0; r_log <= '0;
      v_init <= 1'b0; v_exp <= 1'b0; v_log <= 1'b0;
      out_valid <= 1'b0;
      inv_cov_1 <= FP_ZERO; inv_cov_2 <= FP_ZERO; inv_cov_3 <= FP_ZERO;
      mean_1_o <= FP_ZERO; mean_2_o <= FP_ZERO;
    end else begin
      cnt       <= (cnt == ($bits(cnt))'(STAGE - 1)) ? '0 : cnt + 1'b1;
      kick      <= boundary;
      out_valid <= 1'b0;
      if (boundary) begin
        // inv register
        if (v_log) begin
          inv_cov_1 <= i11; inv_cov_2 <= i12; inv_cov_3 <= i22;
          mean_1_o  <= r_log.m1; mean_2_o <= r_log.m2;
          out_valid <= 1'b1;
        end
        // log register: softplus result plus epsilon
        v_log <= v_exp;
        r_log <= r_exp;
        if (v_exp) begin
          r_log.s1 <= fp_add_f(g1_y, K_EPS);
          r_log.s3 <= fp_add_f(g3_y, K_EPS);
        end
        // exp register
        v_exp <= v_init;
        r_exp <= r_init;
        if (v_init) begin
          r_exp.s1 <= e1_y;
          r_exp.s3 <= e3_y;
        end
        // init register
        v_init <= in_valid;
        r_init <= '{s1: scale_1, s2: scale_2, s3: scale_3, m1: mean_1, m2: mean_2};
      end
    end
  end

  // every unit must have finished its stage before the next boundary
  property p_stage_fits;
    @(posedge clk) disable iff (!rst_n)
      boundary |-> !(e1_busy || e3_busy || g1_busy || g3_busy || inv_busy || mst != M_IDLE);
  endproperty
  assert property (p_stage_fits);
endmodule

// fusion: conflation of P Gaussian panel estimates into one,
//   Sigma_f = (sum_i Sigma_i^-1)^-1,  mu_f = Sigma_f * sum_i (Sigma_i^-1 mu_i).
// Each arriving panel (inverse covariance c1 c2 c3 = [c1 c2; c2 c3] and mean
// m1 m2, as produced by the prefusion) is folded into two accumulators by a
// shared adder and multiplier that step through eleven operations: the three
// covariance sums, then the 2x2-by-vector product C*mu added to the mean
// accumulator. A counter tells which operation is due and another counts the
// panels, so panel i is added to the result of panels 0..i-1. After the last
// panel the accumulated sum is handed to a separate finishing unit (mat_inv2
// for the fused covariance, then its own multiplier and adder for the fused
// mean), so the next inference's panels can be accumulated meanwhile.
// Interface: in_valid pulses with one panel tuple; at most one tuple per 24
// clocks is accepted (the prefusion delivers one per 40). out_valid pulses
// with the fused covariance f_cov_1..3 and mean f_mean_1..2 about 50 clocks
// after the last panel of an inference.
module fusion
  import lis_pkg::*;
#(
  parameter int unsigned P = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  fp_t  inv_cov_1,
  input  fp_t  inv_cov_2,
  input  fp_t  inv_cov_3,
  input  fp_t  mean_1,
  input  fp_t  mean_2,
  output logic out_valid,
  output fp_t  f_cov_1,
  output fp_t  f_cov_2,
  output fp_t  f_cov_3,
  output fp_t  f_mean_1,
  output fp_t  f_mean_2
);
  // ---------------- accumulation engine ----------------
  // register file: 0..2 C, 3..4 mu, 5..7 S, 8..9 v, 10..11 temp
  typedef enum logic [3:0] {
    RC0, RC1, RC2, RM0, RM1, RS0, RS1, RS2, RV0, RV1, RT0, RT1
  } rf_e;
  typedef struct packed { logic is_mul; rf_e a, b, d; } op_t;
  localparam int unsigned NOPS = 11;

  fp_t  rf [12];
  logic [3:0] pc;                       // operation counter
  logic [$clog2(P+1)-1:0] panel;        // panel counter
  logic busy, issue, last;
  op_t  op;
  fp_t  oa, ob, add_y, mul_y;
  logic add_v, mul_v, add_done, mul_done;

  function automatic op_t mk(input logic m, input rf_e a, input rf_e b, input rf_e d);
    op_t r; r.is_mul = m; r.a = a; r.b = b; r.d = d; return r;
  endfunction

  always_comb begin
    case (pc)
      0:  op = mk(1'b0, RS0, RC0, RS0);   // S += C (three entries)
      1:  op = mk(1'b0, RS1, RC1, RS1);
      2:  op = mk(1'b0, RS2, RC2, RS2);
      3:  op = mk(1'b1, RC0, RM0, RT0);   // c1*m1
      4:  op = mk(1'b1, RC1, RM1, RT1);   // c2*m2
      5:  op = mk(1'b0, RT0, RT1, RT0);
      6:  op = mk(1'b0, RV0, RT0, RV0);   // v1 += c1 m1 + c2 m2
      7:  op = mk(1'b1, RC1, RM0, RT0);   // c2*m1
      8:  op = mk(1'b1, RC2, RM1, RT1);   // c3*m2
      9:  op = mk(1'b0, RT0, RT1, RT0);
      default:
          op = mk(1'b0, RV1, RT0, RV1);   // v2 += c2 m1 + c3 m2
    endcase
    oa    = rf[op.a];
    ob    = rf[op.b];
    add_v = issue && !op.is_mul;
    mul_v = issue &&  op.is_mul;
  end

  fp_add u_add (.clk, .rst_n, .subordinate_valid(add_v), .a(oa), .b(ob),
                .manager_valid(add_done), .y(add_y));
  fp_mul u_mul (.clk, .rst_n, .subordinate_valid(mul_v), .a(oa), .b(ob),
                .manager_valid(mul_done), .y(mul_y));

  assign in_ready = !busy;

  // hand-over to the finishing unit
  logic fin_load;
  fp_t  h_s0, h_s1, h_s2, h_v0, h_v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 12; i++) rf[i] <= FP_ZERO;
      pc <= '0; panel <= '0; busy <= 1'b0; issue <= 1'b0; last <= 1'b0;
      fin_load <= 1'b0;
      h_s0 <= FP_ZERO; h_s1 <= FP_ZERO; h_s2 <= FP_ZERO; h_v0 <= FP_ZERO; h_v1 <= FP_ZERO;
    end else begin
      issue    <= 1'b0;
      fin_load <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          rf[RC0] <= inv_cov_1; rf[RC1] <= inv_cov_2; rf[RC2] <= inv_cov_3;
          rf[RM0] <= mean_1;    rf[RM1] <= mean_2;
          if (panel == '0) begin       // first panel of an inference
            rf[RS0] <= FP_ZERO; rf[RS1] <= FP_ZERO; rf[RS2] <= FP_ZERO;
            rf[RV0] <= FP_ZERO; rf[RV1] <= FP_ZERO;
          end
          last  <= (panel == ($bits(panel))'(P - 1));
          busy  <= 1'b1;
          issue <= 1'b1;
          pc    <= '0;
        end
      end else if (add_done || mul_done) begin
        rf[op.d] <= add_done ? add_y : mul_y;
        if (pc == 4'(NOPS - 1)) begin
          busy <= 1'b0;
          if (last) begin
            panel    <= '0;
            fin_load <= 1'b1;
            h_s0 <= rf[RS0]; h_s1 <= rf[RS1]; h_s2 <= rf[RS2];
            h_v0 <= rf[RV0]; h_v1 <= add_y;   // v2 written this cycle
          end else begin
            panel <= panel + 1'b1;
          end
        end else begin
          pc    <= pc + 1'b1;
          issue <= 1'b1;
        end
      end
    end
  end

  // ---------------- finishing unit ----------------
  typedef enum logic [2:0] {F_IDLE, F_INV, F_M0, F_M1, F_A0, F_M2, F_M3, F_A1} fst_e;
  fst_e fst;
  logic fiss;
  fp_t  fi11, fi12, fi22, ft0, ft1;
  fp_t  fm_a, fm_b, fm_y, fa_y;
  logic fm_v, fa_v, fm_done, fa_done, inv_busy, inv_done;
  logic fin_pending;

  mat_inv2 u_inv (.clk, .rst_n, .start(fiss && fst == F_INV),
                  .a11(h_s0), .a12(h_s1), .a22(h_s2),
                  .busy(inv_busy), .done(inv_done), .i11(fi11), .i12(fi12), .i22(fi22));

  always_comb begin
    fm_a = f_cov_1; fm_b = h_v0;
    case (fst)
      F_M1:    begin fm_a = f_cov_2; fm_b = h_v1; end
      F_M2:    begin fm_a = f_cov_2; fm_b = h_v0; end
      F_M3:    begin fm_a = f_cov_3; fm_b = h_v1; end
      default: ;
    endcase
    fm_v = fiss && (fst inside {F_M0, F_M1, F_M2, F_M3});
    fa_v = fiss && (fst inside {F_A0, F_A1});
  end

  fp_mul u_fmul (.clk, .rst_n, .subordinate_valid(fm_v), .a(fm_a), .b(fm_b),
                 .manager_valid(fm_done), .y(fm_y));
  fp_add u_fadd (.clk, .rst_n, .subordinate_valid(fa_v), .a(ft0), .b(ft1),
                 .manager_valid(fa_done), .y(fa_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst <= F_IDLE; fiss <= 1'b0; out_valid <= 1'b0; fin_pending <= 1'b0;
      f_cov_1 <= FP_ZERO; f_cov_2 <= FP_ZERO; f_cov_3 <= FP_ZERO;
      f_mean_1 <= FP_ZERO; f_mean_2 <= FP_ZERO; ft0 <= FP_ZERO; ft1 <= FP_ZERO;
    end else begin
      fiss      <= 1'b0;
      out_valid <= 1'b0;
      case (fst)
        F_IDLE: if (fin_load) begin fst <= F_INV; fiss <= 1'b1; end
        F_INV:  if (inv_done) begin
          f_cov_1 <= fi11; f_cov_2 <= fi12; f_cov_3 <= fi22;
          fst <= F_M0; fiss <= 1'b1;
        end
        F_M0: if (fm_done) begin ft0 <= fm_y; fst <= F_M1; fiss <= 1'b1; end
        F_M1: if (fm_done) begin ft1 <= fm_y; fst <= F_A0; fiss <= 1'b1; end
        F_A0: if (fa_done) begin f_mean_1 <= fa_y; fst <= F_M2; fiss <= 1'b1; end
        F_M2: if (fm_done) begin ft0 <= fm_y; fst <= F_M3; fiss <= 1'b1; end
        F_M3: if (fm_done) begin ft1 <= fm_y; fst <= F_A1; fiss <= 1'b1; end
        F_A1: if (fa_done) begin
          f_mean_2 <= fa_y; fst <= F_IDLE; out_valid <= 1'b1;
        end
        default: fst <= F_IDLE;
      endcase
      // a hand-over while the finishing unit is still busy would be lost
      fin_pending <= fin_load && (fst != F_IDLE);
    end
  end

  property p_no_lost_result; @(posedge clk) disable iff (!rst_n) !fin_pending; endproperty
  assert property (p_no_lost_result);
  property p_inv_idle; @(posedge clk) disable iff (!rst_n) (fiss && fst == F_INV) |-> !inv_busy; endproperty
  assert property (p_inv_idle);
endmodule

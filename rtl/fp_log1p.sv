// fp_log1p: floating-point ln(1 + x) by a Taylor series around x = 0.625,
// with t = x - 5/8:
//   ln(1+x) ~ 0.1009 + 8x/13
//           + (32t^2/169)(-1 + (16t/13)(1/3 + (2t/13)(-1 + (32t/13)(1/5 - 4t/39))))
// (terms up to t^6 of the series of ln(1.625 + t)). Constant divisions are
// multiplications by precomputed inverses. The 18 adds and multiplies run
// in sequence on one adder and one multiplier (fp_uop_engine), 2 clocks
// each: latency 37 clocks, the slowest unit of the prefusion and the reason
// its pipeline stage is 40 clocks long.
module fp_log1p
  import lis_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fp_t  x,
  output logic busy,
  output logic done,
  output fp_t  y
);
  localparam int unsigned NSTEPS = 18;
  localparam fp_t K_M5_8   = fp_from_real(-0.625);
  localparam fp_t K_M4_39  = fp_from_real(-4.0 / 39.0);
  localparam fp_t K_1_5    = fp_from_real(0.2);
  localparam fp_t K_32_13  = fp_from_real(32.0 / 13.0);
  localparam fp_t K_MONE   = fp_from_real(-1.0);
  localparam fp_t K_2_13   = fp_from_real(2.0 / 13.0);
  localparam fp_t K_1_3    = fp_from_real(1.0 / 3.0);
  localparam fp_t K_16_13  = fp_from_real(16.0 / 13.0);
  localparam fp_t K_32_169 = fp_from_real(32.0 / 169.0);
  localparam fp_t K_8_13   = fp_from_real(8.0 / 13.0);
  localparam fp_t K_C0     = fp_from_real(0.1009);

  logic [$clog2(NSTEPS+1)-1:0] step;
  uop_t uop;

  function automatic uop_t u(input logic m, input fp_reg_e a, input fp_reg_e b,
                             input logic uk, input fp_t k, input fp_reg_e d);
    uop_t r;
    r.is_mul = m; r.src_a = a; r.src_b = b; r.use_k = uk; r.k = k; r.dst = d;
    return r;
  endfunction

  always_comb begin
    case (step)
      0:  uop = u(1'b0, R_X, R_X, 1'b1, K_M5_8,   R_T); // t = x - 5/8
      1:  uop = u(1'b1, R_T, R_X, 1'b1, K_M4_39,  R_A); // -4t/39
      2:  uop = u(1'b0, R_A, R_X, 1'b1, K_1_5,    R_A); // + 1/5
      3:  uop = u(1'b1, R_T, R_X, 1'b1, K_32_13,  R_B); // 32t/13
      4:  uop = u(1'b1, R_A, R_B, 1'b0, FP_ZERO,  R_A);
      5:  uop = u(1'b0, R_A, R_X, 1'b1, K_MONE,   R_A); // - 1
      6:  uop = u(1'b1, R_T, R_X, 1'b1, K_2_13,   R_B); // 2t/13
      7:  uop = u(1'b1, R_A, R_B, 1'b0, FP_ZERO,  R_A);
      8:  uop = u(1'b0, R_A, R_X, 1'b1, K_1_3,    R_A); // + 1/3
      9:  uop = u(1'b1, R_T, R_X, 1'b1, K_16_13,  R_B); // 16t/13
      10: uop = u(1'b1, R_A, R_B, 1'b0, FP_ZERO,  R_A);
      11: uop = u(1'b0, R_A, R_X, 1'b1, K_MONE,   R_A); // - 1
      12: uop = u(1'b1, R_T, R_T, 1'b0, FP_ZERO,  R_B); // t^2
      13: uop = u(1'b1, R_B, R_X, 1'b1, K_32_169, R_B); // 32t^2/169
      14: uop = u(1'b1, R_A, R_B, 1'b0, FP_ZERO,  R_A);
      15: uop = u(1'b1, R_X, R_X, 1'b1, K_8_13,   R_B); // 8x/13
      16: uop = u(1'b0, R_A, R_B, 1'b0, FP_ZERO,  R_A);
      default:
          uop = u(1'b0, R_A, R_X, 1'b1, K_C0,     R_A); // + 0.1009
    endcase
  end

  fp_uop_engine #(.NSTEPS(NSTEPS)) u_eng (
    .clk, .rst_n, .start, .x, .step, .uop, .busy, .done, .y);
endmodule

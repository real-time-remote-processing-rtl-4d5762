// fp_exp: floating-point exponential by a Taylor series around -1.5,
// evaluated in nested (Horner-like) form with q = x + 1.5:
//   e^x ~ e^-1.5 * (1 + q(1 + q(1/2 + q(1/6 + q/24 + q(1/120 + q/720)))))
// The nesting, including the placement of the q/24 and 1/120 terms, is the
// one of the published equation and datapath; this
// truncated form is exact near q = 0 and loses accuracy as |q| grows.
// Division by the constant denominators is done by multiplying with their
// precomputed inverses. The 14 operations run one after another on one
// adder and one multiplier (fp_uop_engine), 2 clocks each: latency 29
// clocks from start to done, which fits the 40-clock prefusion stage.
module fp_exp
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
  localparam int unsigned NSTEPS = 14;
  localparam fp_t K_1P5   = fp_from_real(1.5);
  localparam fp_t K_I720  = fp_from_real(1.0 / 720.0);
  localparam fp_t K_I120  = fp_from_real(1.0 / 120.0);
  localparam fp_t K_I24   = fp_from_real(1.0 / 24.0);
  localparam fp_t K_I6    = fp_from_real(1.0 / 6.0);
  localparam fp_t K_HALF  = fp_from_real(0.5);
  localparam fp_t K_ONE   = fp_from_real(1.0);
  localparam fp_t K_EM1P5 = fp_from_real(0.22313016014842982); // e^-1.5

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
      0:  uop = u(1'b0, R_X, R_X, 1'b1, K_1P5,   R_T); // q = x + 1.5
      1:  uop = u(1'b1, R_T, R_X, 1'b1, K_I720,  R_A); // q/720
      2:  uop = u(1'b0, R_A, R_X, 1'b1, K_I120,  R_A); // + 1/120
      3:  uop = u(1'b1, R_A, R_T, 1'b0, FP_ZERO, R_A); // * q
      4:  uop = u(1'b1, R_T, R_X, 1'b1, K_I24,   R_B); // q/24
      5:  uop = u(1'b0, R_A, R_B, 1'b0, FP_ZERO, R_A); // + q/24
      6:  uop = u(1'b0, R_A, R_X, 1'b1, K_I6,    R_A); // + 1/6
      7:  uop = u(1'b1, R_A, R_T, 1'b0, FP_ZERO, R_A); // * q
      8:  uop = u(1'b0, R_A, R_X, 1'b1, K_HALF,  R_A); // + 1/2
      9:  uop = u(1'b1, R_A, R_T, 1'b0, FP_ZERO, R_A); // * q
      10: uop = u(1'b0, R_A, R_X, 1'b1, K_ONE,   R_A); // + 1
      11: uop = u(1'b1, R_A, R_T, 1'b0, FP_ZERO, R_A); // * q
      12: uop = u(1'b0, R_A, R_X, 1'b1, K_ONE,   R_A); // + 1
      default:
          uop = u(1'b1, R_A, R_X, 1'b1, K_EM1P5, R_A); // * e^-1.5
    endcase
  end

  fp_uop_engine #(.NSTEPS(NSTEPS)) u_eng (
    .clk, .rst_n, .start, .x, .step, .uop, .busy, .done, .y);
endmodule

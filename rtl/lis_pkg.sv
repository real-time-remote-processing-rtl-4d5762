// lis_pkg: types, constants and arithmetic helpers shared by the LIS
// positioning accelerators (neural network, probability fusion, routers).
//
// Floating-point format (used by the fusion datapath): 1 sign bit, an 8-bit
// two's-complement exponent and a 23-bit unsigned mantissa with an explicit
// leading one, read as Q1.22, so |value| = man / 2^22 * 2^exp with
// 1 <= man/2^22 < 2 for a normalised number. Zero is man == 0. There is no
// hidden bit, no rounding (results are truncated), no infinities or NaNs:
// exponent overflow saturates and underflow flushes to zero. The 23-bit
// mantissa and Q1.22 scaling follow the design description; the exponent
// width and the special-value policy are this design's choice.
//
// Fixed-point formats of the neural network: layer 1 works on INT8 inputs
// and weights, everything after it on signed 16-bit Q8.8 values (the number
// of fraction bits is this design's choice).
package lis_pkg;

  // ---------------- floating point ----------------
  localparam int unsigned MAN_W = 23;
  localparam int unsigned EXP_W = 8;
  localparam int signed   EXP_MAX = 127;
  localparam int signed   EXP_MIN = -128;

  typedef struct packed {
    logic                     sign;
    logic signed [EXP_W-1:0]  exp;
    logic        [MAN_W-1:0]  man;
  } fp_t;

  localparam fp_t FP_ZERO = '{sign: 1'b0, exp: '0, man: '0};

  // Build a normalised float from sign, exponent and a wide unsigned
  // magnitude whose binary point sits FRAC bits up. Truncates.
  function automatic fp_t fp_pack(input logic s, input int signed e,
                                  input logic [63:0] mag, input int frac);
    fp_t r;
    int  msb;
    int signed ex;
    logic [63:0] sh;
    msb = -1;
    for (int i = 0; i < 64; i++) if (mag[i]) msb = i;
    if (msb < 0) return FP_ZERO;
    // value = mag * 2^-frac * 2^e ; leading one at bit msb
    ex = e + msb - frac;
    if (msb >= 22) sh = mag >> (msb - 22);
    else           sh = mag << (22 - msb);
    if (ex > EXP_MAX) begin
      r.sign = s; r.exp = EXP_W'(EXP_MAX); r.man = '1;
      return r;
    end
    if (ex < EXP_MIN) return FP_ZERO;
    r.sign = s;
    r.exp  = EXP_W'(ex);
    r.man  = sh[MAN_W-1:0];
    return r;
  endfunction

  // Floating-point addition: align to the larger exponent (the smaller
  // operand's mantissa is shifted right and truncated), add or subtract the
  // magnitudes, take the sign of the larger operand, normalise.
  function automatic fp_t fp_add_f(input fp_t a, input fp_t b);
    fp_t big, sml;
    int unsigned d;
    logic [25:0] mb, ms, sum;
    logic s;
    if (a.man == '0) return b;
    if (b.man == '0) return a;
    if ({a.exp, a.man} == {b.exp, b.man}) begin
      if (a.sign != b.sign) return FP_ZERO;
    end
    // larger magnitude first (exponent, then mantissa)
    if ($signed(a.exp) > $signed(b.exp) ||
        ($signed(a.exp) == $signed(b.exp) && a.man >= b.man)) begin
      big = a; sml = b;
    end else begin
      big = b; sml = a;
    end
    d  = unsigned'(int'($signed(big.exp)) - int'($signed(sml.exp)));
    mb = {3'b000, big.man};
    ms = (d > 25) ? 26'd0 : ({3'b000, sml.man} >> d);
    if (big.sign == sml.sign) sum = mb + ms;
    else                        sum = mb - ms;
    s = big.sign;
    return fp_pack(s, int'($signed(big.exp)), 64'(sum), 22);
  endfunction

  function automatic fp_t fp_neg(input fp_t a);
    fp_t r;
    r = a;
    if (a.man != '0) r.sign = ~a.sign;
    return r;
  endfunction

  // Floating-point multiplication: sign by XOR, exponents added, mantissas
  // multiplied (Q1.22 x Q1.22 = Q2.44), result normalised and truncated.
  function automatic fp_t fp_mul_f(input fp_t a, input fp_t b);
    logic [45:0] p;
    if (a.man == '0 || b.man == '0) return FP_ZERO;
    p = a.man * b.man;
    return fp_pack(a.sign ^ b.sign,
                   int'($signed(a.exp)) + int'($signed(b.exp)),
                   64'(p), 44);
  endfunction

  // Constant helper for elaboration-time literals: value = m / 2^22 * 2^e.
  function automatic fp_t fp_const(input logic s, input int signed e,
                                   input logic [22:0] m);
    fp_t r;
    r.sign = s; r.exp = EXP_W'(e); r.man = m;
    return r;
  endfunction

  // Elaboration-time conversion of a real constant (truncating). Only used
  // to build localparam constants; never evaluated by the hardware.
  function automatic fp_t fp_from_real(input real v);
    fp_t r;
    real a;
    int  e;
    if (v == 0.0) return FP_ZERO;
    a = (v < 0.0) ? -v : v;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    r.sign = (v < 0.0);
    r.exp  = EXP_W'(e);
    r.man  = MAN_W'($rtoi(a * 4194304.0));
    return r;
  endfunction

  // Micro-operation of the Taylor-series evaluators (fp_exp, fp_log1p):
  // one floating-point add or multiply between two of the working registers
  // or a register and a constant, written back to a working register.
  typedef enum logic [1:0] {R_X, R_T, R_A, R_B} fp_reg_e;
  typedef struct packed {
    logic    is_mul;   // 1: multiply, 0: add
    fp_reg_e src_a;
    fp_reg_e src_b;
    logic    use_k;    // second operand is the constant k instead of src_b
    fp_t     k;
    fp_reg_e dst;      // R_X is never written
  } uop_t;

  // ---------------- neural network ----------------
  localparam int unsigned ACT_W  = 16;  // activations after layer 1
  localparam int unsigned ACT_FR = 8;   // fraction bits of activations (Q8.8)
  localparam int unsigned NN_OUT = 5;   // mean x, mean y, scale 11, 21, 22

  // Saturate a wide signed value to 16 bits.
  function automatic logic signed [15:0] sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)  return 16'sh7fff;
    if (v < -64'sd32768) return 16'sh8000;
    return v[15:0];
  endfunction

endpackage

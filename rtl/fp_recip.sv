// fp_recip: floating-point reciprocal by Newton-Raphson iteration.
// Only the mantissa m (1 <= m < 2, Q1.22) is inverted; the exponent is
// negated and the sign kept. A look-up table indexed by the top SEED_BITS
// fraction bits of m gives the initial guess x0 ~ 1/m (0.5 < x0 <= 1), taken
// at the middle of each table interval: x0 = 2^(SEED_BITS+1) /
// (2^(SEED_BITS+1) + 2i + 1). Each clock performs one iteration
// x <- x * (2 - m * x) in unsigned fixed point with 24 fraction bits; the
// error falls quadratically, so NITER = 3 iterations reach the truncation
// floor of the 23-bit mantissa. The result is then normalised.
// Interface: start/d in; done pulses with y after NITER + 2 clocks. A new
// start is accepted whenever busy is low. A zero divisor gives the largest
// representable magnitude (this design's choice).
module fp_recip
  import lis_pkg::*;
#(
  parameter int unsigned NITER     = 3,
  parameter int unsigned SEED_BITS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fp_t  d,
  output logic busy,
  output logic done,
  output fp_t  y
);
  localparam int unsigned NSEED = 1 << SEED_BITS;

  function automatic logic [NSEED*25-1:0] seed_table();
    logic [NSEED*25-1:0] t;
    longint unsigned num, den;
    for (int i = 0; i < int'(NSEED); i++) begin
      num = longint'(1) << (SEED_BITS + 1 + 24);
      den = longint'((1 << (SEED_BITS + 1)) + 2 * i + 1);
      t[i*25 +: 25] = 25'(num / den);
    end
    return t;
  endfunction
  localparam logic [NSEED*25-1:0] SEED = seed_table();

  logic [22:0] m;        // divisor mantissa, Q1.22
  logic [24:0] x;        // current estimate, Q1.24 (value <= 1)
  logic        s;
  logic signed [EXP_W-1:0] e;
  logic [$clog2(NITER+2)-1:0] it;
  logic        zero_div;

  // one Newton-Raphson step
  logic [47:0] mx;
  logic [25:0] corr;     // 2 - m*x, Q2.24
  logic [50:0] xe;
  logic [24:0] x_next;
  always_comb begin
    mx     = (48'(m) * 48'(x)) >> 22;                 // Q.24
    corr   = 26'(27'd2 << 24) - 26'(mx);
    xe     = 51'(x) * 51'(corr);
    x_next = 25'(xe >> 24);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; y <= FP_ZERO;
      m <= '0; x <= '0; s <= 1'b0; e <= '0; it <= '0; zero_div <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          m        <= d.man;
          s        <= d.sign;
          e        <= d.exp;
          zero_div <= (d.man == '0);
          x        <= SEED[d.man[21 -: SEED_BITS]*25 +: 25];
          it       <= '0;
        end
      end else if (it < ($bits(it))'(NITER)) begin
        x  <= x_next;
        it <= it + 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        if (zero_div) y <= fp_const(s, EXP_MAX, '1);
        else          y <= fp_pack(s, -int'(e), 64'(x), 24);
      end
    end
  end
endmodule

// fp_mul: combinational floating-point multiplier for the 19-bit format of
// fp_pkg (sign, 10-bit fraction, 8-bit exponent with bias 127).
//
// It works in the four steps the architecture gives for the multiplier:
// the two 11-bit mantissas 1.f are multiplied by an unsigned multiplier;
// the 22-bit product, which lies in [1,4), is normalised by at most one
// place and rounded to an 11-bit mantissa; the exponent is the sum of the
// biased exponents, corrected by the normalisation and rounding, minus the
// bias 127; the sign is the XOR of the operand signs.
// Design choices where the architecture is silent: rounding is to nearest
// with ties away from zero; an operand with exponent 0 is zero and gives a
// zero product; a result exponent below 1 flushes to zero and one above 255
// saturates to the largest magnitude.
//
// Interface: a, b in, y out; purely combinational. The processor places a
// register after every multiplier, so one multiply takes one clock.
module fp_mul
  import fp_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t y
);

  logic [2*MANT_W-1:0] prod;      // 1.f * 1.f, in [1,4)
  logic [MANT_W-1:0]   mant;      // normalised, before rounding
  logic                rnd;       // first dropped bit
  logic [MANT_W:0]     mant_r;    // after rounding, may reach 2.0
  logic signed [EXP_W+2:0] exp_r;

  always_comb begin
    prod = {1'b1, a.f} * {1'b1, b.f};
    exp_r = $signed({3'b000, a.e}) + $signed({3'b000, b.e}) - (EXP_W+3)'(BIAS);
    if (prod[2*MANT_W-1]) begin
      mant  = prod[2*MANT_W-1 -: MANT_W];
      rnd   = prod[MANT_W-1];
      exp_r = exp_r + 1;
    end else begin
      mant  = prod[2*MANT_W-2 -: MANT_W];
      rnd   = prod[MANT_W-2];
    end
    mant_r = {1'b0, mant} + (MANT_W+1)'(rnd);
    if (mant_r[MANT_W]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_r + 1;
    end

    if (fp_is_zero(a) || fp_is_zero(b) || exp_r < 1)
      y = FP_ZERO;
    else if (exp_r > (1 << EXP_W) - 1)
      y = fp_max(a.s ^ b.s);
    else
      y = '{s: a.s ^ b.s, f: mant_r[FRAC_W-1:0], e: exp_r[EXP_W-1:0]};
  end

endmodule

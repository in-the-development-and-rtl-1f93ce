// fp_pkg: number format and shared constants of the image-moment processor.
//
// Every arithmetic value in the processor is a 19-bit floating-point word:
// one sign bit, a 10-bit fraction with a hidden leading 1, and an 8-bit
// exponent biased by 127, worth (-1)^s * 1.f * 2^(e-127). The field order
// sign | fraction | exponent follows the printed format; the bit positions
// (sign in bit 18, fraction in 17:8, exponent in 7:0) are this design's
// choice. The format has no zero, infinity or NaN codes of its own; this
// design reads exponent 0 as the value zero (the all-zero word is the
// canonical zero), uses exponent 255 as an ordinary exponent, saturates
// results that are too large to the largest finite magnitude and flushes
// results that are too small to zero. Rounding is to nearest, with ties away
// from zero.
package fp_pkg;

  localparam int FRAC_W = 10;              // fraction bits
  localparam int EXP_W  = 8;               // exponent bits
  localparam int MANT_W = FRAC_W + 1;      // mantissa with hidden bit
  localparam int FP_W   = 1 + FRAC_W + EXP_W;
  localparam int BIAS   = 127;

  typedef struct packed {
    logic              s;
    logic [FRAC_W-1:0] f;
    logic [EXP_W-1:0]  e;
  } fp_t;

  localparam fp_t FP_ZERO = '{s: 1'b0, f: '0, e: '0};
  localparam fp_t FP_ONE  = '{s: 1'b0, f: '0, e: EXP_W'(BIAS)};

  function automatic logic fp_is_zero(fp_t a);
    return a.e == '0;
  endfunction

  // Largest finite magnitude with the given sign, used when a result
  // overflows the exponent range.
  function automatic fp_t fp_max(logic s);
    return '{s: s, f: '1, e: '1};
  endfunction

endpackage

// int2fp: converts an unsigned integer to the 19-bit floating-point format
// of fp_pkg, combinationally.
//
// The counters and the gray-level pixels of the processor are integers,
// while its multipliers take floating-point operands, so each integer is
// converted on its way in. The leading one is found, the value is shifted so
// that it becomes the hidden bit, the exponent is 127 plus its position, and
// values wider than 11 significant bits are rounded to nearest with ties
// away from zero. The value 0 gives the zero word (exponent 0). The block
// diagrams draw the counters straight into the multipliers and show no
// converter; this unit is this design's own.
module int2fp
  import fp_pkg::*;
#(
  parameter int W = 10                      // width of the integer
) (
  input  logic [W-1:0] v,
  output fp_t          y
);

  localparam int XW = (W > MANT_W ? W : MANT_W) + 1;

  always_comb begin
    logic [XW-1:0]   x;
    logic [MANT_W:0] mant_r;
    int              lead;
    int              e;

    lead = -1;
    for (int i = 0; i < W; i++)
      if (v[i]) lead = i;

    // place the leading one at bit XW-1, then take MANT_W bits and a round bit
    x = '0;
    if (lead >= 0) x = XW'(v) << (XW - 1 - lead);
    mant_r = {1'b0, x[XW-1 -: MANT_W]} + (MANT_W+1)'(x[XW-1-MANT_W]);
    e = BIAS + lead;
    if (mant_r[MANT_W]) begin
      mant_r = mant_r >> 1;
      e      = e + 1;
    end

    if (lead < 0) y = FP_ZERO;
    else          y = '{s: 1'b0, f: mant_r[FRAC_W-1:0], e: EXP_W'(e)};
  end

endmodule

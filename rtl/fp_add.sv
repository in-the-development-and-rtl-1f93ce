// fp_add: floating-point adder/subtractor for the 19-bit format of fp_pkg,
// with a registered output and an optional register in the middle.
//
// It follows the five steps of the architecture's adder: the exponents are
// compared and the operands swapped so that the first has the larger
// magnitude, and the result exponent is taken to be its exponent; the
// smaller mantissa is shifted right by the exponent difference (the
// "denormalisation"); the two mantissas are added or subtracted according to
// the signs; the result is normalised, rounded and its exponent adjusted; the
// sign is that of the larger operand. The shifted mantissa keeps a guard and
// a round bit and a sticky bit that ORs in every bit shifted out, so the
// result is the exact sum rounded once.
// Design choices where the architecture is silent: rounding is to nearest
// with ties away from zero; exponent 0 means zero; a zero sum is returned as
// the all-zero word; overflow saturates, underflow flushes to zero.
//
// SPLIT = 1 is the two-stage adder of the FPGA and ASIC processors: steps
// i-iii before the middle register, normalisation and rounding after it, so
// the latency is 2 clocks. SPLIT = 0 is the single-step adder of the serial
// processor, latency 1 clock. A new operand pair is accepted every clock.
module fp_add
  import fp_pkg::*;
#(
  parameter bit SPLIT = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  fp_t  a,
  input  fp_t  b,
  output fp_t  y
);

  localparam int XW = MANT_W + 3;          // mantissa plus guard, round, sticky

  typedef struct packed {
    logic             s;                   // sign of the larger operand
    logic [EXP_W-1:0] e;                   // exponent of the larger operand
    logic [XW:0]      sum;                 // aligned sum, one carry bit
  } mid_t;

  mid_t mid_d, mid_q;
  fp_t  res;

  // Steps i-iii: compare and swap, align, add or subtract.
  always_comb begin
    logic [MANT_W-1:0] ma, mb, m_big, m_sml;
    logic [EXP_W-1:0]  e_big, e_sml, d;
    logic              s_big, s_sml, a_big;
    logic [XW-1:0]     x_big, x_sml;
    logic [2*XW-1:0]   wide;
    logic              sticky;

    ma = fp_is_zero(a) ? '0 : {1'b1, a.f};
    mb = fp_is_zero(b) ? '0 : {1'b1, b.f};
    a_big = (a.e > b.e) || (a.e == b.e && ma >= mb);
    {s_big, e_big, m_big} = a_big ? {a.s, a.e, ma} : {b.s, b.e, mb};
    {s_sml, e_sml, m_sml} = a_big ? {b.s, b.e, mb} : {a.s, a.e, ma};
    d = e_big - e_sml;

    x_big = {m_big, 3'b000};
    wide  = '0;
    if (d >= EXP_W'(XW)) begin
      x_sml  = '0;
      sticky = |m_sml;
    end else begin
      wide   = {m_sml, 3'b000, {XW{1'b0}}} >> d;
      x_sml  = wide[2*XW-1 -: XW];
      sticky = |wide[XW-1:0];
    end
    x_sml[0] = x_sml[0] | sticky;

    mid_d.s = s_big;
    mid_d.e = e_big;
    if (s_big ^ s_sml) mid_d.sum = {1'b0, x_big} - {1'b0, x_sml};
    else               mid_d.sum = {1'b0, x_big} + {1'b0, x_sml};
  end

  // Step iv: normalise, round, adjust the exponent.
  always_comb begin
    logic [XW:0]             norm;
    logic [MANT_W:0]         mant_r;
    logic signed [EXP_W+1:0] exp_r;
    int                      lead;

    lead = -1;
    for (int i = 0; i <= XW; i++)
      if (mid_q.sum[i]) lead = i;

    exp_r = $signed({2'b00, mid_q.e});
    if (lead == XW) begin
      norm  = mid_q.sum >> 1;
      exp_r = exp_r + 1;
    end else if (lead >= 0) begin
      norm  = mid_q.sum << (XW - 1 - lead);
      exp_r = exp_r - (EXP_W+2)'(XW - 1 - lead);
    end else begin
      norm  = '0;
    end
    // norm[XW-1] is the hidden bit, norm[2] the first dropped bit
    mant_r = {1'b0, norm[XW-1:3]} + (MANT_W+1)'(norm[2]);
    if (mant_r[MANT_W]) begin
      mant_r = mant_r >> 1;
      exp_r  = exp_r + 1;
    end

    if (lead < 0 || exp_r < 1)
      res = FP_ZERO;
    else if (exp_r > (1 << EXP_W) - 1)
      res = fp_max(mid_q.s);
    else
      res = '{s: mid_q.s, f: mant_r[FRAC_W-1:0], e: exp_r[EXP_W-1:0]};
  end

  if (SPLIT) begin : g_split
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) mid_q <= '0;
      else        mid_q <= mid_d;
  end else begin : g_single
    assign mid_q = mid_d;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) y <= FP_ZERO;
    else        y <= res;

endmodule

// power_stage: one stage (processing element) of the power core, the
// module B of the processor.
//
// The power core raises its input to an exponent m = sum b_i 2^i one bit at
// a time: stage i holds the power x^(2^i) and multiplies it into the running
// product when b_i is 1, and passes 1 on (leaves the product unchanged) when
// b_i is 0. Two multipliers do this, as in the architecture's PE: the lower
// one forms the power (stage 0 multiplies its input by 1, every later stage
// squares the power it receives), and the upper one multiplies the product
// by the power or by 1, chosen by a 2:1 multiplexer driven by the exponent
// bit. A second multiplexer picks that bit from m or from n according to the
// sel_m flag of the control word, so one core serves both the x^m and the y^n
// powers.
//
// Timing: one clock per stage and one sample per clock. The power and the
// control word enter together; the product of the same sample enters one
// clock later, because the multiplexer output is registered before the upper
// multiplier. Both leave one clock after they entered, with the same skew.
// The register placement follows the processor's block diagram.
// In every stage but the first, pow_out is a square, so its sign bit is
// always 0 and synthesis sees it as a constant.
module power_stage
  import fp_pkg::*;
  import moment_pkg::*;
#(
  parameter bit FIRST = 1'b0               // 1: stage 0, multiplies by 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bm,                         // bit i of m
  input  logic bn,                         // bit i of n
  input  ctl_t ctl_in,
  input  fp_t  pow_in,                     // x^(2^(i-1)), or x in stage 0
  input  fp_t  prod_in,                    // product so far, one clock behind pow_in
  output ctl_t ctl_out,
  output fp_t  pow_out,                    // x^(2^i)
  output fp_t  prod_out                    // product times x^(b_i 2^i)
);

  fp_t pw;                                 // lower multiplier
  fp_t fac_q;                              // registered multiplexer output
  fp_t pr;                                 // upper multiplier
  logic bit_sel;

  fp_mul u_pow  (.a(pow_in),  .b(FIRST ? FP_ONE : pow_in), .y(pw));
  fp_mul u_prod (.a(prod_in), .b(fac_q),                   .y(pr));

  assign bit_sel = ctl_in.sel_m ? bm : bn;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctl_out  <= CTL_IDLE;
      pow_out  <= FP_ZERO;
      fac_q    <= FP_ONE;
      prod_out <= FP_ZERO;
    end else begin
      ctl_out  <= ctl_in;
      pow_out  <= pw;
      fac_q    <= bit_sel ? pw : FP_ONE;
      prod_out <= pr;
    end

endmodule

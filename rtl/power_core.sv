// power_core: k-stage systolic pipeline that raises a stream of operands to
// the power m (or n), one result per clock, whatever the exponent.
//
// The exponent is split into its binary digits, m = sum_{i<k} b_i 2^i, so
// x^m = prod_i x^(b_i 2^i). Stage i (power_stage) forms x^(2^i) by squaring
// and multiplies it into the product when b_i is set: 2k multipliers and k
// clocks instead of m sequential multiplications. Feeding the sequence
// 1, 2, ..., N with product input 1 yields 1^m, 2^m, ..., N^m.
// In the processor the product input carries the pixel value, so at the
// output the core delivers y^n * f(x,y) for column samples and x^m * 1 for
// the line sample; sel_m in the control word selects the bits of m or n
// for each sample.
//
// Interface and timing: ctl_in and pow_in in one clock, prod_in of the same
// sample one clock later; ctl_out and pow_out leave K clocks after they
// entered and prod_out one clock after them. The exponents m and n are K
// bits wide, so orders up to 2^K - 1 in each coordinate are reachable. The
// default K = 3 is the configuration built for orders m, n <= 7.
module power_core
  import fp_pkg::*;
  import moment_pkg::*;
#(
  parameter int K = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] m,
  input  logic [K-1:0] n,
  input  ctl_t         ctl_in,
  input  fp_t          pow_in,
  input  fp_t          prod_in,
  output ctl_t         ctl_out,
  output fp_t          pow_out,
  output fp_t          prod_out
);

  ctl_t ctl  [K+1];
  fp_t  pow  [K+1];
  fp_t  prod [K+1];

  assign ctl[0]  = ctl_in;
  assign pow[0]  = pow_in;
  assign prod[0] = prod_in;

  for (genvar i = 0; i < K; i++) begin : g_stage
    power_stage #(.FIRST(i == 0)) u_stage (
      .clk     (clk),
      .rst_n   (rst_n),
      .bm      (m[i]),
      .bn      (n[i]),
      .ctl_in  (ctl[i]),
      .pow_in  (pow[i]),
      .prod_in (prod[i]),
      .ctl_out (ctl[i+1]),
      .pow_out (pow[i+1]),
      .prod_out(prod[i+1])
    );
  end

  assign ctl_out  = ctl[K];
  assign pow_out  = pow[K];
  assign prod_out = prod[K];

endmodule

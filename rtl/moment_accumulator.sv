// moment_accumulator: module A'' of the processor. It turns the stream of
// y^n f(x,y) values from the power core into the moment
// M_mn = sum_x x^m sum_y y^n f(x,y).
//
// The power core delivers, for every line x, first x^m (the sample taken at
// y = 0) and then y^n f(x,y) for y = 1..M. A register keeps x^m for the line
// when the control word's select flag marks it; a multiplier forms
// x^m y^n f(x,y) for the following samples and a pipeline register follows
// it. A multiplexer puts 0 in place of the product for the x^m sample, and
// the floating-point adder accumulates the rest.
//
// With SPLIT = 1 (the default, the processor as built in FPGA and ASIC) the
// adder has a register in the middle, so a sum takes two clocks. The
// feedback then holds two independent partial sums, one for the even and one
// for the odd samples, each updated every other clock. After the last sample
// one more clock adds 0 to the partial sum that is one step behind, and the
// next adds the two partial sums (one of them through the extra register on
// the feedback), giving the moment. Two multiplexers at the adder inputs do
// this: one chooses the product or the delayed partial sum, the other the
// feedback or 0 (0 for the first sample of each partial sum, which clears
// it). With SPLIT = 0 the adder takes one clock and there is a single
// running sum.
//
// Interface and timing: ctl_in with its flags valid, sel_m, first, last, and
// prod_in of the same sample one clock later (the skew of the power core).
// done pulses for one clock, 2 clocks (SPLIT = 0) or 5 clocks (SPLIT = 1)
// after the last product leaves the pipeline register, and moment holds the
// result from then until the next image ends. The structure follows the
// processor's block diagram; the clear and finish sequencing, and the
// result register, are this design's own.
module moment_accumulator
  import fp_pkg::*;
  import moment_pkg::*;
#(
  parameter bit SPLIT = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  ctl_t ctl_in,
  input  fp_t  prod_in,
  output logic done,
  output fp_t  moment
);

  localparam int ADD_LAT = SPLIT ? 2 : 1;

  ctl_t ctl_d, ctl_p;
  fp_t  xm_q;                              // x^m of the current line
  fp_t  pm, pm_q;                          // x^m y^n f(x,y)
  fp_t  addend, add_a, add_b, acc, acc_dly;
  logic clear, first_d, drain, combine, fin;
  logic [ADD_LAT-1:0] fin_sr;

  fp_mul u_mul (.a(prod_in), .b(xm_q), .y(pm));

  fp_add #(.SPLIT(SPLIT)) u_add (
    .clk(clk), .rst_n(rst_n), .a(add_a), .b(add_b), .y(acc)
  );

  assign addend = (ctl_p.valid && !ctl_p.sel_m) ? pm_q : FP_ZERO;
  assign clear  = (ctl_p.valid && ctl_p.first) || (SPLIT && first_d);
  assign add_a  = (SPLIT && combine) ? acc_dly : addend;
  assign add_b  = clear ? FP_ZERO : acc;
  assign fin    = SPLIT ? combine : (ctl_p.valid && ctl_p.last);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctl_d   <= CTL_IDLE;
      ctl_p   <= CTL_IDLE;
      xm_q    <= FP_ZERO;
      pm_q    <= FP_ZERO;
      acc_dly <= FP_ZERO;
      first_d <= 1'b0;
      drain   <= 1'b0;
      combine <= 1'b0;
      fin_sr  <= '0;
      done    <= 1'b0;
      moment  <= FP_ZERO;
    end else begin
      ctl_d   <= ctl_in;
      ctl_p   <= ctl_d;
      if (ctl_d.valid && ctl_d.sel_m) xm_q <= prod_in;
      pm_q    <= pm;
      acc_dly <= acc;
      first_d <= ctl_p.valid && ctl_p.first;
      drain   <= ctl_p.valid && ctl_p.last;
      combine <= drain;
      fin_sr  <= ADD_LAT'({fin_sr, fin});
      done    <= fin_sr[ADD_LAT-1];
      if (fin_sr[ADD_LAT-1]) moment <= acc;
    end

  // an image opens with a line sample, which carries x^m
  a_first_is_line: assert property (@(posedge clk) disable iff (!rst_n)
    ctl_in.valid && ctl_in.first |-> ctl_in.sel_m);
  // the result of one image is out before the next image reaches the adder
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (drain || combine) |-> !ctl_p.valid);

endmodule

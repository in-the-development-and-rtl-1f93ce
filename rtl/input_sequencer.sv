// input_sequencer: module A' of the processor. It scans the image and feeds
// the power core with one sample per clock.
//
// Two counters run over the image: x over the lines 1..N and y over
// 0..M within a line, so every line takes M+1 clocks. When y is 0 (the
// counter's "zero" condition) the sample is the line index x with data 1 and
// the select line set to m: the core then produces x^m, which the
// accumulator keeps for the line. For y = 1..M the sample is the column
// index y with the pixel f(x,y) as data and the select set to n: the core
// produces y^n * f(x,y). Both counter values and the 8-bit gray-level pixel
// are converted to floating point (int2fp) before the registers.
//
// Interface: a start pulse while idle begins an image; busy is high while
// samples are issued. pix_rd is high in each clock in which the pixel f(x,y)
// on pix is taken, in raster order (x outer, y inner); the source must
// present it in that clock, since the processor does not stall. There is no
// pixel read in the y = 0 clock.
// Timing: ctl_out and pow_out are registered once after the multiplexers,
// prod_out twice, so prod_out trails them by one clock as the power core
// expects. This register placement follows the block diagram; the start and
// pixel handshake and the frame flags are this design's own. The counters
// are unsigned, so the sign bit of pow_out is always 0.
module input_sequencer
  import fp_pkg::*;
  import moment_pkg::*;
#(
  parameter int N     = 512,               // image lines
  parameter int M     = 512,               // image columns
  parameter int PIX_W = 8                  // gray-level bits
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [PIX_W-1:0] pix,
  output logic             pix_rd,
  output logic             busy,
  output ctl_t             ctl_out,
  output fp_t              pow_out,
  output fp_t              prod_out
);

  localparam int XW = $clog2(N + 1);
  localparam int YW = $clog2(M + 1);
  localparam int CW = XW > YW ? XW : YW;

  logic [XW-1:0] cnt_x;
  logic [YW-1:0] cnt_y;
  logic          run;
  logic          y_zero;
  logic [CW-1:0] idx;
  fp_t           idx_fp, pix_fp, dat_fp, dat_q;
  ctl_t          ctl;

  assign y_zero = cnt_y == '0;
  assign pix_rd = run && !y_zero;
  assign busy   = run;
  assign idx    = y_zero ? CW'(cnt_x) : CW'(cnt_y);

  int2fp #(.W(CW))    u_idx (.v(idx), .y(idx_fp));
  int2fp #(.W(PIX_W)) u_pix (.v(pix), .y(pix_fp));

  assign dat_fp = y_zero ? FP_ONE : pix_fp;

  always_comb begin
    ctl.valid = run;
    ctl.sel_m = y_zero;
    ctl.first = cnt_x == XW'(1) && y_zero;
    ctl.last  = cnt_x == XW'(N) && cnt_y == YW'(M);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      run   <= 1'b0;
      cnt_x <= XW'(1);
      cnt_y <= '0;
    end else if (!run) begin
      if (start) begin
        run   <= 1'b1;
        cnt_x <= XW'(1);
        cnt_y <= '0;
      end
    end else if (cnt_y == YW'(M)) begin
      cnt_y <= '0;
      if (cnt_x == XW'(N)) run <= 1'b0;
      else                 cnt_x <= cnt_x + 1'b1;
    end else begin
      cnt_y <= cnt_y + 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ctl_out  <= CTL_IDLE;
      pow_out  <= FP_ZERO;
      dat_q    <= FP_ZERO;
      prod_out <= FP_ZERO;
    end else begin
      ctl_out  <= run ? ctl : CTL_IDLE;
      pow_out  <= idx_fp;
      dat_q    <= dat_fp;
      prod_out <= dat_q;
    end

  // pixels are read only while an image is scanned, and never in a line clock
  a_pix_rd_in_scan: assert property (@(posedge clk) disable iff (!rst_n)
    pix_rd |-> busy && cnt_y != '0);

endmodule

// moment_processor: serial systolic processor for one 2-D image moment
//   M_mn = sum_{x=1..N} sum_{y=1..M} x^m y^n f(x,y)
// of an N x M gray-level image, in real time and in a number of clocks that
// does not depend on the order m + n.
//
// The moment is the product X F Y of the vector of powers x^m, the image
// and the vector of powers y^n. Projected onto a single processing element
// it becomes a stream: for every line x, the input sequencer (module A')
// issues x once and then y = 1..M with the pixels; a single k-stage power
// core (modules B) raises each of them to m or n and multiplies in the
// pixel; the accumulator (module A'') keeps x^m for the line, multiplies it
// with each y^n f(x,y) and sums. All arithmetic is 19-bit floating point
// (fp_pkg). The exponents are K-bit values, so with the default K = 3 any
// order with m, n <= 7 (p = m + n <= 14) is computed, using 2K + 1
// multipliers and one adder.
//
// Interface: m_order and n_order are loaded into the order registers by a
// start pulse while busy is low or done is high. The image is then read in raster order
// through pix/pix_rd (one pixel in each clock where pix_rd is high, M of
// every M+1 clocks). done pulses when moment holds the result; busy stays
// high from start to done and further start pulses are ignored meanwhile.
// Timing: the image takes N(M+1) clocks. With the two-stage adder
// (SPLIT_ADDER = 1, the default) done rises N(M+1) + K + 9 clocks after the
// clock edge that takes start, with SPLIT_ADDER = 0 it rises N(M+1) + K + 6
// clocks after it. The datapath follows the processor's block diagram;
// the start/done/busy framing, the pixel interface and the integer to
// floating-point conversion are this design's own.
module moment_processor
  import fp_pkg::*;
  import moment_pkg::*;
#(
  parameter int N           = 512,
  parameter int M           = 512,
  parameter int K           = 3,
  parameter int PIX_W       = 8,
  parameter bit SPLIT_ADDER = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [K-1:0]     m_order,
  input  logic [K-1:0]     n_order,
  input  logic [PIX_W-1:0] pix,
  output logic             pix_rd,
  output logic             busy,
  output logic             done,
  output fp_t              moment
);

  logic [K-1:0] m_q, n_q;
  logic         seq_start, seq_busy;
  ctl_t         seq_ctl, core_ctl;
  fp_t          seq_pow, seq_prod, core_pow, core_prod;

  // a new image may start in the clock in which the previous one is done
  assign seq_start = start && (!busy || done);

  // order registers and the busy flag
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      m_q  <= '0;
      n_q  <= '0;
      busy <= 1'b0;
    end else begin
      if (seq_start) begin
        m_q  <= m_order;
        n_q  <= n_order;
        busy <= 1'b1;
      end else if (done) begin
        busy <= 1'b0;
      end
    end

  input_sequencer #(.N(N), .M(M), .PIX_W(PIX_W)) u_seq (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (seq_start),
    .pix     (pix),
    .pix_rd  (pix_rd),
    .busy    (seq_busy),
    .ctl_out (seq_ctl),
    .pow_out (seq_pow),
    .prod_out(seq_prod)
  );

  power_core #(.K(K)) u_core (
    .clk     (clk),
    .rst_n   (rst_n),
    .m       (m_q),
    .n       (n_q),
    .ctl_in  (seq_ctl),
    .pow_in  (seq_pow),
    .prod_in (seq_prod),
    .ctl_out (core_ctl),
    .pow_out (core_pow),
    .prod_out(core_prod)
  );

  moment_accumulator #(.SPLIT(SPLIT_ADDER)) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .ctl_in (core_ctl),
    .prod_in(core_prod),
    .done   (done),
    .moment (moment)
  );

  // The highest power x^(2^(K-1)) leaves the last stage unused, as in the
  // block diagram, where it ends in an open arrow.
  fp_t unused_pow;
  assign unused_pow = core_pow;

  // the scan and the result stay inside the busy window
  a_scan_in_busy: assert property (@(posedge clk) disable iff (!rst_n)
    seq_busy |-> busy);
  a_done_in_busy: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> busy);

endmodule

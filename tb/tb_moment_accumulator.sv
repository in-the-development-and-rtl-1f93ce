// tb_moment_accumulator: feeds the accumulator, in both forms (two-stage
// adder with odd/even partial sums, and single-stage adder), with the
// stream the power core would deliver: per line one x^m word followed by
// y^n f(x,y) words, random values, product one clock behind the control
// word. Images of several sizes (odd and even sample counts, one line of
// one column) are sent with gaps between them. Checks the moment bit for bit
// against a reference that keeps the same partial sums in the reference
// arithmetic, checks it loosely against the exact sum, and checks that done
// comes the documented number of clocks after the last sample.
module tb_moment_accumulator;
  import fp_pkg::*;
  import moment_pkg::*;
  import fpref_pkg::*;

  logic clk = 0, rst_n = 1;

  // a falling edge on rst_n, so that the asynchronous reset takes effect
  initial #1 rst_n = 0;
  ctl_t ctl_in;
  fp_t  prod_in, mom2, mom1;
  logic done2, done1;
  int   checks = 0, failures = 0;

  moment_accumulator #(.SPLIT(1'b1)) dut2 (.clk(clk), .rst_n(rst_n), .ctl_in(ctl_in),
    .prod_in(prod_in), .done(done2), .moment(mom2));
  moment_accumulator #(.SPLIT(1'b0)) dut1 (.clk(clk), .rst_n(rst_n), .ctl_in(ctl_in),
    .prod_in(prod_in), .done(done1), .moment(mom1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string tag, longint got, longint expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", tag, got, expect_v);
    end
  endtask

  task automatic run_image(int nl, int mc);
    int    nt;
    word_t w [$];
    logic  is_x [$];
    word_t chain [2], single, xm, expect2, expect1;
    real   exact;
    logic  any_neg;
    int    t_done2, t_done1;
    nt = nl * (mc + 1);
    chain = '{default: '0};
    single = '0;
    exact = 0.0;
    any_neg = 1'b0;
    for (int j = 0; j < nt; j++) begin
      word_t v, addend;
      v = rand_word(110, 140);
      v[18] = ($urandom_range(7) == 0);
      if (v[18]) any_neg = 1'b1;
      w.push_back(v);
      is_x.push_back(j % (mc + 1) == 0);
      if (j % (mc + 1) == 0) begin
        xm = v;
        addend = '0;
      end else begin
        addend = ref_mul(v, xm);
        exact += to_real(v) * to_real(xm);
      end
      chain[j % 2] = (j < 2) ? ref_add(addend, 19'h0) : ref_add(addend, chain[j % 2]);
      single       = (j < 1) ? ref_add(addend, 19'h0) : ref_add(addend, single);
    end
    expect2 = (nt == 1) ? chain[0] : ref_add(chain[(nt - 2) % 2], chain[(nt - 1) % 2]);
    expect1 = single;

    t_done2 = -1; t_done1 = -1;
    for (int c = 0; c < nt + 12; c++) begin
      @(negedge clk);
      if (c < nt) begin
        ctl_in.valid = 1'b1;
        ctl_in.sel_m = is_x[c];
        ctl_in.first = c == 0;
        ctl_in.last  = c == nt - 1;
      end else begin
        ctl_in = CTL_IDLE;
      end
      prod_in = (c > 0 && c <= nt) ? fp_t'(w[c-1]) : fp_t'(rand_word(1, 255));
      @(posedge clk);
      #1;
      if (done2) begin
        t_done2 = c;
        chk("moment two-stage", mom2, expect2);
      end
      if (done1) begin
        t_done1 = c;
        chk("moment single-stage", mom1, expect1);
      end
    end
    // last control word taken at the edge of c = nt-1
    chk("done latency two-stage", t_done2 - (nt - 1), 6);
    chk("done latency single-stage", t_done1 - (nt - 1), 3);
    // loose check against the exact sum, only where no cancellation can occur
    checks++;
    if (!any_neg && exact != 0.0 && ((to_real(mom2) - exact) / exact > 0.02 || (to_real(mom2) - exact) / exact < -0.02)) begin
      failures++;
      $display("FAIL moment %g far from exact %g", to_real(mom2), exact);
    end
  endtask

  initial begin
    ctl_in = CTL_IDLE; prod_in = FP_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_image(1, 1);
    run_image(2, 3);
    run_image(3, 3);
    run_image(4, 6);
    run_image(7, 8);
    run_image(16, 16);
    for (int i = 0; i < 8; i++) run_image(1 + $urandom_range(9), 1 + $urandom_range(9));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_moment_processor: end-to-end test of the moment processor on small
// images. Three processors run: the default arrangement (two-stage adder,
// K = 3) and the single-stage-adder arrangement, both on a 6 x 5 image for
// every order pair m, n in 0..7, and a K = 4 processor on a 5 x 4 image for
// orders up to 15 in each coordinate. Each gets its own random image
// through the pixel handshake. The moment is checked bit for bit against a
// model of the same sequence of floating-point operations, loosely (2 %)
// against the exact integer moment, and the clock count from start to done
// against N(M+1) + K + 7 (two-stage adder) or N(M+1) + K + 4 (single-stage).
// It also counts, from the ports and results, the mechanisms of the design
// and fails if one never occurred: line clocks (x^m through the core) and
// column clocks (y^n f through the core), images in which the held x^m
// mattered, images in which the odd/even partial sums of the two-stage
// adder give a different, correctly modelled result than a single running
// sum, and a start pulse ignored while busy.
module tb_moment_processor;
  import fp_pkg::*;
  import fpref_pkg::*;

  localparam int NA = 6, MA = 5;           // image of the K = 3 processors
  localparam int NC = 5, MC = 4;           // image of the K = 4 processor

  logic clk = 0, rst_n = 1;

  // a falling edge on rst_n, so that the asynchronous reset takes effect
  initial #1 rst_n = 0;
  logic start_a = 0, start_c = 0;
  logic [2:0] m_a, n_a;
  logic [3:0] m_c, n_c;
  logic [7:0] pix_a, pix_b, pix_c;
  logic rd_a, rd_b, rd_c, busy_a, busy_b, busy_c, done_a, done_b, done_c;
  fp_t  mom_a, mom_b, mom_c;
  int   checks = 0, failures = 0;

  logic [7:0] img_a [NA*MA];
  logic [7:0] img_c [NC*MC];
  int rc_a = 0, rc_b = 0, rc_c = 0;        // pixel reads in this image
  int cyc = 0;

  // mechanism counters
  int n_xsel = 0, n_ysel = 0, n_xm_load = 0, n_combine = 0, n_ignored = 0;

  moment_processor #(.N(NA), .M(MA), .K(3), .SPLIT_ADDER(1'b1)) dut_a (
    .clk(clk), .rst_n(rst_n), .start(start_a), .m_order(m_a), .n_order(n_a),
    .pix(pix_a), .pix_rd(rd_a), .busy(busy_a), .done(done_a), .moment(mom_a));
  moment_processor #(.N(NA), .M(MA), .K(3), .SPLIT_ADDER(1'b0)) dut_b (
    .clk(clk), .rst_n(rst_n), .start(start_a), .m_order(m_a), .n_order(n_a),
    .pix(pix_b), .pix_rd(rd_b), .busy(busy_b), .done(done_b), .moment(mom_b));
  moment_processor #(.N(NC), .M(MC), .K(4), .SPLIT_ADDER(1'b1)) dut_c (
    .clk(clk), .rst_n(rst_n), .start(start_c), .m_order(m_c), .n_order(n_c),
    .pix(pix_c), .pix_rd(rd_c), .busy(busy_c), .done(done_c), .moment(mom_c));

  always #5 clk = ~clk;

  assign pix_a = img_a[rc_a % (NA*MA)];
  assign pix_b = img_a[rc_b % (NA*MA)];
  assign pix_c = img_c[rc_c % (NC*MC)];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd_a) rc_a <= rc_a + 1;
    if (rd_b) rc_b <= rc_b + 1;
    if (rd_c) rc_c <= rc_c + 1;
    // line clocks (no pixel read while scanning) and column clocks
    if (busy_a && !done_a) begin
      if (rd_a) n_ysel++; else n_xsel++;
    end
    if (start_a && busy_a) n_ignored++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string tag, longint got, longint expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %h expected %h", tag, got, expect_v);
    end
  endtask

  // power by the binary-exponent method of a K-stage core
  function automatic word_t ref_pow(word_t d, int v, int e, int k);
    word_t p, r;
    p = from_int(v);
    r = d;
    for (int st = 0; st < k; st++) begin
      if (st > 0) p = ref_mul(p, p);
      if (e[st]) r = ref_mul(r, p);
    end
    return r;
  endfunction

  // model of the processor's operation sequence
  function automatic word_t ref_moment(int n_img, int m_img, int k, int m, int n,
                                       logic [7:0] img [], bit split, output real exact);
    word_t chain [2], single, xm, addend;
    int    j;
    chain = '{default: '0};
    single = '0;
    exact = 0.0;
    j = 0;
    for (int x = 1; x <= n_img; x++)
      for (int y = 0; y <= m_img; y++) begin
        if (y == 0) begin
          xm = ref_pow(from_int(1), x, m, k);
          addend = '0;
        end else begin
          int f;
          f = int'(img[(x - 1) * m_img + y - 1]);
          addend = ref_mul(ref_pow(from_int(f), y, n, k), xm);
          exact += (real'(x) ** m) * (real'(y) ** n) * real'(f);
        end
        chain[j % 2] = (j < 2) ? addend : ref_add(addend, chain[j % 2]);
        single       = (j < 1) ? addend : ref_add(addend, single);
        j++;
      end
    return split ? ref_add(chain[j % 2], chain[(j - 1) % 2]) : single;
  endfunction

  task automatic loose(string tag, fp_t got, real exact);
    checks++;
    if (exact > 0.0 && ((to_real(got) - exact) / exact > 0.02 || (to_real(got) - exact) / exact < -0.02)) begin
      failures++;
      $display("FAIL %s: %g far from exact %g", tag, to_real(got), exact);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // K = 3 processors, all orders m, n <= 7
    for (int m = 0; m < 8; m++)
      for (int n = 0; n < 8; n++) begin
        int t0, ta, tb_;
        word_t ea, eb;
        real   exa, exb;
        for (int i = 0; i < NA*MA; i++) img_a[i] = 8'($urandom);
        @(negedge clk);
        rc_a = 0; rc_b = 0;
        m_a = 3'(m); n_a = 3'(n);
        start_a = 1;
        @(posedge clk);
        #1 t0 = cyc;                          // the edge that takes start
        @(negedge clk);
        start_a = (m == 3 && n == 3);        // a start while busy, must be ignored
        m_a = 3'($urandom); n_a = 3'($urandom);
        @(negedge clk) start_a = 0;
        ta = -1; tb_ = -1;
        while (ta < 0 || tb_ < 0) begin
          @(posedge clk);
          #1;
          if (done_a) ta = cyc;
          if (done_b) tb_ = cyc;
        end
        ea = ref_moment(NA, MA, 3, m, n, img_a, 1'b1, exa);
        eb = ref_moment(NA, MA, 3, m, n, img_a, 1'b0, exb);
        chk($sformatf("moment m=%0d n=%0d two-stage", m, n), mom_a, ea);
        chk($sformatf("moment m=%0d n=%0d one-stage", m, n), mom_b, eb);
        loose("two-stage vs exact", mom_a, exa);
        loose("one-stage vs exact", mom_b, exb);
        chk("clocks two-stage", ta - t0, NA * (MA + 1) + 3 + 7);
        chk("clocks one-stage", tb_ - t0, NA * (MA + 1) + 3 + 4);
        chk("pixel reads", rc_a, NA * MA);
        // x^m held for the line mattered when m > 0 and the moment is right
        if (m > 0 && mom_a == ea) n_xm_load++;
        // the odd/even partial sums mattered when their combination differs
        // from a single running sum and the two-stage moment is right
        if (ea != eb && mom_a == ea) n_combine++;
        @(posedge clk);
      end
    // K = 4 processor, orders up to 15
    foreach (img_c[i]) img_c[i] = 8'($urandom);
    for (int i = 0; i < 12; i++) begin
      int m, n, t0, tc;
      word_t ec;
      real   exc;
      m = (i == 0) ? 15 : (i == 1) ? 0 : $urandom_range(15);
      n = (i == 0) ? 15 : (i == 1) ? 8 : $urandom_range(15);
      @(negedge clk);
      rc_c = 0;
      m_c = 4'(m); n_c = 4'(n);
      start_c = 1;
      @(posedge clk);
      #1 t0 = cyc;
      @(negedge clk) start_c = 0;
      tc = -1;
      while (tc < 0) begin
        @(posedge clk);
        #1;
        if (done_c) tc = cyc;
      end
      ec = ref_moment(NC, MC, 4, m, n, img_c, 1'b1, exc);
      chk($sformatf("K=4 moment m=%0d n=%0d", m, n), mom_c, ec);
      loose("K=4 vs exact", mom_c, exc);
      chk("clocks K=4", tc - t0, NC * (MC + 1) + 4 + 7);
    end
    $display("mechanisms: line clocks %0d, column clocks %0d, x^m images %0d, partial-sum images %0d, starts ignored %0d",
             n_xsel, n_ysel, n_xm_load, n_combine, n_ignored);
    checks += 5;
    if (n_xsel == 0)    begin failures++; $display("FAIL no x^m sample"); end
    if (n_ysel == 0)    begin failures++; $display("FAIL no y^n sample"); end
    if (n_xm_load == 0) begin failures++; $display("FAIL no image exercised the x^m register"); end
    if (n_combine == 0) begin failures++; $display("FAIL no image exercised the partial-sum combination"); end
    if (n_ignored == 0) begin failures++; $display("FAIL no start ignored while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

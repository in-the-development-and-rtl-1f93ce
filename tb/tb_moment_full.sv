// tb_moment_full: one complete image at the processor's default size: a
// 512 x 512 gray-level image, K = 3, two-stage adder. The image is generated
// from a hash of the pixel position. The moment M_3,2 is computed and
// checked bit for bit against a model of the processor's sequence of
// floating-point operations (its deviation from the exact moment is
// printed), and the time
// from start to done must be N(M+1) + K + 7 = 262,666 clocks, that is one
// pixel per clock apart from one line clock per image line.
module tb_moment_full;
  import fp_pkg::*;
  import fpref_pkg::*;

  localparam int N = 512, M = 512, K = 3;
  localparam int MO = 3, NO = 2;

  logic clk = 0, rst_n = 1, start = 0;

  // a falling edge on rst_n, so that the asynchronous reset takes effect
  initial #1 rst_n = 0;
  logic [K-1:0] m_order, n_order;
  logic [7:0] pix;
  logic pix_rd, busy, done;
  fp_t  moment;
  int   checks = 0, failures = 0;
  int   rd = 0, cyc = 0;

  moment_processor dut (
    .clk(clk), .rst_n(rst_n), .start(start), .m_order(m_order), .n_order(n_order),
    .pix(pix), .pix_rd(pix_rd), .busy(busy), .done(done), .moment(moment));

  always #5 clk = ~clk;

  // gray level of pixel (x, y), x and y counted from 1
  function automatic logic [7:0] pixel(int x, int y);
    int unsigned h;
    h = x * 2654435761 + y * 40503 + 12345;
    return 8'(h ^ (h >> 13) ^ (h >> 21));
  endfunction

  assign pix = pixel(rd / M + 1, rd % M + 1);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pix_rd) rd <= rd + 1;
  end

  initial begin
    repeat (N * (M + 1) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_pow(word_t d, int v, int e);
    word_t p, r;
    p = from_int(v);
    r = d;
    for (int st = 0; st < K; st++) begin
      if (st > 0) p = ref_mul(p, p);
      if (e[st]) r = ref_mul(r, p);
    end
    return r;
  endfunction

  initial begin
    int    t0, t1;
    word_t chain [2], xm, addend, expect_w;
    real   exact;
    int    j;

    // reference: the same operations in the same order, two partial sums
    chain = '{default: '0};
    exact = 0.0;
    j = 0;
    for (int x = 1; x <= N; x++)
      for (int y = 0; y <= M; y++) begin
        if (y == 0) begin
          xm = ref_pow(from_int(1), x, MO);
          addend = '0;
        end else begin
          addend = ref_mul(ref_pow(from_int(int'(pixel(x, y))), y, NO), xm);
          exact += real'(x) ** MO * real'(y) ** NO * real'(pixel(x, y));
        end
        chain[j % 2] = (j < 2) ? addend : ref_add(addend, chain[j % 2]);
        j++;
      end
    expect_w = ref_add(chain[j % 2], chain[(j - 1) % 2]);

    m_order = K'(MO); n_order = K'(NO);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(posedge clk);
    #1 t0 = cyc;
    @(negedge clk) start = 0;
    do begin
      @(posedge clk);
      #1;
    end while (!done);
    t1 = cyc;
    checks++;
    if (word_t'(moment) !== expect_w) begin
      failures++;
      $display("FAIL moment %h (%g), expected %h (%g)", moment, to_real(moment), expect_w, to_real(expect_w));
    end
    checks++;
    if (t1 - t0 != N * (M + 1) + K + 7) begin
      failures++;
      $display("FAIL %0d clocks from start to done, expected %0d", t1 - t0, N * (M + 1) + K + 7);
    end
    checks++;
    if (rd != N * M) begin
      failures++;
      $display("FAIL %0d pixel reads", rd);
    end
    // With a 10-bit fraction, terms far smaller than the running sum are
    // rounded away, so over 262,144 terms the result falls well short of the
    // exact moment; the deviation is reported, not judged.
    $display("M_%0d,%0d = %g, exact %g, relative deviation %.3f, %0d clocks",
             MO, NO, to_real(moment), exact, (to_real(moment) - exact) / exact, t1 - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

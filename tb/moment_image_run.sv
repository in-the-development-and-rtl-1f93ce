// moment_image_run: testbench helper that runs one image of N x M pixels
// through a moment processor built with the given size and K, and checks
// the result. The pixels come from a hash of their position. When go rises
// the helper starts the processor with orders MO and NO, supplies the
// pixels through pix/pix_rd, waits for done and compares the moment bit for
// bit with a model of the processor's sequence of floating-point operations
// (two partial sums) and the clock count with N(M+1) + K + 7. It reports the
// number of checks and failures and raises finished.
module moment_image_run
  import fp_pkg::*;
  import fpref_pkg::*;
#(
  parameter int N  = 4,
  parameter int M  = 4,
  parameter int K  = 3,
  parameter int MO = 1,
  parameter int NO = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic start = 0;
  logic [7:0] pix;
  logic pix_rd, busy, done;
  fp_t  moment;
  int   rd = 0, cyc = 0;

  moment_processor #(.N(N), .M(M), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .m_order(K'(MO)), .n_order(K'(NO)),
    .pix(pix), .pix_rd(pix_rd), .busy(busy), .done(done), .moment(moment));

  function automatic logic [7:0] pixel(int x, int y);
    int unsigned h;
    h = x * 2246822519 + y * 3266489917 + 374761393;
    return 8'(h ^ (h >> 15) ^ (h >> 24));
  endfunction

  assign pix = pixel(rd / M + 1, rd % M + 1);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pix_rd) rd <= rd + 1;
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
    int    t0, t1, j;
    word_t chain [2], xm, addend, expect_w;
    real   exact;
    finished = 0;
    checks = 0;
    failures = 0;
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

    wait (go);
    @(negedge clk) start = 1;
    @(posedge clk);
    #1 t0 = cyc;
    @(negedge clk) start = 0;
    do begin
      @(posedge clk);
      #1;
    end while (!done);
    t1 = cyc;
    checks += 3;
    if (word_t'(moment) !== expect_w) begin
      failures++;
      $display("FAIL %0dx%0d K=%0d M_%0d,%0d: %h, expected %h", N, M, K, MO, NO, moment, expect_w);
    end
    if (t1 - t0 != N * (M + 1) + K + 7) begin
      failures++;
      $display("FAIL %0dx%0d: %0d clocks, expected %0d", N, M, t1 - t0, N * (M + 1) + K + 7);
    end
    if (rd != N * M) begin
      failures++;
      $display("FAIL %0dx%0d: %0d pixel reads", N, M, rd);
    end
    $display("%0dx%0d K=%0d: M_%0d,%0d = %g, exact %g, relative deviation %.3f, %0d clocks",
             N, M, K, MO, NO, to_real(moment), exact, (to_real(moment) - exact) / exact, t1 - t0);
    finished = 1;
  end
endmodule

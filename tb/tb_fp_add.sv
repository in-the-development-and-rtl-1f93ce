// tb_fp_add: checks the floating-point adder in both forms, the two-stage
// one (SPLIT = 1, two clocks) and the single-stage one (SPLIT = 0, one
// clock), with a new operand pair every clock. Each result is compared with
// the real-number reference in the clock the latency predicts: directed
// cases (exact sums, cancellation, alignment far beyond the mantissa,
// rounding ties, zero operands, overflow) and random operands, including
// pairs with equal exponents and opposite signs.
module tb_fp_add;
  import fp_pkg::*;
  import fpref_pkg::*;

  logic clk = 0, rst_n = 1;

  // a falling edge on rst_n, so that the asynchronous reset takes effect
  initial #1 rst_n = 0;
  fp_t  a, b, y2, y1;
  int   checks = 0, failures = 0;
  word_t exp_q [$];                        // expected results, oldest first
  word_t pipe2 [2];                        // expected, delayed by 2 clocks
  word_t pipe1;                            // expected, delayed by 1 clock
  int    n_in = 0;

  fp_add #(.SPLIT(1'b1)) dut2 (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y(y2));
  fp_add #(.SPLIT(1'b0)) dut1 (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .y(y1));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string tag, fp_t got, word_t expect_w);
    checks++;
    if (word_t'(got) !== expect_w) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", tag, got, expect_w);
    end
  endtask

  // drive a pair in this clock; results are checked 1 and 2 clocks later
  task automatic drive(word_t wa, word_t wb);
    a = fp_t'(wa);
    b = fp_t'(wb);
    @(posedge clk);
    #1;
    // y1 now shows this pair, y2 the previous one
    cmp("single-stage", y1, ref_add(wa, wb));
    if (n_in > 0) cmp("two-stage", y2, pipe1);
    pipe1 = ref_add(wa, wb);
    n_in++;
  endtask

  initial begin
    a = FP_ZERO; b = FP_ZERO;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    drive(from_int(3), from_int(5));                      // 8
    drive(from_real(1.5), from_real(-1.5));               // exact cancellation
    drive(from_int(1000), from_real(-999.0));             // 1
    drive(from_int(1024), from_real(0.5));                // tie, rounds away: 1025
    drive(from_int(1), {1'b0, 10'h0, 8'd20});             // far below half an ulp
    drive({1'b0, 10'h0, 8'd127}, {1'b1, 10'h0, 8'd90});   // 1 - tiny -> 1
    drive(19'h0, from_real(-7.25));
    drive(from_real(6.5), 19'h0);
    drive(19'h0, 19'h0);
    drive({1'b0, 10'h3ff, 8'hff}, {1'b0, 10'h3ff, 8'hff}); // saturates
    // hand-worked: 8 + 0.25 = 8.25 = 1.03125 * 2^3
    drive(from_int(8), from_real(0.25));
    checks++;
    @(posedge clk); #1;
    if (word_t'(y2) !== {1'b0, 10'd32, 8'd130}) begin
      failures++; $display("FAIL 8 + 0.25 gave %h", y2);
    end
    for (int i = 0; i < 4000; i++) begin
      word_t wa, wb;
      wa = rand_word(100, 150);
      wb = rand_word(100, 150);
      if (i % 4 == 0) wb = {~wa[18], 10'($urandom), wa[7:0]};
      drive(wa, wb);
    end
    for (int i = 0; i < 2000; i++) begin
      word_t wa, wb;
      wa = rand_word(1, 255);
      wb = rand_word(1, 255);
      drive(wa, wb);
    end
    drive(19'h0, 19'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_mul: checks the combinational floating-point multiplier against the
// real-number reference: directed cases (exact products, rounding up and
// ties, zero operands, overflow saturation, underflow flush) and random
// operands over the middle and the whole exponent range.
module tb_fp_mul;
  import fp_pkg::*;
  import fpref_pkg::*;

  fp_t a, b, y;
  int  checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(word_t wa, word_t wb, word_t expect_w);
    a = fp_t'(wa);
    b = fp_t'(wb);
    #1;
    checks++;
    if (word_t'(y) !== expect_w) begin
      failures++;
      if (failures < 10)
        $display("FAIL mul %h * %h: got %h expected %h (%g * %g)", wa, wb, y, expect_w,
                 to_real(wa), to_real(wb));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // independent hand-worked values
    check(from_int(2), from_int(3), {1'b0, 10'h200, 8'd129});      // 6 = 1.5 * 2^2
    check(from_real(1.5), from_real(1.5), {1'b0, 10'h080, 8'd128}); // 2.25 = 1.125 * 2^1
    check(from_real(-2.0), from_real(3.0), {1'b1, 10'h200, 8'd129});
    check(19'h0, from_int(5), 19'h0);
    check(from_int(7), 19'h0, 19'h0);
    // (1 + 1/1024)^2 = 1 + 2/1024 + 1/2^20: rounds down
    check({1'b0, 10'd1, 8'd127}, {1'b0, 10'd1, 8'd127}, {1'b0, 10'd2, 8'd127});
    // 1.5 * (1 + 1023/1024) = 2.9985..: normalises by one place
    check(from_real(1.5), {1'b0, 10'h3ff, 8'd127}, ref_mul(from_real(1.5), {1'b0, 10'h3ff, 8'd127}));
    // (2 - 2^-10)^2 = 4 - 2^-8 + 2^-20 = 1.998046.. * 2^1, rounds down to 1022/1024
    check({1'b0, 10'h3ff, 8'd127}, {1'b0, 10'h3ff, 8'd127}, {1'b0, 10'h3fe, 8'd128});
    // (1 + 1/32)(1 + 1/32) = 1 + 64/1024 + 1/1024: exact
    check({1'b0, 10'd32, 8'd127}, {1'b0, 10'd32, 8'd127}, {1'b0, 10'd65, 8'd127});
    // (1 + 1/1024)(1 + 512/1024) = 1.5 + 1.5/1024: halfway, rounds away to 1.5 + 2/1024
    check({1'b0, 10'd1, 8'd127}, {1'b0, 10'd512, 8'd127}, {1'b0, 10'd514, 8'd127});
    // 2^100 * 2^100 saturates, 2^-100 * 2^-100 flushes
    check({1'b0, 10'h0, 8'd227}, {1'b1, 10'h0, 8'd227}, {1'b1, 10'h3ff, 8'hff});
    check({1'b0, 10'h0, 8'd27}, {1'b0, 10'h0, 8'd27}, 19'h0);
    for (int i = 0; i < 3000; i++) begin
      word_t wa, wb;
      wa = rand_word(90, 165);
      wb = rand_word(90, 165);
      check(wa, wb, ref_mul(wa, wb));
    end
    for (int i = 0; i < 3000; i++) begin
      word_t wa, wb;
      wa = rand_word(1, 255);
      wb = rand_word(1, 255);
      check(wa, wb, ref_mul(wa, wb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

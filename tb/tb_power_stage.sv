// tb_power_stage: drives a first stage (multiplies its power by 1) and a
// later stage (squares its power) with random samples, one per clock, with
// random m/n selects and exponent bits, and the product input one clock
// behind the power as the pipeline delivers it. Checks, one clock after
// input, the control word and the power (x, or x squared), and one clock
// after that the product, which must be multiplied by the power exactly when
// the selected exponent bit is 1.
module tb_power_stage;
  import fp_pkg::*;
  import moment_pkg::*;
  import fpref_pkg::*;

  localparam int NS = 3000;

  logic clk = 0, rst_n = 1;

  // a falling edge on rst_n, so that the asynchronous reset takes effect
  initial #1 rst_n = 0;
  logic bm, bn;
  ctl_t ctl_in, ctl0, ctl1;
  fp_t  pow_in, prod_in, pow0, pow1, prod0, prod1;
  int   checks = 0, failures = 0;
  int   n_mult0 = 0, n_pass0 = 0;

  word_t s_pow [NS], s_prod [NS];
  logic  s_bit [NS];
  ctl_t  s_ctl [NS];

  power_stage #(.FIRST(1'b1)) u0 (.clk(clk), .rst_n(rst_n), .bm(bm), .bn(bn),
    .ctl_in(ctl_in), .pow_in(pow_in), .prod_in(prod_in),
    .ctl_out(ctl0), .pow_out(pow0), .prod_out(prod0));
  power_stage #(.FIRST(1'b0)) u1 (.clk(clk), .rst_n(rst_n), .bm(bm), .bn(bn),
    .ctl_in(ctl_in), .pow_in(pow_in), .prod_in(prod_in),
    .ctl_out(ctl1), .pow_out(pow1), .prod_out(prod1));

  always #5 clk = ~clk;

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string tag, int i, word_t got, word_t expect_w);
    checks++;
    if (got !== expect_w) begin
      failures++;
      if (failures < 10) $display("FAIL %s sample %0d: got %h expected %h", tag, i, got, expect_w);
    end
  endtask

  initial begin
    for (int i = 0; i < NS; i++) begin
      s_pow[i]       = rand_word(100, 150);
      s_prod[i]      = rand_word(100, 150);
      s_ctl[i].valid = 1'b1;
      s_ctl[i].sel_m = 1'($urandom);
      s_ctl[i].first = 1'($urandom);
      s_ctl[i].last  = 1'($urandom);
    end
    ctl_in = CTL_IDLE; pow_in = FP_ZERO; prod_in = FP_ZERO; bm = 0; bn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c <= NS; c++) begin
      @(negedge clk);
      if (c < NS) begin
        bm = 1'($urandom);
        bn = 1'($urandom);
        s_bit[c] = s_ctl[c].sel_m ? bm : bn;
        ctl_in = s_ctl[c];
        pow_in = fp_t'(s_pow[c]);
      end
      if (c > 0) prod_in = fp_t'(s_prod[c-1]);
      @(posedge clk);
      #1;
      if (c < NS) begin
        cmp("ctl0", c, 19'(ctl0), 19'(s_ctl[c]));
        cmp("ctl1", c, 19'(ctl1), 19'(s_ctl[c]));
        cmp("pow first", c, word_t'(pow0), s_pow[c]);
        cmp("pow square", c, word_t'(pow1), ref_mul(s_pow[c], s_pow[c]));
      end
      if (c > 0) begin
        word_t p0, p1;
        p0 = s_bit[c-1] ? ref_mul(s_prod[c-1], s_pow[c-1]) : s_prod[c-1];
        p1 = s_bit[c-1] ? ref_mul(s_prod[c-1], ref_mul(s_pow[c-1], s_pow[c-1])) : s_prod[c-1];
        if (s_bit[c-1]) n_mult0++; else n_pass0++;
        cmp("prod first", c-1, word_t'(prod0), p0);
        cmp("prod square", c-1, word_t'(prod1), p1);
      end
    end
    checks++;
    if (n_mult0 == 0 || n_pass0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

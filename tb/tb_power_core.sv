// tb_power_core: streams the sequence x = 1, 2, 3, ... through the default
// three-stage power core, one sample per clock, for every exponent pair
// (m, n) with m, n in 0..7, with a random m/n select and a random gray-level
// data factor per sample. Checks that the control word and the power leave
// K clocks after entry and the product K clocks after its own entry (one
// clock after the power), that the product equals data * x^m or data * x^n
// computed by the binary-exponent method in the reference arithmetic, and,
// where x^e * data is below 2^11 and so exact, that it equals the integer.
module tb_power_core;
  import fp_pkg::*;
  import moment_pkg::*;
  import fpref_pkg::*;

  localparam int K  = 3;
  localparam int NS = 200;                 // samples per exponent pair

  logic clk = 0, rst_n = 1;

  // a falling edge on rst_n, so that the asynchronous reset takes effect
  initial #1 rst_n = 0;
  logic [K-1:0] m, n;
  ctl_t ctl_in, ctl_out;
  fp_t  pow_in, prod_in, pow_out, prod_out;
  int   checks = 0, failures = 0, n_exact = 0;

  word_t s_x [NS], s_d [NS];
  ctl_t  s_ctl [NS];
  ctl_t  o_ctl [NS+K+2];
  word_t o_pow [NS+K+2], o_prod [NS+K+2];

  power_core #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .m(m), .n(n),
    .ctl_in(ctl_in), .pow_in(pow_in), .prod_in(prod_in),
    .ctl_out(ctl_out), .pow_out(pow_out), .prod_out(prod_out));

  always #5 clk = ~clk;

  initial begin
    repeat (64 * (NS + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string tag, int i, word_t got, word_t expect_w);
    checks++;
    if (got !== expect_w) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s m=%0d n=%0d sample %0d: got %h expected %h", tag, m, n, i, got, expect_w);
    end
  endtask

  initial begin
    ctl_in = CTL_IDLE; pow_in = FP_ZERO; prod_in = FP_ZERO; m = 0; n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pm = 0; pm < 8; pm++)
      for (int pn = 0; pn < 8; pn++) begin
        m = K'(pm); n = K'(pn);
        for (int i = 0; i < NS; i++) begin
          s_x[i]       = from_int(i + 1);
          s_d[i]       = ($urandom_range(3) == 0) ? from_int(1) : from_int($urandom_range(255));
          s_ctl[i]     = CTL_IDLE;
          s_ctl[i].valid = 1'b1;
          s_ctl[i].sel_m = 1'($urandom);
        end
        for (int c = 0; c < NS + K + 2; c++) begin
          @(negedge clk);
          ctl_in  = c < NS ? s_ctl[c] : CTL_IDLE;
          pow_in  = c < NS ? fp_t'(s_x[c]) : FP_ZERO;
          prod_in = (c > 0 && c <= NS) ? fp_t'(s_d[c-1]) : FP_ZERO;
          @(posedge clk);
          #1;
          o_ctl[c] = ctl_out; o_pow[c] = pow_out; o_prod[c] = prod_out;
        end
        for (int i = 0; i < NS; i++) begin
          word_t p, r;
          int    e;
          longint exact;
          e = s_ctl[i].sel_m ? pm : pn;
          p = s_x[i];
          r = s_d[i];
          for (int st = 0; st < K; st++) begin
            if (st > 0) p = ref_mul(p, p);
            if (e[st]) r = ref_mul(r, p);
          end
          cmp("ctl", i, 19'(o_ctl[i+K-1]), 19'(s_ctl[i]));
          cmp("pow", i, o_pow[i+K-1], p);
          cmp("prod", i, o_prod[i+K], r);
          exact = longint'(to_real(s_d[i]));
          for (int j = 0; j < e; j++) exact = exact * (i + 1);
          if (exact < 2048) begin
            n_exact++;
            cmp("exact", i, o_prod[i+K], from_real(real'(exact)));
          end
        end
      end
    checks++;
    if (n_exact == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

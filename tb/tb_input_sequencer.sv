// tb_input_sequencer: runs the input sequencer for a 5 x 7 image, twice,
// and checks every issued sample against the raster order worked out in the
// testbench: one line sample (x, data 1, select m) followed by the M column
// samples (y, pixel, select n) of each line, the first/last flags, the
// product word one clock behind the power word, pixel reads exactly in the
// column clocks, N(M+1) busy clocks per image, and that a start pulse while
// busy does not restart the scan.
module tb_input_sequencer;
  import fp_pkg::*;
  import moment_pkg::*;
  import fpref_pkg::*;

  localparam int N = 5, M = 7;
  localparam int NT = N * (M + 1);

  logic clk = 0, rst_n = 1, start = 0;

  // a falling edge on rst_n, so that the asynchronous reset takes effect
  initial #1 rst_n = 0;
  logic [7:0] pix;
  logic pix_rd, busy;
  ctl_t ctl_out;
  fp_t  pow_out, prod_out;
  int   checks = 0, failures = 0;
  int   rd_count = 0;

  input_sequencer #(.N(N), .M(M), .PIX_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .pix(pix), .pix_rd(pix_rd),
    .busy(busy), .ctl_out(ctl_out), .pow_out(pow_out), .prod_out(prod_out));

  always #5 clk = ~clk;

  function automatic logic [7:0] pixval(int i);
    return 8'(i * 37 + 11);
  endfunction

  // the pixel source: the i-th read of an image gets pixval(i)
  always_comb pix = pixval(rd_count);
  always @(posedge clk) if (pix_rd) rd_count <= rd_count + 1;

  initial begin
    repeat (4 * NT + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string tag, int j, longint got, longint expect_v);
    checks++;
    if (got != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s token %0d: got %h expected %h", tag, j, got, expect_v);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      int busy_cycles, reads;
      word_t prev_dat;
      @(negedge clk);
      rd_count = 0;
      start = 1;
      @(posedge clk);                       // start is taken here
      #1 chk("busy after start", 0, busy, 1);
      @(negedge clk) start = 0;
      busy_cycles = 1;
      reads = 0;
      for (int j = 0; j <= NT; j++) begin
        int x, y;
        x = j / (M + 1) + 1;
        y = j % (M + 1);
        if (j == 3) begin @(negedge clk) start = 1; end    // ignored: busy
        if (pix_rd) reads++;
        chk("pix_rd", j, pix_rd, (j < NT) && (y != 0));
        @(posedge clk);
        #1;
        start = 0;
        if (busy) busy_cycles++;
        if (j > 0) chk("prod", j - 1, prod_out, prev_dat);
        if (j < NT) begin
          chk("valid", j, ctl_out.valid, 1);
          chk("sel_m", j, ctl_out.sel_m, y == 0);
          chk("first", j, ctl_out.first, j == 0);
          chk("last",  j, ctl_out.last,  j == NT - 1);
          chk("pow",   j, pow_out, from_int(y == 0 ? x : y));
          prev_dat = (y == 0) ? from_int(1) : from_int(pixval((x - 1) * M + y - 1));
        end else begin
          chk("idle valid", j, ctl_out.valid, 0);
        end
      end
      chk("busy clocks", frame, busy_cycles, NT);
      chk("pixel reads", frame, reads, N * M);
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

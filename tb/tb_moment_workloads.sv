// tb_moment_workloads: the other image sizes and orders the processor was
// evaluated for, each in a processor built for it: a 640 x 480 video frame
// (480 lines of 640 pixels) and a 256 x 256 image with the three-stage power
// core, and a 256 x 256 image with a four-stage core computing a moment of
// order 13 (m = 9, n = 4), beyond the reach of three stages. Each run checks
// the moment bit for bit against the operation-level model and the clock
// count against N(M+1) + K + 7, and prints its deviation from the exact
// moment.
module tb_moment_workloads;

  logic clk = 0, rst_n = 1, go = 0;
  logic fin [3];
  int   ch [3], fl [3];

  // a falling edge on rst_n, so that the asynchronous reset takes effect
  initial #1 rst_n = 0;

  always #5 clk = ~clk;

  moment_image_run #(.N(480), .M(640), .K(3), .MO(2), .NO(3)) run_vga (
    .clk(clk), .rst_n(rst_n), .go(go), .finished(fin[0]), .checks(ch[0]), .failures(fl[0]));
  moment_image_run #(.N(256), .M(256), .K(3), .MO(5), .NO(1)) run_256 (
    .clk(clk), .rst_n(rst_n), .go(go), .finished(fin[1]), .checks(ch[1]), .failures(fl[1]));
  moment_image_run #(.N(256), .M(256), .K(4), .MO(9), .NO(4)) run_256_k4 (
    .clk(clk), .rst_n(rst_n), .go(go), .finished(fin[2]), .checks(ch[2]), .failures(fl[2]));

  initial begin
    repeat (480 * 641 + 2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2], fl[0] + fl[1] + fl[2] + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk) go = 1;
    wait (fin[0] && fin[1] && fin[2]);
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1] + ch[2], fl[0] + fl[1] + fl[2]);
    $finish;
  end
endmodule

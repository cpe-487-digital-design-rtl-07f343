// tb_vga_top: end-to-end test of the bouncing-ball display on a small raster.
//
// The top is built for a 64x48 screen (80 x 55 clocks with porches and
// syncs), a round ball of radius 4 moving 3 columns and 2 rows per frame, so
// that many frames and every wall bounce fit in a short simulation. A
// pin-level checker (a model of the monitor) checks every pixel and the sync
// timing of 120 frames. Every mechanism must have happened at least once:
// frames, bounces off all four walls, blanked pixels, ball pixels, and a
// reset in mid-frame after which the picture restarts from the centre.
module tb_vga_top;
  import vga_pkg::*;

  localparam int H_DISP = 64, H_FP = 4, H_PW = 8, H_BP = 4;
  localparam int V_DISP = 48, V_FP = 2, V_PW = 2, V_BP = 3;
  localparam int SIZE = 4, X_SPEED = 3, Y_SPEED = 2;
  localparam int FRAMES = 120;

  logic       clk_50MHz = 1'b0, rst = 1'b1;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic       vga_hsync, vga_vsync;
  int checks = 0, failures = 0;

  vga_top #(
    .H_DISP(H_DISP), .H_FP(H_FP), .H_PW(H_PW), .H_BP(H_BP),
    .V_DISP(V_DISP), .V_FP(V_FP), .V_PW(V_PW), .V_BP(V_BP),
    .SIZE(SIZE), .X_SPEED(X_SPEED), .Y_SPEED(Y_SPEED), .ROUND(1'b1)
  ) dut (.*);

  int c1_checks, c1_failures, c1_frames, c1_top, c1_bottom, c1_left, c1_right, c1_blank, c1_ball;
  int c2_checks, c2_failures, c2_frames, c2_top, c2_bottom, c2_left, c2_right, c2_blank, c2_ball;
  bit run2 = 0;

  // First checker: from power-up. Second checker: started after a reset.
  vga_pin_checker #(
    .H_DISP(H_DISP), .H_FP(H_FP), .H_PW(H_PW), .H_BP(H_BP),
    .V_DISP(V_DISP), .V_FP(V_FP), .V_PW(V_PW), .V_BP(V_BP),
    .SIZE(SIZE), .X_SPEED(X_SPEED), .Y_SPEED(Y_SPEED), .ROUND(1'b1)
  ) chk1 (.clk_50MHz(clk_50MHz & ~run2), .rst(rst & ~run2), .vga_red, .vga_green, .vga_blue, .vga_hsync, .vga_vsync,
          .checks(c1_checks), .failures(c1_failures), .frames(c1_frames), .n_top(c1_top),
          .n_bottom(c1_bottom), .n_left(c1_left), .n_right(c1_right), .n_blank(c1_blank),
          .n_ball_pixels(c1_ball));

  vga_pin_checker #(
    .H_DISP(H_DISP), .H_FP(H_FP), .H_PW(H_PW), .H_BP(H_BP),
    .V_DISP(V_DISP), .V_FP(V_FP), .V_PW(V_PW), .V_BP(V_BP),
    .SIZE(SIZE), .X_SPEED(X_SPEED), .Y_SPEED(Y_SPEED), .ROUND(1'b1)
  ) chk2 (.clk_50MHz(clk_50MHz & run2), .rst, .vga_red, .vga_green, .vga_blue, .vga_hsync, .vga_vsync,
          .checks(c2_checks), .failures(c2_failures), .frames(c2_frames), .n_top(c2_top),
          .n_bottom(c2_bottom), .n_left(c2_left), .n_right(c2_right), .n_blank(c2_blank),
          .n_ball_pixels(c2_ball));

  always #10ns clk_50MHz = ~clk_50MHz;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic finish();
    checks += c1_checks + c2_checks;
    failures += c1_failures + c2_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("FAIL: watchdog (frames %0d then %0d)", c1_frames, c2_frames);
    finish();
  end

  initial begin
    repeat (4) @(negedge clk_50MHz);
    rst = 1'b0;
    wait (c1_frames == FRAMES);
    $display("run 1: frames=%0d bounces top=%0d bottom=%0d left=%0d right=%0d blank=%0d ball=%0d",
             c1_frames, c1_top, c1_bottom, c1_left, c1_right, c1_blank, c1_ball);
    check(c1_top > 0, "bounce off the top wall happened");
    check(c1_bottom > 0, "bounce off the bottom wall happened");
    check(c1_left > 0, "bounce off the left wall happened");
    check(c1_right > 0, "bounce off the right wall happened");
    check(c1_blank > 0, "blanked pixels seen");
    check(c1_ball > 0, "ball pixels seen");
    // Reset in the middle of a frame: the picture must restart from the
    // centre, which a fresh checker verifies.
    repeat (1234) @(negedge clk_50MHz);
    rst = 1'b1;
    run2 = 1'b1;
    repeat (4) @(negedge clk_50MHz);
    rst = 1'b0;
    wait (c2_frames == 5);
    $display("run 2: frames=%0d checks=%0d", c2_frames, c2_checks);
    check(c2_checks > 5 * 80 * 55, "picture after reset checked");
    finish();
  end
endmodule

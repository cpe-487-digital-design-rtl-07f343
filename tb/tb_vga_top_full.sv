// tb_vga_top_full: the bouncing-ball display at its real size, end to end.
//
// The top runs with all its defaults: 640x480 at 25 MHz from a 50 MHz board
// clock, a 17x17 red square on white starting at the centre and moving 4 rows
// per frame. The pin-level checker (a model of the monitor) checks every
// pixel and the sync timing of 180 frames (3 seconds of video), long enough
// for the ball to reach the bottom (after 58 frames) and the top (after 174)
// and bounce off both. It also checks the frame rate: 180 frames must take
// 180 x 800 x 521 pixel clocks of 40 ns, i.e. 59.98 frames per second.
module tb_vga_top_full;
  import vga_pkg::*;

  localparam int FRAMES = 180;

  logic       clk_50MHz = 1'b0, rst = 1'b1;
  logic [2:0] vga_red, vga_green;
  logic [1:0] vga_blue;
  logic       vga_hsync, vga_vsync;
  int checks = 0, failures = 0;
  int c_checks, c_failures, c_frames, c_top, c_bottom, c_left, c_right, c_blank, c_ball;

  vga_top dut (.*);

  vga_pin_checker chk (
    .clk_50MHz, .rst, .vga_red, .vga_green, .vga_blue, .vga_hsync, .vga_vsync,
    .checks(c_checks), .failures(c_failures), .frames(c_frames), .n_top(c_top),
    .n_bottom(c_bottom), .n_left(c_left), .n_right(c_right), .n_blank(c_blank),
    .n_ball_pixels(c_ball));

  always #10ns clk_50MHz = ~clk_50MHz;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic finish();
    checks += c_checks;
    failures += c_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    #3200ms;
    failures++;
    $display("FAIL: watchdog");
    finish();
  end

  realtime t_first;

  initial begin
    repeat (4) @(negedge clk_50MHz);
    rst = 1'b0;
    wait (c_frames == 1);
    t_first = $realtime;
    wait (c_frames == FRAMES + 1);
    $display("frames=%0d bounces top=%0d bottom=%0d blank=%0d ball=%0d",
             c_frames, c_top, c_bottom, c_blank, c_ball);
    check(($realtime - t_first) == FRAMES * 800 * 521 * 40ns, "frame rate 59.98 Hz");
    check(c_top > 0, "bounce off the top of the screen happened");
    check(c_bottom > 0, "bounce off the bottom of the screen happened");
    check(c_left == 0 && c_right == 0, "no horizontal motion by default");
    check(c_blank > 0, "blanked pixels seen");
    // A 17x17 ball in every frame, except frame 58 where the centre is at row
    // 472 and the ball's lowest row, 480, is below the visible area.
    check(c_ball == 17 * 17 * FRAMES - 17, "a 17x17 ball in every frame");
    finish();
  end
endmodule

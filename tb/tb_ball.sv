// tb_ball: checks the ball painter and its once-per-frame motion.
//
// Two instances run side by side on the same pixel clock and vsync:
//  - dut_a at the default settings: a 17x17 red square on white, starting at
//    (320,240), moving 4 rows per frame, no horizontal motion;
//  - dut_b as the round, two-dimensional variant: radius 10, 3 columns and
//    5 rows per frame, a green ball on a blue background.
// The testbench makes 400 frames by pulsing vsync low for two clocks. For
// each frame an independent model of the position and the wall rule (move
// away from a wall once the ball's edge has reached it) gives the expected
// centre; the whole 25x25 window around it and 40 random pixels anywhere on
// the 640x480 screen are compared with the expected shape and colours. It also
// checks that nothing moves without a vsync rising edge, and counts bounces
// at each wall, failing if a wall a ball is meant to reach was never hit.
module tb_ball;
  import vga_pkg::*;

  localparam rgb_t GREEN = '{r: 1'b0, g: 1'b1, b: 1'b0};
  localparam rgb_t BLUE  = '{r: 1'b0, g: 1'b0, b: 1'b1};

  logic       clk = 1'b0, rst = 1'b1, vsync = 1'b1;
  logic [9:0] pixel_row = '0, pixel_col = '0;
  rgb_t       rgb_a, rgb_b;
  int         checks = 0, failures = 0;

  ball dut_a (.clk, .rst, .vsync, .pixel_row, .pixel_col, .rgb(rgb_a));

  ball #(.SIZE(10), .X_SPEED(3), .Y_SPEED(5), .ROUND(1'b1),
         .BALL_COLOR(GREEN), .BG_COLOR(BLUE))
    dut_b (.clk, .rst, .vsync, .pixel_row, .pixel_col, .rgb(rgb_b));

  always #20ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model of one ball.
  typedef struct {
    int x, y, mx, my, size, sx, sy;
    bit round;
    int n_top, n_bottom, n_left, n_right;
  } model_t;

  function automatic void step(ref model_t m);
    if (m.y + m.size >= 480) begin
      if (m.my > 0) m.n_bottom++;
      m.my = -m.sy;
    end else if (m.y <= m.size) begin
      if (m.my < 0) m.n_top++;
      m.my = m.sy;
    end
    if (m.x + m.size >= 640) begin
      if (m.mx > 0) m.n_right++;
      m.mx = -m.sx;
    end else if (m.x <= m.size) begin
      if (m.mx < 0) m.n_left++;
      m.mx = m.sx;
    end
    m.x += m.mx;
    m.y += m.my;
  endfunction

  function automatic bit covers(model_t m, int c, int r);
    int dx = c - m.x, dy = r - m.y;
    if (dx < -m.size || dx > m.size || dy < -m.size || dy > m.size) return 0;
    if (m.round) return (dx * dx + dy * dy) <= m.size * m.size;
    return 1;
  endfunction

  model_t ma, mb;

  task automatic probe(int c, int r);
    if (c < 0 || c > 639 || r < 0 || r > 479) return;
    pixel_col = 10'(c);
    pixel_row = 10'(r);
    #1ns;
    check(rgb_a == (covers(ma, c, r) ? RGB_RED : RGB_WHITE), "square ball pixel");
    check(rgb_b == (covers(mb, c, r) ? GREEN : BLUE), "round ball pixel");
  endtask

  task automatic check_frame();
    for (int dy = -12; dy <= 12; dy++)
      for (int dx = -12; dx <= 12; dx++) begin
        probe(ma.x + dx, ma.y + dy);
        probe(mb.x + dx, mb.y + dy);
      end
    repeat (40) probe(int'($urandom_range(639)), int'($urandom_range(479)));
  endtask

  initial begin
    ma = '{x: 320, y: 240, mx: 0, my: 4, size: 8, sx: 0, sy: 4, round: 0, default: 0};
    mb = '{x: 320, y: 240, mx: 3, my: 5, size: 10, sx: 3, sy: 5, round: 1, default: 0};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check_frame();
    // Clocks alone, with vsync held high, must not move the ball.
    repeat (50) @(negedge clk);
    check_frame();
    for (int f = 0; f < 400; f++) begin
      @(negedge clk) vsync = 1'b0;
      repeat (2) @(negedge clk);
      // The sync pulse itself (falling edge, low level) moves nothing.
      check_frame();
      vsync = 1'b1;
      repeat (2) @(negedge clk);
      step(ma);
      step(mb);
      check_frame();
    end
    $display("bounces: a top=%0d bottom=%0d; b top=%0d bottom=%0d left=%0d right=%0d",
             ma.n_top, ma.n_bottom, mb.n_top, mb.n_bottom, mb.n_left, mb.n_right);
    check(ma.n_top > 0 && ma.n_bottom > 0, "square ball bounced off top and bottom");
    check(ma.x == 320, "square ball stays on its column");
    check(mb.n_top > 0 && mb.n_bottom > 0 && mb.n_left > 0 && mb.n_right > 0,
          "round ball bounced off all four walls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

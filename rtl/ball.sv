// ball: paints a bouncing ball and moves it once per video frame.
//
// The ball is described by its centre (ball_x, ball_y) and its half-size
// SIZE: a square ball covers every pixel with |col - ball_x| <= SIZE and
// |row - ball_y| <= SIZE (a 17x17 square for SIZE = 8); a round ball
// (ROUND = 1) covers the pixels with (col-ball_x)^2 + (row-ball_y)^2 <= SIZE^2.
// For each pixel address from the sync generator the module answers, in the
// same clock cycle, with BALL_COLOR over the ball and BG_COLOR elsewhere
// (defaults: a red ball on a white background).
//
// Motion: the ball starts at (X_START, Y_START), the screen centre, moving
// down by Y_SPEED rows per frame. On each rising edge of vsync (the end of the
// sync pulse, inside vertical blanking, so a frame is never drawn half at the
// old and half at the new place) it takes one step. Before the step the
// direction is chosen: if the ball's lower edge has reached the bottom of the
// screen (ball_y + SIZE >= V_DISP) it moves up (-Y_SPEED), if its upper edge
// has reached the top (ball_y <= SIZE) it moves down (+Y_SPEED), otherwise it
// keeps its direction. The horizontal motion works the same way against the
// left and right walls with X_SPEED; X_SPEED = 0 (default) keeps the ball on
// its column, as in the basic board design, and a non-zero X_SPEED gives the
// two-dimensional bounce.
//
// Interface: clk is the pixel clock and rst a synchronous active-high reset
// that restores the start position and direction; vsync is the active-low
// sync from the sync generator, sampled on clk; pixel_row/pixel_col is the
// address being drawn; rgb is combinational from the address and the
// current position.
//
// Following the board design: the half-size 8, the start at the screen
// centre, the 4 pixels per frame, the bounce conditions, the red-on-white
// colours and, as listed variants, the round ball and the horizontal motion.
// This design's own choices: the step is taken on a vsync edge detected in
// the pixel-clock domain instead of clocking the register with vsync, a
// direction chosen at a wall is applied in the same step (so the ball never
// leaves the screen), and the position arithmetic is signed so no
// comparison wraps around near the top or left edge.
module ball
  import vga_pkg::*;
#(
  parameter int unsigned CNT_W      = VGA_CNT_W,
  parameter int unsigned H_DISP     = VGA_H_DISP,
  parameter int unsigned V_DISP     = VGA_V_DISP,
  parameter int unsigned SIZE       = BALL_SIZE,
  parameter int unsigned X_START    = H_DISP / 2,
  parameter int unsigned Y_START    = V_DISP / 2,
  parameter int unsigned X_SPEED    = 0,
  parameter int unsigned Y_SPEED    = BALL_Y_SPEED,
  parameter bit          ROUND      = 1'b0,
  parameter rgb_t        BALL_COLOR = RGB_RED,
  parameter rgb_t        BG_COLOR   = RGB_WHITE
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             vsync,
  input  logic [CNT_W-1:0] pixel_row,
  input  logic [CNT_W-1:0] pixel_col,
  output rgb_t             rgb
);

  // Signed arithmetic two bits wider than the address: room for the sign
  // and for ball_x + SIZE beyond the screen edge.
  localparam int unsigned PW = CNT_W + 2;
  typedef logic signed [PW-1:0] pos_t;
  typedef logic signed [2*PW-1:0] sq_t;

  localparam pos_t P_SIZE  = pos_t'(SIZE);
  localparam pos_t P_XSPD  = pos_t'(X_SPEED);
  localparam pos_t P_YSPD  = pos_t'(Y_SPEED);
  localparam pos_t P_HDISP = pos_t'(H_DISP);
  localparam pos_t P_VDISP = pos_t'(V_DISP);

  pos_t ball_x, ball_y;
  pos_t ball_x_motion, ball_y_motion;
  pos_t next_x_motion, next_y_motion;
  logic vsync_q, frame_tick;

  // Rising edge of vsync = end of the vertical sync pulse.
  always_ff @(posedge clk) begin
    if (rst) vsync_q <= 1'b1;
    else     vsync_q <= vsync;
  end
  assign frame_tick = vsync & ~vsync_q;

  always_comb begin
    next_y_motion = ball_y_motion;
    if (ball_y + P_SIZE >= P_VDISP) next_y_motion = -P_YSPD;
    else if (ball_y <= P_SIZE)      next_y_motion = P_YSPD;

    next_x_motion = ball_x_motion;
    if (ball_x + P_SIZE >= P_HDISP) next_x_motion = -P_XSPD;
    else if (ball_x <= P_SIZE)      next_x_motion = P_XSPD;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ball_x        <= pos_t'(X_START);
      ball_y        <= pos_t'(Y_START);
      ball_x_motion <= P_XSPD;
      ball_y_motion <= P_YSPD;
    end else if (frame_tick) begin
      ball_x_motion <= next_x_motion;
      ball_y_motion <= next_y_motion;
      ball_x        <= ball_x + next_x_motion;
      ball_y        <= ball_y + next_y_motion;
    end
  end

  // Drawing: offset of the current pixel from the ball centre.
  pos_t dx, dy;
  sq_t  dist2;
  logic in_square, ball_on;

  assign dx        = pos_t'(pixel_col) - ball_x;
  assign dy        = pos_t'(pixel_row) - ball_y;
  assign in_square = (dx >= -P_SIZE) && (dx <= P_SIZE) && (dy >= -P_SIZE) && (dy <= P_SIZE);
  assign dist2     = sq_t'(dx) * sq_t'(dx) + sq_t'(dy) * sq_t'(dy);

  always_comb begin
    if (ROUND) ball_on = in_square && (dist2 <= sq_t'(SIZE * SIZE));
    else       ball_on = in_square;
  end

  assign rgb = ball_on ? BALL_COLOR : BG_COLOR;

  // The ball must fit between the walls it bounces off.
  a_fits : assert property (@(posedge clk) (2 * SIZE < V_DISP) && (2 * SIZE < H_DISP));

endmodule

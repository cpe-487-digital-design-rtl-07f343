// vga_top: bouncing ball on a 640x480 60 Hz VGA display.
//
// The 50 MHz board clock is halved by clk_div2 into the 25 MHz pixel clock.
// vga_sync scans the raster and hands each pixel address to ball, which
// answers with that pixel's colour; vga_sync blanks it outside the visible
// area and drives it, together with HSYNC and VSYNC, to the pins. ball also
// watches VSYNC to move the ball once per frame.
//
// The board's VGA port has a 3-bit red, 3-bit green and 2-bit blue input,
// turned into analog levels by a resistor network off chip. The picture
// generator has one bit per colour, so it drives only the most significant
// bit of each colour (full intensity) and holds the other bits at 0.
//
// Interface: clk_50MHz, rst (synchronous to clk_50MHz, active high, held for
// at least two clk_50MHz cycles so the pixel-clock logic sees it),
// vga_red[2:0], vga_green[2:0], vga_blue[1:0], vga_hsync, vga_vsync (active
// low). Timing: the pixel clock runs also during reset; on the first pixel
// clock edge after reset the scan starts at pixel (0,0), and each pixel's
// colour and syncs reach the pins one pixel clock after its address. The reset input is this design's addition; the parameters
// default to the board design's 640x480 timing and ball, and can shrink the
// raster for simulation or enable the round ball and the horizontal bounce.
module vga_top
  import vga_pkg::*;
#(
  parameter int unsigned CNT_W      = VGA_CNT_W,
  parameter int unsigned H_DISP     = VGA_H_DISP,
  parameter int unsigned H_FP       = VGA_H_FP,
  parameter int unsigned H_PW       = VGA_H_PW,
  parameter int unsigned H_BP       = VGA_H_BP,
  parameter int unsigned V_DISP     = VGA_V_DISP,
  parameter int unsigned V_FP       = VGA_V_FP,
  parameter int unsigned V_PW       = VGA_V_PW,
  parameter int unsigned V_BP       = VGA_V_BP,
  parameter int unsigned SIZE       = BALL_SIZE,
  parameter int unsigned X_SPEED    = 0,
  parameter int unsigned Y_SPEED    = BALL_Y_SPEED,
  parameter bit          ROUND      = 1'b0,
  parameter rgb_t        BALL_COLOR = RGB_RED,
  parameter rgb_t        BG_COLOR   = RGB_WHITE
) (
  input  logic       clk_50MHz,
  input  logic       rst,
  output logic [2:0] vga_red,
  output logic [2:0] vga_green,
  output logic [1:0] vga_blue,
  output logic       vga_hsync,
  output logic       vga_vsync
);

  logic             ck_25;
  rgb_t             s_rgb, s_rgb_out;
  logic             s_vsync;
  logic [CNT_W-1:0] s_pixel_row, s_pixel_col;

  clk_div2 u_clk_div (
    .clk_in  (clk_50MHz),
    .clk_out (ck_25)
  );

  ball #(
    .CNT_W      (CNT_W),
    .H_DISP     (H_DISP),
    .V_DISP     (V_DISP),
    .SIZE       (SIZE),
    .X_SPEED    (X_SPEED),
    .Y_SPEED    (Y_SPEED),
    .ROUND      (ROUND),
    .BALL_COLOR (BALL_COLOR),
    .BG_COLOR   (BG_COLOR)
  ) u_ball (
    .clk       (ck_25),
    .rst       (rst),
    .vsync     (s_vsync),
    .pixel_row (s_pixel_row),
    .pixel_col (s_pixel_col),
    .rgb       (s_rgb)
  );

  vga_sync #(
    .CNT_W  (CNT_W),
    .H_DISP (H_DISP),
    .H_FP   (H_FP),
    .H_PW   (H_PW),
    .H_BP   (H_BP),
    .V_DISP (V_DISP),
    .V_FP   (V_FP),
    .V_PW   (V_PW),
    .V_BP   (V_BP)
  ) u_vga_sync (
    .clk       (ck_25),
    .rst       (rst),
    .rgb_in    (s_rgb),
    .rgb_out   (s_rgb_out),
    .hsync     (vga_hsync),
    .vsync     (s_vsync),
    .pixel_row (s_pixel_row),
    .pixel_col (s_pixel_col)
  );

  assign vga_vsync = s_vsync;
  assign vga_red   = {s_rgb_out.r, 2'b00};
  assign vga_green = {s_rgb_out.g, 2'b00};
  assign vga_blue  = {s_rgb_out.b, 1'b0};

endmodule

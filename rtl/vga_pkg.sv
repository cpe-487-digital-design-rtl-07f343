// vga_pkg: types and constants shared by the VGA bouncing-ball design.
//
// The colour of one pixel is carried as three on/off bits (red, green, blue),
// which is all the picture generator uses. The 640x480 60 Hz timing numbers
// are the standard ones for a 25 MHz pixel clock: 800 pixel clocks per line
// (640 visible, 16 front porch, 96 sync, 48 back porch) and 521 lines per
// frame (480 visible, 10 front porch, 2 sync, 29 back porch), so one frame
// lasts 800 * 521 = 416,800 clocks, 16.67 ms.
package vga_pkg;

  // One-bit-per-channel pixel colour.
  typedef struct packed {
    logic r;
    logic g;
    logic b;
  } rgb_t;

  localparam rgb_t RGB_BLACK = '{r: 1'b0, g: 1'b0, b: 1'b0};
  localparam rgb_t RGB_WHITE = '{r: 1'b1, g: 1'b1, b: 1'b1};
  localparam rgb_t RGB_RED   = '{r: 1'b1, g: 1'b0, b: 1'b0};

  // Width of the pixel row/column counters and addresses.
  localparam int unsigned VGA_CNT_W = 10;

  // Horizontal timing in pixel clocks.
  localparam int unsigned VGA_H_DISP = 640;
  localparam int unsigned VGA_H_FP   = 16;
  localparam int unsigned VGA_H_PW   = 96;
  localparam int unsigned VGA_H_BP   = 48;

  // Vertical timing in lines.
  localparam int unsigned VGA_V_DISP = 480;
  localparam int unsigned VGA_V_FP   = 10;
  localparam int unsigned VGA_V_PW   = 2;
  localparam int unsigned VGA_V_BP   = 29;

  // Ball defaults: half-size 8 (a 17x17 square), 4 pixels per frame.
  localparam int unsigned BALL_SIZE    = 8;
  localparam int unsigned BALL_Y_SPEED = 4;

endpackage

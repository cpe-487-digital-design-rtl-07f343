// vga_pin_checker: a model of the monitor at the VGA pins, for testbenches.
//
// It sees only what a display sees: the 50 MHz board clock and the pins, and
// it ignores the pins while the board's reset input is high. The
// pixel clock phase is found from the first falling edge of HSYNC (the pins
// change only on pixel-clock edges, i.e. every second board-clock edge). From
// then on it samples the pins once per pixel and:
//  - measures each HSYNC pulse (H_PW pixels) and line period (H_TOTAL) and
//    each VSYNC pulse (V_PW lines) and frame period (V_TOTAL lines);
//  - rebuilds the raster position the way a monitor does: columns counted
//    from the end of the HSYNC pulse minus the back porch, rows from the end
//    of the VSYNC pulse minus the back porch;
//  - checks every pixel: black during blanking, and inside the visible area
//    the ball colour where an independent model of the ball covers the pixel
//    and the background colour elsewhere; the unused low colour bits must be 0.
// The ball model starts at the screen centre, moving (+X_SPEED, +Y_SPEED),
// and takes one step per VSYNC pulse; the first frame it checks is the one
// after the first complete VSYNC pulse. It counts frames, bounces at each
// wall and blanked pixels for the testbench to report.
module vga_pin_checker
  import vga_pkg::*;
#(
  parameter int   H_DISP = 640, H_FP = 16, H_PW = 96, H_BP = 48,
  parameter int   V_DISP = 480, V_FP = 10, V_PW = 2, V_BP = 29,
  parameter int   SIZE = 8, X_SPEED = 0, Y_SPEED = 4,
  parameter bit   ROUND = 1'b0,
  parameter rgb_t BALL_COLOR = RGB_RED,
  parameter rgb_t BG_COLOR = RGB_WHITE
) (
  input  logic       clk_50MHz,
  input  logic       rst,
  input  logic [2:0] vga_red,
  input  logic [2:0] vga_green,
  input  logic [1:0] vga_blue,
  input  logic       vga_hsync,
  input  logic       vga_vsync,
  output int         checks,
  output int         failures,
  output int         frames,
  output int         n_top,
  output int         n_bottom,
  output int         n_left,
  output int         n_right,
  output int         n_blank,
  output int         n_ball_pixels
);

  localparam int H_TOTAL = H_DISP + H_FP + H_PW + H_BP;
  localparam int V_TOTAL = V_DISP + V_FP + V_PW + V_BP;

  initial begin
    checks = 0; failures = 0; frames = 0;
    n_top = 0; n_bottom = 0; n_left = 0; n_right = 0; n_blank = 0; n_ball_pixels = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // Ball model.
  int bx = H_DISP / 2, by = V_DISP / 2, mx = X_SPEED, my = Y_SPEED;

  function automatic void step();
    if (by + SIZE >= V_DISP) begin
      if (my > 0) n_bottom++;
      my = -Y_SPEED;
    end else if (by <= SIZE) begin
      if (my < 0) n_top++;
      my = Y_SPEED;
    end
    if (bx + SIZE >= H_DISP) begin
      if (mx > 0) n_right++;
      mx = -X_SPEED;
    end else if (bx <= SIZE) begin
      if (mx < 0) n_left++;
      mx = X_SPEED;
    end
    bx += mx;
    by += my;
  endfunction

  function automatic bit covers(int c, int r);
    int dx, dy;
    dx = c - bx;
    dy = r - by;
    if (dx < -SIZE || dx > SIZE || dy < -SIZE || dy > SIZE) return 0;
    if (ROUND) return (dx * dx + dy * dy) <= SIZE * SIZE;
    return 1;
  endfunction

  // Pixel-rate sampling.
  bit     locked = 0, phase = 0, parity = 0;
  logic   hs_q = 1'b1, vs_q = 1'b1;
  longint pix = 0, hs_fall = -1, vs_fall = -1;
  int     col = -1000000, line_k = -1000000;
  bit     in_frame = 0;

  always @(negedge clk_50MHz) begin
    parity = ~parity;
    if (rst) begin
      // Nothing on the pins is meaningful before reset has been applied.
      hs_q = 1'b1;
      vs_q = 1'b1;
    end else if (!locked && hs_q && !vga_hsync) begin
      locked = 1;
      phase  = parity;
      hs_fall = 0;
      pix = 0;
    end else if (locked && parity == phase) begin
      pix++;
      // Sync waveforms.
      if (hs_q && !vga_hsync) begin
        check(pix - hs_fall == longint'(H_TOTAL), "line period");
        hs_fall = pix;
      end
      if (!hs_q && vga_hsync) begin
        check(pix - hs_fall == longint'(H_PW), "hsync pulse width");
        col = -H_BP;
        line_k++;
      end
      if (vs_q && !vga_vsync) begin
        if (vs_fall >= 0) check(pix - vs_fall == H_TOTAL * V_TOTAL, "frame period");
        vs_fall = pix;
      end
      if (!vs_q && vga_vsync && vs_fall >= 0) begin
        check(pix - vs_fall == H_TOTAL * V_PW, "vsync pulse width");
        line_k = 0;
        in_frame = 1;
        frames++;
        step();
      end
      // Pixel colour.
      check(vga_red[1:0] == 2'b00 && vga_green[1:0] == 2'b00 && vga_blue[0] == 1'b0,
            "unused colour bits are 0");
      if (in_frame) begin
        int   row;
        rgb_t seen, want;
        row  = line_k - V_BP;
        seen = '{r: vga_red[2], g: vga_green[2], b: vga_blue[1]};
        if (col >= 0 && col < H_DISP && row >= 0 && row < V_DISP) begin
          want = covers(col, row) ? BALL_COLOR : BG_COLOR;
          if (covers(col, row)) n_ball_pixels++;
        end else begin
          want = RGB_BLACK;
          n_blank++;
        end
        check(seen == want, "pixel colour");
      end
      col++;
    end
    // Edge history only at pixel rate, once the phase is known.
    if (!rst && (!locked || parity == phase)) begin
      hs_q = vga_hsync;
      vs_q = vga_vsync;
    end
  end

endmodule

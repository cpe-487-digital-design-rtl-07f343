// vga_sync: VGA raster timing generator with pixel addressing and blanking.
//
// Two counters run on the pixel clock: h_cnt counts the pixel clocks of a line
// (H_DISP visible + H_FP front porch + H_PW sync + H_BP back porch) and v_cnt
// counts the lines of a frame (V_DISP + V_FP + V_PW + V_BP), stepping when
// h_cnt wraps. The counters are the pixel address: pixel_col = h_cnt and
// pixel_row = v_cnt, with pixel (0,0) at the top left and
// (H_DISP-1, V_DISP-1) at the bottom right. Sync pulses are active low, in
// the order visible, front porch, sync, back porch. With the defaults
// (640/16/96/48 and 480/10/2/29) a line is 800 clocks and a frame 521 lines,
// 59.98 Hz at 25 MHz.
//
// The picture generator answers the address with a colour, rgb_in, in the
// same clock. One register stage then drives rgb_out, hsync and vsync
// together, so that all three describe the same pixel; rgb_out is forced to
// black outside the visible area so nothing is sent during blanking or sync.
//
// Timing: pixel_col/pixel_row change on every rising clk edge; rgb_out,
// hsync and vsync for address (c, r) appear one clock after the address.
// Reset (synchronous, active high) starts the scan at pixel (0,0) with both
// syncs inactive (high) and the colour black.
//
// Following the board design: the counter structure, the active-low syncs,
// the gating of colour with a "video on" condition and 1-bit colours. This
// design's own choices: the vertical counter steps at the end of a line, the
// porch/sync lengths come straight from the timing table (parameters), and
// the colour passes the same output register as the syncs.
module vga_sync
  import vga_pkg::*;
#(
  parameter int unsigned CNT_W  = VGA_CNT_W,
  parameter int unsigned H_DISP = VGA_H_DISP,
  parameter int unsigned H_FP   = VGA_H_FP,
  parameter int unsigned H_PW   = VGA_H_PW,
  parameter int unsigned H_BP   = VGA_H_BP,
  parameter int unsigned V_DISP = VGA_V_DISP,
  parameter int unsigned V_FP   = VGA_V_FP,
  parameter int unsigned V_PW   = VGA_V_PW,
  parameter int unsigned V_BP   = VGA_V_BP
) (
  input  logic             clk,        // pixel clock, 25 MHz
  input  logic             rst,        // synchronous, active high
  input  rgb_t             rgb_in,     // colour of pixel (pixel_col, pixel_row)
  output rgb_t             rgb_out,    // blanked colour to the DAC pins
  output logic             hsync,      // active low
  output logic             vsync,      // active low
  output logic [CNT_W-1:0] pixel_row,
  output logic [CNT_W-1:0] pixel_col
);

  localparam int unsigned H_TOTAL    = H_DISP + H_FP + H_PW + H_BP;
  localparam int unsigned V_TOTAL    = V_DISP + V_FP + V_PW + V_BP;
  localparam int unsigned H_SYNC_BEG = H_DISP + H_FP;
  localparam int unsigned H_SYNC_END = H_DISP + H_FP + H_PW;  // exclusive
  localparam int unsigned V_SYNC_BEG = V_DISP + V_FP;
  localparam int unsigned V_SYNC_END = V_DISP + V_FP + V_PW;  // exclusive

  logic [CNT_W-1:0] h_cnt, v_cnt;
  logic             line_end, frame_end;
  logic             video_on, hs_on, vs_on;

  assign line_end  = (h_cnt == CNT_W'(H_TOTAL - 1));
  assign frame_end = (v_cnt == CNT_W'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (line_end) begin
      h_cnt <= '0;
      v_cnt <= frame_end ? '0 : v_cnt + 1'b1;
    end else begin
      h_cnt <= h_cnt + 1'b1;
    end
  end

  assign pixel_col = h_cnt;
  assign pixel_row = v_cnt;

  assign video_on = (h_cnt < CNT_W'(H_DISP)) && (v_cnt < CNT_W'(V_DISP));
  assign hs_on    = (h_cnt >= CNT_W'(H_SYNC_BEG)) && (h_cnt < CNT_W'(H_SYNC_END));
  assign vs_on    = (v_cnt >= CNT_W'(V_SYNC_BEG)) && (v_cnt < CNT_W'(V_SYNC_END));

  always_ff @(posedge clk) begin
    if (rst) begin
      rgb_out <= RGB_BLACK;
      hsync   <= 1'b1;
      vsync   <= 1'b1;
    end else begin
      rgb_out <= video_on ? rgb_in : RGB_BLACK;
      hsync   <= ~hs_on;
      vsync   <= ~vs_on;
    end
  end

  // The counters must fit their width and stay inside one line / one frame.
  a_h_range : assert property (@(posedge clk) disable iff (rst) h_cnt < CNT_W'(H_TOTAL));
  a_v_range : assert property (@(posedge clk) disable iff (rst) v_cnt < CNT_W'(V_TOTAL));
  a_fits    : assert property (@(posedge clk)
                               (H_TOTAL <= (1 << CNT_W)) && (V_TOTAL <= (1 << CNT_W)));

endmodule

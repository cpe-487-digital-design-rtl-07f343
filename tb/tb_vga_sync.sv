// tb_vga_sync: checks the VGA timing generator at its full 640x480 size.
//
// Runs two full frames plus a few lines. A colour pattern that depends on the
// pixel address is fed back as rgb_in. An independent raster model (a pixel
// and line count started at reset) checks every clock that pixel_col and
// pixel_row step through 0..799 / 0..520, and that the registered outputs
// carry, one clock later, the pattern colour for visible pixels, black
// elsewhere, and the syncs of that pixel. Separately, the sync waveforms are
// measured edge to edge: line period 800 clocks with a 96-clock HSYNC pulse,
// frame period 416,800 clocks with a 1,600-clock (2-line) VSYNC pulse, and
// 640 x 480 non-black pixels per frame.
module tb_vga_sync;
  import vga_pkg::*;

  localparam int H_TOTAL = 800, V_TOTAL = 521;

  logic       clk = 1'b0, rst = 1'b1;
  rgb_t       rgb_in, rgb_out;
  logic       hsync, vsync;
  logic [9:0] pixel_row, pixel_col;
  int         checks = 0, failures = 0;

  vga_sync dut (.*);

  always #20ns clk = ~clk;

  // Pattern never black, so blanking is visible as a change.
  always_comb rgb_in = '{r: 1'b1, g: pixel_col[0], b: pixel_row[1] ^ pixel_col[3]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #40ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic rgb_t pattern(int c, int r);
    logic [9:0] cc, rr;
    cc = 10'(c);
    rr = 10'(r);
    return '{r: 1'b1, g: cc[0], b: rr[1] ^ cc[3]};
  endfunction

  int  hm = 0, vm = 0, ph = 0, pv = 0;
  bit  have_prev = 0;
  longint cyc = 0;
  longint hs_fall = -1, vs_fall = -1;
  int  hs_low = 0, vs_low = 0, hs_periods = 0, vs_periods = 0, lit = 0;
  logic hs_q = 1, vs_q = 1;

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2 * H_TOTAL * V_TOTAL + 5 * H_TOTAL) begin
      // Address of the current pixel.
      check(pixel_col == 10'(hm) && pixel_row == 10'(vm), "pixel address");
      // Registered outputs describe the previous pixel.
      if (have_prev) begin
        bit vis;
        vis = (ph < 640) && (pv < 480);
        check(rgb_out == (vis ? pattern(ph, pv) : RGB_BLACK), "blanked colour");
        check(hsync == !(ph >= 656 && ph < 752), "hsync of pixel");
        check(vsync == !(pv >= 490 && pv < 492), "vsync of pixel");
        if (rgb_out != RGB_BLACK) lit++;
      end
      // Edge-to-edge waveform measurement.
      if (hs_q && !hsync) begin
        if (hs_fall >= 0) begin
          check(cyc - hs_fall == H_TOTAL, "line period 800 clocks");
          hs_periods++;
        end
        hs_fall = cyc;
      end
      if (!hs_q && hsync) check(cyc - hs_fall == 96, "hsync pulse 96 clocks");
      if (vs_q && !vsync) begin
        if (vs_fall >= 0) begin
          check(cyc - vs_fall == H_TOTAL * V_TOTAL, "frame period 416800 clocks");
          check(lit == 640 * 480, "307200 visible pixels per frame");
          vs_periods++;
        end
        lit = 0;
        vs_fall = cyc;
      end
      if (!vs_q && vsync) check(cyc - vs_fall == 2 * H_TOTAL, "vsync pulse 1600 clocks");
      hs_q = hsync;
      vs_q = vsync;
      // Advance the model.
      ph = hm; pv = vm; have_prev = 1;
      hm++;
      if (hm == H_TOTAL) begin
        hm = 0;
        vm = (vm == V_TOTAL - 1) ? 0 : vm + 1;
      end
      cyc++;
      @(negedge clk);
    end
    check(vs_periods == 1, "one full frame period measured");
    check(hs_periods > 1000, "line periods measured");
    // Reset in mid-frame returns the scan to pixel (0,0).
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(pixel_col == 0 && pixel_row == 0 && hsync && vsync && rgb_out == RGB_BLACK,
          "reset state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

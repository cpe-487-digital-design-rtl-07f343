# VGA bouncing ball

A small FPGA video generator that draws a red square on a white 640x480
screen and bounces it up and down at 60 frames per second. It is built for a
board with a 50 MHz oscillator and a VGA port fed by a resistor network, 3 bits
of red, 3 of green and 2 of blue (a Digilent Nexys2 style port). There is no
frame buffer. The picture is computed while the beam scans. For every pixel the
sync generator puts out an address, and the ball logic answers at once whether
that pixel lies inside the ball. The ball's position is a pair of registers
that move one step per frame, during vertical blanking.

```
 clk_50MHz ──► clk_div2 ──ck_25──┬──────────────┬──────────────
                                 │              │
                                 ▼              ▼
                  ┌────────────────────┐  pixel_row/col ┌──────────────────┐
                  │      vga_sync      ├───────────────►│       ball       │
                  │ h/v counters,      │◄───────────────┤ position regs,   │
                  │ sync, blanking,    │    rgb (1+1+1) │ bounce, in-ball  │
                  │ output register    ├─vsync─────────►│ test             │
                  └─┬──────┬──────┬────┘                └──────────────────┘
                    │rgb   │hsync │vsync
                    ▼      ▼      ▼
        vga_red[2] vga_green[2] vga_blue[1]   vga_hsync   vga_vsync
        (the lower colour bits are driven 0)
```

## Raster timing

The display is scanned like a CRT. Pixel (0,0) is the top-left corner and
(639,479) the bottom-right. A line has 640 visible pixels and a frame has 480
visible lines. Around the visible parts sit the blanking intervals, which give
the beam time to return. The syncs are active low. The pixel clock is 25 MHz,
so one clock is 40 ns.

| | visible | front porch | sync pulse | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixel clocks) | 640 (25.6 µs) | 16 (0.64 µs) | 96 (3.84 µs) | 48 (1.92 µs) | 800 (32 µs) |
| vertical (lines) | 480 (15.36 ms) | 10 (0.32 ms) | 2 (64 µs) | 29 (0.928 ms) | 521 (16.67 ms) |

One frame is 800 × 521 = 416,800 clocks, or 59.98 frames per second. All eight
lengths are parameters of `vga_sync` and `vga_top`, set from `vga_pkg`. The
widely used 525-line variant of 640x480 (back porch 33 lines) needs only
`V_BP = 33`.

Within a line the order is visible, front porch, sync, back porch. Frames
follow the same order. With the default counts:

- HSYNC is low for `h_cnt` 656…751.
- VSYNC is low for `v_cnt` 490…491.
- The vertical counter steps when the horizontal counter wraps from 799 to 0.

## Pixel pipeline: what lines up with what

This is the part that is easiest to get wrong when the design is changed.

1. In clock *n*, `vga_sync`'s counters hold pixel (c, r). The counters drive
   `pixel_col` and `pixel_row` directly.
2. `ball` is combinational from the address to the colour. In the same clock it
   returns the colour of (c, r).
3. At the end of clock *n*, one register in `vga_sync` captures three things
   together: the colour, forced to black if (c, r) is outside the visible area,
   and HSYNC and VSYNC as they should be for (c, r).

So all three pin groups describe the same pixel, one pixel clock after its
address. A stage added in `ball` (a multiplier for a bigger round ball, say) must
be matched by delaying `video_on`, `hs_on` and `vs_on` in `vga_sync` by the same
number of clocks. Without that, the picture moves right relative to the syncs.

Blanking is done in `vga_sync`, not in `ball`. Any picture source can therefore
return a colour for every address, including addresses outside the screen.

## The ball and its bounce

The ball keeps a signed centre (`ball_x`, `ball_y`) and a signed step per frame
(`ball_x_motion`, `ball_y_motion`). With `SIZE = 8` a square ball covers every
pixel within 8 columns and 8 rows of the centre, which is 17 × 17 pixels. It
starts at (320, 240) and moves down 4 rows per frame.

`ball` samples VSYNC on the pixel clock. On its rising edge, which is the end of
the sync pulse and well inside vertical blanking, it takes one step:

- If the ball's lower edge has reached the bottom (`ball_y + SIZE >= 480`), the
  step becomes −Y_SPEED (upwards).
- Otherwise, if its upper edge has reached the top (`ball_y <= SIZE`), the step
  becomes +Y_SPEED.
- Otherwise the step is kept.
- The new step is added to the position in the same update.

With the defaults the centre runs 240, 244, …, 472, 468, …, 8, 12, ….
The ball reaches the bottom after 58 frames and the top 116 frames later. At
the lowest point (centre row 472) the ball's last row is row 480, which is just
below the screen. That frame shows 16 rows of the ball.

The horizontal motion follows the same rule against columns 0 and 640 with
`X_SPEED`. The default `X_SPEED = 0` keeps the ball on column 320.

Because the position is updated only at the VSYNC edge, a frame never shows the
ball partly at its old place and partly at its new one.

### Variants selected by parameters

| parameter | default | effect |
|---|---|---|
| `SIZE` | 8 | half-size (radius) in pixels |
| `Y_SPEED`, `X_SPEED` | 4, 0 | pixels per frame; a non-zero `X_SPEED` gives bounces off all four walls |
| `ROUND` | 0 | 1 draws a disc: pixels with dx² + dy² ≤ SIZE² |
| `BALL_COLOR`, `BG_COLOR` | red, white | 1-bit-per-channel colours (`vga_pkg::rgb_t`) |

The ball must fit between the walls (2·SIZE < 480 and 2·SIZE < 640). An
assertion checks this.

## Pins and the analog side

The VGA port takes 3 red, 3 green and 2 blue bits. The board turns them into
0–0.7 V levels with binary-weighted resistors into the monitor's 75 Ω input:

- red and green: 2 kΩ, 1 kΩ and 510 Ω, for bit 0 to bit 2;
- blue: 1 kΩ and 510 Ω;
- HSYNC and VSYNC: 100 Ω series resistors.

The picture here has one bit per colour. It drives only the most significant
pin of each colour and holds the others at 0. A lit colour is therefore at about
half of full brightness. Assuming 3.3 V I/O, it is near 0.39 V, against 0.68 V
with all bits high. The resistor network and the monitor are not part of the
RTL. The top module ends at the pins.

## Modules

| file | role |
|---|---|
| `rtl/vga_pkg.sv` | `rgb_t` colour struct, colour constants, default timing and ball numbers |
| `rtl/clk_div2.sv` | 50 MHz → 25 MHz toggle flip-flop |
| `rtl/vga_sync.sv` | counters, syncs, pixel address, blanking and output register |
| `rtl/ball.sv` | position and motion registers, bounce rule, in-ball test, colour choice |
| `rtl/vga_top.sv` | wiring and pin mapping; all parameters are passed down |

### Clock and reset

The 25 MHz clock comes from a toggle flip-flop, as on the original board. The
flip-flop has no reset, so the pixel clock runs during reset. The other
flip-flops use a synchronous active-high `rst`, which must be held for at least
two 50 MHz cycles.

On an FPGA the divided clock should be placed on a global clock net with a
40 ns period constraint. Alternatively, the two pixel-clock modules can run on
`clk_50MHz` with a clock enable every other cycle. That change is not made here.

## Where this RTL departs from the original lab design

- **Line and frame counts.** The original design's timing table gives 521
  lines per frame. The VHDL comments of the original describe a 525-line frame,
  with HSYNC on counts 659–755 (97 clocks) and VSYNC on lines 493–494. This RTL
  follows the table: 96 clocks of HSYNC after a 16-clock front porch, and 2 lines
  of VSYNC after a 10-line front porch. The frame rate is 59.98 Hz.
- **Vertical counter.** It steps at the end of a line, not partway through the
  HSYNC pulse.
- **Output alignment.** Colour and syncs leave through one register, so they are
  aligned to the same pixel. In the original, the colour lags the blanking
  window by one pixel.
- **Bounce.** The new direction is applied in the same step. In the original,
  the step after a wall is hit still uses the old direction. The ball then
  overshoots to a centre at row 4, where an unsigned compare wraps and the ball
  vanishes for one frame. Here the centre stays in 8…472, and the arithmetic is
  signed.
- **Frame step.** The motion register is stepped by a VSYNC edge detected in the
  pixel-clock domain. The original clocks it with VSYNC itself.
- **Reset and variants.** Reset is an addition; the original relies on power-up
  values. The round ball, the horizontal motion and the size and colour settings
  are the modifications the lab proposes, offered here as parameters whose
  defaults give the basic design.

## Simulation

Each testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb/tb_clk_div2.sv` | 40 ns period, 50 % duty cycle, a toggle on every edge |
| `tb/tb_vga_sync.sv` | two full 640x480 frames. It checks the address every clock against a reference count, the blanked colour and sync for every pixel, and the measured line period (800), HSYNC width (96), frame period (416,800), VSYNC width (1,600) and 307,200 lit pixels per frame. It ends with a reset in mid-frame. |
| `tb/tb_ball.sv` | two instances over 400 frames: the default square, and a round radius-10 ball moving 3 columns and 5 rows per frame in other colours. A reference model checks a 25x25 window around the ball plus random pixels. It checks that only a VSYNC rising edge moves the ball, and that each wall is hit. |
| `tb/tb_vga_top.sv` | the whole design on a 64x48 raster with a round ball moving in x and y, 120 frames. Every pixel and every sync pulse is checked at the pins. It requires bounces off all four walls and a reset in mid-frame. |
| `tb/tb_vga_top_full.sv` | the whole design at its defaults, 180 frames (3 s of video, about 100 s of simulation). It checks every pixel, both bounces, the 59.98 Hz frame rate and the ball's pixel count. |

`tb/vga_pin_checker.sv` is used by both top-level benches. It works like a
monitor and uses only the board clock, the reset and the pins. It finds the
pixel phase from the first HSYNC edge. It rebuilds row and column from the ends
of the sync pulses and the back porches. It compares each pixel with its own
model of the ball.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vga_pkg.sv rtl/clk_div2.sv rtl/vga_sync.sv rtl/ball.sv rtl/vga_top.sv \
    tb/vga_pin_checker.sv tb/tb_vga_top.sv --top-module tb_vga_top -Mdir obj
./obj/Vtb_vga_top
```

For the others, swap the testbench file and `--top-module`. The block benches
need only `vga_pkg.sv` and their own module. The simulator is two-state, so every
register that the outputs depend on is reset. The checkers ignore the pins while
reset is asserted.

## How far to trust it

- The timing, blanking, sync widths and the ball's motion are checked every
  pixel. This was done at full size over 180 frames, and on a small raster with
  all four bounces.
- The design has not been run on hardware.
- The analog levels above are a calculation, not a measurement.
- The 521-line frame follows the original lab's timing table. Most monitors
  lock to it, but some expect the 525-line standard. If a monitor does not sync,
  set `V_BP = 33`.

# Wireframe 3D line accelerator with HDMI output

A small FPGA graphics engine that draws 3D wireframes. A host processor
hands it one edge at a time: two 3D points and a rotation angle. The engine
turns the points about the vertical axis, projects them in perspective onto
the screen and draws the straight line between them with Bresenham's
algorithm. Pixels go into an on-chip, one-bit-per-pixel frame buffer. A
separate video output reads the buffer continuously and sends it to a monitor
over HDMI as a 1024 x 576, 60 Hz black-and-white picture.

The whole design is sized for an 8k-logic-element FPGA with about 378 kbit of
block RAM. That memory limit shapes most of the design. It is why the
picture is one bit per pixel, why the buffer is only 512 pixels wide, and why
one divider is shared by all the projection arithmetic.

```
 host (Avalon-MM) --> avalon_regs --> perspective_gen --> line_gen --> frame_buffer --> hdmi_out --> 4 TMDS lines
                         ^  (finished flag)                  |            (port A)  (port B)
                         +-----------------------------------+
```

`gfx3d_top` wires these blocks together. The host processor, its bus
fabric, the clock PLL and the differential output pads are outside the RTL.
The top therefore has the Avalon slave port, three clocks with their resets,
and the serial lines as its ports.

## Drawing one edge, step by step

1. The host writes the first point (offset 1), the second point (offset 2)
   and the angle (offset 3). It then writes 1 to offset 0.
2. `avalon_regs` sends a one-cycle `draw` pulse and marks itself busy. From
   then on, offset 0 reads 0.
3. `perspective_gen` looks up sin and cos of the angle, rotates both points
   and runs four divisions, one after the other, on one shared divider.
   After 113 cycles it hands two screen points to the line generator.
4. `line_gen` walks the line pixel by pixel. For each pixel it reads the
   frame-buffer row, ORs in the pixel and writes the row back. When it
   reaches the end point it pulses `done`.
5. `done` clears the busy flag, so offset 0 reads 1 again. The host polls
   for this before it sends the next edge. A draw or clear written while the
   engine is busy is ignored.

Clearing the screen (write 1 to offset 4) goes straight to the line
generator. It writes zeros to all 576 rows, one row per cycle.

## Register map

All registers are 32 bits wide. Offsets are word offsets, so the byte
address is base + 4 x offset. The bus has no wait states. Read data comes
one cycle after the read.

| Offset | Access | Contents |
|---|---|---|
| 0 | write | 1 in bit 0: draw the line between the two points |
| 1 | write | first point: X in [29:20], Y in [19:10], Z in [9:0], each 10-bit two's complement; [31:30] ignored |
| 2 | write | second point, same format |
| 3 | write | rotation about Y, [6:0]: 0..127 covers one full turn (2.8125 degrees per step) |
| 4 | write | 1 in bit 0: clear the screen |
| 0 | read  | bit 0 = 1 when no operation is running |

## Arithmetic of the perspective generator

The hardest part to follow is how the fixed-point numbers flow through this
block. All of it is integer arithmetic:

* **sin/cos table** (`sincos_rom`). Entry k holds round(256 x sin(2 pi k/128)),
  as a 10-bit signed value, so 1.0 is stored as 256. Cosine uses the same
  table a quarter turn (32 entries) further on. The table is computed during
  elaboration by a constant function. That function folds k into the first
  quadrant and sums a Taylor series to x^11 in 64-bit Q30 arithmetic. The
  result is exact to the last bit of the 8-bit fraction. No data file is
  read. The lookup is registered.
* **Rotation** (`rotator_y`). It computes x' = (x cos + z sin) >>> 8,
  y' = y and z' = (z cos - x sin) >>> 8. The arithmetic shift rounds toward
  minus infinity. |x'| and |z'| stay below 512 x sqrt(2), so the results are
  12-bit signed.
* **Projection**. It computes x_s = x' x 256 / (z' + 256) and
  y_s = y x 256 / (z' + 256). The viewer is 256 units in front of the
  origin. `divider` is a signed restoring divider that truncates toward zero
  and produces one quotient bit per cycle (24-bit numerator, 16-bit
  denominator, 25 cycles per division). If z' + 256 <= 0, the point is at or
  behind the viewer, and the denominator is replaced by 1.
* **Screen mapping**. X = 256 + x_s and Y = 288 - y_s. This puts the origin
  at the centre of the 512 x 576 buffer, with +Y pointing up on screen. Both
  values are saturated to 12-bit signed (-2048..2047), so a point close to
  the viewer cannot make an endless line.

Latency from `start` to `out_valid` is 4 x 27 + 5 = 113 cycles.

## The line generator state machine

`line_gen` uses six states:

| State | Work |
|---|---|
| S0 | idle; `clear` goes to S5; `draw` captures both end points and goes to S1 |
| S1 | width dx = abs(x1-x0), height dy = abs(y1-y0) |
| S2 | step directions and initial error err = dx - dy |
| S3 | read-modify-write the current pixel: cycle 1 reads row y, cycle 2 writes row \| (1 << x); ends in S0 at the end point, else goes to S4 |
| S4 | e2 = 2 err; if e2 > -dy, step x; if e2 < dx, step y; back to S3 |
| S5 | write zeros to one row per cycle; back to S0 after the last row |

The OR in S3 is what keeps earlier lines on screen. A row is 512 bits, so
adding one pixel needs the old row. A pixel that falls outside the
512 x 576 buffer takes one S3 cycle and no memory access. This way a line
that leaves the screen is cut off cleanly instead of wrapping around. For a
line of n pixels that is fully on screen, `done` comes 3n + 1 cycles after
the draw was taken. A clear takes 576 cycles. If `draw` and `clear` arrive
together, clear wins.

## Frame buffer and video output

`frame_buffer` is a 576-row x 512-bit dual-port RAM. Row y is screen line y,
and bit x of a row is pixel x. Port A (drawing clock) reads and writes.
Port B (pixel clock) only reads. A read during a write on port A returns the
old row. Because the two ports are independent, the video never waits for
drawing. The cost is that a frame can show a picture that is half redrawn,
because there is no vertical-sync interlock. This is accepted on purpose.

`hdmi_out` contains:

* **Timing** (`video_timing`). A 1120 x 600 raster with a 1024 x 576
  picture. At a 40 MHz pixel clock this gives 59.5 frames/s. Horizontally:
  1024 active pixels, 16 front porch, 32 sync, 48 back porch. Vertically:
  576 active lines, 3 front porch, 5 sync, 16 back porch. Sync is active
  high.
* **Line fetch**. While a line is shown, port B is addressed with that line.
  From the start of horizontal blanking it is addressed with the next line.
  The whole 512-pixel row is therefore ready before the line's first pixel.
* **Pixel doubling**. Picture pixel h shows buffer bit h/2. Each stored
  pixel is two screen pixels wide, so the 512-wide buffer fills the
  1024-wide picture.
* **TMDS** (`tmds_encoder`, three of them). This is the standard DVI 8b/10b
  coding. First the byte is coded to minimise transitions, by XOR or XNOR
  with the previous bit. Then the low byte is inverted when that steers the
  running disparity back toward zero. During blanking one of four control
  symbols is sent. A set pixel is 0xFF on R, G and B, a clear one 0x00.
  hsync and vsync are the blue channel's control bits.
* **Serializer** (`tmds_serializer`). Runs on a 400 MHz bit clock, which
  must be exactly 10 x the pixel clock and phase-locked to it. It sends
  bit 0 of every symbol first. The fourth line carries the pixel clock as
  1111100000. `tmds_p[0..3]` = blue, green, red, clock. `tmds_n` is their
  complement, for the pseudo-differential output pads.

Pipeline: counters, then pixel select, then encoder (three pixel-clock
registers), then the serializer's load (up to ten bit clocks).

## Clocks and resets

| Clock | Used by | Nominal |
|---|---|---|
| `clk` | registers, perspective and line generators, frame-buffer port A | any; the testbench uses 50 MHz |
| `pix_clk` | video timing, frame-buffer port B, encoders | 40 MHz |
| `bit_clk` | serializer | 400 MHz, 10 x `pix_clk`, same PLL |

Each clock has its own active-low reset (`rst_n`, `pix_rst_n`,
`bit_rst_n`), asserted asynchronously. Generating the resets from the PLL
lock is left to the surrounding system. The frame buffer is the only path
between `clk` and the video clocks. The buffer's contents are not reset:
issue a clear after power-up.

## Where this RTL goes beyond the original description

The original description fixes the pipeline and the register map. It also
fixes the 512 x 576 one-bit buffer, the 1120 x 600 raster at 40 MHz with
400 MHz bit clocking, projection with d = 256, the 128-step angle, the six
line-drawing states and the read-modify-write with OR. The following are
choices made here:

* the Avalon timing (no waitrequest, read latency 1), and dropping commands
  written while busy;
* the bit positions of X, Y and Z in the point word (read from the
  MSB-first field list);
* the fixed-point format of sin/cos (8 fraction bits) and the sign
  convention of the rotation;
* the divider itself. The original used a vendor divider block; here it is
  a generic sequential divider with the same truncating result;
* the screen mapping (centre origin, Y up), the clamp for points behind the
  viewer, and saturation and clipping of off-screen coordinates;
* the porch and sync widths and polarity, horizontal pixel doubling, the
  clock-line pattern and the control-bit mapping;
* separate clocks for the frame buffer's two ports.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Reference models (projection, Bresenham,
TMDS decoding) are in `tb/tb_ref_pkg.sv`. `tb/tmds_rx_model.sv` is a
behavioural TMDS receiver. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gfx_pkg.sv tb/tb_ref_pkg.sv tb/tb_gfx3d_top.sv --top-module tb_gfx3d_top
./obj_dir/Vtb_gfx3d_top
```

Replace `tb_gfx3d_top` with any other testbench name.

`tb_gfx3d_top` runs the whole design at its default size through the
register port. It clears the screen and draws the 30 edges of a regular
dodecahedron, first unrotated, then turned by 7 steps. It adds lines that
run off screen or start behind the viewer, and writes a draw while busy. It
compares the frame buffer with the reference model after each phase. It
then captures one complete video frame from the serial lines and checks
every pixel against the buffer. It counts each mechanism and fails if one
never happened: clear, rotation, OR-merging of overlapping lines, clipping,
the behind-viewer clamp, a dropped command, a busy status, sync pulses,
drawing writes during active video, and a full frame. It runs in about 15 s.

The block testbenches are:
* `tb_line_gen`: random and off-screen lines on a 64 x 48 buffer, against a
  software Bresenham, with exact cycle counts.
* `tb_perspective_gen`: 200+ random point pairs, with the latency checked.
* `tb_divider`: random and corner-case divisions.
* `tb_sincos_rom`: all 128 table entries.
* `tb_rotator_y`: random rotations.
* `tb_tmds_encoder`: round trip through the decoder, plus disparity bounds
  and control symbols.
* `tb_tmds_serializer`: symbol recovery through the receiver model.
* `tb_hdmi_out`: two whole frames on a small raster.
* `tb_video_timing`: the default raster.
* `tb_frame_buffer`: both ports.
* `tb_avalon_regs`: the register map and the busy handshake.

## Size

Synthesised generically, the design has about 640 flip-flops and 297,472
memory bits. Of these, 294,912 bits are the frame buffer. The other 2,560
bits are the 128 x 2 x 10-bit sin/cos table, which a synthesis tool may turn
into logic instead. The largest pieces of logic are the 512-bit OR-merge in
the line generator and the 512:1 pixel multiplexer in the video output.

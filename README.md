# Caricatron

The Caricatron turns a camera snapshot into a line drawing. It grabs one
frame from an NTSC video decoder and shows it on a VGA monitor. It then runs a
15x15 Laplacian-of-Gaussian edge filter over the frame and shows the edge map.
Next it traces the edge pixels into short curves and stores each curve as a
cubic Bezier segment: two end points and two control points. Finally it sends
the curves to a PostScript printer over a Centronics parallel port. The user
drives it with three push buttons:

- **continue** moves to the next stage;
- **reject** retakes the snapshot while an image or edge map is on screen;
- **reset** starts over.

Everything here is synthesizable SystemVerilog written for one FPGA clocked at
27 MHz, with a 31.5 MHz pixel clock for the VGA output.

## Data flow and memories

```
 BT.656 ──► video_fifo ──► capture_video ──► luminance RAM (8 bit, 320x256 words)
 (clktv)     (to clk)                            │          ▲
                                                 ▼          │ vga_out (clk31)
                              image_processor: edge filter  │
                                                 ▼          │
                                     edge RAM (16 bit) ─────┘
                                                 │ curve tracing
                                                 ▼
                                     object RAM (68 bit x 2048) ──► ps_printer ──► spp_port ──► printer
```

There are three single-port RAMs:

- **Image RAMs.** The luminance RAM and the edge RAM are addressed by
  `{x[8:0], y[7:0]}` (17 bits). Because x never reaches 320, each holds only
  320 x 256 = 81,920 words.
- **Object RAM.** It holds 2048 objects of 68 bits each,
  `{start, end, ctrl1, ctrl2}`. Each point is a 17-bit `{x,y}` (`curve_t` in
  `caricatron_pkg`).

All RAMs are written as arrays and clocked on the **falling** edge. A unit
presents an address after a rising edge. The RAM samples it half a cycle later,
once every address bit has settled, and the word is ready at the next rising
edge. So every unit in this design reads a RAM word at the end of the same
cycle in which it drove the address. Nothing waits a cycle for RAM data.

Each image RAM also takes its *clock* from its current owner. The owner is the
processing unit or the capture logic at 27 MHz, or the VGA output at 31.5 MHz.
`top_mux` switches the address, data and clock together according to the
master state. It switches only between stages, while no one is using the RAM.
The luminance RAM has one writer, the capture logic, and the edge RAM has one,
the processing unit, so their write signals bypass the multiplexer.

## Control

`caricatron_fsm` has these states:

`IDLE → GRAB → SHOW_IMAGE → EDGE → SHOW_EDGES → LINE → PRINT → IDLE`

- It starts each stage with a one-cycle pulse and waits for that stage's
  one-cycle done pulse.
- **continue** leaves IDLE and the two SHOW states.
- **reject** in either SHOW state goes back to GRAB.
- The state also drives the RAM multiplexer and the state LEDs.

`sync_debounce` conditions each button:

1. It synchronises the button with two flip-flops.
2. It emits one pulse per press.
3. It then ignores the button for `DEBOUNCE_CYCLES` clocks, about 1 s at
   27 MHz.

With a lockout of 0 the same module serves as the reset synchroniser.

## Video capture

The decoder produces an ITU-R BT.656 stream: Cb Y Cr Y ... with timing codes
`3FF 000 000 XY`.

`video_fifo` moves the samples from the decoder clock to the system clock.
Both clocks run at 27 MHz but are unrelated. The FIFO is an 8-entry ring whose
read pointer trails the write pointer by four entries, with no flow control.

To capture a frame, `capture_video` works in this order:

1. It waits for the end-of-active-video code of a field-1 blanking line
   (XY = B6), which finds the top of a frame.
2. It waits for the start code of an active field-1 line (XY = 80).
3. It skips the first chrominance sample and stores every fourth sample after
   it, which is every other luminance value.
4. After 320 values it waits for the next start-of-active-video code.
5. After 240 lines it pulses done.

The codes are compared on the upper 8 bits of the 10-bit samples.

## VGA display

`vga_out` generates 640x480 at 72 Hz:

- 832 x 520 counts in total;
- front porch, sync and back porch of 24/40/128 pixels and 9/3/28 lines;
- both syncs active low.

It shows the 320x240 image pixel-doubled, reading RAM address
`{h>>1, v>>1}`. The word returns one clock later and is held in a colour
register for the DAC. Blank and composite sync (both active low) are registered
on the same clock. The separate hsync/vsync lines go straight to the
connector, so they are delayed by two more clocks to line up with the DAC's
pipeline.

In SHOW_EDGES a pixel is white when its filter value is an edge and black
otherwise.

## Edge filter

`convolve_fsm` visits every pixel in raster order and issues the 225 window
samples `(x+i-7, y+j-7)` one per clock:

- `log_rom` supplies coefficient `{j,i}`.
- `force_zero` replaces any sample outside the image with 0, which frames the
  image with seven pixels of zeros.
- `mac_slow` multiplies the unsigned 8-bit sample by the 16-bit sign-magnitude
  coefficient and adds the product to a 32-bit accumulator.
- The result is `|acc| >> 16` with the accumulator's sign, in 16-bit
  sign-magnitude.

Each pixel costs 228 clocks: 225 issue cycles, two to drain the pipeline and one
to write. A full frame therefore takes 76,800 × 228 ≈ 17.5 M clocks, about
0.65 s.

The kernel has a negative centre of −10535 and these positive values around
it:

- 1014 on the four side neighbours;
- 135 on the diagonals;
- 28 on the next ring;
- 27 everywhere else.

A pixel is an **edge** when its filter value is positive and above the 8-bit
`thresh` switches (`is_edge` in the package).

## Curve tracing

This is the least obvious part of the design. `major_filtering_fsm` sequences
it and owns the edge-RAM and object-RAM ports.

1. **Find a start pixel** (`find_pix_fsm`). The unit scans the edge RAM in
   raster order, one pixel per clock. When it finds an edge pixel it reads that
   pixel's eight neighbours. If any neighbour inside the image is also an edge,
   it reports the pixel and pauses. A resume request continues the scan from
   that same pixel. If the scan passes the last pixel, line detection is over.
2. **First step** (`extract_curve_fsm` with `init_gradient`).
   - The unit reads the 3x3 square around the start pixel (nine clocks).
   - It clears the start pixel in the edge RAM.
   - It takes as the first step `Pg` the neighbour whose value differs least
     from the centre value. Ties go to the earlier neighbour in raster order.
3. **Walk.** While `Pg` is inside the image and is an edge pixel:
   - `Pg` becomes the current pixel and is cleared. Because visited pixels are
     cleared, the walk cannot return to them, and the search in step 1 never
     finds the same curve twice.
   - `next_pixel` takes the direction from the previous pixel to `Pg` and
     gives three candidates around `Pg`: straight on and ±45°.
   - The candidates are read (three clocks), and `gradient` picks the one
     closest in value to the current pixel as the next `Pg`.

   Each accepted pixel costs 5 clocks. A curve of n pixels costs
   13 + 5(n−1) clocks.
4. **Store.** The curve is written to the object RAM as
   `{start, end, ctrl1, ctrl2}`:
   - `end` is the last edge pixel accepted.
   - Both control points are `(largest x, largest y)` of the curve's pixels,
     kept by two `max_track` units.

   The controller then resumes the search.
5. Line detection stops when the scan is exhausted or when 2048 objects have
   been written (`MAX_OBJECTS`).

## Printing

`ps_printer` reads the objects back and produces this character stream:

```
%!PS
/curve { 8 -2 roll moveto curveto stroke } def
72 720 translate 1 -1 scale
x0 y0 x1 y1 x2 y2 x3 y3 curve        (one line per object)
showpage
```

The points in each line are the start point, the two control points and the
end point, in decimal without leading zeros. The prolog makes `curve` move to
the start point and draw the Bezier. It also flips the y axis so that image
rows run down the page, one unit per pixel.

`spp_port` sends each character in three phases:

1. It puts the byte on the data lines for `T_SETUP` clocks.
2. It pulses nStrobe low for `T_STROBE` clocks.
3. It holds the data for `T_HOLD` clocks.

It then waits for Busy to fall, or for an nAck pulse, before taking the next
character. The default of 14 clocks is the IEEE 1284 compatibility-mode
minimum of 0.5 µs at 27 MHz.

## Where this design makes its own choices

The original project describes these stages, their order, the RAM sizes and
organisation, the falling-edge RAMs, the filter's size, formats and
coefficients, and the curve-following rule. The following details are this
design's own:

- **Control points.** The original says only that maximum-x and maximum-y
  trackers compute them. Here both control points equal `(max x, max y)`.
  This is a faithful but crude reading: the Bezier segments bulge toward the
  lower right of their bounding box.
- **End of a curve.** The curve ends at the last edge pixel accepted, not at
  the first non-edge pixel probed.
- **Showing the edge map.** There is a separate state that shows the edge map
  (white/black) before line detection.
- **Handing over the object count.** The number of objects passes from line
  detection to the printer on a port.
- **Printer side.** The original project describes the printer path only in
  outline (a prolog, one `curve` command per object, SPP handshaking), and its
  own printer module never worked on the hardware. The PostScript prolog text,
  the character generator and the parallel-port timing (taken from the
  IEEE 1284 standard) are therefore this design's own. They are checked only
  against the printer model in `tb/`, not against a real printer.
- **Curvature exaggeration.** The original planned to exaggerate the curves to
  give a cartoon look, but never specified how. It is not built here; the
  curves are printed as traced.

## Files

- `rtl/caricatron_pkg.sv` holds the shared types (`pix_t`, `curve_t`,
  `master_state_t`) and helpers (`is_edge`, `grad`).
- There is one module per file in `rtl/`. The top is `caricatron_top`.
  `image_processor` groups the edge filter and the curve tracing.
- `tb/tb_<module>.sv` is a self-checking testbench for each module. Each one
  ends by printing `TB_RESULT checks=N failures=M`.
- `tb/bt656_gen.sv` generates a synthetic BT.656 camera frame.
- `tb/spp_printer_model.sv` is a parallel-port printer. It has a busy time and
  checks setup and strobe widths.

### System testbenches

- **`tb_caricatron_top`** runs the whole pipeline on a 40x24 image with a short
  button lockout and room for 6 objects. It checks:
  - the captured image, against the frame generator;
  - every edge-filter value, against a convolution computed in the testbench;
  - that every stored curve starts and ends on an edge pixel;
  - that the printer received exactly the PostScript text expected for the
    stored objects.

  It also counts these mechanisms and fails if any never happened:
  - bounce suppression;
  - reject and retake;
  - zero padding;
  - curve end;
  - a full object RAM;
  - printer busy;
  - both display modes.
- **`tb_caricatron_full`** is the same test with every parameter at its default
  (320x240, 2048 objects, 1 s button lockout). It takes about 3 minutes in
  Verilator. On its synthetic scene the object RAM fills at 2048 objects, and
  about 70 kB of PostScript go to the printer model.

### Simulating

Run Verilator from the repository root. For example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_caricatron_top rtl/caricatron_pkg.sv tb/tb_caricatron_top.sv
./obj_dir/Vtb_caricatron_top
```

Any `tb_<name>` works the same way. Simulation is two-state: every register
that is read is reset. The reduced sizes in the system testbench are ordinary
parameters of `caricatron_top` (`IMG_W`, `IMG_H`, `DEBOUNCE_CYCLES`,
`MAX_OBJECTS`, `T_SPP`). Widths of the `{x,y}` address stay at 9+8 bits for any
image up to 512x256.

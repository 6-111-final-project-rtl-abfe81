# GPS track logger and hardware track renderer

Two FPGA designs share one removable SPI flash chip.

- **The logger** is a small board carried along on a trip. It configures a SiRF StarIII GPS receiver and parses the receiver's binary navigation messages. Every position fix becomes a 16-byte record in a 16 Mbit M25P16 flash.
- **The visualizer** runs on a board that has a VGA output, a PS/2 wheel mouse and two ZBT SRAMs. It reads the log back from the flash and draws the track on a 640x480 screen. Three plots are available: altitude against time, a map coloured by speed, and a rotatable 3D view.

The visualizer is built around a small command-driven graphics pipeline. Plot modules do almost no arithmetic themselves. Each one is a state machine that sends rendering commands, such as "set the view", "draw this line between these two world points" or "fill this rectangle at 50 % opacity". A three-stage pipeline (transform, draw, colour) turns those commands into pixels. The pixels are written to whichever of the two ZBT RAMs is not on screen, and the two RAMs swap roles during vertical blanking.

Top level: `gps_system_top` instantiates `logger_top` and `visualizer_top` side by side. Each has its own clock and reset, and each has its own set of flash pins.

## Rendering commands

A command is a 136-bit packed struct, `gps_pkg::cmd_t`. From the most significant bit down it holds:

| field | bits | meaning |
|---|---|---|
| `mgr` | 3 | manager opcode: `RERENDER` (start a frame), `COMPLETE` (frame finished) |
| `xf` | 3 | transform opcode: `NULL` (bypass), `2D_POINTS`, `3D_POINTS`, `2D_RECT`, `2D_SETVIEW`, `3D_SETROW0/1`, `3D_SETVIEW` |
| `draw` | 3 | `NONE`, `TEXT`, `RECT`, `LINE` |
| `color` | 3 | `NONE`, `OVERWRITE`, `ALPHA` |
| `v[3:0]` | 4 x 24 | operands. These are world coordinates before the transform stage and screen coordinates after it. 3D points and 3D view rows pack six 16-bit values into the same 96 bits (`pack6`). |
| `rgb` | 24 | colour |
| `alpha` | 4 | opacity of the new colour, in 16ths |

The all-zero command `CMD_NOOP` does nothing in any stage. Each stage acts only on its own opcode field and passes the other fields along.

- View-setting commands stop at the transform stage: their `draw` field is `NONE`.
- Manager commands never enter the pipeline. The rendering manager answers them itself.

## Flow control: the shared `advance` signal

Every pipeline module has an `adv_out` output. The AND of all of them is fed back to every module as `advance`, and a stage takes a new command only in a cycle where `advance` is high. A module that needs more time pulls its `adv_out` low, and this freezes everything upstream of it.

- The 3D transform stalls for 12 cycles per point pair, because it has one multiplier.
- Rectangle, line and text drawing stall for as long as they are emitting pixels.
- The pixel stage stalls for two cycles on every alpha-blended pixel. In that time it reads the old colour from VRAM, mixes it with the new one and writes the result back.

A stage that stalls must keep its output stable, because the stage after it may still be working on that output.

One addition makes this work in practice. Between the draw stage and the pixel stage there is a `pix_valid`/`pix_ready` handshake. A single line command can produce hundreds of pixels, so the draw modules need to see each pixel accepted individually. The pipeline-wide `advance` only moves whole commands.

The three transform modules each output `CMD_NOOP` for commands they do not claim, so their outputs are simply ORed. The three draw modules are combined the same way. A run-time assertion checks that only one draw module emits pixels at a time.

`render_pipeline` wires all of this together. `tb_render_pipeline` pushes a mixed command stream through it and compares every RAM word with a reference image that the testbench computes itself.

## Frames, the rendering manager and VRAM swapping

A plot module is idle until something changes: it becomes active, or the mouse pans, zooms or rotates its view. It then sends one frame:

1. `RERENDER`. The manager pulses `restart`, which makes the flash reader, log decoder and fix queue start again from the beginning of the log.
2. The view commands: one for a 2D plot, three for the 3D plot.
3. The background, as a full-screen rectangle.
4. Two axis lines and a translucent label panel, drawn with alpha blending. The plot name is then drawn as text.
5. One line command per pair of consecutive fixes, until a fix with the EOF flag arrives. Coordinates are sent relative to the first fix of the frame, so that 24-bit (2D) or 16-bit (3D) operands are enough.
6. `COMPLETE`. The manager waits until the pipeline is idle, so that the last pixel is in RAM, and then raises `swap`.

The VRAM manager waits for the next low phase of `vsync` and swaps the two RAMs. It then pulses `swapped`, and only then does the manager acknowledge `COMPLETE`. This way the next frame can never be drawn into the RAM that is on screen.

The manager hands a command to the pipeline only in a cycle where `advance` is high, and it acknowledges it to the plot module (`vis_taken`) in that same cycle.

Mouse bindings:

- A middle-button click selects the next plot (`active` = 1, 2, 3, then wraps).
- Left button plus movement pans.
- The wheel zooms in factors of two.
- In the 3D plot, right button plus horizontal movement rotates the view about the vertical axis in 22.5-degree steps.

### VRAM and ZBT timing

Each RAM word is 36 bits, with the colour in bits 23:0. The address is `{y[8:0], x[9:0]}`, so one 512K-word ZBT holds one frame. The RAMs are modelled as pipelined ZBT parts. For a read, data appears two clocks after the address. For a write, the data must be driven two clocks after the address. `vram_manager` routes the pixel stage to the inactive RAM and the VGA reader to the active one. It also delays the write data by two cycles for the RAM.

`vga_out` produces standard 640x480 timing at a 25 MHz pixel clock. It requests addresses `LAT` = 2 cycles ahead, so the RAM data arrives just in time for each pixel.

## Alpha blending

For `ALPHA` commands, `pixel_fill` reads the old pixel, waits `RD_LAT` cycles and writes this value per 8-bit channel:

    out = (new * (a + 1) + old * (15 - a)) / 16

Here `a` is the 4-bit alpha. With `a = 15` the result is the new colour exactly. With `a = 0` it is 1/16 of the new colour plus 15/16 of the old one. `OVERWRITE` writes one pixel per cycle without reading.

## Transforms

- **2D** (`xform_2d`), one command per cycle:
  - `x' = X0 + (((x - OX) * SX) >>> (8 + SH))`, and the same for y.
  - SX and SY are signed 12-bit scales, so a negative SY puts north at the top of the screen.
  - `2D_POINTS` transforms two points, ready for a line.
  - `2D_RECT` transforms both corners of a rectangle and returns its corner and size.
- **3D** (`xform_3d`):
  - `x' = CX + ((R0 . p) >>> (14 + SH))` and `y' = CY + ((R1 . p) >>> (14 + SH))`.
  - R0 and R1 are two rows of a rotation-and-projection matrix, in Q2.14. The 3D plot computes them from its view angle with a small sine table.
- **Null** (`xform_null`) passes `xf = NULL` commands unchanged. Use it for absolute screen coordinates such as backgrounds, axes and labels.

## Drawing

- **`rect_fill`** walks the rectangle row by row. Pixels outside the 640x480 screen are skipped.
- **`line_draw`** uses Bresenham's algorithm: one pixel per cycle, end points included, 8-connected. Off-screen pixels are skipped.
- **`text_draw`** draws up to six characters per command, first character in the top byte of `{v3, v2}`.
  - Glyphs are 5x7 pixels in 6-pixel cells.
  - They come from a 64-entry ROM (`rtl/font8x8.hex`, ASCII 20h to 5Fh, eight rows per glyph, bit 7 leftmost). The file is loaded with `$readmemh("rtl/font8x8.hex")`, so simulations must run from the directory that contains `rtl/`.
  - Lower-case letters are drawn as capitals.

## Logger and the log format

```
GPS --uart_rx--> sirf_parser --fix--> log_encoder --byte--> flash_writer --SPI--> M25P16
 ^-- uart_tx <-- sirf_init (after reset)
```

- **`sirf_init`** waits `START_DELAY` cycles after reset, then sends one SiRF binary frame: `A0 A2`, length, payload, 15-bit checksum, `B0 B3`. The default payload is message 166, which sets the geodetic navigation message (41) to one per second.
- **`sirf_parser`** frames messages and verifies the checksum. It keeps message 41 only when the navigation-valid word is 0. It extracts these fields, all big-endian at fixed byte offsets that are parameters:
  - time of week;
  - latitude and longitude (1e-7 degrees);
  - altitude above mean sea level (cm);
  - speed and course over ground, packed as `vel = {SOG, COG}`.
- **`log_encoder`** works in this order:
  1. After reset, it bulk-erases the flash.
  2. On the first fix, it writes the start record.
  3. It writes one data record per fix.
  4. When `stop` is pulsed, or the flash is one record from full, it writes the end record.

  It holds one fix while a record is being written, and counts and drops fixes that arrive in the meantime. `finished` rises once the last byte of the end record is programmed.
- **`flash_writer`** issues `WREN` and `PP` (one byte per page program), or `WREN` and `BE`. It then polls `RDSR` until the write is complete before raising `ready` again.

All records are 16 bytes, big-endian:

| record | bytes 0-3 | 4-7 | 8-11 | 12-15 |
|---|---|---|---|---|
| start | 47505331h ("GPS1") | time of week of first fix | 0 | 0 |
| data | latitude | longitude | altitude | velocity |
| end | 454E4421h ("END!") | 0 | 0 | 0 |

On the visualizer side:

- **`flash_reader`** issues one `READ` (03h) from address 0 and keeps it open, clocking out one byte per `next`. `restart` closes it and starts again.
- **`log_decoder`** checks the start magic, then rebuilds 129-bit fixes `{eof, lat, lon, alt, vel}`. The end magic, or an erased word (FFFFFFFFh, for a log whose power was cut), produces a fix with `eof = 1` and ends the log. A missing start magic means an empty log.
- **`fix_queue`** is a 128-deep block-RAM FIFO with a registered output.

Capacity: 2,097,152 bytes / 16 = 131,072 records. After the start and end records that leaves 131,070 fixes, or 36.4 hours at one fix per second.

## Clocks and sizes

| | clock | notes |
|---|---|---|
| logger | `CLK_HZ` = 50 MHz | UART 9600 baud 8N1; SPI clock = clk / (2 * `SPI_HALF`) = 25 MHz |
| visualizer | 25 MHz (pixel clock) | one clock domain for the pipeline, VRAM and VGA |

Every parameter default is the full size; nothing is scaled down. The system testbench runs at these defaults.

## Where this design departs from the proposal it follows

- **Command width.** Commands are 136 bits rather than 128, with four 3-bit opcodes (one for the manager) instead of three.
- **Opcode values.** The proposal only sketches the opcodes. Bypass, 2D, 3D, text and rectangle use the values it suggests; the others are this design's.
- **`advance`.** It is not a single bidirectional wire: each module has an `adv_out` output and an `advance` input, and the ANDing is done outside the modules. The draw-to-pixel handshake described above is an addition.
- **Plots.** Three plots are built:
  - altitude against time;
  - 2D position with speed as colour;
  - 3D position with altitude.

  Not built:
  - velocity against time;
  - the 3D and colour-plus-altitude variants;
  - "summary information" text;
  - rotation about more than one axis (only rotation about the vertical axis exists).

  Constant commands are produced by the state machine rather than read from a ROM.
- **Velocity.** The proposal calls velocity "x/y velocity". Here it is speed and course over ground, 16 bits each, because that is what the receiver's navigation message provides.
- **Flash writer.** It programs every byte with its own page-program command. It does not batch writes or put the flash into deep power-down between them.
- **Flash pins.** Both flash controllers drive a chip-select pin, which the real part needs, in addition to clock, data in and data out.
- **Mouse.** The decoder only receives. It does not send the commands that switch a mouse into wheel (4-byte) mode, so the mouse must already be in that mode.
- **Plot selection.** The active plot is chosen with the middle button rather than by "mouse movement".
- **Swap timing.** The rendering manager waits for the pipeline to drain before asking for a swap.
- **Log format.** The record layouts, the magic numbers, erased-flash handling and the way the logger is told to stop (`stop` input) are this design's.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints `TB_RESULT checks=N failures=M`. Stimulus is random (`$urandom`) where that makes sense. Three behavioural models are used:

- `tb/m25p16_model.sv`: the SPI flash, with its status register and write-in-progress delays. It counts erases and programs.
- `tb/zbt_model.sv`: a pipelined ZBT SRAM. It flags bus conflicts.
- A SiRF frame generator and a PS/2 mouse driver, inside the testbenches.

Highlights:

- **`tb_line_draw`** checks properties of random lines rather than fixed images: pixel count, end points, 8-connectivity, and distance from the ideal line under half a pixel.
- **`tb_render_pipeline`** compares the whole frame buffer against a reference image that the testbench computes itself, alpha blending included.
- **`tb_gps_system_top`** runs `gps_system_top` at its default parameters, about 35 s of simulation time:
  1. The logger is fed fixes (including an invalid one and one with a bad checksum) and then stopped.
  2. The flash contents are checked record by record.
  3. The same flash model is moved to the visualizer.
  4. The testbench then clicks, drags and scrolls the mouse to visit all three plots.

  It checks the number of frames and swaps, and that nothing is redrawn without a change. It also checks that the 2D and 3D paths, the bypass path, rectangle, line and text drawing, overwrite and alpha blending are all used. Finally it checks that background and track pixels reach the RAM and that the ZBT bus never sees a conflict.

To simulate one module with plain Verilator, from the directory that contains `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
        --top-module tb_line_draw rtl/gps_pkg.sv tb/tb_line_draw.sv
    ./obj_dir/Vtb_line_draw

Replace `line_draw` with any other module name. The package must come first on the command line, and the other modules are found through `-y`.

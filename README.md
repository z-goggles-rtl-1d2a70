# Z-Goggles video processor

Z-Goggles is a wearable video goggle: a small camera looks ahead of the wearer, an
FPGA changes the picture, and a 640x480 LCD in front of the eyes shows the result.
The wearer can turn the picture upside down, make it a photo-negative, blur it, or
reduce it to its edges. This repository holds synthesizable SystemVerilog for the
FPGA part of that system: camera capture, the frame store and its controller, the
display read-out with the image functions, the VGA output and the switch logic.

The main difficulty is that the camera and the display run from clocks that have
nothing to do with each other (27 MHz and 25 MHz), and that the only frame memory
is two ordinary single-port SRAM chips sharing one address bus and one data bus.
A frame has to be written by one clock and read by the other through that single
port without the two streams corrupting each other. Most of the design, and most of
this text, is about that.

## Overview

```
 camera clock (27 MHz)                      system clock (100 MHz, pixel enable every 4th cycle)
 ------------------------------------       -----------------------------------------------------------
 cam_framer -> yuv2rgb -> frame_writer  ==>  mem_ctrl <==> 2 x SRAM 256k x 16 (shared bus)
  (sync tracking,  (YUV to   (address map,     ^ reads        |
   word pairing)    RGB565)   vertical flip)   |              v
                                             pix_fetch (3x3 cache) -> sobel_edge | blur3x3 | centre
                                             vga_timing -^                 -> color_invert -> palette_shift
                                                                           -> vga_out -> DAC, HSYNC, VSYNC
                                             ui_ctrl (switches -> mode, invalid LED)   test_pattern -^
```

`zgoggles_top` wires these together. Its SRAM data bus is split into
`sram_dq_o` / `sram_dq_oe` / `sram_dq_i`; on an FPGA these become one tristate bus
at the pad.

## Pixel format and the frame store

A stored pixel is one 16-bit word in RGB 5-6-5. Colour conversion happens before
the write, so everything on the read side works on RGB.

The address is the pixel's coordinates with no arithmetic at all:

| SRAM address pin | meaning |
|---|---|
| `[8:0]`   | column x (0..511) |
| `[17:9]`  | line y (0..511) |

The MSB of y also drives the chip enables (`sram_ce_n`): lines 0-255 live in chip 0
and lines 256-511 in chip 1. Only half of each chip is ever used. That wastes
memory, but the address needs no multiplier and adds no latency. The stored
image is `IMG_W x IMG_H` = 320 x 480 pixels. The camera delivers one pixel as two
16-bit words, so a 640-word camera line holds 320 pixels. On the display each stored
pixel is shown in two adjacent columns to fill 640; lines are shown one to one.

## Camera side (`cam_framer`, `yuv2rgb`, `frame_writer`)

The framer follows the camera's three timing signals on the camera's own clock.
VSYNC high resets the column and line counters. While HSYNC is high each clock
carries half a pixel: first a `{Y,U}` word, then a `{Y,V}` word, Y in the upper
byte. The falling edge of HSYNC moves to the next line. When the second word
arrives, a pixel is emitted for one clock. It carries its column, its line, the
mean of its two Y samples, and U and V.

`yuv2rgb` converts with shift-and-add approximations of the standard equations:

    R = Y + 1.5 V        G = Y - 0.5 U - 0.5 V        B = Y + 2 U

U and V are centred on 128. Each result is clamped to 0..255 and truncated to
5/6/5 bits. The colours are slightly off compared with the exact coefficients
(1.398, 0.395, 0.561, 2.032). They are off in the same way everywhere in the
picture, which is what matters here.

`frame_writer` computes the address. When the vertical flip is on, it stores each
pixel at the mirrored position in both axes: x' = IMG_W-1-x and y' = IMG_H-1-y.
The top-left camera pixel therefore lands bottom-right, and the read side needs no
change at all. The flip setting is adopted only at a frame start, so a frame is
never stored half flipped.

Each write request crosses into the system clock as a *toggle*. `wr_tog` flips once
per pixel, and `wr_addr` / `wr_data` are updated on the same edge and then held for
at least two camera clocks. The controller passes the toggle through a two-flop
synchronizer. When it sees the toggle change, it samples the held address and
data, which by then have been stable for several of its cycles.

## Memory controller (`mem_ctrl`)

The controller runs at 100 MHz, so one cycle equals the SRAM's 10 ns access time.
It has one read port, used by the display side in the same clock domain, and one
write port, fed by the synchronized camera toggle. Its rules favour reads. A late
read shows up at once as a wrong pixel in a fixed place, and such errors form
visible patterns. A late write only matters if it is late by a whole frame.

1. A read request is always served in the next cycle. It takes one cycle, and
   `rd_valid` / `rd_data` appear exactly two cycles after `rd_req`.
2. If a read arrives while a write is under way and the write is not in its last
   cycle, the write is **aborted**. It is kept in the current-write register and
   restarted from its first cycle once no read is pending.
3. If a write arrives while a read or a write is under way, or while older writes
   are waiting, it is **buffered** in a FIFO of `WBUF_DEPTH` entries (default 2).
4. With no read pending and no write running, the oldest waiting write starts:
   first an aborted one, then the FIFO head, then a write that has just arrived.

A write takes `WR_CYCLES` = 2 cycles: first address and data, then WE low.

A write that meets a full buffer is dropped, and `ev_drop` pulses. At the design
rates this does not happen:

- Writes arrive every 7.4 cycles.
- Reads take at most 3 of every 8 cycles.

The full-size simulation sees hundreds of thousands of aborts and buffered writes
and no drop. It drops writes only in a unit test that holds the read request high
on every cycle.

Assertions in the module check three bus rules:

- Both chips are never enabled together.
- The controller never drives the data bus while a chip has OE asserted.
- WE is low only during a write.

## Display side: fetch and the 3x3 cache (`vga_timing`, `pix_fetch`)

`vga_timing` divides the 100 MHz clock by 4 to make the 25 MHz pixel enable `ce`.
It counts 800 x 525 positions (standard 640x480 at 60 Hz, active-low syncs). It also
produces `pclk` for the DAC, which rises in the middle of each pixel. The porch and
sync widths are parameters, because some monitors need hand-tuned values.

Blur and edge detection need each pixel's eight neighbours. `pix_fetch` keeps a
3x3 cache `win[row][col]` whose centre `win[1][1]` is always the stored pixel under
the beam. A stored pixel lasts two display pixels, which is 8 system cycles. On the
second of them (odd `h`) the cache shifts one column left and takes in the column
fetched during the previous 8 cycles. The fetch of the next column starts in the
same cycle:

- blur or edge mode: three reads (line above, centre line, line below), issued on
  consecutive cycles;
- otherwise: one read of the centre line. The other cache rows hold black.

Positions outside the stored image are black and cost no read. Near the end of each
line the fetch already serves the first columns of the next line. The cache is
therefore full when the visible area begins, and the first displayed column sees a
black left neighbour. After a switch between one-read and three-read mode, the first
two columns of the next frame can show the old mode. The tests skip that frame.

An assertion checks that all reads of a column have returned before the next shift.

## Image functions

All of these are combinational, between the cache and the output register.

- **Edge detection** (`sobel_edge`) reduces each cache pixel to the luminance
  L = 2R + G + 2B. It forms the Sobel gradients Gx and Gy from adds, subtracts and
  one-bit shifts. If |Gx| + |Gy| > `EDGE_TH` (default 24) the output is white,
  otherwise black.
- **Blur** (`blur3x3`) sums the nine samples of each channel and divides by nine
  as `(s<<6) - (s<<3) + s`, shifted right by 9, which is s x 57/512. A flat area
  keeps its value exactly.
- The pixel goes on to **invert** (`color_invert`), which subtracts each field from
  31 or 63.
- It then goes to **palette shift** (`palette_shift`), which adds a saturating signed
  offset per field. The offsets are the build-time parameters `PAL_R`, `PAL_G` and
  `PAL_B`; the default is 0. This stage is a tuning aid for whoever builds the
  system, not a user function.
- **Vertical flip** happens at write time (see above), so it combines freely with
  the others.

Edge detection takes precedence over blur, but the user interface never allows both
at once.

## Output (`vga_out`, `test_pattern`)

On every pixel enable, the output register takes three things from the same beam
position, so colour and syncs stay aligned:

- the processed pixel, or the test pattern when `test_mode` is high;
- HSYNC and VSYNC;
- the visible flag.

Outside the visible area the colour is forced to black. This is because the DAC's
own blanking input (`dac_blank_n`) is held inactive and its sync generation is
unused: HSYNC and VSYNC go straight to the monitor. The 5-6-5 fields are widened to
8 bits per channel by repeating their top bits.

The test pattern helps tune a new monitor. It has four parts:

- 60x60 blocks of 20x20 cells in each corner;
- the eight bar colours in bands 80, 40 and 20 pixels wide;
- separate R, G and B ramps, then a ramp over all 16-bit codes;
- grey bars of several widths.

## User interface (`ui_ctrl`)

There is one momentary switch per function: `sw = {edge, blur, invert, flip}`.
Each switch is synchronized and debounced (`DEBOUNCE` = 200,000 cycles, 2 ms).
Every accepted press toggles its function. The new combination is checked before
it takes effect. Blur together with edge detection is refused: the functions stay
as they were and `led_invalid` lights until the next valid change. In the original
system this logic ran as firmware on a small microcontroller next to the switches.
Here it is logic inside the FPGA.

## What is this design's own choice

These points are not fixed by the original system and were chosen here:

- **Clocking.** A single 100 MHz system clock for the controller and display, with
  a 25 MHz pixel enable.
- **Stored image and scaling.** 320 x 480 stored pixels, shown 2x wide.
- **Pixel assembly.** Y is the mean of the two Y samples, and pixels are converted
  to RGB before they are stored.
- **Controller sizes.** 2-cycle writes and a 2-entry write buffer that drops on
  overflow.
- **Reads in window mode.** Three reads per stored pixel, rather than one read
  every 40 ns.
- **Display timing.** Standard 640x480 values rather than per-monitor tuned ones.
- **Edge detection.** The luminance formula and the threshold.
- **Other blocks.** The blur constant, the palette-shift form, the test pattern
  layout, and the invalid combination (blur with edge).

The original system also foresaw several cameras with filtered lenses for infrared
and ultraviolet. Only the single-camera system is built.

Outside the FPGA, none of these parts is modelled in RTL:

- the camera module (C3188A with OV7620 sensor, I2C control left unused);
- the video DAC (THS8133B) and its board;
- the LCD;
- the battery and regulator.

`tb/sram_model.sv` is a behavioural model of the two SRAM chips, for simulation
only.

## Verification

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each compares the
block with a model written independently in the testbench (for example real-number
colour conversion or Sobel kernels as integer arrays). Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_zgoggles_top` runs the whole design at its default size:

- The camera model sends 640-word lines on a 27 MHz clock, and the design uses both
  full-size SRAM chips.
- The test presses the switches with the full debounce time.
- For each mode (plain, flipped, flipped and inverted, blur, edge) it compares
  every visible pixel of a whole display frame with a reference computed from the
  camera scene.
- It spot-checks the test pattern and requires the invalid combination to light
  the LED.
- It counts buffered and aborted writes and fails if a mechanism never happened.

It simulates about 350 ms of video (25 camera frames) in roughly 35 s.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_zgoggles_top rtl/zg_pkg.sv tb/tb_zgoggles_top.sv
./obj_dir/Vtb_zgoggles_top
```

Replace `tb_zgoggles_top` with any other testbench name to test one block.
`zg_pkg.sv` must come first, because every module imports it.

## Changing it

- **Image size:** `IMG_W` and `IMG_H` on `zgoggles_top`. The address map allows up
  to 512 columns and 512 lines. The 2x horizontal scaling is in `pix_fetch`
  (`h / 2`).
- **Monitor timing:** the porch and sync parameters of `vga_timing`. `pix_fetch`
  needs `H_TOTAL` and `V_TOTAL` to match; the top sets them as local parameters.
- **Colour trim:** `PAL_R`, `PAL_G` and `PAL_B`. **Edge sensitivity:** `EDGE_TH`.
- **Memory controller:** `WBUF_DEPTH` and `WR_CYCLES`. A slower SRAM needs more
  cycles per access. If so, check that three reads plus writes still fit into the
  8 cycles per stored pixel.

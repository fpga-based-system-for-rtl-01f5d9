# Image pipeline FPGA for a 640x480 microbolometer thermal camera

An uncooled thermal camera produces raw values that cannot be used as an image yet.
Every bolometer in the focal plane array has its own gain and offset. A few
detectors are dead. The array also runs at a frame rate set by its integration
time, and this rate is not the frame rate of the display. This RTL is the FPGA
between the array and the monitor. It does four things:

1. It drives the array and its two 14-bit ADCs and turns their output into a
   stream of pixels.
2. It corrects each detector with its own gain and offset (two-point
   non-uniformity correction, NUC).
3. It replaces the detectors marked bad with the last good pixel.
4. It stores frames in two memories used in turn, and shows them on a
   640x480 60 Hz VGA output with an overlay of user-interface graphics.

A supervising microcontroller sets the timing and loads the calibration data
through a small register file.

```
            RESET/INT/MC, CLK_VIDEO
   array  <------------------------ fpa_readout ----VideoBus----> nuc_correction --VideoBus--> bad_pixel_map
   + 2 ADCs ----- DVIDEO0/1 ------>     ^                              ^  coef memory              ^  bad pixel map
        (or adc_sim, selectable)        |                              |                           |
                                        |                                                          v VideoBus
   microcontroller bus --> mcu_regs ----+-- settings, memory loads                          image_display
                                                                                 SRAM 1 / SRAM 2, overlay plane, VGA
                                                                                        --> RGB, HS, VS
   videobus_tap: the VideoBus of any stage  --> monitoring connector
```

Everything runs on one 50 MHz core clock. The slower rates are clock enables:
the 6.25 MHz read-out tick (every 8th clock) and the 25 MHz VGA pixel (every
2nd clock).

## The VideoBus

The stages are linked by one bus format, so they can be reordered, and any
stage's output can be copied to the monitoring connector (`videobus_tap`).

| signal | meaning |
|---|---|
| `vs` (VSYNC) | high while a frame is sent |
| `hs` (HSYNC) | high while a row is sent |
| `stb` (STB) | a rising edge marks a new word; the word stays on `data` while `stb` is high |
| `data` | `LANES` pixels of `DW` bits: lane 0 is the even column (VDATA0), lane 1 the odd column (VDATA1) |

A word carries two pixels because the array has two outputs. This is also the
only way a 640x480 frame fits at 25-30 Hz on a 6.25 MHz strobe. Each stage
detects the rising edge of STB with the core clock. The rules are checked by
assertions in `videobus_if`: STB only inside HSYNC, HSYNC only inside VSYNC, and
data stable while STB is high.

Default timing from `fpa_readout`: one word every 8 clocks (160 ns). Data
changes at clock 5 of the tick and STB is high for clocks 6, 7, 0 and 1. Every
later stage delays the three sync signals by a fixed number of clocks, and
keeps its data one clock ahead of STB:

| stage | data after STB | sync delay |
|---|---|---|
| NUC | 3 clocks | 4 clocks |
| bad pixel mapping | 1 clock | 2 clocks |
| monitor connector | - | 1 clock |

## Array read-out (`fpa_readout`)

This is the part with the most timing detail. A tick is one MC period of the
array, one conversion of both ADCs and one VideoBus word. Two counters drive a
five-state machine:

- a tick counter within a row period (`LINE_TICKS` = 336 ticks = 53.76 µs);
- a row-period counter within a frame.

| state | row periods | what happens |
|---|---|---|
| IDLE | - | stopped until the read-out enable bit is set |
| INIT | 1 | RESET high for the first `RESET_TICKS` (16) ticks |
| ROWS | 480 | INT high for `INT_TICKS` ticks at the start of each period, integrating row *r* |
| FLUSH | 1 | one more INT period that shifts out the last row |
| BLANK | up to `FRAME_ROWS` | idle, which sets the frame rate |

The array delays its output by one row: the row integrated in period *r*
comes out during period *r+1*. Pixel pair *k* is sampled at the start of tick
`READ_START + k` (8 + k). So the VideoBus frame covers row periods 2 to 481.

The AD9251-class converters return a sample 9 ADC clocks after taking it. The
controller computes the frame, row and valid flags for the sample it is taking
now. It sends them through a 9-stage shift register clocked by the tick. They
therefore come out together with the converted data and become VSYNC, HSYNC
and STB. From the rising edge of INT that starts a read-out row to the first
strobe of that row takes (8 + 9) × 8 + 6 = 142 clocks.

With the default `FRAME_ROWS` = 620, the frame lasts 620 × 53.76 µs = 33.3 ms
(30 Hz). The shortest frame, 482 row periods, lasts 25.9 ms (38.6 Hz).

`adc_sim` can replace the array and the ADCs for testing. The register bit
`CTRL.adc_sim` selects it. It follows RESET, INT and MC the way the array would,
and returns a known pattern through a 9-stage pipeline:
`v(r,c) = (64r + 8c + 512·(((r>>3) xor (c>>3)) & 7)) mod 2^14`. The detectors
with `(r·640 + c) mod 97 = 13` are stuck at full scale.

## Non-uniformity correction (`nuc_correction`)

Each detector value N becomes `N* = G·N + O`. G and O come from a calibration
against two uniform black bodies at temperatures T_L and T_H. With
`N_ij(T)` the detector's response and `N(T)` the mean over the array:

```
G_ij = (N(T_H) - N(T_L)) / (N_ij(T_H) - N_ij(T_L))
O_ij = (N(T_L)·N_ij(T_H) - N(T_H)·N_ij(T_L)) / (N_ij(T_H) - N_ij(T_L))
```

These are computed outside the FPGA, on the microcontroller. The hardware
format is:

- G: 16-bit unsigned, 14 fraction bits, so 1.0 = 16384 and the range is 0 to 4.
- O: 16-bit signed integer in output units.

The result `(G·N + O·2^14 + 2^13) >> 14` is rounded to the nearest integer and
clipped to 0..16383. Each lane has its own multiplier, so a word is done in 3
clocks, far inside the 8-clock strobe period.

The stage also generates the coefficient address. It restarts at 0 when VSYNC
rises and advances after each word, so the coefficients of the next word are
read during the current strobe period. Setting `CTRL.nuc_en = 0` passes the
pixels through unchanged, with the same latency.

## Bad pixel replacement (`bad_pixel_map`)

A map holds one bit per detector (1 = bad), two bits per VideoBus word. It is
addressed the same way as the coefficients. Pixels are handled in raster order:

- A good pixel passes and becomes the "last good" value. The last good value
  carries across lanes and from the end of one row into the next.
- A bad pixel is replaced by the last good value.
- A bad pixel before any good pixel in the frame keeps its own value.

`replaced_o` counts the replacements.

## Display (`image_display`, `frame_sram`, `overlay_mixer`, `vga_ctrl`)

The display uses two frame memories, SRAM 1 and SRAM 2, each holding 153600
words of two pixels. While one is written from the VideoBus, the VGA side reads
the other. When a frame has arrived complete, the memory select flips at the
fall of VSYNC. "Complete" means 480 rows and 153600 words. A frame cut short is
dropped and the old one stays on screen.

The flip is not synchronised to the VGA frame. A switch can therefore fall in
the middle of a displayed frame: the top part comes from the old frame and the
bottom from the new one. Since the array runs at 30 Hz and VGA at 60 Hz, every
array frame is shown about twice.

The VGA side is a two-stage pipeline at 25 MHz:

1. Turn the raster position into a memory word, a lane and an overlay address.
2. Read the pixel and the overlay code, and form the colour.

The grey level is the top 8 bits of the 14-bit pixel; there is no contrast
stretch. The overlay plane holds a 2-bit code per pixel:

| code | shown |
|---|---|
| 0 | the image (transparent) |
| 1 | black |
| 2 | white |
| 3 | the colour in `OVL_COLOR` |

User-interface controls and status marks such as a battery gauge are drawn with
these codes. The VGA timing is standard 640x480 @ 60 Hz: 800 × 525 pixel
clocks, 96-pixel HS and 2-line VS pulses, both active low.

## Microcontroller registers (`mcu_regs`, map in `ir_pkg`)

The microcontroller's memory bus is assumed to arrive already synchronised:
an 8-bit word address, a one-clock write strobe and 32-bit data.

| addr | name | content |
|---|---|---|
| 0x00 | CTRL | [0] read-out enable, [1] NUC on, [2] bad pixel on, [3] overlay on, [4] simulated ADC data, [6:5] monitor stage (0 raw, 1 NUC, 2 bad pixel). Reset value 0x0E |
| 0x01 | INT_TICKS | integration time in ticks (reset 64) |
| 0x02 | FRAME_ROWS | frame period in row periods (reset 620, 30 Hz) |
| 0x03 | OVL_COLOR | {R,G,B} for overlay code 3 |
| 0x04 | MEM_ADDR | write address of the memory windows; each window write advances it |
| 0x05, 0x06 | COEF_L0, COEF_L1 | {gain, offset} of lanes 0 and 1; writing lane 1 stores the word |
| 0x0D | BPM_DATA | bad flags of one word (bit 0 = even column) |
| 0x0E | OVL_DATA | overlay code of one pixel (address = row·640 + column) |
| 0x0F | STATUS | [15:0] frames read, [16] displayed memory, [31:17] buffer swaps |

Loading all the memories takes 153600 × 2 coefficient writes, 153600 map writes
and 307200 overlay writes.

## Rates and sizes

| item | size |
|---|---|
| pixel rate | 80 ns per detector (two per 160 ns strobe) |
| frame rate | 640x480 at 25 and 30 Hz fits; 50 and 60 Hz do not (the read-out needs at least 25.9 ms per frame) |
| coefficient memory | 153600 × 64 bits |
| bad pixel map | 153600 × 2 bits |
| overlay plane | 307200 × 2 bits |
| frame memories | 2 × 153600 × 28 bits |

These memories are written as plain arrays. The coefficient memory (9.8 Mbit)
and the frame memories are larger than the block RAM of a mid-size FPGA. On a
board they would be external SRAM behind the same one-clock read interface.

## What is this design's own choice

The camera's published description fixes the following:

- the stages and their order;
- the VideoBus signals;
- the read-out state machine with two counters;
- the one-row array delay and the 9-clock ADC latency;
- the formula N* = G·N + O with 14-bit data and 16-bit coefficients;
- the one-bit bad pixel map with previous-good replacement;
- the double buffer that swaps after a complete frame;
- the overlay and a VGA output.

These choices are this design's own:

- one core clock with enables;
- the tick length and the read window position;
- the pulse widths;
- the two-pixel word;
- the coefficient fixed-point format, rounding and saturation;
- the NUC and bad-pixel enables;
- raster-order replacement across lanes and rows;
- the handling of incomplete frames;
- the overlay code format;
- the grey mapping;
- the register map;
- the memory organisation;
- the simulated data pattern.

Not included:

- the image enhancement stage that would sit between bad pixel mapping and
  display;
- the analog parts: array bias supplies, bias DAC and video DACs;
- the microcontroller software that computes the coefficients;
- clock generation.

## Files

| file | content |
|---|---|
| `rtl/ir_pkg.sv` | constants, register map, control register type |
| `rtl/videobus_if.sv` | the VideoBus bundle with its protocol assertions |
| `rtl/fpa_readout.sv` | array and ADC control, VideoBus generation |
| `rtl/adc_sim.sv` | simulated array + ADC data source |
| `rtl/nuc_correction.sv` | two-point correction |
| `rtl/bad_pixel_map.sv` | bad pixel replacement |
| `rtl/ram_1w1r.sv` | calibration memories (coefficients, bad pixel map, overlay) |
| `rtl/frame_sram.sv` | frame memory |
| `rtl/image_display.sv` | double buffer, display pipeline |
| `rtl/overlay_mixer.sv` | overlay and colour |
| `rtl/vga_ctrl.sv` | VGA timing |
| `rtl/videobus_tap.sv` | monitoring connector selector |
| `rtl/mcu_regs.sv` | microcontroller registers |
| `rtl/ir_camera_top.sv` | the whole FPGA |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_ir_camera_top.sv` | end-to-end test at reduced size (16x6 array) |
| `tb/tb_ir_camera_full.sv` | end-to-end test at full size |
| `tb/tb_ir_camera_25hz.sv` | the same at full size with the array read at 25 Hz |
| `tb/camera_tb_body.svh` | the end-to-end test body shared by the three |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build
and run one with Verilator 5 from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl rtl/ir_pkg.sv \
    tb/tb_ir_camera_full.sv --top-module tb_ir_camera_full -o sim
./obj_dir/sim
```

The full-size test runs one complete camera sequence at the default
parameters, about 9.5 million clocks. It does the following:

- loads all three memories;
- reads out 30 Hz frames from the simulated source;
- compares two whole 640x480 VGA frames with a model of the chain, one with NUC
  on and one with NUC bypassed;
- checks the monitor connector for each stage and the external ADC input.

It takes about 10 seconds. `tb_ir_camera_25hz` repeats it with a 25 Hz
frame period (`FRAME_ROWS` = 744). The reduced test `tb_ir_camera_top` covers
the same cases on a 16x6 array in well under a second. Block tests use small
parameters. Memories are not cleared by reset, so a test must load them before
it relies on their contents.

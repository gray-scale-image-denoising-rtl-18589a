# Gray-scale image mean filter with reversible (Peres-gate) adders

This design removes noise from an 8-bit gray-scale image by replacing each pixel
with the average of a 4x4 or 5x5 block of its neighbours (a mean filter). What sets
it apart is the arithmetic. Every addition in the filter is done by ripple-carry
adders built only from reversible 3-input/3-output **Peres gates**. Reversible
logic keeps as many outputs as inputs, so no information is erased. The point of
building the adders this way is the low energy that such logic promises. The
surrounding system is conventional. A frame memory holds the noisy image. It is
streamed through a line buffer into a sliding window, filtered at one pixel per
clock, stored in an output frame memory, and shown on a VGA monitor.

The default size is a 1024x1024 image, with a 5x5 window selected at reset. The
4x4 window can be chosen for each frame.

## Reversible arithmetic, from gate to adder tree

**Peres gate** (`peres_gate`). Inputs M, N, O give X = M, Y = M xor N and
Z = (M and N) xor O. The mapping is one-to-one on 3 bits, so it is reversible. In
a quantum realisation it costs 4 primitive gates. This RTL models only the
Boolean function.

**Full adder** (`peres_full_adder`). It uses two cascaded Peres gates:

```
gate 1: (P, Q, 0)        -> GO1 = P,      P^Q,               PQ
gate 2: (P^Q, Rin, PQ)   -> GO2 = P^Q,    Sum = P^Q^Rin,     Rout = (P^Q)Rin ^ PQ
```

It has one constant input and two "garbage" outputs. Garbage outputs exist only
to keep the circuit reversible.

**N-bit adder** (`rev_rca`). N full adders are chained in a ripple, with the
carry into bit 0 held at 0. The result has N+1 bits, so two N-bit numbers can
never overflow. All 2N garbage outputs are brought out on the `garbage` port.

**Adder trees.** The trees sum the window. Each level's adders are one bit wider
than the level before, because each level's sums grow by one bit:

| window | 8-bit | 9-bit | 10-bit | 11-bit | 12-bit | Peres gates (2 per bit) | sum width |
|--------|------:|------:|-------:|-------:|-------:|------------------------:|----------:|
| 5x5 (`mean_tree_5x5`) | 12 | 6 | 3 | 2 | 1 | 428 | 13 |
| 4x4 (`mean_tree_4x4`) | 8 | 4 | 2 | 1 | – | 262 | 12 |

In the 5x5 tree, pixels 0..23 pair up in the twelve 8-bit adders. The 25th pixel
has no partner. It skips three levels and goes, zero-extended, into the second
11-bit adder, next to the third 10-bit sum. The first 11-bit adder adds the other
two 10-bit sums. The 12-bit adder gives the total, which is at most 25·255 = 6375.

The gate counts 262 and 428 are the reversible-logic figures for the complete
filter. Each gate has a quantum cost of 4, so the quantum costs are 1048 and 1712.
Counting two garbage outputs per full adder gives 2 per bit. Some published
accountings of these same adders count 3 per bit (24 for an 8-bit adder).

## From sum to pixel: `image_denoise_unit`

Both trees see the same 5x5 register window every cycle:

- The 5x5 tree sees all 25 pixels.
- The 4x4 tree sees the lower-right 16: rows 1..4 and columns 1..4, which are the
  most recent rows and columns.

`win5` picks one of the two sums. The sum is then divided by the pixel count,
rounding down:

- **16 pixels:** a 4-bit shift.
- **25 pixels:** `floor(sum·5243 / 2^17)`. This equals `floor(sum/25)` for every
  sum below 43690, which covers the whole range. No divider is needed.

The unit has two register stages, one after the sum and one after the division.
It accepts one window per clock, and the result appears 2 clocks later.

## Streaming the image: buffer, window and borders

- **`pixel_in`.** On `start` it reads the input memory in raster order, one
  address per clock. The memory answers one clock later. The output stream is
  marked with `sof` (first pixel) and `last` (last pixel). There is no
  back-pressure, because every later stage takes a pixel on every clock.
- **`image_buffer`.** This is a line buffer: one memory of `IMG_W` words, each
  holding four 8-bit slots. For each pixel at column x, the word at x is read,
  shifted by one slot (the pixel four rows up drops out) and written back with the
  new pixel. The output, one clock later, is a column of five vertically adjacent
  pixels.
- **`image_window`.** This holds 25 registers. Each column shifts the window one
  place left. Row and column counters follow the stream. `win_valid` is raised
  only when the K×K block in use lies wholly inside the current frame, so image
  borders produce no output. Rows left over from the previous frame in the line
  buffer are never used. The filtered image is therefore (IMG_H−K+1)×(IMG_W−K+1).
  Output pixel (r, c) is the mean of input pixels r..r+K−1, c..c+K−1, and it is
  written at address r·IMG_W+c. The last K−1 rows and columns of the output memory
  are left as they were.

## The top level, `denoise_top`

```
load port -> frame_ram (input) -> pixel_in -> image_buffer -> image_window
          -> image_denoise_unit -> frame_ram (output) -> vga_controller -> VGA pins
                                                      \-> rd_addr / rd_data
```

Operating it:

1. Write the noisy gray image through `load_we/load_addr/load_data`. The address
   is row·IMG_W+col.
2. Pulse `start` with `win5` set: 1 for 5x5, 0 for 4x4. `win5` is sampled on the
   start pulse and held for the whole frame. A `start` pulse while `busy` is high
   is ignored.
3. `done` pulses for one clock IMG_W·IMG_H+5 clocks after the edge that sampled
   `start`. That is one clock per pixel plus the pipeline: the memory read, the
   buffer, the window, two filter stages and `done`'s own register.
4. Read results through `rd_addr`. `rd_data` is valid one clock later.

The whole design runs on one clock. Reset is synchronous and active low. It
clears the control state; the memories and window registers are not reset.

**Display.** `vga_controller` produces standard 640x480 / 60 Hz timing. That is
800×525 pixel ticks per frame, with active-low sync pulses of 96 ticks and 2
lines. A tick comes every `VGA_DIV` clocks; the default of 4 gives 25 MHz from a
100 MHz board clock. The controller reads the output memory through its second
read port. It sends gray as R=G=B = the pixel's upper 4 bits, which suits a
4-bit-per-colour resistor-DAC VGA adapter. A 1024-pixel image is wider than the
screen, so the top-left 640x480 is shown. Pixels outside the image, and
blanking, are black.

**Memory.** At the default size, the two frame memories hold 2 × 8 Mbit. That is
more block RAM than small FPGAs of the Spartan-6 class have. Smaller images work
by setting `IMG_W`/`IMG_H`. Both should be at least 5, and `IMG_W`/`IMG_H` set the
counter widths through `$clog2`.

## Files

| file | contents |
|------|----------|
| `rtl/denoise_pkg.sv` | pixel and window types, the reciprocal constant for /25 |
| `rtl/peres_gate.sv`, `rtl/peres_full_adder.sv`, `rtl/rev_rca.sv` | reversible arithmetic |
| `rtl/mean_tree_5x5.sv`, `rtl/mean_tree_4x4.sv` | adder trees |
| `rtl/image_denoise_unit.sv` | tree selection, division, pipeline |
| `rtl/pixel_in.sv`, `rtl/image_buffer.sv`, `rtl/image_window.sv` | streaming front end |
| `rtl/frame_ram.sv` | frame memory, 1 write and 2 read ports |
| `rtl/vga_controller.sv` | display |
| `rtl/denoise_top.sv` | top level |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/denoise_top_full_tb.sv` | full 1024x1024 run at default parameters |

## Simulating

Each testbench checks against values it computes itself. It ends with the line
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/denoise_pkg.sv \
          tb/denoise_top_tb.sv --top-module denoise_top_tb -Mdir obj -o sim
./obj/sim
```

What the testbenches cover:

- **Arithmetic.** The gate and full adder are tested exhaustively. The 8-bit adder
  is tested exhaustively, the 9- to 12-bit adders with random and corner-case
  operands. The trees are tested with single-pixel windows at every position
  (which exercises every leaf), extreme windows and random windows.
- **`image_denoise_unit_tb`.** It changes the mode from cycle to cycle, adds gaps
  in the input, and checks the 2-clock latency.
- **`denoise_top_tb`** (12x10 image). It runs 5x5, 4x4 and 5x5 frames. For each
  frame it checks the exact frame time, that a start pulse during a frame is
  ignored, and every output pixel. It then follows a whole VGA frame and compares
  the image area pixel by pixel. It counts mode switches, ignored starts, border
  positions and VGA frames, and fails if any of them never happens.
- **`denoise_top_full_tb`** (1024x1024, default parameters). It filters a noisy
  gradient image with both windows and checks all of the more than 2 million
  output pixels. It also reports the PSNR: about 15.3 dB for the noisy image,
  28.0 dB after the 5x5 filter and 26.5 dB after the 4x4 filter. With Verilator
  the run takes about 10 seconds.

## Departures and open points

These are choices made for this design rather than fixed by the filter's
description:

- **Borders.** Only windows wholly inside the image give an output; no padding is
  done.
- **Window alignment.** The result is stored at the window's top-left position.
  In 4x4 mode the window is the lower-right 4x4 of the 5x5 registers.
- **Division.** The result is the floor of the mean. The adder trees end at the
  sum, so the division is not done in reversible logic.
- **Window sizes.** Only 4x4 and 5x5 are built. A general n×n window is not.
- **System parts.** The frame memories' ports, the start/done handshake, the
  output frame memory and the VGA timing, crop and colour mapping are all
  assumptions.
- **Not hardware here.** Converting colour images to gray (lightness,
  (max+min)/2), adding test noise, converting image files and measuring PSNR are
  host-side steps and are not part of the hardware. Neither is configuring the
  FPGA from flash.

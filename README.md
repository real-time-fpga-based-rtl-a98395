# Streaming SURF feature detector with separable box filters

This design finds SURF interest points in a live video stream. It takes one
pixel per clock and needs no frame buffer for detection. Each pixel goes
through four steps:

1. It is added to an integral image.
2. A few lines of that integral image are kept on chip.
3. The Hessian-determinant response is computed at four filter sizes.
4. Maxima in the 3x3x3 scale-space neighbourhood are reported as features.

A CPU reads the features through a small register interface. In parallel, a
DMA engine writes the raw image into shared memory, so software can compute
descriptors around each feature.

The default configuration handles 1920x1080 grey-scale video at 60 frames/s.
That needs a pixel clock of about 135 MHz. It detects at one octave with four
intervals: filter sizes 9, 15, 21 and 27.

The main idea is that the box filters are **separable**:

- The expensive vertical part is computed once per column, as the column
  enters the window.
- The horizontal part is formed from a short shift register of those
  per-column partial sums.

So each filter size needs only three shift registers and a handful of adders,
however large the filter is.

## Data flow

```
cam_data ──► video_sync ──► preprocessor ──► feature_detector ──► detector_interface ──► CPU slave port
                  │          (integral        (r-line buffer,         (coordinates, FIFO,
                  │           image)           12 response units,       registers, irq)
                  │                            NMS)
                  └──────► memory_buffer ──► DMA write master (frame buffer)
```

All blocks run on a single clock, `pixel_clk`. Between the blocks travels a
pixel value plus a sideband struct `sync_t` with these fields:

| Field   | Meaning |
|---------|---------|
| `blank` | the pixel is outside the active image |
| `hs`    | first tick of a line |
| `vs`    | first tick of a frame |
| `x`     | the pixel's column, `x_cnt` |
| `y`     | the pixel's row, `y_cnt` |

`x_cnt` and `y_cnt` count the whole raster, blanking included. That makes
every latency in the pipeline a constant number of ticks. The detector
interface relies on this to recover a feature's position.

| Module | Role |
|---|---|
| `surf_pkg` | sizes, widths, latencies, offset and normalisation functions, `sync_t`, `feature_t` |
| `video_sync` | raster counters, sync pulses, blanking; re-aligns to the camera's frame-start pulse |
| `preprocessor` | streaming integral image |
| `line_bram` | one line memory with a registered address and registered output (block RAM) |
| `rline_buffer` | chain of 29 line memories: one column of 30 integral values per tick |
| `response_calc` | separable convolution, Hessian, scale normalisation, alignment for one filter size and one row |
| `hessian` | three-stage determinant of the Hessian |
| `nms` | 3x3x3 non-maxima suppression from response triplets |
| `feature_detector` | r-line buffer + 4 sizes x 3 rows of `response_calc` + `nms` |
| `detector_interface` | coordinates, feature FIFO, memory-mapped registers, interrupt |
| `memory_buffer` | packs pixels into 32-bit words and writes them to a frame buffer |
| `surf_top` | wires the above together |

## Raster and integral image

`video_sync` runs free-running counters over an `H_TOTAL` x `V_TOTAL` raster.
The defaults are 2048 x 1100 around the 1920 x 1080 active image. A pulse on
`cam_frame_start` forces the counters to (0,0), so the design locks onto a
camera that starts mid-frame. Blanking pixels are forced to zero, so they add
nothing to the integral image.

`preprocessor` computes `II(x,y) = p(x,y) + rowsum(x-1,y) + II(x,y-1)`:

- `rowsum` accumulates the current line and restarts at `h_sync`.
- `II(x,y-1)` comes from a memory of one raster line, addressed by `x_cnt`.
  It is read one address ahead through a register, so it maps to a block RAM.
- On line 0, the row above counts as zero.

Values are 32 bits and wrap modulo 2^32. A box sum is a difference of four
integral values, so it stays exact as long as the true box sum fits in 32
bits, which it always does here.

## r-line buffer

`rline_buffer` chains 29 line memories. Each memory:

- writes its input at address `x_cnt`;
- reads address `x_cnt + 2`, wrapping at the line length;
- has a registered address and a registered output, so its two-tick read
  latency brings the read-ahead value back exactly at column `x_cnt`.

Memory k therefore holds the integral value from k lines above at the current
column. With the input itself, that gives 30 vertically aligned values per
tick (`d_out[0]` is the newest line). 30 = 28 rows for the 27x27 filter's
sample grid, plus one row above and one below, so every filter size can
evaluate three adjacent centre rows at once.

Memory cost: 29 x 2048 x 32 bits for the buffer, plus 2048 x 32 bits for the
integral-image line, about 1.97 Mbit in total.

## Separable convolution (the core of the design)

A SURF filter of size S (S = 9, 15, 21, 27) is built from boxes. Each box sum
takes four integral-image lookups. For the three second-derivative filters,
all lookups fall on a grid of ten positions per axis:

    o_k = round(k * S / 9),   k = 0..9

This is the 9x9 layout (box edges at 0,1,2,3,4,5,6,7,8,9) stretched to size S.
The package function `pat_off` computes it in integers as `(2kS + 9) / 18`.
Write `W(c, r)` for the integral value at grid column c and row r of the
window.

**Dyy.** Dyy is three boxes stacked vertically, with weights +1, −2, +1. It
spans columns o2..o7 horizontally and rows o0..o9 vertically. Written out, its
row pattern is `W(·,o0) − 3 W(·,o3) + 3 W(·,o6) − W(·,o9)`, taken as a
difference between columns o2 and o7. Dxx is the same filter transposed. Dxy
is four boxes with corners at o1, o4, o5 and o8 on both axes.

Every lookup is (row weight) x (column weight), so each filter splits into a
column factor and a row factor. The column factors become three partial sums
of the **column entering the window**, computed from the r-line buffer
outputs:

    s1 = W(o2) − W(o7)                              (vertical part of Dxx)
    s2 = W(o0) − 3 W(o3) + 3 W(o6) − W(o9)          (vertical part of Dyy)
    s3 = W(o1) − W(o4) − W(o5) + W(o8)              (vertical part of Dxy)

Each sum goes into entry 0 of its own shift register, which is S+1 entries
long. Entry `S−j` then holds the sum for window column j. The horizontal
combination reads a few fixed taps:

    Dxx = s1[o0] − 3 s1[o3] + 3 s1[o6] − s1[o9]
    Dyy = s2[o2] − s2[o7]
    Dxy = s3[o1] − s3[o4] − s3[o5] + s3[o8]

Cost per filter size and centre row:

| Stage | Work |
|---|---|
| vertical | 10 adds and the x3 multiplies (each a shift plus an add) |
| horizontal | 8 adds |
| storage | 3 x (S+1) registers of 32 bits |

A direct evaluation would need 32 random integral-image reads per pixel. The
differences are taken modulo 2^32 and then cut to 20 signed bits. That is
enough for 8-bit pixels at S = 27, where |Dxx| ≤ 68,850.

There are twelve `response_calc` instances: 4 sizes x 3 rows. The top-row
index `ROW0` of each instance is chosen so that all sizes share one centre
pixel.

### Hessian, normalisation, alignment

`hessian` computes `Dxx·Dyy − 0.875·Dxy²` in three registered stages:

1. Both products.
2. `Dxy² − (Dxy² >>> 3)`; the product is delayed.
3. The difference.

This uses two multipliers per unit, 24 in total.

A larger filter gives a larger response for the same structure. So before the
sizes are compared, each score is multiplied by `round(2^16 · 9^4 / S^4)` and
shifted right by 16 (`norm_k`), which puts every size on the scale of the 9x9
filter. The Hessian itself is 40 bits wide. After normalisation, every score
stays below 7·10^7 for 8-bit pixels, so from here on scores are 32-bit signed
integers (`SC_W`). This keeps the alignment registers and the NMS comparators
narrow.

Finally, size S is delayed by `13 − (S−1)/2` ticks (`col_align`), so that all
four sizes report the same centre column in the same tick.

## Non-maxima suppression with triplets

Each tick, `nms` receives a triplet of scores for each size: the rows above,
at and below the candidate row, all in one column. Two column registers hold
the two previous triplets, so the 3x3 window of every size is available with
no line buffering of scores.

The candidate is the centre of the middle column. A candidate at interval 2
(size 15) or interval 3 (size 21) is a feature when both hold:

- its score is above the programmable threshold;
- it is strictly greater than all 26 neighbours at its own size and the two
  adjacent sizes.

The result is registered. `feature_data[i]` flags interval i+2.

## Latency and coordinates

From a pixel entering the feature detector to its NMS decision, the distances
are:

- DELTA_Y = 14 lines;
- DELTA_X = 21 ticks: 6 pipeline stages, 13 columns to the window centre and
  2 ticks of NMS.

The latencies are constants in `surf_pkg`. `detector_interface` subtracts them
from the current `x_cnt`/`y_cnt`, wrapping into the previous line or frame, to
get the feature's position. Features closer than 15 pixels to the image
border are discarded; there the filters would read outside the image.

From camera pixel to FIFO, the latency is 2 + 14·2048 + 21 = 28,695 ticks,
about 210 µs at 136 MHz.

## CPU interface

The slave port has word addresses, 32-bit data and read data one tick after
`read` (with `readdatavalid`).

| Addr | Register | Access |
|---|---|---|
| 0 | FEATURE | read: `[31]` valid, `[10:0]` x, `[21:11]` y, `[23:22]` scale mask (bit 0 = size 15, bit 1 = size 21). Reading a valid entry pops it. |
| 1 | STATUS | `[15:0]` entries queued, `[16]` overflow (sticky; write 1 to clear), `[31:24]` frame counter |
| 2 | THRESHOLD | read/write, 32-bit signed, compared with the normalised score |
| 3 | CONTROL | `[0]` interrupt enable |

`irq` is high while interrupts are enabled and the FIFO is not empty. The FIFO
has 512 entries. When it is full, new features are dropped and the overflow
flag is set. After reset the threshold is 0; program it before you rely on
the results.

## Frame-buffer DMA

`memory_buffer` packs active pixels four to a word, first pixel in the low
byte. It writes them to `frame_base + 4n`, where n restarts at 0 with every
frame. The bus side is a simple write master:

- `m_write`, `m_address` and `m_writedata` hold steady while `m_waitrequest`
  is high; an assertion checks this.
- A 16-word FIFO absorbs stalls.
- If the FIFO is full, a word is lost and `overflow` is set.
- `line_count` gives the number of complete lines of the current frame that
  the bus has accepted. Software uses it to know when the image around a
  feature is in memory.

## Departures and choices

- **Sign of the last Dxx term.** The short form of the Dxx sum is sometimes
  given as ending in `+ s1(o9)`. The box arithmetic, and the expanded
  formula, require `− s1(o9)`, and that is what is built. The testbenches check
  Dxx against direct box sums.
- **Scale normalisation** is this design's addition. Without it, the larger
  filters would win every comparison across scales.
- **Threshold** and the **strict** comparison in the NMS are this design's
  choices.
- **Raster totals** (2048 x 1100) are assumed. The line length equals the
  memory depth of 2048; this gives 135.2 M ticks/s at 60 fps.
- **Latency in raster lines.** The detection delay is 14 lines plus 23
  ticks. Counted in 1920-pixel lines this would be about 197 µs at 136 MHz.
  Here, lines are 2048 ticks long including blanking, which makes it 210 µs.
- **Word widths.** The Hessian unit works in 40 bits, because the raw
  product for the 27x27 filter does not fit in 32 bits. Everything before it
  (integral image, partial sums) and after it (normalised scores, threshold)
  fits in 32 bits.
- **Border handling** (15-pixel margin), **reset** behaviour, the register
  map, FIFO depths, the DMA word format and the bus protocol are own choices.
- **Not included:** the camera, the system interconnect, the memory
  controller and memories, and the CPU with its descriptor software. Their
  signals are ports of `surf_top`.
- **Fixed structure.** One octave with four intervals is built into the
  package. A single-scale variant, with 24-bit integral values, would need
  different NMS and is not provided.
- **Warnings.** Verilator reports some unused bits as warnings:
  - the `x` fields of `sync_t` that a block does not need;
  - the upper bits of the 32-bit differences, which are cut on purpose.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference model (`tb/surf_ref.sv`) works
directly on pixel box sums, not on integral images. It provides the scores of
all four sizes and the 3x3x3 maxima of a generated image of noise with bright
and dark blobs.

| Testbench | What it checks |
|---|---|
| `tb_response_calc` | S = 9 and S = 27 responses against box sums |
| `tb_feature_detector` | the full detector core on a 48x48 raster, every feature and its timing |
| `tb_surf_top` | the whole design on a 64x60 image in a 72x80 raster, three frames (see below) |
| `tb_surf_top_vga` | 640x480 in a 672x482 raster (420.8 frames/s at 136.3 MHz), one frame with about 5,000 features |
| `tb_surf_top_full` | the default 1920x1080 / 2048x1100 configuration for one frame of about 6000 blobs (about 36,000 features, each checked in order, plus every frame-buffer word) |

`tb_surf_top` covers these cases:

- the camera starts mid-frame;
- the CPU reads on interrupt, then pauses so that the 2-entry feature FIFO
  overflows;
- the memory stalls at random and for a long time, so the DMA FIFO
  overflows;
- every feature's coordinates, scale and latency, and every frame-buffer word,
  are checked.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_surf_top \
  -Irtl -Itb rtl/surf_pkg.sv rtl/line_bram.sv rtl/rline_buffer.sv rtl/hessian.sv \
  rtl/response_calc.sv rtl/nms.sv rtl/feature_detector.sv rtl/video_sync.sv \
  rtl/preprocessor.sv rtl/detector_interface.sv rtl/memory_buffer.sv rtl/surf_top.sv \
  tb/surf_ref.sv tb/surf_tb_harness.sv tb/tb_surf_top.sv
./obj_dir/Vtb_surf_top
```

For another block, use `--top-module tb_<block>` and its testbench file. The
full-size test takes well under a minute.

To change the resolution, set `W`, `H`, `H_TOTAL` and `V_TOTAL` on `surf_top`.
The line memories are `H_TOTAL` deep; `x_cnt`/`y_cnt` are 11 bits wide
(`XW`/`YW` in the package).

# Forward-difference edge detector for a video stream

This RTL finds edges in a live RGB video stream, one pixel per clock, without
storing a frame. It uses the simplest possible gradient: each pixel's grey
value minus the grey value of its left neighbour (horizontal difference `gx`)
and minus that of the pixel directly above it (vertical difference `gy`). A
pixel whose gradient is larger than a threshold is an edge and comes out
black. All other visible pixels come out white. The result is a
line-drawing-like image with the same timing as the input.

The only memory it needs is one row of grey values, 1280 words for a
1280 x 720 image. The horizontal neighbour comes from a single register.

## The operator

For the pixel at column `x`, row `y` with grey value `f(x,y)`:

```
gx = f(x,y) - f(x-1,y)          left neighbour subtracted
gy = f(x,y) - f(x,y-1)          upper neighbour subtracted
g  = |gx|            (mode X)
     |gy|            (mode Y)
     |gx| + |gy|     (mode XY, the usual L1 approximation of the gradient length)
out = black if g > threshold, else white
```

Outside the image the neighbours count as zero. So column 0 uses
`f(-1,y) = 0` and row 0 uses `f(x,-1) = 0`. A bright pixel on the left or top
border therefore tends to be marked as an edge, which gives the image a frame
on those two sides. That is what zero padding produces, not a fault.

The comparison is strict. A gradient exactly equal to the threshold is white.

The three modes are the three detectors of the method: horizontal only,
vertical only, and both. Mode X needs only the previous-pixel register. Modes
Y and XY use the row buffer. One netlist carries all three, chosen by the
`mode` input. A build that needs only one mode can tie `mode` to a constant
and let synthesis remove the rest.

## Grey scale in integer arithmetic

The RGB pixel is converted with the luminosity weights
`0.299 R + 0.587 G + 0.114 B`. To avoid fractions, the weights are scaled by
2^16 and rounded: 19595, 38470 and 7471. These happen to sum to exactly 65536,
so white (255,255,255) maps to exactly 255 x 2^16. The grey value is a 24-bit
unsigned integer in units of 1/65536 of a grey level, and the whole datapath
works in those units. Nothing is rounded back to 8 bits, so no precision is
lost before the subtraction.

The threshold input is in whole grey levels, `0..510`, and is shifted left by
16 bits before the comparison. 510 is the largest possible `|gx| + |gy|`. So
`threshold = 30` means "a step of more than 30 grey levels".

The scale factor 2^16 is a choice made here. It is what makes one row of
grey values 1280 x 24 = 30,720 bits.

## Datapath and its timing

The hardest part to follow is how the three values of one pixel (current,
left, above) are lined up in time. The pipeline has four register stages.
Stage `n` means `n` clocks after the pixel is on `vid_in`.

```
 vid_in ──► rgb2gray ──► gray ─┬──────────────► fwd_gradient ──► |gx|,|gy| ──► edge_decision ──► vid_out.pix
 (stage 0)  (stage 1)          │                 stage 2: cur, left aligned      stage 4: black/white
                               │                 with the RAM read data
                               ├─► line_buffer (addr = column) ──► above (stage 2)
 vid_in.de/vs ──► delay 1 ──► scan_counter ──► column, first_col, first_row
 vid_in.{vs,hs,de} ──────────── delay 4 ──────────────────────────────────────────────────► vid_out.{vs,hs,de}
```

* **Stage 1.** `rgb2gray` registers the grey value. In the same cycle,
  `scan_counter` gives that pixel's column and row. The row buffer is then
  accessed at that column. It returns the word it holds, which is the grey
  value of the pixel above, written one line earlier. In the same cycle the
  word is overwritten with the current grey value (read before write). The
  buffer therefore always holds the most recent line. No second buffer and no
  ping-pong are needed.
* **Stage 2.** The RAM's registered read data arrives. `fwd_gradient` has also
  registered the current pixel. The register that held the pixel before it
  becomes the left neighbour. Both registers load only on visible pixels, so
  horizontal blanking does not disturb them. The zero-padding flags from the
  counter replace the left value (column 0) and the above value (row 0) with
  zero.
* **Stage 3.** `|gx|` and `|gy|` are registered.
* **Stage 4.** `edge_decision` selects the gradient for the mode, compares it
  with the scaled threshold and registers the output colour.

`vs`, `hs` and `de` are delayed by the same 4 clocks, so `vid_out` is a
well-formed stream with the input's timing. Throughput is one pixel per clock
with no stalls.

In the first row of a frame, the row buffer still holds the last row of the
previous frame. The `first_row` mask discards it, so frames are independent.
This is also why the buffer needs no reset.

## Position counters

`scan_counter` works out the position from the control signals alone. No
frame size needs to be signalled.

* The column counts visible pixels (`de = 1`) and clears whenever `de = 0`.
* The row advances when `de` falls at the end of a visible line.
* The row clears while `vs = 1`.

The design expects the ordinary raster order: visible lines first, then
vertical blanking containing the sync pulse. The sync pulse must fall between
the last visible line of one frame and the first of the next. `vs` is taken
as active high. `hs` is only delayed, never interpreted, so its polarity does
not matter. Both counters saturate at `COLS-1` and `ROWS-1`, so a stream
larger than the parameters cannot overflow them. Such a stream would not be
processed correctly, though.

## Interface

`fd_edge_detector` is the top. It has parameters `COLS = 1280` and
`ROWS = 720`. `ROWS` sets only the width of the row counter.

| port        | dir | type / width      | meaning |
|-------------|-----|-------------------|---------|
| `clk`       | in  | 1                 | pixel clock |
| `rst`       | in  | 1                 | synchronous, active-high reset of all registers (not the RAM) |
| `mode`      | in  | `fd_pkg::mode_t`  | `MODE_X`, `MODE_Y` or `MODE_XY`; code 3 acts as `MODE_XY` |
| `threshold` | in  | 9                 | grey levels, 0..510 |
| `vid_in`    | in  | `fd_pkg::video_t` | `{vs, hs, de, pix{r,g,b}}`, 8 bits per colour |
| `vid_out`   | out | `fd_pkg::video_t` | same stream 4 clocks later; `pix` is `000000` (edge) or `FFFFFF` (non-edge) while `de = 1`, and 0 in blanking |

Change `mode` and `threshold` only during vertical blanking. Changed
mid-frame, they apply to the pixels reaching stage 4 from then on.

## Files

| file | contents |
|------|----------|
| `rtl/fd_pkg.sv` | pixel and stream structs, mode enum, weights and widths |
| `rtl/rgb2gray.sv` | scaled luminosity conversion, 1 clock |
| `rtl/scan_counter.sv` | column and row counters, border flags |
| `rtl/line_buffer.sv` | one-row read-before-write RAM, registered read |
| `rtl/fwd_gradient.sv` | previous-pixel register, zero padding, `|gx|` and `|gy|`, 2 clocks |
| `rtl/edge_decision.sv` | mode select, `|gx|+|gy|`, threshold, colour, 1 clock |
| `rtl/fd_edge_detector.sv` | top: wiring and control-signal delay |
| `tb/video_source.sv` | raster timing generator used by the testbenches (720p timing by default) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the full-size test |

## Verification

Every testbench computes its expected values from the image itself, and
prints `TB_RESULT checks=N failures=M` at the end. The reference uses the
integer weights above, the differences with zero padding, and the strict
threshold.

* `tb_rgb2gray`: corner colours and 5000 random pixels. It also checks the
  one-clock latency.
* `tb_scan_counter`: four small frames. Column, row and border flags are
  checked on every visible pixel.
* `tb_line_buffer`: row-by-row use and random accesses against an array
  model.
* `tb_fwd_gradient`: two frames of random grey values. The pixel above is fed
  with one clock of delay. In row 0 it is deliberately junk, to show that it
  is masked.
* `tb_edge_decision`: all modes, with values at, just above and just below
  the threshold, and blanking.
* `tb_fd_edge_detector`: end to end on 24 x 10 frames with short blanking.
  Seven frames rotate through the three modes and several thresholds. Every
  output pixel and its 4-clock latency are checked, and so is the `hs`/`vs`
  delay. The test counts how often each behaviour occurred and fails if one
  never did. The behaviours are: edges and non-edges in each mode, a gradient
  equal to the threshold, padding at the left and top borders, negative
  differences, mode changes, and first rows read over a previous frame's
  data.
* `tb_fd_edge_detector_full`: the top at its default parameters. It runs
  three full 1280 x 720 frames with 1650 x 750-clock timing, one in each
  mode (XY, then X, then Y). All 2,764,800 output pixels are compared. It
  takes a few seconds.

Each testbench was also run against a copy of its module with a deliberate
bug, and each caught it. The bugs were: swapped colour weights, a missing
row clear, a write-first RAM, missing left padding, `>=` instead of `>`, and
the row counter cleared by `hs`.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fd_pkg.sv tb/tb_fd_edge_detector.sv --top-module tb_fd_edge_detector -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `tb_fd_edge_detector` takes
its frame size and blanking lengths as parameters. Use `-G` to try other
sizes, for example `-GCOLS=64 -GROWS=20`.

## Where this design makes its own choices

The algorithm itself is fixed by the method: the luminosity grey scale,
forward differences against the left and upper neighbours, the `|gx| + |gy|`
magnitude, the strict threshold with black edges on white, zero padding at
the first row and column, a single-row RAM overwritten in place, and a
register for the previous pixel. The method's target is a 1280 x 720 image,
and the 30,720-bit row buffer here matches the memory that implementations of
the method report.

The following are decisions made here, not prescribed by the method:

* The pipeline registers and the resulting 4-clock latency.
* The 2^16 scale of the grey value and the threshold format (whole grey
  levels, shifted).
* The run-time `mode` input. The method describes the three detectors as
  separate builds.
* The output colour during blanking (0).
* How the counters derive position from `de` and `vs`, and `vs` active high.
* The synchronous active-high reset.
* The output pixel sits at the position of the right or lower pixel of each
  difference pair. The difference `f(x+1) - f(x)` is labelled with `x+1`
  rather than `x`, which shifts the edge map by one pixel compared with the
  textbook form of the operator.
* The single-direction modes compare the absolute difference with the
  threshold. Falling edges (dark to the right of, or below, light) are
  therefore found as well as rising ones.

Not included: the board around the detector, which supplies the stream and
displays the result (a DVI receiver, an HDMI transmitter, and the current and
voltage measurement used for power figures). The ports carry a raw pixel
stream, ready to sit between such a receiver and transmitter.

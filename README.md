# C-FED: a competitive fuzzy edge detector in SystemVerilog

This is a streaming edge detector for 8-bit grey-scale images. It is meant for
the gradient stage of volume rendering, where edges must be thin and must not
react to noise. For each pixel it measures the gradient in four directions and
sorts the pixel into one of six fuzzy classes: background, four edge
orientations, or speckle. A pixel in an edge class then competes with its two
neighbours across the edge, and only the strongest of the three is marked.
The result is a one-bit edge map, one flag per pixel.

The architecture is that of the low-power C-FED processor of Kwon, Kim, Oh and
Yoo ("A 22.4 mW Competitive Fuzzy Edge Detection Processor for Volume
Rendering", KAIST). That chip handles 300x300 images at 200 MHz. Three ideas
make it cheap, and this RTL has all three:

* **Linearized membership.** The fuzzy membership function becomes a pyramid
  made of shifts and subtractions, so there are no multipliers or dividers.
* **Shared gradient units.** The same four gradient units serve the
  classification clock and the competition clock.
* **Background shortcut (TABC, threshold adaptive bit control).** A cheap bit
  test finds flat pixels before the classifier runs.

The published paper gives the architecture, the block diagrams and the main
equations. It leaves out many details: the class vectors, the exact
competition rule, the memory interfaces and the control sequencing. Those are
this design's own choices and are listed in
[Where this design fills gaps](#where-this-design-fills-gaps).

## How one pixel is decided

The unit of work is a 5x5 window. Its center is P5 and the inner ring is
P1..P9 in raster order:

```
 .  .  .  .  .
 .  P1 P2 P3 .
 .  P4 P5 P6 .
 .  P7 P8 P9 .
 .  .  .  .  .
```

**Gradients.** Each direction d has a gradient
`g_d = |P5 - a| + |P5 - b|`, where a and b are the two pixels on either side
of P5 along d. The directions are numbered 0 horizontal (P4, P6), 1 vertical
(P2, P8), 2 main diagonal (P1, P9) and 3 anti-diagonal (P3, P7). A gradient
needs 9 bits.

**Classes.** The gradient vector `g = (g0, g1, g2, g3)` is compared with six
threshold vectors, which are built from two programmable levels, `lo` and `hi`:

| class | meaning | vector |
|---|---|---|
| 0 | background | `[lo lo lo lo]` |
| 1..4 | edge running along direction k-1 | `lo` in direction k-1, `hi` in the other three |
| 5 | speckle (isolated spot) | `[hi hi hi hi]` |

Here k is the class number. A horizontal edge (class 1) therefore has a low
gradient along the edge and high gradients across it and diagonally.

**Linearized membership.** The original algorithm uses the Epanechnikov
function `1 - ||g - c||^2 / w^2`. Only the ranking of the six memberships
matters, so the hardware uses a pyramid with the same centre instead:

```
u_c = max(0, t - (SAD(g, c) << s))      SAD = sum over d of |g_d - c_d|
```

The shift `s` and the offset `t` are configuration inputs, `fz_shift` (3 bits)
and `fz_offset` (10 bits). `u` is 10 bits wide. The class with the largest `u`
wins. On a tie the lower class number wins, so when every class clamps to 0
the pixel counts as background. With `s = 0` and `t = 1023` the pixel
practically goes to the class vector nearest in L1 distance.

**Competition.** A pixel in class 1..4 takes a second clock. Its edge runs
along direction e, so the competition runs across it, along `a = e XOR 1`:
horizontal pairs with vertical and main diagonal with anti-diagonal. The
gradient along a is computed for three pixels:

* the center;
* neighbour A at the offset of direction a;
* neighbour B at the opposite offset.

The largest of the three is marked as an edge. On ties the center wins over
A, and A wins over B. Neighbour gradients reach two pixels from the center,
which is why the window is 5x5.

The winner can be a neighbour. So one decision may set a flag in row r-1, r
or r+1. Flags only accumulate: a pixel is an edge if any competition marked
it. Background and speckle pixels mark nothing. The effect is a thinned edge
map: next to a thin bright line, the pixels beside the line lose to the line
itself.

## The background shortcut (TABC)

Most pixels of a typical image are flat background. The BGND detector spots
many of them without the gradient units. It checks whether all nine pixels
P1..P9 agree in their K most significant bits, with

```
K = 9 - floor(log2((lo + hi) / 2))
```

If the top K bits agree, every `|P5 - Pi|` is below `2^(8-K)`. Every
gradient is then below `2^(9-K)`, which is at most `(lo + hi)/2`. Each
gradient is therefore nearer `lo` than `hi` in every direction. The background
vector `[lo lo lo lo]` is then strictly the nearest class, and the shortcut
can never mislabel an edge. The testbenches check this: the reference model
has no shortcut, and the RTL must match it bit for bit.

In hardware there is one compare unit per MSB. Each unit XORs that bit of
every pixel with the center's bit and ANDs the results. Units beyond K have
their inputs gated to zero, so they do not toggle, and a constant 1 takes
their place in the final AND.

There are four units (`NUM_UNITS = 4`, bits 7..4), as in the original
detector. Thresholds with `(lo + hi)/2 < 32` would need K > 4, and then the
detector stays silent and the full classifier decides. While the detector
fires, the gradient-unit operands are forced to zero, so the classifiers see
no toggling. The pixel finishes in one clock as background.

## Hardware sharing and timing

`edge_detector` has four gradient units (GCUs), six fuzzy classifiers, a
6-way MAX unit, the BGND detector, a 4:3 switch and a 3-way MAX unit. It is
run by a two-state FSM:

* **Clock 1 (edge calculation).** Each GCU computes the center's gradient in
  its own direction. The classifiers and the MAX unit pick the class. For
  background (from the shortcut or the classifier) and for speckle, `done`
  is high and the pixel is finished.
* **Clock 2 (competition, edge classes only).** The GCU of direction a keeps
  its operands, so it still produces the center's gradient along a. The two
  lowest-numbered other GCUs take neighbour A and neighbour B. The fourth GCU
  also keeps its operands. The 4:3 switch passes (center, A, B) to the MAX
  unit, and the winner's offset comes out with `set_en`.

So a background or speckle pixel costs one clock and an edge-class pixel two.
The edge register in `window_processor` turns the winner's offset into an
absolute (row, column). It writes that flag into the output memories one
clock after the decision.

## Moving the window: meander scan and line memories

The window never re-reads a pixel it already holds. It crosses the image in a
meander. In band r (center row r) it moves right from column 2 to W-3. At the
end of the band it steps down one row, then moves left back to column 2, and
so on. The centers are rows and columns 2 .. H-3 and 2 .. W-3. The two-pixel
border is never a center, so border flags come only from a neighbour's
competition.

Moves of the 5x5 register array (`window_regs`):

* **Going right.** The array shifts left, and the new rightmost column is read
  from five line memories at column x+3, one pixel from each.
* **Going left.** The array shifts right and takes column x-3.
* **Stepping down.** The array shifts up, and the bottom row is refilled from
  the next image row, one register per clock for five clocks.

Sideways moves happen in the clock in which the decision completes, so they
cost nothing extra.

**Six input line memories** (W x 8 bits each) hold the image. Image row n
always sits in memory n mod 6. Five of the six hold window rows r-2..r+2. The
sixth is filled with row r+3 while band r is being scanned, which hides the
row fetch behind the scan. When the window steps down, the roles rotate by
one memory (`base`). The memory that held row r-2 then receives row r+4.

**Four output line memories** (W x 1 bit) collect the flags. Row n sits in
memory n mod 4. Band r can mark rows r-1, r and r+1, so three rows are open at
any time. The fourth memory holds a finished row while it is being sent out,
and each word is cleared as it leaves.

The controller (`controller_unit`) runs these states:

| state | what happens |
|---|---|
| WAIT_BAND | waits until rows 0..4 are loaded |
| FILL | five clocks of left shifts load the first window |
| RUN | the window moves one column per decided pixel |
| BAND_END | one clock, then the band is published as finished |
| DOWN_WAIT | waits until row r+3 is complete and output row r-2 has been sent |
| DOWN | five clocks refill the bottom row; the memories rotate |
| DONE | after the last band, waits until every row has been sent, then pulses `frame_done` |

The memory controller mirrors these rules on its side:

* Row n may be written only while the center row is at least n-3, because the
  memory it overwrites held row n-6.
* Output row m is sent once band m+1 has finished, or once the whole frame
  has.

## Interface

`cfed_top` parameters: `IMG_W = 300`, `IMG_H = 300`, `OW = 10` (edge flags per
output word), `NUM_UNITS = 4`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `lo`, `hi` | in | 9 | class threshold levels (`lo < hi`) |
| `fz_shift`, `fz_offset` | in | 3, 10 | `s` and `t` of the membership |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1, 1, 16 | pixels in raster order, two per word, low byte first |
| `out_valid`, `out_ready`, `out_data` | out/in/out | 1, 1, OW | edge flags; bit i of word k is column k*OW+i |
| `out_row`, `out_word` | out | 9, 5 | row and word index of `out_data` |
| `frame_done` | out | 1 | one-clock pulse after the frame's last row has been sent |

Both streams use valid/ready: a transfer happens on a clock edge where both
are high. The input accepts a word with its second pixel, so it takes at most
one pixel per clock. Keep `lo`, `hi`, `fz_shift` and `fz_offset` stable
during a frame. The next frame can be streamed in right behind the previous
one: the input waits until the previous frame has been fully sent.

Timing at 300x300 on the test images is 95,973 clocks per frame, which is
2084 frames/s at 200 MHz. The input at one pixel per clock sets a floor of
90,000 clocks. Decisions take one clock per interior pixel plus one per
edge-class pixel. The original chip reports 1821.5 frames/s (109,800 clocks),
and the end-to-end test requires this design to be at least that fast.

## Files

| file | block |
|---|---|
| `rtl/cfed_pkg.sv` | widths, types, window operations, class vectors, direction table |
| `rtl/gcu.sv` | gradient unit: `|pc-pa| + |pc-pb|` with carry/XOR absolute differences |
| `rtl/fuzzy_classifier.sv` | linearized membership `max(0, t - (SAD << s))` |
| `rtl/max_select.sv` | index of the largest input, lowest index on ties |
| `rtl/bgnd_detector.sv` | background shortcut (TABC) |
| `rtl/edge_detector.sv` | two-clock FSM and datapath of one decision |
| `rtl/window_regs.sv` | 5x5x8-bit shifting window |
| `rtl/window_processor.sv` | window registers + edge detector + edge register |
| `rtl/line_memory.sv` | one row memory (register file, combinational read) |
| `rtl/input_line_buffer.sv` | 6 input line memories, write DEMUX, rotating read X-Bar |
| `rtl/output_line_buffer.sv` | 4 edge-flag line memories, mark DEMUX, read-and-clear X-BAR |
| `rtl/memory_controller.sv` | input byte select and row distribution; output row streaming |
| `rtl/controller_unit.sv` | meander scan state machine |
| `rtl/cfed_top.sv` | the whole processor |

## Simulating

Every module has a self-checking testbench, `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
shared reference model `tb/cfed_ref_pkg.sv` is plain integer code written
apart from the RTL, and it has no background shortcut. The full-size
end-to-end test runs two 300x300 frames in a few seconds:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cfed_pkg.sv tb/cfed_ref_pkg.sv tb/cfed_top_tb.sv --top-module cfed_top_tb
./obj_dir/Vcfed_top_tb
```

Substitute any other `*_tb` for a unit test.

`cfed_top_tb` builds synthetic images: a noisy background with a disc, a
rectangle, a diagonal bar, thin lines and speckles. It feeds them with random
gaps and random back-pressure, and compares all 90,000 flags per frame with
the reference model. It also checks the cycle budget described above. It
counts, and requires at least once:

* the background shortcut;
* competitions, including ones won by a neighbour;
* speckle pixels;
* leftward bands and downward steps;
* waits for input rows;
* input stalls and output back-pressure.

`cfed_config_sweep_tb` runs eight 40x24 frames back to back, each with its
own `lo`, `hi`, `s` and `t`. Two of the frames set thresholds so low that the
shortcut must stay off. Others use `s > 0` or a small `t`, so memberships
clamp at zero. Every frame is compared bit for bit with the reference model.

The unit tests cover the following, each checked against an independent
model:

* the 1-clock and 2-clock latencies and stalls of `active`;
* the safety of the shortcut;
* the meander order and window contents over two frames of a 9x8 image;
* the row-overwrite rule of the memory controller;
* read-and-clear of the output memories.

## Where this design fills gaps

The published description leaves the following open. Each choice below is
made so that the design works and is simple:

* **Class vectors of the edge classes.** Only the background vector
  `[lo lo lo lo]` is given. The edge vectors (`lo` along the edge, `hi`
  elsewhere) and the speckle vector `[hi hi hi hi]` are inferred.
* **Direction numbering** and the resulting class numbering.
* **What the competition compares.** This design uses the gradient across the
  edge at the center and at its two cross-edge neighbours, marks the winner,
  and lets the center win ties. A different rule in the original would give
  different (not necessarily thinner) edge maps.
* **Membership form.** One shift `s` and one offset `t` are shared by all
  classes. The subtract-from-offset pyramid follows the classifier datapath;
  the original's per-dimension piecewise formulas are not reproduced term by
  term.
* **Tie rules** in both MAX units.
* **The BGND detector when K > 4.** It is switched off.
* **Memory and I/O.** The memory organization (register files with
  combinational read), the 16-bit two-pixel input word, the 10-bit output
  word, the valid/ready handshakes, the reset and the border policy are all
  this design's own. The original shows a 16-bit bus into a Hi/Lo byte select
  and a 10-bit bus out, which these choices match.
* **Down-step refill.** The bottom row is refilled one register per clock.
  This adds 5 clocks per band (about 1.5% of a frame).

Not modelled: the pad ring, the power figures (22.4 mW, 53.8% saving) and the
0.18 um implementation. The power-saving ideas appear only as structure:
operand gating, disabled compare units and shared GCUs. No power
measurement is made.

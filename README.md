# FP-SLIC: fully pipelined SLIC superpixel segmentation in SystemVerilog

SLIC groups the pixels of an image into *superpixels*: compact regions of
similar colour. It does this by k-means clustering in colour and position.
The cluster centres start on a regular grid with spacing S. Each pixel is
assigned to the nearest centre among those around it. Each centre then moves
to the mean of its pixels, and the two steps repeat. Run in software, every
iteration reads the whole frame again.

FP-SLIC turns a fixed, small number of iterations into a chain of hardware
stages, one per iteration. All stages run at once on different lines of the
same video stream. Each stage sees every pixel exactly once, at one pixel per
clock. No frame buffer is needed: each stage needs only a few rows of centres
plus a delay line. Such a line holds the stream back until the centres it
must be compared with are final.

This RTL implements that pipeline. It is configured by default for 481 x 321
frames (the landscape BSDS500 size), a grid spacing of S = 9 (54 x 36 = 1944
superpixels, the nearest integer spacing to 2000 superpixels), compactness
m = 80, and two iterations. For every input pixel it outputs a 16-bit
superpixel ID, in the same order as the input. At one pixel per clock, a
481 x 321 frame takes 154 401 clocks. That is 259 frames/s at 40 MHz.

Three simplifications relative to textbook SLIC are part of the algorithm
itself, not of this implementation:

* Colours stay in RGB. There is no CIELAB conversion.
* Distances are Manhattan distances, not Euclidean:
  `D = |dr|+|dg|+|db| + (m/S)(|dx|+|dy|)`.
* The initial centres are not moved to the lowest-gradient position. Each
  one is simply the middle pixel of its S x S square.

## The pipeline

```
 pixels ─┬─► delay_unit (D0) ─► sp_update_unit 1 ─┬─► delay_unit (DM) ─► sp_update_unit 2 ─► sp_label ─► FIFO ─► IDs
         │                          ▲  │          │                        ▲
         └─► sp_init_store ─────────┘  │          └─► sp_store ────────────┘
             (middle pixel of         (row/col         (sums per superpixel,
              each square)             address)         averaged on read)
```

`fp_slic_top` generates this chain for `ITER` iterations:

* **Stage 0** is the initial delay plus the initialisation store.
* **Stages 1 .. ITER-1** each have an update unit, an accumulating store and
  a middle delay.
* **The last update unit** feeds the label unit.

With `ITER = 2` there are three stages: initial, one middle stage, and the
label stage.

| module | role |
|---|---|
| `fp_slic_pkg` | stream records (`pix_t`, `lab_pix_t`, `center_t`), widths, grid and bank helper functions |
| `pixel_position` | x/y, square column/row and bank counters, resynchronised by SOF and EOL |
| `delay_unit` | ring buffer in block RAM that delays the stream by a fixed number of pixels |
| `sp_init_store` | stage-0 store: keeps the middle pixel of every square as the initial centre |
| `center_bank` | one bank of a store: one superpixel row, LUT RAM, one write port and two asynchronous read ports |
| `sp_store` | middle-stage store: per-superpixel sums of R, G, B, x, y and a count; hands out averages |
| `sp_distance` | the fixed-point distance above |
| `sp_update_unit` | 3 x 3 sliding window of centres, nine distances, arg-min, which yields the row and column address |
| `sp_label` | ID = ceil(W/S) · row + col, with SOF and EOL |
| `axis_out_fifo` | small output FIFO with a credit rule that lets the sink apply back-pressure |
| `fp_slic_top` | wires the stages together |

## Why the delays have the lengths they have

This is the part of the design that everything else depends on. A pixel in
square (R, C) is compared with the centres of squares R-1..R+1 and C-1..C+1.
All nine must be final when the pixel reaches the update unit.

**Stage 0.** An initial centre is final as soon as the middle pixel of its
square has streamed past. The furthest centre the update unit needs is in
square row R+1. Because of the look-ahead described below, it also needs one
square column further to the right. The default delay is therefore
`D0 = W·S + (W/2)·S` pixels, that is 1.5 square rows. With the middle pixel
at offset (S-1)/2, the requirement is `(S + (S-1)/2)·W + S + (S-1)/2`
pixels. D0 covers this for any practical W and S.

**Middle stages.** Here a centre is an average. It is final only when every
pixel that could be assigned to it has been assigned. The pixels that can
join superpixel (R+1, C+1) lie in square rows R..R+2. The delay is therefore
`DM = 3·W·S` pixels. This is enough as long as the image is wider than about
3·S plus a few pixels.

**How the delay is counted.** The delays count pixels, not clock cycles. A
pixel leaves a delay line when the DM-th pixel after it enters. This keeps
the spatial distance between two stages exact even when the input has idle
cycles. The side effect is that the last `D0 + (ITER-1)·DM` pixels of a frame
are pushed out by the next frame. This matches a continuous video stream. To
get all of the last frame out, stream more pixels after it. The testbenches
stream an extra frame for this.

With these delays, the pipelined result is **identical** to running the same
algorithm frame by frame. The testbenches check exactly this, pixel by pixel,
against a frame-based model.

## The sliding window

`sp_update_unit` holds nine centres in a 3 x 3 register window:

* **Rows** are the square rows above the pixel's square, at it, and below it.
* **Columns** are the square to the left, the pixel's own square, and the
  square to the right.

When a pixel starts a new square (every S pixels along a line), the window
shifts one column left. The freed right column is loaded from the previous
store with the centres of the *next* square column.

**End of a line.** At the last square of a line, the "next" column is column
0 of the square rows that the *following line* belongs to. This is the row
above, at and below on the next line, or on the next frame. The window
therefore wraps by itself. Right after the wrap, the left column still holds
centres from the far end of the previous line. These cells are wrong, so
they are given the maximum distance.

**Cells that are never chosen.** The same maximum distance is given to:

* window cells outside the image;
* centres that collected no pixels in the previous iteration.

**Before the first pixel.** Before the first pixel after reset, the right
column must already hold column 0. The delay line in front of the unit
reports `primed` when it is full. The unit uses that idle moment to load the
column once. Later frames get the column from the ordinary wrap.

**Timing.** The unit has three clocks of latency:

1. The window is updated as the pixel is registered.
2. The nine distances are computed and registered.
3. The arg-min is computed and registered.

If several distances are equal, the first cell in raster order of the window
wins.

## Superpixel stores and their banks

A store keeps one *bank* per superpixel row in flight. A bank has ceil(W/S)
entries: 54 at the defaults. Rows map to banks by a row counter modulo
NBANK. This counter keeps running across frames, so consecutive frames
behave like one tall image.

**Which rows are in use.** While the writing stage works in square row R, it
updates rows R-1..R+1. At the same time, the reading stage, 3·S lines behind,
reads rows R-4..R-2. That makes six rows in use.

**A seventh bank when H is not a multiple of S.** If H is a multiple of S,
six banks are enough. If it is not (321 = 35·9 + 6), the short last row of a
frame lets the writer run one square row further ahead across the frame
boundary. With six banks, the next frame's writes would land in the bank the
reading stage is still using. The number of banks is therefore
`nbank_for(H, S)`: 6 or 7. At the default 481 x 321 it is 7.

**Resetting a bank.** When the writer enters square row R, the bank of row
R+1 must start from zero. Each bank has a row of "in use" flags in
flip-flops, and all of them are cleared in one clock at that moment. A write
to an entry whose flag is clear starts a fresh sum instead of adding to the
old one.

**Accumulating and reading.** Accumulation is a one-cycle read-modify-write
through the bank's first read port. The reading update unit uses the second
read port. It gets the three centres of one column, each sum divided by the
count (truncating). The division is combinational in the read path.

`sp_init_store` uses the same banks but only stores the middle pixel of each
square. In a square that is cut short at the right or bottom edge, the middle
pixel is the middle of the part that lies inside the image.

## Distance arithmetic

m/S is not an integer (80/9). `sp_distance` therefore computes
`D' = d_rgb·2^F + round(m·2^F/S)·d_xy` with F = 4 fractional bits. At the
defaults the weight is 142. The result is 24 bits wide. The all-ones value
cannot be reached, so it serves as the "never choose" distance.

## Interface and timing

| port | meaning |
|---|---|
| `s_axis_tdata[23:0]` | pixel `{R, G, B}`, 8 bits each |
| `s_axis_tuser` / `s_axis_tlast` | SOF (first pixel of a frame) / EOL (last pixel of a line) |
| `s_axis_tvalid` / `s_axis_tready` | AXI-stream handshake; idle cycles are allowed |
| `m_axis_tdata[15:0]` | superpixel ID = 54 · row + col (at the defaults) |
| `m_axis_tuser` / `m_axis_tlast` | SOF / EOL of the same pixel |
| `m_axis_tvalid` / `m_axis_tready` | AXI-stream handshake; the sink may stall |

**Back-pressure.** The pipeline itself never stalls. Once a pixel is in,
some earlier pixel's ID leaves the label stage a fixed number of clocks
later, whatever the sink does. Those IDs go into a 32-entry FIFO
(`axis_out_fifo`). `s_axis_tready` is high only while the FIFO has room for
every ID that can still arrive (`4·ITER+2` entries). A slow sink therefore
slows the input, and the FIFO cannot overflow. An assertion in `sp_label`
checks this. With a sink that is always ready, the FIFO holds at most one
entry and the input is never held back.

**Frame format.** Frames must be exactly W x H pixels. SOF and EOL
resynchronise the position counters.

**Latency.** The ID of input pixel *p* leaves the label stage `4·ITER + 1`
clocks after input pixel *p + D0 + (ITER-1)·DM* has been accepted. It
reaches the output one clock later if the FIFO is empty. At the defaults
this is 19 476 pixels plus 10 clocks.

**Reset.** `rst_n` is asynchronous and active low.

## Parameters (`fp_slic_top`)

| name | default | meaning |
|---|---|---|
| `W`, `H` | 481, 321 | frame size |
| `S` | 9 | grid spacing; grid = ceil(W/S) x ceil(H/S) |
| `M` | 80 | compactness m |
| `F` | 4 | fractional bits of m/S |
| `ITER` | 2 | iterations (update units) |
| `IDW` | 16 | ID width |
| `D0` | W·S + (W/2)·S = 6489 | initial delay, in pixels |
| `DM` | 3·W·S = 12 987 | middle delays, in pixels |
| `NBANK` | 6 or 7 (7 here) | banks per store |

**Limits.** Colours are 8 bits. Coordinates are 12 bits, so W and H can be
at most 4095. The grid can have at most 255 squares per side. The update unit
assumes W > 3·S plus a few pixels. For other image sizes or superpixel
counts, change W, H and S. The delays follow from them.

## Size

After coarse synthesis at the defaults, the design holds about 566 kbit of
memory:

* 506 kbit in the two delay lines (6489 + 12 987 words of 26 bits);
* the rest in the store banks.

It also has about 2 300 flip-flops. Fully packed, the delay lines fill
about 14 block RAMs of 36 kbit. An FPGA's depth and width granularity
usually needs a few more. Memory grows with W·S: wider images and larger
superpixels need longer delays.

## Where this implementation makes its own choices

The algorithm and the block structure (stages, delay lengths, banked stores,
sliding window, ID formula) follow the published FP-SLIC description. The
following are choices made here:

* **Bank count.** Seven banks instead of six when H is not a multiple of S
  (see above). With six, frames of 481 x 321 and S = 9 produce wrong labels
  near the top of the next frame.
* **Pixel-counted delays and back-pressure at the edge only.** Inside the
  pipeline the handshakes are reduced to a valid bit. A sink that is not
  ready is handled by the output FIFO and its credit rule.
* **Bank reset by per-entry flags** instead of clearing the RAM.
* **Middle-pixel offset, tie-breaking and the fixed-point weight** are as
  described above.
* **Combinational division** in the store's read path. A faster
  implementation would pipeline the division one square ahead.
* **The `primed` pulse**, which loads the first window column after reset.

Not included:

* The DMA engine that moves frames between memory and the stream ports.
* An alternative output that gives the final superpixel centres instead of a
  label per pixel. The published description mentions this only as an
  option.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_fp_slic_top`: 50 x 37 frames with S = 8 (squares cut short at the
  right and bottom) and 10 % idle input cycles.
  * Three frames are streamed, and two are checked pixel by pixel against
    `slic_ref_pkg`. That package is a frame-at-a-time model of the algorithm
    that knows nothing about banks, windows or delays.
  * Input beats are held until `s_axis_tready` takes them. The sink is not
    ready in 30 % of the cycles, so the credit rule holds the input back.
  * The test also checks SOF and EOL, and the exact latency of every beat
    leaving the label stage.
  * It counts window primes, shifts, wraps, maximum-distance fills, bank
    resets, idle input cycles, sink stalls and held-back inputs. It fails if
    any of them never happened.
* `tb_fp_slic_full`: the same checks at the default parameters, on one
  complete 481 x 321 frame, with a sink that stalls 5 % of the time (about
  460 000 checks, a few seconds).
* `tb_fp_slic_workloads`: runs, in one simulation, each with full frames:
  * 321 x 481 portrait frames with 1, 2 and 3 iterations;
  * 481 x 321 with S = 32, 12 and 10 (about 150, 1000 and 1600
    superpixels);
  * 640 x 480 with S = 12, and 320 x 240 with S = 9.
* Unit tests:
  * `tb_delay_unit`: random beats with gaps, exact delay and `primed`.
  * `tb_sp_distance`: against an integer model, including extremes.
  * `tb_sp_init_store`: every centre read back through all three read rows.
  * `tb_sp_store`: random accumulation with bank resets, averages compared
    with a model.
  * `tb_sp_update_unit`: against a nine-neighbour arg-min model. Junk centres
    sit outside the frame to show they are masked. It also checks the
    3-clock latency.
  * `tb_sp_label`: the ID formula.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fp_slic_full \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/fp_slic_pkg.sv tb/tb_fp_slic_full.sv
./obj_dir/Vtb_fp_slic_full
```

The RTL is written in synthesizable SystemVerilog-2017 and uses no vendor
primitives. The delay lines are read-first RAMs with a registered output,
which infer block RAM. The store banks are asynchronous-read arrays, which
infer LUT RAM.

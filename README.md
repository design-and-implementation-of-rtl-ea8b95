# On-line Bayer demosaicking core (ECI + one-pixel-pattern edge update)

A single-sensor camera sees the scene through a Bayer colour filter array. Each
pixel records only one of red, green or blue: green on a checkerboard, red and
blue on the remaining quincunx. This core rebuilds the two missing colours of
every pixel as the image streams in, one pixel per clock, while storing only
four image lines.

The interpolation is **ECI** (effective colour interpolation). It works on the
colour difference K = G − C (C = R or B), which changes much more slowly than
the colours do. First a green value is estimated at every red and blue pixel.
Then the missing chroma is estimated from neighbouring K values. ECI on its own
smears thin lines that are only one pixel wide. The **ECI+OP** extension checks
every ECI estimate with a small edge detector. Where it finds a strong
horizontal or vertical edge, it replaces the estimate with a plain
one-directional average along the edge. The hardware does this in two passes:

* a **Big Window (BW)** pass on a 7×7 window centred on a green pixel. It
  produces the green values of the four chroma neighbours, and R and B at the
  green centre;
* a **Small Window (SW)** pass on a 3×3 window centred on a red or blue pixel.
  It produces the one chroma value still missing there, using greens and
  chromas that the BW pass already computed for its neighbours.

Line RAMs carry the BW results from the first pass to the second.

Everything is in `rtl/`. The top module is `eci_op_core`.

## Algorithm

All values are 8-bit. Halving and quartering round down (arithmetic shift).
Every estimate is saturated to 0..255 as soon as it is formed.

**Edge detector (used after every estimate).** The inputs are the four green
values around a pixel (left, right, up, down) and the pixel's own green G_c:

    I_H = (G_l + G_r)/2     I_V = (G_u + G_d)/2
    edge        if |I_H − I_V| > ALPHA
    horizontal  if |G_c − I_H| < |G_c − I_V|, else vertical

ALPHA is a parameter (default 75). A difference exactly equal to ALPHA counts
as smooth. Equal distances count as vertical.

**Green at a red/blue pixel (NG unit, `neighbor_green`).** Each green
neighbour gets K = G − mean(the two chroma samples beside it along the same
axis). One of those two samples is the centre itself. The ECI estimate is
G = C_centre + mean(four K). The detector runs with the four neighbour greens
and the estimate as G_c. On an edge, G becomes I_H or I_V.

**Chroma at a green pixel (BW, `calculate_c` + `big_window`).** The two
neighbours along each axis are chroma pixels. Their greens come from NG units
(four in all). The estimate is C = G_centre − mean(G_a − C_a, G_b − C_b). Along
the row this gives one chroma (X), along the column the other (Y). The detector
then runs with the four new greens. On a horizontal edge, X becomes the mean of
its two samples. On a vertical edge, Y becomes the mean of its two samples.

**Chroma at a red/blue pixel (SW, `small_window`).** The missing chroma sits on
the four diagonal corners. Each green neighbour gets K = G − mean(the two
corners beside it). The estimate is C = G_c − mean(four K), where G_c is the BW
green of the centre. The detector runs on the original neighbour greens. On a
horizontal edge, C becomes the mean of the C values the BW pass found at the
left and right neighbours. On a vertical edge, it is the mean of those found at
the upper and lower neighbours.

## Streaming interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, also starts a frame |
| `din0`..`din6` | in | 8 | one column of a 7-row band, `din0` = top row |
| `eol` | in | 1 | high with the last column of a band |
| `order_info` | in | 2 | first two pixels of image row 0: `00` RG, `01` BG, `10` GR, `11` GB |
| `r`, `g`, `b` | out | 8 | demosaicked pixel |
| `valid`, `eol_o` | out | 1 | pixel present / last pixel of an output row |

The host sends image rows 0..6 column by column, with no gaps. It raises `eol`
on the last column. On the next clock it sends rows 1..7, and so on. An image of
W×H pixels is therefore H−6 bands of W clocks each. The core emits one pixel per
clock:

* During band n (rows n..n+6) it outputs row n+1.
* Column k of that row appears **11 clocks** after column k of the band was on
  `din`.

A 1000×1000 frame takes 994,000 clocks, which is 39.8 ms at 25 MHz, or 25
frames/s. The image width may be up to `MAX_WIDTH` (1024). The height is
unlimited.

**Borders.** Both passes need full windows. A pixel is fully interpolated only
if it lies at least 4 rows and 4 columns in from every edge of the input
(its 9×9 neighbourhood must be inside the image). Nearer the edges, the windows
read the previous band or the wrap-around of the shift registers, and the
outputs are meaningless. To get every pixel, pad the image by 4 on each side
and drop the pad from the output. Mirroring with an even-sized pad keeps the
Bayer phase.

## The pipeline

```
din0..6 ─► input_buffer ─► ff_block1 ─► big_window ─► line_memory ─► data_sync ─► ff_block2 ─► small_window
 (7×7 + 3×3)      │     (BW centre = row n+3)     (4 × 1024×16)                   ▲                    │
                  └──────────── 3×3 window p (SW centre = row n+1) ──────────────┘                    ▼
                                                                                output_select ─► r,g,b
```

### Input buffer (`input_buffer`)

Seven shift registers, one per band row, each seven stages long. A sample that
entered d clocks ago sits in stage d. Stages 0..6 form the 7×7 BW window, and
its centre (row 3, stage 3) is the BW pixel. Rows 0..2 continue for three more
stages (7..9). Those three stages form the 3×3 SW window, with its centre at
row 1, stage 8. So the SW pass works two rows above the BW pass and five columns
behind it. By the time the SW pass reaches a pixel, the BW pass has already
produced the results of all its neighbours, including the row below it.

### Half-rate passes (`ff_block1`, `ff_block2`)

Along a row, only every other pixel is green. The BW pass does useful work
only when its centre is green. The SW pass does useful work only when its
centre is red or blue. Each pass therefore sits behind a register bank that
loads only on its useful clocks and holds its value for the next clock. Its
combinational logic then toggles at half rate, which saves power.

The original design clocked these banks from two half-speed clocks of a clock
manager, 180° apart, and swapped them at every band change because the green
phase shifts by one pixel from row to row. Here both banks run on the core
clock with a **clock enable** computed from the pixel colour. That is the same
behaviour without a second clock domain.

### Line memory (`line_memory`, `line_ram`) — the hardest part

The SW pass at row m needs BW results from rows m−1, m and m+1:

* the BW green of the centre;
* the BW chroma of the neighbours above and below it (green pixels in rows
  m±1);
* the BW chroma of the neighbours left and right of it (green pixels in row m).

The BW pass is at row m+2 at that time. So four rows are live at once. Each row
is held in its own 1024×16 RAM (`line_ram`), one word per column:

* a green pixel stores `{B, R}` from the BW pass;
* a red/blue pixel stores `{8'h00, G}`, the green the BW pass found for it.

**Writing.** The BW pass at a green centre in column j produces two things:

* the green of its left neighbour j−1, which is written first, as `0G` at
  address j−1;
* its own `{B,R}`, which passes through a one-clock register and is written
  as `BR` at address j on the next clock.

So exactly one word is written per clock, into the RAM chosen by the 2-bit
**RAM Select** counter. The write address is the column counter (**Line
Counter**), delayed to the BW stage. RAM Select starts at the fourth RAM after
reset and steps at every `eol`. So the row written in band n becomes the "row
below" in band n+1, the "middle row" in band n+2 and the "row above" in band
n+3. The RAM is then overwritten. The rows rotate through the RAMs and nothing
is ever copied.

**Reading (`data_sync`).** All four RAMs are read on one port at the same
address, one clock behind the write. With S the RAM being written, rows m−1, m
and m+1 are in RAMs S+1, S+2 and S+3 (mod 4). Three multiplexers select them.
The values reach the SW stage in two steps:

1. When the address is the SW centre (`order` = 0), the up/centre/down
   registers take the chroma words of rows m±1 and the `0G` word of row m.
2. On the next clock (`order` = 1), the address has moved to the right
   neighbour. The row-m RAM now gives the right neighbour's `{B,R}`, and the
   same output delayed by two clocks gives the left neighbour's. The
   left/right registers take this pair.

All five values are then valid together, and `ff_block2` captures them beside
the 3×3 Bayer window. The byte taken from each `{B,R}` word (B or R) depends on
whether the SW centre lies on a red row.

### Tags (`mem_ctrl` and the tag pipeline)

Band changes make the timing subtle. When `eol` arrives, the input is already
the new band, but the BW, memory and SW stages are still finishing the old one.
Rather than keep separate counters per stage, `mem_ctrl` labels every input
column with a tag: `{valid, eol, col, sel, rpar}`.

* `col` is the column.
* `sel` is the RAM Select of its band.
* `rpar` is the parity of the band's top row, which toggles at each `eol`.

The tag shifts through ten registers beside the buffer (`tp[0..9]`). Each stage
reads the tag at its own depth. From the tag and `order_info` it derives the
colour of its pixel and the RAM it must use.

| Stage | Tag | Uses |
|---|---|---|
| BW load (`ff_block1` enable) | `tp[3]` | centre row 3 green? |
| RAM write | `tp[5]` | address `col`, RAM `sel`, `0G`/`BR` select |
| RAM read / `data_sync` | `tp[6]` | `order` = row 1 green?, row rotation |
| SW load (`ff_block2` enable) | `tp[8]` | centre row 1 red/blue? |
| output | `tp[9]` | `valid`, `eol_o`, which byte is which colour |

Pixel colour: a pixel at row parity rp and column parity cp is green when
`rp ^ cp == ~order_info[1]`. Its row is a red row when `rp == order_info[0]`.

### Output assembly (`output_select`)

For each output pixel, `output_select` combines:

* the pixel's own Bayer sample (taken from the SW window);
* its line-memory word;
* the SW result.

At a green pixel, R and B come from the `{B,R}` word. At a red/blue pixel, G
comes from the `0G` word, the own colour is the sample, and the remaining
chroma is the SW result. All outputs are registered.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `eci_op_core`, `big_window`, `small_window`, `calculate_c`, `neighbor_green`, `edge_detect` | `ALPHA` | 75 | edge threshold |
| `eci_op_core` | `MAX_WIDTH` | 1024 | line RAM depth = maximum image width |
| `line_memory`, `line_ram` | `DEPTH` | 1024 | words per RAM |

A 2048-wide sensor needs `MAX_WIDTH = 2048` (four 2048×16 RAMs).

## Where this RTL departs from the design it follows

* **Latency.** The first pixel leaves 11 clocks after its column entered. The
  original design reports 15, and its extra stages are not described in enough
  detail to reproduce. Use `valid`/`eol_o` rather than a fixed count.
* **Clocking.** The two half-speed clocks are replaced by clock enables (see
  above).
* **Synchronisation registers.** The original uses transparent latches enabled
  by `order` and `!order` in the memory read path. Here they are edge-triggered
  registers with enables.
* **Tags instead of a sequence generator.** The write select (`0G` or `BR`) and
  all colour decisions come from the tag pipeline. The result is the same, but
  the logic is organised differently.
* **SW neighbourhood.** The SW estimate is taken as drawn in the SW block
  diagram: four K values from the four green neighbours and the diagonal
  corners. A formula elsewhere in the original averages K values at the
  diagonal chroma pixels instead.
* **Arithmetic.** Floor rounding and saturation to 0..255 are this design's
  choices. The 16-bit memory word leaves no room for wider values.
* **Added ports.** `rst_n` and `valid` are added. A frame starts with a reset.
* **Borders.** These are not handled in the core (see above).

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<block>.sv`). The
testbench compares the block against values computed independently and prints
`TB_RESULT checks=N failures=M`.

`tb/tb_ref_pkg.sv` is a behavioural reference model of the whole algorithm.
It works on a whole image in memory with the equations above, plus generators
for test images: stripes one pixel wide in both directions, ramps and noise,
so that every edge path is exercised.

* `tb_eci_op_core` runs the top at its default parameters.
  * It streams 16×40 images in all four Bayer phases and a full-width 13×1024
    image.
  * It compares every interior pixel with the model and checks the 11-clock
    latency, one pixel per clock, `eol_o`, and that all four RAMs are written.
  * It counts how often each path was taken (NG smooth/edge; BW
    smooth/horizontal/vertical; SW smooth/horizontal/vertical) and fails if
    one never was.
* `tb_workloads` streams 10×10, 36×36, 96×96 and 1000×1000 frames through the
  top. It checks every interior pixel and that the 1000×1000 frame finishes
  within 40 ms of 25 MHz clocks.

## Simulating with Verilator

The package `demosaic_pkg` must come first, then the reference package, then
the remaining RTL and the testbench:

```sh
verilator --binary --timing -j 4 --Mdir obj \
    rtl/demosaic_pkg.sv tb/tb_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v demosaic_pkg) \
    tb/tb_eci_op_core.sv --top-module tb_eci_op_core
./obj/Vtb_eci_op_core
```

Replace `tb_eci_op_core` with any other testbench name to run that one. The
block testbenches need only the package and the modules below that block.
`tb_workloads` runs for a few seconds. The other testbenches finish in well
under a second.

To use the core in a design, instantiate `eci_op_core` with the files in `rtl/`.
The RAMs are written as plain arrays with a registered read, so FPGA tools map
them to block RAM.

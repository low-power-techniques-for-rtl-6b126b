# A low-power H.264 baseline decoding pipeline (luma, with chroma inter prediction)

This is the luma datapath of an H.264 baseline video decoder for 1280x720
video, together with its chroma inter-prediction path. It is built for low power, not peak speed. Every unit works on 4x4
pixel blocks and runs as fast as it can. The units are joined by small FIFOs
instead of a common pipeline clock enable, so each unit moves on as soon as
its own input is there. The slow units then set the pace only on average,
not block by block. This lets the clock, and with it the supply voltage, be
lower for the same frame rate.

Three ideas carry the design:

* **Parallel units.** The inverse transform has eight 1-D butterflies, the
  reconstruction adder has sixteen adders, the deblocking edge filter filters
  four pixel lines at once, and motion compensation has two interpolators.
  Most units therefore handle a 4x4 block in one or two cycles.
* **Two clock domains.** The memory controllers do most of the cycles per
  block, because each sits behind a single 32-bit frame-buffer port. Luma and
  chroma have separate frame buffers and controllers, so the two work in
  parallel. They have their own clock (`mclk`) and can have their own supply. The rest of the decoder runs
  on `clk`. The two meet only in asynchronous FIFOs.
* **Less memory traffic.**
  * Only the deblocking unit writes to the frame buffer, and only motion
    compensation reads from it.
  * Pixels that a later macroblock still needs are kept on chip in
    last-line caches.
  * When motion compensation works on horizontally adjacent blocks with the
    same motion vector, it reuses the columns it already has. Such a block
    then needs 4 new columns instead of 9.

## Block diagram

```
            block commands (one per 4x4 luma block)
                          |
        +-----------------+-------------------------+-----------------------------+
        | levels          | parameters              | MV requests (inter)         | chroma requests (inter)
        v                 v                         v                             v
  [coef FIFO 1]     [param FIFO 16]        [async FIFO 32] ---------+     [async FIFO 8]
                                                                    |             |      mclk
                                                                    |       [MEM chroma ctrl]<--> 32-bit chroma SRAM
                                                                    |             |  3x3 window per plane
                                                                    |       [async FIFO 4] --> [chroma interp] --> Cb/Cr 2x2 out
                                                                    |
        |                 |                                         |  mclk domain
      [IT] 1 blk/cycle    |                                         v
        |                 |                                   [MEM luma ctrl]<--> 32-bit SRAM
  [residual FIFO 1]       |                                    |  ^
        |                 v                                    |  | deblocked blocks
        +------------> [ADD] <---- [MC0 | MC1] <--[async 4]x2--+  |
                         ^  |         interpolators               |
             [INTRA] ----+  |                                     |
        (neighbours: MB buffer, left column, last-line cache)     |
                            v                                     |
                          [DB] --- last-four-lines cache          |
                            +---------------[async FIFO 2]--------+
```

`dec_top` instantiates all of this. The chroma predictions leave on the
`cmc_*` ports, because the chroma residual and reconstruction path is not
built. It also instantiates two units that have their own ports because the
logic that would feed them is not built:
* the chroma deblocking edge filter (`cdb_*`);
* the Exp-Golomb parser (`eg_*`).

## The block command

The entropy decoder is not part of the RTL. The pipeline instead takes one
`blk_cmd_t` per 4x4 luma block, in decoding order: macroblocks in raster
order, and blocks inside a macroblock in the usual nested zig-zag order
(index `i`: x = {i[2], i[0]}, y = {i[3], i[1]}). Each command carries:

| field | meaning |
|---|---|
| `mb_x`, `mb_y`, `blk_idx` | position |
| `intra`, `i4_mode` | 4x4 intra prediction mode (0 vertical ... 8 horizontal-up) |
| `mv_x`, `mv_y`, `ref_idx` | quarter-pel motion vector and the frame-buffer slot of the reference |
| `coded`, `level[16]` | quantised levels in raster order; `coded` = 0 means no residual |
| `qp` | quantiser, constant within a macroblock |
| `bs_left`, `bs_top` | deblocking boundary strength (0..4) of the block's left and top edge; 0 on picture edges |

`cur_frame` selects the slot the decoded frame is written to.
`trunc_lsb` is a non-standard accuracy knob of the inverse transform and
must be 0 for compliant decoding.

A command is accepted (`cmd_valid && cmd_ready`) only when three FIFOs can
all take it:
* the coefficient FIFO;
* the parameter FIFO;
* for inter blocks, the luma MV request FIFO and the chroma request FIFO into
  the memory domain.

## Units

### Inverse transform (`it_4x4`)

The unit handles one block per cycle with one cycle of latency. Each level
is first scaled by the dequantisation factor, `level * v(QP%6, position) <<
QP/6`. Four row butterflies follow, then four column butterflies: the
transpose between them is only wiring. The result is rounded with
`(x + 32) >> 6`.

Uncoded blocks give zero. They are counted as IT skips: in a real chip they
leave the datapath idle.

`trunc_lsb` zeroes that many least significant bits of the 16-bit internal
data after the pre-scaling and after the row pass. This lowers switching
activity at a small loss of picture quality, and is most useful for
strongly quantised video.

### Intra 4x4 prediction (`intra4x4_pred`)

All nine modes are formed in parallel from the 13 neighbour samples, and the
mode selects one result. The 3-tap and 2-tap filters along each diagonal are
written once per diagonal, so synthesis shares them.

If the top-right samples are unavailable, `p[3,-1]` replaces them. DC falls
back to the available side, or to 128 when neither side is available.

In `dec_top` the neighbours come from three places:
* the current macroblock's reconstructed pixels;
* the right column of the macroblock to the left;
* a last-line cache holding the bottom row of every 4x4 block column of the
  macroblock row above, plus the top-left corner.

Top-right availability follows the zig-zag rule: blocks 3, 7, 11, 13 and 15
never have it, and block 5 needs a macroblock above and to the right.

### Luma motion compensation (`mc_luma_interp`, `mc_luma_par`)

**Input.** The interpolator is fed one **column** of 9 reference pixels per
cycle: rows y-2..y+6 of the block. This suits the frame buffer, which stores
columns.

**Stored column.** Each incoming column is stored in a 6-deep shift register
as two sets of values:
* its 5 integer pixels (rows y..y+4);
* its 4 vertical half-pel values (rows y+½..y+3½). The 4 vertical 6-tap
  filters compute these on entry, and keep them unrounded so that the centre
  sample `j` is exact.

**Output.** Across the six stored columns, 9 horizontal 6-tap filters give
every half-pel sample one column needs. Four bilinear averagers then pick
the quarter-pel value. One output column of 4 pixels comes out per cycle.

**Cost per block.**

| case | input columns | cycles |
|---|---|---|
| fractional horizontal MV, fresh window | 9 (x-2..x+6) | 9 |
| integer horizontal MV | 4 | 4 |
| `in_first` low: continues the previous block's window | 4 new | 4 |

**Two interpolators.** `mc_luma_par` uses two of them. MC0 takes block rows
0 and 2 of each macroblock (indices 0,1,4,5,8,9,12,13) and MC1 rows 1 and 3.
Horizontal neighbours therefore stay on the same interpolator and can reuse
columns.

**Output FIFOs.** Each interpolator collects its 4 output columns into a
128-bit block in a depth-1 output FIFO. It accepts a new column only while
that FIFO has room, so a full output stalls only its own interpolator.

### Memory controller (`mem_luma_ctrl`, `mclk` domain)

**Word layout.** One 32-bit word holds a vertical column of four pixels. The
word address is:

```
addr = frame * W*H/4 + (y/4) * W + x        (byte k of the word = row 4*(y/4)+k)
```

With this layout:
* a 4x4 block is written as 4 consecutive words;
* a 9-row reference column is at most 3 reads;
* a column for a vertically integer MV is 1 or 2 reads.

**Requests.** For each MC request the controller fetches the columns the
interpolator needs. Coordinates are clamped to the picture edges, as the
standard requires.

**Window continuation.** A request continues the previous window when, for
the same interpolator:
* x has moved on by 4;
* the row is the same;
* the reference is the same;
* both requests have a horizontal fraction;
* both requests agree on whether there is a vertical fraction.

Only the 4 new columns are then read.

**Pipelining and priority.**
* Reads are pipelined: one address per cycle, with the data one cycle later.
* A 3-entry skid FIFO absorbs columns when the interpolator FIFOs push back.
* Writes of deblocked blocks take priority over reads.

**Counters.** The controller counts reads, writes and window reuses.

### Chroma inter prediction (`mem_chroma_ctrl`, `mc_chroma_interp`)

Every inter block also predicts the 2x2 chroma block below it in both planes.
The chroma position is half the luma position. The luma quarter-pel MV is
read as an eighth-pel chroma MV.

**Word layout.** The chroma frame buffer is a second 32-bit memory. One word
holds a 2x2 box of one plane. A frame is the Cb plane followed by the Cr
plane:

```
addr = frame * W*H/8 + plane * W*H/16 + (y/2) * (W/4) + x/2   (byte 2*(y&1)+(x&1))
```

**Reads.** For each plane the controller reads only the boxes that the window
covers. An integer MV needs a 2x2 area, and a fractional MV a 3x3 area, so a
window costs 1, 2 or 4 reads. Pixels outside the picture are clamped to the
edge. The 72-bit window (nine pixels) crosses back to `clk` through a depth-4
asynchronous FIFO.

**Filter.** `mc_chroma_interp` has four copies of the bilinear filter, so it
turns one window into a 2x2 block per cycle:
`((8-dx)(8-dy)A + dx(8-dy)B + (8-dx)dy C + dx dy D + 32) >> 6`.

### Deblocking (`db_luma`, `db_edge_filter`)

**Edge filter.** `db_edge_filter` filters one 4x4 block edge per cycle: four
lines of p3..p0|q0..q3 at once. It implements:
* the normal filter (bS 1..3), which changes up to p1..q1 with the
  tc-limited delta;
* the strong filter (bS 4), which changes up to p2..q2.

The alpha, beta and tc0 thresholds are indexed by QP.

**Order.** `db_luma` collects the 16 blocks of a macroblock. It then filters,
in the order the standard requires:
1. the four vertical edges (x = 0, 4, 8, 12);
2. the four horizontal edges (y = 0, 4, 8, 12).

That is 16 + 16 edge cycles, or 2 cycles per block. The edge against the
neighbouring macroblock uses the rounded mean of both QPs.

**Holding pixels back.** A finished pixel may still be changed by a later
macroblock, so some pixels are held back:
* The right four columns stay in the working buffer (columns 0..3 of a
  16x20 array) until the next macroblock has filtered its left edge.
* The bottom four rows go to a last-four-lines cache until the macroblock
  below has filtered its top edge. The cache has one 128-bit word per 4x4
  block column of the frame.

**Output.** The unit therefore outputs blocks shifted up and to the left:
* the above macroblock's bottom blocks, read back from the cache;
* the left macroblock's right column;
* the current macroblock's finished blocks.

At the end of a row and in the last row nothing is held back. While a
macroblock is filtered and written out, the unit takes no new blocks; this
time is counted as a DB stall.

### FIFOs and caches

* `sync_fifo` is a first-word-fall-through FIFO with a valid/ready handshake
  and an occupancy count.
* `async_fifo` is the clock-domain crossing:
  * Gray-coded pointers pass through two-flop synchronisers.
  * Its storage registers are written on the write clock, so every register
    sits in the domain of its own clock.
  * The depth must be a power of two and at least 2.
* `line_cache` is a direct-mapped memory with no tags: the address is
  implied by the position in the line. It has one write port and two
  asynchronous read ports.

### Side units

* `db_chroma_edge_filter`: the chroma version of the edge filter. It takes
  two lines of p1 p0 | q0 q1 at once and changes only p0 and q0:
  * bS 1..3: a delta clipped to tc0+1;
  * bS 4: the 3-tap averages.
  In `dec_top` its result is registered onto `cdb_out`.
* `expgolomb_dec`: decodes one ue(v)/se(v) codeword per cycle from a 32-bit
  look-ahead window. It handles up to 15 leading zeros, flags an error past
  that, and returns the codeword length for the bitstream shifter.

## Timing and throughput

| unit | cycles per 4x4 luma block |
|---|---|
| IT | 1 |
| ADD | 1 |
| intra prediction | 1 |
| interpolator | 9, or 4 (integer MV / continued window); two interpolators in parallel |
| deblocking | 2 (edges) plus 1 per output block |
| MEM | 4 writes plus 4..27 reads |
| chroma MEM | 2..8 reads plus 4 cycles (two planes), in parallel with MEM |

The full-size testbench decodes one 1280x720 frame with random content. It
uses about 30% intra macroblocks, sparse residuals and quarter-pel motion
vectors. The frame takes about 855,000 core cycles, or 14.8 per block. The
luma memory controller does about 600,000 reads and 230,000 writes in the
`mclk` domain. In parallel, the chroma controller does about 297,000 reads
for the 80,000 chroma predictions, roughly 500,000 cycles with its per-window
overhead.

The throughput is limited by the sequencing around ADD: one block is
predicted and added at a time, and the deblocking unit has a single
macroblock buffer. At that rate, 720p at 30 fps needs a core clock of about
26 MHz. The memory side needs about 25 M cycles per second, so a 50 MHz
memory clock covers it.

## Departures from the original ASIC and limitations

* **Chroma is prediction only.** Chroma inter prediction runs from the
  chroma frame buffer to 2x2 predicted blocks. Not built:
  * the chroma residual path (IT with the chroma DC transform);
  * chroma reconstruction;
  * chroma deblocking per macroblock: only the edge filter exists;
  * chroma write-back.
  The chroma frame buffer is therefore only read, and decoded frames carry
  no chroma.
* **No entropy decoder.** The CAVLC coefficient parser and the bitstream
  front end are not built: blocks arrive as commands. Boundary strengths are
  part of the command rather than derived from MVs and coefficient counts.
* **Intra 4x4 only.** Intra 16x16, chroma intra prediction and the DC
  transforms used with them are missing.
* **FIFO depths.** Depths follow the original where a FIFO exists, with
  these exceptions:
  * The DB-to-MEM FIFO has depth 2 instead of 1, the minimum of the Gray-code
    FIFO.
  * The per-block parameter FIFO has depth 16.
  * Coefficients travel as 16-bit values.
  * MC columns carry a few control bits beyond the 72-bit column.
* **ADD sequencing.** ADD takes one block at a time, and an inter block's
  prediction is not started ahead of the block before it. Together with the
  single macroblock buffer in the deblocking unit, this costs throughput
  against the original, which reaches about 3 cycles per block on average.
* **No vertical reuse.** The memory controller reuses only horizontal
  overlap.
* **Frame-size buffers.** The intra last-line cache is sized W/4+1 words of
  32 bits. The deblocking cache is W/4 words of 128 bits. The organisation
  of the original 324x32 intra cache is not reproduced.
* **Asynchronous cache reads.** The line caches read asynchronously. A
  synchronous SRAM macro would need one more pipeline stage at each read.
* **Not modelled.** The off-chip SRAM, the level shifters between supply
  domains and the FPGA test harness (DVFS control, display reordering) have
  no RTL. The testbenches contain a behavioural SRAM.
* **Fixed frame size.** As in the original chip, the frame size is fixed by
  parameters (`W`, `H`, default 1280x720). Other sizes must be multiples of
  16 and change the cache sizes.

## Verification

Every unit has a self-checking testbench in `tb/`. The expected values come
from `tb/h264_ref_pkg.sv`, a whole-frame model written directly from the
standard's definitions. It covers:
* quarter-pel luma samples;
* the nine intra modes;
* the inverse transform;
* the deblocking of a complete frame in macroblock order.

Each testbench prints `TB_RESULT checks=N failures=M`. Each also fails if
the mechanism it is meant to exercise never happened: reuse, stalls,
back-pressure, filtered edges and so on.

| testbench | what it checks |
|---|---|
| `tb_dec_top` | 64x32 pictures, three frames decoded in a chain (each the next one's reference), pixel-exact against the reference. It counts intra waits, MC waits, IT skips, DB stalls, filtered edges, MC output stalls, window reuse and command back-pressure, and fails on any that is zero. Every Cb and Cr prediction of every inter block is checked against the eighth-pel reference |
| `tb_dec_top_full` | the same at full size (1280x720, default parameters), one frame of 57,600 blocks, about 4 s in Verilator |
| `tb_mem_chroma_ctrl` | every window of random requests (inside and beyond the edges, integer and fractional), 1/2/4 reads each, back-pressure |
| `tb_mem_luma_ctrl` | layout of written words, every fetched column (including clamped ones), window reuse, writes interleaved with reads |
| `tb_db_luma` | a 4x3-macroblock picture against whole-frame deblocking, every block written exactly once |
| `tb_mc_luma_interp`, `tb_mc_luma_par` | all 16 fractional positions, fresh / continued / integer windows, back-pressure |
| others | unit-level reference checks (transform, intra, chroma interpolator, luma and chroma edge filters, Exp-Golomb, FIFOs, cache) |

To run one with Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dec_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/h264_pkg.sv tb/h264_ref_pkg.sv tb/tb_dec_top.sv
./obj_dir/Vtb_dec_top
```

## Files

* `rtl/h264_pkg.sv`: shared types, plus the clipping, threshold and scale
  tables as functions.
* One module per file in `rtl/`:

| module | role |
|---|---|
| `dec_top` | the pipeline |
| `it_4x4` | inverse transform |
| `add_recon` | reconstruction |
| `intra4x4_pred` | intra 4x4 prediction |
| `mc_luma_interp`, `mc_luma_par` | luma motion compensation |
| `mc_chroma_interp` | chroma interpolator |
| `mem_luma_ctrl` | luma memory controller |
| `mem_chroma_ctrl` | chroma memory controller |
| `db_luma`, `db_edge_filter` | deblocking |
| `db_chroma_edge_filter` | chroma edge filter |
| `sync_fifo`, `async_fifo` | FIFOs |
| `line_cache` | last-line cache |
| `expgolomb_dec` | Exp-Golomb parser |

* `tb/`: one testbench per module. Also the reference package
  `h264_ref_pkg.sv` and `dec_tb_body.svh`, the body shared by the two
  decoder testbenches.

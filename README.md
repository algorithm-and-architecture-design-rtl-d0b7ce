# Multi-rate frame rate up-conversion engine for a 3840x2160 LCD

Film and broadcast video reaches a 120 Hz panel at 24 Hz or 60 Hz. To show it
without judder, the panel driver must invent the missing frames: four new
frames between every two 24 Hz frames, or one between every two 60 Hz frames.
This RTL is the processing engine of such a frame rate up-converter (FRUC).
It works at quad-HD output (3840x2160), at 300 MHz, with the frames kept in
external DRAM.

The main idea is to split the work across two resolutions:

* **Decide motion on a small grid.** Matching and motion decisions are all
  made on a 1920x1080 copy of each frame. A 32x32 block of that copy covers
  64x64 output pixels. A frame therefore has 60 x 34 = 2040 blocks.
* **Cost blocks with sums.** Blocks are compared with the *8x8 MSEA*, not a
  per-pixel SAD. Each 32x32 block is cut into sixteen 8x8 cells, and each
  cell is reduced to the sum of its pixels. The cost of a candidate is the
  sum of the 16 absolute differences of those cell sums. So a candidate costs
  one pass through a 16-input tree.
* **Build output pixels at full size.** Motion-compensated pixels are made
  at full resolution. Motion vectors are doubled and the blocks scaled up.

The engine is a set of units. A sequencer runs them one procedure at a time,
and each procedure sweeps a whole frame:

```
down-sample -> 8x8 sums -> motion estimation (forward, backward)
  -> MRF correction (3 iterations) -> MV mapping -> inverse MC
  -> bi-MSEA -> artifact detection -> boundary-error search -> OBMC
```

`fruc_top` holds one instance of each unit and the connections between them.
These parts are not included and are reached through `fruc_top`'s ports:

* the procedure sequencer
* the DRAM read/write request logic
* the SRAM write address generators

## Shared types (`fruc_pkg`)

| type / constant | width | meaning |
|---|---|---|
| `pix_t` | 8 | luma pixel |
| `sum8_t` | 11 | sum of 8 pixels |
| `sum64_t` | 14 | sum of an 8x8 cell |
| `msea_t` | 18 | 8x8 MSEA of a 32x32 block (16 x 14-bit differences) |
| `mv_t` | 2 x 9, signed | motion vector, -256..255 on the 1080p grid (search range is +-128) |
| `dis_t` | 14 | sum of MV differences |
| `eng_t` | 24 | MRF energy |

The reset is asynchronous and active low (`rst_n`) everywhere. Memory arrays
are not reset.

## Motion estimation: predictive square search (`me_engine`)

This is the largest and least obvious part of the design. Several units work
together on each 32x32 block:

* `me_engine` (the controller)
* two pairs of window memories
* `flex_sum_tree`, `msea_accum` and `sad_tree`

### Search rule

1. **Predictor.** The engine takes the component-wise median of three
   neighbouring MVs. It checks a 4-step square of nine candidates around
   that median.
2. **Accept the predictor.** It is accepted if the square's centre wins, or
   if the best MSEA is below `THRESHOLD` = 1024. The search then narrows with
   2-step and 1-step squares around the winner.
3. **Reject the predictor.** Otherwise the engine evaluates 8-step squares
   starting from the zero vector. Each time a non-centre candidate wins, the
   square moves onto it. This repeats until the centre wins, up to
   `MAX_8STEP` moves. Then 4-, 2- and 1-step squares converge.
4. **Bounds and ties.** Candidates outside +-`SEARCH_RANGE` (128) are never
   chosen. On a tie, the centre wins first, then the lowest candidate index.

### Two window memories per search

Small-step squares and 8-step squares are fed from different memories.

**M window (small steps).** It holds 48 lines of 48 pixels. That covers the
32x32 block plus +-8 around the window centre. One line is stored across
three 128-bit single-port SRAM banks (`sram_sp`, 48 words each). A 4/2/1-step
square is computed line by line:

* Each cycle one M line enters `flex_sum_tree`.
* The tree forms horizontal 8-pixel sums. It does this for each of the three
  candidate column offsets (centre x plus -step, 0, +step) and for each of
  the four 8-pixel columns of the block.
* `msea_accum` adds each line's sums into the cell sums of every candidate
  whose rows cover that line. That is 9 candidates x 16 cells, 14 bits each.
  The row of a line for candidate row jy is `y - (top + (jy-1)*step)`.
* After the last line, the 9 sets of 16 cell sums go through `sad_tree`, one
  candidate per cycle. They are compared with the current block's cell sums
  (`cur_sums`).

A square of step s takes 32 + 2s line cycles, plus 9 issue cycles, plus 4
cycles of tree latency, plus one decision cycle. With the handshakes, a block
whose predictor is accepted takes 158 cycles. That is 9 more than the 149
cycles of the reference schedule (see Departures).

**O window (8-step).** It holds 8x8 cell sums of the reference frame, one per
8-pixel position, over the whole +-128 range. This is a 36x36 grid of
16-bit sums, spread over 16 single-port banks of 84 words:

```
bank    = 4*(gy % 4) + (gx % 4)
address = 9*(gy / 4) + (gx / 4)
```

An 8-step candidate needs 16 cell sums: a 4x4 group of grid points. Any 4x4
group touches each bank exactly once. So all 16 sums are read in one cycle
and go straight into `sad_tree`.

The first 8-step square of a block computes all nine candidates. When the
square moves by one step, it shares six candidates with the old square on a
straight move, or four on a diagonal move. Those keep their MSEA, and only the
3 or 5 new candidates are read and sent through the tree. A moved square
costs its 3 or 5 issue cycles plus 8 cycles: set-up, the O read, 4 cycles of
tree latency, collection and the decision.

**Refetch on a move.** When an 8-step square moves, the M window for the
final small-step squares must be reloaded. The engine then:

1. raises `fetch_req` with `fetch_center`;
2. waits for `fetch_done`.

In `fruc_top`, the rising edge of `fetch_req` pushes a request into
`job_queue`. The word pushed is `{30'b0, x, y}`, and the DRAM side pops it.

### Ping-pong

There are two pairs of windows, M1/O1 and M2/O2. `pp_sel`, latched at
`start`, picks the pair being searched. Meanwhile the loader (outside the
engine) fills the other pair for the next block. In the scheduling this
design follows, one pair is used in raster order and the other in inverse
raster order. That is why the forward and backward searches can share the
engine. The scan order itself belongs to the sequencer.

The window storage adds up to 9984 bytes:

* M: 2 pairs x 3 banks x 48 words x 128 bits = 4608 bytes
* O: 2 pairs x 16 banks x 84 words x 16 bits = 5376 bytes

The engine's SRAM writes and its reads never meet in the same bank on the
same cycle. An assertion (`a_no_write_conflict`) checks this.

### The arithmetic units

**`flex_sum_tree`** is combinational. It has two modes:

* Pattern mode: from a 48-pixel line it forms twelve 8-pixel sums at base
  column `8 + cx + (jx-1)*step + 8*i`.
* Plain mode: it forms six aligned 8-pixel sums. This mode serves
  whole-frame 8x8 sums and the down-sampled frame.

**`msea_accum`** holds the 144 accumulators described above.

**`sad_tree`** is a 16-input tree:

* It has an ABS unit per input pair and four adder levels.
* The ABS stage and the first three adder levels are registered. The last
  addition is combinational.
* A result appears 4 clock edges after its inputs, and a new input set can
  enter every cycle.
* In sum mode it adds the `a` inputs only.

One tree serves the ME engine. Further instances serve the bi-MSEA unit and,
at 8 bits, the boundary-error search.

## MRF correction: smoothing the motion field

Block matching on flat or repetitive areas gives isolated wrong vectors. They
are corrected with three ICM iterations of a Markov random field. For each
block, the candidates are:

* the eight neighbours' MVs
* the block's own MV

Each candidate's energy is:

```
E(k) = MSEA(k) + 48 * sum over the 8 neighbours n of |MV_k - MV_n|
```

The block takes the candidate with the lowest energy.

**`mv_grouping`** visits the 36 pairs of the nine MVs, one pair per cycle.
It adds each pair's L1 difference into the total of every candidate the pair
concerns:

* A neighbour-neighbour pair adds to both neighbours.
* A self-neighbour pair adds to the self candidate only.

It also labels a neighbour-neighbour edge when the difference is at most 8.
Labelled edges drive the grouping:

* The node with the most labelled edges (lowest index on a tie) becomes a
  group centre. Its labelled neighbours become members.
* A group needs at least 3 nodes.
* The rule is applied twice, so there are at most two groups.
* Nodes in no group are flagged.

Grouping exists to save bandwidth. The MSEA values of a whole group can be
computed from one M window loaded around the group centre, because the
labelled members are within +-8 of it. The totals are ready 36 cycles after
`start`. The grouping is ready on the same cycle.

**`mrf_select`** adds `MSEA + 48*dis` for the nine candidates and picks the
lowest, one cycle later. On a tie the block's own MV wins. In `fruc_top`,
`mv_grouping.done` starts `mrf_select`. The totals feed the smoothness terms,
and the candidates' MSEA values come in through `mrf_msea`.

## From existing frames to the new frame: MV mapping and inverse MC

Motion estimation gives one MV per block of the *existing* frames. The new
frame lies between them, at time phase `num/den` (for 24 -> 120 Hz the phases
are 1/5 .. 4/5, and for 60 -> 120 Hz the phase is 1/2).

**`mv_mapper`** (through mapping) assigns each inter block its MV:

* Each existing block is projected along its MV to the new frame's phase.
* The area by which the projected square overlaps the inter block is added
  to a table entry for that MV (`overlap_calc`). An MV projected from several
  blocks therefore collects their areas together.
* If the largest total area exceeds half the block (512 pixels for 32x32),
  that MV wins.
* Otherwise the inter block takes the area-weighted mean of all projected
  MVs. It takes the zero vector if nothing reaches it. `map_by_max` tells
  which rule was used.

**`imc_addr_gen`** drives inverse motion compensation. One existing block
(64x64 pixels at full size) is read into the on-chip buffer. Each inter block
whose source area meets it then gets the overlapping pixels copied. For each
(existing, inter) pair the unit:

* derives the overlapped rectangle, using the same overlap geometry as the
  mapper;
* walks the rectangle in 8x2-pixel tiles, one tile per cycle while `ready`
  is high.

Each tile gives:

* the read position in the buffer
* the write position in the new frame
* the number of valid columns and rows

## Post-processing: finding and repairing broken blocks

After compensation, each 16x16 sub-block of the new frame is checked. Sub-blocks
that look wrong get a second, local search.

**`artifact_detect`** compares a sub-block with its four neighbours (up,
right, down, left). A neighbour raises the condition when:

* their MVs differ by more than 2 in x or in y, **and**
* the neighbour's bi-MSEA (the match between the two existing frames along
  the MV) is larger than the sub-block's own.

Any raised condition labels the sub-block. The search then starts from:

* the sub-block's own MV, if its bi-MSEA is below 512;
* otherwise, the mean of the MVs of the neighbours that raised the
  condition.

Unlabelled sub-blocks are skipped (`pp_skip`).

**`bi_msea`** produces those bi-MSEA values. It runs only for sub-blocks
whose MV differs from a neighbour's. The sub-block is 16x16 on the 1080p
grid, and its value has four terms: the four 8x8 cells, each giving
|forward cell sum − backward cell sum|. The unit works in four steps:

1. It takes the 16 lines of the forward block (the block the MV points to).
2. It takes the 16 lines of the backward block (the block the opposite MV
   points to).
3. A `flex_sum_tree` in plain mode turns each line into two 8-pixel sums,
   which are accumulated into four cell sums per direction.
4. After the 32nd line, the cell sums go once through a `sad_tree`.

The result comes 5 cycles after the last line, so a sub-block streamed
without gaps takes 37 cycles. The values go back to DRAM with the sub-block's
information, and artifact detection reads them from there.

**`be_search`** is the bilateral boundary-error search. It opens two windows:

* one around the initial MV;
* one around its opposite, for areas that are uncovered or occluded.

Each window holds the even points of +-8: 81 candidates. A candidate's cost
is its boundary error: the sum of absolute differences between two rings of
64 pixels.

* The outer ring is the pixels just outside the sub-block in the new frame.
* The inner ring is the boundary pixels of the block the candidate points to.

The ring is handled as four 16-pixel parts. Each cycle the unit requests one
part and gets the pixels back one cycle later. They go through an 8-bit
`sad_tree`. A sub-block therefore takes 2 x 81 x 4 = 648 request cycles,
plus about 5 cycles to drain. The winning MV and its window are reported.

**`obmc_blend`** removes block edges by overlapped block motion compensation.
Each output pixel is a weighted sum of five predictions: the one from the
sub-block's own MV and the ones from its four neighbours' MVs. The weights are
integers out of 16:

* A neighbour's weight is `4*(H-d)/H`, where d is the distance from that
  neighbour's edge and H is half the block. It is 0 from the middle of the
  block on.
* The own MV takes whatever remains of 16, so the weights always sum to 16.

The result is the weighted sum divided by 16. Four pixels enter per cycle,
and the result is registered.

## Supporting units

* **`frame_sum8x8`** makes the O-window data. It reads a whole 1080p frame
  in raster order, one 48-pixel line segment per cycle (40 per line). A
  plain-mode `flex_sum_tree` gives six 8-pixel sums per segment. These are
  added into a row of 40 x 6 partial cell sums. On the eighth line of each
  band, the six finished 8x8 sums leave one cycle later, tagged with their
  grid column and row, and that segment's accumulators restart.
* **`downsample`** makes the 1080p copy. It takes two lines of 8 pixels and
  outputs 4 pixels, each the rounded mean of a 2x2 group.
* **`job_queue`** is a 64-entry FIFO of 48-bit request words. It decouples
  the engine from the uncertain latency of the DRAM bus. Assertions flag a
  push into a full queue and a pop from an empty one.
* **`sram_sp`** is the single-port RAM model used for all window banks. It
  has a one-cycle synchronous read.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| me_engine | SEARCH_RANGE | 128 | +- search range on the 1080p grid |
| me_engine | THRESHOLD | 1024 | MSEA below which the predictor is kept |
| me_engine | MAX_8STEP | 32 | limit on 8-step moves (own choice) |
| mrf_select | WEIGHT | 48 | smoothness weight |
| mv_mapper | BLK / AREA_HALF | 32 / 512 | block size, largest-area rule |
| mv_mapper | NTAB | 16 | distinct MVs per inter block (own choice) |
| imc_addr_gen | EB / IB | 64 / 64 | existing and inter block size, full resolution |
| artifact_detect | MV_GAP / BI_LIMIT | 2 / 512 | artifact condition, initial-MV rule |
| be_search | RANGE | 8 | +- search range, even points |
| obmc_blend | SIZE | 32 | sub-block size at full resolution |
| job_queue | DEPTH / WIDTH | 64 / 48 | queue size (own choice) |

## Departures from the reference architecture, and what is missing

These follow the reference architecture:

* the search rules
* the thresholds and weights
* the window sizes and bank counts
* the sum-tree / accumulator / SAD-tree datapath
* the grouping rules
* the mapping rule with the 512-pixel test
* the artifact test
* the even-point bilateral search with its 648-cycle cost
* the divide-by-16 OBMC

These are this design's own choices:

* **Pattern timing.** A small-step pattern costs 3 cycles more than the
  reference schedule (handshake and decision cycles), so an accepted block
  takes 158 cycles instead of 149. A moved 8-step square costs 4 cycles
  more than the reference's 7 or 9.
* **Mapping fallback.** When no MV covers more than half an inter block, the
  MV is the overlap-area-weighted mean.
* **Neighbour mean in artifact detection.** The mean of the flagged
  neighbours uses equal weights.
* **OBMC weights.** The weight map above is this design's (linear ramps of
  4/16 at the edges).
* **Discontinuity norm.** Discontinuity is the L1 norm.
* **Ties.** Ties keep the centre, the own MV, or the first candidate
  searched.
* **Bit widths.** Widths come from the value ranges (see `fruc_pkg`).

These are not included:

* **No sequencer.** The procedure sequencer and the post-processing controller are
  absent. `fruc_top` exposes each unit's start/done and data ports instead.
* **No DRAM side.** There is no DRAM request/receive logic and no SRAM write
  address generator. The window and pixel buffers are filled through ports.
* **No shared MRF sum-tree.** In MRF correction the candidates' MSEA values
  enter through a port. The reference architecture computes them by reusing
  the ME sum-trees. The grouping masks that decide which M windows to load
  are produced here.
* **Partial inverse MC.** It stops at tile coordinates. The SRAM rotate
  network that turns an unaligned 8x2 tile into bank reads is absent, and so
  is the U/V pass sequencing.
* **Separate sum-trees.** `bi_msea` and `frame_sum8x8` have their own
  sum-tree (and, for `bi_msea`, SAD tree) instead of borrowing the ME
  engine's. The reference architecture time-shares one set, so this costs
  area but not cycles. The pre-fetch of the next sub-block is left to the
  loader.

## Throughput at 300 MHz

| mode | cycles per input frame |
|---|---|
| 24 -> 120 Hz | 12.5 M |
| 60 -> 120 Hz | 5.0 M |

What the built units need:

* **Motion estimation.** An accepted block takes 158 cycles. Rejected
  blocks took 318-381 cycles in simulation, including window reloads.
  For the document's mix of 60% accepted and 40% rejected predictors, the
  mean is 232 cycles per block, against a budget of 266. With 2040 blocks and
  two searches per frame pair, that is about 0.95 M cycles.
* **Whole-frame 8x8 sums.** They take 40 x 1080 = 43 200 cycles per frame.
* **MRF grouping.** It adds 36 cycles per block per iteration.
* **bi-MSEA.** It takes 37 cycles per sub-block it is run on.
* **Bilateral search and OBMC.** The search takes about 653 cycles per
  labelled sub-block; OBMC takes 256 cycles per 32x32 sub-block at 4 pixels
  per cycle. Up to about 3900 labelled sub-blocks fit in the 24 Hz budget
  after the other procedures, and about 1000 in the 60 Hz budget.

DRAM bandwidth, not these units, limits mapping and compensation.

## Simulation

Every unit has a self-checking testbench `tb/tb_<unit>.sv`. Each testbench
works its expected values out independently: from behavioural models,
brute-force searches or closed formulas. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

The timing checks are:

| testbench | what is timed |
|---|---|
| `tb_sad_tree` | 4-cycle latency |
| `tb_me_engine` | accepted-predictor block within 164 cycles; mean of a 60/40 accepted/rejected mix within 266 |
| `tb_be_search` | 648-656 cycles per sub-block |
| `tb_me_engine` | 9 candidates for the first 8-step square, then 3 or 5; each square within its issue cycles + 8 |
| `tb_mv_grouping` | 36 cycles |
| `tb_bi_msea` | result 5 cycles after the last line |
| `tb_frame_sum8x8` | each band's sums one cycle after the segment; two full 1920x1080 frames |

`tb_fruc_top` runs the whole engine at its default sizes. It drives these
cases:

* an ME block whose predictor is accepted and one that is rejected and
  refetched through the queue
* both ping-pong pairs
* MRF grouping and an MRF change of vector
* mapping by largest area and by weighted mean
* an inverse MC walk
* the first band of whole-frame 8x8 sums
* a bi-MSEA computation
* a labelled and a skipped sub-block
* a bilateral search won in the opposite window
* OBMC and down-sampling

It counts each case and fails if any case never happens.

With Verilator 5 (`--timing` is needed for the testbenches' delays):

```sh
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/fruc_pkg.sv tb/tb_fruc_top.sv --top-module tb_fruc_top \
    --Mdir build_fruc_top
./build_fruc_top/Vtb_fruc_top
```

Replace `fruc_top` with any unit name to run its testbench. `-y rtl` lets
Verilator find the other modules by file name. The package must be listed
first. Expect Verilator lint warnings about:

* unused signals at `fruc_top`'s boundary;
* `rst_n` being used both as an asynchronous reset and in assertions'
  `disable iff`.

Neither affects the circuit.

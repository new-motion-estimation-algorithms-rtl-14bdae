# Multi-point diamond search motion estimator (MPDS / DMPDS)

Block-matching motion estimation for high-definition video (1080p and
3840x2160), in synthesizable SystemVerilog.

A plain diamond search (DS) walks downhill on the SAD surface from the
centre of the search area. In HD video that surface has many valleys, so DS
often stops in a local minimum near the centre. This engine runs **five
independent diamond searches per block**: one from the centre and one from
each of four sectors, starting at (d,d), (-d,d), (-d,-d) and (d,-d). It keeps
the best of the five results. At worst the answer equals plain DS. When the
true motion lies beyond a local minimum, one of the sector searches usually
reaches it.

Two variants share the hardware:

* **MPDS**: d is fixed (10 samples).
* **DMPDS** (the default): a small state machine adapts d from frame to
  frame.

Each core is limited to five diamond iterations after its first large
diamond. That bounds its cycle count. In steady state the engine returns
one motion vector every 170 clock cycles. That is 41.3 MHz for 1080p at
30 frames/s and 165.2 MHz for 3840x2160 at 30 frames/s. A parameter switches to
the eleven-iteration version, which refills every core once more and needs
at most 340 cycles per vector.

## Data format and the 34x34 window

* **Sub-sampling.** Matching uses 4:1 sub-sampled luma: every second
  sample in both directions. A 16x16 macroblock becomes an **8x8 block of
  8-bit samples**. All coordinates, vectors and d are in sub-sampled
  samples. Multiply by two for full-resolution pixels.
* **Axes.** x grows to the right and y grows downwards.
* **The window.** Each core holds a private **34x34 reference window**.
  The candidate at its start point sits at window position (13,13).
* **Why 13.** The first large diamond reaches 2 samples. Five further
  large diamonds move the centre by up to 2 samples each. The final small
  diamond adds 1. So 2 + 5x2 + 1 = 13, and 8 + 2x13 = 34. A search can
  never read outside the window, so a core needs only one window fill per
  block.
* **Diamond patterns.**
  * The large diamond (LDSP) has 9 candidates: the centre, (±2,0),
    (0,±2) and (±1,±1).
  * The small diamond (SDSP) has 4 candidates: (±1,0) and (0,±1).

Storage per core:

| Memory | Size |
|---|---|
| Reference window | 34x34x8 = 9,248 bits |
| 13 local candidate memories | 13x64x8 = 6,656 bits |
| Current block | 512 bits |
| **Total per core** | **16,416 bits** |

The five cores together hold about 82 Kbit.

## One diamond-search core (`ds_core`)

```
 fill rows ──► ref_window_mem (34x34, row valid bits)
                    │ 6x12 patch around the centre, one line pair per cycle
                    ▼
        13 x block_mem  (MEM1..9 = large diamond, MEMA..D = small diamond)
                    │ two lines per cycle
 cur rows ──► block_mem (current) ──┐
                    ▼               ▼
             9 x sad_pu (5-stage adder tree + accumulator)
                    │
     sad_comparator (9-way, centre wins ties) / (5-way for the small diamond)
                    │
                 ds_ctrl  (control, position controller, SDSP position controller)
                    │
              result register (valid/ready)
```

### How one diamond step runs

A diamond step is the part that is hardest to follow. `ds_ctrl` sequences
it:

1. **WAIT_ROWS.** The core waits until every window row the step will read
   has arrived: rows centre_y-2 to centre_y+9. Each row of the reference
   memory has a valid bit, so a core can start searching 12 beats into its
   34-beat fill. The feeder sends those 12 central rows first.
2. **RUN** (5 cycles).
   * In cycles 0..3, line pair *k* of all 13 candidates around the current
     centre is copied into the local memories. One 6x12 patch read of the
     reference memory covers all 13 candidates at once.
   * In cycles 1..4, line pair *k-1* goes from the local memories and the
     current-block memory into the processing units (PUs).
3. **DRAIN.** The PUs' five-stage pipeline delivers the nine SADs. The
   comparator decides in the same cycle.

After a large diamond:

* **Centre wins.** The small diamond follows at once. MEM A..D already hold
  its four candidates, and PUs 1..4 are reused, so there is no reload.
* **Another candidate wins.** The position controller moves the centre
  there, and the next large diamond starts.
* **Limit reached.** After the sixth large diamond (the first plus five
  iterations), the centre moves to that diamond's winner. MEM A..D are
  reloaded around it, and the small diamond runs there.

The SDSP position controller turns the final position into a vector
(position minus 13) and hands it to a one-entry result register. The core is
then idle and can be refilled while that result waits for the other four
cores.

### Step cost

Each step takes about 12 cycles: 5 for RUN, 5 for the pipeline and 1 for
the decision. The worst case seen in simulation is 90 cycles from start to
result. That is well inside the 170-cycle refill period, so the cores never
throttle the engine.

## The five-core engine (`mpds_top`)

```
 blk cmd ─► mpds_feeder ─► fetch port (frame memory)
               │  34 beats per core, cores 0, A, B, C, D in turn
               ▼
    ds_core x5 (start points (0,0), (d,d), (-d,d), (-d,-d), (d,-d))
               │  results, each plus its start point
               ▼
    core_comparator (3 cycles) ─► mv_* outputs
               │
    frame SAD total ─► d_generator ─► d for the next frame (DMPDS)
```

### Feeding and the 170-cycle period

Reading the frame memory is the bottleneck. The feeder fills one core per
34 cycles, in the order 0, A, B, C, D, so a block takes 5x34 = 170 cycles.
Each core starts searching while the next one is filled. When core D is
full, core 0 is already being refilled for the next block.

| Cycle | Event |
|---|---|
| 0 | Core 0 fill starts |
| 34, 68, 102, 136 | Cores A, B, C and D start their fills |
| 170 | Next block's core 0 fill starts |
| ≤ 309 | Vector for the first block leaves the comparator |

### Sequencing

* **Tag queue.** When a block's fill starts, its tag goes into a small
  queue. The tag holds the position, the last-in-frame flag and the d used.
* **Final compare.** When all five cores hold a result, the results are
  offset by their start points and compared in three pipelined cycles. On
  equal SADs the lower core index wins, so the centre is preferred.
* **Frame SAD.** The engine adds up the frame's SAD total for the d
  generator.

### d generator (DMPDS)

Frames form groups of three trials: d, d-Δ, d+Δ. When the third frame's
SAD total is known, the trial with the lowest total becomes the new d and Δ
is halved (5, 2, 1). Once Δ is 1 it stays 1, so d keeps probing ±1 until
reset. Starting from d=10 and Δ=5, the first frames use 10, 5, 15.

The d for a new group depends on all frames of the previous group. The
feeder therefore holds the first block of every third frame until the
engine has drained. This costs a few hundred cycles per three frames,
about 0.01% of a 1080p frame.

Ties between trials keep the earlier trial. d is clamped to 0..`D_MAX`.

### Eleven-iteration mode (MPDS V. 2)

With `MAX_ITER=11` (and `DYNAMIC=0`, the fixed-d version) the engine
follows the longer search. One 34x34 window only holds six large diamonds,
so the search is split in two:

* **First round.** The five cores are filled and started exactly as in the
  five-iteration mode.
* **Pause.** A core whose sixth large diamond still moves away from the
  centre moves to that winner, remembers the offset of the winner from its
  start point, and pauses.
* **Second round.** After core D's first fill, the feeder visits the cores
  again in the same order. It waits while a core is still searching. A
  paused core gets a second 34x34 window centred on its new centre and
  resumes with up to six more large diamonds, then the small diamond. A
  core that has already finished is skipped.
* **Timing.** A block costs at most 340 cycles (ten fills) and the first
  vector comes out within 479 cycles. Both fall when cores finish in the
  first window.

The current block is kept in each core and is not fetched again.

## Interface of `mpds_top`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock. Asynchronous active-low reset that clears everything. |
| `blk_valid`/`blk_ready` | in/out | Block command handshake |
| `blk_x`, `blk_y` (16 b signed) | in | Top-left of the block in the sub-sampled frame |
| `blk_last` | in | Last block of a frame. Frames end here, which drives the d generator. |
| `fetch_valid`/`fetch_ready` | out/in | One frame-memory beat. The data must answer in the same cycle. |
| `fetch.ref_x`, `fetch.ref_y` | out | First sample of the 34-sample reference row |
| `fetch.cur_en`, `fetch.cur_x`, `fetch.cur_y` | out | Current-block row, on the first 8 beats of each fill |
| `ref_data[34]`, `cur_data[8]` | in | Samples for the beat |
| `mv_valid` | out | One pulse per block, in block order |
| `mv.x`, `mv.y` (8 b signed) | out | Motion vector relative to the block |
| `mv_sad` (14 b) | out | SAD of the vector |
| `mv_core` | out | Winning core: 0 = centre, 1..4 = A..D |
| `mv_blk_x`, `mv_blk_y`, `mv_last`, `mv_d` | out | Block tag |
| `d_base`, `d_delta` | out | d generator state |

Window coordinates can fall outside the frame near picture borders. The
frame memory decides what to return there, for example edge padding.

### Parameters of `mpds_top`

| Parameter | Default | Meaning |
|---|---|---|
| `MAX_ITER` | 5 | Large-diamond iterations after the first. 5 or 11 (11 turns on the second round). |
| `DYNAMIC` | 1 | 1 = DMPDS. 0 = MPDS with d fixed at `D_INIT`. |
| `D_INIT` | 10 | Initial d |
| `DELTA_INIT` | 5 | Initial Δ |
| `D_MAX` | 40 | Upper clamp for d |
| `TAGQ_DEPTH` | 4 | Blocks in flight |

The shared constants (block size, window size, widths) are in
`rtl/me_pkg.sv`.

## Files

| File | Content |
|---|---|
| `rtl/me_pkg.sv` | Types, sizes, candidate offset tables |
| `rtl/mpds_top.sv` | Engine: feeder, five cores, tag queue, final comparator, frame SAD, d generator |
| `rtl/mpds_feeder.sv` | Core fill sequencing and block/frame intake |
| `rtl/ds_core.sv` | One diamond-search core, with pause and resume for the second window |
| `rtl/ds_ctrl.sv` | Core control unit and position controllers |
| `rtl/ref_window_mem.sv` | 34x34 reference window with row valid bits and patch read |
| `rtl/block_mem.sv` | 8x8 memory (local candidate memories, current block) |
| `rtl/sad_pu.sv` | 5-stage SAD processing unit, two lines per cycle |
| `rtl/sad_comparator.sv` | N-way minimum with preferred index |
| `rtl/core_comparator.sv` | 3-stage best-of-five comparator |
| `rtl/d_generator.sv` | DMPDS d adaptation |
| `tb/me_model_pkg.sv` | Synthetic test video and software diamond-search model |
| `tb/tb_*.sv` | One self-checking testbench per module |

## Verification

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* **`tb_mpds_top`** runs the engine at its default parameters. Nine frames
  of four blocks are read from a synthetic video (a periodic landscape with
  a different true motion per frame, up to (22,20)).
  * A software model computes every frame's d and every block's vector,
    SAD and winning core, and all of these are compared.
  * On frames 0..5 the memory is always ready. Blocks must start exactly
    170 cycles apart, and each vector must come out within 309 cycles of
    its first fetch.
  * Frames 6..8 add random memory wait states.
  * The test counts early small diamonds, iteration-limit stops, centre and
    sector wins, d changes, d-generator stalls and memory stalls. It fails
    if any never happened.
* **`tb_mpds_v2`** runs the eleven-iteration mode (`MAX_ITER=11`,
  `DYNAMIC=0`) on the same video and compares every block with the
  eleven-iteration software model. It checks the period (170 to 340
  cycles) and the 479-cycle latency, and counts second fills, skipped
  cores and searches longer than six large diamonds.
* **`tb_ds_core`** compares one core with the model for 40 blocks and
  several start points. It also checks the 169-cycle worst case, fills with
  gaps, and results held back while the next block fills.
* **`tb_ds_ctrl`** checks the control unit against scripted comparator
  decisions. It covers the iteration limit, the reload rule and loading
  only from rows that have arrived. A second instance with `MAX_ITER=11`
  covers the pause after six large diamonds and the resume.
* **Unit testbenches** cover the remaining modules: the processing unit
  (values and 5-cycle latency), the memories, both comparators, the feeder
  (beat-by-beat addresses, strobes, 170-cycle period) and the d generator
  (10/5/15 opening, ties, clamp at 0, stall rule).

Running a testbench with plain Verilator, for example the full engine:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/me_pkg.sv tb/me_model_pkg.sv rtl/*.sv tb/tb_mpds_top.sv \
  --top-module tb_mpds_top
./obj_dir/Vtb_mpds_top
```

The simulator has two states, so everything that is read is reset.

## What follows the source description and what is this design's own

**From the source description:**

* The algorithm: five start points, d=10, DMPDS trials with Δ=5 halving to
  1, and the five- and eleven-iteration limits.
* 4:1 sub-sampling, 16x16 blocks and 8-bit samples.
* The 34x34 reference memory with its 34-cycle fill.
* 13 local memories, nine 5-stage PUs handling two lines per cycle, and
  four PUs shared with the small diamond.
* Core-by-core feeding with 170 cycles per vector, the 3-cycle final
  comparator and the 309-cycle first-vector latency.
* For eleven iterations, a second fill of every core, with at most 340
  cycles per vector and 479 cycles latency.

**This design's own choices:**

* The exact step schedule within a core. Each core finishes within 90
  cycles instead of using its full 169-cycle budget. This does not change
  the 170-cycle period, which the feeding sets.
* Row valid bits for overlapping fill and search, and the row fill order.
* The handling of the iteration limit: move to the winner, reload MEM A..D,
  then run the small diamond.
* All tie rules.
* The frame-memory, block-command and result interfaces.
* The 32-bit frame SAD total.
* The d clamps.
* In the eleven-iteration mode: the pause after six large diamonds, the
  window re-centred on the core's centre, and skipping cores that have
  already finished.
* The drain stall at d-generator group boundaries. The source description
  states that d generation adds no latency.
* Memories built as registers. A silicon implementation would map the
  windows to SRAM macros.

**Not included:**

* The external frame memory. A behavioural model lives in the test package.

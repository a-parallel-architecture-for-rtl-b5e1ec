# Parallel full-search motion estimation engine

Motion estimation is the most expensive step of an HEVC encoder. For each
block of the current frame it looks for the most similar block of a reference
frame. This engine does that step by brute-force full search. It compares a
block with every candidate position of a search area, so a search takes as
many clocks as there are candidates, whatever the block size:

    search time = candidates in the search area x clock period
    frame time  = (blocks in the frame / NBLK) x search time

Every pixel subtraction of a block happens in parallel. Several blocks of
the current frame are compared at the same time with the same candidate.
Each candidate block goes through the following steps in turn:

1. Subtract all pixel pairs in parallel.
2. Add up the absolute differences into a SAD (sum of absolute differences).
3. Keep the candidate with the smallest SAD.

A pipeline register sits between each of these steps, so a new candidate can
enter on every clock.

The engine is the hardware half of a hardware/software split. The software
encoder holds the frames and feeds the engine through plain ports: the current
blocks, and a stream of candidate blocks. The engine returns, for each
current block, the best SAD and the position of the best candidate.

## The datapath

```
            cur_blk[NBLK][N] ──►┌──────────── sub_array ─────────────┐
                                │ input regs ─► N*NBLK subtractors ─►│ diff regs ─► sad_tree[k] ─► best_match[k] ─► best_*[k]
 ref_blk[N] ───────────────────►│ (candidate register shared by all) │               (|d| sum, reg)   (min, reg)
 ref_valid ─► search_ctrl ─► (valid, first, last, x, y) ─► 3-stage tag delay ───────────────────────┘
```

| clock | stage | register |
|---|---|---|
| 0 | `search_ctrl` accepts the candidate presented with `ref_valid`, tags it with its (x, y) and first/last | none (tags are combinational) |
| 1 | `sub_array` input registers: NBLK current blocks and the candidate | `a_q`, `b_q` |
| 2 | `sub_array` subtractors, one per pixel per block | `c_q` (9-bit signed) |
| 3 | `sad_tree`, one per current block: sum of \|d\| | `sad` |
| 4 | `best_match`, one per current block: compare and keep | `best_*`, `done` |

Registering the subtractor inputs as well as its outputs leaves each
subtractor alone between two flip-flop stages. This short critical path is
what lets the original FPGA build of the subtractor run at a 2.2 ns clock
instead of 20 ns.

The tags (valid, first, last, x, y) travel through a 3-stage shift register
in `me_top`, alongside the data. Each SAD therefore reaches `best_match` in
the same clock as its own position. If you change the number of pipeline
stages in `sub_array` or `sad_tree`, change `LAT` in `me_top` to match.

### Concurrent blocks share the candidate

`sub_array` has a single candidate register, and NBLK current-block register
sets read it. With the defaults (2x2 blocks, NBLK = 3) it holds:

- 3 x 32 bits of current-block pixels;
- 32 bits of candidate pixels;
- 3 x 36 bits of differences.

That makes 236 flip-flops. A version that wraps the differences to 8 bits
would need 224. The blocks searched together are meant to be neighbours in
one row of the current frame. They all see the same candidates, so they all
get the same search area.

### SAD and match quality

`sad_tree` adds the absolute values of the N differences of one block in a
single registered stage. The mean error per pixel used to judge match quality
is SAD / N. N is a power of two in every HEVC block size, so no divider is
built: read `best_sad` with log2(N) fractional bits. For 2x2 blocks, a
`best_sad` of 3 means a mean error of 0.75.

`best_match` loads the first candidate of a search without comparing it.
After that, it replaces its best only when a candidate's SAD is strictly
smaller. Among equal SADs the earliest candidate in raster order wins, and
that is the lowest y first, then the lowest x.

## Using the engine

### Ports of `me_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | begin a search; ignored while `busy` |
| `search_w`, `search_h` | in | clog2(X_MAX)+1, clog2(Y_MAX)+1 | candidate positions per row (1..X_MAX) and rows (1..Y_MAX), sampled with `start` |
| `cur_blk[k][i]` | in | NBLK x N x 8 | pixel i of current block k |
| `ref_valid` | in | 1 | a candidate is on `ref_blk` this clock |
| `ref_blk[i]` | in | N x 8 | pixel i of the candidate |
| `busy` | out | 1 | a search is running and candidates are accepted |
| `done` | out | 1 | one-clock pulse: the results are valid |
| `best_sad[k]` | out | NBLK x (8+log2 N) | smallest SAD found for block k |
| `best_x[k]`, `best_y[k]` | out | NBLK x clog2(X_MAX), clog2(Y_MAX) | position of that candidate in the search area |

Pixel i of a block is the pixel at column `i % BLK_W` and row `i / BLK_W` of
that block.

### A search, clock by clock

1. While `busy` is low, hold `start` high for one clock, with the search size
   on `search_w`/`search_h`. `busy` rises.
2. Present the candidates in raster order of their top-left corner, with x
   counting fastest. Each clock with `ref_valid` high takes one candidate.
   You may drop `ref_valid` for any number of clocks: those clocks are gaps
   and take nothing.
3. `busy` falls in the clock after the last candidate has been taken. A new
   `start` is accepted from that clock on, so searches can run back to back.
4. `done` pulses 4 clocks after the last candidate was taken. `best_*` then
   hold the result until the next search reaches `best_match`.

Keep `cur_blk` steady from the first candidate until one clock after the
last one.

A search of P candidates without gaps runs for P + 4 clocks, measured from
the first candidate to the clock in which `done` is high. The next search
can overlap those last 4 clocks.

The engine does not look at pixel values outside the candidate block. A
candidate position (x, y) means whatever block the host sends for it. Edge
handling, and search areas that are not whole frames, are the host's
business.

`search_ctrl` asserts that `search_w` and `search_h` are in range when a
search starts.

## Parameters and sizes

| parameter | default | meaning |
|---|---|---|
| `BLK_W`, `BLK_H` (me_top) | 2, 2 | block size; N = BLK_W x BLK_H subtractors per block |
| `NBLK` (me_top, sub_array) | 3 | current blocks searched at once |
| `X_MAX`, `Y_MAX` (me_top, search_ctrl) | 1024, 768 | largest search area, a whole 1024x768 frame |
| `PIX_W` (me_pkg) | 8 | pixel width |

The block size is fixed when the design is built, not chosen at run time. To
serve all HEVC partition sizes, build one engine per size. The logic grows
as NBLK x N. At 64x64, each block needs 4096 subtractors and a 4096-input
adder in one stage. For the large sizes, expect to split `sad_tree` into
several pipeline stages, and to raise `LAT` in `me_top` to match.

The table below gives the time for one 1024x768 frame with a full-frame
search (786,432 candidates per block) at a 2.2 ns clock:

| block | blocks per frame | NBLK = 1 | NBLK = 3 |
|---|---|---|---|
| 2x2 | 196,608 | 340 s | 113 s |
| 4x4 | 49,152 | 85 s | 28 s |
| 8x4 | 24,576 | 42.5 s | 14.2 s |
| 16x16 | 3,072 | 5.3 s | 1.8 s |
| 64x32 | 384 | 0.66 s | 0.22 s |
| 64x64 | 192 | 0.33 s | 0.11 s |

For 4x4 blocks and larger, the NBLK = 1 column matches the published times
for the single-block engine. Full search over a whole frame is far from real time for small
blocks; a 55x55 search area cuts each search from 786,432 to 3,025 clocks.

## How far to trust it

The following parts are taken from the original design:

- the parallel subtractor with registered inputs and outputs;
- 8-bit pixels and a 2x2 smallest block;
- three blocks searched concurrently;
- full search at one candidate per clock;
- the frame size.

The following are this design's own choices:

- **Candidate registers shared by the concurrent blocks.** This is inferred
  from the published register and IO counts of the three-block build, which
  match one shared candidate input.
- **9-bit differences.** The published subtractor keeps 8 bits, so
  differences outside -128..127 wrap and corrupt the SAD. This design keeps
  the sign bit.
- **SAD adder and best-match comparator on chip.** The published IO counts
  (one 8-bit output per subtractor) suggest that the original synthesized
  unit sent the differences off chip. The original describes the SAD and the
  choice of the best block only as functions. The adder and comparator here
  are the simplest that do the job.
- **Control.** The start/busy/done handshake, the raster order, the gaps in
  the candidate stream, the tie rule and the reset are this design's own.
- **Run-time search size.** The search area size is an input at run time,
  with the frame as the largest area.

The following are not built:

- the software encoder;
- the frame storage;
- any data reuse between overlapping candidates. Every candidate block is
  sent in full, one block of pixels per clock.

There are no timing constraints or FPGA results for this RTL. The clock
periods above come from the original FPGA builds of the subtractor.

The one lint warning left, `SYNCASYNCNET`, comes from the range assertion in
`search_ctrl`: its `disable iff` samples `rst_n`, which the flip-flops use as
an asynchronous reset. It does not affect the logic.

## Files

| file | content |
|---|---|
| `rtl/me_pkg.sv` | pixel and difference types, SAD width function |
| `rtl/sub_array.sv` | parallel subtractor, shared candidate register |
| `rtl/sad_tree.sv` | absolute-difference sum of one block |
| `rtl/best_match.sv` | smallest-SAD tracker |
| `rtl/search_ctrl.sv` | search sequencer and position tags |
| `rtl/me_top.sv` | the engine |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the ones below |
| `tb/tb_me_top.sv` | 80 searches on a 24x12 area with random sizes, gaps, ties, back-to-back starts |
| `tb/tb_me_full.sv` | one full 1024x768 search at the default parameters (786,432 candidates) |
| `tb/tb_me_frames.sv` | ten neighbouring 2x2 blocks of a shifted, noisy copy of a 1024x768 frame, each searched over the whole frame; prints each block's match and mean error per pixel |
| `tb/tb_me_sizes.sv`, `tb/me_size_check.sv` | the engine built for 4x4, 8x4, 16x16, 64x32 and 64x64 blocks, and 4x4 and 8x8 blocks over a 55x55 area |

Every testbench compares the outputs with a model of its own. Each prints
`TB_RESULT checks=N failures=M` at the end, and stops with a failure if its
watchdog expires. The end-to-end test counts each mechanism it must exercise
and fails if one never happened. The mechanisms are:

- gaps in the candidate stream;
- replacement of the best candidate;
- equal SADs;
- a start while busy;
- back-to-back searches;
- different results in one search;
- exact matches;
- a search over the largest area.

To run a testbench with Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/me_pkg.sv tb/tb_me_top.sv \
          --top-module tb_me_top -Mdir obj_me_top -o sim
./obj_me_top/sim
```

Substitute any other `tb_*` name. The full-size search takes about a second
to simulate. `tb_me_sizes` takes longer to build (about 15 s), because of the
64x64 instances.

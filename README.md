# Pipelined-macroblock full-search motion estimator

Full-search block matching needs a large search window for every macroblock.
For a ±64 range and 16×16 blocks, that window is 144×144 pixels. A
conventional estimator keeps the whole window on chip, plus the extra
columns for the next macroblock, to avoid reading the same reference pixels
from frame memory again and again. For ±64 that is about 188 kbit of buffer;
for ±128 it is about 631 kbit.

This design searches **S = 2M/N consecutive macroblocks at the same time**
(eight for ±64). It does so one column of search positions at a time, with
each macroblock started N columns after the one before it. With that
stagger, all S macroblocks need the **same N-pixel-wide vertical strip** of
the previous frame at the same moment. The on-chip storage is only:

* the strip, N+1 columns × (2M+N−1) rows (one column is being refilled), and
* S+1 macroblocks of the frame being coded (S being searched, one loading).

That is about (2N+1)(2M+N) pixels, roughly 38 kbit for ±64 and 72 kbit for
±128. Each macroblock still evaluates every candidate, and every reference
pixel is still read from frame memory once per macroblock row. So the
result, the arithmetic and the memory traffic are the same as a
conventional full search. Only the order of the reads changes: frame memory
is read one pixel column at a time, not 16 columns wide.

The RTL is SystemVerilog-2017. It is synthesizable apart from the
testbenches, and its defaults are the main configuration: ±64, 16×16
macroblocks, CCIR601 720×480.

## The schedule

The estimator runs a sequence of **column steps** s = 0, 1, 2, …. All steps
take the same time T. The buffer has S **positions**, numbered 0 (oldest
macroblock) to S−1 (newest). Macroblocks are numbered in raster order over
the whole frame. In step s:

* position p holds macroblock `i = floor(s/N) − S + p`;
* position p searches the column of displacements
  `dx = −M + (s mod N) + N·(S−1−p)`, for every `dy = −M … M−1`, top to bottom.

For ±64 this gives the following pattern. Call the eight blocks E…L, with L
the newest, at position 7:

| column step (of L) | E  | F  | G  | H  | I   | J   | K   | L   |
|--------------------|----|----|----|----|-----|-----|-----|-----|
| 0                  | 48 | 32 | 16 | 0  | −16 | −32 | −48 | −64 |
| 1                  | 49 | 33 | 17 | 1  | −15 | −31 | −47 | −63 |
| 15                 | 63 | 47 | 31 | 15 | −1  | −17 | −33 | −49 |

Block E is N pixels left of F, F is N pixels left of G, and so on. So all
eight candidates of a step start at the same frame column: the strip's left
edge. Once the oldest block reaches dx = M−1, its 2M columns are done. At
that **macroblock change** it leaves, its motion vector is emitted, and the
block loaded in the meantime enters at position S−1 with dx = −M. Each
block spends 2M steps in the buffer, and a new one enters every N steps.

The strip moves one pixel to the right per step. So per step the buffer
needs:

* one new strip column of 2M+N−1 pixels from the previous frame, and
* one row (N pixels) of the next macroblock, so that a whole block arrives
  in N steps.

These are fetched while the current step is being searched.

### Frame edges

A search position is **operated** only if its candidate block lies wholly
inside the frame. Otherwise the position is skipped, and whatever the
buffers hold for it is ignored. Candidates above or below the frame are
never read from memory.

Blocks flow across macroblock rows without a pause. Let W be the frame width
in pixels. The strip column fetched in step s is column `(s−M) mod W` of
macroblock row `floor((s−M)/W)`. So once the strip reaches the right edge of
one row, it continues at the left edge of the next row. For the N−1 steps in
between, every position is outside the frame: blocks finishing the old row
want candidates to the right of it, and blocks starting the new row want
candidates to the left of it. Those steps search nothing, and the strip for
the new row fills during them. The row change therefore costs no extra time:
one row of blocks takes N·(W/N) steps like any other. `step_idle` shows these
steps.

At any step, only the blocks of one macroblock row can have operated
positions, so a single strip is enough.

### Start and end of a frame

During the first N steps, only the first macroblock is loaded. After the last
macroblock enters, the pipeline drains for 2M more steps. A frame takes
`N·(NMB + S)` steps, where NMB is the number of macroblocks: 21,728 steps for
720×480 at ±64.

## Blocks

| module | role |
|---|---|
| `pmp_motion_estimator` | top: wires the blocks below |
| `pmp_controller` | step counter, displacement per position, operated masks, fetch jobs, macroblock change |
| `fetch_unit` | per step, reads one strip column (rows inside the frame only), then one macroblock row, from frame memory; writes them into the buffers |
| `search_window_buffer` | strip of N+1 columns × (2M+N−1) rows, used as a circular buffer in x; delivers R strip rows per cycle |
| `reference_block_buffer` | S+1 macroblocks; a rotating head pointer performs the macroblock change; delivers R rows of every position's block per cycle |
| `sad_pe` | one per position: sum of absolute differences, R rows per cycle, accumulated over N/R cycles |
| `mv_decision` | best SAD and displacement per position; records move down with the blocks; emits the result of position 0 at a macroblock change |
| `me_pkg` | pixel, SAD, vector and coordinate types, memory request and result structs |

All S processing elements receive the same strip rows in the same cycle. Each
one also receives its own block's rows. A step is:

1. cycle 0: start the fetch job and the first candidate;
2. 2M·N/R cycles of search, R rows of one candidate per cycle;
3. one cycle for the last SAD to reach the decision unit;
4. extra cycles only if the fetch has not finished (`stall`);
5. one advance cycle, which is also the macroblock change every N steps.

With the defaults (R = 8), T = 2·64·16/8 + 2 = **258 cycles**. A 720×480 frame
then takes 21,728 × 258 = 5.61 M cycles, so 30 frames/s needs about 168 MHz.
The fetch moves 143 + 16 = 159 pixels per step, so a memory that returns one
pixel per cycle keeps up with little latency to spare.

## Interfaces

Top-level ports (`pmp_motion_estimator`):

* `start` (pulse) searches one frame. `busy` stays high until `done`
  pulses. `done` pulses in the same cycle as the last result.
* **Frame memory**:
  * requests: `mem_req_valid` / `mem_req_ready` carrying `mem_req`, which is
    `{frame, x, y}` of one pixel. `frame` is `FRAME_REF` for the previous
    frame or `FRAME_CUR` for the frame being coded.
  * responses: `mem_rsp_valid` / `mem_rsp_data`, in request order, at most one
    per cycle, with no back-pressure. Any latency works; late data only
    stretches the step.
* **Results**: `mv_valid` with `mv`, one macroblock per pulse, in raster
  order. `mv` is `{mb_col, mb_row, mvx, mvy, sad}`, with signed 8-bit vector
  components and a 16-bit SAD.
* `stall` is high while a step waits for memory. `step_idle` is high during
  steps with no operated position.

Parameters: `N` (16), `M` (64), `R` (8, rows per cycle in each processing
element), `FRAME_W` (720) and `FRAME_H` (480). `S = 2M/N` is derived. Limits:

* `FRAME_W` and `FRAME_H` must be multiples of N.
* `N` must divide 2M, and `R` must divide N.
* The package's 8-bit vectors and 16-bit SADs limit the design to M ≤ 128
  and N ≤ 16.

Between two equal SADs, the first one in search order wins. That means the
smaller dx, and for equal dx the smaller dy.

## Where this design makes its own choices

The method fixes the schedule, the buffer organisation, what is imported per
column step, and that nothing is searched outside the frame. The rest was
chosen here:

* **Buffer height.** The strip is 2M+N−1 rows (143 for ±64), which is exactly
  the rows that dy = −M…M−1 uses. The size estimate (2N+1)(2M+N) counts one
  row more. The built buffers hold 4,735 pixels (37,880 bits) instead of
  4,752.
* **Processing elements.** There is one SAD element per position, handling 8
  of the 16 rows per cycle. The method only requires keeping whatever
  elements the underlying full search uses. `R` trades clock rate against
  area: R = 16 halves T.
* **Storage.** Both buffers are flop arrays with combinational reads, not
  SRAM macros. The reference buffer rotates a pointer rather than moving
  data.
* **Frame memory.** The pixel-wide valid/ready interface, the in-order
  responses, and fetching the strip column before the macroblock row are
  all choices of this design.
* **Frame start.** The 16-step prologue that loads the first macroblock, and
  the fixed step time even for steps with nothing to search, are choices of
  this design.
* **Conventions.** Result format, tie-break, 8-bit pixels, and an
  asynchronous active-low reset of control state. Buffer contents are not
  reset, because nothing unwritten is ever used.

Not built:

* The method can also be applied to subsampled full searches and to the
  first stage of hierarchical block matching. Only plain full search is
  implemented.
* The frame memory is external. The testbenches use a behavioural model of
  it.

## Verification

Each testbench prints `TB_RESULT checks=N failures=F` and has a watchdog.
Test images come from `tb/tb_frame_pkg.sv`:

* The previous frame is a hash of the pixel position.
* The current frame moves every macroblock by its own displacement. Some
  displacements are beyond the search range. Some pixels get noise.
* `ref_search` is an independent exhaustive search used as the reference.

| testbench | what it shows |
|---|---|
| `tb_pmp_motion_estimator` | ±32, 128×96 frame, two frames. Every vector and SAD matches the reference, in raster order. With a random-latency memory, steps stall. With a fast memory, the frame takes exactly N·(NMB+S)·(2M·N/R+2) cycles. Counts macroblock changes, stalls, idle steps, candidates skipped at the top/bottom edges, and strip jumps to the next row; each must happen. |
| `tb_pmp_full_frame` | Default parameters, one 720×480 frame (about 45 s in Verilator). All 1,350 results in order. A sample of blocks (first and last rows and columns, every 7th block) is checked against the reference. Exact cycle count 21,728 × 258. |
| `tb_pmp_search_ranges` | Two estimators on a 176×112 frame, at ±64 and ±128. Every vector is checked for both. |
| `tb_pmp_controller` | Displacement of every position in every step (including the table above), operated flags, fetch jobs, retire order, step length with a randomly slow fetch. |
| `tb_fetch_unit` | Exactly the in-frame strip rows, then the block row, written with the right data against a random-latency memory. |
| `tb_search_window_buffer`, `tb_reference_block_buffer`, `tb_sad_pe`, `tb_mv_decision` | Unit checks against models: circular reads, macroblock change, SAD value and latency, first-minimum selection with frequent ties. |

Running a test with Verilator, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/me_pkg.sv tb/tb_frame_pkg.sv \
    tb/tb_pmp_motion_estimator.sv --top-module tb_pmp_motion_estimator -Mdir obj
obj/Vtb_pmp_motion_estimator
```

Verilator finds the other modules through `-I`. For the unit testbenches
that do not use test images, `tb/tb_frame_pkg.sv` can be left out.

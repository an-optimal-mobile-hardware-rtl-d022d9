# Integer motion estimation for HEVC with a Rotating-W-Diamond search

This unit does integer motion estimation (IME) for an HEVC encoder. It takes one
prediction unit (PU) of the current frame, up to 64x64 pixels, and a reference search
window around it. It returns the integer motion vector within ±64 pixels whose
reference block has the smallest sum of absolute differences (SAD), together with
that SAD. It does not try all 129 x 129 positions. A fast search, the
*Rotating-W-Diamond* (RWD) search, visits typically 40 to 220 points. Each point's
SAD is computed one 4x4 block per clock cycle by a small datapath: four SAD cores
with 16 absolute differences per cycle. The design aims at low area for mobile
encoders. Its stated target is 1920x1080 at 30 frames/s.

All RTL is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches are in
`tb/`.

## Block structure

```
             start, PU position/size                      best_mv, best_sad, done
                     |                                              ^
                     v                                              |
   +-----------+  read/write  +----------------------------------------------+
   |  mv_ram   |<------------>|               isearch (FSM)                  |
   | (vectors  |              |  start point, pattern rounds, neighbour and  |
   | of earlier|              |  raster searches, keeps best SAD and vector  |
   |   PUs)    |              +----------------------------------------------+
   +-----------+                ref_rd, sad_mv |   cur_rd     ^ sad_done, sad
                                     v         v              |
                     +----------------+   +---------+   +-----------+
   window load ----->| ref_ram        |   | cur_ram |   | sad_unit  |
                     |  ref_addr_gen  |   | 128-bit |-->| 4 x       |
                     |  4 x ref_bank  |-->| words   |   | sad_core  |
                     +----------------+   +---------+   | + adder   |
                                               ^        |  tree +   |
                          current PU load -----+        |  accum.   |
                                                        +-----------+
```

| Module | Role |
|---|---|
| `ime_top` | Connects the five parts; host load ports and the search command. |
| `isearch` | Search state machine. |
| `ref_ram` | Reference window memory: `ref_addr_gen` plus four `ref_bank`s plus the un-rotation multiplexers. |
| `ref_addr_gen` | Turns a search point into bank and lane addresses, one 4x4 block per cycle. |
| `ref_bank` | One of the four row-interleaved reference banks. |
| `cur_ram` | Current PU, one 4x4 block per 128-bit word, with its read address counter. |
| `sad_unit` | Four `sad_core`s, an adder tree and the PU accumulator. |
| `sad_core` | Four absolute differences with a complement adder, summed. |
| `mv_ram` | Motion vectors of PUs already searched, read for the median predictor. |
| `ime_pkg` | Shared types (`mv_t`, `blk_t`, …), the search pattern and the FSM state enum. |

## The search

Motion vectors are relative to the PU's co-located position. The search runs in three
stages.

**Start point.** The unit reads three motion vectors from `mv_ram`: those of the left,
above and above-left PUs. A neighbour outside the frame counts as (0,0). The unit
evaluates the zero vector. It then evaluates the component-wise median of the three
neighbours, unless that median is (0,0). The better of the two becomes the start
point.

**First stage.** The unit evaluates the 40-point pattern around the start point. The
pattern has five rings of 8 points, at distances 1, 2, 4, 8 and 16. The rings
alternate between two shapes:

- Rings at distance 1, 4 and 16 are squares: (±d,0), (0,±d) and (±d,±d).
- Rings at distance 2 and 8 are diamonds, rotated 45 degrees: (±d,0), (0,±d) and (±d/2,±d/2).

The distance *dis* of the best point decides what happens next:

| best point | action |
|---|---|
| dis = 0 (start point is best) | search ends |
| dis = 1 or 2 | neighbour search: the 8 points around the best point, then the second stage |
| dis = 4 | second stage directly |
| dis > 5 (8 or 16) | raster search on a 20-pixel grid (x, y in −60, −40, …, 60; 49 points), then the second stage |

**Second stage.** This is a refinement. Each round runs the same 40-point pattern
around the current best point. A best point at distance 1 or 2 again triggers the
neighbour search. There is no raster search in this stage. The search ends when a
round leaves the best point where it was. It also ends after `MAX_ROUNDS` rounds
(default 16).

Some rules hold in every stage:

- A point with a component outside ±64 is skipped and costs one cycle.
- The best point changes only when a SAD is strictly smaller, so on a tie the point found first wins.
- At the end, the result is written to `mv_ram` at the PU's grid index, where later PUs find it as a neighbour.

The function `ime_pkg::pattern_offset` gives the pattern in this point order:
(d,0), (h,h), (0,d), (−h,h), (−d,0), (−h,−h), (0,−d), (h,−h). Here h = d for square
rings and h = d/2 for diamond rings. The point order matters only when two SADs are
equal.

The `isearch` states follow the algorithm's flow: `IDLE`, `START_POINT` (MV reads,
then the zero-vector SAD), `WAIT_SAD`, `SAD_MV_MEDIAN`, `FIRST_SEARCH`,
`SEARCH_NEIGHBOR`, `SEARCH_SCAN20`, `SECOND_SEARCH` and `DONE`. Every SAD request
goes through `WAIT_SAD`. That state compares the result with the best so far and
returns to the state that issued the request. The current state is available on the
`search_state` output.

## SAD datapath: one 4x4 block per cycle

All three memories and the SAD unit work on 4x4 blocks. A PU is W4 x H4 blocks,
where W4 and H4 are its width and height divided by 4. For one search point, the
blocks stream in raster order, one per cycle:

```
cycle     T        T+1        T+2       T+3   ...  T+N+1      T+N+2
isearch   ref_rd   cur_rd
ref_ram   addr 0   read 0     blk 0     blk 1      blk N-1
                   addr 1     read 1    ...
cur_ram            read 0     blk 0     blk 1      blk N-1
sad_unit                      acc 0     acc 1      acc N-1    sad_done
```

The reference path has two cycles of latency. The first cycle is address generation
and the second is the bank read. The current path has one. So `isearch` sends the
current memory's read one cycle after the reference memory's, and the two blocks
arrive together. An assertion in `ime_top` checks this alignment.

Timing for a 64x64 PU:

- It has N = 256 blocks.
- The reference memory delivers its last block 257 cycles after the request.
- The SAD is ready 258 cycles after the request.
- With the decision cycle in `isearch`, one search point costs 260 cycles.

**SAD core.** Each of the four cores handles one block row. An absolute difference
does not use a subtract-then-negate. The core forms D = A + ~B as a 9-bit sum, which
equals A − B − 1 + 256. The carry out is 1 exactly when A > B:

- If the carry is 1, |A − B| = D[7:0] + 1.
- If the carry is 0, |A − B| = ~D[7:0].

Two adder levels sum the four differences of a core. Two more levels sum the four
cores. The accumulator, 20 bits wide, adds up the block SADs. It restarts on the
block flagged `first`, and it reports the SAD one cycle after the block flagged
`last`.

## Reference memory organisation

This is the least obvious part of the design. The reference window is 192 x 192
pixels: a 64-pixel PU plus 64 pixels of search range on each side. The PU's
co-located position is at window offset (64, 64). A search point (x, y) needs the
4x4 block with its top-left corner at (64 + x + 4·bx, 64 + y + 4·by). Because
x and y are arbitrary integers, that corner has no alignment in either direction.

**Rows: four banks.** Bank b holds the window rows y with y mod 4 = b. The four rows
of any 4x4 block therefore come from four different banks, whatever row the block
starts on. Bank b supplies block row (b − y0) mod 4.

**Columns: four byte lanes per bank.** A bank word is 32 bits: four horizontally
adjacent pixels 4c … 4c+3 of one row. The host writes whole words. For reading,
each pixel position in the word (lane l, holding pixels with x mod 4 = l) has its
own read address. Lane l reads the word that contains pixel
x0 + ((l − x0) mod 4). So the four pixels x0 … x0+3 arrive in one cycle, in
rotated order.

**Address generation.** `ref_addr_gen` computes the per-bank row base and per-lane
column base once per search point. For each block it adds the block counters:
address = (row base + by) · 48 + (column base + bx). It registers the 16 addresses
together with x0 mod 4 and y0 mod 4. One cycle later, after the bank read, a layer of
multiplexers in `ref_ram` uses the delayed offsets to put rows and pixels back in
row-major order.

Each bank holds 48 rows x 48 words = 2,304 words. Splitting the word into lanes
keeps the memory at 36,864 bytes, the same as four plain 32-bit-wide banks. The
split only adds separate lane addresses and the output multiplexers.

## Interfaces of `ime_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low (control state only, not the memories) |
| `cur_wr_en`, `cur_wr_addr`, `cur_wr_blk` | in | 1, 8, 128 | write one 4x4 block of the current PU; block (bx,by) at address by·W4+bx; pixel (i,j) in bits [8(4j+i) +: 8] |
| `ref_wr_en`, `ref_wr_y`, `ref_wr_c`, `ref_wr_row` | in | 1, 8, 6, 32 | write pixels 4c … 4c+3 of window row y; pixel i in bits [8i +: 8] |
| `start` | in | 1 | one-cycle pulse that starts a search |
| `pu_col`, `pu_row`, `pu_cols` | in | 8 each | PU position in a uniform PU grid and the grid width; they address `mv_ram` |
| `w4`, `h4` | in | 5 each | PU width and height in 4-pixel units, 1 … 16 |
| `busy`, `done` | out | 1 | busy from start to done; done is a one-cycle pulse |
| `best_mv`, `best_sad` | out | 16, 20 | result (`mv_t`: signed 8-bit x, y); valid from done until the next start |
| `search_state` | out | 4 | current `isearch` state, for monitoring |

How to use it:

1. Load the window and the PU.
2. Pulse `start`.
3. Wait for `done`.

Search the PUs of a frame in raster order of the PU grid. Only then do the left and
above neighbours' vectors in `mv_ram` belong to the current frame. The memories must
not be written while `busy` is high. `mv_ram` is not reset: its contents start out
undefined. Only neighbours inside the frame are read, and raster order guarantees
those have been written.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `WIN` | 192 | `ime_top`, `ref_ram`, `ref_addr_gen` | reference window edge (64 + 2·64) |
| `CUR_DEPTH` | 256 | `ime_top`, `cur_ram` | blocks of the largest PU (16x16) |
| `MV_DEPTH` | 32400 | `ime_top`, `isearch`, `mv_ram` | vectors: 1920x1080 tiled with 8x8 PUs (240 x 135) |
| `MAX_ROUNDS` | 16 | `ime_top`, `isearch` | limit on second-stage rounds |
| `SR`, `PAT_POINTS`, `RASTER_STEP`, `RASTER_DIST` | 64, 40, 20, 5 | `ime_pkg` | search range, pattern size, raster grid and raster threshold |

The window layout assumes `WIN` ≥ 2·`SR` + 64.

## Throughput against the 1080p30 target

The search time of one PU of N blocks is exact:

```
cycles = 7 + (N + 4) * SAD points + skipped points + control steps
```

- The 7 fixed cycles are the command, three MV reads, the median decision and the result.
- A control step is the cycle that ends a pattern round, a neighbour search or the raster search.
- For a 64x64 PU, N + 4 = 260 cycles per point.

At 1920x1080 with 64x64 PUs there are 510 PUs per frame (30 x 17). At 30 frames/s
and 148 MHz that leaves 9,673 cycles per PU. The shortest possible search already
takes 10,668 cycles: the zero vector and 40 pattern points, then an early stop.

Two measurements:

- Two rows of a synthetic 1080p frame with a global motion of (5, −3) took 22,616
  cycles per PU on average. That is 12.8 frames/s at 148 MHz.
- The mixed content of the end-to-end test took 23,000 to 57,000 cycles per 64x64 PU.

Reaching 30 frames/s would need SADs of several points computed at once, or fewer
points per search.

## Departures and own choices

The algorithm's stages, the 40-point pattern size, the decision thresholds (0, 1–2,
>5), the 20-pixel raster and the state sequence follow the RWD method. The same holds
for the memory organisation: 128-bit current-block words, four reference banks of
32-bit 4-pixel words, and one block per cycle after a 2-cycle start. So does the SAD
core arithmetic.

The following are this design's own choices:

- **Pattern geometry.** The pattern is five rings of 8 points at distances 1 to 16,
  alternately square and diamond. Only the point count (40) and the name are given
  for the method.
- **Neighbour set.** The neighbour search uses the 8 surrounding points.
- **Raster origin.** The raster grid is centred on the co-located position and clipped
  to ±60.
- **Best point at distance 4.** No rule covers this case; it goes straight to the
  second stage.
- **Round limit.** `MAX_ROUNDS` bounds the second stage.
- **Points outside the range** are skipped, and ties keep the first point found.
- **Median predictor.** It is taken per component; missing neighbours count as zero;
  a zero median is not evaluated twice.
- **Window.** The reference memory holds a 192x192 search window per PU, loaded by
  the host, not a whole reference frame.
- **Reference byte lanes.** Each bank's word is split into lanes with separate read
  addresses, so that unaligned columns cost no extra cycle.
- **MV memory.** It is addressed by the PU's index in a uniform PU grid, sized for
  8x8 tiling of 1080p. A uniform 8x4 or 4x8 tiling would need 64,800 entries.
- **SAD accumulation.** One 4x4 block per cycle (256 cycles for a 64x64 PU). The
  alternative reading, one block every 4 cycles, does not fit the four parallel cores
  or the memories' one-block-per-cycle rate.
- **Control details.** Handshakes (pulse requests, `first`/`last` flags), reset style
  (asynchronous, active low) and widths (8-bit pixels and vector components, 20-bit
  SAD) were chosen here.

The host loading path and any fractional motion estimation are outside this unit.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

| Testbench | What it checks |
|---|---|
| `tb_sad_core` | corner values and random rows against a direct \|a−b\| sum |
| `tb_sad_unit` | PU SADs (256, 1, 8 and random block counts, with gaps, maximum value) and that `sad_done` comes one cycle after the last block |
| `tb_cur_ram` | data and one-block-per-cycle timing for several PU lengths |
| `tb_ref_bank` | per-lane addressed reads |
| `tb_ref_addr_gen` | all 16 addresses of every block, computed independently from pixel coordinates, for points over the whole range |
| `tb_ref_ram` | every delivered block against the loaded window; block k in cycle start+2+k (257 cycles to read a 64x64 PU) |
| `tb_mv_ram` | writes and reads against an array, read-during-write |
| `tb_isearch` | the controller with a behavioural SAD responder on synthetic cost surfaces, against the untimed model in `rwd_model_pkg` (vector, SAD, number of SAD requests, MV write-back, read order) and that every search branch ran |
| `tb_ime_top` | the whole unit at default parameters (see below) |
| `tb_ime_1080p` | the 1080p workload: two full rows (60 PUs of 64x64) of a synthetic frame with global motion, against the model; exact search times; average cycles per PU and the resulting frame rate |

`tb_ime_top` runs the whole unit at its default parameters on a 4x3 grid of PUs of
sizes 64x64, 32x32, 16x8 and 8x4. The pictures are paraboloids, some with texture.
For each PU the same model predicts the vector, the SAD and the number of SAD
evaluations, computing the SADs directly from the pictures. The testbench also checks
three other things:

- Every SAD arrives exactly n_blocks+2 cycles after its request.
- Every search takes exactly the number of cycles given by the formula above.
- The neighbour and raster search counts agree with the model's.
- Each mechanism happened at least once: median start, zero start, early stop,
  neighbour search, raster search, second-stage rounds, out-of-range points and
  small PUs.

The model and the RTL are separate descriptions of the same reading of the algorithm.
They agree on all test PUs, which shows the RTL does what the model says. It does not
show that this reading matches any other implementation of the RWD search.

To simulate with Verilator, for example the top level:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ime_pkg.sv tb/rwd_model_pkg.sv tb/tb_ime_top.sv --top-module tb_ime_top
./obj_dir/Vtb_ime_top
```

The end-to-end test takes a few seconds. The other testbenches are built the same way.
Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ime_pkg.sv rtl/<module>.sv`.

# Order4: H.264 luma deblocking at four-pixel-boundary granularity

H.264 filters a decoded picture macroblock (MB) by macroblock, and inside
each 16x16 MB edge by edge: first the four vertical luma edges from left to
right, then the four horizontal edges from top to bottom. Read literally,
that order is sequential. Each edge is really 4 independent pieces, though:
*four-pixel-long boundaries*, each covering four lines of the eight samples
p3..p0 | q0..q3. The only true constraints are data dependencies: a
boundary must wait for the boundaries that, in the standard order, write
samples it reads. Any schedule that respects those dependencies gives
bit-identical output.

This RTL applies that idea as hardware. It has an array of processing
elements (PEs), each filtering one four-pixel-long boundary per clock. A
fixed timetable (the "Order4" order) says at which time unit each boundary
of each MB runs:

* an MB takes 8 time units from its first to its last boundary;
* the next MB of the same row starts 6 time units later;
* the MB row below starts 5 time units later;
* one MB row keeps at most 6 PEs busy, and *K* rows in flight together need
  exactly ceil(16K/3) PEs.

A 1920x1080 picture (120x68 MBs) is deblocked by 363 PEs in 1057 time
units. The standard order would need 8160 MBs × 32 boundaries = 261,120
single-boundary steps.

The method, its timing model and the numbers used below (6, 5, 16/3, the
stripe scheme, 363 PEs for 1080p) come from the article *Exploiting
fine-grain parallelism in the H.264 deblocking filter by operation
reordering* (T.-H. Weng et al.). This RTL is an independent implementation
of it, and it departs from the article in the places listed at the end.

## The four-pixel-long boundary and its stage

Boundary ids inside an MB are this design's own:

| id | edge | lines |
|----|------|-------|
| 0..15 | vertical edge at MB column 4·(id/4) | MB rows 4·(id%4) .. +3 |
| 16..31 | horizontal edge at MB row 4·((id-16)/4) | MB columns 4·((id-16)%4) .. +3 |

A vertical boundary at column X reads columns X-4..X+3 and writes X-3..X+2
(p2..q2) of its four rows. Horizontal boundaries do the same with rows. Boundary
B depends on an earlier boundary A (earlier in the standard order) if:

* B reads or writes a sample A writes. B must then run strictly later.
* B writes a sample A reads. B may then run in the same time unit but not
  earlier, because every PE reads at the start of a time unit and writes at
  its end.

Dependencies cross MB borders as well. The left edge of an MB reads samples
that the horizontal edges of the MB to its left have written. The top edge
of an MB reads samples written by the MB above and by the left edge of the
MB above-right.

Each boundary gets a *stage* 0..7 inside its MB (`deblock_pkg::stage_of`):

| stage | boundaries | count |
|-------|------------|-------|
| 0 | 0 | 1 |
| 1 | 1, 4 | 2 |
| 2 | 2, 3, 5, 8, 16 | 5 |
| 3 | 6, 7, 9, 12, 17, 20 | 6 |
| 4 | 10, 11, 13, 18, 19 | 5 |
| 5 | 14, 21, 22, 23, 24 | 5 |
| 6 | 15, 25, 26, 27, 28 | 5 |
| 7 | 29, 30, 31 | 3 |

Boundary `b` of MB (row r, column c) then runs at time unit
`stage(b) + 6c + 5r`. The table was obtained by a search: take every pair of
boundaries, anywhere in a picture, whose sample footprints overlap. Each
such pair gives a difference constraint on the stages. The search then
looked for a stage assignment with the per-stage counts
1, 2, 5, 6, 5, 5, 5, 3 that meets all the constraints.

Those counts are the published Order4 issue pattern. Since stages 6 and 7
of one MB coincide with stages 0 and 1 of the next, an MB row issues
1, 2, then (5, 6, 5, 5, 6, 5) per MB, and ends with 5, 6, 5, 5, 5, 3. The
critical-path order is fixed by the dependencies. For the boundaries off the
critical paths, the article allows several placements; this table is one of
them.

## Rows in flight, stripes and PE packing

`order4_scheduler` keeps **K** MB rows in flight:

    K = min(MB_H, floor(3*N_PE/16), floor(6*MB_W/5))

* **PE bound.** Each row needs 16/3 PEs on average.
* **Width bound.** Row r+K may only start when row r has finished. Row r+K
  starts 6·MB_W time units after row r, and it must come at least 5 after
  row r+K-1.

Each of the K **row slots** walks its MB row one MB every 6 time units, and
slot j starts 5·j time units after slot 0. In each time unit, a slot at
phase φ (0..5) issues:

* the boundaries of its current MB whose stage is φ;
* the boundaries of its previous MB whose stage is φ+6.

The `LANE_TAB` table in the package lists them, at most 6 per slot.

**Stripes.** When the picture has more than K MB rows, slot j goes on from
row j to row j+K, then j+2K, and so on. Each stripe of K rows therefore
starts while the previous stripe is still running. A slot's last MB of one
row overlaps the first MB of its next row by 2 time units, just as two MBs
of one row overlap. So stripe changes leave no gap and need no extra PEs.
In the last stripe, the slots left without a row stay idle.

**Packing.** Slot phases are 5 apart. So, in any time unit, any three
adjoining slots issue 6+5+5 = 16 boundaries. The issued boundaries are
packed onto PEs 0, 1, 2, … in slot order, and never exceed
ceil(16K/3) ≤ N_PE.

**Frame time.** For the frame as a whole, in time units:

    T = 6*MB_W*ceil(MB_H/K) + 5*(rows_in_last_stripe - 1) + 2

| configuration | K | T | peak PEs |
|---|---|---|---|
| 1920x1088, 363 PEs (defaults) | 68 | 1057 | 363 |
| 1088x1920, 438 PEs | 81 | 1008 | 432 |
| 1920x1088, 70 PEs | 13 | 4332 | 70 |
| 64x112, 16 PEs | 3 | 74 | 16 |

All four rows are simulated.

For comparison, the MB-level 2D wavefront order runs each MB in 8 time
units and lets a new MB row start 16 time units after the one above. It
would take 8·120 + 16·67 = 2032 time units for 1920x1088, and
8·68 + 16·119 = 2448 for 1088x1920. These rows are therefore 1.92 and 2.43
times faster.

## One time unit in hardware

One time unit is one clock cycle:

1. `order4_scheduler` puts a boundary (`valid`, MB row, MB column, id) on
   each PE's `pe_op`. This comes from registered slot state.
2. `frame_buffer` (the internal buffer) returns each PE's 4x8 window
   combinationally. It also returns the boundary's bS and the QPs of the
   MBs on the p and q side (the p side is the left or upper MB for MB-edge
   boundaries).
3. `edge_filter_pe` filters the window. It is purely combinational and
   implements the H.264 luma filter: alpha/beta from
   ((QPp+QPq+1)>>1) + FilterOffsetA/B, the normal filter for bS 1..3 and
   the strong filter for bS 4.
4. At the clock edge, the buffer writes taps p2..q2 of every valid
   boundary back.

Boundaries that run in the same time unit never write the same sample, so
all write ports can be applied in the same edge. Boundaries on the picture
edge (the left edge of MB column 0, the top edge of MB row 0) are issued
but neither filtered nor written.

## Interface of `order4_deblocker`

| signal | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | one-cycle pulse while idle: deblock the loaded picture |
| `busy`, `done` | out | running; one-cycle pulse at the end |
| `time_units` | out | time units used by the last picture (equals T above) |
| `off_a`, `off_b` | in | FilterOffsetA/B, signed 5 bits |
| `host_we`, `host_y`, `host_x`, `host_wdata` | in | write one luma sample |
| `host_ry`, `host_rx` → `host_rdata` | in/out | asynchronous read of one sample |
| `host_bs_*` | in | write the bS (0..4) of boundary `bid` of MB (row, col) |
| `host_qp_*` | in | write the QP of MB (row, col) |
| `n_issued` | out | PEs busy in this time unit |
| `mb_overlap`, `stripe_overlap`, `idle_slot` | out | a slot works on two MBs of one row / on two stripes' rows / has nothing left |

Parameters are `MB_W` = 120, `MB_H` = 68 and `N_PE` = 363. `N_PE` must be
at least 6. MB indexes are 8 bits (up to 256 MBs per side) and sample
coordinates are 12 bits.

Use it as follows:

1. Load the samples, every bS and every QP.
2. Pulse `start`. The first boundaries are issued in the next cycle.
3. `done` pulses for one cycle a couple of cycles after the last time unit.
4. Read the picture back.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_edge_filter_pe`: 4000 random windows compared with a separately
  written reference filter (`deblock_ref_pkg`). The inputs have steps of
  random size, random bS, QP and offsets. All three outcomes (no filter,
  normal, strong) occur hundreds of times.
* `tb_order4_scheduler`: three sizes, including three stripes with idle
  slots and a width-limited K. For each size it checks that every boundary
  is issued exactly once. It then replays the issue times in the standard
  order against sample footprints computed in the testbench: no boundary
  reads or overwrites a sample too early. It also checks T and the peak PE
  count against the formulas above.
* `tb_frame_buffer`: host load and read-back, PE windows at the right
  coordinates, bS, p/q QP selection, and write-back of exactly p2..q2.
* `tb_order4_deblocker`: end to end on 4x7 MBs with 16 PEs, two pictures
  loaded through the host ports. The result must be sample-for-sample
  identical to the reference deblocking in standard order, and T must
  match. MB overlap, stripe overlap and idle slots must all occur.
* `tb_order4_deblocker_full`: the default configuration, one 1920x1088
  picture. The arrays are preloaded through hierarchical references.
  Result: 1057 time units, 363 PEs, identical to the standard order.
* `tb_order4_workloads`: 1088x1920 with 438 PEs and 1920x1088 with 70 PEs
  (table above), both identical to the standard order.

The reference model and the RTL share no code. The alpha, beta and tC0
tables were entered into both from the H.264 standard's tables, so a
transcription error common to both would not be caught.

Simulate with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_order4_deblocker \
      rtl/deblock_pkg.sv tb/deblock_ref_pkg.sv rtl/*.sv tb/tb_order4_deblocker.sv
    ./obj_dir/Vtb_order4_deblocker

The full-size testbench takes about 3 minutes to build and 2 seconds to
run. The workload testbench takes about 4 minutes to build (it also needs
`tb/tb_workload_run.sv`). The scheduler testbench needs
`tb/tb_sched_harness.sv`.

## Departures from the published method, and limits

* **Luma only.** The 32 boundaries per MB are the luma edges. Chroma is not
  deblocked.
* **Own stage table and numbering.** The published per-boundary order is
  replaced by the derived table above. It has the same counts, period and
  row delay, and it was checked exhaustively against the sample
  dependencies. The boundary ids differ from the article's b1..b32.
* **Rows in flight use the floor of 6·MB_W/5.** The article's model rounds
  up (82 rows for 1080x1920). With the ceiling, the first row of a stripe
  would start before the row above it has finished, so this design takes
  81 rows and 1008 time units (the article's model gives 1003).
* **Whole-picture buffer.** The internal buffer holds the whole luma
  picture: 2,088,960 bytes for 1920x1088. The article's analysis sizes a
  partial buffer of about 1 MB including chroma, but gives no
  organisation for it.
* **No PE-to-PE bypass.** Intermediate results go back to the buffer every
  time unit. Each sample is therefore read and written several times,
  where the article suggests forwarding intermediate results directly
  between PEs so each sample is read once.
* **The host ports stand in for the rest of the decoder.** They replace the
  preceding decoding stages and the decoded picture buffer.
* **Not a timing-closed implementation.** A time unit is one clock cycle
  that includes a combinational buffer read, the filter and the write-back.
  The buffer is a register array with one 32-sample read port and one
  24-sample write port per PE. That is a functional model of the
  required bandwidth, not a realistic SRAM organisation.
* **bS and QP are inputs.** They are not derived from coding modes, motion
  vectors or coefficients.

## Files

* `rtl/deblock_pkg.sv`: types, stage and lane tables, geometry, H.264 tables.
* `rtl/edge_filter_pe.sv`: the PE.
* `rtl/order4_scheduler.sv`: row slots, stripes, PE packing.
* `rtl/frame_buffer.sv`: the internal buffer.
* `rtl/order4_deblocker.sv`: the top.
* `tb/deblock_ref_pkg.sv`: the reference filter and standard-order picture
  deblocking.
* `tb/*.sv`: the testbenches and helpers listed above.

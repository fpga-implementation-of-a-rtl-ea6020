# HEVC deblocking filter with distributed dual-port memories

Block-based video coding quantises each block on its own, so the decoded
picture shows visible steps along block edges. HEVC removes them with a
deblocking filter that smooths the samples on both sides of every edge of
the 8x8 block grid, more or less strongly depending on how the two blocks
were coded and on how much real detail the samples show.

This RTL implements such a filter for 8-bit video. Its main idea is to
spread the samples of an edge over sixteen small dual-port RAMs, one per
sample position, so that 16 samples (128 bits) move in one clock, and to
filter two lines across an edge at once. All three HEVC filters (strong
luma, normal luma, chroma) are evaluated in parallel and a multiplexer
keeps the one the decision logic picks. A 16x16 block, both filtering
directions, takes 48 clock cycles; at that rate 4K UHD luma at 30 frames/s
needs 46.66 million cycles per second.

## Edge segments and the two decision lines

The filter never sees a picture. It works on **edge segments**: four
consecutive lines that cross one edge, each line being eight samples

    p3 p2 p1 p0 | q0 q1 q2 q3

where `|` is the edge, P is the block before it and Q the block after it.
For a vertical edge the lines are rows; for a horizontal edge they are
columns. HEVC makes all its decisions for a segment from its **first and
fourth line**. These two lines are what the filter stores and processes,
as one 128-bit word (`seg_t`: `up` = first line, `dn` = fourth line, each a
`line_t` with `p[0..3]`, `q[0..3]`).

The sixteen RAMs are named after what they hold:

| RAMs       | contents                      |
|------------|-------------------------------|
| pu0..pu3   | p0..p3 of the first line      |
| qu0..qu3   | q0..q3 of the first line      |
| pd0..pd3   | p0..p3 of the fourth line     |
| qd0..qd3   | q0..q3 of the fourth line     |

Each RAM is eight words deep: one word per segment of a **batch**. A 16x16
block has two vertical edges on the 8x8 grid, each crossed by 16 rows, so
eight segments per direction: one batch for the vertical edges, one for the
horizontal edges.

**Lines 1 and 2 are not carried.** The memory organisation holds only the
first and fourth line of a segment, and the 48-cycle budget has no room for
the other two. A complete decoder would have to filter the middle lines
with the same decision (for example by a second pass through this engine
with the decisions forced); that is outside this design.

Also outside it: cutting segments out of the picture, transposing for the
horizontal-edge pass, and feeding the samples changed by the vertical-edge
pass into the horizontal-edge pass. The source does that.

## The batch schedule

`seq_ctrl` takes every batch through three phases of eight cycles each:

```
cycle      0 ........ 7 | 8 ........ 15 | 16 ....... 23 | 24 ...
phase      LOAD         | FILTER        | OUTPUT        | LOAD (next batch)
RAM write  in seg 0..7  |  -  wb 0..6   | wb 7          | in seg 0..7
RAM read                | seg 0..7      | seg 0..7      |
out_valid               |               |  - seg 0..6   | seg 7
```

- **LOAD**: `in_ready` is high. Each segment taken (`in_valid && in_ready`)
  is written to the next RAM address, and its boundary strength, `beta`,
  `tc` and chroma flag go into an eight-entry side-information register.
  Gaps in `in_valid` simply stretch this phase.
- **FILTER**: the segments are read one per cycle. The RAM read is
  registered, so one cycle after each read the segment sits on the RAM
  output, where the control unit decides, the two filter units (one per
  line) compute, the multiplexers choose, and the result is written back
  **to the same address through the second RAM port**. Reading address k+1
  while writing address k is what the dual-port RAMs are for.
- **OUTPUT**: the filtered segments are read out in order and appear on
  `out_seg` with `out_valid`, one cycle after each read. There is no
  back-pressure on the output.

The write-back of segment 7 falls into the first OUTPUT cycle, which reads
address 0, and the last output appears in the first LOAD cycle of the next
batch, so back-to-back batches start every 24 cycles, 48 cycles per 16x16
block. From the cycle the last segment of a batch is taken to the cycle its
first segment comes out is 10 cycles (NSEG + 2). Two assertions in
`seq_ctrl` guard the write port: loading and write-back never coincide, and
a write-back never hits the address being read out.

## Deciding: bS, beta and tc

`bs_calc` derives the **boundary strength** at load time from the
prediction information delivered with the segment (`pred_info_t`), by the
rule of the HEVC standard for one motion vector per block:

- 2 if P or Q is intra coded;
- 1 if the edge is a transform edge and P or Q has nonzero coefficients,
  or P and Q use different reference pictures, or their motion vectors
  differ by 4 or more quarter samples in x or y;
- 0 otherwise.

`beta` and `tc` come with each segment, already looked up from the
quantisation parameter; the standard's lookup tables are not part of this
RTL. `beta` is 7 bits (0..64) and `tc` 5 bits (0..24).

`ctrl_unit` then drives three signals, with `dpi = |p2 - 2p1 + p0|` and
`dqi = |q2 - 2q1 + q0|` on line i (0 = first, 3 = fourth):

| signal | meaning                         | rule |
|--------|---------------------------------|------|
| `en`   | filter the segment              | luma: bS > 0 and dp0 + dq0 + dp3 + dq3 < beta; chroma: bS = 2 |
| `sel0` | strong (1) or normal (0) luma   | on both lines: 2(dpi + dqi) < beta>>2, \|p3 - p0\| + \|q0 - q3\| < beta>>3, \|p0 - q0\| < (5 tc + 1)>>1 |
| `sel1` | chroma (1) or luma (0) result   | the segment's chroma flag |

## Filtering: sums, shifter, clipper, adder

`filter_unit` computes all three results for one line. Every equation is
written as "original sample plus a clipped correction", which lets one
shifter, one clipper and one adder stage serve all filters:

- **Strong luma** (changes p0..p2 and q0..q2), correction clipped to +-2tc:
  - `p0' = p0 + Clip3((p2 + 2p1 - 6p0 + 2q0 + q1 + 4) >> 3)`
  - `p1' = p1 + Clip3((p2 - 3p1 + p0 + q0 + 2) >> 2)`
  - `p2' = p2 + Clip3((2p3 - 5p2 + p1 + p0 + q0 + 4) >> 3)`
  - the same for q with p and q exchanged.
- **Normal luma** (changes p0, p1, q0, q1):
  - `D = Clip3(+-tc, (9(q0 - p0) - 3(q1 - p1) + 8) >> 4)`
  - `p0' = p0 + D` and `q0' = q0 - D`
  - `p1' = p1 + Clip3(+-tc/2, (((p2 + p0 + 1) >> 1) - p1 + D) >> 1)`, and the
    same for q1 with `-D`.
- **Chroma** (changes p0, q0):
  - `Dc = Clip3(+-tc, (((q0 - p0) << 2) + p1 - q1 + 4) >> 3)`
  - `p0' = p0 + Dc` and `q0' = q0 - Dc`

Shifts are arithmetic (floor). Results are limited to 0..255. The strong
filter in this form gives the same results as the standard's averaging form
(`p0' = Clip3(p0 +- 2tc, (p2 + 2p1 + 2p0 + 2q0 + q1 + 4) >> 3)`), which is
what the testbenches' reference model uses.

`out_mux` keeps, per line, the unfiltered line if `en` is low, else the
chroma result if `sel1`, else the strong result if `sel0`, else the normal
one.

## Where this design departs from HEVC and why

- Only the first and fourth line of each segment are filtered (see above).
- The normal filter always changes p1 and q1. The standard decides this
  per side with two more activity tests and skips the filter when
  `|D| >= 10 tc`; neither is done here.
- The boundary strength assumes uni-prediction (one motion vector and one
  reference picture per block).
- The beta and tc tables are outside the design.

The clipping bounds, the strong/normal thresholds and the bS rule are the
standard's. The batch schedule, the in-place write-back and the handshake
are this design's own choices.

## Throughput and size

| case                                   | needed              | this design        |
|----------------------------------------|---------------------|--------------------|
| one 16x16 block, both directions       | 48 cycles           | 48 cycles          |
| 4K UHD luma, 30 fps                    | 46.66 M cycles/s    | fits a 54 MHz clock |
| 4K UHD 4:2:0 luma + chroma, 30 fps     | 69.98 M cycles/s    | needs about 70 MHz |

The luma count is 3840x2160/256 = 32,400 blocks x 48 cycles x 30. With 4:2:0
chroma there are half as many chroma segments again, each costing the same
3 cycles. The clock rate of this RTL on an FPGA has not been measured. The
memory is 16 x 8 x 8 bits = 1 kbit.

## Files

| file | contents |
|------|----------|
| `rtl/dbf_pkg.sv`     | types: `line_t`, `seg_t`, `pred_info_t`, `seg_info_t`, phases |
| `rtl/dbf_top.sv`     | top: sequencer, bS, side information, memory, decision, filters, muxes |
| `rtl/seq_ctrl.sv`    | LOAD / FILTER / OUTPUT sequencer and RAM addresses |
| `rtl/dist_mem.sv`    | the sixteen RAMs pu0..qd3 |
| `rtl/dpram.sv`       | one simple dual-port RAM (synchronous read, old data on collision) |
| `rtl/bs_calc.sv`     | boundary strength |
| `rtl/ctrl_unit.sv`   | en / sel0 / sel1 decisions |
| `rtl/filter_unit.sv` | strong, normal and chroma filters for one line |
| `rtl/out_mux.sv`     | output multiplexers for one line |
| `tb/dbf_ref_pkg.sv`  | reference model (standard averaging form) and stimulus helpers |
| `tb/tb_*.sv`         | one self-checking testbench per module |

`dbf_top` has one parameter, `NSEG` (segments per batch, default 8). The
RAM depth and the batch length follow it.

## Verification

Each testbench compares against values computed independently and ends by
printing `TB_RESULT checks=N failures=M`. Each also has a watchdog.

- `tb_filter_unit` covers every tc from 0 to 24 with random, step, ramp
  and extreme lines, about 45,000 comparisons.
- `tb_ctrl_unit` runs 20,000 random segments and requires every mode to
  occur.
- `tb_bs_calc` checks each rule and 3,000 random cases.
- `tb_seq_ctrl` checks the address sequences, the 10-cycle latency, the
  24-cycle batch period and the 48 cycles per 16x16 block.
- `tb_dbf_top` runs the whole filter at its default size for 40 batches,
  with and without input stalls. It checks every output segment, the
  latency and the 48-cycle block time. It counts each mechanism: bS 0/1/2,
  luma left alone by bS and by the activity test, normal and strong
  filtering, chroma filtered and left alone, input stalls, and
  back-to-back batches. A mechanism that never happens counts as a failure.
- `tb_uhd_frame` streams one 4K UHD 4:2:0 frame: 518,400 luma segments
  then 259,200 chroma segments, with random samples. It compares every
  output. It checks that the luma plane takes exactly 1,555,200 cycles
  (48 per 16x16 block, 46.66 M cycles/s at 30 fps) and that the whole
  frame takes 3 cycles per segment, 2,332,801 cycles. It runs in a few
  seconds.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/tb_dbf_top.sv --top-module tb_dbf_top -o sim
./obj_dir/sim
```

Linting with `-Wall` warns that `rst_n` is used both as an asynchronous reset and in
the `disable iff` of the sequencer's assertions; that is expected.

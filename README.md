# Two-stage pipelined 2-D Daubechies (db2) wavelet transform

This design computes a multi-level, separable 2-D discrete wavelet transform of
an image with the 4-tap Daubechies filters (db2), using only two pipeline
stages for every level. Stage 1 filters rows. Stage 2 filters the columns of
what stage 1 produced. The two stages have identical processing units and
differ only in their control. The LL (approximation) sub-band of a level is
stored and fed back into stage 1 as the input of the next level, so the same
two stages serve all levels. Levels are interleaved sample by sample. Stage 1
alternates between image samples and fed-back LL samples, so level 2 is
computed while level 1 is still coming in. Nothing waits for a whole level to
finish.

With the default parameters it takes a 256 x 256 image of 16-bit samples, one
sample per clock. It returns the LL, LH, HL and HH sub-bands of levels 1 and 2
as one tagged stream of 16-bit coefficients.

```
            C^0 (image)                                       out: LL/LH/HL/HH
 in_* ──────────────┐                                   ┌──────────────► out_*
                    ▼                                   │
   ┌─ Buffer 1 ─► [16-bit input reg] ─► PU1 ─► Buffer 2 ─► PU2 ─┤
   │  (LL rings)         ▲                ▲       ▲             │
   │               Control unit 1 ───────────► Control unit 2 ──┘
   │                 (rows, levels)   level tag  (columns, flush)
   └──────────────────────────── LL of level j < LEVELS ◄────────┘
```

## Filters and arithmetic

Each output of a 1-D filtering step is

    y[k] = round( sum_{i=0..3} c[i] * x[(2k + i) mod n] )

Here n is the length of the row or column, and c is either the low-pass or the
high-pass filter:

| tap | h (low)  | g (high) | h as 16-bit, 14 fraction bits | g as 16-bit |
|-----|----------|----------|-------------------------------|-------------|
| 0   | 0.48296  | -0.12941 | 7913                          | -2120       |
| 1   | 0.83652  | -0.22414 | 13705                         | -3672       |
| 2   | 0.22414  | 0.83652  | 3672                          | 13705       |
| 3   | -0.12941 | -0.48296 | -2120                         | -7913       |

The high-pass filter is g[n] = (-1)^n h[3-n]. Decimation by two is built in,
because outputs are computed only for even window starts 2k. Boundaries use
periodic extension, which is the `mod n` above.

All words are 16-bit two's complement: input samples, intermediate row
results, stored LL values and outputs. The processing unit keeps full
precision through the products and sums. It rounds to nearest (adds 2^13, then
shifts right by 14) and saturates to [-32768, 32767]. The low-pass gain is
about 1.41 per dimension. An 8-bit image in 16-bit words therefore never
saturates through two levels. Full-range 16-bit input can saturate, and does
so exactly as the reference models in the testbenches predict.

Sub-band names follow the usual filter-bank picture: the first letter is the
horizontal filter and the second the vertical one. `band_t` encodes this as
{horizontal high, vertical high}: LL=0, LH=1, HL=2, HH=3.

## Processing unit (`dwt_pu`)

The unit computes one filter output per clock from a four-sample window and a
low/high select. The 4-tap sum is split into two independent 2-tap subtasks,
c0·x0 + c1·x1 and c2·x2 + c3·x3. They run side by side on four multipliers and
two adders, which keeps the critical path to one multiplier or one adder per
stage. A third adder joins the two partial sums before rounding. The unit has
three register stages: products, partial sums, result. Latency is three
accepted clocks.

Flow control is a global stall. The pipe advances when its output register is
empty or is being taken (`in_ready = !out_valid || out_ready`). A tag of
`TAGW` bits travels with each task. Stage 1 uses the tag for the level number.
Stage 2 uses it for the full output tag.

## Stage 1: row filtering and its slot schedule (`dwt_ctrl1`)

The outputs of a row are L0 H0 L1 H1 … L(M/2-1) H(M/2-1). Each output needs
the window x[2k..2k+3]. A row of M samples must give exactly M outputs, and the
last window wraps around to x[0], x[1]. Control unit 1 keeps PU1 busy one task
per input sample without stalling at row ends:

* A four-entry shift register holds x[c-4..c-1]. For the sample at column c:
  * odd c ≥ 3: low-pass on x[c-3..c], which is output k = (c-3)/2;
  * even c ≥ 4: high-pass on x[c-4..c-1], which is output k = (c-4)/2.
* That leaves three outputs after the row: the high-pass of x[M-4..M-1], and
  low- and high-pass of the wrap window {x[M-2], x[M-1], x[0], x[1]}. When
  the last sample of a row is consumed, these windows are copied into "tail"
  registers, together with x[0] and x[1], which were captured at columns 0
  and 1.
* Columns 0, 1 and 2 of the next row produce no task of their own. The three
  tail tasks use exactly those three slots. After the last row of a level, or
  whenever no sample is waiting, the tail tasks go out on their own.

An assertion checks that a row never ends while the previous row's tail is
still pending.

All of this state (shift register, row and column counters, tail registers)
exists once per level, so rows of different levels can be in progress at the
same time.

### Interleaving the levels

Level 1 reads the `in_*` stream. Level j+1 reads the LL of level j from
Buffer 1. Control unit 1 counts, per level, the LL words that stage 2 has
written (`ll_wr_valid`/`ll_wr_level`, one pulse per word) against the words
it has read. A level-(j+1) sample is "ready" when that count is non-zero. The
choice of the next sample follows two rules:

* After an image sample, take a sample of the lowest higher level that is
  ready. `in_ready` is held low for that clock.
* After a higher-level sample, or when no higher level is ready, go back to
  the image stream.

A level is also skipped while its three tail tasks from the previous row are
still pending, because they need that level's free slots. With a continuous
input, stage 1 therefore runs at most every other clock on fed-back data. LL
words come out of stage 2 at no more than one per two clocks, so they hardly
wait. The next image can enter while the higher levels of the previous one
are still being computed.

Every sample passes through one 16-bit input register. For the image stream
this is a plain register. For fed-back data it is the read register of
Buffer 1.

## Stage 2: column filtering (`dwt_ctrl2`, `dwt_buf2`)

Stage 2 sees the stage-1 results of each level as a raster of M columns
(p = 2k + horizontal band) by N rows. It filters each column with the same
rule. Buffer 2 keeps, for every column, the last four rows (oldest first), plus
rows 0 and 1 of the level for the wrap. Because levels arrive interleaved, each
level has its own region of Buffer 2 columns (IMG_W columns for level 1,
IMG_W/2 for level 2, and so on) and its own row and column counters. The level
number travels with every stage-1 result in the PU1 tag. Reads are
combinational, so control unit 2 reads a column's history and pushes the new
sample in the same clock.

* At odd row r ≥ 3, a sample arrives and is combined with rows r-3..r-1 from
  the buffer. This gives the vertical low-pass of output row (r-3)/2.
* At even row r ≥ 4, the vertical high-pass of rows r-4..r-1 is taken entirely
  from the buffer, while the new sample is pushed.

So stage 2 also does one task per incoming sample. Its first output needs
3·M + 1 stage-1 results, and every later output row needs two more rows.

After the last row of a level, three output rows per column are still missing:
the high-pass of rows N-4..N-1, and low- and high-pass of the wrap window
{rows N-2, N-1, 0, 1}. Stage 2 computes them in a flush of three passes over
the columns, taking 3·M clocks. During the flush it accepts no input, and
stage 1 stalls behind it. The flush starts as soon as the last row of a level
has been taken, so interleaved samples of other levels wait for it too.

Each result leaves on `out_*` with its level, band, row and column. LL results
of every level below LEVELS are also written to that level's ring in Buffer 1,
and `ll_wr_valid` tells control unit 1. `out_last` marks the last coefficient
of a level.

## Level feedback (`dwt_buf1`)

Buffer 1 is a simple dual-port array with a synchronous read that holds its
value while `rd_en` is low. It is split into one ring per fed-back level: the
LL of level j goes into IMG_W >> (j-1) words (two LL rows) at base
`ll_base(IMG_W, j)`. Control unit 2 writes at a per-level write pointer in the
order it produces LL words (raster order). Control unit 1 reads at a per-level
read pointer in the same order. The words-written count is what keeps the read
behind the write.

The rings are small because of the interleaving. A fed-back word is usually
read within a few clocks. The longest wait is during a stage-2 flush, when
stage 1 is stalled while stage 2 still produces the LL of the wrap row (M/2
words). At 256 x 256 with two levels, at most 129 of the 256 words were ever
occupied in simulation. An assertion in control unit 1 fails if a ring would
ever hold more words than it has.

## Timing

With a continuous input and `out_ready` high:

* First coefficient: 3·IMG_W + 10 clocks after the first sample is accepted,
  which is 778 clocks for a 256-wide image. This is three image rows for the
  4-row window, plus the two 3-stage PUs and the handshakes.
* Throughput: one sample per clock into stage 1. Image samples and fed-back
  samples share it, so the image input is held off for one clock whenever a
  higher-level sample is taken.
* Per level, stage 2 adds a 3·width-clock flush, during which both stages
  stall.
* Measured: a 256 x 256 image with two levels completes 83,566 clocks after
  its first sample. That is 65,536 + 16,384 stage-1 samples, two flushes and
  pipeline fill, with level 2 overlapping level 1. A 16 x 16 image with three
  levels completes in 481 clocks. The testbenches bound both: one clock per
  stage-1 sample, plus twice the flush per level, plus 64.

The design has no multicycle paths. Every register-to-register path is at most
one multiplier, one adder (plus rounding and saturation in the last PU stage),
or the counters and muxes of the control units.

## Interface of `dwt2d_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid, in_ready, in_data | in/out/in | 1/1/16 | image samples, row by row |
| out_valid, out_ready, out_data | out/in/out | 1/1/16 | coefficients |
| out_level | out | clog2(LEVELS+1) | 1..LEVELS |
| out_band | out | 2 | `band_t`: LL, LH, HL, HH |
| out_row, out_col | out | clog2(IMG_H/2), clog2(IMG_W/2) | position in the sub-band |
| out_last | out | 1 | last coefficient of a level |
| st_issue, st_level | out | 1, clog2(LEVELS+1) | a sample of level st_level entered stage 1 this clock |
| st_flushing | out | 1 | stage 2 is in its boundary flush |

Within a level, outputs come in the order stage 2 computes them: the low-pass
outputs of an output row (LL and HL interleaved by column), then its high-pass
outputs (LH, HH). The last output row arrives during the flush. Outputs of
different levels are interleaved. The tags make the order irrelevant to a
consumer that stores by position.

Parameters: `IMG_W`, `IMG_H` (powers of two, default 256), `LEVELS`
(default 2). The last level must still be at least 4 x 4 samples, which an
elaboration-time assertion checks. Word width and taps are in `dwt_pkg`.

## Where this departs from the original scheme

* **Readiness is counted, not scheduled by slot number.** The original scheme
  gives the clock slot at which stage 1 first turns to level 2. Here stage 1
  turns to a higher level whenever a word of it has been written, which gives
  the same order without a fixed slot table.
* **Buffer 1 is a memory plus a register.** The original describes both a
  single 16-bit register in front of stage 1 and a stage-1 buffer that stores
  each level's output for the next level. A row-column second level needs the
  whole LL, so Buffer 1 is an LL memory whose read register is that 16-bit
  register. Its size (rings of two LL rows) is this design's choice.
* **Buffer 2 holds both horizontal bands.** Both the low- and high-pass
  row outputs are filtered vertically, so both are stored.
* **Adder count.** The original's resource count lists 4 multipliers and 2
  adders. This PU has the 4 multipliers and the 2 subtask adders, plus one
  adder to join them.
* **Chosen here, not given by the original:** tap quantisation (14 fraction
  bits), rounding and saturation, periodic boundary extension, the row-tail
  slot schedule, the per-level regions of both buffers, the stage-2 flush, the
  tagged output stream, valid/ready handshakes and the reset style.
* The original quotes a computation time of (L-1)·M + N + 2 clocks. For L = 4
  and M = N = 256 that is 1026 clocks. An N x N image read at one sample per
  clock cannot finish in less than N² clocks. Read as a first-output latency,
  this design's value is 3·M + 10 = 778 clocks.

## Files

| file | content |
|------|---------|
| `rtl/dwt_pkg.sv` | word widths, taps, `band_t`, rounding/saturation, buffer region bases |
| `rtl/dwt_pu.sv` | processing unit, used as PU1 and PU2 |
| `rtl/dwt_buf1.sv` | Buffer 1, LL feedback rings |
| `rtl/dwt_ctrl1.sv` | control unit 1: level interleaving, row windows, slot schedule |
| `rtl/dwt_buf2.sv` | Buffer 2, column line buffer |
| `rtl/dwt_ctrl2.sv` | control unit 2: column windows, flush, tagging, LL write-back |
| `rtl/dwt2d_top.sv` | top level |
| `tb/tb_dwt_pu.sv` … `tb/tb_dwt_ctrl2.sv` | unit testbenches |
| `tb/tb_dwt2d_top.sv` | 16 x 16, three levels, three images, random gaps and back-pressure |
| `tb/tb_dwt2d_full.sv` | the same test at the default 256 x 256, two levels |

Every testbench computes its expected values directly from the filter formula,
not from the hardware schedule. Each testbench ends with a line
`TB_RESULT checks=N failures=M`. The top-level tests also count how often each
mechanism occurred and fail if one never did: output back-pressure, input
stall, level feedback, higher-level samples interleaved with level 1,
stage-2 flush, Buffer 1 ring wrap-around, horizontal and vertical wrap
outputs, and saturation. They also check the 3·W+10 latency, the whole-image
time bound, and, from their own count of LL words written minus words taken,
that no Buffer 1 ring ever holds more than its size.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dwt_pkg.sv tb/tb_dwt2d_top.sv \
          --top-module tb_dwt2d_top -o sim -Mdir obj && obj/sim
```

Replace the testbench name to run another one. Modules are found through
`-Irtl`. The full-size test builds in about a minute and runs in under a
second. Lint with `verilator --lint-only -Wall -Irtl
rtl/dwt_pkg.sv rtl/dwt2d_top.sv`. The only remaining warning is that `rst_n`
is used both as the asynchronous reset and as the `disable iff` of the
assertion in control unit 1.

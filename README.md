# Low-power median filtering: token-ring rank filter, adaptive 2-D median filter, register-array sorter

Median filters remove impulse noise (isolated pixels or samples stuck at
extreme values) while keeping edges sharp. A hardware median filter usually
keeps its window sorted and shifts samples left and right each time a new
sample arrives, so every register in the window may toggle every cycle. The
central idea of this design is to **leave the samples where they are and
update only their ranks**. A rank has only log2(N) bits, so far fewer
flip-flops switch per sample, which is what saves dynamic power.

The RTL contains three engines that share only clock and reset:

| engine | module | what it does | default size |
|---|---|---|---|
| 1-D token-ring median filter | `tr_median_filter` | median of the last N samples, one sample per clock | N = 5, 8-bit |
| 2-D adaptive median filter | `adaptive_median_filter` | impulse-noise removal on a raster pixel stream, 3x3 window enlarged to 5x5 when needed | 256 x 256, 8-bit |
| register-array sorter | `parallel_sorter` | sorts sets of N words with odd-even compare-exchange; loading and unloading overlap | N = 8, 8-bit |

`amf_top` instantiates all three side by side, each with its own ports.

## 1. The token-ring median filter

### Structure

```
            x_in ──► [X] ─────────────┬────────────┬── ... ──┐
                                      ▼            ▼         ▼
   RankCal (A = 1 + ΣAi) ──A──►   cell c1 ──T──► cell c2 ─► ... ─► cell cN ──T──┐
   RankSel (B = P of token cell) ──B──►  (each: Ri, Pi, Ti, RankGen, Pi==(N+1)/2) │
                                      ▲──────────────────────────────────────────┘
   MedianSel (R of the cell with Pi == (N+1)/2) ──► [Y] ──► y_out
```

Each cell `tr_cell` holds three registers:

* `Ri` – one sample of the window. It is written only when the cell holds
  the token, and it is never moved.
* `Pi` – the rank of `Ri` in the window: 1 is the smallest, N the largest.
  Equal samples are ranked by age, so the newer one gets the higher rank.
  This makes all ranks distinct.
* `Ti` – the token bit. Exactly one cell in the ring holds the token. Each
  sample moves the token one cell on. The ring is therefore a FIFO: the
  token cell always holds the oldest sample, and it drops that sample by
  overwriting it with the new one.

### How the ranks are updated

When sample X enters, it replaces the sample held by the token cell `cj`.
All new ranks are computed in one cycle:

* **The token cell** takes `A = K + 1`. Here K counts the other cells whose
  sample is `<= X`. The new sample is the newest, so it ranks above every
  equal older sample. `rank_cal` computes A: it adds the votes
  `Ai = ~Ti & (Ri <= X)` and then adds one.
* **Every other cell** compares its rank `Pi` with the token cell's old
  rank `B = Pj` (from `rank_sel`), and its sample `Ri` with X:

| case | Pi vs Pj | Ri vs X | new Pi | why |
|---|---|---|---|---|
| 1 | Pi > Pj | Ri <= X | Pi − 1 | the sample that leaves was below Ri; the new one is above |
| 2 | Pi < Pj | Ri > X | Pi + 1 | the sample that leaves was above Ri; the new one is below |
| 3 | Pi < Pj | Ri <= X | Pi | still above Ri |
| 4 | Pi > Pj | Ri > X | Pi | still below Ri |
| 5 | Pi = Pj | – | Pi | only possible while both ranks are 0 (window not full yet) |

Each cell's `rank_gen` builds three flags: `Fi = Ri <= X`, `Gi = Pi > B`
and `Ei = Pi == B`. Its `rank_ctrl` turns the flags into the select code of
a 4-way multiplexer: A, Pi−1, Pi+1 or Pi. The code is given by
`amf_pkg::rank_src_e`:

```
S1 = Ti | ~Ei & Fi & Gi        (11 recalc, 10 decrement)
S0 = Ti | ~Ei & ~Fi & ~Gi      (11 recalc, 01 increment)
```

The cell whose rank equals (N+1)/2 raises `Yi`. `median_sel` then passes
that cell's sample to the output register Y. `rank_sel` and `median_sel`
are AND-OR selectors. A tristate-bus version would do the same job; it is
not used here.

### Timing and start-up

* Pipeline: input register X, then the cell registers (stage 1), then the
  output register Y (stage 2). The sample captured in X at clock edge k is
  in the window after edge k+1, and its median is in Y after edge k+2.
  One sample is accepted per clock.
* Reset: X, Y, every Ri and every Pi go to 0. The token starts in the
  **last** cell, so the first sample lands in the first cell. The reset
  value 0 in X enters the window as a real sample at the first edge.
* Until N samples have arrived, the cells not yet written keep rank 0 and
  count as zeros below every real sample. If no cell has rank (N+1)/2, the
  AND-OR selector outputs 0. This is exactly the median of the window
  padded with zeros.
* `en` is an addition of this design. While `en` is low, every register of
  the filter holds its value, so a stream with gaps works as if the clock
  had stopped.
* Worked example, also run by the testbench: feed 12, 99, 35, 47, 66. The
  ranks of c1..c5 then read 1, 5, 2, 3, 4. The median 47 appears in Y two
  clocks after 66 entered X. The next sample, 52, replaces 12 in c1; c1 gets
  rank 2 + 1 = 3, c4 (47) drops from 3 to 2, and the ranks read 3, 5, 1, 2, 4.

Assertions in `tr_median_filter` check that the ring always carries exactly
one token and that at most one cell claims the median rank.

## 2. The adaptive median filter (2-D)

A plain median filter also changes pixels that are not noise, which blurs
the image. It also fails when impulses are so dense that the window median
is itself an impulse. The adaptive filter fixes both. In this design, a
value counts as an impulse when it equals the minimum or the maximum of
its window. For each pixel z:

1. Take the 3x3 window. If min < median < max, the median is usable.
   Then output z if min < z < max, otherwise output the median.
2. If the 3x3 median is itself an impulse, enlarge the window to 5x5 and
   apply the same test.
3. If the 5x5 median is still an impulse, output the 5x5 median.

So a pixel is changed only when it is judged to be noise. The window grows
only where the noise is dense.

### Datapath

* `window_gen` (K = 5) turns the raster stream into a sliding window. Each
  window row is a chain of K registers. Between rows, a row buffer of
  length `IMG_W − K` makes the delay from one row to the next exactly one
  image line. The row buffer is `line_buffer`, a circular buffer in a RAM,
  so the pixels it stores do not move. The same module with K = 3 gives
  the classic 3x3 window. The 3x3 window is the inner part of the 5x5 one.
* `order_stat` computes minimum, median and maximum without sorting. Each
  sample's rank is the number of smaller samples plus the number of equal
  samples with a lower index. Selection is by rank: 0, (N−1)/2 and N−1.
  There are two instances, one for 9 samples and one for 25. This is the
  same rank-then-select idea as the 1-D filter, done in parallel.
* The decision logic applies the three steps above. It also reports
  `out_enlarged` (the 5x5 window was needed) and `out_replaced` (the output
  is a median, not the original pixel).

### Stream interface and timing

* Input: `in_valid` / `pix_in`, one pixel per valid cycle, in raster order.
  Frames follow each other with no gap and no frame marker. The first pixel
  after reset must be the top-left pixel of a frame. There is no
  back-pressure.
* The output for a pixel appears once its 5x5 window is complete, that is
  `2*IMG_W + 2` valid input pixels later. It comes out two clock cycles
  after the input cycle that completes the window, with `out_valid`.
  Outputs are in raster order.
* At the end of a frame, the last `2*IMG_W + 2` outputs come out while the
  next frame, or any filler pixels, are streamed in.
* Pixels closer than two pixels to an image edge are passed through
  unchanged.
* Throughput is one pixel per clock. The 3x3 and 5x5 statistics are
  computed side by side every cycle, rather than one after the other only
  when needed.

## 3. The register-array sorter

`parallel_sorter` is a chain of N registers.

* **Load.** A set of N words is shifted in, one per accepted `in_valid`.
* **Sort.** The set is sorted in place in N/2 cycles. Each cycle applies
  two layers of compare-exchange between neighbouring registers: first the
  pairs (0,1), (2,3), …, then the pairs (1,2), (3,4), …. This is
  odd-even transposition sort, which needs N layers. `in_ready` is low
  while sorting.
* **Unload.** While the next set is shifted in, the sorted set leaves at the
  far end, smallest first, on `dout` with `out_valid`.

One set therefore takes n + n/2 cycles to load and sort, plus n cycles to
leave, for 20 cycles when n = 8. Only a single sorting pass per set (k = 1)
is built. The last set leaves only when more data is pushed in behind it.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `tr_median_filter` | `N` | 5 | window of the worked example; any odd N works |
| | `DW` | 8 | design choice |
| | rank width | `$clog2(N+1)` (3) | equals ⌈log2 N⌉ for odd N |
| `adaptive_median_filter` | `IMG_W`, `IMG_H` | 256, 256 | design choice |
| | window sizes | 3 and 5 (fixed) | 3x3 from the source; 5x5 upper limit is a design choice |
| `parallel_sorter` | `N` | 8 | eight-line sorting network; N must be even |
| `amf_top` | `DW`, `TR_N`, `IMG_W`, `IMG_H`, `SORT_N` | 8, 5, 256, 256, 8 | passed down |

Approximate size of `amf_top` after coarse synthesis: 3.5k word-level
cells, 446 flip-flops, and 8 kbit of RAM for the four 251-pixel row
buffers.

## Where this RTL follows its source and where it departs

The following are taken from the original design: the token-ring filter's
cell registers, the rank-update cases, the Ctrl truth table, RankCal as
"1 + number of votes", the AND-OR selectors, the reset state (token in the
last cell, everything else zero), the two-stage pipeline, the 3x3
window-generator structure with `image width − 3` row buffers, the rule of
the adaptive filter, and the shift-in / sort / overlapped shift-out
behaviour of the sorter with its cycle count.

The following are choices of this design, because the source leaves them
open:

* All data widths (8-bit).
* Asynchronous active-low reset, and the `en` input of the 1-D filter.
* The impulse test (equal to window min or max), the 5x5 largest window and
  what is output when it is reached, and pass-through at image borders.
* How the adaptive filter computes min, median and max (parallel ranking).
* Image size, and every handshake and stream convention.
* Ascending output order of the sorter, and k = 1.
* No connection between the three engines. None is defined, so they are
  independent blocks in `amf_top`.

Not built: the tristate-bus versions of the selectors, repeated sorting
passes (k > 1) for suffix sorting, and the external memory that the sorter
would read from and write back to.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<m>`. The 2-D testbenches share the
reference model `tb/tb_amf_ref_pkg.sv`. It builds noisy test images (a
gradient with salt-and-pepper noise and dense impulse clusters) and filters
them with the simulator's `sort()`, independently of the RTL. Example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/amf_pkg.sv tb/tb_amf_ref_pkg.sv tb/tb_amf_top.sv --top-module tb_amf_top
./obj_dir/Vtb_amf_top
```

`tb_amf_top` runs the whole subsystem at its default sizes, in about ten
seconds:

* 3000 samples through the 1-D filter with enable gaps;
* a complete noisy 256x256 frame through the 2-D filter;
* 40 sets through the sorter.

It checks every output. It also counts these mechanisms and fails if any of
them never occurs: token wrap-around, enable gaps, border pass-through,
kept pixels, replaced pixels, 5x5 enlargement, sorter stalls, and unloading
overlapped with loading.

The block testbenches check the following:

* `tb_tr_median_filter`: the worked example, then ties, latency, and that
  the ranks always form a permutation of 1..N. A second instance with a
  9-sample window runs on the same stream.
* `tb_adaptive_median_filter`: two 16x12 frames, with exact latency.
* `tb_parallel_sorter`: the 20-cycle count and the number of stall cycles.
* The combinational leaf modules are checked exhaustively or with random
  inputs.
* `tb_amf_noise_levels`: 64x64 frames at 20, 30, 40 and 50 % salt-and-pepper
  noise. Besides the output-by-output comparison it measures how well the
  filter works on the interior pixels:

| noise | impulses in | impulses left | mean abs. error vs. clean image |
|---|---|---|---|
| 20 % | 707 | 0 | 1.69 |
| 30 % | 1099 | 0 | 2.16 |
| 40 % | 1403 | 0 | 3.39 |
| 50 % | 1753 | 4 | 3.85 |

  (One run; the noise pattern depends on the simulator seed.)

Changing sizes: every size is a parameter. `tr_median_filter #(.N(7))`
gives a 7-sample window. `adaptive_median_filter #(.IMG_W(640),
.IMG_H(480))` gives VGA frames. The row buffers grow to `IMG_W − 5`
entries each.

# Lifting wavelet core for video

This is a streaming 2-D discrete wavelet transform for raster video. It
computes a multi-level pyramid with the CDF 2-2 (5/3) bi-orthogonal
wavelet. It follows the lifting-scheme architecture that C. Diou, L. Torres
and M. Robert published as "A wavelet core for video processing" (ICIP 2000).
Three ideas keep it small:

* **Lifting instead of filter banks.** The samples are split into even and
  odd samples first. Then one *predict* step and one *update* step turn them
  into detail and smooth coefficients. A 1-D stage needs four adders. The 2-D
  forward transform needs twelve.
* **Line buffering instead of frame buffering.** Vertical filtering starts as
  soon as the next even line arrives. Each level needs only three line memories.
* **One datapath for all levels.** The lower-resolution levels do not get
  their own transform units. Their samples are slipped into the gaps of the
  input stream, following the recursive pyramid algorithm. The same
  horizontal and vertical units switch their working context to a level in
  a single clock.

At the default size (1024-pixel lines, 2048-line frames, 4 levels) the core
takes one pixel per clock, with no gaps, and keeps up. All of its memory
holds 6.5 lines of coefficients.

## The arithmetic

With `x` one line (or one column) of `N` samples, `P = N/2` pairs:

```
predict:  d[n] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)      n = 0 .. P-1
update:   s[n] = x[2n]   + floor((d[n-1] + d[n]) / 4)
edges:    x[N] := x[N-2]   (right/bottom)     d[-1] := d[0]   (left/top)
```

`s` is the smooth (low-pass) half and `d` the detail (high-pass) half. The
factors 1/2 and 1/4 are arithmetic right shifts. `wt_lift_kernel` holds the
four adders. Each unit of the core uses it, so every lifting step in the
design computes exactly these two lines.

The inverse reverses the steps and changes the signs:

```
undo update:   e[n] = s[n] - floor((d[n-1] + d[n]) / 4)
undo predict:  o[n] = d[n] + floor((e[n] + e[n+1]) / 2)      e[P] := e[P-1]
merge:         x[2n] = e[n], x[2n+1] = o[n]
```

Both directions use the same floor rounding and the same edges. The
reconstruction is therefore exact, bit for bit.

The published architecture does not state the rounding or the edge handling.
Plain floor and whole-sample symmetric extension are this design's choices.
The JPEG 2000 reversible 5/3 filter adds a rounding offset of 2 in the update
step. This core does not, so its coefficients differ slightly from JPEG 2000's.

## Data path

```
 pixels ─► wt_split ─► input mux ─► wt_hlift ─► wt_vlift ─► ll, lh, hl, hh of level l
                          ▲                                   │
                          │     level FIFOs (wt_fifo)         │ ll of level l < LEVELS-1,
                          └──────────── ◄ ── pack pairs ◄─────┘ packed two by two
                 wt_sched picks, each clock, the level and the operation
```

| Module | Role |
|---|---|
| `wt_pkg` | default sizes and level-address helpers |
| `wt_lift_kernel` | predict + update, 4 adders, combinational |
| `wt_split` | forms even/odd pixel pairs, and holds one pair until it is taken |
| `wt_sched` | context-switch arbiter, drives the input multiplexer |
| `wt_hlift` | horizontal lifting with one context per level |
| `wt_vlift` | vertical lifting with line memories a, b, c, two columns at once |
| `wt_linemem` | line memory (combinational read, write on the same address) |
| `wt_fifo` | level FIFO for approximation samples waiting for their level |
| `wt_ilift1d` | 1-D inverse lifting of one line (beside the core, own ports) |
| `wt_core` | top level |

### Horizontal unit and line closing

A *step* hands `wt_hlift` one even/odd pair of some level. The predict step
for pair `j-1` needs the even sample of pair `j`. So the step that takes
pair `j` outputs the coefficients of pair `j-1`. The first pair of a line
only loads the registers. After the last pair, the level raises `flush_pend`.
One extra *flush* step then computes the last coefficient pair, with the
right edge mirrored (`e1 = e0`), and advances the level's line counter. A
line of `P` pairs thus costs `P + 1` steps. Each level has its own set of
context registers:

* the previous even and odd sample
* the previous detail
* the pair counter and the line counter

A step reads and writes only the registers of its own level. A level's
context stays frozen while other levels run, so switching levels costs
nothing.

### Vertical unit: the line-buffer method

The horizontal output of one line is `P` coefficient pairs `(s, d)`.
`wt_vlift` lifts both columns of a pair in parallel, with two kernels. Per
level it keeps three line memories. Each word of a memory holds the two
columns of one pair.

| memory | holds |
|---|---|
| a | the last vertical detail line computed (the "previous detail") |
| b | the last even line, as it came from the horizontal unit |
| c | the odd line, parked until the even line below it arrives |

For column `k` of line `r` of a level, with input `in`:

| line | action |
|---|---|
| 0 | `b[k] <= in` |
| odd, not last | `c[k] <= in` |
| even, `r >= 2` | `D = c[k] - (b[k] + in)/2`, `S = b[k] + (a[k] + D)/4`; output line `r/2 - 1`; then `a[k] <= D`, `b[k] <= in` |
| last (odd) | `D = in - b[k]` (bottom edge mirrored), `S` as above; output the last line |

On the first output line there is no previous detail, so `D` stands in for
`a[k]`. Memory `b` is refilled with the *incoming* even line, not with the
updated one, because the next predict needs the even line before its update.
Memory `c` is written and read in column order, one line apart, so it
behaves as a line FIFO. All three memories are RAMs addressed by
`level base + column`. Level `l` starts at word `LINE_N - (LINE_N >> l)`.

The four outputs per position are:

* `ll` and `lh`: the vertical smooth and detail of the horizontal smooth column
* `hl` and `hh`: the vertical smooth and detail of the horizontal detail column

So the first letter names the horizontal filter and the second the vertical
filter. The output words of a level come out in sub-band raster order. They
come in bursts: one burst during each even line of that level, plus one on
its last line.

### Several levels in one datapath

This is the part that needs the most care.

**Which work exists.** Level 0 is fed by the pixel pairs from `wt_split`.
Level `l >= 1` is fed by the `ll` output of level `l-1`. Those samples are
packed two by two into even/odd pairs and queued in level `l`'s FIFO. A
level's line has an even number of samples, so pairs never straddle lines.

**Who goes next.** Each clock, `wt_sched` issues at most one step:

1. a pending flush of level 0. It must come before level 0's next pair, and
   the next pixel pair cannot be ready yet, so no input is delayed;
2. otherwise an input pair, if one is waiting. Video cannot be stalled, so
   the input always wins over deeper levels;
3. otherwise the deepest level that has work: first its pending flush,
   otherwise a pair from its FIFO. Deepest first keeps the smallest FIFOs
   the emptiest.

Pixels come at most one per clock, so an input pair comes at most every
second clock. Every other clock is therefore free for the deeper levels. The
deeper levels together need a third of level 0's work, plus one flush step
per line, so they always fit into these free clocks. The result is the
recursive-pyramid sample order: level 0 in every other slot, and the
coarser levels interleaved in the gaps as soon as their inputs exist.

**Switching context.** The step's level selects three things:

* which context registers `wt_hlift` uses
* which input the multiplexer passes: the pixel pair for level 0, the FIFO
  head for the other levels
* which region of the line memories `wt_vlift` addresses one clock later

There is nothing to save or restore: every level's state lives in its own
registers and memory region.

**Sizes.** Level `l` works on `LINE_N >> l` samples per line and `IMG_H >> l`
lines per frame. Both must be even, and every level needs at least two pairs
per line. So `LINE_N >> (LEVELS-1) >= 4` and `IMG_H >> (LEVELS-1) >= 2`.
The FIFO of level `l` holds one line of that level, `LINE_N >> (l+1)` pairs.
A FIFO overrun would set the sticky `overflow` output and fire an assertion.
At the default sizes, and in every test at reduced sizes, it never does.

## Interface and timing (`wt_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_pix` | in | 1, `PIX_W` | pixel stream in raster order, at most one per clock, no back-pressure |
| `in_sof` | in | 1 | first pixel of a frame; restarts the pixel pairing only, so frames must be complete |
| `out_valid` | out | 1 | a sub-band word is present |
| `out_lvl`, `out_row`, `out_col` | out | | level (0 = finest), sub-band line and column |
| `out_ll`, `out_lh`, `out_hl`, `out_hh` | out | `W` each | the four coefficients at that position |
| `out_ll_final` | out | 1 | word belongs to the last level, so its `ll` is the final approximation (the other levels' `ll` are intermediate values) |
| `ctx_switch` | out | 1 | the step this clock works on a different level than the previous step |
| `overflow` | out | 1 | sticky: an input pair or a level FIFO overran |
| `rec_*` | | | the 1-D inverse unit, see below |

Timing of a pixel pair through the core:

| clock | what happens |
|---|---|
| `t` | the pair's second pixel is registered |
| `t+1` | at the earliest, the pair is issued as a step |
| `t+2` | `wt_hlift`'s output is registered |
| `t+3` | `wt_vlift`'s output is registered; the sub-band word is visible |

So the latency is three clocks or more, and longer when the pair is
buffered in a line memory until the next even line. At the default size,
the last sub-band word of a frame leaves 14 clocks after its last pixel.

The coefficients have `W = 16` signed bits. From 8-bit pixels, the 5/3
lifting steps grow the values by less than a factor of 2.25 per level in the
worst case, so 16 bits cover 4 levels.

**Reconstruction port.** `wt_ilift1d` sits beside the forward path and shares
nothing with it:

* It takes a line of `LINE_N/2` pairs `(rec_in_s, rec_in_d)` with a
  valid/ready handshake.
* It returns the even/odd sample pairs one clock after the pair that
  completes them.
* After each line, `rec_in_ready` drops for one clock while the line's last
  pair is finished. A line therefore takes `LINE_N/2 + 1` clocks.

There is no 2-D reconstruction core. The published architecture only says
that the forward core can be adapted to the inverse; it does not describe
one.

## Parameters

| parameter | default | note |
|---|---|---|
| `LINE_N` | 1024 | pixels per line at level 0 (published maximum image 1024 × 2048) |
| `IMG_H` | 2048 | lines per frame at level 0 |
| `LEVELS` | 4 | decomposition levels; the published recursive-pyramid schedule is drawn with four. `LEVELS = 1` is the single-level core |
| `PIX_W` | 8 | input pixel width |
| `W` | 16 | coefficient width |

The image sizes and the level structure follow the published design.
`PIX_W`, `W` and the default of 4 levels are this design's choices. The
publication gives no widths and keeps the number of levels symbolic.

## Resources

* **Adders.** The forward 2-D path has 4 adders in `wt_hlift` and 2 × 4 in
  `wt_vlift`, 12 in total. The published design also counts 12, against 18
  for a filter-bank implementation. The inverse unit adds 4.
* **Line memories.** Memories a, b and c hold 960 words of 32 bits each,
  with levels 0 to 3 stacked. That is 1920 coefficients per memory and
  5760 in total.
* **Level FIFOs.** They hold 256 + 128 + 64 pairs, that is 896 coefficients.
* **Total memory.** 6656 coefficients, or 6.5 lines of 1024. The published
  bound for the multi-level architecture is 7 lines.

The level-0 part of a, b and c is 3 lines: 3 kB at 8 bits per sample, the
published figure. At the 16 bits per coefficient used here it is 6 KiB.

## Departures from the published architecture

* **The rate-smoothing FIFO of N/2+1 samples.** The published single-level
  design places it between the horizontal and the vertical block, next to
  the FIFO of N samples that becomes memory c here. It is not built. Here
  the vertical unit takes each horizontal output pair in the very next
  clock, so there is no rate difference for such a FIFO to absorb. The
  published description also does not say how it is read.
* **Rounding, edge extension, widths and reset.** The publication specifies
  none of these. The choices are described above.
* **Output format.** One word per position, with the four sub-band
  coefficients and tags for level, line and column, is this design's choice.
* **Line closing.** The extra flush step per line and level is this design's
  way to close a line. It costs one clock per line per level.
* **Scheduling priority.** Input first, then the deepest level, is chosen
  here. The recursive pyramid algorithm only asks that each output is
  computed as early as possible.
* **Clock frequency.** The published design reaches 66 MHz pixel rate on
  its own technology. This RTL has not been timed; it sustains one pixel per
  clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares its
module against `tb/wt_ref_pkg.sv`, a plain software model of the equations
above that works on whole arrays, with no contexts and no line memories. Each
testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_wt_lift_kernel` | predict/update on corner cases and 2000 random operands |
| `tb_wt_split` | pairing across gaps and frame restarts |
| `tb_wt_hlift` | two levels interleaved at random: every coefficient, line/column tags, `P+1` steps per line |
| `tb_wt_vlift` | two levels interleaved, two frames: every sub-band value, one-clock latency |
| `tb_wt_linemem`, `tb_wt_fifo`, `tb_wt_sched` | memory behaviour, FIFO state against a queue model, arbiter priority rules |
| `tb_wt_ilift1d` | exact reconstruction of random lines, `P+1` clocks per line |
| `tb_wt_core` | 32 × 16 pixels, 3 levels, three frames back to back (full rate, random gaps, 0/255 stripes), every output word of every level; counts context switches, flushes, deeper-level steps deferred by input, FIFO reads per level and bottom-edge lifts, and fails if one never happened |
| `tb_wt_core_single` | the single-level build (`LEVELS = 1`) at 48 × 24 pixels, a width that is not a power of two |
| `tb_wt_core_full` | default parameters: two 1024 × 2048 frames through 4 levels (1.39 M output words checked), about 10 s of simulation |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/wt_pkg.sv tb/wt_ref_pkg.sv tb/tb_wt_core.sv --top-module tb_wt_core
./obj_dir/Vtb_wt_core
```

The design has been linted with Verilator (`-Wall`) and elaborated with the
slang front end of Yosys. It has not been run on an FPGA, and no timing
closure was attempted.

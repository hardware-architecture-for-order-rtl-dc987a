# Multi-mode CFAR detector with a FIFO insertion sorter

A radar CFAR (constant false alarm rate) detector decides, for every range
cell, whether the echo in that cell stands out from its surroundings. It
estimates the local background level Z from the cells around the cell under
test (CUT), scales it by a factor alpha, and declares a target when
`CUT >= alpha * Z`. Which estimate of Z works best depends on the scene
(uniform noise, clutter edges, closely spaced targets), so this design
computes six of them in one datapath and lets the user switch between them
at run time:

| code (`mode`) | detector | Z |
|---|---|---|
| `DET_CA` 000 | cell averaging | (Y1 + Y2) / 2 |
| `DET_GO` 001 | greatest-of | max(Y1, Y2) |
| `DET_SO` 010 | smallest-of | min(Y1, Y2) |
| `DET_GOSCA` 100 | generalised order statistic, mean | (Y(1) + Y(2)) / 2 |
| `DET_GOSGO` 101 | generalised order statistic, greatest-of | max(Y(1), Y(2)) |
| `DET_GOSSO` 110 | generalised order statistic, smallest-of | min(Y(1), Y(2)) |

Y1 and Y2 are the averages of the lagging and the leading reference window.
Y(1) is the k-th smallest value of the lagging window and Y(2) the i-th
smallest of the leading window. With k = i the last three are the classic
OSCA, OSGO and OSSO detectors.

The rank-order detectors need each window sorted, and the window slides by
one cell per sample. The core of the design is a sorter that does exactly
that: in one clock it drops the oldest value and inserts the new one in its
sorted place. Then every rank is just a multiplexer read.

## Dataflow

```
 din ──► lagging sorting array ──oldest──► guard / CUT shift register ──► leading sorting array ──oldest──► (dropped)
          (n = N/2 cells, sorted)           (M+1 cells, CUT in middle)      (n cells, sorted)
              │   │                                   │                         │   │
   Sel-k mux ─┘   └─ running sum (add din,            CUT          Sel-i mux ───┘   └─ running sum
   Y(1)               subtract oldest) ─► Y1                        Y(2)                 ─► Y2
                 │                                    │                              │
                 └──────────► Z unit (SelOp picks averages or ranks, SelDet picks mean/max/min)
                                         │
                              alpha * Z ─► compare with CUT ─► detect
```

* The window has P = N + M + 1 cells: N reference cells (n on each side),
  M guard cells (m = M/2 on each side) and the CUT. Default: N = 32, M = 8,
  12-bit samples, so P = 41.
* A new sample enters the lagging array. The value that array discards (its
  oldest) moves into the guard register line, and the value leaving the guard
  line enters the leading array, whose oldest value is dropped. The three
  stages together are a 41-sample delay line, but the two reference windows
  are kept sorted rather than in arrival order.
* To know which stored value is the oldest, each sorting array has a
  priority decoder. It turns the array's expiry chain into an index,
  SelOldest, and a multiplexer reads that cell.
* Each window average comes from a running sum. Every insertion adds the
  newest value and subtracts the oldest, and the sum is shifted right by
  log2(n). So n must be a power of two.
* Guard cells are never used in Z. They keep a target's own energy, which
  spills into neighbouring cells, out of the background estimate.

## The FIFO insertion sorter (`sorting_array`, `sbc`)

The sorter is a row of identical cells, the Sorting Basic Cells (SBC). Cell
0 is on the left and holds the smallest value. Cell i stores a value R[i]
and a life period CNT[i], which counts how many insertions that value has
survived. After reset all values are 0 and CNT[i] = i. The array then acts as
if it had already been filled with zeros, the rightmost zero being the oldest.

Each insertion presents the new datum D to all cells at once. Each cell then
works out locally what to do, using only its own state, D and one bit from
each neighbour:

* **comparator** `p_i = R[i] < D` (strict). A cell with p = 1 lies to the
  left of D's sorted position.
* **expiry** `cnt = (CNT[i] == LEN-1)` marks the oldest value. Exactly one
  cell has it.
* **expiry chain** `cnt_i = cnt_{i+1} | cnt` runs from right to left. Cell i
  learns from it whether the value to be discarded lies at or to its right.
* **load** `load = (p_i ^ cnt_{i+1}) | cnt`. The cell updates if it holds the
  oldest value, or if it lies between D's new position and the discarded cell.
  These are the cells with p = 1 and the hole to their right (left shift), or
  p = 0 and the hole to their left (right shift).
* **direction** `LR = p_i & load`. 1 takes the right neighbour's entry, 0 the
  left neighbour's.
* **take D** `reset = load & ((p_{i-1} & ~p_i) | (p_i & ~p_{i+1}))`. This
  holds in exactly one cell, the one at D's sorted position next to the
  shifted run. Its counter restarts at 0.

What a neighbour offers depends on its own comparator. A cell with
R < D offers R to its left and D to its right. Otherwise it offers D to
its left and R to its right. So wherever the shifting run meets D's
position, the multiplexers hand over D itself and no separate insertion
path is needed. At the two ends the array behaves as if there were a
virtual cell with p = 1 on the left and p = 0 on the right, each offering D.
Every cell that does not reset adds 1 to its counter: to its own CNT if it
holds, or to the moved entry's CNT if it loads. So ages stay exact while
entries move.

Example, 5 cells. The oldest value is 7 (CNT 4 = LEN-1). Insert D = 10:

```
cell        0   1   2   3   4
R           2   4   7   9  12
CNT         3   0   4   1   2
p (R<10)    1   1   1   1   0
cnt         0   0   1   0   0
cnt_i       1   1   1   0   0
load        0   0   1   1   0
LR          0   0   1   1   0
reset       0   0   0   1   0
after:  R   2   4   9  10  12
        CNT 4   1   2   0   3
```

Cell 2 drops 7 and takes 9 from its right. Cell 3 takes D because its right
neighbour (p = 0) offers D. The other cells hold and age by one.

Properties to rely on:

* One insertion per clock, with no other control logic. Equal values keep
  arrival order (newer to the left) because the comparator is strict.
* CNT values are always a permutation of 0..LEN-1. The expiry and
  insertion vectors are one-hot, and `sorting_array` asserts this on every
  insertion.
* LEN need not be a power of two. CNT is ceil(log2 LEN) bits wide.

## Z statistic and decision

`z_statistic` takes either the two averages (SelOp = 0, `mode[2]`) or the
two rank values (SelOp = 1). It returns their truncated mean, maximum or
minimum (SelDet, `mode[1:0]`). `threshold_compare` multiplies Z by alpha, an
unsigned fixed-point number with `ALPHA_FRAC` fraction bits (default 16 bits,
10 of them fractional). It then compares `CUT << ALPHA_FRAC >= Z * alpha`
exactly. The full-precision product comes out as `threshold`. With 10
fraction bits, alpha = 973/1024 = 0.9501953125 is exact. A factor such as
0.95 has no exact binary form, and the small differences between this
detector and a floating-point model come from that and from the truncating
averages.

## Throughput

The detector takes one sample per clock and gives one decision per sample.
The decision for a window appears one clock after the sample that
completed it. After reset, the first decision needs P samples. The
motivating radar produces 4096 range cells per sweep and 4096 sweeps per
2.5 s antenna turn. That is 16,777,216 samples, or 6.7 Msample/s, so any
clock above about 6.8 MHz keeps up. No timing analysis has been done here.
From the structure, the longest paths should be the broadcast of D to every
cell's comparator followed by the load logic, and the priority decoder,
multiplexer and adder behind the oldest-value read.

## Interface and timing (`cfar_detector`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset empties the window (all cells 0) |
| `in_valid` | in | 1 | `din` is a new sample; low = stall, everything holds |
| `din` | in | DATA_W | range-cell sample |
| `mode` | in | 3 | `cfar_pkg::det_mode_e`, table above |
| `sel_k` | in | log2(n) | k - 1: rank taken from the lagging window (0 = smallest) |
| `sel_i` | in | log2(n) | i - 1: rank taken from the leading window |
| `alpha` | in | ALPHA_W | scaling factor |
| `out_valid` | out | 1 | a decision is presented |
| `detect` | out | 1 | CUT >= alpha * Z |
| `cut`, `z` | out | DATA_W | the CUT and Z of this decision |
| `threshold` | out | DATA_W+ALPHA_W | alpha * Z, ALPHA_FRAC fraction bits |

* One sample per clock. The sorter, the shift register and the running
  sums all update on the same edge.
* `mode`, `sel_k`, `sel_i` and `alpha` can change on any cycle. They apply
  to the window as it stands in that cycle.
* The outputs are registered. One clock after a sample is inserted,
  `out_valid` pulses with the decision for the window that sample completed.
  This only happens once N + M + 1 samples have been inserted since reset.
  The decision's CUT is the sample inserted n + m insertions before the
  newest one.

Parameters (defaults in brackets): `DATA_W` [12], `N_REF` [32, twice a power
of two], `M_GUARD` [8, even], `ALPHA_W` [16], `ALPHA_FRAC` [10]. The window
sizes are build-time parameters, not run-time inputs. Changing them at run
time would change how many cells each sorter holds.

## Files

* `rtl/cfar_pkg.sv`: detector codes (`det_mode_e`, `zop_e`).
* `rtl/sbc.sv`, `rtl/sorting_array.sv`: the sorter. Its defaults are
  32 cells x 16 bits when used stand-alone; the detector uses 16 x 12.
* `rtl/priority_decoder.sv`: SelOldest from the expiry chain.
* `rtl/word_mux.sv`: the n-to-1 multiplexers, used for ranks and the oldest value.
* `rtl/pe_accumulator.sv`: running sum and average.
* `rtl/guard_shift_register.sv`: guard cells and CUT.
* `rtl/z_statistic.sv`, `rtl/threshold_compare.sv`: Z, alpha * Z, decision.
* `rtl/cfar_detector.sv`: top level.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=F`.
* `tb/tb_cfar_configs.sv` with `tb/cfar_size_check.sv`, and
  `tb/tb_sorting_array_sizes.sv` with `tb/sorter_size_check.sv`: the same
  checks at several build sizes.

## Verification

* `tb_sorting_array` replays two hand-worked 13-cell insertion sequences.
  One starts from reset and inserts 6, 3, 5, 0, 1, 4. The other starts from
  a mixed state and inserts 2, 18 and 11, which cover a right shift, a left
  shift past an equal value, and an insertion into the cell being vacated.
  For each step it checks every comparator, expiry, load, LR and insertion
  signal and every stored value and age. It then runs 3000 random cycles
  with stalls on the 32 x 16 default. A reference FIFO checks the sorted
  order, the tie order and each entry's age after every clock.
* `tb_sbc` checks the load and reset equations against their full truth
  tables, and the four kinds of register update.
* `tb_cfar_detector` runs the top at its default size. It streams 36,000
  synthetic samples (noise floor, clutter patches, isolated and clustered
  targets, repeated values) with random stalls, and changes `mode`, k, i
  and alpha while running. In the middle it resets, then checks that the
  first decision comes exactly after the window refills. An independent
  model re-sorts and re-sums both windows every cycle and checks `cut`, `z`,
  `threshold`, `detect` and `out_valid` on every cycle. The test fails if any
  of the six detectors, a stall, a parameter change, the reset, a target or
  a non-target never occurred.
* `tb_cfar_configs` repeats the model-checked run at other build sizes:
  8, 16, 32 and 64 reference cells with 8 guard cells and 12-bit data,
  64 reference cells with 14-bit data, and 16 reference cells with 2 guard
  cells. Each size must exercise all six detectors.
* `tb_sorting_array_sizes` checks the sorter on its own at 8 to 256 cells
  and 8- to 24-bit words, including a 49-cell array.
* The other blocks are checked against their defining formulas, with
  random and corner inputs.

No recorded radar data were available. The detection quality of the chosen
alpha and ranks has not been evaluated here, only that the hardware computes
exactly what the formulas above define.

## Simulating

Every testbench is self-contained. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cfar_pkg.sv tb/tb_cfar_detector.sv --top-module tb_cfar_detector
./obj_dir/Vtb_cfar_detector
```

Replace the testbench name to run another one. Everything is synchronous,
with single-clock, synchronous-reset registers and no memories or vendor
primitives.

## Design choices and departures

* **Send rule and end conditions.** The rule a cell uses to offer R or D to
  each neighbour, and the boundary values p = 1 on the left and p = 0 on the
  right, are the ones the sorting behaviour needs. The original
  description of this sorter words both of them mirrored (a cell with R < D
  sending R to its right, and the ends swapped). Read literally, that
  version puts wrong values into the shifted cells. This RTL follows the
  behaviour of the worked insertion sequences instead, and those sequences
  are the ones the sorter testbench replays.
* **Expiry at LEN-1.** A value is discarded when its life period reaches
  LEN-1, counting from 0. This fits counters that start at CNT[i] = i.
* **Rank windows.** k selects in the lagging window and i in the leading
  window. `sel_k` and `sel_i` are 0-based.
* **Average.** The average is a right shift, truncating. CA-CFAR truncates
  twice: once per window average and once in the mean.
* **Own additions.** Several parts are this design's own: the stall input
  `in_valid`, the fill counter and `out_valid`, the output register stage,
  the exact (untruncated) threshold comparison, and the 3-bit detector
  encoding.
* **Not built.** There is no automatic selection of the detector: `mode` is
  an input, and whatever sets it (an operator or a supervisory controller)
  is outside this design. There is no run-time change of N or M. Detectors
  that need both windows sorted together, OS-CFAR and trimmed-mean CFAR,
  are not supported. They would need a merge of the two sorted arrays and a
  way to ignore the guard cells and CUT.

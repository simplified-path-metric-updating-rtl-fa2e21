# M-algorithm path metric updating with split sorting

The M algorithm searches a trellis by keeping only the M best paths at each
step, instead of all 2^(K-1) states as the Viterbi algorithm does. That makes
it attractive when the trellis has many states, as in trellis source coding or
sequence estimation. Each step has three parts:

1. **Extension.** Each of the M survivors branches into its two successors,
   giving 2M paths with updated path metrics.
2. **Merged path suppression.** Two of the 2M paths may reach the same state.
   The one with the larger metric must go. Otherwise the list silently holds
   fewer than M distinct paths.
3. **Selection.** The M paths with the smallest metrics are kept.

Steps 2 and 3 are sorting problems. The usual hardware answer sorts all 2M
paths twice: once by state, so that merged paths become neighbours and can be
dropped, and once by metric, to pick the best M.

This RTL avoids both 2M-item sorts. It uses three sorting networks of only M
items, plus one column of M compare elements. The whole step runs as one
combinational network between two clock edges, so the unit advances one
trellis step per clock.

## Why the sort can be split

A state is the content of a (K-1)-bit shift register, with the newest input
bit in the MSB. To extend a path, a new bit is shifted into the MSB and the LSB
falls out. The bit that falls out is the path's **decision bit**:

- 0 when the path is the upper of the two transitions that can reach its new state;
- 1 when it is the lower.

Group the 2M extensions by the bit shifted in:

- **C0** holds the successors made by shifting in a 0 (state MSB = 0);
- **C1** holds those made by shifting in a 1 (state MSB = 1).

Two facts follow:

- **C0 and C1 never share a state**, because their MSBs differ. Merges happen
  only inside a set. Each set can be cleaned and sorted on its own, with M
  items instead of 2M.
- **A right shift keeps the order of the states.** If the survivors are in
  ascending state order, C0 and C1 come out of the extender in ascending state
  order with no sorting at all. Two survivors whose states differ only in the
  LSB land on the same new state, and they sit next to each other. Merged
  paths can then be found by comparing neighbours.

So the expensive state sort is not needed before the merge check. It only has
to be done once, on the M survivors at the end of the step. That keeps the
next step's C0 and C1 in order. One step is therefore:

```
 survivors (ascending state) ──► path_ext_update ──► C0 ─► path_merge_reject ─► oem_sorter (metric) ─┐
        ▲                        (shift + tm_pm_update)                                                 ├─► bitonic_merger ─► oem_sorter (state) ─┐
        │                                          └──► C1 ─► path_merge_reject ─► oem_sorter (metric) ─┘                                          │
        └──────────────────────────── survivor register (metrics normalised) ◄───────────────────────────────────────────────────────────────────┘
```

### Merged path rejection

There are no duplicate states among the survivors, so a state occurs at most
twice in C0 or C1. `path_merge_reject` compares each neighbouring pair (j, j+1).

- When both paths are valid and have the same state, the one with the larger
  metric is made invalid.
- On equal metrics, the upper path (decision bit 0) is kept.
- A discarded path stays in its slot, marked empty.

### The one-column merge

After the metric sorts, C0 and C1 are each in ascending metric order. Put C0
ascending next to C1 reversed, and the 2M items form a bitonic sequence. The
first column of a bitonic sorter compares item i with item i+M. After that
column, the upper half holds the M smallest items, though not in sorted order.
Only that half is needed, so `bitonic_merger` keeps `min(C0[i], C1[M-1-i])` for
each i. That is one layer of M compare elements, each using only its smaller
output. The survivors do not need to be in metric order, because the next
operation re-sorts them by state anyway.

### Empty paths

At start-up there is one path, and merges can leave fewer than M distinct
paths. Every path therefore carries a valid flag. On both sort keys, an empty
path compares larger than every valid one. Empty paths collect at the bottom
of each list, are the first to be dropped by the merge column, and never hide
a merge, because the valid states still form a sorted prefix.

## Cost in compare elements

Batcher's odd-even merge sort on n = 2^p items uses
`(p^2 - p + 4) * 2^(p-2) - 1` compare elements: 5, 19, 63, 191, 543 and 1471
for n = 4 to 128. `oem_sorter` builds exactly that network, and
`mpath_pkg::oem_count` counts it.

| M | two 2M-item sorters | 3 sorters + M/2 (tabulated) | this RTL: 3 sorters + M | saving of this RTL |
|---|---|---|---|---|
| 4 | 38 | 17 | 19 | 50 % |
| 8 | 126 | 61 | 65 | 48 % |
| 16 | 382 | 197 | 205 | 46 % |
| 32 | 1086 | 589 | 605 | 44 % |
| 64 | 2942 | 1661 | 1693 | 42 % |
| 128 | 7678 | 4477 | 4541 | 41 % |

Notes on the table:

- The published comparison charges M/2 compare elements for the merge. This
  RTL uses a full column of M, one for each of the M outputs. Only the smaller
  output of each element is used, so each one is half a compare-exchange, which
  is probably why M/2 was counted.
- The published comparison gives its hardware figures as 45 % to 58 %. Those
  percentages are the ratio of the new count to the old one (17/38 = 45 %), not
  the saving. Measured as a saving against two 2M-item sorters, the tabulated
  counts give 55 % down to 42 %.

`tb_table1_sizes` checks this arithmetic and runs the whole unit at every M in
the table.

## The unit: `m_algo_pmu`

Parameter: `M` (default 16, a power of two).

Trellis constants are in `mpath_pkg`:

| Constant | Value | Meaning |
|---|---|---|
| `K` | 9 | constraint length, giving 256 states |
| `MW` | 16 | path metric width |
| `SYMW` | 8 | symbol width |

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `start` | in | synchronous restart; has priority over `sym_valid` |
| `sym_valid`, `sym` | in | take one trellis step with this two's-complement symbol |
| `out_valid` | out | the `surv_*` outputs hold the result of a step taken at the previous edge |
| `surv_valid[M]`, `surv_state[M]`, `surv_dec[M]`, `surv_metric[M]` | out | the survivors, ascending by state, empty ones last |
| `step_min` | out | metric subtracted by normalisation at the last step |
| `merge_cnt`, `c1_cnt` | out | merged paths discarded at the last step; survivors taken from C1 |
| `best_found`, `best_state`, `best_dec` | out | the survivor with metric 0, which is the best path (lowest index on ties) |

Timing and behaviour:

- The latency is one cycle, and a new symbol can be accepted every cycle.
  Nothing is pipelined, so the clock period must cover extension, two
  rejection/sort chains, the merge column and the state sort.
- Reset and `start` load the start condition: one valid path in state 0 with
  metric 0, and every other slot empty.
- Metrics are normalised at every step. The smallest survivor metric is
  subtracted from all survivors and reported on `step_min`. The sum of
  `step_min` over a block is the best path's total distortion. Metric additions
  saturate at all-ones.

### Transition metrics (`tm_pm_update`)

The architecture only requires each transition to have a symbol and a
distortion measure. The concrete choice here is:

- The transition's K-bit register `{new state, decision bit}` is masked with
  generator polynomials `G1 = 753` and `G0 = 561` (octal). The two parities
  form a 2-bit label.
- The label selects a reproduction level from {-3A, -A, +A, +3A}, with A = 32.
- The transition metric is `|symbol - level|`.

To change the code or the distortion, edit this one module.

## What is not here

- **Survivor memory and trace-back.** The decoded sequence is recovered by
  tracing the decision bits of the best path backwards. This needs a survivor
  memory, which the architecture leaves to a separate design and which is not
  included. The decision bits and states of every step are available on
  `surv_dec`/`surv_state`, and the best path on `best_state`/`best_dec`.
- **The first selection method.** A simpler variant of the selector keeps the
  state sort inside each set: state sort, then rejection, then metric sort, for
  C0 and C1. That is four M-item sorts plus the merge column. It is superseded
  by the three-sorter structure built here and is not included.
- **Pipelining, the metric width, the code and the distortion measure.** None of
  these comes from the architecture. They are the choices listed above.

## Files

| File | Content |
|---|---|
| `rtl/mpath_pkg.sv` | path record `path_t`, sort key enum, widths, ordering and saturating-add functions, compare-element count |
| `rtl/path_ext_update.sv` | extension into C0/C1 with decision bits; instantiates `tm_pm_update` |
| `rtl/tm_pm_update.sv` | transition labels, distortion, path metric update |
| `rtl/path_merge_reject.sv` | neighbour compare and discard of merged paths |
| `rtl/oem_sorter.sv` | odd-even merge sorting network, metric or state key |
| `rtl/bitonic_merger.sv` | one compare column that keeps the M best of two sorted lists |
| `rtl/path_selector.sv` | rejection ×2, metric sort ×2, merge, state sort |
| `rtl/m_algo_pmu.sv` | top: survivor register, normalisation, outputs |
| `tb/mref_pkg.sv` | independent reference for successor states, labels and metrics |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_table1_sizes` |
| `tb/pmu_check.sv` | parameterised end-to-end checker used by `tb_table1_sizes` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=F` and has a watchdog.

- **Leaf modules.** The leaf modules are checked exhaustively on random inputs
  against the reference package. `tb_oem_sorter` checks both keys at M = 4, 16
  and 128, with many equal keys and empty entries, and checks the
  compare-element formula.
- **`tb_path_selector`** checks the selector on state-sorted sets built like
  real extensions. For each survivor it checks the count, the ascending state
  order, that the metric is the best metric of its state, and that a matching
  extension exists for its decision bit. It also checks the metric multiset and
  `min_metric`.
- **`tb_m_algo_pmu`** runs the unit at its default size for 1600 steps:
  - noise-free encoded symbols, where the encoder's own state must survive with
    metric 0;
  - noisy symbols;
  - random symbols;
  - a restart, with random stalls throughout.

  Every step is recomputed from the previous survivors and checked. The test
  fails if any of these never happens: merge rejection, a partly filled list,
  survivors from both sets, normalisation, a stall or a restart. It takes about
  20 s to build and run.
- **`tb_table1_sizes`** repeats the end-to-end test at M = 4, 8, 16, 32, 64
  and 128.

Ties in metric make the choice among equal paths implementation-defined. The
checks therefore accept any selection that is legal. They do not compare
against one fixed order.

To run a testbench with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/mpath_pkg.sv tb/mref_pkg.sv tb/tb_m_algo_pmu.sv --top-module tb_m_algo_pmu
./obj_dir/Vtb_m_algo_pmu
```

If you change `K` or the generator polynomials in `mpath_pkg`/`tm_pm_update`,
make the same change in `tb/mref_pkg.sv`.

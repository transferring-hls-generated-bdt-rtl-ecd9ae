# BDT tau identification for a Level-1 calorimeter trigger FPGA

A Level-1 trigger must decide, for every 25 ns bunch crossing, whether an
event is interesting. This design implements the machine-learning part of a
tau-lepton identification algorithm on one electron/tau feature-extraction
(eFEX) processing FPGA: each of 8 parallel algorithm instances takes the 99
calorimeter cells of its window, reduces them to 11 energy sums, and feeds the
sums to a boosted decision tree (BDT). The BDT produces a 10-bit score, and a
2-bit condition says how many working-point thresholds the score passes.
Everything runs at 200 MHz and accepts a new window every clock. Results leave
at a fixed 12 clock cycles, the latency the surrounding firmware expects.

The main idea is that the pipeline is **configured, not hand-written**. The
model will be retrained and its input variables will change; each change moves
the cycle at which each sum, and the score, is ready. So the sums are built by
a generic *adder tree* whose schedule (which inputs, when they arrive, when each
result is needed) is a set of parameters, and every alignment delay, including
the delay of the other algorithm signals that travel beside the score, is
computed from those parameters at elaboration time. The last of these delays
pads the result to cycle 12, so downstream logic never sees a latency change.

## Structure

```
efex_tau_fpga                 one processing FPGA
 ├─ g_inst[0..7].u_algo       tau_bdt_algo: one algorithm instance
 │   ├─ u_vars                adder_tree: 99 cells -> 11 variables, aligned
 │   │   └─ g_sum[j]          per variable: delay_line (align) x n,
 │   │                        multi_adder_wc (sum), delay_line (pad)
 │   ├─ u_bdt                 bdt: the tree ensemble, 10-bit score
 │   ├─ u_cond                bdt_condition: score vs 3 thresholds -> 2 bits
 │   └─ u_*_delay             delay_line: score, condition, overflow flags
 │                            and side signals padded to cycle 12
 └─ u_example                 adder_tree in its default (example) configuration
```

`tau_bdt_pkg` holds the window geometry, the variable definitions, the latency
functions and the default model.

## The calorimeter window

One instance sees five layers around a central trigger tower:

| layer | name | grid (eta x phi) | cell size (eta x phi) | cell indices |
|---|---|---|---|---|
| 0 | PS (presampler) | 3 x 3 | 0.1 x 0.0982 | 0-8 |
| 1 | EM1 | 12 x 3 | 0.025 x 0.0982 | 9-44 |
| 2 | EM2 | 12 x 3 | 0.025 x 0.0982 | 45-80 |
| 3 | EM3 | 3 x 3 | 0.1 x 0.0982 | 81-89 |
| 4 | HAD | 3 x 3 | 0.1 x 0.0982 | 90-98 |

Each cell is a 16-bit unsigned energy. Inside a layer, cells are numbered by
phi row, then eta column: `index = base + row * cols + col`. The window centre
is the centre of the central tower (row 1; between EM columns 5 and 6; tower
column 1). This numbering is this design's own convention: reorder `cells_i`
to match a different input mapping, or change `layer_base`/`eta_abs` in the
package.

## Input variables

A variable called `lL_dDDDD` is the sum of the layer-L cells whose centres lie
at distance 0.DDDD from the window centre, distance = sqrt(deta² + dphi²). For
example `l2_d1051` is the four EM2 cells at deta = ±0.0375, dphi = ±0.0982.
In the package each variable is stored as a selection rule (layer set,
|phi offset| in rows, |eta offset| range in units of 0.0125), and
`var_mask()` turns the rule into a 99-bit cell mask:

| # | variable | cells | sum latency |
|---|---|---|---|
| 0 | l2_d1051 | EM2, outer rows, deta ±0.0375 | 4 cells, 2 cycles |
| 1 | l2_d0375 | EM2, centre row, deta ±0.0375 | 2 cells, 1 cycle |
| 2 | l2_d0625 | EM2, centre row, deta ±0.0625 | 2 cells, 1 cycle |
| 3 | l0_d0000 | PS centre cell | 1 cell, 0 cycles |
| 4 | l2_d0125 | EM2, centre row, deta ±0.0125 | 2 cells, 1 cycle |
| 5 | l2_d0990 | EM2, outer rows, deta ±0.0125 | 4 cells, 2 cycles |
| 6 | l1_d1493 | EM1, outer rows, deta ±0.1125 | 4 cells, 2 cycles |
| 7 | l1_d1315 | EM1, outer rows, deta ±0.0875 | 4 cells, 2 cycles |
| 8 | l1_d1164 | EM1, outer rows, deta ±0.0625 | 4 cells, 2 cycles |
| 9 | l1_d1690 | EM1, outer rows, deta ±0.1375 | 4 cells, 2 cycles |
| 10 | central tower | the central tower in all five layers | 11 cells, 4 cycles |

The schema is a parameter of `tau_bdt_algo` (`VAR_MASKS`, one 99-bit cell
mask per variable, default `all_var_masks()`), so variables can be redefined,
with any number of cells, without editing the RTL. Alignment delays and the
total latency follow from the new masks.

The ten distance-coded names are the model's features. Mapping a name to cells
with the geometry above is this design's interpretation. So is summing the
central tower over all five layers. Because the BDT needs all its inputs in
the same cycle, every variable is padded to the slowest one (cycle 4).

## The adder tree

`adder_tree` is the heart of the design and the part that is easiest to
misread. It computes `N_OUT` sums over `N_IN` words. Three parameters
configure it:

* `SUM_MASK[j]`: the inputs of sum j, one bit per input;
* `IN_READY[i]`: the cycle at which input i of an event is on the port,
  counted from the event's cycle 0 (inputs may come from earlier pipeline
  stages of different depth);
* `REQ_CYCLE[j]`: the cycle at which output j must be on the port, or `8'hFF`
  for "as soon as possible".

Each sum j is built in three steps. All are register stages, so the network
takes one event per clock:

1. **align**: each input of the sum goes through its own `delay_line` of
   `ALIGN_j - IN_READY[i]` stages. `ALIGN_j` is the latest ready cycle among
   the sum's inputs.
2. **add**: `multi_adder_wc` adds the n inputs with a binary tree of
   registered pairwise adders. The sum exists at `ALIGN_j + ceil(log2 n)`
   (n = 1 costs nothing).
3. **pad**: a `delay_line` of `REQ_CYCLE[j] - (ALIGN_j + ceil(log2 n))`
   stages brings the sum to the required cycle.

If a required cycle cannot be met, elaboration stops with an `$error`.
Requested latencies are therefore checked when the design is built.

The default parameters are a small worked example:

```
A = x + y + z      B = x + y      C = y + z
x ready at 0, y at 1, z at 3;  B required at 8, C at 7, A unspecified

        align       add                pad      output cycle
A   x+3, y+2, z+0   3 inputs, 2 cycles  0        5
B   x+1, y+0        2 inputs, 1 cycle   6        8
C   y+2, z+0        2 inputs, 1 cycle   3        7
```

The `efex_tau_fpga` top instantiates this example as `u_example`, beside the
trigger logic.

### Overflow

Inside the tree, every word carries an extra carry bit. A pairwise add keeps
the low 16 bits and sets the bit if either operand had it or the add carried
out. The bit is therefore sticky: `out_ovf[j]` means "sum j did not fit in 16
bits", and `out_words[j]` is then the true sum modulo 2^16. `tau_bdt_algo`
feeds an overflowed variable to the BDT as 0xFFFF. It also outputs the 11
flags (`var_ovf_o`) in step with the score. Wrapping, saturating to 0xFFFF and
the flags' use are this design's choices.

## The BDT

`bdt` evaluates `N_TREES` complete binary trees of depth `DEPTH`:

* cycle 1: every node of every tree compares `feat[FEAT_IDX] < THRESH` in
  parallel;
* cycle 2: each tree follows its registered comparison bits to a leaf and
  registers the leaf's signed score. Nodes are in heap order: children of n
  are 2n+1 (taken when the comparison is true) and 2n+2;
* then `ceil(log2 N_TREES)` cycles of a pairwise adder tree. Leaves are
  16-bit signed; the total is clamped to the unsigned 10-bit score range
  0..1023.

Latency is `2 + ceil(log2 N_TREES)`, which is 6 for the default 16 trees.
The 16 trees were chosen to fill the 6 cycles of the pipeline plan (BDT in
cycles 5 to 10).

### Score condition

`bdt_condition` compares the score with three 8-bit thresholds `thr_i`, one
per working point. The thresholds are static configuration. The 2-bit result
is the number of thresholds passed. Each threshold is compared with the
score's top 8 bits, so it counts in steps of 4 score units. It is one register
stage. The widths (10-bit score, 3 x 8-bit thresholds, 2-bit condition) come
from the pipeline plan. The counting rule is this design's reading of it.

**The default model is a placeholder.** `def_feat_idx`, `def_thresh` and
`def_leaf` in `tau_bdt_pkg` fill the trees from simple integer formulas, so
the scores mean nothing physically. To deploy a trained model, write its node
features, thresholds and leaf values into the `FEAT_IDX`, `THRESH` and `LEAF`
parameters. This includes XGBoost's base score: fold it into tree 0's leaves.
Trees that are not complete must be padded. For an unused node, repeat the
parent's leaf value on both sides. A model generated by an HLS flow can
replace `bdt` completely, provided it has the same `feat`/`score` interface
and `bdt_latency()` is updated.

## Latency and alignment

With all cells at cycle 0:

| stage | cycles | ends at cycle |
|---|---|---|
| variables (central tower, 11 cells) | 4 | 4 |
| BDT (16 trees) | 6 | 10 |
| score condition | 1 | 11 |
| padding to the output cycle | 1 | **12** |

`tau_bdt_algo` computes the variable latency from the masks and from
`CELL_READY` (`var_latency()`) and adds `bdt_latency()` and the condition
cycle. It then pads the score, the condition, the overflow flags and `side_i`
so that all of them leave at `OUT_LATENCY` (12). The signals of the
surrounding algorithm therefore leave with the score of their own window, at
a cycle that does not depend on the model. If the natural latency exceeds
`OUT_LATENCY`, elaboration fails. Two examples:

* If the presampler cells arrive 1 cycle late (`CELL_READY[0..8] = 1`), the
  variables are ready at cycle 5. The natural latency becomes exactly 12, with
  no padding.
* A variable schema whose largest sum has 8 cells needs 3 adder cycles. The
  natural latency is 10, and it is padded by 2.

The datapath has no reset. As in a continuously clocked trigger pipeline,
outputs are meaningful from 12 cycles after the first valid input.

## Interfaces

`efex_tau_fpga` (parameters `N_INST = 8`, `SIDE_W = 32`):

| port | dir | width | |
|---|---|---|---|
| clk | in | 1 | 200 MHz |
| cells_i | in | [8][99][16] | windows, one per instance |
| side_i | in | [8][32] | other algorithm signals |
| bdt_thr_i | in | [3][8] | score-condition thresholds, shared by all instances |
| score_o | out | [8][10] | BDT score, 12 cycles after cells_i |
| cond_o | out | [8][2] | score condition (thresholds passed), same cycle |
| side_o | out | [8][32] | side_i, 12 cycles later |
| var_ovf_o | out | [8][11] | variable overflow flags, with score_o |
| ex_in_i / ex_out_o / ex_ovf_o | in/out | [3][16] / [3][16] / [3] | example adder tree |

The 32-bit side word stands in for the signals of the existing tau
algorithm, which runs beside the BDT in the same 12 cycles: its seed finder,
energy condition, EM-energy multiplier and hadronic-fraction condition. Those
blocks are not part of this RTL. Their results (for example E_T, seed found,
and the hadronic-fraction condition) can travel in the side word, or be
aligned to cycle 12 by the existing logic itself.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models are in `tb_ref_pkg`.
They select cells by real-valued distance from the window centre, not by the
integer rules in the RTL, and they walk each tree node by node.

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb rtl/tau_bdt_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_efex_tau_fpga.sv --top-module tb_efex_tau_fpga
obj_dir/Vtb_efex_tau_fpga
```

Substitute another testbench for `tb_efex_tau_fpga`:

| testbench | what it checks |
|---|---|
| tb_delay_line | delays 0, 1, 5 |
| tb_multi_adder_wc | 1, 3, 4, 5 inputs; latency; overflow |
| tb_adder_tree | the example (A 5, B 8, C 7) and a 6-input schedule with a single-input sum and an early requirement, checked each cycle |
| tb_bdt | default model, 6 cycles; a 3-tree model clamped at both ends of the score range |
| tb_bdt_condition | every score against five threshold sets (ordered, equal, unordered, 0, 255) |
| tb_tau_bdt_algo | one instance, all outputs at cycle 12 in three configurations: cells on time (padded by 1), presampler 1 cycle late (no padding), a schema whose largest variable has 8 cells (padded by 2); thresholds changed during the run |
| tb_efex_tau_fpga | the full FPGA at default parameters: 8 instances plus the example, 120 random windows per instance; counts overflows, all four conditions, back-to-back results, aligned side words and padded example sums |

All testbenches pass. Each one also fails on a copy of its module with a
single deliberate bug.

## Limits and departures

* The BDT's trees are placeholders (see above). The latency of 6 holds for 9
  to 16 trees. A larger ensemble adds adder cycles, which the padding absorbs
  up to the 12-cycle limit.
* The score-condition rule (count of thresholds passed, compared with the
  score's top 8 bits) and the unsigned, clamped score are assumptions.
* Which cells form each variable is derived from the variable names and the
  calorimeter granularity. The central-tower variable spans all five layers.
  Both should be checked against the real input schema before use.
* The adder tree uses one alignment delay per input-to-sum edge. It does not
  share registers between sums that delay the same input by the same amount.
* Overflow wraps the data bits and sets a sticky flag. The BDT sees 0xFFFF for
  an overflowed variable.
* Not included: the board-level parts (eFEX module, control FPGA, input
  links), the rest of the tau algorithm and its interface (only passed through
  as the side word), and the software flow that trains and converts the model.

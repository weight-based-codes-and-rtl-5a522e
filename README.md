# Weight-based code checkers for concurrent error detection

A multilevel logic circuit can be checked while it runs without changing it.
Each of its outputs is given a small positive weight. A separate predictor,
synthesized on its own from the same primary inputs, computes the check symbol:
the sum of the weights of the outputs that should be 1. A checker adds up the
weights of the outputs that actually are 1 and compares the result with the
check symbol. A single fault can disturb only one side: either the circuit's
outputs or the predictor's check bits.

The Berger code is the case where every weight is 1. It catches every
unidirectional error, where all wrong bits moved the same way. It misses any
error with as many 1→0 flips as 0→1 flips, and multilevel logic often makes
such errors. Weights make the code *positional*. An error now escapes only if
the weights of the bits that fell add up to the weights of the bits that rose.
Unidirectional errors are still always caught, whatever the weights. A few
extra check bits buy much better coverage. For example, a 32-output circuit
with the weights 2, 3, 4 repeated needs 7 check bits, against 6 for a Berger
code.

This RTL provides the checking side: two checker designs for any weight
assignment, and the parts they are built from.

## Weights and check bits

The weights are set by a weight table, `WEIGHT_SET`, of type `wbc_pkg::wset_t`.
Output `i` gets `WEIGHT_SET[i mod |set|]`, where the table ends at its first
zero entry.

- A short set is used cyclically. `weight_set(2,3)` gives odd-numbered outputs
  (first, third, ...) weight 2 and even-numbered outputs weight 3.
- A table as long as the output word gives each output its own weight. Use
  this to give clusters of outputs a shared weight: outputs in a cluster should
  share little logic.
- `consecutive_weights(n)` gives weights 1, 2, ..., n. This code catches every
  single and double error.
- `weight_set(1)` is the Berger code.

The number of check bits is `clog2(sum of all weights + 1)`, from
`wbc_pkg::check_bits`. The check symbol is the plain binary weighted sum.

Two things govern the choice of weights:

- **Repeated weights.** Two outputs with the same weight that fail in opposite
  directions cancel out. More distinct weights make this rarer. So does
  grouping outputs that share little logic under one weight.
- **Weight sums.** A group of weights can cancel out, for example 2+2−4 or
  2+3−5. More distinct weights make this more likely. Small, mutually prime
  weights keep it down. So does a set where no weight is the sum of two others
  and none is much larger than the rest. With the set {5,6}, the smallest
  error that escapes needs eleven wrong bits: six weight-5 bits fall while five
  weight-6 bits rise.

The configurations below reach at least 99 % detection of single-fault output
errors on the ISCAS-85 benchmarks. They are exercised in
`tb/tb_table5_workloads.sv`, which checks the check-bit counts against these
figures:

| circuit | outputs | weight set | check bits | Berger check bits |
|---|---|---|---|---|
| C432 | 7 | {3,4,5,6} | 5 | 3 |
| C499 | 32 | {2,3,4} | 7 | 6 |
| C880 | 26 | {1,2} | 6 | 5 |
| C1355 | 32 | {1,2,3} | 6 | 6 |
| C1908 | 25 | {2,3,4,5} | 7 | 5 |
| C2670 | 140 | {1,2} | 8 | 8 |
| C3540 | 22 | {3,4,5,6} | 7 | 5 |
| C5315 | 123 | {2,3,4} | 9 | 7 |
| C6288 | 32 | {1,2} | 6 | 6 |
| C7552 | 108 | {3,4,5} | 9 | 7 |

The defaults of every module are the C499 row: 32 outputs, weights {2,3,4},
and 7 check bits. The weights are assigned cyclically. A structure-based
clustering gives the same check-bit counts.

## The general checker: weighted sum from ones counters (`wbc_general_checker`)

The general checker turns weight summing into ones counting, so it is built
from the same parts as a Berger checker. Write each weight in binary. Partition
`j` holds every output whose weight has bit `j` set. An output of weight 3 is
in partitions 0 and 1. An output of weight 2 is only in partition 1. Each
partition has a `ones_counter`. Then `shift_adder` forms

    sum = count_0 + 2·count_1 + 4·count_2 + ...

Each output that is 1 adds exactly its own weight to this sum, one binary digit
at a time. So the sum is the weighted sum.

The comparison follows the classical Berger checker:

- Bit `i` of the sum is paired with the inverted check bit `i`. The pair
  `(sum[i], ~chk[i])` is a valid two-rail pair, `(1,0)` or `(0,1)`, exactly
  when the two bits agree.
- A balanced tree of two-rail cells (`two_rail_checker`) folds all the pairs
  into one pair, `ind`. Each cell computes `t = a.t·b.t + a.f·b.f` and
  `f = a.t·b.f + a.f·b.t`.
- A valid `ind` means a code word. `(0,0)` or `(1,1)` means an error. A stuck
  checker output also shows up as an invalid pair.

The ones counters and the shift-and-add are this checker's own structure. The
inverted-check-bit comparison and the two-rail tree are this implementation's
choice of final stage. Any other Berger comparison stage would do.

`MOD_BITS` selects a cheaper variant. With `MOD_BITS = 3` it compares only the
sum modulo 8, using 3 check bits. Coverage is lower. The default is 0, which
compares the full sum.

Ports: `info[N_OUT]`, `chk[R]`, `wsum` (the full sum, for observation), and
`ind` (a `tr_pair_t`). The checker is purely combinational.

## The threshold checker (`wbc_threshold_checker`)

The second design is a single ratioed gate, an aggregate-weight threshold
circuit. Its pull-down side has one nmos transistor per output, sized to that
output's weight. Its pull-up side has one pmos transistor per check-bit line,
sized `2^i`. A pmos conducts when its gate is 0, so the check-bit lines carry
the *complement* of the weighted sum, as in the Berger convention. For a code
word the two sides then have equal strength.

The evaluation signal `I` (`phase_i`) adds one unit to the pull-up side while it
is high. Over one period of `I` (high, then low), the output is:

- `(0,1)` for a code word
- `(1,1)` when the outputs weigh more than the check bits claim
- `(0,0)` when they weigh less

The RTL computes this decision with an adder and a comparator,
`out = (Σ wᵢ·infoᵢ ≥ ~chk_c + phase_i)`. Transistor sizing is outside what RTL
can express. How `I` shifts the threshold, and in which order its two phases
come, is this implementation's reading of the Berger checker this design
derives from. Treat it as an assumption.

## The detection unit (`wbc_ced`, top)

`wbc_ced` places both checkers side by side on the same code word:

- `info`: the monitored circuit's outputs
- `chk`: the predicted check bits, as the plain weighted sum
- `phase_i`: the evaluation signal for the threshold checker
- `wsum`, `gen_ind`: outputs of the general checker
- `gen_err`: a convenience flag, equal to `gen_ind` not being a valid pair. It
  is not itself self-checking.
- `thr_out`: output of the threshold checker, which receives `~chk`

Two parts of the full scheme depend on the application and are not included:
the monitored circuit and its check-bit predictor. Their signals are the
unit's ports. The unit has no clock and no reset.

## Files

| file | contents |
|---|---|
| `rtl/wbc_pkg.sv` | weight table type, two-rail pair type, elaboration-time functions (check bits, partitions) |
| `rtl/ones_counter.sv` | ones counter |
| `rtl/shift_adder.sv` | weighted sum of partition counts |
| `rtl/two_rail_checker.sv` | two-rail checker tree |
| `rtl/wbc_general_checker.sv` | general checker |
| `rtl/wbc_threshold_checker.sv` | threshold checker, switching-function model |
| `rtl/wbc_ced.sv` | top: both checkers on one code word |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_wbc_ced` runs the top at its default size |
| `tb/tb_table5_workloads.sv`, `tb/tb_ced_case.sv` | all benchmark configurations above |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own. It
also has a time watchdog. For example:

    verilator --binary --timing --assert -y rtl -y tb rtl/wbc_pkg.sv \
        tb/tb_wbc_ced.sv --top-module tb_wbc_ced
    ./obj_dir/Vtb_wbc_ced

What the tests cover:

- Code words are accepted.
- Unidirectional errors, single-bit errors, check-bit errors, and mixed errors
  of unequal weight are all caught.
- The expected escapes really escape. Two equal weights failing in opposite
  directions cancel out. So do 2+2−4 on {2,3,4} and the eleven-bit case on
  {5,6}.
- The positional code catches every double error.
- Both checkers give the same verdict.

Every testbench works out its expected values from its own weight table, not
from the package functions.

## How far to trust it, and where it departs

- All modules pass lint and elaboration, and their testbenches pass. Each
  testbench was shown to fail against a deliberately broken copy of its module.
- The totally self-checking property was not verified in full: there is no
  fault injection inside the checkers, and the test set was not minimized.
  What was checked is whether code words reach every valid input combination
  of each two-rail cell. In the default code, every cell sees all four
  combinations except one. Cell 5 merges sum bits 5 and 6, and both are 1 only
  for sums of 96 or more. The code's largest sum is 95. So a fault in that cell
  that shows only for this combination is not exposed during normal operation.
  A code whose total weight is exactly 2^R − 1 can produce this combination.
- The threshold checker is a logic-level model of an analog ratioed gate.
  Timing, sizing and the behaviour of `I` in silicon are not modelled.
- The coverage percentages behind the table were measured elsewhere, by fault
  simulation of the benchmark netlists. They are not reproduced here. The
  benchmark circuits and their predictors are not included.
- Cyclic weight assignment is a convenience. Structure-based clusters can be
  written as a full per-output table, or by permuting the outputs when wiring.
- Weights are limited to 8 bits, and the weight table to 64 entries
  (`MAX_SET`, `WW` in `wbc_pkg`).

# Built-in self-test for two-pattern faults in a pipelined array multiplier

Transistor stuck-open faults and gate or path delay faults only show up when a
cell sees a *change* at its inputs. Testing for them takes pairs of
consecutive input vectors, not single vectors. For an iterative logic array
(ILA) made of identical cells, one strong test set is every *single input
change* (SIC) pair: two consecutive vectors that differ in exactly one bit,
applied to every cell.

This RTL implements a built-in self-test (BIST) that delivers that test set to
every cell of a pipelined two-dimensional ILA at once. The example ILA is a
4 x 3 bit array multiplier. The central idea:

* If every cell computes the same **bijective** function f, and the cells are
  registered, then a cell whose row and column indices sum to d sees, d clocks
  late, the top-left cell's input sequence mapped through f d times.
* Only a few boundary multiplexers are needed to make this true in test mode.
  Each boundary cell then takes its missing input from its neighbour on the
  previous diagonal instead of from a primary input.
* A bijective f maps the set of input pairs onto itself. So a sequence that
  gives the top-left cell all SIC pairs, and is closed under f, gives every
  cell all SIC pairs.
* The test length does not depend on the array size.

The BIST therefore needs four things:

* a tiny generator for the 3-bit cell input (the *SIC component generator*);
* one multiplexer per boundary input;
* a small design-for-test change that makes the cell function bijective;
* a response analyzer on each array output.

The analyzer used here is an accumulator, or *check-sum*. It works because
the test sequence is fixed, so every fault-free output sums to a known
constant.

## The multiplier array (`mult_array`, `mult_cell`)

A cell is a registered 1-bit full adder with a one-bit **A register** that
holds one multiplier bit:

    x_o = x_i
    s_o = s_i ^ c_i ^ (A & x_i)
    c_o = maj(s_i, c_i, A & x_i)

All three outputs are registered. The multiplicand bit `x` and the carry `c`
move **down**, and the summand `s` moves **right**.

The array has `ROWS = NX + NR = 7` rows and `COLS = NX = 4` columns:

* Row `i` collects the product bits of weight `2^i`.
* Column `j` carries multiplicand bit `x[j]`.
* Cell `(i, j)` holds `r[i-j]` when `0 <= i-j < NR`. In any other cell, A is
  the constant 0.

Multiplier index held by each cell (`.` = constant 0):

| row \ col | 0 | 1 | 2 | 3 |
|-----------|---|---|---|---|
| 0         | 0 | . | . | . |
| 1         | 1 | 0 | . | . |
| 2         | 2 | 1 | 0 | . |
| 3         | . | 2 | 1 | 0 |
| 4         | . | . | 2 | 1 |
| 5         | . | . | . | 2 |
| 6         | . | . | . | . |

So row `i` adds every partial product `r[a] x[b]` with `a + b = i`, plus the
carries from row `i-1`. The rightmost cell of row `i` then outputs product
bit `i`. Every cell satisfies `s_i + c_i + A x_i = s_o + 2 c_o`. Summed over
the array, this gives `x * r = sum(s_right[i] 2^i) + 128 * (bottom carries)`.
The product is below 128, so the bottom carries are always 0.

**Timing.** Cell `(i, j)` works on an operand `i + j` clocks after cell
`(0, 0)`. The top level therefore delays `x[j]` by `j` clocks on the way in
(skew), and product bit `i` by `ROWS-1-i` clocks on the way out (deskew).
From the outside this is a plain pipelined multiplier:

* one product per clock;
* `p` is valid **10 clocks** (`ROWS + COLS - 1`) after `x`;
* `r` is loaded once with `load_r` and stays in the A registers.

## Test mode: making every cell the same bijective function

In test mode (`test = 1`) each cell changes in two ways:

1. **A is forced to 0.** Cells with and without a multiplier bit then compute
   the same function, which the diagonal argument needs.
2. **The carry output passes `c_i` through** instead of the half-adder carry,
   using one multiplexer.

The test-mode function is therefore

    (x, s, c)  ->  (x, s ^ c, c)

This is bijective, because `s` can be recovered as `s_o ^ c_o`.

Two other obvious choices for the carry output are `s_i` or its inversion.
They also give every cell all SIC pairs, but the check-sum analyzers then miss
more single-cell faults (see "What the check-sums catch").

A consequence of forcing A to 0 is that the self-test does not exercise the
AND gate that forms `A & x_i`.

## Routing the test sequence along the diagonals

In test mode the boundary multiplexers of `mult_array` feed the array as
follows:

| cell                     | vertical input `{x, c}`                    | horizontal input `s`      |
|--------------------------|--------------------------------------------|---------------------------|
| `(0, 0)`                 | generator bits `x`, `c`                    | generator bit `s`         |
| `(0, j)`, `j > 0`        | `{x_o, c_o}` of cell `(0, j-1)`            | `s_o` of `(0, j-1)`, as in normal mode |
| `(i, 0)`, `i > 0`        | from `(i-1, 0)`, as in normal mode         | `s_o` of cell `(i-1, 0)`  |
| inner cells              | unchanged                                  | unchanged                 |

Take the top-row case as an example. Cell `(0, j)` receives both its inputs
from the registered outputs of `(0, j-1)`, so its input is `f` of what
`(0, j-1)` saw one clock earlier. By induction, a cell on diagonal
`d = i + j` receives `f^d(g(t - d))`, where `g(t)` is the generator pattern at
clock `t`. Its registered output is then `f^(d+1)(g(t - d))`.

Cells on the same diagonal see identical sequences. So the outputs on the
right edge and bottom edge stand in for all the cells before them on their
diagonals.

The testbench monitors the inputs of all 28 cells during a self-test. It
confirms that each cell receives all 24 ordered SIC pairs of its 3-bit input.

## The SIC component generator (`siccg`, `siccg_control`)

The generator drives the 3-bit pattern `{x, s, c}` of cell `(0, 0)`. It has
four parts:

* a 3-bit binary counter `C` (000 to 111);
* a 3-bit barrel shifter `X`, reset to `001` and rotated right
  (`001 -> 100 -> 010 -> 001`) once per BIST clock;
* a BIST clock at half the multiplier clock. It is a toggle flip-flop, `0` in
  the first and `1` in the second multiplier clock of each BIST cycle;
* the control module: a flip-flop, cleared at start, that is set when the
  counter steps past `111`. Its output selects the phase.

The counter steps once every six BIST clocks (12 multiplier clocks), so each
counter value meets each rotation of `X` twice. The output gates are:

    phase 1:  pattern = (X & {3{bist_clk}}) ^ C      -> <C, C^X>: one bit flips
    phase 2:  pattern =  X ^ C                       -> C^X held 2 clocks, then C^ror(X): two bits flip

A pass lasts 2 phases x 8 counter values x 6 BIST cycles x 2 clocks, which is
**192 clocks**. The first clocks of each phase, for `C = 000`, as `{x,s,c}`:

    phase 1: 000 001 000 100 000 010 000 001 000 100 000 010 | C=001: 001 000 001 101 ...
    phase 2: 001 001 100 100 010 010 001 001 100 100 010 010 | C=001: 000 000 101 101 ...

Over the two phases this gives:

* Phase 1 applies each of the 24 ordered SIC pairs twice, inside a BIST cycle.
* Phase 2 applies each of the 24 ordered distance-2 pairs twice, between BIST
  cycles.
* The counter boundaries add some longer steps.

Under `f` this set of consecutive pairs stays large enough that every
diagonal's mapped sequence still holds all 24 SIC pairs.

`last` marks the final clock of phase 2. `clear` restarts the generator, and
`en` freezes it.

## Check-sum analyzers and the pass decision (`ora_checksum`, `bist_pkg`)

Each observed output word has its own accumulator (`acc += din` while
enabled):

* the summand `s_o` of each rightmost-column cell (7 analyzers, 1 bit each);
* the `{x_o, c_o}` word of each bottom-row cell (4 analyzers, 2 bits each).

The accumulators are 10 bits wide, enough for the largest sum (576) without
wrap-around. Their least significant bit is the parity of the observed bit
stream, so a parity checker is the 1-bit version of the same circuit.

The analyzer on diagonal `d` sees each response `d + 1` clocks after the
pattern that caused it. The controller supplies a delay line of the
generator-enable signal (`win[0..10]`), and analyzer `d` accumulates while
`win[d+1]` is high. It therefore sums exactly the 192 responses to the test
sequence and nothing left in the pipeline from normal mode.

The fault-free sums are computed at elaboration time by
`bist_pkg::golden_sum(d, vertical)`. That function sums, over the 192
generator patterns `g(k)`, the observed part of `f^(d+1)(g(k))`. It uses
`bist_pkg::gen_ref` (a closed form of the generator sequence) and
`bist_pkg::f_test`. For the default array every 1-bit sum is 96 and every
2-bit sum is 288. `bist_pass` is the AND of all 11 comparisons, valid while
`bist_done` is high.

### What the check-sums catch

`tb/tb_fault_coverage.sv` forces single-cell faults onto every output of
every cell and runs a full self-test for each. Four fault kinds are tried on
each output:

* stuck-at-0;
* stuck-at-1;
* slow-to-rise: the rising change arrives one clock late;
* slow-to-fall: the falling change arrives one clock late.

The result is **314 of 336 faults detected**:

* Every fault on `x_o` and `c_o` is caught.
* The misses are all on `s_o`: stuck-at faults in column 2 and in cell
  `(6, 0)`, and delay faults in cells `(1, 2)`, `(3, 2)` and `(5, 2)`.

In those cells the wrong summand reaches an observed output only through an
XOR with a carry stream that has exactly as many ones as zeros, so the count
of ones does not change. This aliasing comes from the check-sum method. A
comparator between cells on the same diagonal, or a signature register, would
not suffer from it. Neither is built here.

## Test controller and session timing (`bist_controller`)

The controller is the mode switch, plus the sequencing that lets a self-test
run on its own:

| state | clocks | test mode | what happens                                      |
|-------|--------|-----------|---------------------------------------------------|
| IDLE  | -      | 0         | normal operation; `bist_start` leaves             |
| CLEAR | 1      | 1         | generator and analyzers cleared                   |
| RUN   | 192    | 1         | generator runs; ends on its `last` clock          |
| FLUSH | 10     | 1         | last responses reach the farthest diagonal        |
| DONE  | -      | 0         | `bist_done = 1`, `bist_pass` valid; `bist_start` runs again |

A self-test keeps the array in test mode for **203 clocks**. The A registers
are not disturbed, so multiplication continues after DONE without reloading
`r`. While the test runs, `p` carries test data.

## Top level (`bist_multiplier_top`)

| port          | dir | width | meaning                                         |
|---------------|-----|-------|-------------------------------------------------|
| `clk`, `rst_n`| in  | 1     | clock; asynchronous active-low reset            |
| `load_r`, `r` | in  | 1, 3  | load the multiplier into the A registers        |
| `x`           | in  | 4     | multiplicand, one per clock                     |
| `p`           | out | 7     | `x * r`, 10 clocks after `x`                    |
| `bist_start`  | in  | 1     | start a self-test (from IDLE or DONE)           |
| `bist_busy`   | out | 1     | self-test in progress (array in test mode)      |
| `bist_done`   | out | 1     | self-test finished                              |
| `bist_pass`   | out | 1     | all check-sums correct (with `bist_done`)       |
| `bist_phase2` | out | 1     | generator in its distance-2 phase               |

Parameters: `NX` (multiplicand bits, default 4) and `NR` (multiplier bits,
default 3). The array, the windows and the stored sums all follow from these
two parameters. The generator is specific to the 3-bit cell word, so it does
not depend on them.

## Files

* `rtl/bist_pkg.sv`: sizes, the cell word type, the test-mode function and
  the reference sums.
* `rtl/mult_cell.sv`, `rtl/mult_array.sv`: the cell and the array with its
  test multiplexers.
* `rtl/siccg.sv`, `rtl/siccg_control.sv`: the generator and its phase
  flip-flop.
* `rtl/ora_checksum.sv`, `rtl/bist_controller.sv`: the analyzer and the
  controller.
* `rtl/bist_multiplier_top.sv`: the complete design.
* `tb/tb_<module>.sv`: a self-checking testbench per module.
  `tb/tb_bist_multiplier_top.sv` is the end-to-end test at full size.
  `tb/tb_fault_coverage.sv` is the fault sweep.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -y rtl rtl/bist_pkg.sv tb/tb_bist_multiplier_top.sv \
              --top-module tb_bist_multiplier_top -Mdir obj_top
    ./obj_top/Vtb_bist_multiplier_top

Replace the testbench name to run another one. Each testbench prints
`TB_RESULT checks=N failures=M` and stops, and each has a watchdog. All run
in well under a second.

The end-to-end testbench runs these steps, and fails if any of them never
happened:

* it multiplies with all eight multiplier values and checks the 10-clock
  latency;
* it runs a fault-free self-test and checks its length (203 clocks) and both
  phases;
* it checks SIC-pair coverage in all 28 cells;
* it multiplies again after the test;
* it shows that a stuck-at fault and a slow-to-fall fault make the self-test
  fail;
* it passes again once the faults are removed.

## Where this design departs from, or fills in, its source

The published description of this BIST gives the cell equations, the
generator's parts and output equations, the control flip-flop, the
multiplexer-based routing and the check-sum analyzer. The following are this
implementation's own choices:

* **Array layout.** Rows are product weights, columns are multiplicand bits,
  and `A = r[i-j]`. This was reconstructed from the stated properties:
  the multiplicand moves down, the product leaves the rightmost column, and
  some cells hold no multiplier bit.
* **The bijective test-mode cell.** The carry output passes `c_i` and A is
  forced to 0. The source only says that a design-for-test change makes the
  cell bijective, and analyses the A = 0 case.
* **Loading `r`.** The A registers load in parallel from `r`, instead of
  shifting `r` through the cells.
* **Generator timing.** Shift once per BIST clock, count once per six shifts,
  and BIST clock = a toggle flip-flop on the multiplier clock. This gives 192
  clocks per pass. The source quotes 72 test pairs for the whole array; this
  generator applies 96 BIST-clock pairs (48 single-change, 48 double-change),
  so the two counts differ.
* **Analyzers.** The positions (every right-edge and bottom-edge output), the
  widths, the enable windows and the stored reference sums.
* **Controller sequencing.** The source describes the controller only as a
  mode switch. The skew and deskew registers are also added here.
* **Not built.** Parity checkers, transition detectors and diagonal
  comparators are mentioned as alternative analyzers and are not built. The
  quoted 1.67 % hardware overhead refers to a transistor-level
  implementation and is not reproduced.

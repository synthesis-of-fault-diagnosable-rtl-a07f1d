# Fault diagnosable logic: selector trees with spare blocks

This RTL builds logic functions in a fixed, regular structure made of one kind
of cell. The structure makes stuck-at faults easy to find and repair. Every cell is a 2-to-1
selector with two override lines. With a handful of external test patterns you
can drive any level of the circuit to all-0 or all-1 and enable one block at a
time. That is enough to tell which block line is stuck at 0 or at 1, and whether
the output chain itself is broken. A faulty block is then swapped for a spare
block. A broken output chain is replaced by a second chain. Both swaps are done
by changing terminal settings, with no rewiring.

The same structure is also built with several outputs sharing one set of bus
lines, and as the next-state logic of a shift-register sequential circuit.

## The cell

`fd_module` computes

    q = s | (r & (y ? d1 : d0))

| r | s | q |
|---|---|---|
| 1 | 0 | `y ? d1 : d0` (normal operation) |
| 0 | 0 | 0 |
| x | 1 | 1 |

The cell is used in two ways:

* **Inside a block** it is a multiplexer. All cells of one level share one `y`,
  one `r` and one `s` bus line.
* **In the collector** `r` is the block enable `p_j` and `s` is the output of the
  previous cell. The cell then acts as an AND-OR stage.

## The function a circuit realises

Take a function of `n` variables `x_1..x_n`. Split the variables into a
*selector set* G = `x_1..x_s` and the rest. If f can be written as

    f = OR_j ( ~x_j f0_j  |  x_j f1_j )        j = 1..s

with each `f0_j`, `f1_j` a function of `x_{s+1}..x_n` only, then G is a set of
*independent variables* of f and f fits the structure:

* **Block j** (`fd_block`) computes `f0_j` and `f1_j` as two selector trees
  with `n-s-1` levels.
  * The bus variables `x_{s+1}..x_{n-1}` drive the `y` lines. Level 1 is the
    output level and gets `x_{s+1}`.
  * The leaves are the block's `2^(n-s)` **c terminals**. Each one is tied to
    0, to 1, to `x_n` or to `~x_n`.
  * `f0_j` reads the lower half of the c terminals and `f1_j` the upper half.
    Within a half, terminal `k` is the minterm whose bits, MSB first, are
    `x_{s+1} .. x_{n-1}`.
* **The collector** (`fd_collector`) has one cell per block, with `y = x_j`.
  It forms `F = C | OR_j p_j (x_j ? f1_j : f0_j)`.
* **In normal operation** the settings are `r = 1`, `s = 0` on every level,
  `p = 1` on the working blocks, `p = 0` on the spares, and `C = 0`.

A larger G means fewer, smaller blocks:

* cells per block: `2^(n-s) - 2`
* cells overall: `s(2^(n-s) - 1)`
* external terminals: `s 2^(n-s) + 3n - s - 1`

Finding the largest G is an off-line design step, a search over subsets of
variables. It is not hardware and is not part of this RTL. A circuit is
*programmed* by the vector of c-terminal codes of each block (`a_code`, type
`fd_pkg::cval_e`).

To compute those codes from a truth table, take the largest allowed
sub-functions:

* `f0_j(u) = 1` exactly when f = 1 for every input with `x_j = 0` and rest-of-variables `u`.
* `f1_j` likewise with `x_j = 1`.

A terminal's code then follows from its value at `x_n = 0` and at `x_n = 1`.
The testbenches do this in `tb/fd_tb_pkg.sv` (`code_for`).

## Diagnosis and repair

The fault model is stuck-at-0 or stuck-at-1 on the lines between cells, with
any number of faults. `fd_diag_ctrl` applies test patterns one per clock and
samples the output at the end of each clock.

It starts with the collector:

| test | settings | fault-free answer | a wrong answer means |
|---|---|---|---|
| A1, A2 | C = 1, then C = 0; all p = 0 | 1, then 0 | the collector chain is broken: switch to F2 |

Then it tests the block levels one at a time, from level 1 (the block outputs
`f0_j`, `f1_j`) down to level `n-s-1`:

* While level i is tested, levels 1 .. i-1 run normally and their `y` lines
  carry a *path* `u`.
* So in every block the output sees exactly one level-i line per half.
* Level i has `2^(i-1)` paths. Each path gets one *round* of tests.

In the table, `(r_i, s_i)` are the override lines of the level under test:

| test | settings | fault-free answer | a wrong answer means |
|---|---|---|---|
| T1, T2 | all x_j = 0, then all 1; all working p = 1; (r_i, s_i) = (0, 0) | 0, 0 | a line on the path is stuck at 1, in some f0 tree (T1) or f1 tree (T2) |
| H_j (only after T2 = 1) | x_j = 1; only p_j = 1; (r_i, s_i) = (0, 0) | 0 | the f1 tree of block j has a line stuck at 1 |
| J_j (only after T1 = 1) | x_j = 0; same as H_j otherwise | 0 | the f0 tree of block j has a line stuck at 1 |
| D_j, E_j | x_j = 1 (D) or 0 (E); only p_j = 1; s_i = 1 | 1 | the f1 (D) or f0 (E) tree of block j has a line stuck at 0 |

**Why this locates faults.** Forcing one level to a constant makes every line
on that level known. Enabling a single `p_j` then connects exactly one of those
lines to the output. The H/J tests are skipped when T1/T2 found nothing, which
keeps a fault-free run short. A line stuck at 1 still reads 1 in its D/E test,
so it is not also reported as stuck at 0.

**Run length.** A round takes `2 + 2s` clocks, plus `s` for the H tests and
`s` for the J tests when they are needed. There are `2^(n-s-1) - 1` rounds in
all, and A1/A2 add 2 clocks. For the default circuit (s = 5, two levels, three
rounds) that is 38 clocks without faults and at most 68.

**Results.** They are reported per block and per tree: `f0_sa1`, `f1_sa1`,
`f0_sa0`, `f1_sa0`. Level 1 is enough to say which output line is stuck.
Deeper levels only say which tree holds the stuck line, and that is all the
repair needs. The level-1 tests are the ones the structure was designed around;
the path-by-path rounds for deeper levels are this design's own extension of
the same idea.

`fd_repairable` runs the sequencer and repairs from its results:

* Reset clears the results.
* While `diag_busy` is high, the sequencer drives the selector, p and C
  terminals and all `y`/`r`/`s` bus lines.
* If A1/A2 failed, the output (and what the sequencer observes from then on)
  comes from F2.
* Every block with a faulty line is handed to a spare by `fd_term_map`:
  * the block's `p_j` goes to 0;
  * the spare gets `p = 1`, the block's selector variable `x_j` and the
    block's programming `a_j`.
* Spares are given out in block order. If there are more faulty blocks than
  spares, `unrepaired` is raised and the blocks left over stay enabled.

**Not covered.** The c terminals themselves are external inputs and are not
tested. The spare blocks are not tested before they are used.

## Multi-output and sequential forms

**`fd_multi_circuit`** realises several outputs over a common variable set K.
The K variables are on the bus lines and on `x_n`. Every output is an OR of
sub-functions, each of one other variable plus K. Each output has its own
blocks, spare, c and p terminals, C terminal and two collector chains. The
`y`/`r`/`s` bus is shared. The best K is the smallest one that covers every
output's rest-of-variables set.

**`fd_multi_repairable`** adds one terminal map per output and a single test
sequencer. A `diag_start` pulse runs the full single-output procedure on
output 0, then on output 1, and so on. Each run works through that output's own
p, C and F terminals. All other outputs have every p at 0, and the sequencer
drives the shared bus. Each output then keeps its own result: a spare for each
bad block, and F2 if its F1 collector failed. With Example 2 (s = 4, three levels, 7 rounds)
a clean diagnosis of both outputs takes 2 x (2 + 7 x 10) + 4 = 148 clocks.
This way of diagnosing several outputs is this design's own choice; the source
only states that the multi-output circuit is diagnosable.

**`fd_shift_seq`** is a shift register `y[0..NY-1]` whose input is a transient
function `f(X, Y)`. The function is computed by a `fd_repairable` circuit over
the variable vector:

    v = { x[0..NX2-1], y[0..NY2-1], x[NX2..NX-1], y[NY2..NY-1] }

The first group (X2, Y2) are the selector variables. The rest (X1, Y1) feed
the bus and `x_n`. The register shifts on every clock with `en = 1`. It holds
while a diagnosis runs, so the combinational part can be tested in place
without losing the state.

## Top level and sizes

`fd_top` puts the three circuits side by side. They share only clock and
reset.

| part | module | default size | reference function |
|---|---|---|---|
| single output, self-repairing | `fd_repairable` | n = 8, s = 5, 1 spare, 8 c terminals and 6 cells per block | Example 1 below |
| two outputs, self-repairing | `fd_multi_repairable` | n = 8, s = 4 per output, 1 spare per output, 16 c terminals and 14 cells per block | Example 2 below |
| sequential | `fd_shift_seq` | 4 inputs, 4 stages, X2 and Y2 of 2 each | none given; a made-up function is used |

**Example 1** is a single output with G = {x1, x2, x4, x6, x7}:

    f = x1 ~x3 x5 x8 | x2 ~x3 ~x5 ~x8 | x3 ~x4 ~x5 x8 | ~x3 x5 x6 x8 | x3 ~x5 ~x6 x8 | ~x3 ~x5 ~x7 x8

Its variables go on the ports in the order x1 x2 x4 x6 x7 | x3 x5 | x8.

**Example 2** has two outputs with K = {x2, x4, x6, x7}:

    f1 = ~x1~x2~x4~x6 | x2x3~x4~x6 | ~x2x4~x6 | x1x7 | x2x4x6~x7 | ~x2~x3~x4x6 | x2~x4x5x6
    f2 = ~x2x4~x6~x7 | x1~x4x6~x7 | x4x6~x8 | ~x4~x5x6x7 | x4x7

Its variables go on the ports in the order x1 x3 x5 x8 | x2 x4 x6 | x7.

The number of spare blocks and the sequential circuit's sizes are this
design's own choices. Change them with the parameters `M_SPARE`, `NX`, `NY`,
`NX2` and `NY2`. In `fd_top` they are fixed in the instantiations. The tree
code requires `n - s - 1 >= 1`.

## Where this design makes its own choices

These points are not fixed by the structure described above:

* **The cell's logic.** The exact gates of the cell are the simplest ones that
  give the override behaviour in the cell table.
* **The collector chain.** Chaining the collector through `s` is a reading of
  the sum `C | OR p_j(...)`. F2 is a complete second chain fed by the same
  terminals.
* **The sequencer.** Running the test patterns from a clocked sequencer, one
  per clock, is an implementation choice. So is the rule that any faulty line
  marks its whole block for exchange.
* **The multi-output bus.** Sharing the bus lines between outputs is the
  reading used for the multi-output form.
* **The sequential circuit.** The register direction, reset to zero, the hold
  during diagnosis and the variable split are all choices.
* **Terminal codes.** The 2-bit encoding of c-terminal values is arbitrary.

## Timing and interfaces

* Everything except `fd_diag_ctrl` and the shift register is combinational.
* Clocked logic uses the rising edge of `clk` and an asynchronous active-low
  `rst_n`.
* `diag_start` is sampled when the sequencer is idle or done. `diag_busy` rises
  on the next clock.
* `diag_done` stays high, and the results stay valid, until the next start.
* While `diag_busy` is high the function output is not valid.
* Fault injection in the testbenches uses `force`, only on signals that exist
  once in the design:
  * the block outputs `u_circ.f0_line[j]`, `u_circ.f1_line[j]`;
  * the collector outputs (`u_circ.f_out`, `f_term`).
* Verilator applies a `force` on a signal inside a module that has several
  instances to all of them, unless the module was inlined. For that reason,
  faults below level 1 are checked against the behavioural model in
  `tb_fd_diag_ctrl`, not by forcing lines inside `fd_block`.

## Simulating

Each testbench in `tb/` checks its results itself and ends with a line
`TB_RESULT checks=N failures=M`. For example, the end-to-end run at default
sizes:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_fd_top \
        rtl/fd_pkg.sv tb/fd_tb_pkg.sv tb/tb_fd_top.sv rtl/*.sv
    ./obj_dir/Vtb_fd_top

| testbench | what it checks |
|---|---|
| `tb_fd_module` | the cell, all 32 input combinations |
| `tb_fd_block` | minterm selection for every bus value; level-1 and level-2 overrides |
| `tb_fd_collector` | random inputs against the AND-OR formula |
| `tb_fd_comb_circuit` | Example 1 on all inputs on F1 and F2; single-block enable; spare exchange; overrides seen at the output; F2 with F1 broken |
| `tb_fd_term_map` | terminal mapping; code resolution; spare allocation; `unrepaired` |
| `tb_fd_diag_ctrl` | the sequencer at three levels against a behavioural fault model; faults at every level, random fault sets and a broken collector; the run length |
| `tb_fd_repairable` | forced faults, then diagnosis, then repair, then Example 1 on all inputs again |
| `tb_fd_multi_circuit` | Example 2 on both outputs and both collectors, with and without spares |
| `tb_fd_multi_repairable` | forced faults in each output, then diagnosis of both outputs, then repair and Example 2 on all inputs; the run length |
| `tb_fd_shift_seq` | random run against a reference model; diagnosis in mid-run with the state held; repaired run |
| `tb_fd_top` | all of the above through the top at default sizes, counting each mechanism |

`tb_fd_top` counts these mechanisms: H tests, J tests, stuck-at-0 finds,
collector switch, spare exchange, unrepairable case, tests below level 1,
multi-output spare, multi-output F2, shifts, and holds.

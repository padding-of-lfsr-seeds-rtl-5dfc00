# Padded-seed, low-transition test pattern generator

Test data compression stores LFSR seeds on the tester instead of full test
patterns. An on-chip LFSR then expands each seed into a pattern. *Padding*
stretches each stored seed further. A few extra bits are appended to a seed
of B0 bits, and the result seeds a longer LFSR of B0 + b bits. That longer
LFSR produces a different test. One stored seed plus a handful of short
paddings can therefore replace several stored seeds. For example, the 8-bit
seed `00110011` gives:

| padding | LFSR length | loaded seed  |
|---------|-------------|--------------|
| (none)  | 8           | `00110011`   |
| `0`     | 9           | `001100110`  |
| `10`    | 10          | `0011001110` |

This design adds two things to padding. Both aim at lower switching activity
during test and at more random patterns:

* A **bit-swapping LFSR (BS-LFSR)**. It swaps the outputs of the first two
  cells, controlled by the last cell. The swapped output toggles only half as
  often as a plain LFSR cell.
* A **modified dual-CLCG**. This generator is built from four linear
  congruential generators (LCGs). The BS-LFSR supplies its four seeds, and it
  emits one pseudorandom bit per clock. Those bits are the test patterns.

The patterns are scored on chip. They drive two copies of the ISCAS'89
**s27** benchmark circuit. One copy is fault-free and the other carries an
injected stuck-at fault. A monitor counts the clocks on which the two
flip-flop states differ.

Everything is synthesizable SystemVerilog-2017. The default sizes are those of
the 8-bit worked example.

## Data flow of one session

```
 seed[7:0], pad, pad_len           fault (site, stuck value)
        |                                   |
        v                                   v
 +-------------+  lfsr_op  +-----------+  x0,y0,p0,q0  +---------------+  z
 |  bs_lfsr    |---------->| seed regs |-------------->| mod_dual_clcg |----+
 | (8..12 cells)|  cap[3:0] +-----------+               +---------------+    |
 +-------------+                                                            v
        ^                                          4-bit window  in_q (G3..G0)
        |                                                 |            |
 +-----------------+                              +-----------+  +-----------+
 | bist_controller |-- load/en/cap/start/test --> | s27 good  |  | s27 faulty|
 +-----------------+                              +-----------+  +-----------+
                                                     op_ff |        | op_ff1
                                                           v        v
                                                       +----------------+
                                                       | fault_monitor  |--> total_faults
                                                       +----------------+
```

After `start`, `bist_controller` steps through the following states:

| state | clocks | what happens |
|-------|--------|--------------|
| LOAD  | 1 | `seed` followed by `pad_len` bits of `pad` is loaded into the BS-LFSR. |
| SEED  | 4·SEED_GAP + 1 | The BS-LFSR steps. Its 8-bit parallel word is captured as x0, y0, p0 and q0 after 8, 16, 24 and 32 steps. |
| START | 1 | The four LCGs take their seeds. The circuits, the input window and the counter are cleared. |
| TEST  | TEST_LEN | One pattern per clock. Each generated bit `z` shifts into the 4-bit window, and the window drives G3..G0 of both s27 copies. Both copies are clocked. The monitor compares their flip-flop states. |
| DONE  | — | `done` = 1. `count` = TEST_LEN and `total_faults` are held until the next `start`. |

At the defaults (SEED_GAP = 8, TEST_LEN = 1250), one session takes
36 + 1250 clocks from `start` to `done`.

## Bit-swapping LFSR with padding (`bs_lfsr`)

The register has B0 + PAD_MAX cells, named c1..cn from the left of the seed
string. c1 holds the leftmost seed bit, and the padding follows the last seed
bit. `pad` is right-aligned: for a padding of length b, `pad[b-1]` is its
first bit. With `pad_first` = 1 the padding goes in front of the seed
instead: c1..cb hold the padding and the seed follows. The length n = B0 + b is set at load time. Cells past cn are held
at zero.

* **Feedback.** The LFSR is external, with polynomial x^n + x + 1. On each
  step every cell takes its left neighbour, and c1 takes c1 xor cn. Changing
  the length only moves the cell that feeds back, so a single register serves
  every padding. This is the "programmable LFSR" that padding needs on chip.
* **Swap.** Two 2:1 multiplexers share the select line cn:
  * Mux1 has c2 on input 0 and c1 on input 1, and drives `o1`.
  * Mux2 has c1 on input 0 and c2 on input 1, and drives `o2`.

  While cn = 0, c1 and c2 are exchanged.
* **Transition saving.** Take a maximal-length LFSR of this form and run it
  for one period. `o2` then makes 2^(n-2) transitions, against 2^(n-1) on
  any plain cell: half as many. `o1` saves nothing. The unit testbench
  checks this on a 7-cell LFSR: 64 transitions on c1 and `o1`, 32 on `o2`.
* **Parallel output.** `lfsr_op` is the 8-bit word {o1, o2, c3, ..., c8}.
  It supplies the CLCG seeds.

Caution: x^n + x + 1 is primitive for n = 7 but **not** for n = 8, 9 or 10.
The 8-, 9- and 10-cell configurations therefore run on short cycles. Loaded
with `00110011`, `001100110` and `0011001110`, they repeat after 63, 73 and
889 steps, against maximal periods of 255, 511 and 1023. This follows the
polynomial given for the BS-LFSR. A maximal sequence needs a different tap
set for each length: change the feedback line in `bs_lfsr.sv` and the
matching model in the testbenches.

## Modified dual-CLCG (`lcg`, `clcg`, `mod_dual_clcg`)

Each LCG computes x_{i+1} = a·x_i + b mod 2^N with a = 1 + 2^R. No
multiplier is needed:

* An R-bit left shift gives 2^R·x_i.
* One adder sums x_i, 2^R·x_i and b.
* The N-bit wrap of the adder provides mod 2^N.

A multiplexer in front chooses the seed while `start` is high and the
register otherwise. The clock with `start` high therefore already writes x_1.

Two LCGs and a comparator form a coupled LCG (`clcg`). The generator uses
two of them:

* B_i = [x_{i+1} > y_{i+1}]
* C_i = [p_{i+1} > q_{i+1}]
* **Z_i = B_i xor C_i**

The older dual-CLCG keeps B_i only when C_i = 0. That needs an output buffer
and a controller, and it gives no bit on some clocks. The XOR yields one bit
on every clock with a single gate. The comparisons are unsigned.

Default constants: R = 2, 3, 4, 5 (a = 5, 9, 17, 33) and b = 1, 3, 5, 7. These
are this design's own choice. a ≡ 1 (mod 4) and odd b give every 8-bit LCG
the full period 256. Change them with the top's `R1..R4` and `B1..B4`
parameters, keeping R ≥ 2 and b odd.

## Circuit under test and fault scoring (`s27_cut`, `fault_monitor`)

`s27_cut` is the published s27 netlist:

* Inputs G0..G3 and output G17.
* Flip-flops G5, G6 and G7.
* Gates: G14 = ¬G0, G8 = G14·G6, G12 = NOR(G1, G7), G15 = G12 + G8,
  G16 = G3 + G8, G9 = NAND(G16, G15), G11 = NOR(G5, G9),
  G10 = NOR(G14, G11), G13 = NOR(G2, G12), G17 = ¬G11.
* Next state: G5 ← G10, G6 ← G11, G7 ← G13.

Any one of the 16 nets G0..G16 (G4 does not exist, G17 is excluded) can be
forced to 0 or 1. The fault is selected with the `stuck_fault_t` struct
{en, site, value} from `bist_pkg`. The fault-free copy is the same module
with `en = 0`.

`fault_monitor` compares the 3-bit flip-flop states `op_ff` = {G5, G6, G7}
of the two copies on every test clock. On a mismatch it sets `fault_flag` and
increments `total_faults`. The counter saturates instead of wrapping. Because
s27 is sequential, a fault that corrupts the state often shows for several
clocks in a row, and every such clock is counted. The count is therefore a
measure of how often the pattern stream exposes the fault. It is not a
fault-coverage percentage.

## Top level (`padded_clcg_bist_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a session (from IDLE or DONE) |
| `seed` | in | B0 | stored seed; the MSB is the leftmost bit |
| `pad`, `pad_len` | in | PAD_MAX, 3 | padding bits (right-aligned) and their count, 0..PAD_MAX; larger counts are limited to PAD_MAX |
| `pad_first` | in | 1 | 1: padding before the seed, 0: after it |
| `fault` | in | `stuck_fault_t` | fault placed in the faulty s27 copy |
| `busy`, `done`, `state` | out | 1, 1, 3 | session status |
| `count` | out | 11 | patterns applied |
| `test_data` | out | 1 | generated bit z |
| `scan_o1`, `scan_o2`, `swap_sel`, `lfsr_cells` | out | 1, 1, 1, 12 | BS-LFSR outputs |
| `x`, `y`, `p`, `q`, `bi`, `ci` | out | 8 each, 1, 1 | LCG terms and comparator outputs |
| `cut_in` | out | 4 | pattern on G3..G0 |
| `op_ff`, `op_ff1`, `op`, `op1` | out | 3, 3, 1, 1 | flip-flop states and G17 of the good and faulty copies |
| `fault_flag`, `total_faults` | out | 1, 16 | mismatch flag and count |

Parameters, with their defaults:

* `B0` = 8: seed bits.
* `PAD_MAX` = 4: the first-iteration limit min(16, B0/2).
* `N` = 8: LCG width.
* `TEST_LEN` = 1250: patterns per session.
* `SEED_GAP` = 8: BS-LFSR steps between captured seeds.
* `R1..R4`, `B1..B4`: LCG constants.
* `FCW` = 16: counter width.

At the defaults the top synthesizes to about 330 word-level cells and 120
flip-flops.

## What is not in the hardware

* **Choosing the paddings.** Deciding which padding goes with which seed is
  an off-line algorithm. It iterates over candidate paddings, runs fault
  simulation, removes redundant paddings in reverse order, and accepts a
  change only if seed storage shrinks and the number of applied tests grows
  by at most α %. It runs on the tester's host computer. Its result is the
  (`seed`, `pad`, `pad_len`) presented at the top's inputs.
* **The tester.** The tester and its memory are outside the design.
* **The other generators.** The buffered dual-CLCG and the plain
  padded-LFSR generator are the reference points this design improves on,
  and they are not included. A plain padded LFSR of 8, 9 or 10 bits is the
  BS-LFSR with `pad_len` = 0, 1 or 2, read through its cells.
* **Larger circuits.** Configurations for larger circuits are not built. One
  example is a 28-bit seed with 2- and 4-bit paddings, i.e. 28/30/32-cell
  LFSRs. `bs_lfsr` runs at that size with `B0 = 28`; see
  `tb_bs_lfsr_b04`. The circuit itself and its primitive polynomials are not
  part of this design.

## Own choices and departures

These points were chosen here, not taken from a specification:

* Cell numbering against the seed string and the make-up of `lfsr_op`.
* Taking the four LCG seeds from the parallel BS-LFSR word, eight steps
  apart.
* The LCG constants.
* The 4-bit sliding window from the bit stream to the s27 inputs, with both
  circuits clocked on every test clock. This is an alternative to a
  scan-in-then-capture scheme.
* Comparing only the flip-flop states. G17 is brought out but not compared.
* Counting mismatching clocks.
* Session sequencing, reset values and the clear inputs.

Detection counts from this design should not be compared with counts from
other set-ups that use a different counting rule or fault site. The fault
site and value are free inputs here.

## Files

| file | contents |
|------|----------|
| `rtl/bist_pkg.sv` | default sizes, LCG constants, `s27_net_e`, `stuck_fault_t`, `bist_state_e` |
| `rtl/bs_lfsr.sv` | programmable-length bit-swapping LFSR |
| `rtl/lcg.sv`, `rtl/clcg.sv`, `rtl/mod_dual_clcg.sv` | LCG, coupled LCG, modified dual-CLCG |
| `rtl/s27_cut.sv` | s27 with stuck-at fault injection |
| `rtl/fault_monitor.sv` | response comparison and count |
| `rtl/bist_controller.sv` | session sequencer |
| `rtl/padded_clcg_bist_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_bs_lfsr_b04.sv` | BS-LFSR at 28/30/32 cells |

Every testbench computes its expected values with its own model, runs under
a watchdog, and ends with a line `TB_RESULT checks=<n> failures=<m>`.

`tb_padded_clcg_bist_top` runs the top at its default parameters for eight
full sessions:

* the seed `00110011` with the paddings "", "0" and "10", and with "10"
  placed in front of it;
* random seeds with 3- and 4-bit paddings;
* no fault, and stuck-at faults on G11, G8, G13 and G3.

It checks the generated bit, the LCG terms, the circuit inputs and both
responses on every clock. At the end of each session it checks the counts.
It also requires that every padding length, a bit swap, both comparator
outputs, both values of z, and a detection each occurred at least once.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bist_pkg.sv tb/tb_padded_clcg_bist_top.sv \
    --top-module tb_padded_clcg_bist_top -Mdir obj_top
./obj_top/Vtb_padded_clcg_bist_top
```

Replace the testbench name to run another test. Each test finishes in well
under a second.

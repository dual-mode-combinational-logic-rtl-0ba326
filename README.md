# Dual-mode combinational logic: two tests for any network

Finding tests for stuck-at faults in a combinational network normally takes
work that grows with the network, and the tests depend on what the network
computes and on how it is wired. Dual-mode combinational (DMC) logic trades
extra gate inputs for a fixed test set. Every gate gets a few **control
inputs**, shared by all gates of the network. For one set of control values
every gate does its ordinary job (normal mode). For two other sets every gate
turns into an OR or an AND of its data inputs (test mode). With the right
truth table, two input patterns then detect every single stuck-at fault in
*any* network built from such gates:

    T0    = (k = a,  all data inputs 0)   fault-free output: 0
    T0bar = (k = ~a, all data inputs 1)   fault-free output: 1

Nothing in these two patterns depends on the network's function or layout.
This repository holds synthesizable SystemVerilog for the gate, for a small
example network built from it (Network 4), and for a two-pattern tester that
applies T0 and T0bar. Testbenches check the fault-detection claims by fault
injection.

## The 2T(r) gate (`rtl/dmc_gate.sv`)

A 2T(r) gate has `r` control inputs `k1..kr`, `n` data inputs `d1..dn` and one
output. What it computes depends only on the Hamming distance `h` between the
control vector and a fixed test vector `a`. With `t = floor((r-2)/2)`:

| distance `h` of `k` from `a` | segment        | output                  |
|------------------------------|----------------|-------------------------|
| 0                            | test (T0)      | OR of the data inputs   |
| 1 .. t                       | forced         | 1                       |
| between                      | normal mode    | the gate's function `FN`|
| r-t .. r-1                   | forced         | 0                       |
| r                            | test (T0bar)   | AND of the data inputs  |

For the main configuration, `r = 4` (so `t = 1`) and `a = 0000`:

| `k1 k2 k3 k4`                     | output          |
|-----------------------------------|-----------------|
| 0000                              | d1 + ... + dn   |
| one 1 (1000, 0100, 0010, 0001)    | 1               |
| two 1s (1100, 1010, ... , 0011)   | `FN(d)`, e.g. NAND |
| three 1s                          | 0               |
| 1111                              | d1 . ... . dn   |

Why this works:

* **Data and output faults.** Under T0 every gate is an OR with all-zero
  inputs, so the whole network is one big OR and reads 0. Under T0bar it is
  one big AND and reads 1. Take the faulty line closest to the output. If it
  is stuck at 1, T0 puts a 1 on it, and the fault-free ORs after it carry
  that 1 to the output. If it is stuck at 0, T0bar does the same with a 0
  through fault-free ANDs. A redundancy in the normal-mode function cannot
  hide a fault, because the function is not in use during test.
* **Control faults.** A single stuck control input moves a gate one step
  away from the test vector. The forced segments next to `a` and `~a` are
  chosen so that this step always produces the *complement* of the expected
  answer, whatever the data. The fault is therefore visible at that gate, and
  the gates after it pass it on.
* **Distance to normal mode.** For even `r`, normal mode lies exactly `r/2`
  steps from both test vectors. It takes `r/2` control faults on one gate to move that gate from
  test mode into normal mode, where the test answer depends on the function
  again. So a 2T(r) gate tolerates `t = floor((r-2)/2)` control faults per
  gate, and four controls is the least that covers all single faults.

The defaults are `R = 4`, `N = 2`, `A = '0` and `FN = FN_NAND`. The normal-mode
function is selectable among AND, OR, NAND, NOR, XOR and XNOR. `R` below 4
is rejected at elaboration. All normal-mode segments realise the same `FN`.
One segment would be enough, and the others could hold other functions. This
design fills them all with `FN` so that the output is defined for every
control vector. Vectors are packed `[1:R]`, so `k[1]` is `k1` and the literal
`4'b1100` means `k1 = k2 = 1`.

The gate is written as a distance count, a segment decode and an output
multiplexer. That describes its truth table, not a transistor circuit. Faults
inside a real cell that do not show up as a stuck input or output are outside
this model.

## Network 4 (`rtl/dmc_network4.sv`)

The example network has three 2T(4) gates. Gate 1 takes `d11, d12`, gate 2
takes `d21, d22`, and gate 3 combines the outputs of gates 1 and 2 into `f`.
All four control lines go to all three gates. With `a = 0000` and NAND in
normal mode:

| `k`  | `f`                          |
|------|------------------------------|
| 1100 (normal mode, or any other vector with two 1s) | d11.d12 + d21.d22 |
| 0000 | d11 + d12 + d21 + d22 (T0 gives 0) |
| 1111 | d11.d12.d21.d22 (T0bar gives 1)    |
| one 1 | 1 |
| three 1s | 0 |

The network also shows the limit of the scheme. Suppose control lines `k1`
and `k2` are both stuck at 1 before they branch. Under T0 the gates then see
`1100`, which is normal mode, and the NAND-NAND network with all-zero data
answers 0, which is the expected value. Under T0bar the controls are 1 anyway.
This double fault is not detected. It puts two faulty controls on every gate,
which is more than `t = 1`.

## Applying the tests (`rtl/dmc_tester.sv`, `rtl/dmc_top.sv`)

`dmc_tester` is a small sequencer. After a `start` pulse it drives T0 for one
clock cycle, then T0bar for one cycle. At the end of each cycle it samples
the network outputs. Two cycles after `start` it pulses `done`, with the
verdict flags `pass`, `fail_t0` (some output was 1 under T0) and `fail_t1`
(some output was 0 under T0bar). The flags hold until the next start. `start`
is ignored while `busy`. Reset is synchronous and active low. Assertions check
that a verdict only comes at the end of a run and that `pass` excludes the
fail flags. Parameters `R`, `M` and `P` set the number of controls, data
inputs and outputs, so the tester fits any DMC network.

`dmc_top` puts the tester beside Network 4. While `test_busy` is low, the
network's controls and data come from `k_in` and `d_in`, and `d_in[1:4]`
is `d11, d12, d21, d22`. During a self-test they come from the tester. In
normal operation `f` is purely combinational. Keep `k_in = 1100` for the
NAND-NAND function.

The scheme itself only asks for a tester that applies two patterns. Putting
the tester on chip, with a 2:1 multiplexer in front of the network, is this
design's own choice. The multiplexer and the tester are not part of the DMC
network, and T0 and T0bar do not cover their faults. The scheme also requires
that no control input and data input share a source. The multiplexer's
select line reaches both, so the test path itself does not meet that rule.

## How far it has been checked

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_dmc_gate`: full truth tables of three configurations, compared with a
  reference built from the segment rules: 2T(4)/NAND with `a = 0000`,
  2T(4)/XOR with 3 data inputs and `a = 1010`, and 2T(6)/NOR with
  `a = 110010`. Hand-worked rows of the 2T(4) table are also checked. The
  testbench also applies T0 and T0bar to every pattern of stuck data inputs
  and stuck output combined with at most `t` stuck controls, and checks that
  each pattern is detected.
* `tb_dmc_network4`: all 256 combinations of control and data, the three
  closed forms above, and the undetected `k1`/`k2` double fault.
* `tb_dmc_tester`: the driven patterns, the two-cycle latency and the verdict.
  These are checked against a stand-in network with a healthy output, an
  output stuck at 0, one stuck at 1 and an inverted one.
* `tb_dmc_top`: the end-to-end test at default parameters. It sweeps all
  control and data vectors and runs the self-test while `k_in`/`d_in` hold
  disturbing values. It then forces the output of gate 1 stuck at 0 and
  stuck at 1, and the shared `k1` line stuck at 1, and expects the right fail
  flag each time. Every mechanism is counted: normal mode, both test
  segments, both forced segments, a passing and a failing self-test, and the
  tester taking over the inputs.
* `tb_dmc_fault_coverage` rebuilds Network 4 with a fault site on every line:
  4 control stems, 12 control pins, 6 data pins and the output. For 2T(4) it
  checks that all 46 single faults are detected. It checks all 772 fault pairs
  in which no gate sees two faulty controls, plus 20000 random
  multiple-fault patterns with at most one faulty control per gate. It counts
  the 36 pairs that escape, all of which put two faulty controls on one gate,
  and the `k1`/`k2` stem pair is among them. For 2T(6) gates it checks all
  single faults and 20000 random patterns with up to two faulty controls per
  gate.
* `tb_dmc_function_independence` builds twelve more networks from 2T(4)
  gates and runs the same two tests on each. They come in six shapes, each
  with two choices of normal-mode functions: a three-input gate feeding the
  middle input of a second gate, three gates feeding a fourth, two
  three-input gates feeding a third, a two-gate chain, a network with
  reconvergent fan-out and an inverter, and the redundant netlist
  `f = x + x.y`. For each network the testbench checks three things. Normal
  mode must equal the conventional netlist. Every single fault must be
  detected, including faults on fan-out stems. 2000 random multiple-fault
  patterns with at most one faulty control per gate must be detected. In the
  redundant netlist, the AND output stuck at 0 changes nothing in normal mode,
  so no normal-mode test can find it. T0bar finds it.

The detection claims have been checked on these network shapes and by
sampling multiple faults. They have not been proven for networks in general.

## Simulating

Verilator 5 runs everything. The package must come first:

    verilator --binary --timing --assert -Wno-fatal -Wno-ASCRANGE \
        rtl/dmc_pkg.sv rtl/dmc_gate.sv rtl/dmc_network4.sv \
        rtl/dmc_tester.sv rtl/dmc_top.sv tb/tb_dmc_top.sv \
        --top-module tb_dmc_top -Mdir obj_top
    ./obj_top/Vtb_dmc_top

For the gate testbench add `tb/dmc_gate_check.sv`. For the fault-coverage
testbench add `tb/dmc_net_faulty.sv`. For the function-independence
testbench add `tb/dmc_net_check.sv`. Each testbench finishes in well under a
second. `-Wno-fatal` keeps verilator going past the warnings that remain.
These are the deliberate `[1:R]` bit order (ASCRANGE), package constants that
a module does not use, and, in the netlist-driven testbench helper only, a
combinational-order note (UNOPTFLAT) on the array of gate outputs.

## Files

| file | contents |
|------|----------|
| `rtl/dmc_pkg.sv` | normal-mode function and segment enums, Network 4 constants |
| `rtl/dmc_gate.sv` | the 2T(r) gate |
| `rtl/dmc_network4.sv` | Network 4, three 2T(4) gates |
| `rtl/dmc_tester.sv` | two-pattern tester |
| `rtl/dmc_top.sv` | Network 4 with the tester |
| `tb/tb_*.sv` | self-checking testbenches |
| `tb/dmc_gate_check.sv`, `tb/dmc_net_faulty.sv`, `tb/dmc_net_check.sv` | testbench helpers: a gate checker, Network 4 with fault sites, and a netlist-driven network with fault sites and its checks |

## What is not here

* Gates with two or three controls are not built. Those variants show why
  fewer than four controls cannot work, and `dmc_gate` rejects them.
* No circuit-level gate cell is given, only its logic behaviour.
* No tool converts an arbitrary network to DMC form. The conversion is a
  one-to-one replacement of each gate by a `dmc_gate` with the matching `FN`
  and the shared control lines, which is how `dmc_network4` is written.

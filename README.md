# Fault injection test bench for TMR and Partial TMR on the C17 benchmark

SRAM-based FPGAs can have a bit of their configuration or logic flipped by a
single ionising particle (a single event upset, SEU). Two ways to make a
small combinational circuit survive such a flip are compared here, using the
ISCAS-85/LGSynth91 **C17** benchmark as the circuit to protect:

* **TMR**: three identical copies of C17 and a 2-of-3 majority voter on
  each output.
* **Partial TMR**: one exact C17 plus two cheaper *approximate* copies, an
  over-approximation and an under-approximation, with the same voters. The
  approximations agree with C17 only on part of the input space, and only
  there is the vote guaranteed to be correct.

Each scheme sits inside a small on-chip test system. A test input vector
controller walks through the input vectors, a golden (unprotected,
fault-free) C17 computes the expected outputs, a comparator checks the
protected circuit against it, and switch-controlled *fault modules* corrupt
the outputs of chosen copies to emulate SEUs. The test stops with **pass**
when every vector matched, or with **fail** on the first vector that did
not, and leaves that vector on display.

All of it is synthesizable SystemVerilog sized for a board with a 50 MHz
clock, switches and LEDs.

## The C17 benchmark

Five inputs N1, N2, N3, N6, N7, two outputs N22, N23, six two-input NANDs:

```
N10 = NAND(N1, N3)    N11 = NAND(N3, N6)
N16 = NAND(N2, N11)   N19 = NAND(N11, N7)
N22 = NAND(N10, N16)  N23 = NAND(N16, N19)
```

In sum-of-products form (used by the testbenches as an independent
reference): `N22 = N1·N3 + N2·¬(N3·N6)` and `N23 = ¬(N3·N6)·(N2 + N7)`.

The five inputs travel together as `fit_pkg::c17_in_t`, packed
`{n1, n2, n3, n6, n7}` with N1 as the most significant bit, so the packed
value 0..31 enumerates all vectors. Outputs travel as `c17_out_t`
`{n22, n23}`.

## Fault modules

`fault_module` inverts every bit it guards while its control input is high
and passes the value through otherwise. It stands for an SEU that makes a
copy's output wrong. Inversion is this design's model of "a wrong output";
since every guarded bit is inverted, a faulted copy is wrong on **both**
outputs for **every** vector, which makes the test outcomes easy to predict
(see below).

## TMR circuit under test (`tmr_cut`)

Three `c17` replicas share the input vector. Each replica's 2-bit output goes
through its own `fault_module`, enabled by `p[0]`, `p[1]`, `p[2]` (P0..P2).
Two 1-bit `voter`s take the majority per output.

| faults raised | voted output        | test result |
|---------------|---------------------|-------------|
| 0             | correct             | pass        |
| 1             | correct (masked)    | pass        |
| 2 or 3        | inverted on both bits | fail on the first vector |

Four of the eight fault settings pass, so 128 of the 256 (switch setting ×
vector) cases are correct: a 50 % pass rate. `tb_fit_tmr` and `tb_fit_top`
reproduce exactly this count.

## Partial TMR circuit under test (`ptmr_cut`)

This is the part that takes the most care to understand.

An *over-approximation* of a function is 1 wherever the function is 1 (and
maybe elsewhere); an *under-approximation* is 0 wherever the function is 0.
Here both are made in the simplest way, by pinning some C17 inputs to 1.
Pinned this way they are not strict one-sided bounds of C17 everywhere;
what matters is that they equal C17 wherever the pinned inputs really are 1.

* `c17_over`: N6 is replaced by a separate input `over6`. With `over6 = 1`
  the NAND for N11 collapses to an inverter of N3.
* `c17_under`: N3 and N6 are replaced by `under3` and `under6`. With both at
  1, N11 is constant 0, N16 and N19 are constant 1, and the branch reduces to
  `N22 = N1`, `N23 = 0`.
* `c17_fault`: the exact C17.

The replacement inputs are kept as ports, driven from board switches, so the
branch modules are the full C17 netlist over those inputs; the gate
reductions above appear only when synthesis sees them tied to constants.
All three branches equal C17 whenever the real N3 and N6 are both 1, so the
test holds N3 = N6 = 1 (from switches) and sweeps only N1, N2 and N7. That
restricted input space is what the Partial TMR protects.

Each branch has two error modules: **E0 inverts N22 and E1 inverts N23, in
all three branches at once**. Consequently any raised error input corrupts
the majority and the test fails on its first vector; only E0 = E1 = 0
passes. This sharing is a reading of the branch port lists, each of which
names both E0 and E1; it is the main point on which the design may differ
from the hardware it is modelled on (see *Departures*).

Outside the protected space the vote still helps as long as only one
approximation is wrong. With N3 = 0 and all replacements high, only the
under-approximation disagrees with C17 and is outvoted, so the test passes.
With N6 = 0 both approximations disagree with C17 in the same way, the
vote is wrong, and the test fails on vector {N1,N2,N7} = 001. `tb_fit_top`
exercises both cases.

Per-branch outputs (`orig_out`, `over_out`, `under_out`) are brought out so
the three branches can be watched separately.

## Test input vector controller (`tiv`)

A four-state machine (`IDLE`, `RUN`, `PASS`, `FAIL`) with a `WIDTH`-bit
vector counter (5 for TMR, 3 for Partial TMR):

* `reset` (synchronous, active high) returns to `IDLE` with vector 0 from
  any state.
* In `IDLE`, `start` high enters `RUN` at vector 0.
* In `RUN`, each rising clock edge samples `match`, the comparator result
  for the vector currently applied. A mismatch moves to `FAIL` and freezes
  the vector. A match on the all-ones vector moves to `PASS`. Otherwise the
  vector increments.
* In `PASS` or `FAIL`, `again` restarts the sweep at vector 0. `start` is
  ignored there.

**Timing.** The CUT, the golden C17 and the comparator are combinational,
so one vector is checked per clock. If `start` is sampled at edge 0, vector
k is applied after edge k, and `pass` rises after edge 2^WIDTH: 32 clocks for
the TMR test, 8 for the Partial TMR test. A failure on vector k shows after
edge k+1. Two assertions check that the vector steps by exactly one while
matching and that a failing vector is held.

## The two test systems and the top

`fit_tmr`: `tiv` (5 bits) → golden `c17` and `tmr_cut` → `compare` →
back to `tiv`. Ports: `clk`, `reset`, `start`, `again`, `p[2:0]`; outputs
`n22_tmr`, `n23_tmr`, `i_cut[4:0]` (the running vector), `running`, `pass`,
`fail`. A board mapping matching this design: start on SW0, P0..P2 on
SW7..SW9, `i_cut` on LEDR2..LEDR6, pass on LEDR8, fail on LEDR9.

`fit_ptmr`: `tiv` (3 bits: `iv[2]`=N1, `iv[1]`=N2, `iv[0]`=N7), N3 and N6
from `sw_n3`/`sw_n6`, replacement inputs `over6`, `under3`, `under6`, error
inputs `e[1:0]` = {E1, E0}. Outputs: `match` (live comparison, a pass lamp),
`golden_out`, `orig_out`, `over_out`, `under_out`, `iv`, `running`, `pass`,
`fail`. A board mapping: N3/N6 on SW2/SW3, over6/under3/under6 on SW5..SW7,
E0/E1 on SW8/SW9, `match` on LED0, the four output pairs on LED1..LED8.

`fit_top` places both systems side by side on one clock, with all other
ports prefixed `tmr_` and `ptmr_`. It has no parameters.

## Results and how far they go

* **TMR**: 50 % of the 256 cases pass, in simulation as in the experiment
  this design follows.
* **Partial TMR**: with the protected setting (N3 = N6 = over6 = under3 =
  under6 = 1) one of the four error settings passes, 25 %. A 66.7 % pass rate
  over 64 cases (four swept inputs, two error switches) has been reported
  for this kind of setup. It cannot be reproduced here: which fourth input
  is swept is not known, and no assignment of E0/E1 to branches consistent
  with the described ports gives two thirds.
* **Size**: a four-fold reduction in logic for Partial TMR over TMR
  (32 vs. 8 logic elements on a Cyclone V) has been reported. In this RTL,
  generic synthesis gives 25 cells for `tmr_cut` and 50 for `ptmr_cut`,
  because the replacement inputs remain live ports. Tying them to 1 lets
  synthesis fold the approximate branches away.

## Departures and choices

Following the source design: the C17 netlist, the TMR structure with one
fault module per replica and two voters, the three Partial TMR branches and
their port lists, the replacement inputs over6/under3/under6, the
start/again/reset controls, and stop-on-pass/stop-on-fail.

This design's own choices:

* fault model = bit inversion;
* E0 → N22 and E1 → N23, shared by all three Partial TMR branches;
* the Partial TMR sweep covers N1, N2, N7 (8 vectors), with N3 and N6 on
  switches, where a sweep of four inputs was described;
* tiv state machine, one vector per clock, synchronous active-high reset,
  `again` acting only after a test has ended;
* vector bit order (N1 most significant);
* both systems on one clock in one top;
* a live `match` output for the Partial TMR pass lamp, alongside tiv's
  `pass`/`fail`;
* two faulted TMR replicas produce a wrong voted output (the voter outputs
  the faulty majority).

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/fit_pkg.sv tb/c17_ref_pkg.sv tb/tb_fit_top.sv --top-module tb_fit_top
./obj_dir/Vtb_fit_top
```

Swap `tb_fit_top` for any other testbench. What each one covers:

| testbench        | checks |
|------------------|--------|
| `tb_c17`         | all 32 vectors against the sum-of-products reference |
| `tb_fault_module`| 1-bit and 4-bit instances, enabled and disabled |
| `tb_voter`       | all 1-bit cases, random 8-bit words |
| `tb_compare`     | all 16 output pairs |
| `tb_tmr_cut`     | all 256 vector × fault cases, 128 correct |
| `tb_c17_fault`, `tb_c17_over`, `tb_c17_under` | all 128 cases each, plus the reduced forms |
| `tb_ptmr_cut`    | all 1024 cases, each branch and the vote |
| `tb_tiv`         | sweep order, 32-clock pass latency, hold, again, fail on a chosen vector, reset mid-run |
| `tb_fit_tmr`     | the 8 fault settings, pass/fail latency, 50 % rate |
| `tb_fit_ptmr`    | all 128 switch settings against a branch-level model |
| `tb_fit_top`     | both systems end to end at full size; counts start, pass, fail, again, reset, masked and unmasked faults |

## Files

* `rtl/fit_pkg.sv`: shared types (`c17_in_t`, `c17_out_t`, `tiv_state_e`).
* `rtl/c17.sv`, `rtl/fault_module.sv`, `rtl/voter.sv`, `rtl/compare.sv`,
  `rtl/tiv.sv`: building blocks.
* `rtl/tmr_cut.sv`: TMR circuit under test.
* `rtl/c17_fault.sv`, `rtl/c17_over.sv`, `rtl/c17_under.sv`,
  `rtl/ptmr_cut.sv`: Partial TMR branches and circuit under test.
* `rtl/fit_tmr.sv`, `rtl/fit_ptmr.sv`, `rtl/fit_top.sv`: test systems and top.
* `tb/c17_ref_pkg.sv`: reference models for the testbenches.
* `tb/tb_*.sv`: one testbench per module.

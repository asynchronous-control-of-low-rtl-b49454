# Gated-clock counter with asynchronous clock control

A large synchronous state machine wastes power because every flip-flop is
clocked every cycle, even though only a small part of the state space is in
use at any time. A standard remedy is to split the machine into several
sub-FSMs, of which only one is active at a time, and to gate the clock of the
others. The catch is the control logic that decides which clock runs: if that
logic is itself clocked, it burns power in every partition every cycle, and
the saving from fine partitioning is eaten by the overhead.

This design uses an **asynchronous Clock Controller Block (CCB)** per
partition instead. A CCB is a tiny unclocked state machine: a handful of gates
with feedback. It only switches when its partition is handed control or
gives it back; a CCB of a passive partition sees no clock at all. The only
clock load per partition is one NAND gate.

The RTL builds the case study for this technique: a 256-state binary counter
split into `N_PART` equal sub-FSMs (default 8; 2, 4, 16, 32, 64 and 128 also
work), each with its own CCB and clock gate.

```
global_ck --[>o]-- global_ck_n ---------+------------------ (to every gate)
                                        |
go[k-1] --> CCB k --- dis_ck[k] ---> NAND k --- ck[k] ---> sub_fsm k --- go[k] ---> CCB k+1
              ^                                                |
              +------------------- in_reset[k] ----------------+
```

## How a hand-over works

This is the part that needs care. It spans two global clock edges, E0 and E1.
Partition *k* is counting and *k+1* waits in its reset state with its clock
gated.

| when | partition k | CCB k+1 | partition k+1 | CCB k |
|------|-------------|---------|---------------|-------|
| E0 | enters its last count, `go_k` rises | sees `go` rise and raises `dis_ck` while `global_ck` is still high | still in reset, clock now enabled | RUN |
| falling edge after E0 | | | `ck_(k+1)` falls (first gated pulse) | |
| E1 | goes to its reset state: `in_reset_k` rises, `go_k` falls | sees `go` and `in_reset` fall **together** and settles in RUN | leaves reset with its first count: `in_reset_(k+1)` falls | sees `in_reset` rise and drops `dis_ck`, so `ck_k` stays high |

The count therefore advances by one on every global clock edge with no gap.
Two local clocks run only in the hand-over cycle; every other cycle exactly
one partition is clocked.

Three timing facts make this safe:

* **Glitch-free gating.** The local clock is `ck = ~(~global_ck & dis_ck)`.
  While `global_ck` is high, that output is 1 whatever `dis_ck` does. All CCB
  inputs come from flip-flops clocked on the rising edge, so `dis_ck` only
  changes in the high phase. The CCB must settle within that half period.
* **Hazard-free `go`.** The CCB is a fundamental-mode asynchronous machine,
  so `go` must not glitch. `go` is therefore a flip-flop output in each
  sub-FSM, not decoded from the state.
* **One multiple-input change.** Apart from the simultaneous fall of `go`
  and `in_reset` at E1, CCB inputs change at least one clock cycle apart. The
  transition map below makes both arrival orders of that double change end
  in RUN.

## The asynchronous CCB (`ccb`)

State is `(s0, dis_ck)`; `dis_ck` is both the output and a state variable.
Despite its name, `dis_ck = 1` means the clock *runs*. Next-state map,
inputs `(go, in_reset)` across the top, `[..]` = stable, `--` = never reached
in normal use:

| s0 dis_ck | 00 | 01 | 11 | 10 |
|-----------|----|----|----|----|
| 00 IDLE   | -- | [00] | 01 | -- |
| 01 WAKE   | 11 | 11 | [01] | 11 |
| 11 RUN    | [11] | 00 | -- | -- |
| 10        | -- | 00 | -- | -- |

Reading the table: IDLE waits with the partition in reset. `go` rising moves
it to WAKE, which enables the clock. When `go` and `in_reset` both fall, it
reaches RUN whichever falls first: from WAKE each single fall leads to `11`,
and RUN is stable once both are low. In RUN, `in_reset` rising takes it
through `10` back to IDLE.

The open cells are filled to keep the logic small:

```
s0+     = dis_ck & (~in_reset | (~s0 & ~go))
dis_ck+ = (go & in_reset) | (dis_ck & (~s0 | ~in_reset))
```

With this fill, IDLE is also stable at `go = in_reset = 0`. A multi-input CCB
needs that for its unused inputs while the partition runs. No input
combination makes the loop oscillate: every trajectory settles in at most
two steps.

The function lives in `gcfsm_pkg::ccb_next`. `ccb` closes the loop with a
continuous assignment, so the RTL *is* the asynchronous circuit. Lint and
synthesis tools report a combinational loop there. That is intended and is
the only loop in the design.

## Multi-input CCB (`ccb_multi`)

A partition that can be entered from several predecessors gets one one-bit
CCB per `go` input. All of them share the partition's `in_reset`, and their
outputs are ORed. Only the CCB whose `go` pulsed leaves IDLE. The counter
needs only one input per partition, so it instantiates `ccb_multi` with
`N_IN = 1`. The block's own test uses three inputs.

## Counter partitions (`sub_fsm`)

Partition `INDEX` owns counts `INDEX*S .. INDEX*S+S-1`, where
`S = N_STATES/N_PART`. It also has one extra reset state. The state is a
reset flag (`in_reset`) plus a local binary count:

* In the reset state, the first clock edge the partition receives takes it
  to its first count. No separate start signal is needed: the partition only
  gets clock edges once its CCB has woken.
* In count `S-1`, `go` is high for exactly one cycle.
* After count `S-1` it returns to its reset state.

`count` is the partition's value, or 0 in reset. The top ORs the partitions'
`count` outputs.

## Top level (`gated_counter`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `rst` | in | 1 | asynchronous reset, active high; release it while `global_ck` is high |
| `global_ck` | in | 1 | global clock |
| `count` | out | `$clog2(N_STATES)` | counter value |
| `dis_ck` | out | `N_PART` | clock enable of each partition (1 = clocked) |
| `in_reset` | out | `N_PART` | reset-state flag of each partition |

| parameter | default | meaning |
|-----------|---------|---------|
| `N_STATES` | 256 | states of the counter |
| `N_PART` | 8 | number of equal partitions, at least 2, must divide `N_STATES` |

Reset puts partition 0 at count 0 with its CCB in RUN. Every other partition
goes to its reset state with its CCB in IDLE. The top holds two concurrent
assertions:

* `go` is only raised toward a partition that is in reset.
* One or two clock enables are high at any time.

`ccb` also asserts that `go` rises only while `in_reset` is 1.

## Where this departs from, or adds to, the published design

* **Reset.** The published CCB has no reset. `rst` forces each CCB into RUN
  or IDLE. The reset behaviour of the sub-FSMs is also this design's own.
* **Don't-care cells** of the CCB map are filled as shown above. The
  specified cells are unchanged.
* **Partition encoding and `count` output** are this design's own. The
  published work specifies only the partition sizes, the reset state and the
  `go`/`in_reset` interface.
* **Default `N_PART = 8`** is the partitioning with the lowest total power
  reported for asynchronous control. The two-partition drawing of the
  structure is reached with `N_PART = 2`.
* **Not included:** the synchronous CCB of earlier work. It served only as
  the power baseline, and its circuit is not specified here.
* **Not modelled:** power, gate delays and the CCB's settling time. The
  simulation is zero-delay. It checks the logic, the edge counts of every
  local clock and the ordering argument above. It cannot check that the CCB
  settles within half a clock period in a given technology.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ccb` | Every specified cell of the map, through directed sequences against a table model. Covers both orders of the double input change, `go` falling alone, and both reset states. |
| `tb_ccb_multi` | 60 hand-overs from random inputs of a three-input CCB. Checks the output and that only the selected one-bit CCB woke. |
| `tb_ck_gate` | The truth table. With `dis_ck` changing in the high phase, the number of gated edges equals the number of enabled cycles (no glitches). |
| `tb_sub_fsm` | Partitions of sizes 32 and 2, cycle by cycle: count, `in_reset`, and `go` exactly in the 32nd count. |
| `tb_gated_counter` | The default 256-state, 8-partition counter end to end, with a reset mid-count. |
| `tb_gated_counter_sweep` | All seven partitionings, 2 to 128, side by side. |

Both counter tests use the checker `tb/gc_monitor.sv`. Once per cycle it
checks:

* The count advanced by one.
* Each partition received exactly the expected local clock edges: one for
  the counting partition, one more for its successor in a hand-over cycle,
  none for the rest.
* Each clock enable is correct.
* At most one `go` is high.

It also counts each mechanism, and a mechanism that never happened is a
failure. The mechanisms are:

* a hand-over from every partition;
* the wrap from the last partition to the first;
* the simultaneous fall of `go` and `in_reset`;
* cycles that clock two partitions;
* suppressed clock edges;
* resets;
* each of a CCB's three operating modes: hand-over (one of its inputs
  changed that cycle), enable (clock running) and disable (clock gated).

The sweep prints the CCB-cycles spent in each mode. Beyond two partitions,
nearly all of them are in the disable mode. That is why a CCB's power in the
disable mode dominates the control overhead of fine partitionings.

Running a test with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/gcfsm_pkg.sv tb/tb_gated_counter.sv --top-module tb_gated_counter -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. All tests finish in well
under a second. Verilator warns `UNOPTFLAT` about the CCB feedback loop.
That warning is expected, since the loop converges, and `-Wno-fatal` keeps
it from stopping the build.

## Files

* `rtl/gcfsm_pkg.sv`: CCB state type and next-state function
* `rtl/ccb.sv`: one-bit asynchronous CCB
* `rtl/ccb_multi.sv`: multi-input CCB
* `rtl/ck_gate.sv`: NAND clock gate
* `rtl/sub_fsm.sv`: counter partition
* `rtl/gated_counter.sv`: top level
* `tb/`: the testbenches above and `gc_monitor.sv`

# FROCM fairness control for a two-thread VLIW SMT issue stage

When two threads share one processor core, each runs slower than it would
alone. Usually they are not slowed equally. A thread with wide, dense
instruction packets can take most of the shared execute units, while a
sparse thread waits. The operating system assumes that the time slices it
hands out turn into progress, so uneven slowdown can starve a thread or
invert priorities.

FROCM ("Fairness Recalculate Once Cache Miss") is a small hardware mechanism
that evens out the slowdown. Fairness is measured as

    slowdown[i] = T_alone[i] / T_SMT[i]                    (between 0 and 1)
    Fn          = min over thread pairs of min(slowdown[i]/slowdown[j], slowdown[j]/slowdown[i])

Fn = 1 means both threads lose the same fraction of their speed. Fn = 1 holds
exactly when the two threads' IPCs under sharing are in the same ratio as
their stand-alone IPCs. So the hardware needs two things: an estimate of each
thread's stand-alone IPC, and a way to steer issue toward that ratio. The
estimate has to be made without ever stopping the other thread to sample,
and without a divider.

This repository holds the synthesizable issue stage: a dispatch unit for two
threads and eight shared execute units, the per-thread stand-alone IPC
estimator, and the priority switch. The surrounding processor (fetch units,
register files, execute units, caches) is not part of it. Its connections are
ports.

## The machine around it

The core is a two-way SMT DSP with a VLIW instruction set. Each thread has
its own fetch unit and register file. Both share one dispatch stage, eight
execute units (AL1, AL2, BC1, BC2, MU1, MU2, LS1, LS2), a 4 KB L1 instruction
cache, a 4 KB L1 data cache and a 64 KB L2. Each cycle a thread offers one
*execute packet* (EP): up to eight 32-bit instructions, each bound to one
unit. An L1 miss costs 5 cycles and an L2 miss 60.

```
 Fetch 1 ──ep[0]──┐                       ┌── unit_valid/tid/instr ──> 8 execute units
                  ├── frocm_dispatch ─────┤
 Fetch 2 ──ep[1]──┘     ▲    │ issue_count, ep_done
                 level1 │    ▼
              frocm_priority <── ipc_approx ── frocm_ipc_calc  x2  <── miss, miss_l2
```

## Estimating stand-alone IPC from inside a shared core

This is the central idea, and the least obvious part.

A thread running alone spends each stretch between two cache misses
executing, then waits out the miss delay:

    IPC_alone = IC / (T_exec + T_miss)

where IC is the number of instructions in the stretch. Under sharing, IC is
unchanged: the same instructions lie between the same misses. T_miss is a
fixed property of the memory system. Only T_exec is hidden, because the
shared core stretches it out. On a VLIW machine running alone, one packet
issues per cycle. So T_exec equals the number of packets, provided that a
packet split over several cycles by contention still counts **once**. This
is why `frocm_dispatch` reports `ep_done` only in the cycle the last
instruction of a packet issues. The estimate becomes

    IPC_approximately = IC / (EP + T_miss)

Two counters per thread (IC and EP, 16 bits each) collect IC and EP between
misses. At each miss, `frocm_ipc_calc` evaluates the fraction scaled by 8, to
keep three fraction bits in a 6-bit register, without a divider:

1. form the divisor `D = EP + T_miss`, using T_miss = 5 for an L1 miss and
   60 when `miss_l2` is set;
2. load the remainder `R = IC << 3` and set the result to 1;
3. each cycle compute `R − D`. While it is above zero, keep it and add 1 to
   the result. Otherwise publish the result.

The published value is `ceil(8·IC / D)`, at least 1 and at most 63. After
reset it is 8, an IPC of 1.0. A result N costs N cycles, so at most 63.
During that time the counters already collect the next interval. A miss
that arrives while a calculation is still running is not acted on, and its
interval is merged into the next one.

The estimate is approximate. Misses may be more frequent under sharing than
alone. If both threads suffer that equally, the ratio the priority logic
steers toward is still right.

## Steering issue: Level 1 and Level 2

`frocm_priority` gives each thread a second counter, IC_last_execute, which
adds up the thread's issued instructions. When a thread's counter reaches its
scaled estimate, the estimate is subtracted from the counter. The thread then
drops to **Level 2** and the other thread rises to **Level 1**. Both start
at Level 1.

In effect each thread takes turns leading, and a turn lasts one estimate's
worth of instructions, a fixed fraction of what the thread would issue alone
per cycle. A thread that gets ahead of its fair share uses up its quota
sooner and hands the lead over. For example, take estimates 20 and 30 (IPC
2.5 and 3.75). If after a cycle the counters stand at 24 and 29, thread 0
drops to Level 2 with 4 left over, and thread 1 leads.

If both counters reach their thresholds in the same cycle, the lead passes
from the current holder to the other thread.

## Unitive dispatch

`frocm_dispatch` issues, in one cycle:

* every not-yet-issued instruction of the Level-1 thread's packet (after
  reset, when both are at Level 1, thread 0 goes first);
* those of the other thread's pending instructions whose units are still free.

Instructions that do not issue stay pending in the packet (`done_mask`). The
fetch unit must hold the packet until `ep_done`. Execute-unit operands
(`unit_valid`, `unit_tid`, `unit_instr`) are registered and appear one cycle
after issue. An assertion checks that no unit is given to both threads.

## Interface and timing of the top, `frocm_smt_issue`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `ep_valid`, `ep_mask`, `ep_instr` | in | 2, 2×8, 2×8×32 | packet offered by each thread; instruction u runs on unit u (bit 0 = AL1 … bit 7 = LS2) |
| `ep_done` | out | 2 | packet completed this cycle (combinational); fetch advances |
| `miss`, `miss_l2` | in | 2, 2 | one-cycle miss pulse per thread; `miss_l2` selects the 60-cycle delay |
| `unit_valid`, `unit_tid`, `unit_instr` | out | 8, 8, 8×32 | operands of each execute unit, registered |
| `issue_count`, `issue_mask` | out | 2×4, 2×8 | what each thread issued this cycle |
| `level1`, `level` | out | 2 | current priority per thread |
| `ipc_approx`, `ipc_update`, `calc_busy` | out | 2×6, 2, 2 | 8 × estimate, update strobe, calculation running |
| `ic_count`, `ep_count`, `ic_last`, `switch_evt` | out | | counters, for observation |

The fetch unit stalls a missing thread by holding `ep_valid` low for the
miss delay. This block does not time the stall. Issue is decided
combinationally in the cycle; a priority change applies from the next cycle;
a new estimate N is visible N cycles after the miss.

Parameters (top): `NU` = 8 units, `IW` = 32-bit instructions, `TMISS_L1` = 5,
`TMISS_L2` = 60. Counter widths live in `frocm_pkg`.

## Where this RTL makes its own choices

The method fixes the counters, the shift-and-subtract flow, the widths
(16-bit IC and EP, 6-bit estimate), the reset value 8, the restart value 1,
the two-level priority rule and the miss delays. The following are choices
of this implementation:

* **Resources per thread.** Each thread has its own IC, EP, estimate and
  IC_last_execute counters, its own adder and its own shift, plus working
  registers (remainder, divisor, running result). Counters and estimate can
  then run independently, and the visible estimate never shows half-finished
  values. The method's own budget is smaller: four counters, one shifter and
  one adder.
* **Remainder width.** The remainder is 20 bits (16-bit IC, shifted by 3, plus
  sign), although the method names a 16-bit adder.
* **IC_last_execute width.** This counter is 7 bits, not 6, because up to eight
  instructions are added before the compare. It saturates at 127.
* **Misses during a calculation.** A miss that arrives during a running
  calculation is ignored. IC and EP saturate at 65535.
* **Tie-breaks.** The tie-breaks (thread 0 first after reset; on simultaneous
  threshold crossing the lead changes hands) are this design's own.
* **Packet contents.** No dependences inside a packet are modelled: any
  subset of a packet may issue.
* **Reset and pipeline.** Reset is asynchronous. The execute operands are
  registered.

## Verification

Each module has a self-checking testbench in `tb/`:

* `tb_frocm_ipc_calc` runs random miss intervals of both kinds. It checks
  every estimate against `ceil(8·IC/(EP+T_miss))` computed in closed form,
  and the latency (N cycles for result N). It also covers the reset value,
  an empty interval, an ignored second miss and a saturated IC.
* `tb_frocm_priority` checks the 20/30, 24/29 example above, then runs 20 000
  random cycles against a reference model of the two-level rule.
* `tb_frocm_dispatch` checks the split-packet example: thread 1's SUB and MPY
  go in the first cycle, its ADD, ADD, MPY in the second, and only then is
  its packet done. It then runs 20 000 random cycles against a pending-set
  model, including the registered unit outputs.
* `tb_frocm_smt_issue` runs the full top at default parameters. Two seeded
  synthetic threads with misses run four pairs of thread types, each once
  under FROCM and once with the priority forced to alternate every cycle
  (round robin). Every published estimate is checked against the
  testbench's own interval counts. The test also checks the operands that
  reach the units and that Fn ≥ 0.85, and counts priority switches, split
  packets, L1/L2 misses, recalculations and ignored misses. A mechanism that
  never occurs counts as a failure.
* `tb_frocm_workloads` runs synthetic stand-ins for seven two-program mixes
  of general code (ADPCM, G721, FFT) and DSP kernels (dotp_sqr, fir,
  matrix, fftSPxSP). The profiles (packet density, miss rate, L2 share) are
  estimates, not traces of the programs. Typical output: mean Fn 0.958 under
  round robin and 0.978 under FROCM. The largest gains are on mixes with a
  dense DSP kernel (FFT+fftSPxSP 0.875 → 0.973). Throughput does not drop.
  The testbench checks Fn ≥ 0.85 per mix, throughput within 5% of round
  robin, and a higher mean Fn.

Trust the RTL for the mechanism as specified above. The Fn numbers only show
that the mechanism behaves sensibly on synthetic traffic. They are not a
reproduction of results on real programs.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/frocm_pkg.sv \
    tb/tb_frocm_smt_issue.sv --top-module tb_frocm_smt_issue -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Every testbench ends with a
`TB_RESULT checks=N failures=M` line. Each one finishes in well under a
second.

## Files

* `rtl/frocm_pkg.sv`: shared constants, unit and level enums
* `rtl/frocm_dispatch.sv`: unitive dispatch
* `rtl/frocm_ipc_calc.sv`: IC/EP counters and estimator
* `rtl/frocm_priority.sv`: IC_last_execute counters and Level 1/2 switch
* `rtl/frocm_smt_issue.sv`: top
* `tb/tb_*.sv`: the testbenches above

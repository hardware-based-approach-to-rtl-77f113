# Hard Deadline Enforcer for a mixed-criticality multicore bus

A multicore chip that runs one hard real-time task next to ordinary work has
a timing problem. The other cores compete for the shared memory bus, so the
critical task's worst-case execution time (WCET) depends on everything else
that runs. The usual cures are costly. A TDMA bus schedule needs a new
timing analysis whenever any task changes. Keeping the other cores idle
wastes them.

This design takes another route. The critical task is analysed once, as if
it ran **alone** on the chip. At run time a small hardware block, the
**Hard Deadline Enforcer (HDE)**, follows the task's progress. It watches
the program counter of the instructions the critical core executes. While
the task can still meet its deadline in the worst case, the bus is
**shared** round-robin among all cores. When that is no longer true, the HDE
raises **Warning** and the bus controller switches to **stand-alone mode**.
In that mode only the critical core is granted the bus, so from then on the
task runs exactly as it did in the single-core analysis and meets its
deadline. If the task later turns out to be ahead of its worst case, the
bus returns to the shared mode.

The other cores lose only the cycles in which the critical task really
needs the bus to itself. Their software needs no analysis at all.

```
  critical core (AHB master 0)                        other cores (masters 1..N-1)
   exception-stage PC, annul, valid                      |  AHB master signals
        |                                                |
   epc_capture --EPC--> +------------- hde -------------+ |
                        | rp_monitor -> rp_time_ctrl -> | |
                        |              deadline_enforcer| |
                        +---------------+---------------+ |
                                 Warning|                 |
                                        v                 v
                          ahb_ctrl (round-robin | stand-alone) --> shared memory
                                        |
            CTaskEnd, master 1 request/grant --> results_sampler (per-run bus waits)
```

## Reference points and the critical time

The task's code is annotated off line with **reference points (RPs)**.
RP 0 is the first instruction of the task. Other RPs are instructions inside
the task, and an RP inside a loop may be tied to one particular iteration.
For each RP the analysis gives **WCET_R(RP)**: the remaining worst-case time
from that RP to the end of the task, with the core running alone.

The **critical time** of an RP is the latest elapsed time, counted from RP 0,
at which the task may still be running in the shared mode:

```
CT(RP) = Deadline - WCET_R(RP) - t_over
```

`t_over` covers the time the hardware needs to react. The HDE needs 3 cycles
to see an executed RP and raise Warning, and the bus controller needs 1 more
cycle to hand the bus to the critical core. So the default is `T_OVER = 4`.
A deadline can be guaranteed only if `Deadline > WCET + t_over`.

Each clock cycle the HDE compares the elapsed time with the CT of the last
RP passed:

| elapsed time            | action                                            |
|-------------------------|---------------------------------------------------|
| `< CT`                  | stay in (or return to) the shared mode            |
| `>= CT`                 | Warning: stand-alone mode                         |
| `> Deadline`, still running | Deadline Miss (the error indication)          |

Warning is re-evaluated at every RP. Stand-alone mode is therefore not
one-way. Say a later RP is reached early, because the bus happened to be
free or the task took a short path. Its CT is then further away than the
elapsed time, so Warning drops and the bus is shared again. A CT that would
be negative is clamped to 0, which means stand-alone mode from that RP on.

Default example task (three RPs, deadline 165 cycles = 150 % of a 110-cycle
WCET):

| RP | address | loop iteration | WCET_R | CT  |
|----|---------|----------------|--------|-----|
| 0  | 10      | any            | 110    | 51  |
| 1  | 22      | 0              | 98     | 63  |
| 2  | 22      | 5              | 43     | 118 |

The loop of this task runs from address 20 to 30. Address 19 is the
instruction before the loop and 30 the last instruction of each iteration.
Address 38 is the instruction before the end of the task.

## Knowing where the task is: EPC and cycle states

### Executed Program Counter

Fetch addresses are a poor guide to progress. Instructions are fetched and
then thrown away after branches, and with a cache they never appear on the
bus. The HDE therefore watches the **Executed Program Counter (EPC)**: the PC
of the instruction in the critical core's exception stage, taken only when
that instruction is not annulled. `epc_capture` does this. It holds the last
executed PC while annulled instructions or bubbles pass. It also gives a
one-cycle `epc_strobe` per executed instruction, marked by the core's
`x_valid`, so that an instruction held for several cycles counts once. The
strobe is this design's addition. The core change itself is small: only the
exception-stage PC (bits 31:2, a 30-bit word address) and the annul bit are
needed.

### Reference Point Monitor (`rp_monitor`)

An address alone does not identify an RP inside a loop, because the same
instruction runs in every iteration. The monitor keeps a **cycle state**
(iteration counter) for each loop of the task:

* At the loop's *clear address* (the instruction before the loop is
  entered), its cycle state is cleared.
* At the loop's *increment address* (the instruction before the loop is
  left or taken again), its cycle state is incremented. It saturates at
  its maximum.
* At an RP address, if that RP uses a cycle state, the state of its loop
  must also equal the RP's iteration number. Then `rp_id` becomes that RP.
* At RP 0, `rp_id` becomes 0 and a task-start pulse is given. Other RPs are
  accepted only while the task is running.
* At the end address, and after reset, `rp_id` becomes `NUM_RP`, which
  means "not running".

Nested loops are handled the same way: each loop has its own clear and
increment addresses, so an inner loop's state is cleared on every pass
through the outer loop. The testbenches exercise tasks with one loop and
with up to 100 sequential loops, but not nested ones. All of this is set by parameters: `RP_ADDR`, `RP_USE_CS`,
`RP_LOOP`, `RP_CS`, `LOOP_CLR_ADDR`, `LOOP_INC_ADDR` and `END_ADDR`. In the
original approach the HDE is generated per task, and here the same role is
played by one parameter set per task.

Where RPs must not be placed:

* in a branch delay slot;
* inside a function called from more than one place, since the monitor sees
  only addresses and cycle states. Copy the function under another name
  instead.

## The three-cycle detection pipeline and the elapsed time

The three HDE blocks are registered in series. Each adds one cycle after the
cycle in which RP 0 executes:

| cycle after RP executes | event                                           |
|-------------------------|-------------------------------------------------|
| +1 | `rp_monitor`: `rp_id`, `task_start`                                  |
| +2 | `rp_time_ctrl`: `ct`, `ctask_start` pulse, `ctask_end` falls         |
| +3 | `deadline_enforcer`: `warning`, `elapsed`                            |
| +4 | `ahb_ctrl`: the grant follows Warning (`hmaster`, `standalone`)      |

`rp_time_ctrl` turns `rp_id` into `ct` through a table. The table is
computed at elaboration from `DEADLINE`, `WCETR` and `T_OVER` and read like
a ROM. The block also produces `ctask_start`, a one-cycle pulse, and
`ctask_end`, a level that is high whenever the task is not running.

The elapsed counter in `deadline_enforcer` is loaded with 3 when CTaskStart
arrives, not with 0. That way `elapsed` always equals the number of cycles
since RP 0 executed, and `elapsed >= CT` means what the equation means. The
detection latency is already counted in `t_over`.

At the end address, `ctask_end` rises two cycles later and Warning drops.
Deadline Miss is set if the elapsed time passed the deadline while the task
was running. It stays set until the next task start, which is this design's
choice. The counter keeps running after the task ends until it reaches
`DEADLINE`. This drives `deadline_reached`, which marks the deadline instant
of each run: it rises exactly `DEADLINE` cycles after RP 0, whether or not
the task is still running. Only `deadline_miss` is the error indication.

## Bus controller with stand-alone mode (`ahb_ctrl`)

`ahb_ctrl` is an AHB arbiter and multiplexer for `NMST` masters (2 to 16)
and one slave, the shared memory. The critical core must be master 0.

* **Shared mode**: round-robin starting after the last owner. If nobody
  requests the bus, the last owner keeps it.
* **Stand-alone mode** (`force_sa` = Warning high): the next owner is
  master 0, whatever the others request. The round-robin pointer is
  frozen, so when the shared mode returns the sequence continues where it
  stopped. Without this freeze, the other cores would not be served in a
  fair order after a stand-alone period.

The address-phase owner `hmaster` is a register that changes only when
`hready` is high, so the switch takes one cycle. `hwdata` comes from the
data-phase owner. Assertions check that exactly one grant is high. They
also check that, once Warning is seen with `hready` high, master 0 holds the
grant in the next cycle.

The bus is a subset of AHB: single transfers with an address phase and a
data phase. There are no bursts, locked transfers, SPLIT/RETRY responses,
default master, slave decoding or plug-and-play records.

## Measuring the other cores: results sampler

`results_sampler` records how much the non-critical master 1 was held back
in each run of the critical task. A run is the time `ctask_end` is low. A
cycle in which master 1 requests the bus without holding the grant is a
waiting cycle. Each run gives one record (`sample_t`):

| field        | meaning                                        |
|--------------|------------------------------------------------|
| `run_cycles` | length of the run                              |
| `max_wait`   | longest unbroken stretch of waiting            |
| `sum_wait`   | all waiting cycles                             |
| `n_grants`   | requesting cycles in which it held the grant   |

The average wait per transfer is `sum_wait / n_grants`. The record is
written into a 512-entry memory when `ctask_end` rises. Once the memory is
full, later runs are dropped and `rs_full` is set. The memory is read back
through `rs_rd_addr`/`rs_rd_data`, with one cycle of latency. Which
statistics to keep, and the record layout, are this design's choices.

## Top level (`mcs_soc`)

`mcs_soc` connects the parts: `epc_capture` → `hde` → `ahb_ctrl.force_sa`,
and `ctask_end` plus master 1's request and grant → `results_sampler`. The
processor cores and the memory are not part of the RTL. Their signals are
ports:

* `crit_x_pc`, `crit_x_annul`, `crit_x_valid`: the critical core's
  exception stage.
* `mst_out[NMST]`, `mst_in`, `hgrant`: the masters' AHB side.
* `mem_in`, `mem_out`: the shared memory's AHB side.
* Status outputs: `warning`, `standalone`, `deadline_miss`,
  `deadline_reached`, `ctask_start`, `ctask_end`, `rp_id`, `rp_hit`, `ct`,
  `elapsed`, `hmaster`.
* Sampler read-back: `rs_rd_addr`, `rs_rd_data`, `rs_n_samples`, `rs_full`.

Shared types and constants are in `hde_pkg`. These are the AHB master and
slave bundles, `sample_t`, `EPC_W = 30`, `TIME_W = 32` and
`HDE_DETECT_LAT = 3`.

| file                      | contents                                   |
|---------------------------|--------------------------------------------|
| `rtl/hde_pkg.sv`          | types and constants                        |
| `rtl/epc_capture.sv`      | EPC export                                 |
| `rtl/rp_monitor.sv`       | RP identification with loop cycle states   |
| `rtl/rp_time_ctrl.sv`     | CT table, CTaskStart/CTaskEnd              |
| `rtl/deadline_enforcer.sv`| elapsed time, Warning, Deadline Miss       |
| `rtl/hde.sv`              | the three HDE blocks in series             |
| `rtl/ahb_ctrl.sv`         | round-robin / stand-alone AHB controller   |
| `rtl/results_sampler.sv`  | per-run bus-wait recorder                  |
| `rtl/mcs_soc.sv`          | top level                                  |

## Configuring the HDE for a task

1. Pick the RPs: RP 0 at the task's first instruction, then more along the
   code. More RPs let the bus return to the shared mode sooner. Note the
   loops that hold RPs, with their clear and increment addresses, and the
   address of the instruction before the task's end.
2. Work out the WCET and each WCET_R with the core running alone, using
   your timing-analysis flow.
3. Choose the deadline so that `Deadline > WCET + T_OVER`.
4. Set the parameters of `mcs_soc` (or `hde`): `NUM_RP`, `NUM_LOOPS`,
   `RP_ADDR`, `RP_USE_CS`, `RP_LOOP`, `RP_CS`, `LOOP_CLR_ADDR`,
   `LOOP_INC_ADDR`, `END_ADDR`, `DEADLINE` and `WCETR`. The arrays are
   packed, so element `i` belongs to RP `i` and, in a concatenation, the
   rightmost value is element 0. For example, `RP_ADDR = {30'd22, 30'd22,
   30'd10}` puts RP 0 at address 10.
5. `CS_W` (cycle-state width, 16 by default) must hold the largest iteration
   number used. `TIME_W` (32) must hold the deadline.

The table grows linearly with `NUM_RP`: one address comparator and one CT
word per RP. `tb/hde_scaling_unit.sv` shows how to generate the parameter
arrays for a large task in SystemVerilog.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/hde_pkg.sv tb/tb_mcs_soc.sv \
  --top-module tb_mcs_soc -Mdir obj_tb_mcs_soc -o sim
./obj_tb_mcs_soc/sim
```

Replace `tb_mcs_soc` with any testbench below. The package must come first
on the command line. `-Wno-fatal` keeps the remaining style warnings from
stopping the build:

* unused package constants in single-module lint;
* `rst_n` used both as the asynchronous reset and in the assertions'
  `disable iff`;
* index-width warnings in testbench code.

| testbench               | what it checks                                      |
|-------------------------|-----------------------------------------------------|
| `tb_epc_capture`        | EPC holds on annulled/invalid cycles, strobe        |
| `tb_rp_monitor`         | the example task with random gaps and junk EPCs; RP_ID after every instruction |
| `tb_rp_time_ctrl`       | CT table, clamping (also with a short deadline), start/end |
| `tb_deadline_enforcer`  | cycle model of elapsed, Warning, Deadline Miss, deadline instant |
| `tb_hde`                | the full HDE with a core that obeys or ignores Warning; cycle-exact timing |
| `tb_hde_scaling`        | generated HDEs with 12, 102 and 1002 RPs (1 to 100 loops) and loopless ones with 10 and 1000 RPs |
| `tb_ahb_ctrl`           | 2 and 4 masters against a reference arbiter         |
| `tb_results_sampler`    | records against an independent count; full memory  |
| `tb_mcs_soc`            | whole system, three set-ups (below)                 |
| `tb_mcs_soc_full`       | whole system at default parameters, 64 runs         |
| `tb_mcs_soc_deadlines`  | deadline 110 % vs 150 % of the WCET, 3 vs 9 RPs (below) |

The system testbenches use behavioural models from `tb/`:

* a critical core that executes the example task with varying loop counts,
  fetches every instruction over the bus and exports PC/annul/valid;
* a secondary core that requests the bus all the time;
* a zero-wait-state memory.

`soc_harness` checks the following:

* the bus follows Warning one cycle later;
* the CTaskStart/CTaskEnd timing;
* that every run meets its deadline;
* that Deadline Miss is right;
* that the deadline instant comes exactly `DEADLINE` cycles after RP 0;
* that each sampler record equals its own count of master 1's waits.

`tb_mcs_soc` runs three systems:

* the default system;
* a 4-entry sampler that fills up;
* a system given too small WCET_R values, so deadlines are missed and
  reported.

It fails if any mechanism never happens. These mechanisms are entering
stand-alone mode, returning to the shared mode, RP 2 in iteration 5, an
annulled instruction, both cores using the bus during a run, a deadline
miss and a full sampler.

### What the deadline and the RP count buy

`tb_mcs_soc_deadlines` runs the example task 32 times (1 to 8 loop
iterations) in three systems. In each, the secondary core wants the bus all
the time. For each run it measures two figures for the secondary core: the
longest unbroken wait divided by the run length, and the waiting cycles per
granted cycle. Averaged over the runs:

| system                         | max waiting ratio | average wait |
|--------------------------------|-------------------|--------------|
| deadline 121 (110 %), 3 RPs    | 0.69              | 22.1         |
| deadline 165 (150 %), 3 RPs    | 0.23              | 2.0          |
| deadline 165 (150 %), 9 RPs    | 0.09              | 1.5          |

With little slack, Warning comes at once and the critical core keeps the
bus for most of the run. More slack, or an RP in every loop iteration, lets
the HDE hand the bus back sooner and more often. Every run still meets its
deadline. The testbench checks that these orderings hold.

## How far it can be trusted, and where it departs from the original

What has been verified:

* Every block has been simulated against reference models written
  separately from the RTL.
* Each testbench was shown to fail on a deliberately broken copy of its
  block.
* All RTL passes Verilator lint and Yosys (slang) elaboration with no latch
  or multi-driver warnings.

What has not been done:

* It has not been run on an FPGA.
* It has not been connected to a real LEON3 or other processor.
* It has not been formally verified.

The AHB side is the weakest part. It was only tested against the simple
models described above.

Differences from the original system:

* **Processor, memory and debug parts are not included.** The original
  system has two LEON3 cores, on-chip AHB RAM, a debug unit with JTAG and a
  register written over JTAG to set up experiments. Here these are ports or
  testbench models. The core change is reduced to the three exception-stage
  signals.
* **Bus subset.** Only single transfers are supported, with no
  bursts/locks/SPLIT/RETRY, no default master and no APB bridge. The
  original controller is a full AHB controller, into which the
  stand-alone mode was added as "force arbitration to master 0".
* **EPC strobe.** `x_valid`/`epc_strobe` is an addition, needed to count
  loop iterations when an instruction stays in the exception stage for
  several cycles.
* **Generic RP monitor.** The original generates a dedicated monitor per
  task. Here it is one parameterised table with per-loop clear and
  increment addresses, which is equivalent for the cases described. The
  loop addresses of the default example (19 and 30) are chosen here.
* **Elapsed time origin.** The count starts at 3 on CTaskStart, so it is
  measured from RP 0. Deadline Miss holds until the next task start, and
  `deadline_reached` keeps counting after the task ends. These are choices
  made here.
* **Example constants.** `DEADLINE = 165` and WCET_R = 110/98/43 belong
  to the small example task above. The real-world control application used
  to evaluate the approach needs 15 or 28 RPs, and its per-RP numbers are not
  available. Such a task needs its own parameter set (see "Configuring").
* **Sizes.** The default HDE has 3 RPs and 1 loop. The largest
  configurations simulated have about 1000 RPs: 100 loops × 10 RPs, 1 loop
  × 1000 RPs, and 1000 RPs in loopless code. Larger HDEs, up to about 12000
  RPs, need one comparator and one table word per RP. They were not
  simulated, because Verilator's build of a 12000-RP HDE needs more than
  16 GiB of memory.
* **Results sampler contents.** Recording max and total wait per run, the
  512-entry depth and the read port are this design's version of the
  measurement logic. Only its purpose is given.
* **RP detection modes.** Only monitoring of the executed PC is
  implemented. The alternatives are not: watching fetch addresses on the
  bus, or having the task write its RP number to a port.
* **One critical task.** One critical task on master 0 is supported. Any
  number of other masters up to 16 share the bus.

# FLASH — a Completely Fair Scheduler in hardware

An operating system spends part of every second picking which task runs next.
Linux's Completely Fair Scheduler (CFS) does this by giving each task a
*virtual runtime*: the time it has spent on the CPU, scaled by its priority.
The task with the smallest virtual runtime runs next. FLASH (Fast Linux
Advanced Scheduler Hardware) moves that decision into a peripheral. The kernel
tells the device about every task and every change to a task. The device keeps
its own table and answers "which PID next?" either on request or, unprompted,
with a timer interrupt that already carries the answer. The scheduler's data
never passes through the CPU's caches or TLB, and the decision is computed
while the CPU runs user code.

This repository holds synthesizable SystemVerilog for the FLASH scheduler
core, for a memory-mapped wrapper that lets a host CPU drive it, and
self-checking testbenches for every block. It follows the published FLASH
architecture: two front ends, two back ends, a tick generator, a process data
store, an unordered task array and CFS weighting. Where that description stops
short (widths, encodings, timing, register map), the choices made here are
listed in [Design choices not fixed by the FLASH description](#design-choices-not-fixed-by-the-flash-description).

## Block structure

```
              +--------------------------------------------------------------+
 sched_req -->|  sched_control  <---->  get_next_task  <---->                |
 sched_ack <--|     |    ^                   (reader)       process_data     |
 next_pid  <--|     |    |                                  64 x 136-bit     |
 tick_irq  <--|     v    |                                  task records     |
              |  timer_tick_gen        min_vruntime |                        |
              |                                     v                        |
 upd_req   -->|  process_control <--> process_modify <---->                  |
 upd_type  -->|                          (writer)                            |
 upd_params-->|                                                              |
 upd_ack   <--|                                   flash_core                 |
              +--------------------------------------------------------------+
                  ^ wrapped by flash_top: Avalon-MM slave registers + irq
```

| Module | Role |
|---|---|
| `flash_pkg` | record layout, update command, CFS weight table |
| `flash_top` | Avalon-MM register wrapper around the core; system top |
| `flash_core` | wires the six blocks below together |
| `sched_control` | scheduling-control front end: requests, tick interrupt, runtime timer |
| `timer_tick_gen` | periodic tick (1 kHz at 50 MHz by default) |
| `get_next_task` | charges the outgoing task, scans the table for the minimum vruntime |
| `vruntime_calc` | runtime × 1024 / weight(nice), by inverse-weight multiply |
| `process_control` | process-control front end: four-phase handshake for updates |
| `process_modify` | applies create / exit / set-priority / set-state to the table |
| `process_data` | the task table, two write ports, all records readable at once |

The split follows the FLASH design. The *scheduling-control* side only reads
the table (and writes the runtime of the task it just took off the CPU). The
*process-control* side is the only path that changes which tasks exist and
what state they are in.

## How the next task is chosen

This is the heart of the design. A selection runs in `get_next_task` in three
steps.

**1. Charge the outgoing task.** `sched_control` counts the cycles since the
last selection started. The cycle in which a selection starts counts as the
first cycle of the task it picks. It passes `cycles × NS_PER_CYCLE` (20 ns at
50 MHz) as `delta_ns`. The task picked last time, remembered by slot index and
PID, gets

```
runtime  += delta_ns
vruntime += delta_ns * 1024 / weight(nice)
```

It is charged only if its slot still holds the same PID, so a task that exited
in the meantime is skipped. A slot reused by a new PID is also safe.

**2. Scan the unordered table.** Tasks are not kept sorted. CFS keeps them in a
red-black tree, which would be costly to maintain in hardware. Instead the
table is read `LANES` records per cycle. Each group passes through a
`log2(LANES)`-deep tree of comparators. Each comparator keeps the runnable
record with the smaller vruntime and prefers the lower slot index on a tie.
The group winner is then compared with the best so far. Empty and blocked
slots never win. If no record is runnable, the result is "no task"
(`next_valid = 0`).

**3. Publish.** The winner becomes the current task, and `min_vruntime` rises
to its vruntime. `min_vruntime` never decreases. It is the reference for
placing new and waking tasks (see below).

**Weighting.** `vruntime_calc` uses the Linux load weights for nice −20 … +19
(88761 … 1024 at nice 0 … 15). Each nice step changes a task's CPU share by
about 10 %. As in the kernel, it multiplies by the inverse weight
`floor(2^32 / weight)` and shifts right by 22 instead of dividing. The 40
inverse weights are computed at elaboration from the weight table. At nice 0
the inverse is exactly 2^22, so runtime passes through unchanged. The result
can differ from exact division by at most a few parts in 10^5 and saturates at
2^48 − 1.

**Timing.** A selection is `ceil(MAX_TASKS/LANES) + 2` cycles from the start
cycle to `done`: one charge cycle, then the scan cycles, then the result. With
the defaults (64 slots, 4 lanes) that is 18 cycles. A request on the core's
four-phase interface is acknowledged 19 cycles after `sched_req` rises. At the
design clock of 50 MHz that is 0.38 µs, far inside the 1 ms tick period.

## Keeping the table in step with the kernel

The device cannot hold the kernel's `task_struct`s. The kernel therefore sends
every change as an update: an *update type* plus the triple
**(PID, priority, state)**, with a four-phase handshake (`upd_req` /
`upd_ack`).

| Type | Code | Effect |
|---|---|---|
| CREATE | 0 | takes the lowest free slot; runtime 0, vruntime = `min_vruntime` |
| EXIT | 1 | frees the slot of that PID |
| SET_PRIO | 2 | new nice level (field value nice + 20, 0 … 39; above 39 counts as 39) |
| SET_STATE | 3 | runnable (1) or blocked (0); a blocked → runnable change raises vruntime to at least `min_vruntime` |

A new task starts at `min_vruntime`, and a waking task is raised to it. Without
that, a newcomer or a long sleeper would have a far smaller vruntime than
everyone else and would hold the CPU until it caught up. CFS places tasks the
same way (without its small sleeper credit).

An update fails (`upd_err = 1`, table unchanged) in three cases:

- CREATE with a PID that is already present.
- CREATE when all slots are full.
- Any other type naming an unknown PID.

`process_modify` matches the PID against all slots in parallel. It writes in
the cycle after the command arrives and reports `done` one cycle later. If the
update port and the accounting port write the same slot in one cycle, the
update wins, so an exit cannot be undone by a late charge.

## Requests and timer ticks

The kernel switches tasks in two ways, and `sched_control` serves both.

- **Scheduling request** (a task yields, e.g. for I/O). The host raises
  `sched_req`. When the selection is done, `next_pid` / `next_valid` are
  loaded and `sched_ack` rises. The host reads the result and drops
  `sched_req`, and `sched_ack` falls one cycle later. Assertions in the RTL
  check both halves of this four-phase handshake.
- **Timer tick.** `timer_tick_gen` pulses every `TICK_CYCLES` cycles while
  enabled. The first pulse comes `TICK_CYCLES` cycles after enable. Each pulse
  starts a selection. `tick_irq` rises only when the result is in `next_pid`,
  so the interrupt handler never waits for the answer. The interrupt stays
  high until `tick_irq_clr`.

A tick that arrives during a request is held and served right after it. A
request wins over a pending tick. Several ticks that arrive while one is
pending merge into one.

## Register interface (`flash_top`)

`flash_top` puts the core on an Avalon-MM slave with 32-bit data, word
addresses, read latency 1 and no wait states. The wrapper runs the four-phase
handshakes itself. Software starts an operation with one write and polls
STATUS.

| Addr | Name | Access | Contents |
|---|---|---|---|
| 0 | UPD_PID | R/W | PID for the next update |
| 1 | UPD_CMD | R/W | [1:0] type, [13:8] nice+20, [16] state; **a write starts the update** |
| 2 | SCHED | W | any write starts a scheduling request |
| 3 | STATUS | R | [0] update busy, [1] last update failed, [2] request busy, [3] NEXT_PID holds a task, [4] tick interrupt pending, [5] tick enabled |
| 4 | NEXT_PID | R | PID from the last request or tick |
| 5 | TICK | R/W | W: [0] tick enable, [1] write 1 to clear the interrupt; R: [0] enable, [1] pending |

Writes to UPD_PID/UPD_CMD while an update is busy, and to SCHED while a
request is busy, are ignored. `irq` is the tick interrupt.

Typical driver sequence:

- **Add a task:** write UPD_PID, write UPD_CMD = `(1<<16)|(nice+20)<<8|0`, then
  poll STATUS[0] until clear and check STATUS[1].
- **Yield:** write SCHED, poll STATUS[2] until clear, then read NEXT_PID
  (valid if STATUS[3]).
- **On `irq`:** read NEXT_PID, then write TICK = 3 (keep enabled, clear).

## Sizes

| Parameter | Default | Meaning |
|---|---|---|
| `MAX_TASKS` | 64 | task slots |
| `LANES` | 4 | records compared per scan cycle |
| `TICK_CYCLES` | 50 000 | tick period in cycles: 1 kHz at 50 MHz |
| `NS_PER_CYCLE` | 20 | clock period used to turn cycles into nanoseconds (50 MHz) |

A record is 136 bits:

| Field | Bits |
|---|---|
| valid | 1 |
| state | 1 |
| priority | 6 |
| PID | 32 |
| vruntime | 48 |
| runtime | 48 |

The 48-bit nanosecond counters last about 78 hours. The default table is
64 × 136 = 8704 bits, exactly the 8.5 kib of scheduler storage given for
FLASH. The table is built from flip-flops so that `LANES` records can be read
per cycle and PIDs matched in parallel. Raising `LANES` shortens the scan and
costs comparators; raising `MAX_TASKS` lengthens it linearly.

## Design choices not fixed by the FLASH description

The FLASH description gives:

- the block structure and the two interfaces and their signal names;
- four-phase handshakes on both interfaces;
- the stored triple (PID, priority, state) plus runtime and vruntime;
- an unordered array with parallel comparison;
- CFS's weighting;
- a tick generated inside the device, with the interrupt raised once the
  result is ready;
- a 50 MHz clock with 50 000 cycles per decision (1 kHz);
- about 8.5 kib of storage.

Everything else was chosen here:

- **Sizes:** slot count (64), field widths and `LANES` (4).
- **Update command:** the update-type encoding, the error flag, and
  placement of new and waking tasks at `min_vruntime`.
- **Selection rules:** ties go to the lowest slot; charging is by cycle count
  × 20 ns; runtime counts from the start cycle.
- **Interrupt:** cleared by an explicit acknowledge; pending ticks merge.
- **Register map:** the whole Avalon-MM register map, read latency and
  polling model.
- **Reset:** synchronous, active low; clears the whole table.

## Not included

Described for FLASH only as future work, and not built:

- **DMA exchange of decisions and updates.** It would replace per-event
  register accesses.
- **No-HZ suppression.** It would skip the interrupt when the decision equals
  the running task.
- **Multiprocessor (SMP) scheduling.** The design has one current task.
- **Spilling tasks to main memory.** Without it the number of tasks is bounded
  by `MAX_TASKS`; a CREATE beyond the table is rejected.

Outside the RTL are:

- the host processor, its Linux driver and scheduling class;
- the vendor bridge that carries Avalon-MM over AXI.

`flash_top`'s Avalon-MM port is where they connect.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values are worked
out in the testbench, for example from its own copy of the weight table and a
reference model of the table. They do not come from the RTL.

| Testbench | What it establishes |
|---|---|
| `vruntime_calc_tb` | every nice level, clamping, identity at nice 0, saturation, closeness to exact division |
| `process_data_tb` | both write ports against a reference copy, collision rule, reset |
| `process_modify_tb` | all update types, table full / duplicate / unknown PID, placement, 2-cycle latency |
| `get_next_task_tb` | minimum-vruntime choice with ties, blocked and empty slots, partial last group, charging, latency |
| `timer_tick_gen_tb` | exact period, first tick, stop and restart |
| `sched_control_tb` | handshake order, interrupt only after the result, pending tick, runtime measurement |
| `process_control_tb` | one command per update, fields intact, error returned with ack |
| `flash_core_tb` | round-robin among equals, every pick a minimum, request latency, errors, weighting 1024:110, idle, wake-up, tick period |
| `flash_top_tb` | end to end at the default size through the registers, counting each mechanism: idle, full, duplicate, unknown PID, charge, wake-up, tick, pending tick, ties, blocked; register readback and writes ignored while busy |
| `flash_hackbench_tb` | hackbench-style load at the default size: 400 creates (64 accepted, 336 rejected), then 3000 rounds of message passing with blocking and wake-ups; every pick runnable and minimal, no task starved |
| `flash_fairness_tb` | 1 / 2 / 4 equal tasks with preemption and random yields get 100 / 50 / 25 % (within 0.1 point); nice −2/0/0/+3 shares match the weights within 1 % |

`flash_top_tb` runs the top with all parameters at their defaults and
finishes in about a second.

To run one with Verilator 5 (example for the top; use the testbench's name as
`--top-module`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module flash_top_tb rtl/flash_pkg.sv tb/flash_top_tb.sv
./obj_dir/Vflash_top_tb
```

`flash_core_tb` and `flash_top_tb` read the task table through hierarchical
references (`dut.u_core.u_data.mem`). This lets them check that every pick is
a true minimum. Keep those instance names if you restructure the core.

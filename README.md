# nHSE / nMPRA: a hardware scheduler engine with replicated pipeline registers

This is a small real-time microcontroller extension. It moves the core of a
real-time operating system into hardware: task scheduling, waiting for
events, timers, watchdogs, mutexes, message passing and interrupt routing.
Five hardware tasks ("semi-CPUs", SCPU0..SCPU4) share one 5-stage MIPS32-style
pipeline. Each task has its own copy of the PC and of every pipeline
register, so switching tasks needs no context save or restore. The scheduler
only changes which copy the shared logic sees. A task switch takes 6 machine
cycles: one cycle for the scheduler to respond and five for the switch.

The RTL here covers two parts:

* **nHSE**, the hardware scheduler engine. It has a local register block
  per task, which that task sees as MIPS coprocessor 2, and one global
  register block on the slow peripheral bus, which contains the scheduler.
* **nMPRA**, the replicated pipeline registers and their thread
  multiplexing.

The processor core itself is not included: datapath, ALU, control, COP0,
ROM, RAM, memory controller and peripherals. `nhse_top` brings out the ports
where that core connects.

## Block structure

```
nhse_top
 ├─ nhse_lr            ×5   local registers of SCPUi (COP2)
 │   └─ nhse_down_counter ×4   timer, watchdog, deadline 1, deadline 2
 ├─ nhse_gr                 global registers on the slow bus
 │   ├─ nhse_gr_mutex        grMutex[25]
 │   ├─ nhse_gr_int          grINT_ID[8]
 │   ├─ nhse_gr_erf          grERF[25]
 │   └─ nhse_scheduler       static dual-priority scheduler
 └─ nmpra_pipe_stage   ×5   PC, IF/ID, ID/EX, EX/M, M/WB, each replicated ×5
nhse_pkg                    shared types, bit positions, address map
```

Signal flow:

* Each local block tells the scheduler three things: whether its task may
  run (run bit), whether it sleeps in `wait` (TaskDeepSleep), and whether
  its watchdog expired (TaskNeedReset).
* The scheduler picks a thread (`sel_thread`). It drives per-thread stall,
  flush-request, start-again and reset pulses.
* The global block returns three event types to the local blocks: interrupt,
  mutex release and message.
* Mutex acquire and release go from a local block to the global block
  directly, not through the processor data path.

## The scheduler

This is the least obvious part. `nhse_scheduler` keeps every ready task in
exactly one of three queues. A task is ready when its run bit is set, it is
not sleeping in `wait`, and it has no pending reset.

| queue | who is in it | served |
|---|---|---|
| AQ, active | tasks that have just become ready (woken, started, reset) | by static priority, SCPU0 highest: the **Running State** |
| ITQ, interrupted | AQ tasks that lost the processor while still ready | by priority, only when no AQ task is ready: **Idle State** |
| LTQ, long | tasks that ran `cfg_ltq_limit` cycles without executing `wait` | round robin with `cfg_rr_quantum`, only when AQ and ITQ are empty: **Idle State** |

With no ready task at all the scheduler stays in the **Waiting State** until
an event wakes one.

A task in `wait` leaves the ready set rather than counting towards the
long-task limit. This is the purpose of TaskDeepSleep: a task that only waits
for an event is never demoted to the LTQ. Promotion and round robin both
count running cycles; the switch decision follows one cycle later. So a long
task keeps the processor for limit + 1 cycles, and each LTQ slice is
quantum + 1 cycles.

### Task switch timing

```
cycle   0        1        2..5       6
        ready    decision switch     new thread runs
        changes  flush[old]          start_again[new], sel_thread = new
        ^ the event      ^ all threads stalled for 5 cycles
```

* A thread that stops being ready, for example by executing `wait`, is
  stalled at once, in the same cycle.
* If a switch is already under way, a new decision waits for it to end. An
  event can then take up to 11 cycles to reach its task.
* `thread_reset_stall[i]` is a one-cycle pulse answering TaskNeedReset. It
  clears task *i*'s pipeline copies and reloads its counters.
* `flush_pipe[i]` is passed on to the core. The pipeline copies of a
  preempted thread are deliberately kept, so that its instructions in flight
  resume where they stopped.

### Configuration

Only SCPU0 may write the scheduler configuration. A write on the global bus
while another thread is selected is ignored. These are the registers:

| register | reset value |
|---|---|
| `LTQ_LIMIT` | 1024 |
| `RR_QUANTUM` | 64 |

## Local registers (`nhse_lr`, COP2)

The task reaches these registers with `mtc2`/`mfc2` and the `wait`
instruction. The core's decode stage drives the `cop2_*` port, and the top
routes the port to the selected thread's block. Writes take effect at the
next edge; read data is registered and valid one cycle later.

| no. | register | meaning |
|---|---|---|
| 0 | crTR | bits 0..6 enable the events T, WD, D1, D2, Int, Mutex, Syn; bit 7 `run` lets the task execute |
| 1 | crEV | bits 0..6 record events that occurred (only if enabled); bit 7 reads back `run` |
| 2–5 | mrTEV, mrWDEV, crD1, crD2 | reload values of timer, watchdog, deadline 1, deadline 2 |
| 6–9 | …_cnt | the four down counters (read only) |
| 10 / 11 | MTX_ACQ / MTX_REL | writing a mutex index acquires / releases it atomically |

* **Counters.** Each counter is loaded from its register when the task
  begins to run again. That happens on a wake-up from `wait`, when `run` is
  set, on a task reset, or when the reload register itself is written. A
  counter decrements once per cycle and raises its event when it reaches
  zero.
* **Timer.** The timer counts whenever `run` is set. A task that clears
  crEV and waits on the timer therefore recurs with a fixed period of
  reload + 1 cycles.
* **Watchdog and deadlines.** These count only while the task is awake. The
  watchdog is also reloaded by every `wait`, which is taken as the end of a
  successful run. When an enabled watchdog expires, the block sets WDEv and
  raises TaskNeedReset.
* **`wait`.** If no enabled event is pending, the task goes to deep sleep.
  The first enabled event wakes it, one cycle after the event input. If an
  enabled event is already pending, `wait` returns immediately. Software
  clears crEV by writing it.

## Global registers (`nhse_gr`, slow bus)

`bus_addr[7:6]` selects a region and `bus_addr[5:0]` selects a register in
it. Every access is acknowledged with data in the next cycle.

| region | registers | format |
|---|---|---|
| 0 grMutex | 25, read only | bit 31 taken, bits 4..0 owner task id |
| 1 grINT_ID | 8, r/w | bits 2..0: task that serves interrupt line *j* |
| 2 grERF | 25, r/w | bit 31 event, 30..28 source id, 27..25 destination id, 24..0 message |
| 3 scheduler | 0 LTQ limit, 1 RR quantum (SCPU0 only), 2 status | status = {ltq, itq, aq masks, state, valid, sel_thread} |

**Mutexes**

* A request for a free mutex gives it to the requester.
* A request for a taken mutex fails, and the requester is remembered as a
  waiter.
* A release is honoured only from the owner. It sends a one-cycle mutex
  event to every waiter, and a waiter that sleeps with Mutex enabled wakes
  and tries again.
* Requests from several tasks in the same cycle are served in task order.
* A request is handled two cycles after the `mtc2`: one cycle in the local
  block, one in the global block.

**Interrupts.** A rising edge on `irq[j]` gives a one-cycle interrupt event
to the task named in grINT_ID[*j*]. After reset every line belongs to SCPU0.

**Messages.** Writing a grERF register with the event bit set raises the
destination task's Syn event. The event stays up until the event bit is
written back to 0.

There are 25 mutex and 25 message registers: the square of the number of
tasks, so that every task can address every other task.

## Replicated pipeline registers (`nmpra_pipe_stage`)

One instance is one pipeline boundary, holding N_TASKS copies.

* The shared logic's result `d` goes into the selected thread's copy (the
  demultiplexer). This happens only when `adv` is high and that thread is
  not stalled.
* `q` shows the selected copy (the multiplexer).
* The other copies hold their contents.
* `flush[i]` clears copy *i*. In the top, only a task reset drives it.

The top has five instances: PC (32 bits), IF/ID (64), ID/EX, EX/M and M/WB
(128 each). The widths belong to the core and are parameters.

## Where this RTL departs from, or goes beyond, its source

The source design defines the register sets, the event bits, the three task
classes and the three scheduler states. It also gives the timing: a 1-cycle
scheduler response and a 5-cycle switch, 1 cycle inside each nHSE block,
and a 2-cycle local access.

It describes the scheduler's algorithm only in outline. These rules are
therefore this implementation's own:

* promotion to the LTQ after a configurable number of running cycles;
* demotion of a preempted active task to the ITQ;
* round robin in index order with a configurable quantum;
* the cycle positions of the flush, start-again and reset pulses;
* whether `flush_pipe` clears the copies (here it does not).

Also chosen here:

* the COP2 register numbers and the slow-bus address map;
* the bus handshake;
* the bit layout of grERF;
* 8 interrupt lines;
* one counter step per clock;
* all tasks running after reset;
* the default limits, 1024 and 64 cycles.

The source gives the local register access as 2 cycles in one place and 3 in
another. This RTL gives 2: one to fetch the instruction, one to execute it.

## Simulating

Every module compiles on its own with Verilator's lint and slang. There is
a self-checking testbench per block (`tb/tb_<module>.sv`). Each prints
`TB_RESULT checks=N failures=M`. For example (the testbenches raise some
width warnings, hence `-Wno-fatal`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
  rtl/nhse_pkg.sv tb/tb_nhse_top.sv --top-module tb_nhse_top -o sim
./obj_dir/sim
```

`tb_nhse_top` runs the whole design at its default parameters. It uses a
small behavioural model of the core, which runs one scripted program per
task. In that run:

* SCPU0 configures the scheduler and then recurs from its timer.
* SCPU1 holds a mutex through a long computation, then hangs until the
  watchdog resets it.
* SCPU2 blocks on that mutex.
* SCPU3 serves an interrupt, sends a message and sees a deadline alarm.
* SCPU4 waits for the message and then computes as a long task.

The testbench counts each mechanism and fails if one never occurs. The
mechanisms are:

* task switches and flushes;
* moves to the ITQ and the LTQ, and round-robin hand-overs;
* the Idle and Waiting States;
* the watchdog reset;
* wake-ups by timer, mutex, interrupt and message;
* the deadline alarm.

It also checks that the switch latency is 6 cycles, that the timer period is
exact, and that each thread finds its own pipeline contents again after
every switch.

The per-block testbenches add these checks:

* randomised reference-model checks for the mutex, interrupt, message and
  pipeline-register banks;
* the scheduler's queue and timing rules;
* the local block's counters, wake-up latency and recurrence.

# RTU — a real-time kernel co-processor with hardware interprocess communication

The Real-Time Unit (RTU) takes the kernel of a real-time operating system off the
application processors. Up to three CPUs share one bus to it. A CPU asks for a kernel
service by writing one 32-bit word into a register, and gets the answer a clock cycle later
in its status register. The RTU decides which process each CPU should run and interrupts
a CPU when it must switch. The CPUs keep only what really belongs to them: process
contexts, stacks and message data. The RTU keeps every process's state and priority, the
wait queues, timeouts, periods, semaphore counters and message-queue bookkeeping. It
updates all of them in parallel, so no service depends on the number of processes.

The RTL follows the RTU design described in a thesis on interprocess communication (IPC)
in special-purpose hardware. That thesis built several RTU variants: one for a single CPU
with counting semaphores, one with a message mechanism called the Virtual Communication
Bus (VCB), and one with VxWorks-style semaphores and message queues. This design puts
those units side by side in one RTU. It is written in synthesizable SystemVerilog-2017.

## Block overview

```
 CPU0 CPU1 CPU2 ── bus_req/bus_gnt ── rr_arbiter
   │    │    │
   └────┴────┴── addr/we/re/wdata/rdata ──► rtu_bus_if ──irq[2:0]──► CPUs
                                              │  ▲
                                  service req │  │ answer + action
                                              ▼  │
                                            rtu_svc ─┬─ rtu_sem   counting semaphores
                                              │      ├─ rtu_vcb   VCB message slots
                                              │      └─ rtu_rq    resource queues
                                         action│  ▲ waiter search
                                              ▼  │
 ext_irq ─► rtu_irq ─────────────────────► rtu_task_table ──tab──► rtu_scheduler
 rtu_timer ── tick, slice expiry ────────────┘                        │ next pid per CPU
 rtu_dbg  ◄── services, switches, interrupts                          └──► rtu_bus_if
```

| module | role |
|---|---|
| `rtu_pkg` | shared types: process states, wait objects, service codes, return codes, the action record |
| `rtu_top` | wires everything; ports are the CPU bus, one interrupt per CPU, bus arbitration, external interrupts |
| `rtu_bus_if` | register file, service handshake, process-switch interrupts, collisions |
| `rtu_svc` | service dispatcher; process, time, interrupt and signal services; hosts the three IPC units |
| `rtu_task_table` | process table, timeouts, periods, wait-queue search |
| `rtu_scheduler` | combinational choice of the next process for each CPU |
| `rtu_timer` | tick prescaler, time counter, absolute timer, round-robin slice timers |
| `rtu_irq` | external interrupt synchroniser and edge detector |
| `rtu_dbg` | trace FIFO of services, switches and interrupts |
| `rr_arbiter` | round-robin arbiter for the shared CPU bus |

## Register interface

All registers are 32 bits wide. Offsets are in bytes, and n is the CPU number (0, 1, 2).

| offset | name | access | contents |
|---|---|---|---|
| `$00` | RTUVR | R | version (`0x104`) |
| `$04` | RTUTCR | R | time counter, in ticks |
| `$08` | DBGR | R | oldest trace record; reading it removes the record |
| `$10+$20n` | CPUnSR | R | status register of CPU n |
| `$14+$20n` | CPUnSVCR | R/W | service register of CPU n: `[31:24]` operation, `[23:0]` argument |
| `$18+$20n` | CPUnCR | R/W | control: `[0]` interrupt acknowledge, `[1]` disable process switching |
| `$20+$20n` | RRTRn | R/W | round-robin time slice of CPU n, in ticks (0 = off) |
| `$24` | TOTR | R/W | clock cycles per tick (reset 50; 0 acts as 1) |
| `$28` | ATDR | R/W | absolute-timer reload value, in ticks |
| `$2C` | ATCR | R | absolute timer; counts down, reloads from ATDR and pulses `at_event` |

The status register holds:

| bits | field | meaning |
|---|---|---|
| `[31]` | ack | a service has been executed and waits for end-of-service |
| `[30]` | coll | the last service collided with a switch request and was rejected |
| `[29]` | irq | process-switch interrupt pending |
| `[28]` | blk | the service took the caller off the CPU (it blocked, or was terminated or suspended) |
| `[27:24]` | code | return code |
| `[23:8]` | value | return value. After a switch, this is the value the new process was woken with. |
| `[7]` | idle | no process on this CPU |
| `[6:0]` | pid | process now running on this CPU |

One bus access happens per cycle. Read data is combinational.

## The two protocols

This part is what software must get right.

**Service call.**

1. The CPU writes the service word into its SVCR. The RTU executes the service in that same
   clock cycle. From the next cycle, SR shows `ack=1` with the return code and value. While
   `ack` is set, the RTU never interrupts that CPU for a switch. A second service written
   now is refused with code REJECTED.
2. The CPU writes end-of-service (operation `0x01`), and `ack` drops.
   - If the caller is still running, nothing else happens.
   - If the service took it off the CPU (`blk=1`), the RTU puts the scheduler's choice into
     SR at the same clock edge. `pid` is the new process; `code` and `value` are what that
     process was woken with. The CPU switches to it with no interrupt.
   - The same applies to an idle CPU: start-up code that creates processes and ends its last
     service gets the first process this way.

**Process switch.**

- The RTU raises `irq[n]` when all of these hold:
  - the scheduler's choice for CPU n differs from the process running there;
  - CPU n is not inside a service;
  - CR[1] is clear.
- The CPU saves its context and writes CR[0]=1. At that clock edge the RTU switches:
  - the old process goes back to ready;
  - the chosen process becomes running and appears in SR with its wake code and value;
  - `irq` and the collision flag clear.
- If the CPU writes a service while its interrupt is pending, that is a collision. The service
  is not executed, and SR shows `coll=1` and code REJECTED. The CPU takes the switch and then
  repeats the call.

Because a woken process receives its result through the wake code and value, a blocking call
completes as follows:
- a semaphore pend ends with OK, TIMEOUT or FLUSHED;
- a message get ends with the buffer reference.

The process reads this from SR when it is switched back in, and does not need to repeat the call.

## Processes and scheduling

Each of the NPROC processes has one of six states: dormant, ready, running, blocked,
suspended, or waiting for an interrupt. It also has:
- a current priority and a base priority (6 bits; a larger number is more urgent);
- a 3-bit mask of the CPUs it may run on;
- the wait object it is blocked on, with an optional timeout in ticks;
- a period;
- the code and 16-bit value it was last woken with.

A process with a single-CPU mask is a "local" process of that CPU. One with several bits set
is "global" and can run on any CPU it allows.

`rtu_scheduler` is purely combinational. For CPU 0, then CPU 1, then CPU 2, it picks the
best candidate. A candidate is either:
- a ready process allowed on that CPU and not already picked for a lower-numbered CPU, or
- the process already running on that CPU.

"Best" is decided in this order:
1. Highest priority.
2. Among equal priorities, the running process keeps its CPU, unless its round-robin slice
   has expired. Once it has, any equal-priority ready process goes first.
3. Then the process that has been ready longest.

**Wait queues are not lists.** Whenever a process becomes ready or blocked, it takes a time
stamp from a free-running counter. The table has two search ports. Given a wait object, such
as "semaphore 3", "takers of resource queue 7" or "receivers of VCB slot 12", each port
returns two waiters:
- the longest-waiting one (FIFO order);
- the most urgent one, with the longest-waiting among equals.

This gives FIFO and priority wait queues for every object without storing any list. The cost
is a search over all processes in the cycle of the service. `rtu_svc` tells the table which
two objects the current service needs, and the IPC unit picks the FIFO or the priority
answer.

Each service produces one *action record*. It can do any of these:
- block the caller on an object, with a timeout;
- wake one process with a code and value;
- raise, restore or set a priority;
- release or kill every waiter of up to two objects;
- perform a process-management operation.

The table applies the record at the clock edge of the service. At the same edge it also
applies:
- ticks, which count down timeouts and periods;
- interrupt releases;
- the process switch.

## IPC units

**Counting semaphores (`rtu_sem`).** The configuration for one CPU has 16 semaphores, each
counting to 16. The operations are:
- create;
- delete, which refuses with WAITING while processes wait;
- pend, which blocks in FIFO order when the count is 0;
- release, which hands the unit to the longest waiter, or counts up until MAX_VALUE;
- read.

**Virtual Communication Bus (`rtu_vcb`).** There are 32 slots, and each holds up to 28
message references. A process *allocates* a slot and becomes its owner. Allocation fixes the
slot's settings:
- FIFO or priority order;
- a default priority;
- priority inheritance on message arrival;
- whether only the owner may receive.

Sending and receiving each take two steps:
- Sending: *put* hands out the reference of a free place, the sender copies the message into
  its buffer, and *put_ready* publishes it.
- Receiving: *get* returns the next reference, and *get_ready* frees the place and returns
  how many ready messages are left.

The reference is `{slot[4:0], place[4:0]}`, and software maps it to a buffer address. Each
place is in one of four states: free, being written, ready, or being read. Close therefore
reports messages that are still in flight.

Two things protect urgent messages:
- The last free place of a slot is kept for priority-3 messages.
- With inheritance, each *put_ready* raises the owner to `pinc[message priority]`. The
  four-entry priority-increment table resets to 3, 3, 4, 5 and can be changed with
  `SET_PINC`. After each *get_ready*, the owner's priority becomes the larger of its default
  priority and the pinc value of the most urgent message still waiting.

Blocked processes are handled like this:
- A receiver blocked on an empty slot is handed the next published message directly: it
  wakes with the reference as its value.
- A sender blocked on a full slot is released at the next *get_ready* and repeats its *put*.

**Resource queues (`rtu_rq`).** There are 256 entries. Each one can serve as a VxWorks
counting semaphore, a binary semaphore, a mutex with priority inheritance, or the counter of
a message queue. An entry holds a count and a maximum, and waiters can queue on both sides:
- *takers* wait while the count is 0 (busy semaphore, empty queue);
- *givers* wait while the count is at the maximum (full queue).

Take and give can be non-blocking, wait forever, or wait with a timeout. When a waiter
exists on the other side, the unit passes directly to it and the count does not change.

The other operations are:
- create, which returns the first free id;
- delete and flush, which release every waiter or terminate it;
- kill, which removes one named waiter;
- read, which returns the maximum, the count, or the waiting flags.

With inheritance, a taker that blocks raises the last taker to its own priority. Giving
restores the base priority.

**Signals.** OSE signal buffers stay in software. The RTU only keeps the waiting part:
- a receive blocks the caller on its own signal flag, with an optional timeout;
- a send to a waiting process wakes it.

## Time, interrupts, trace, bus

- **`rtu_timer`**
  - divides the clock by TOTR into ticks;
  - counts ticks in RTUTCR;
  - runs the absolute timer;
  - times each CPU's round-robin slice. The count restarts whenever that CPU switches, and
    an expired slice sets the CPU's yield flag.
- **`rtu_irq`**
  - synchronises the external interrupt inputs with two flip-flops and turns each rising edge
    into one event;
  - the event makes ready every process waiting for that interrupt;
  - an event that nobody waits for is kept as pending, and the next *wait for interrupt*
    consumes it and returns at once.
- **`rtu_dbg`** writes a 32-bit record for every executed service, every switch, and every
  interrupt event. The record holds the kind, CPU, operation or pid, return code and the low
  16 bits of the time counter. The FIFO has 16 entries and an overflow flag, which is cleared
  by reading. A full FIFO drops new records and sets the flag. The FIFO takes one record
  per cycle, so an interrupt event in the same cycle as a service or switch record is also
  dropped and flagged. Because it records in hardware, it does not change the timing of the software
  it observes.
- **`rr_arbiter`** grants the shared bus in rotation.
  - The grant is registered.
  - The owner keeps the bus as long as it requests.
  - A free bus goes to the next requester after the last owner.
  - This bounds the wait of each CPU by the other CPUs' accesses.

## Service reference

The full argument layouts are in `rtu_pkg.sv`. Return codes:

| code | name | code | name |
|---|---|---|---|
| 0 | OK | 8 | CLOSED |
| 1 | NOT_OK | 9 | NOT_OWNER |
| 2 | NOT_CREATED | 10 | WRONG_BUF |
| 3 | WAITING | 11 | EXISTS |
| 4 | NOT_FREE | 12 | BLOCKED |
| 5 | MAX_VALUE | 13 | TIMEOUT |
| 6 | EMPTY | 14 | FLUSHED |
| 7 | FULL | 15 | REJECTED |

Operations:

| op | service |
|---|---|
| `01` | end of service |
| `10` … `1B` | create, terminate, suspend, resume, set priority, delay, set period, wait period, wait interrupt, signal send, signal receive, task info |
| `20` … `24` | semaphore create, delete, pend, release, read |
| `30` … `3B` | VCB init, allocate, deallocate, open, close, get, get_ready, put, put_ready, flush, info, set pinc |
| `40` … `46` | resource queue create, delete, flush, take, give, kill, read |

Create takes the pid, priority, initial state (ready, blocked or suspended) and CPU mask.
Mask 0 means any CPU.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NPROC` | 128 | processes |
| `NIRQ` | 4 | external interrupt inputs |
| `NSEM`, `SEM_MAX` | 16, 16 | counting semaphores and their maximum count |
| `NSLOT`, `DEPTH` | 32, 28 | VCB slots and places per slot |
| `NRQ` | 256 | resource queues |
| `DBG_DEPTH` | 16 | trace FIFO entries |
| `TICK_DIV` | 50 | reset value of TOTR |

The following are fixed in `rtu_pkg`:
- three CPUs;
- 6-bit priorities (64 levels);
- 16-bit timeouts and return values;
- four message priorities.

The defaults are the largest sizes the thesis gives for each unit.

## Where this design departs from its source, or fills gaps

The thesis defines:
- the register names and offsets;
- both protocols and the collision rule;
- the service lists and their return conditions;
- the pinc table;
- the reserved last place;
- *get_ready* returning the number of messages left.

This design chose:
- the service codes, argument layouts, and status and control bit positions;
- the wait-queue search by time stamps;
- the hand-over of a unit or message to a woken process;
- the direct switch at end-of-service on an idle CPU;
- the meaning of TOTR, ATDR and the round-robin registers, which the register table only
  names;
- the trace record format and the DBGR register.

Specific departures and gaps:
- The thesis builds semaphores, VCB and resource queues into separate RTU variants. Here they
  coexist, and every unit shares one process table.
- The thesis describes a VCB *init* that sets ordering and inheritance for all slots. Here,
  these are chosen per slot at *allocate*, and *init* only frees every slot.
- The three-CPU configuration with resource queues has four interrupt sources, and that is
  the default here. One other variant has 32. `NIRQ` can be raised, but *wait for interrupt*
  carries only a 2-bit interrupt number.
- The RTL does not include a watchdog or general event flags.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. To build and run one with plain Verilator 5:

```
verilator --binary --timing --assert -Mdir obj rtl/rtu_pkg.sv rtl/<unit>.sv tb/tb_<unit>.sv --top-module tb_<unit>
obj/Vtb_<unit>
```

For `tb_rtu_svc`, `tb_rtu_top`, `tb_rtu_top_full` and `tb_rtu_ring`, list all of `rtl/*.sv` with
`rtl/rtu_pkg.sv` first.

- `tb_rtu_top` drives three CPU models over the arbitrated bus at reduced sizes. It makes
  each mechanism happen and counts it:
  - switch interrupt and collision;
  - semaphore block and wake;
  - VCB hand-over and the reserved place;
  - delay, priority inheritance, timed-out take and periodic start;
  - external interrupt and round-robin;
  - absolute timer, trace overflow and bus contention.
- `tb_rtu_top_full` runs the RTU with every parameter at its default: 128 processes, 256
  queues, 32×28 VCB. It covers a semaphore block and wake, a VCB hand-over and a delay.
- `tb_rtu_ring` is a small version of the benchmark application. Two rings of four
  processes pass tokens through semaphores on three concurrent CPU models, each acting as a
  small kernel. It checks that no token is lost or duplicated while processes migrate
  between CPUs.
- The unit tests compare against hand-worked results or small reference models. Examples:
  - `tb_rtu_scheduler` checks thousands of random tables;
  - `tb_rr_arbiter` checks random request patterns.

## Implementation notes

- The process table is built entirely from flip-flops, and the scheduler and waiter search
  are wide combinational trees over all processes. At 128 processes this is a large netlist,
  and synthesis takes a long time.
- The synthesizable logic has no latches or combinational loops. The only assertions are the
  arbiter's grant checks and the rule that no switch interrupt starts during a service.
- Process ids are 8 bits on the interfaces. Ids at or above `NPROC` are refused by the
  dispatcher.

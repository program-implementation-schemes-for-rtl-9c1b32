# Hardware control FIFO for scheduling software threads on data arrival

A system built from one processor and application-specific hardware often
runs its software as several small program threads. Each thread starts when
its input data arrives from the hardware, and then runs for a fixed time. The
processor runs one thing at a time, so something must decide which thread
runs next. This design makes that decision in hardware, in the order the data
arrived.

Every hardware-to-software channel ends in a **data queue**. A small
**FIFO control logic** watches each queue. When the queue holds a word and
the processor has enabled the thread that reads it, the control logic puts
that thread's identifier tag into a shared **control FIFO**. The processor's
scheduler is a short loop: it reads the control FIFO and, when the tag is
valid, resumes the thread the tag names. That thread takes its word from its
queue, does its work, and writes its tag to an acknowledge address. The
acknowledge lets its control logic announce the next word.

The configuration built here is a graphics controller. It has two threads,
line drawing (tag 2) and circle drawing (tag 1). Each has a 16-bit, one-word
input queue, and they share a 3-deep control FIFO. An interval timer for
rate-driven I/O sits beside the interface on the same bus.

## Block structure

```
                 system bus (processor is the only master)
  ───────────────┬──────────────────────────────────────────────
                 │
            ┌────┴─────┐  up_en[c], up_ab[c]      ┌──────────────────┐
            │ bus_regs │─────────────────────────▶│fifo_control_logic│ x2
            │ decoder  │◀── in_data, q_rq ──┐     │ wait/enqueue/done│
            └┬───┬───┬─┘                    │     └──┬───────────▲───┘
  cf_deq,    │   │   │ out_enq              │    gn,tid      cf_ak
  head tag   │   │   ▼                      │        ▼           │
     ┌───────┴┐  │ ┌──────────┐       ┌─────┴─────┐ ┌──────────────┐
     │control │◀─┘ │ output   │──▶ HW │ input     │ │ control_fifo │
     │ FIFO   │    │data_queue│       │data_queue │ │ (3 x 2 bit)  │
     └────────┘    └──────────┘       └─────▲─────┘ └──────────────┘
                                            │ HW writes words
                 io_timer ──▶ tm_irq
```

The `hwsw_interface` top holds, per channel `c`, one input `data_queue`, one
`fifo_control_logic` and one output `data_queue`. It also holds one
`control_fifo`, one `io_timer` and the `bus_regs` decoder. Shared constants
and types are in `hwsw_pkg`.

## The thread-announce handshake

This handshake is the part that needs care. Each channel's control logic has
three states.

| state   | gn | leaves when   | to      |
|---------|----|---------------|---------|
| wait    | 0  | `up_en & q_rq` | enqueue |
| enqueue | 1  | `cf_ak`        | done    |
| done    | 0  | `up_ab`        | wait    |

- `q_rq` is high while the input queue holds a word.
- `up_en` is the processor's enable bit for the thread.
- `cf_ak` is the control FIFO saying it has taken the tag.
- `up_ab` is the thread's acknowledge.

The done state matters. The word stays in its queue until the thread reads
it, so `q_rq` stays high. Without done, the control logic would enqueue the
same tag again and again. So each thread has at most one tag in the control
FIFO at any time. Two threads therefore need at most two of the three
entries.

The control FIFO ORs the `gn` requests. It writes one tag per clock, serving
the lowest-numbered channel (line) first, and returns `cf_ak` to that channel
in the same cycle. Nothing is written while the FIFO is full. A requester
that is not served keeps `gn` high and is served on a later clock.

Timing, from a word written into an empty input queue whose thread is enabled
and idle:

1. Edge 1: the word is stored and `q_rq` rises.
2. Edge 2: the control logic enters enqueue (`gn`=1, `cf_ak` combinational).
3. Edge 3: the tag is in the control FIFO and the scheduler can read it.

A tag read dequeues it. The thread reads its data word (which dequeues it)
and writes its tag to `0xac0000`. From then on, the next word in the queue
can be announced.

## Address map

All registers are 32-bit bus words. An access lasts one clock. Read data is
combinational in the same cycle. A read or write takes effect at the clock
edge that ends the access.

| address | access | meaning |
|---|---|---|
| `0xee000` / `0xee010` | read  | line / circle input word; the read dequeues it |
| `+0x4` | read  | bit0 `q_rq` (input queue holds data), bit1 output queue full |
| `+0x8` | r/w   | bit0 `up_en`, thread enable (0 after reset) |
| `+0xc` | write | put bits[15:0] into the channel's output queue |
| `0xab0000` | read | bit2 valid, bits[1:0] tag; a valid read dequeues the tag |
| `0xaa0000` | read | bit0 empty, bit1 full, bits 4 and up occupancy |
| `0xac0000` | write | bits[1:0] = tag; pulses `up_ab` of that thread |
| `0xee040` | r/w | timer interval (81 after reset) |
| `0xee044` | write / read | write: restart the timer and clear the interrupt; read: bit31 irq, low bits count |

The scheduler loop is therefore:

```
do t = *0xab0000; while (!(t & 4));
resume(t & 3);
```

Unmapped reads return 0. A simultaneous read and write is a protocol error,
and an assertion flags it.

## Interval timer

`io_timer` supports the other I/O scheme. There, a rate-constrained read or
write runs as an interrupt service routine at fixed intervals. The timer
counts down once per clock. When it reaches zero it raises `tm_irq` and holds
it. The service routine does the I/O and writes the restart register, which
reloads the interval and clears the interrupt. After a restart, the interrupt
comes exactly `interval` clocks later.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| hwsw_interface | `N_CH` | 2 | channels/threads; set `CH_BASE` and `CH_TID` to match |
| | `DQ_WIDTH`, `DQ_DEPTH` | 16, 1 | input queues |
| | `OQ_DEPTH` | 1 | output queues (own choice) |
| | `CF_DEPTH` | 3 | control FIFO entries |
| | `TIMER_W` | 16 | timer width (own choice) |
| control_fifo | `N_SRC`, `DEPTH` | 2, 3 | requesters and entries |
| fifo_control_logic | `TID` | 2 | tag it announces |

Tags are 2 bits wide (`hwsw_pkg::ID_W`), so up to three threads (tags 1–3)
can be told apart by the valid-flag read format.

## Where this design departs from, or fills in, the original scheme

The original scheme gives the following: the three-state control logic and
its signal names, the OR-ed enqueue request, the rule that nothing is
enqueued while full, the line/circle tags, the 16-bit one-word data queues,
the 3-deep control FIFO, the valid flag in bit 2, and the example addresses
`0xee000`/`0xee004`/`0xee008` and `0xaa0000`/`0xab0000`/`0xac0000`.

The following are choices made here:

- **Control FIFO depth.** One description of the scheme declares the control
  FIFO one entry deep; the graphics controller uses three. Three is built.
- **Meaning of `0xaa0000` and `0xac0000`.** Only their names are known. Here
  they are a status word and the per-thread acknowledge. `up_ab` comes from
  the thread's write of its tag, not from the scheduler's read, so that a
  word cannot be announced twice before its thread has consumed it.
- **Circle channel address.** It is placed at `0xee010`. Only one channel's
  addresses were given.
- **Output queues.** Output queues for the threads' results, and their
  address `+0xc`, are added here. The hardware that consumes them (video-RAM
  transfer) is not part of this RTL.
- **Arbitration.** Fixed priority (line first) for simultaneous enqueue
  requests.
- **Bus protocol.** Single-cycle strobes with combinational read data, not
  modelled on a particular processor's bus.
- **Reset.** Asynchronous, active low. All queues empty, threads disabled,
  control logic in wait, timer loaded with 81 and no interrupt.
- **Timer.** The width, the stop-at-zero behaviour, the level interrupt and
  the interval register are choices made here. The default interval of 81
  clocks is the input period measured for the hardware-FIFO graphics
  controller.

A queue written by several producers, or read by several threads, is served
by OR-ing their requests or dequeue strobes into the one `q_rq` or `deq`
line. The graphics controller does not need this, so it is not wired here.

The original hardware control FIFO with three requesters was reported at
228 gates. The yosys cell counts of this RTL are word-level and cannot be
compared with that number directly.

Not included:

- The processor.
- The memory.
- The application-specific drawing hardware.
- The software-FIFO variant, in which `q_rq` drives processor interrupts and
  the tags are queued by interrupt routines.

The testbenches contain behavioural stand-ins for the processor and the
hardware.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_data_queue`: random traffic at depths 1 and 4 against a reference
  queue, plus the one-clock write-to-visible latency.
- `tb_fifo_control_logic`: a directed round through all three states, then
  random stimulus against a reference state machine.
- `tb_control_fifo`: three requesters holding `gn` until served, plus random
  dequeues against a reference. It covers priority, full blocking and tag
  order, and runs a directed fill and drain at the default size.
- `tb_bus_regs`: random accesses to every mapped and unmapped address. It
  checks read data and every strobe.
- `tb_io_timer`: the default 81-clock and a loaded 10-clock interval, plus a
  random interrupt service routine against a reference counter.
- `tb_hwsw_interface`: end to end at the default parameters. A scheduler
  model and two thread models process 300 words per channel. The test counts
  the mechanisms and fails if any never occurred:
  - empty polls;
  - both tags pending at once;
  - simultaneous requests;
  - input backpressure;
  - a disabled thread holding its data;
  - the done state holding a second word;
  - a full output queue;
  - timer interrupts.

  It also checks the 3-clock tag latency and a 40-clock timer interval.
- `tb_graphics_controller`: the graphics workload. Line endpoints and circles
  (the first of radius 5, drawn together with a line) arrive on the two
  channels. The thread models draw them, and the hardware side checks each
  shape geometrically. It prints the clocks per output coordinate. These
  figures reflect the idealised thread models, not a real processor's
  instruction timing.

To simulate with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/hwsw_pkg.sv tb/tb_hwsw_interface.sv --top-module tb_hwsw_interface
./obj_dir/Vtb_hwsw_interface
```

Substitute any other testbench name. The design has no `x` dependence, but
the testbenches reset everything they read, so a two-state simulator with
random initial values runs them unchanged.

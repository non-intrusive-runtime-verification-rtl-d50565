# Observer entity: non-intrusive runtime verification on an SoC bus

Software on a safety-critical SoC (a satellite's navigation computer, for
example) has timing properties that must hold: a task must finish within its
time budget, and must not overrun several times in a row. Checking such
properties in software means instrumenting the code, which perturbs exactly
the timing being checked. This design checks them in hardware instead. An
*observer entity* sits on the SoC bus next to the processor and only listens.
It picks out configured events of interest from the bus traffic, such as the
fetch of a task's first or last instruction, a write to a variable or an
interrupt vector. It stamps each event with its own time and feeds the event
stream to a hardware monitor. The monitor evaluates a specification written as
stream equations and raises an interrupt when the property is violated. The
software never executes a single extra instruction.

The monitor here checks one property, a task's execution time:

    runtime    := on(return, time(return) - time(call))
    violations := resetcount(runtime, runtime <= threshold)
    error      := violations >= 3
    overrun    := delay(on(call, threshold), return)

The monitor is not hand-written logic. It is a network of small *stream
operator* nodes (`time`, lifted arithmetic, `on`, `last`, `delay`, constants),
one node per operator of the equations. A different specification is a
different wiring of the same nodes.

## Block structure

```
            snooped SoC bus                  management accesses (SoC bus)
                  |                                     |
             +---------+  alarm_irq            +------------+
             | bus_if  |<------------+         |  mgmt_if   |--> time_base (enable,
             +---------+             |         +------------+     clear, prescale)
                  | bus sample       |                |
                  v                  |                v
      +-----------------+  evt, now  |         +------------+
      | system_observer |------------+-------->| obs_config |  event table,
      +-----------------+  task_monitor        +------------+  call/return IDs,
          ^ ts        ^ event table  (report)       |          threshold
     time_base        +-----------------------------+
```

| module | role |
|---|---|
| `observer_entity` | top; wires the blocks below |
| `bus_if` | bus interfaces: turns transfers and interrupt vectors into one bus sample per cycle; drives `alarm_irq` |
| `mgmt_if` | management interface: register slave for configuration and status |
| `obs_config` | configuration: event table (8 entries) and monitor settings |
| `time_base` | timestamp counter with prescaler |
| `system_observer` | matches samples against the event table and emits `<obsID, a, v, t>` plus a progress timestamp |
| `task_monitor` | the monitor for the task-runtime property, built from the nodes below |
| `tessla_time`, `tessla_lift`, `tessla_on`, `tessla_last`, `tessla_delay`, `tessla_const` | stream operator nodes |
| `tessla_resetcount` | `resetcount(trigger, reset)` built recursively from nodes |
| `rvmon_pkg` | shared types, widths and the register map |

The host SoC is not part of this RTL: processor, memory controller, interrupt
controller, timer and I/O interfaces. Its connection points appear as the top
module's ports.

## From bus traffic to events

`bus_if` registers every bus transfer into a `bus_sample_t` with a kind
(`FETCH`, `READ`, `WRITE`, `IRQ`), an address and data. The bus is modelled as
a generic snoop port (`bus_valid`, `bus_write`, `bus_fetch`, `bus_addr`,
`bus_data`). Connect it to whatever carries the processor's traffic, such as an
AHB monitor or the processor-cache interface. Interrupt vectors enter on
`irq_valid`/`irq_vec` and become samples of kind `IRQ`, with the vector number
as the address. Only one sample can leave per cycle. When a transfer and a
vector arrive together, the transfer goes first and the vector waits in a
one-entry holding register. If a second vector arrives while one is waiting,
the new vector is lost and the sticky `irq_overflow` status bit is set.

`system_observer` compares each sample with all event-table entries in
parallel. Entry *i* matches when all three of these hold:

- it is enabled;
- the sample's kind bit is set in its kind mask;
- `(addr ^ entry.addr) & entry.mask == 0`.

The lowest matching index becomes the obsID. The output `evt` carries the
obsID, the observed address, the observed value and `ts`, the time-base value
in the cycle the sample was examined. Entries can be rewritten while the
system runs. A mask that leaves out low address bits makes one entry cover an
address range.

## How the monitor evaluates streams

This is the part that needs the most care when changing the design.

**One timestamp per cycle.** Next to `evt`, the system observer emits `now`
every cycle. `now` is the timestamp of the sample it just examined, whether or
not that sample matched. This is the *progress* information: it tells the
monitor that nothing else happened up to `now`. Even without events, the nodes
always know how far time has advanced. `delay` depends on this to fire at a
deadline when no event arrives. In each cycle every stream is one `stream_t`.
Its `valid` bit means "this stream has an event at timestamp `now`", and
`value` is the event's value. `now` never goes backwards and advances by at
most one per cycle, so events reach the monitor already in time order. No
reordering logic is needed.

**Nodes are Mealy machines.** Each node's output is combinational in its
inputs and its registered state. So a whole equation network settles within
the cycle of the event that triggers it, and all outputs belong to the same
timestamp as their cause. The state holds "the last value seen" of operands,
a deadline or a flag. It updates at the clock edge.

**Signal semantics.** `tessla_lift` applies its operator to the *latest*
value of each operand. It emits when either operand has an event and both
have been defined. So `time(return) - time(call)` uses the most recent call
time at each return. `tessla_on(trigger, x)` samples x at the trigger's
events, and an x event at the same timestamp counts as current.
`tessla_last(v, trigger)` returns the value strictly *before* the current
timestamp.

**Recursion without loops.** `resetcount` needs its own previous output:

    count := if on(trigger, reset) then 0 else last(count, trigger) + 1

`last()` outputs only registered state, so the feedback passes through a
register, and the netlist has no combinational loop. This is the general
rule: a specification may be recursive only through `last()` or `delay()`,
and both are register-cut.

**Constants are streams too.** `tessla_const` emits its value once after reset
and again whenever the value changes. The threshold register and the literal
3 therefore behave as defined operands, and rewriting the threshold takes
effect at once.

### The task-runtime monitor (`task_monitor`)

The call and return streams are the events whose obsIDs equal the configured
`call_id` and `ret_id`. The monitor evaluates:

| stream | meaning |
|---|---|
| `runtime` | at each return: return time minus the latest call time (ticks) |
| `violations` | at each return: number of consecutive returns with `runtime > threshold`; 0 after one within the threshold |
| `error` | level, set once `violations >= ERR_LIMIT` (3); cleared only by the monitor-clear command |
| `overrun` | one-cycle pulse at `call time + threshold` if the task has not returned by then |
| `report` | pulse at the rise of `error` and at each `overrun`; sets `alarm_irq` in `bus_if` |

`overrun` comes from `delay`. It fires while the task is still running, so the
system can cancel an overrunning task before it returns. `runtime`,
`violations` and `error` can only react at the return. A run that lasts
exactly `threshold` ticks counts as within the threshold for `violations` but
still pulses `overrun`, because the deadline is reached in the same cycle.

## Registers

All accesses are single-cycle: hold `mg_sel` (and `mg_wr`, `mg_addr`,
`mg_wdata`) for one cycle. `mg_ready` and, for reads, `mg_rdata` follow in the
next cycle. Byte address bits [1:0] are ignored.

| address | name | access | contents |
|---|---|---|---|
| 0x000 | CTRL | rw | [0] observer enable, [1] time base enable |
| 0x004 | CMD | w | write 1: [0] clear time, [1] clear monitor, [2] clear alarm and overflow |
| 0x008 | PRESCALE | rw | [15:0]: time advances every PRESCALE+1 clock cycles |
| 0x00C | TIME | r | current time |
| 0x010 | MONIDS | rw | [7:0] call obsID, [15:8] return obsID |
| 0x014 | THRESH | rw | runtime threshold, in ticks |
| 0x018 | STATUS | r | [0] alarm, [1] interrupt-vector overflow, [2] error |
| 0x100 + 16*i | EVT*i*.ADDR | rw | address to match |
| 0x104 + 16*i | EVT*i*.MASK | rw | address bits that must match |
| 0x108 + 16*i | EVT*i*.CTRL | rw | [0] enable, [4:1] kind mask (bit 1 fetch, 2 read, 3 write, 4 interrupt) |

Everything resets to zero: no events enabled, time stopped, observer off.
Command pulses act at the clock edge after the access completes.

## Timing

- A bus transfer appears as a sample one cycle later (`bus_if`). A vector
  that had to wait appears two cycles later.
- The sample is matched and leaves as `evt`/`now` one cycle after that
  (`system_observer`).
- The monitor's outputs and `report` are combinational in that cycle.
  `alarm_irq` is registered, one cycle later. Bus activity reaches the
  interrupt in three cycles.
- Timestamps are taken when the observer examines a sample, one cycle after
  the transfer. Every event has the same offset, so differences such as
  runtimes are exact in ticks.

## Parameters and sizes

| parameter | default | where |
|---|---|---|
| `NUM_EVT` | 8 | event-table entries (`observer_entity`, `obs_config`, `system_observer`) |
| `ERR_LIMIT` | 3 | violations in a row that make an error (`task_monitor`) |
| `TS_W`, `PRESCALE_W` | 32, 16 | time base |
| `ADDR_W`, `DATA_W`, `VAL_W` | 32 | package constants: address, data, stream value |
| `ID_W`, `VEC_W` | 8 | package constants: obsID, interrupt vector |
| `MAW` | 12 | management byte-address width |

The limit of three violations in a row and the use case itself (a periodic
navigation task whose result is needed at least every third execution) come
from the source description. Neither the number of events, nor the widths,
nor the register map is specified there. These are this design's choices. The
32-bit widths suit a 32-bit SPARC (Leon) host.

## Where this design goes beyond, or departs from, the source description

- **Error threshold.** The prose asks for an error when the threshold "is
  violated three times in a row". The published stream equation reads
  `count_violations > 3`, which would need four. This design follows the
  prose: `violations >= 3`.
- **`resetcount`** was only named in the source, not written out. Here it
  counts only at trigger events, and `reset` is sampled at those events.
- **`overrun`** is an addition. It lets the monitor flag a task that is
  running past its threshold, so that the task can be cancelled. It uses the
  `delay` operator.
- **Time into the monitor.** In the original block diagram the time base feeds
  the monitor directly. Here the monitor takes time from the observer's `now`,
  which is the time-base value delayed by one stage. This keeps the events and
  the progress timestamps aligned.
- **Monitor report path.** The monitor reports back through the bus
  interfaces as an interrupt line (`alarm_irq`). Status is readable through
  the management registers. The source draws the arrow but does not say what
  travels on it.
- **Not included.** The source names a library of basic value- and time-domain
  monitors, with selectors, transformers and past-time event registers, and
  refers to other work for it. The operator nodes here play that role for the
  one property built. The compiler that turns stream specifications into
  node networks is software and is not included. `task_monitor` is that
  network written out by hand.
- **One observation port.** The bus interfaces have one snoop port. Watching
  the system bus and the processor-cache interface at the same time, as the
  SoC diagram suggests, would need a second `bus_if` and a merge in front of
  `system_observer`.
- **One pending deadline.** `tessla_delay` holds one pending deadline. A new
  `d` event re-arms it, and `d` wins over a `reset` at the same timestamp.

## Simulating

Every block has a self-checking testbench in `tb/` named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rvmon_pkg.sv \
          tb/tb_observer_entity.sv --top-module tb_observer_entity
./obj_dir/Vtb_observer_entity +verilator+rand+reset+2
```

Swap the testbench name to run another block. `tb_observer_entity` runs the
whole design at its default parameters. It configures the entity through the
management port, then plays bus traffic with 35 task executions at
prescaler 0 and 2, interleaved with unrelated accesses, variable writes,
address-range hits and colliding interrupt vectors. It checks every emitted
event, runtime, violation count, error level and overrun against its own
model. It also counts how often each mechanism occurs: event match, deferred
and dropped vector, runtime within and over the threshold, error, overrun,
alarm and alarm clear, monitor clear, prescaled time, disabled observer and
configuration read-back. A mechanism that never occurs counts as a failure.
The testbenches are written for a two-state simulator and initialise
everything they read.

## Changing the monitored property

To check a different property, write a new monitor module like
`task_monitor`:

1. Filter `evt` by obsID into input streams.
2. Instantiate one node per operator of the equations.
3. Wire the outputs to `report`.

New lifted functions go into `lift_op_e` and the case statement of
`tessla_lift`. Keep recursion through `tessla_last` or `tessla_delay` only.
Any other feedback path is a combinational loop.

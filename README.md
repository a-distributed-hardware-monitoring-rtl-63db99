# Distributed runtime-verification monitor for a tiled MPSoC

A multi-core chip runs software whose correctness depends on *when* and *in what order* things
happen on different cores: a lock taken before a shared variable is written, a task finished
before its deadline, a value staying inside a valid range. This RTL watches the cores while they
run and checks such requirements in hardware, without slowing the software down and without
software instrumentation.

The central idea is a **single, globally ordered event trace**. Every core gets a *probe* that
turns what the core does (the program counter reaching an address, a result written back, its
power draw leaving a corridor) into small *trace elements* `(event ID, timestamp, cluster ID)`.
All probes share one synchronised 8-bit timestamp. The elements of all probes in a tile are
merged oldest-first, and a dedicated tracing interconnect, **SortNoC**, merges the traces of all
tiles into one stream sorted by timestamp. It then broadcasts that stream back to every tile.
Each tile's *tile monitor* keeps the elements of its own cluster. It runs them through 32 small
*automata processors*, which check ordering requirements, and 32 *timers*, which check latency
requirements. When a requirement fails, the tile's interrupt is raised.

Because every monitor sees the same ordered trace, a requirement that spans cores in different
tiles can be checked by one automaton in one place. The cost is an interconnect that must keep
the order. SortNoC does this with delay lines and comparators instead of a sorting buffer.

```
 core ─trace─► probe ─┐
 core ─trace─► probe ─┼─► tile monitor ──► network ──► SortNoC router ─┐   (one per tile)
      ...             │   (arbiter,          adapter                    │
 core ─trace─► probe ─┘    APs, timers,  ◄── cluster ◄── broadcast ◄────┘
        ▲ halt             config memory)    filter
        └──────────────────── pipeline halt when a probe buffer is full
```

The default build is the demonstrated system:
- 2 × 2 tiles with 5 cores each, so 20 probes and 4 tile monitors.
- 32 automata processors and 32 timers per tile monitor.
- 32 checkpoint and 32 out-of-range comparators per probe.

## Trace elements and the timestamp wheel

A trace element is `{ev[7:0], ts[7:0], cl[1:0]}` (`mon_pkg::trace_t`). Event ID `8'hFF` is reserved
for the *end-of-period* (EOP) marker.

Timestamps are only 8 bits wide, so they wrap every 256 cycles, and "older" cannot be a plain
`<` comparison. Picture the 256 values on a wheel. Two timestamps split it into two arcs whose
lengths add up to 256. The shorter arc gives the true order, as long as the two events are less
than half a turn apart. `mon_pkg::get_first(a, b)` computes `d = (b.ts − a.ts) mod 256`:
- `a` is the older element when `d ≤ 127`.
- Otherwise `b` is older.
- On equal timestamps an EOP marker wins. Otherwise operand `a` wins, so arbiters prefer their
  lower input.

Every merging point in the design uses this one function: the probe arbiter, the tile arbiter and
the SortNoC crossbars. The ordering is therefore exact only while no element waits in a buffer
for 128 cycles or more. The probe buffers are 4 deep, and the halt mechanism keeps them from
overflowing, so in normal use the bound is far away.

### End of period and the timer arithmetic

Exactly one probe in the system, probe 0 of tile 0 (`HAS_EOP`), contains the EOP detector. It
emits an EOP marker each time the timestamp counter wraps to 0. No monitor filters EOP markers
out, so every timer sees every period boundary.

A timer checks a requirement `(e_start, e_stop, T_min, T_max)`. On `e_start` it stores the
timestamp and clears an EOP counter `N`. It increments `N` on every EOP marker. On `e_stop` it
computes

```
T = ts_stop − ts_start + N · 256
```

and passes if `T_min ≤ T ≤ T_max`.

If `e_stop` never comes, the timer cannot know how far into the first period the start was. It
fails the requirement at the EOP marker where the *old* counter value satisfies `N · 256 > T_max`.
By then, at least `N` full periods have certainly passed. A missed deadline is therefore
reported at most 255 cycles late. For example, with `T_max = 341` and a start two cycles before a
wrap, the failure comes at the third EOP marker.

After a pass the timer re-arms for the next `e_start`; a fail is sticky. Latency is 32 bits wide.

## Probe (`probe.sv`)

Per core, in parallel:
- `timestamp_gen`: 8-bit free-running counter. It can be reloaded system-wide with
  `ts_sync_load`/`ts_sync_value`, and it gives the wrap pulse.
- `eop_detector`: turns the wrap pulse into an EOP element, timestamp 0. It is present only when
  `HAS_EOP` is set.
- `power_detector`: fires once when the power sample leaves the corridor `[pmin, pmax]`.
  It fires on the edge, not on every sample outside.
- `checkpoint_detector`: `N_CP` comparators on the executed PC. It emits the event ID and cluster
  ID of the matching entry.
- `oor_detector`: `N_OOR` comparators on the write-back result of a watched instruction address.
  Bounds are checked as unsigned 64-bit, signed 64-bit, IEEE single or IEEE double values. A NaN
  counts as out of range. Floats are compared through an order-preserving integer key, not a
  floating-point unit.
- `probe_config`: the detector registers, written over the probe configuration bus.

The power, checkpoint and out-of-range detectors each feed a 4-entry FIFO (`sync_fifo`). The EOP
element waits in a single register. A 4-input `ts_arbiter` merges the heads oldest-first into an
output FIFO read by the tile monitor. `halt` is high while any detector FIFO is full. The core
must then stall and hold its trace inputs, so nothing is lost. An event seen in cycle 0 reaches
the head of the output FIFO in cycle 2 when there is no contention.

Probe configuration word map (9-bit word address):

| word            | contents                                                          |
|-----------------|-------------------------------------------------------------------|
| `0x000`         | `[0]` EOP enable, `[1]` power detector enable                     |
| `0x001`         | power event: `[7:0]` event ID, `[9:8]` cluster                    |
| `0x002`/`0x003` | power corridor min / max, 16 bit                                  |
| `0x040+k`       | checkpoint k PC                                                   |
| `0x060+k`       | checkpoint k `[7:0]` event, `[9:8]` cluster, `[16]` enable        |
| `0x100+8k+0`    | out-of-range k watched PC                                         |
| `0x100+8k+1`    | `[7:0]` event, `[9:8]` cluster, `[13:12]` type (0 u64, 1 s64, 2 f32, 3 f64), `[16]` enable |
| `+2/+3`, `+4/+5`| lower / upper bound, low word first                               |

## Tile monitor (`tile_monitor.sv`)

- **Arbiter:** a `ts_arbiter` over the `N_P` probe outputs builds the tile-local trace.
- **Network adapter:** a register stage towards the router. On the way back it filters by cluster
  ID: it keeps elements of this monitor's cluster and every EOP marker, and registers them for
  one cycle.
- **Automata processors:** `N_AP = 32`. Each is a transition table of `16 states × 256 events`,
  4 bits per entry (next state), addressed by `{state, event}`. It has a start state `v0` and two
  absorbing verdict states, `v_t` (pass) and `v_f` (fail). An element the requirement does not
  care about must be programmed as a self-loop. EOP markers never move an automaton.
- **Timers:** `N_TMR = 32`, as described above.
- **Probe configuration loader:** a 1024 × 32 memory written by software, plus a 4-entry FIFO of
  load requests. A request `[30:28]` probe, `[27:19]` first register, `[18:10]` words − 1,
  `[9:0]` first memory word copies that block into the probe, one word per cycle. A request of
  L words takes L + 1 cycles. Software issues one bus write per reconfiguration.
- **APB slave:** 12-bit byte address. `PREADY` drops only while a `CFG_REQ` write waits for room
  in the request FIFO.

| addr    | register | access | contents |
|---------|----------|--------|----------|
| `0x000` | CTRL     | RW | `[1:0]` cluster ID |
| `0x004` | STATUS   | RO | `[0]` irq, `[1]` loader busy |
| `0x008` | AP_FAIL  | RO | bit k = AP k failed |
| `0x00C` | TMR_FAIL | RO | bit k = timer k failed |
| `0x010` | AP_PASS  | RO | |
| `0x014` | TMR_PASS | RO | |
| `0x020` | CFG_ADDR | RW | next configuration-memory word |
| `0x024` | CFG_DATA | WO | write word, auto-increment CFG_ADDR |
| `0x028` | CFG_REQ  | WO | push a probe load request |
| `0x040` | AP_SEL   | RW | selected AP |
| `0x044` | AP_ADDR  | RW | table entry `{state, event}` |
| `0x048` | AP_DATA  | WO | next state, auto-increment AP_ADDR |
| `0x04C` | AP_CTRL  | WO | `[3:0]` v0, `[7:4]` v_t, `[11:8]` v_f, `[16]` enable; restarts the AP |
| `0x050` | AP_STATE | RO | current state of the selected AP |
| `0x060` | TMR_SEL  | RW | selected timer |
| `0x064` | TMR_EVT  | RW | `[7:0]` start, `[15:8]` stop event |
| `0x068` | TMR_MIN  | RW | T_min |
| `0x06C` | TMR_MAX  | RW | T_max |
| `0x070` | TMR_CTRL | WO | `[0]` enable; loads the timer and re-arms it |
| `0x074` | TMR_LAT  | RO | last measured latency |

`irq` stays high while any AP or timer holds a fail verdict. It is cleared by restarting or
reprogramming that unit. `violation` pulses once per new failure.

## SortNoC (`sortnoc.sv`, `sortnoc_router.sv`, `delay_stage.sv`)

One tile is the *target*: `(MX/2, MY/2)`, so router r3 in the 2 × 2 mesh. Every router forwards
towards it along a fixed XY route, and the routes form a tree rooted at the target. Each router
has:
- A local FIFO, followed by a **delay line** of `N_diam + 1 − N_h2t` cycles, where `N_diam` is the
  mesh diameter and `N_h2t` the router's hop count to the target. In the 2 × 2 mesh the delays are
  r0 = 1, r1 = 2, r2 = 2, r3 = 3. An element injected anywhere reaches the target crossbar after
  the same number of cycles. Elements injected in the same cycle therefore meet at the crossbars
  and are compared there.
- An input FIFO for each child that routes through it.
- A **crossbar that is a `ts_arbiter`**: among the heads present, it forwards the oldest.

The cascade of arbiters is a distributed merge of sorted streams. The target's crossbar output is
the global trace, at most one element per cycle for the whole system. It is sent back down the
tree on a **broadcast path** of one register per router, which has no contention and no
back-pressure. Forward links use valid/ready; a full input FIFO stalls the child, and the stall
reaches the tile arbiters and finally the probes.

Without contention an element takes:
- 1 cycle in the local FIFO,
- the delay,
- 1 cycle per hop to the target,
- 1 cycle per hop back.

From a core event to the tile interrupt, the end-to-end test measures **12 cycles**.

The delay line is elastic: each stage is a register with valid/ready, so a stalled line keeps
its contents and a full line still moves one element per cycle.

### Latency on larger meshes

`sortnoc` takes the mesh size and the target position as parameters. `tb_sortnoc_scaling`
sends 10,000 random elements through meshes of several sizes, with the target in the centre.
Each router generates elements independently. The measured latency runs from generation at the
source to delivery at each router, averaged over all copies:

| mesh | 0.1 elements/cycle | 0.5 | 0.9 |
|------|-------------------:|----:|----:|
| 2×2  | 6.04               |     |     |
| 4×4  | 11.05              |     |     |
| 6×6  | 16.05              | 16.46 | 20.12 |
| 8×8  | 21.05              |     |     |

Every router received every element exactly once and in timestamp order, up to 0.9 elements per
cycle. Without contention the average is `diameter + 3 + (mean hop count from the target)`. At 0.1
elements per cycle the measurements sit within 0.05 cycles of that.

The router delay uses the mesh diameter, `2(S−1)` for an S × S mesh. All that the alignment
needs is the largest hop count from any router to the target, which is only `S` for a centred
target on an even mesh. Published curves for this architecture (about 6, 9, 12 and 15 cycles for
2×2 to 8×8) match that smaller delay. Using it would save `S − 2` cycles on larger meshes without
changing the ordering. The two are identical for the default 2 × 2 mesh. To use the smaller
delay, change `NDIAM` in `sortnoc.sv`.

## Top (`mpsoc_monitor_top.sv`)

It instantiates `MX·MY` tile monitors, `MX·MY·N_P` probes and one SortNoC, and wires the probe
configuration buses and halts. Only probe 0 of tile 0 has the EOP detector. The cores, the system
bus and the operating system are outside the top. Its ports carry, per core, the power sample,
the executed PC, the write-back PC and result, and `halt`. Per tile they carry the APB slave,
`irq` and `violation`. Core `c` of tile `t = y·MX + x` is index `[t][c]`.

## Choices and departures

- **Arbitration direction.** The ordering rule is described twice, as a difference `t_i − t_j`
  in pseudo-code and as the timestamp wheel in prose and drawing. They disagree about the sign.
  This design follows the wheel (`d = t_b − t_a`, `a` first when `d ≤ 127`), the only reading
  that orders correctly.
- **Widths** come from the timestamp example (8-bit timestamp, 256-cycle period) and the
  configuration size (32 APs/timers, 32 checkpoint/out-of-range entries):
  - event ID: 8 bits
  - automaton state: 4 bits
  - cluster ID: 2 bits
  - PC: 32 bits
  - power sample: 16 bits
  - timer: 32 bits
  Several of them are this design's own choice.
- **Register maps**, the request format, the APB wait rule and the FIFO depths other than 4 are
  this design's own.
- **Not built:**
  - the cores (LEON3-class), their memories and L2 cache
  - the data network and the power emulation that drives the power sample
  - the offline assignment of requirements to tile monitors
  - the ordinary NoC with a sorting unit, a comparison baseline and not part of the design
  The top brings the core-side signals out as ports.
- **Out-of-range checks** compare against a closed interval `[min, max]`. Floats use an ordered
  integer key: it handles signs, infinities and NaN, and treats −0 as smaller than +0.
- **Timer re-arming** after a pass, and the sticky fail, are this design's choice.
- **Automaton transitions.** An event not programmed in an automaton's table takes whatever the
  table holds: a table entry must exist for every event of its cluster. Tables are not reset, so
  software must program them before enabling the AP.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_mpsoc_monitor_top` runs the full default
system end to end, in about a minute. It:
- Configures probes through the loader.
- Programs a data-race automaton for threads on tiles 0 and 1, and a timing requirement whose
  start and stop events come from different tiles.
- Drives an out-of-range result and a power spike, and bursts that cause pipeline halts and
  SortNoC back-pressure.
- Checks that the broadcast trace is sorted.
- Checks that each expected verdict and interrupt appears, with the detection-to-interrupt
  latency.
- Counts every mechanism (halt, EOP, back-pressure, APB wait, cluster filtering, each verdict
  kind) and fails if one never occurs.

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mon_pkg.sv tb/tb_sortnoc.sv \
          --top-module tb_sortnoc -Mdir obj_sortnoc
./obj_sortnoc/Vtb_sortnoc
```

Replace `tb_sortnoc` by any other testbench name. The package must be listed first; the other
modules are found through `-y`. The design has two-state semantics in mind: every register that
is read is reset, except the large table memories (AP tables, configuration memory), which
software writes before use.

# Event profiling for a ring-connected hybrid transactional-memory multicore

This RTL adds a profiler to a multicore FPGA prototype that runs transactional
memory in hardware (HTM), in software (STM), or in both at once (hybrid TM).
Every transactional state change of interest becomes a small timestamped
*event packet*. That can be a transaction starting, reading, writing, being
invalidated, aborting or committing, or the commit locking and unlocking the
ring bus. Software can add its own events with a one-instruction `event`
instruction. The packets leave the chip for a host computer, which rebuilds a
timeline of every thread's transactions.

The main idea is that the profiler adds **no network of its own**. The
multicore already has a ring that carries cache-line invalidations from the
memory controller past every core. That ring is idle most of the time. Each
core buffers its events in a FIFO and slips one into the ring whenever an
empty slot passes by. Invalidations are never delayed or displaced. Hardware
events cost the running program nothing. A software event costs one
instruction.

## The event packet

Every ring message is 34 bits. An event packet is laid out as follows, with
the most significant bits first:

| bits    | field          | width | meaning |
|---------|----------------|-------|---------|
| 33:32   | message type   | 2     | 00 empty slot, 01 invalidation, 10 hardware event, 11 software event |
| 31:28   | sender CPU     | 4     | core number (up to 16 cores) |
| 27:8    | timestamp      | 20    | cycles since this core's previous event (delta) |
| 7:4     | event type     | 4     | 16 hardware and 16 software types |
| 3:0     | event data     | 4     | e.g. the abort cause |

An invalidation uses the same 6-bit header followed by a 28-bit cache-line
address (a 32-bit byte address with 16-byte lines). The field widths of the
event packet come from the original system. The type codes below were chosen
for this implementation.

Hardware event types (`prof_pkg::hw_event_e`):

| code | event | data |
|------|-------|------|
| 0 | tx start | 0 |
| 1 | tx read | 0 |
| 2 | tx write | 0 |
| 3 | tx invalidated | 0 |
| 4 | tx abort | cause: 1 invalidation, 2 capacity, 3 software |
| 5 | lock bus (commit begins) | 0 |
| 6 | unlock bus | 0 |
| 7 | tx commit | 0 |
| 15 | timestamp overflow | timestamp field = number of counter wraps |

Software events use the codes 0 to 15 freely. Their meaning is agreed
between the program and the host's decoder.

## Path of an event through a core

```
cache FSM hooks ─┐
                 ├─> event_gen ─> log_unit ─> sync_fifo (event FIFO) ─> ring_node ─> next core ...
event instr ─> sw_event_decode ┘   (delta timestamp)                      ^ ring slot in
```

1. **`event_gen`** sits beside the cache FSM and never stalls it. Each hook
   pulse sets a pending bit; the abort cause is latched with the abort hook.
   A software-event request from the decoder fills one more pending slot.
   Every cycle the lowest-numbered pending hardware event goes to the log
   unit; the software event goes when no hardware event is pending. The
   event leaves one cycle after its hook. A hook that repeats while its
   previous event is still pending is counted in `lost_cnt`, because only one
   event per type can wait. `hw_enable` and `sw_enable` choose the profiling
   level: software events only, hardware events only, or both.
2. **`log_unit`** timestamps the event, forms the packet and writes it into
   the event FIFO (see the next section).
3. **`sync_fifo`**, 1024 x 34 bits, holds packets while the ring is busy.
   That is one 36 Kb FPGA block RAM.
4. **`ring_node`** registers the ring slot that arrives from the previous
   core and passes it on. Each hop takes one cycle. If the arriving slot is
   empty and the FIFO holds a packet, the node sends the packet in that
   slot. An invalidation passing through is also shown to the core's caches
   on `inv_valid`/`inv_laddr`.

`core_profiler` wires these units together for one core. `tmbox_profiler_top`
builds `N_CORES` of them (8 by default) around the ring.

## Delta timestamps and overflow packets

A 20-bit absolute timestamp would wrap every 21 ms at 50 MHz. The packet
therefore carries the *difference* to the previous event of the same core.
`log_unit` keeps a counter `delta` that restarts when an event is logged. The
packet carries `delta` for the cycle in which the event was accepted.

If 2^20 or more cycles pass between two events, the counter wraps. The unit
counts the wraps. The next event is then preceded by a *timestamp-overflow
packet* (hardware type 15) whose timestamp field holds the wrap count. The
event waits one cycle for it (`ev_ready` is low). The host rebuilds the
absolute time of each core's events with

```
on an overflow packet with count k:  base += k * 2**20
on any other packet with delta d:    t = base + d;  base = t
```

where `base` starts at 0 at reset. The end-to-end test does exactly this, and
the rebuilt times match the cycle of every event.

Two timing details matter when reading a trace:

* An event is stamped when the log unit accepts it, not when its hook fires.
  A hardware event is normally stamped one cycle after its hook, and a
  software event two cycles after its instruction's execute stage. Events
  raised in the same cycle leave one per cycle, so they are stamped a few
  cycles apart in priority order.
* If the event FIFO is full, the event is dropped and counted in `drop_cnt`.
  The counter keeps running, so the next delta is still measured from the
  last event that was actually logged. The time base stays correct. Only the
  dropped event is missing.

## Sharing the invalidation ring

```
           ┌──────────────── ring ────────────────┐
bus_ctrl_events ─> core 0 ─> core 1 ─> ... ─> core N-1 ─┘
   │  (invalidations start here; events end here)
   └─> PCIe FIFO (sync_fifo, 8192 x 34) ─> PCIe endpoint (outside)
```

`bus_ctrl_events` is the bus controller's end of the ring. Each DDR write
(`ddr_wr_valid`, at most one every three cycles) becomes an invalidation. The
controller puts it into the slot towards core 0 and the invalidation travels
once around the ring. When a message comes back from the last core there are
two cases:

* an invalidation is retired;
* an event is written into the PCIe FIFO, or dropped and counted in
  `pcie_drop_cnt` when that FIFO is full. The ring cannot be stalled.

**Capacity.** Invalidations take at most one slot in three, so each ring
link has at least two free slots every three cycles. All events from all
cores share the last link into the controller. With 8 cores the ring
therefore keeps up as long as the cores together make at most 8 events every
12 cycles, which is one event per core every 12 cycles. At a higher rate the
event FIFOs start to fill. The end-to-end test runs below this limit (one
event per core every 16 cycles) and sees at most one entry in any FIFO. It
also runs above the limit (one every 6 cycles) and sees the FIFOs fill.

**Upstream cores come first.** A core can only use slots that every core
before it left empty. Under overload, core 0 gets all the free slots it
wants and the last cores wait longest (`wait_cnt` counts those cycles). Their
FIFOs are the first to overflow. Below the capacity limit this only adds a
few cycles of latency, and latency does not change timestamps: the time is
fixed when the event is logged.

## Software events and JALL

`sw_event_decode` recognises the `event` instruction in the execute stage.
It uses primary opcode `011100`, which MIPS I leaves unused. The event type
is `instr[3:0]` and the data is the low four bits of the `rs` operand,
`instr[25:21]`, taken from the pipeline's bypass network. One cycle later the
decoder raises `sw_valid`. For the rest of the pipeline the instruction is a
no-op.

`jall_link_copy` supports JALL ("jump and link and link"), opcode `011101`.
The core executes it as a JAL (`is_jall` tells it to). The unit also keeps a
second copy of the return address (`pc + 8`) in `link_copy`. A profiled STM
library reads that copy when it emits events for transactional reads and
writes. The events can then be traced back to the calling source line.

## What is outside this RTL

The processor cores, their L1 and TM caches and cache FSM, the memory
request/response ring, the DDR controller and the PCIe endpoint all belong to
the host platform. They are not part of this code. Their signals are the
top's ports:

* `hook[c]`/`abort_cause[c]` come from each cache FSM.
* `ex_valid[c]`, `instr[c]`, `rs_value[c]` and `pc[c]` come from each
  execute stage.
* `inv_valid[c]`/`inv_laddr[c]` go to the caches.
* `ddr_wr_*` comes from the memory controller.
* `pcie_rd_*` goes to the PCIe endpoint.

The host-side decoder that turns packets into a visual trace is software. The
end-to-end testbench contains a model of the time-rebuilding part of it.

## Choices made in this implementation

The packet field widths, the per-core FIFO of one block RAM, the idle-slot
injection rule, the invalidation priority, delta timestamps with an overflow
event, the ring direction and the three-cycle invalidation spacing all follow
the system this design reproduces. The following were chosen here and can be
changed:

* The message-type codes, the hardware event numbering and the abort-cause
  codes. Separate message types for hardware and software events give each
  class its own 16 event types.
* The invalidation layout: header plus a 28-bit line address. The
  controller's sender ID in it is all ones.
* The overflow event: a separate packet written just before the next event.
* Event generation: one pending bit per hook, a fixed priority, and counting
  of lost hooks.
* Dropping and counting events on a full FIFO instead of stalling anything.
* The FIFO depths: 1024 per core and 8192 for the PCIe FIFO. The PCIe depth
  is only a guess within the original block-RAM budget.
* One register per ring hop.
* The opcodes and field positions of `event` and JALL.
* A software event's data is the low 4 bits of a register. There is no
  separate bank of event registers.
* No hardware "PC" event. A program counter does not fit the 4-bit data
  field, and no packet format for one is known.
* The FIFOs read their head combinationally (show-ahead). An FPGA block RAM
  has a registered read port, so a block-RAM mapping needs an output
  register and one more cycle of latency.
* Asynchronous active-low reset everywhere.

## Files

| file | contents |
|------|----------|
| `rtl/prof_pkg.sv` | packet structs, message and event type enums, widths |
| `rtl/event_gen.sv` | hook and software-event merging, profiling-level mask |
| `rtl/sw_event_decode.sv` | `event` instruction decoder |
| `rtl/jall_link_copy.sv` | JALL second return-address register |
| `rtl/log_unit.sv` | delta timestamps, overflow packets, FIFO write |
| `rtl/sync_fifo.sv` | FIFO used for the event FIFOs and the PCIe FIFO |
| `rtl/ring_node.sv` | ring stage with idle-slot injection and snooping |
| `rtl/bus_ctrl_events.sv` | invalidation source and event sink at the controller |
| `rtl/core_profiler.sv` | per-core assembly |
| `rtl/tmbox_profiler_top.sv` | top: N cores, ring, controller end, PCIe FIFO |
| `tb/tb_*.sv` | one self-checking testbench per unit, plus the top |

The assertions in the RTL check three rules:

* the DDR writes keep their three-cycle spacing;
* an occupied ring slot always passes through unchanged;
* the log unit never writes two packets in one cycle.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/prof_pkg.sv tb/tb_tmbox_profiler_top.sv --top-module tb_tmbox_profiler_top
./obj_dir/Vtb_tmbox_profiler_top
```

`tb_tmbox_profiler_top` runs the whole design at its default size (8 cores,
1024-entry event FIFOs, 8192-entry PCIe FIFO). It simulates about 1.1
million cycles in around ten seconds and has four phases:

1. Sparse hardware events, software events, JALLs and invalidations. Times,
   types and data are checked exactly, and every core must see every
   invalidation.
2. A silence longer than 2^20 cycles, then one event per core. Each core must
   send one overflow packet, and the times still match.
3. A load below the ring's capacity, with invalidations every 3 cycles. The
   FIFOs must stay shallow.
4. Overload with the PCIe FIFO not read, plus bursts of simultaneous hooks.
   Events must wait for ring slots, both FIFO levels must overflow, and hook
   events must be lost. Every generated event must then be accounted for as
   received, lost or dropped.

The unit testbenches check the units against reference models with random
stimulus. `tb_log_unit` includes gaps of one and two full counter periods.
`tb_workload_intruder` replays a transaction mix shaped like the
Intruder benchmark on four cores, in four TM configurations. It drains the
PCIe FIFO at the host link's rate: 8 MB/s at 50 MHz, taken as one 8-byte
packet every 50 cycles. It checks the commit and abort counts that the host
rebuilds from the packets, and that nothing is lost. The replay packs the
transactions much closer together than a real run, so the PCIe FIFO fills to
about 3,200 entries.

## How far to trust it

Every unit and the top pass their self-checking testbenches with verilator,
and the slang front end of yosys accepts all files. The design has not been
run on an FPGA, and no timing closure has been attempted. The interfaces to
the processor and caches are guesses at a simple pulse-per-state-change
hookup. A real cache FSM has to be adapted to raise those pulses.

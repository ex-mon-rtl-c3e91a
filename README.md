# Ex-Mon extraction hardware

Ex-Mon lets one core of a multicore chip watch a program running on another
core without instrumenting that program. Each core gets a small block of
*extraction logic* next to its commit stage. The monitor program loads the
block with a list of events it cares about. As instructions commit, the block
picks out those events and stores them as packets into a circular buffer in
shared memory, the *communication queue*. The monitor program, on a different
core, reads packets from that queue and checks them, for example to catch
memory bugs such as double frees, dangling pointers, uninitialised loads and
leaks.

The hardware has three jobs:

1. **Select.** Each commit is looked up in the *extraction table*, a ternary
   CAM.
2. **Suppress repeats.** The *local filter* is a small LRU cache of events
   already forwarded.
3. **Deliver.** The block stores packets into the queue and stalls the core
   when the queue is full.

The *suspension register* lets the monitor briefly switch selection off and
receive everything, for example while it rewrites the table.

This repository holds synthesizable SystemVerilog for that extraction logic,
one instance per core, plus self-checking testbenches. The processor
pipeline, the caches, the on-chip network and the monitor software are not
part of the RTL. Their connections are ports of the top module.

## Block diagram

```
            commit stream (ROB + load/store queue)
                         |  cm_valid / cm_ready / cm
                         v
  +------------------ extraction_logic (one per core) -------------------+
  |  I/D sequencer: PC lookup (I), then data-address lookup (D)          |
  |        |  addr, I/D                                                  |
  |        +------------------+-----------------------+                  |
  |        v                  v                       |                  |
  |   ext_table          local_filter                 |                  |
  |   TCAM TAG +         32-entry fully assoc.        |                  |
  |   DIRECTION          LRU of (addr, I/D)           |                  |
  |   -> hit, {valid,    -> hit                       |                  |
  |      susp,once,flush}   ^ ONCE insert, FLUSH clear|                  |
  |        |                 |                        |                  |
  |        +---- forward? ---+-- suspension_reg ------+                  |
  |                |            (bypass, update request)                 |
  |                v                                                     |
  |           comm_queue: BASE END HEAD TAIL, 1-packet buffer, full stall|
  +----------------|-----------------------------------------------------+
                   v  mem_req / mem_addr / mem_wdata / mem_gnt
             shared memory (communication queue), read by the monitor core
```

`exmon_top` contains `NUM_CORES` (default 2) copies of `extraction_logic`.
Every port is an array indexed by core.

## The forwarding decision

Every committing instruction produces an **I event**: its PC, with its result
as the value. A load or store also produces a **D event**: its data address,
with the loaded or stored value. The two events are handled one after the
other, in that order. Each event goes through the following rules:

| Suspension register | Table | Filter | Result |
|---|---|---|---|
| set | (bypassed) | (bypassed) | forwarded; nothing else changes |
| clear | no valid match | – | not forwarded |
| clear | match | hit | not forwarded; the filter entry becomes most recently used |
| clear | match | miss | forwarded |

A table match also acts on the DIRECTION bits of the matched entry:

* **ONCE**: if the event missed the filter, its (address, I/D) pair is
  entered into the filter. The victim is an empty entry if there is one,
  otherwise the least recently used entry.
* **FLUSH**: the filter is emptied. If ONCE is also set, the event is entered
  afterwards.
* **SUSP**: the suspension register is set, and `upd_req` pulses for one
  cycle in the next cycle. The matching event is still forwarded. From the
  next event on, the table and filter are bypassed and every event is
  forwarded. This includes the D event of the same instruction.

The suspension register is cleared only by a software write to `REG_SUSP`.
Software may also set it. If hardware sets it in the same cycle as a
software write, the hardware set wins, so no update request is lost.

Two uses follow from these rules:

* **Updating the table safely.** Entries that lead into code the monitor
  must follow closely carry SUSP. A typical example is a call to `malloc`,
  whose return value the monitor cannot otherwise see.
* **Handling table overflow.** Some entries are reserved to cover code or
  data that has no entries loaded yet. They also carry SUSP. A match asks the
  monitor to load the missing entries, after which it clears the register.

### Extraction table (`ext_table`)

Each entry has two parts:

* **TAG**: a 32-bit key, a 32-bit care mask and an I/D flag. A cleared mask
  bit is a don't-care cell, so one entry with key `0x8000a000` and mask
  `0xfffff000` covers the range `0x8000a000`–`0x8000afff`. The I/D flag is
  always compared.
* **DIRECTION**: the bits `{valid, susp, once, flush}`.

An entry matches only while its valid bit is set. If several entries match,
the lowest index wins. The lookup is combinational over all entries, and
there is one lookup port. Writes go through `wr_en`/`wr_idx`/`wr_entry` and
take effect at the next clock edge. Reset clears all valid bits.

### Local filter (`local_filter`)

The filter holds `ENTRIES` (default 32) (address, I/D) pairs and is fully
associative. LRU order is kept with a per-entry age. The ages always form a
permutation of `0..ENTRIES-1`. The entry just used gets age 0, and every
entry younger than it ages by one. Lookup is combinational. Updates happen
only when `upd_en` is high, which the extraction logic drives for events that
are taken and matched the table while it is not suspended.

## Communication queue (`comm_queue`)

The queue lives in ordinary shared memory and is described by four
registers per core:

| `reg_sel` | Register | Written by |
|---|---|---|
| 0 `REG_BASE` | first byte of the buffer | software |
| 1 `REG_END` | first byte past the buffer | software |
| 2 `REG_HEAD` | next free slot | hardware (advances); software only to initialise |
| 3 `REG_TAIL` | next slot the monitor reads | software (monitor) |
| 4 `REG_SUSP` | suspension register, bit 0 | hardware sets, software clears or sets |

Packets use one slot of `PKT_BYTES` (16) bytes each. The fields are:

* `addr`: 32 bits;
* `id`: 1 bit, 0 = I, 1 = D;
* `value`: 32 bits.

Together they form the 65-bit `packet_t` put on `mem_wdata`. How the 65 bits
are laid out within the 16-byte slot is left to the memory side.

HEAD wraps from END back to BASE. The queue counts as **full** when
advancing HEAD would make it equal to TAIL, so one slot always stays empty.
While the queue is full, no store is issued. The one-packet buffer then stays
occupied, and the next event that must be forwarded holds `cm_ready` low.
This stalls the monitored core, and it is the main source of slowdown in
this scheme. A store that is requested but not yet granted keeps its address
and data stable, and an assertion checks this.

The monitor's loop is: read the slot at TAIL, then write TAIL with the next
slot address, wrapping at END. It can poll `q_head` to see how far the
queue is filled.

## Timing

* The commit stream uses a valid/ready handshake and accepts one instruction
  per cycle. A load or store takes two cycles, because its two lookups share
  the single table and filter port.
* If no event has to wait, `cm_ready` goes high in the first cycle for other
  instructions and in the second cycle for memory instructions. An event
  waits only when a forwarded event finds the packet buffer occupied.
* A packet accepted into an empty buffer is presented as a store request in
  the next cycle. HEAD advances on `mem_gnt`.
* Table writes, register writes, filter updates and suspension changes all
  take effect at the next rising clock edge.
* The peak output is one 65-bit packet per cycle per core. Published
  measurements of memory-bug detection on SPECINT2000 average below 10 bits
  per cycle.
* Reset is asynchronous and active low. It empties the table (valid bits),
  the filter, the packet buffer and the suspension register, and zeroes the
  queue registers. Software must program BASE, END, HEAD and TAIL before
  forwarding starts.

## Using it for memory-bug detection

A typical table for catching heap bugs:

| Entry | Key / mask | I/D | Bits | Purpose |
|---|---|---|---|---|
| PC of each `malloc`/`calloc`/`realloc` call | exact | I | SUSP, FLUSH | library code is then forwarded until the monitor has the return value |
| PC of each `free` call | exact | I | FLUSH | memory state changes, so forget filtered addresses |
| PCs of argument set-up / return-value copies | exact | I | – | monitor sees the arguments |
| PC of the program's epilogue | exact | I | – | monitor runs its leak check and stops |
| heap range | e.g. `0x800xxxxx` | D | ONCE | every heap access, each address only once until the next call |
| code regions with no entries loaded | range | I | SUSP | table overflow: the monitor loads entries, then clears SUSP |

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `exmon_top` | `NUM_CORES` | 2 | two-core evaluated system |
| `exmon_top`, `extraction_logic` | `TABLE_ENTRIES` | 1024 | extraction table size |
| `exmon_top`, `extraction_logic` | `FILTER_ENTRIES` | 32 | local filter size |
| `exmon_pkg` | `AW`, `DW` | 32, 32 | address and value widths |
| `exmon_pkg` | `PKT_BYTES` | 16 | queue slot stride |

The queue size is not a hardware parameter. Software sets it through BASE
and END, so 4K-, 16K- and 32K-packet queues need no change to the RTL. They
take 64, 256 and 512 KB of memory.

## Design choices and departures

These points are choices of this implementation rather than part of the
original scheme:

* **Single lookup port.** I and D lookups are serialised, so memory
  instructions cost two cycles. A second search port on the table and filter
  would remove that cost.
* **Table priority and valid bit.** The lowest matching index wins. The
  DIRECTION valid bit also gates the match.
* **Bypass while suspended.** Both I and D events are forwarded, and the
  filter is neither consulted nor updated.
* **Update request.** It is a one-cycle `upd_req` pulse, rather than a
  message over the network.
* **Memory interface.** The request/grant store port, the one-packet buffer,
  the 16-byte slot, the "one empty slot" full rule and END as an exclusive
  bound are all choices of this implementation.
* **Configuration ports.** Table entries and registers are written through
  dedicated ports. They are not mapped into an address space.
* **Not synthesis-tuned.** The 1K-entry CAM is written as flip-flops plus
  comparators. The lowest match is picked by isolating the lowest set
  match bit, and its word is read out with an AND-OR. A real chip would use
  a TCAM macro. Generic synthesis of the full 1024-entry table takes more
  than ten minutes, but it is plain RTL.

## Files

| File | Contents |
|---|---|
| `rtl/exmon_pkg.sv` | shared types: events, table entry, packet, commit record, register map |
| `rtl/ext_table.sv` | extraction table (ternary CAM + DIRECTION) |
| `rtl/local_filter.sv` | LRU local filter |
| `rtl/suspension_reg.sv` | suspension register and update request |
| `rtl/comm_queue.sv` | communication-queue registers, packet buffer, store port |
| `rtl/extraction_logic.sv` | one core's extraction logic |
| `rtl/exmon_top.sv` | all cores |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/exmon_ref_pkg.sv` | sequential reference model of the forwarding rules |
| `tb/xl_agent.sv` | per-core stimulus: a memory-bug-detection-style commit stream, a shared-memory model and a monitor model |

## Verification

Each testbench checks the block against values computed separately in the
testbench. Each prints `TB_RESULT checks=N failures=M`. Each has a watchdog
that counts a failure if the test hangs.

* `tb_ext_table` (64 entries): exact and range keys, the I/D flag,
  overlapping entries, invalidation, and 2000 random lookups against an
  array model.
* `tb_local_filter` (8 entries): 20k random operations against an LRU list
  model. It covers hits, evictions and flushes.
* `tb_suspension_reg`: sets, clears, the write priority and the
  update-request pulse.
* `tb_comm_queue`: in-order stores at the right slots, wrap-around, no store
  while full, the full flag, memory back-pressure and the one-cycle store
  latency.
* `tb_extraction_logic` (16-entry table, 8-entry filter) and `tb_exmon_top`
  (defaults: 2 cores, 1024-entry tables, 32-entry filters) drive the
  workload through the design.

  In these two end-to-end tests, every packet the monitor model reads back
  is compared with the reference model. Commit timing is checked whenever
  nothing stalls. The tests count each mechanism, and a test fails if any
  never happened:

  * I and D matches, range matches;
  * filter suppression, insertion, LRU eviction and flushes;
  * suspension, bypassed events, software clears and table rewrites;
  * queue-full stalls, memory back-pressure and wrap-around.

  `tb_exmon_top` runs the full-size design for about 58k instructions over
  the two cores, in about ten seconds. Core 0 uses a 64-packet queue.
  Core 1 uses a 4K-packet queue, the smallest evaluated size, and its
  monitor falls behind until that queue fills and the core stalls.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/exmon_pkg.sv tb/exmon_ref_pkg.sv tb/tb_exmon_top.sv --top-module tb_exmon_top
./obj_dir/Vtb_exmon_top
```

Replace `tb_exmon_top` with any other `tb_*` name to run that test. The
model package `tb/exmon_ref_pkg.sv` is needed only by `tb_extraction_logic`
and `tb_exmon_top`.

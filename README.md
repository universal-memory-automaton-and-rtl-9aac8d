# MESI snooping coherency engine built as a Universal Memory Automaton

Each processor core in a multiprocessor has its own dedicated cache. To keep
those caches coherent, every core gets a small protocol engine that watches
(snoops) the shared address bus. For every cache line the engine records the
line's address tag and a MESI status: Modified, Exclusive, Shared or Invalid.

The engine is written as a **Universal Memory Automaton (UMA)**. A UMA is a
finite state machine that owns a set of memories and can read and write them
inside its own transitions. A transition is a single rule of the form "if the
state is ID, and our core reads, and the stored tag differs from the address
tag, then go to RD, store the tag and store Exclusive". That rule is one clock
cycle long:

- the memories are read combinationally, which gives the condition;
- the next state, the output and the memory writes are then decided in the same cycle;
- the state and the memories change together at the next clock edge.

A plain FSM would have to spread this over several states and cycles. A
push-down automaton would have to emulate the RAMs with its one stack.

This repository holds:

- `mesi_uma`, the protocol engine;
- `uma_ram`, `uma_queue`, `uma_stack` and `uma_cam`, the four UMA memory types;
- `uma_memory`, a wrapper that makes the memory type a parameter;
- self-checking testbenches for all of them.

## Structure

```
              rd wr cp addr res_n
                    |
        +-----------v------------+      +-------+      +-----------+
        | state transfer logic   |----->| state |----->|  output   |---> I
        | (conditions, next      |      |  reg  |      |  (Mealy)  |
        |  state, memory writes) |<-----+-------+      +-----------+
        +----+-------------^-----+                          ^
     PUSH    |             | TOP (combinational read)       |
    (write)  v             |                                |
        +----------------------------+                      |
        | uma_memory  TAG  24 x 64   |----------------------+
        | uma_memory  MESI  4 x 64   |
        +----------------------------+
```

In `mesi_uma` the transfer logic and the Mealy output sit in one
`always_comb` block, and the state register is one `always_ff`. Both memories
are `uma_memory` instances of type RAM. Each reads at the current index, and
its write port is driven by the transfer logic.

### Address split

| field  | bits        | use                                              |
|--------|-------------|--------------------------------------------------|
| tag    | `addr[31:8]` | stored in / compared with TAG (24 bits)          |
| index  | `addr[7:2]`  | selects one of 64 lines in TAG and MESI          |
| offset | `addr[1:0]`  | byte within a 32-bit line, not used by the engine |

The cache is one-way associative (direct mapped). Parameters `ADDR_W` (32),
`IDX_W` (6) and `OFFSET_W` (2) set the split: the tag gets the bits that
remain.

## States and status rules

| state | code | meaning                               |
|-------|------|---------------------------------------|
| ID    | 100  | no load/store on the bus (reset state) |
| RD    | 000  | own core reads                        |
| WR    | 001  | own core writes                       |
| rRD   | 010  | remote core reads                     |
| rWR   | 011  | remote core writes                    |

The MESI codes are one-hot: M = `1000`, E = `0100`, S = `0010`, I = `0001`.
Status rules:

- An own read marks the line Exclusive.
- An own write marks it Modified.
- A remote read marks a held line Shared.
- A remote write marks a held line Invalid.

This is simpler than textbook MESI. Under these rules an engine never needs to
know whether other caches hold the line:

- A core that reads calls the line Exclusive, even if other caches keep
  copies; those caches mark it Shared at the same moment.
- A core that writes calls the line Modified; every other cache that holds
  the line marks it Invalid at the same moment.

So the engine keeps no record of remote activity beyond its own lines'
status.

## Transition table

`cp = 1` means our own core is on the bus; `cp = 0` means a remote core is.
The abbreviations are:

- READ = `res_n & cp & rd`
- WRITE = `res_n & cp & wr`
- R_READ = `res_n & !cp & rd`
- R_WRITE = `res_n & !cp & wr`
- NOP = `!res_n | (!rd & !wr)`
- hit = the TAG entry at the index equals the address tag

| from | condition | to | memory writes | I |
|------|-----------|----|---------------|---|
| any  | NOP | ID | none | 0 |
| ID, RD, rRD, rWR | READ, hit | RD | MESI := E | 0 |
| ID, RD, rRD, rWR | READ, miss | RD | TAG := tag, MESI := E | 0 |
| WR   | READ, hit | RD | MESI := E | 0 |
| ID, WR, rRD, rWR | WRITE, hit, status not I | WR | MESI := M | 0 |
| ID, WR, rRD, rWR | WRITE, hit, status I | WR | none | **1** |
| RD   | WRITE, hit | WR | MESI := M | 0 |
| ID, RD, WR, rRD | R_READ, hit | rRD | MESI := S | 0 |
| rWR  | R_READ, hit, status M | rRD | MESI := S | 0 |
| any  | R_WRITE, hit | rWR | MESI := I | 0 |
| any  | anything else | unchanged | none | 0 |

The output **I** flags an own write that hits a line another core has
invalidated. It is a coherency miss that a performance counter can count.
`I` is a Mealy output: it is valid in the cycle of the access, not after it.

Read misses store the new tag. Read hits rewrite only the status, which saves
a TAG write. Set the parameter `TAG_WRITE_ALWAYS = 1` for the simpler variant
that writes the tag on every own read; the stored contents are the same.

### Points where this table is a reading, not a given

The protocol's transition table leaves some cases open. This RTL resolves
them as follows. Change the `always_comb` block in `mesi_uma.sv` if
your system needs something else.

- **Remote write from WR.** The arc from WR to rWR is taken on a remote
  write hit, like every other arc into rWR.
- **Accesses no arc covers** keep the current state and write nothing:
  - an own write that misses (there is no write-allocate);
  - any remote access that misses;
  - an own read miss while in WR;
  - a remote read hit in rWR on a line that is not Modified.
- **rd and wr both high:** the read rules win.
- **RD to WR on a write hit** always sets Modified. It never raises `I`,
  even when the line is Invalid, because the table has no such split for
  this arc.
- **Tags have no valid bit.** After reset every tag is 0, so an address whose
  tag is 0 hits an untouched line, whose status is 0000 (none of M, E, S, I).

## Timing

Take an own read of `0xDEADBEEF` right after reset (index 59, tag `DEADBE`):

| cycle | inputs | state | combinational | after the edge |
|-------|--------|-------|---------------|----------------|
| n     | `cp=rd=1`, addr DEADBEEF | ID | TAG[59]=000000, so a miss; next = RD; TAG and MESI write enables high | state RD, TAG[59]=DEADBE, MESI[59]=0100 |
| n+1   | `rd=wr=0` | RD | next = ID | state ID |

So one access takes one cycle, and the engine accepts a new bus access every
cycle. `res_n` is an asynchronous, active-low reset: it forces ID and clears
both memories. It also appears inside the access conditions above, so lint
reports it as used both synchronously and asynchronously. That is expected.

## UMA memory types

The automaton's memories are interchangeable. Every type reads
combinationally and writes at the clock edge, and each uses three operations:

- **PUSH** writes an entry.
- **TOP** reads an entry and keeps it.
- **POP** reads an entry and removes it.

| module | PUSH | TOP / POP | errors and status |
|--------|------|-----------|-------------------|
| `uma_ram`   | write `wr_data` at `wr_addr` | read `rd_addr`; POP clears the entry to 0 | none; a PUSH to the same address as a POP wins |
| `uma_queue` | append at the tail | oldest entry; POP removes it | `err` on TOP/POP when empty (`rd_data` = 0) or PUSH when full (nothing stored); `empty`, `full`, `count` |
| `uma_stack` | place on top | newest entry; POP removes it | same as the queue |
| `uma_cam`   | write `wr_data` at `wr_addr`, marking it valid | search `rd_key` across all valid entries; return the lowest matching address and `found`; POP deletes the match | starts all zero with every entry valid; `found=0` when nothing matches |

The queue and the stack also accept a POP and a PUSH in the same cycle; on
a full memory the PUSH then succeeds. `uma_memory #(.KIND(...))` wraps all
four behind one port set:

- PUSH side: `push`, `push_addr`, `push_data`;
- read side: `rd`, `pop`, `rd_addr`, `rd_key`;
- results: `rd_data`, `rd_index`, `found`, `err`.

A type leaves unused the inputs it does not need, and lint reports them.
With `uma_memory`, an automaton can change a memory's type without touching
its port wiring. Defaults are 8 entries of 8 bits; the engine uses 24 × 64
and 4 × 64.

## What is not here

- **The cache data array and the processor cores.** The engine tracks
  status only. It does not move data, write back Modified lines or stall a
  core.
- **Set-associative organisation.** With `a` tag bits used as a set number,
  an m-way cache would need m tag/status pairs per index and a way choice.
  This design is direct mapped.
- **A generator.** The protocol was originally produced by a tool that
  compiles a textual UMA description (states, memories, constant
  expressions, transition lines) into Verilog. This RTL is written by hand,
  in the same structure.

## Files

| file | contents |
|------|----------|
| `rtl/uma_pkg.sv`    | memory-type enum, state enum with its encodings, MESI codes |
| `rtl/uma_ram.sv`, `uma_queue.sv`, `uma_stack.sv`, `uma_cam.sv` | the four memory types |
| `rtl/uma_memory.sv` | memory of selectable type |
| `rtl/mesi_uma.sv`   | the protocol engine (top) |
| `tb/tb_mesi_uma.sv` | end-to-end test at full size (see below) |
| `tb/tb_mesi_uma_tag_always.sv` | the same test with `TAG_WRITE_ALWAYS = 1` |
| `tb/tb_mesi_two_cores.sv` | two engines on one bus: the E/S/M/I sharing scenario |
| `tb/tb_uma_*.sv`    | one testbench per memory module |

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/uma_pkg.sv tb/tb_mesi_uma.sv --top-module tb_mesi_uma -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The simulator is two-state,
so every register that is read has a reset.

`tb_mesi_uma` runs the engine at its default size. It uses a table-driven
reference model with one row per arc, and each cycle it compares the
engine's:

- next state and state register;
- `I` output;
- tag and status write enables and write values;
- stored tag and status.

Its stimulus comes in three parts:

- the single-read example above;
- a directed walk through every arc;
- 40 000 cycles of random traffic over a few tags and indices, with
  occasional resets.

It prints how often each arc fired, and it fails if any arc never fired.
Each memory testbench replays its memory type's reference examples (for
instance PUSH 00, PUSH FF, then two POPs of a stack return FF, then 00). It
then checks random traffic against a model. The engine also carries
assertions:

- `I` is raised only on a write that changes no memory;
- stored status codes are one-hot or zero;
- a tag is written only together with Exclusive.

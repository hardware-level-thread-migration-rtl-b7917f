# EM²: a 110-core multiprocessor that moves threads to their data

Most shared-memory multiprocessors bring data to the thread: each core caches
copies of remote data, and a coherence protocol keeps the copies in step.
This design does the opposite. Every address has exactly one home core, and
only that core's cache may hold it. When a thread needs data homed on another
core, it has two options:

* **Remote access.** It sends a one-word request to the home core's cache
  slice and waits for the reply. This costs one network round trip per access.
* **Migration.** It moves itself to the home core. The hardware packs the
  thread's architectural state (PC and the live top of its register stacks)
  into a short network packet. It sends the packet to the home core, and the
  thread continues there with ordinary local cache accesses.

A migration replaces many round trips with one one-way trip. It is worth
making when several accesses to the same core follow. Migration happens in
hardware, without software, and at the granularity of a single instruction.

There is no coherence protocol, because no data is ever copied between
caches. Memory consistency follows from there being one place per address.
The same property makes the design independent of core count: only the width
of a core number and the address-to-core map depend on it.

The RTL in `rtl/` describes the whole chip. It has 110 tiles on a 10 × 11
mesh. Each tile holds a stack-machine core with two thread contexts, a
migration predictor, an 8 KB instruction cache, a 32 KB data-cache slice and
six mesh routers. The two off-chip memory interfaces are outside the RTL;
their network ports are brought out of the top level.

## Address space: one home per address

| Address range | Where it may be cached |
|---|---|
| `0x00000000`–`0xD5FFFFFF` | Only in core `addr[31:25]`, the top 7 bits. |
| `0xD6000000`–`0xFFFFFFFF` | In every core. This is meant for private per-thread data, such as stack spill areas and read-only tables. |

* The top 7 bits of an address name its home core, so core *n* owns a 32 MB
  window starting at `n << 25`.
* Windows 107–109 fall inside the everywhere-cacheable range, so those three
  cores home no shared data.
* Software must place data with this in mind. Data used together by one
  thread should share a home, at a grain coarser than a cache line.

`home_core_map` computes the home core, the "cacheable everywhere" flag and
whether an access is local. It is combinational.

## Thread contexts and why migration cannot deadlock

Each core has two hardware contexts, and one instruction engine alternates
between the ready contexts, one instruction at a time:

* **Context 0 (native)** belongs to the one thread that started on this core,
  its *native core*. No other thread may use it.
* **Context 1 (guest)** holds a thread visiting from elsewhere.

When a context packet arrives:

* A thread returning home always enters context 0. Its slot is free, because
  the thread cannot be in two places.
* Any other thread needs the guest context. If a guest already occupies it,
  the core first evicts that guest. It sends the guest's context on a
  separate eviction network to the guest's native core, where context 0 is
  guaranteed free.

Evictions therefore never wait for a free slot. Evictions travel on their own
network, so they cannot be blocked behind migrations. Together these rules
rule out the cycle of cores waiting on each other's guest slots.

## Register stacks, spilling and partial contexts

The core is a stack machine. Each context has a main stack and an auxiliary
stack, `hw_stack`, each 8 entries deep in hardware.

* When a stack grows past 6 entries, its bottom entry is *spilled* to memory.
* When a stack drops below 2 entries and entries are in memory, one is
  *refilled*.
* The spill area of a thread is in the everywhere-cacheable range, at
  `0xD6000000 + (native core << 16) + (stack << 15) + 4·n`. So a thread's
  spill traffic is always a local cache access in its native core.

Only the native context spills and refills. A guest whose next instruction
would underflow or overflow a stack first migrates back to its native core,
then runs the instruction there. A guest that executes `HALT` also goes home
first, so `halted[i]` always rises on the thread's own core.

Because spilled entries stay behind in memory, a migration carries only what
is live in the hardware stacks. The context packet has two 64-bit flits plus
one flit per two stack entries:

| Flit | Bits | Contents |
|---|---|---|
| 0 | `[63:60]` | Packet type. |
| 0 | `[59:53]` | Destination core. |
| 0 | `[52:46]` | Source core. |
| 0 | `[45:39]` | The thread's native core. |
| 0 | `[38:35]` | Main-stack entry count. |
| 0 | `[34:31]` | Auxiliary-stack entry count. |
| 0 | `[29:0]` | `PC[31:2]`. |
| 1 | `[63:32]` | Predicted start PC. |
| 1 | `[31]` | Prediction valid. |
| 1 | `[30]` | Live flag. |
| 1 | `[29:24]` | Accesses made since the prediction. |
| 1 | `[23:16]` | Main-stack entries spilled. |
| 1 | `[15:8]` | Auxiliary-stack entries spilled. |
| 1 | `[6:0]` | The core that predicted. |
| 2… | | Stack entries, two per flit, main stack first, bottom first. |

The smallest context is therefore 128 bits.

## When to migrate: three modes

Every memory instruction (`LD`, `ST`, `LD_RSV`, `ST_CND`) first computes its
address and looks up the home core. A local address goes to the tile's own
slice. For a remote address, two bits of the instruction choose what happens:

| Mode | Encoding | Action |
|---|---|---|
| `REMOTE` | 1 | Always make a remote word access. |
| `MIGRATE` | 2 | Always migrate. The instruction runs again at the home core, now locally. |
| `AUTO` | 0 | Ask the migration predictor. |

Separately, the `MIG` instruction migrates to the core named in its
immediate.

**The predictor** (`migration_predictor`) is a 16-entry direct-mapped table
of *start PCs*, tagged by PC.

* **Learning.** The predictor watches each context's accesses. A *run* is a
  series of consecutive accesses to the same remote core. When a run reaches
  3 accesses, the PC of its first access is entered in the table. From then
  on, an `AUTO` instruction at that PC whose address is remote makes the
  thread migrate.
* **Forgetting.** A migration made on a prediction records the start PC and
  the predicting core in the context (flit 1). The destination then counts
  the thread's local accesses. When the thread later arrives back at the
  predicting core with fewer than 3 accesses counted, that core removes the
  start PC from its table. The migration did not pay off.

## Shared data cache slices and atomics

`dcache_slice` fronts each tile's 32 KB cache (`dm_cache`). It serves two
kinds of request:

* requests from its own core, and
* remote requests arriving on the remote-request network. Each is two flits,
  a header and a data word. The answer is one flit on the remote-reply
  network.

`LD_RSV` and `ST_CND` give load-reserved / store-conditional:

* The slice keeps one reservation: an address, a core and a context.
* `LD_RSV` sets the reservation.
* Any store to the reserved address clears it.
* `ST_CND` writes only if the reservation is still its own. It pushes 1 on
  success and 0 on failure.

There is a single level of cache. `dm_cache` has these properties:

* Direct mapped, write-back and write-allocate.
* Lines are 64 bits, exactly one network flit.
* A hit answers in the cycle after the request is accepted.
* A miss first writes back a dirty victim, then reads the line.

The same module with `READ_ONLY=1` is the 8 KB instruction cache.

## Networks

Six independent 2D meshes connect the tiles. Each tile has one `mesh_router`
per network:

| # | Network | Carries | Routing |
|---|---|---|---|
| 0 | MIG | Migrating contexts. | X then Y |
| 1 | EVICT | Evicted contexts. | X then Y |
| 2 | RREQ | Remote cache requests. | X then Y |
| 3 | RREP | Remote cache replies. | X then Y |
| 4 | MREQ | Line reads and write-backs to the memory interfaces. | Y then X |
| 5 | MREP | Line fills from the memory interfaces. | Y then X |

Because every kind of packet has its own network, no network has a
request/reply dependency inside it.

The routers share these features:

* Five ports: local, north, east, south and west.
* Wormhole switching: a packet holds an output from its head flit to the flit
  marked `last`.
* Dimension-order routing.
* 2-flit input FIFOs and round-robin arbitration.
* An output is driven straight from an input FIFO head, so an uncongested
  flit advances one hop per cycle.

A flit is 65 bits: 64 data bits and `last`. Every packet's head flit carries
the type in `[63:60]`, the destination core in `[59:53]` and the source core
in `[52:46]`.

Core *i* sits at column `i % 10`, row `i / 10`. The two memory interfaces are
mesh nodes 110 and 111. They sit just east of rows 2 and 8, and are reached
only on the memory networks. The Y-then-X order there brings a packet to the
right row first. Lines are split between the two interfaces by address bit 3.
`mem_net_if` in each tile sends I$ and D$ misses out and returns the fills.

## Instruction set

Instructions are 32 bits:

* `[31:26]` opcode
* `[25:24]` migration mode
* `[15:0]` immediate

Branch offsets count words. In the table, `s0` is the stack top and `s1` the
entry below it.

| Opcode | Mnemonic | Effect |
|---|---|---|
| 00 | `NOP` | Nothing. |
| 01 | `HALT` | Stop the thread. A guest first goes home. |
| 02 | `PUSHI imm` | Push the sign-extended immediate. |
| 03 | `LUI imm` | Push `imm << 16`. |
| 04 | `ORI imm` | `s0 \|= zero-extended imm` |
| 05 | `ADDI imm` | `s0 += sign-extended imm` |
| 06 | `ADD` | Pop two, push `s1 + s0`. |
| 07 | `SUB` | Pop two, push `s1 - s0`. |
| 08 | `DUP` | Copy the top. |
| 09 | `DROP` | Remove the top. |
| 0A | `SWAP` | Exchange the top two. |
| 0B | `OVER` | Copy `s1` to the top. |
| 0C | `TOA` | Move the main top to the auxiliary stack. |
| 0D | `FROMA` | Move the auxiliary top to the main stack. |
| 10 | `LD` | Pop address, push word. |
| 11 | `ST` | Pop address, pop value, store. |
| 12 | `LD_RSV` | Like `LD`, and set the reservation. |
| 13 | `ST_CND` | Like `ST`, and push the success flag. |
| 14 | `MIG imm` | Migrate to core `imm`. |
| 18 | `BNZ imm` | Pop. If non-zero, `PC += 4·imm`, else go to the next instruction. |
| 19 | `BR imm` | `PC += 4·imm`. The offset counts from the branch itself. |
| 1A | `COREID` | Push this core's number. |

All native threads start at the top-level `boot_pc` when their core's
`start` pulses. Each finds its own work with `COREID`.

## Files

| File | Role |
|---|---|
| `rtl/em2_pkg.sv` | Constants, flit and packet formats, opcodes, event record, mesh coordinates. |
| `rtl/em2_top.sv` | The chip: `MESH_W × MESH_H` tiles, edge tie-off, memory-interface ports. |
| `rtl/em2_tile.sv` | One tile: core, I$, D$ slice, memory interface logic, six routers. |
| `rtl/em2_core.sv` | Stack core, two contexts, migration, eviction, remote access. |
| `rtl/migration_predictor.sv` | Start-PC learning predictor. |
| `rtl/hw_stack.sv` | Register stack with automatic spill and refill. |
| `rtl/home_core_map.sv` | Address to home core. |
| `rtl/dcache_slice.sv` | Shared D$ slice: local and remote requests, reservation. |
| `rtl/dm_cache.sv` | Direct-mapped write-back cache (D$ and I$). |
| `rtl/mem_net_if.sv` | Cache misses to and from the memory networks. |
| `rtl/mesh_router.sv` | Wormhole dimension-order mesh router. |
| `tb/offchip_mem_model.sv` | Behavioural memory interface plus DRAM, for simulation only. |
| `tb/tb_<module>.sv` | Self-checking testbench of each module. |
| `tb/tb_em2_top.sv` | End-to-end test on a 3 × 3 mesh that exercises every mechanism. |
| `tb/tb_em2_top_full.sv` | End-to-end run of the full 110-core chip at its default parameters. |

`em2_top` reports per-tile activity as one-cycle pulses on `events[i]`:

* migrations out, evictions, arrivals
* remote requests sent and served
* predicted migrations, learns and unlearns
* spills and refills
* guests sent home by their stacks
* cache misses and write-backs
* failed `ST_CND`
* halts

The testbenches count these events.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. It also
has a watchdog that counts a failure if the test hangs. With Verilator 5, for
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/em2_pkg.sv tb/tb_em2_top.sv --top-module tb_em2_top --Mdir obj_top
obj_top/Vtb_em2_top
```

Replace `tb_em2_top` with any other testbench name.

* `tb_em2_top` runs a 3 × 3 mesh with 256-byte D$ slices, so misses and
  write-backs happen often. It makes every mechanism listed above happen at
  least once and checks each thread's result, in about 2,700 cycles.
* `tb_em2_top_full` builds the full 110-core chip. The C++ build takes a few
  minutes; the run takes about one second. A thread crosses the chip from
  core 0 to core 106 and back, while another thread makes a remote load.

## Parameters

| Parameter | Default | Where |
|---|---|---|
| `MESH_W`, `MESH_H` | 10, 11 | `em2_top` |
| `MC_ROW0`, `MC_ROW1` | 2, 8 | `em2_top`. Rows of the memory interfaces. |
| `DC_BYTES`, `IC_BYTES` | 32768, 8192 | `em2_top`, `em2_tile` |
| `STACK_DEPTH` | 8 | `em2_core` |
| `PRED_ENTRIES`, `PRED_THRESH` | 16, 3 | `em2_core` |
| `FIFO_DEPTH` | 2 | `mesh_router` |

* The core count, the 7-bit home field, the cache sizes, the 64-bit flit,
  the six networks and the 128-bit minimum context are fixed properties of
  the design.
* The mesh may be made smaller for simulation, up to a limit: core numbers
  are 7 bits and mesh coordinates are 4 bits.

## How faithful this is, and what is this design's own

**Taken from the original design:**

* 110 cores on a 2D mesh with a single cache level and two off-chip memory
  interfaces.
* 32 KB data cache and 8 KB instruction cache per tile.
* Six routers per tile, with 64-bit flits, wormhole dimension-order routing
  and single-cycle hops when uncongested.
* A custom stack core with two stacks spilled and refilled through the data
  cache.
* Two contexts that keep migration deadlock free.
* Instruction-granularity migration with partial contexts of at least 128
  bits.
* Home core = top 7 address bits, with `0xD6000000`–`0xFFFFFFFF` cacheable in
  every core.
* Remote word accesses for `LD`/`ST`/`LD_RSV`/`ST_CND`.
* The three ways of deciding to migrate: by instruction, statically per
  memory instruction, and automatically with a learning predictor that drops
  a start PC after a migration followed by too few accesses.

**Chosen here** (the original is silent on these points):

* The instruction set and its encodings.
* The context packet layout.
* The eviction rule: evict the guest to its native context.
* Sending a guest home when its stack would overflow or underflow.
* The predictor's run-length learning rule, table size and threshold.
* The feedback path for unlearning.
* Stack depths and spill thresholds.
* The spill-area layout.
* The cache organisation (direct mapped, write-back, 64-bit lines) and its
  timing.
* The single-reservation `LD_RSV`/`ST_CND` scheme.
* Which traffic uses which network.
* The 10 × 11 mesh shape.
* The memory-interface placement and interleaving.
* The router buffer depth and arbitration.

**Not included:**

* The memory controllers and DRAM. A behavioural model in `tb/` stands in for
  them.
* Clocking, reset distribution and I/O.
* The core is not pipelined: each context runs one instruction at a time,
  and the two contexts interleave.

**Limits worth knowing:**

* Caches are written as flop arrays. A physical implementation would swap in
  SRAM macros.
* A remote request to a core's slice waits behind that slice's own misses.
* A single reservation per slice means two threads using `LD_RSV` on one
  slice can make each other's `ST_CND` fail repeatedly. This is correct, but
  it gives no progress guarantee.
* The instruction fetch path misses to off-chip memory for every new line of
  code. There is no boot ROM.

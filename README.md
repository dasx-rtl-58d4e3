# DASX: a data-structure accelerator in SystemVerilog

Many data-centric loops spend more work finding their data than computing on it. Examples are walking a vector, probing a hash table and descending a B-tree. A general-purpose core issues every address itself and runs the bounds checks and pointer chasing. Its load/store queue then caps how many cache misses can be in flight.

DASX splits such a loop in two:

* **Collectors** are small state machines next to the last-level cache (LLC). Each one knows the layout of one kind of data structure from a descriptor. It walks the structure, brings the needed lines into the LLC ahead of time and *locks* them there. It then copies the objects into a small object cache. Many misses can be in flight at once.
* **A PE array** of eight tiny in-order integer cores runs the loop body. The PEs never compute an address. They load and store objects by *key* (for a vector, the element index) from the **Obj-Store**, a 1 KB cache that the Collectors fill before the PEs start. A PE access therefore never misses.

This repository holds synthesizable RTL for the whole accelerator:

* the PEs and their shared instruction buffer;
* the barrier;
* the Obj-Store;
* a group of vector Collectors;
* a hash-table Collector and a B-tree Collector;
* a 4 MB, 16-way LLC with per-line lock counters, its MSHRs and a request arbiter.

Testbenches and a behavioural DRAM model are also included.

## How a loop runs

The host sets up the following, then pulses `vec_start`:

* a kernel in the instruction buffer;
* up to eight *VEC descriptors*, one per array the loop touches;
* a trip count.

Each VEC descriptor gives:

* load or store;
* base address;
* element size (1, 2 or 4 bytes);
* length;
* up to eight signed *key offsets* per iteration. Iteration `i` with offsets {0, +1} needs elements `i` and `i+1`.

### Tiles

The loop is cut into **tiles**: runs of consecutive iterations whose objects all fit in the Obj-Store at once.

* An Obj-Store tag holds 8 adjacent keys of one vector, one 4-byte sector each. There are 32 tags.
* A tile of `T` iterations needs, for each vector, one tag per 8-key block covered by `[start+min_off, start+T-1+max_off]`. Keys are clipped to the vector.
* The tile sizer shrinks `T` until the blocks of all vectors together fit in 32 tags. For the first tile it starts from `min(remaining, 256)`; after that it starts from the previous tile's size + 8.

With four 4-byte vectors and unit offsets a tile is about 64 iterations. With seven vectors it is 32.

### Two engines in the Collector group

The group (`collector_group`) runs a **prefetcher** and a **refill engine** concurrently.

1. **Prefetcher.** It sizes the next tile, then sends one LLC `LOCK` per tag block, one per cycle. The order is block 0 of every vector, then block 1 of every vector, and so on: this is *iteration order*.
   * Each LOCK raises the line's 6-bit reference count (Ref#). On a miss it also allocates the line and starts a DRAM refill. The LOCK is acknowledged at once, while the data is still on its way, so up to 8 misses (one per MSHR) overlap.
   * A refused LOCK (NACK) is tried again in another pass over the tile's not-yet-locked blocks. That pass starts once every response of the current one is back.
   * Finished tiles go into a queue. The prefetcher can run up to `RUNAHEAD` (2) tiles ahead of the PEs.
2. **Refill engine.** It takes the oldest queued tile and `READ`s every block from the LLC into an Obj-Store tag.
   * READs go out one per cycle. A READ of a line whose refill has not arrived is NACKed. The engine then drops the younger responses and replays from that block, so tags are still filled in order.
   * The engine records each block's byte address as a back-pointer.
   * It then pulses `tile_go`.
   * When every PE is waiting for the next tile, it `WRITE`s each dirty tag back through its back-pointer with a byte mask, `UNLOCK`s the tile's lines and clears the Obj-Store.
   * After the last tile it raises `loop_done`.

### Why the lock order matters

Locked lines cannot be evicted, and the LLC refuses a LOCK that would lock the last unlocked way of a set. If independent Collectors locked lines for far-future iterations, they could fill a set before the current iteration's lines were in. Nothing could then make progress.

Locking in iteration order, and finishing tile *t* before any LOCK for tile *t+1*, guarantees that the oldest unfinished tile never waits on space held by a younger one. A NACK then only means "wait for a tile to retire". The PEs consume data a whole tile at a time, so the ordering is enforced per tile. This leaves one hard limit, a per-tile form of a limit the published design also has per iteration:

* The lines one tile needs from a single LLC set must fit in `WAYS-1` ways. That is 15 by default.

Normal vectors spread a tile over many sets, so this limit only bites for arrays whose bases alias to the same sets.

### PE view of a tile

Iterations are dealt round robin: in a tile starting at `s`, PE `p` runs `s+p`, `s+p+8`, and so on. PEs with no iteration in a tile skip it.

## The processing element

`pe` is a 4-stage integer pipeline (fetch, decode/register read, execute, write-back) with 32 registers; `r0` is always zero.

* The write-back result is forwarded to decode.
* An instruction that needs a result still in execute stalls one cycle.
* Branches resolve in execute and flush the two younger instructions.
* The Obj-Store is read combinationally in execute, so loads have no extra latency.

All PEs fetch from one 256-word instruction buffer (`ins_buffer`), each with its own PC. This lets them take different branches in the same kernel.

Instruction encoding (own design; 6-bit opcode in `[31:26]`):

| Class | Instructions | Fields |
|---|---|---|
| Arithmetic | ADD SUB AND OR XOR SLL SRL SLT MUL | rd `[25:21]`, rs1 `[20:16]`, rs2 `[15:11]` |
| Immediate | ADDI, LUI | rd, rs1, imm `[15:0]` |
| Branch | BEQ BNE BLT | rs1 `[25:21]`, rs2 `[20:16]`, target = pc+1+imm |
| Load by key | LD rd, coll, rs1, off | `rd = Obj[coll][rs1 + off]`; coll in imm`[15:13]`, off in imm`[12:0]` (signed) |
| Store by key | ST rs, coll, rs1, off | `Obj[coll][rs1 + off] = rs`; the data register is in `[25:21]` |
| Loop | CUR rd | rd = current iteration (%CUR) |
| Loop | NEXT rd | advance to this PE's next iteration. rd = 1 if there is one; rd = 0 when the loop is over. Stalls across tile boundaries. |
| Sync | BAR | wait until every PE has reached BAR or has no iteration left in this tile (%BAR) |
| Other | HALT, NOP | |

A kernel has the shape `loop: CUR; LD...; compute; ST...; NEXT r; BNE r, r0, loop; HALT`. `tb/dasx_asm_pkg.sv` has encoder functions for every instruction.

## The Obj-Store

`obj_store` is a fully associative *decoupled sector cache*.

* Each of the 32 tags names a Collector id and an 8-aligned run of keys.
* Each tag owns eight 4-byte sectors with their own valid bits, so a tag can hold a partial block at either end of a vector.
* Each tag also keeps a dirty bit, the element size and the LLC back-pointer.
* Each PE has its own lookup port: a parallel compare of (Collector, key block, sector valid) against all 32 tags.
* Narrow elements are zero-extended on load and truncated on store.
* A lookup that misses is a protocol error and is caught by an assertion.

## The LLC and its locking protocol

`llc` is a write-back cache with 4096 sets × 16 ways of 64-byte lines. Every line has valid, dirty, *pending* (refill in flight) and a 6-bit Ref#.

It has one request port shared by five requesters through `llc_arbiter` (round robin). The requesters are:

* the prefetcher;
* the refill engine;
* the hash Collector;
* the B-tree Collector;
* an external host port.

Every request gets exactly one response. The response comes 20 cycles later, in order, and is routed back by a source id that the arbiter stamps on each request. The response is either ACK or NACK; a NACK always means *try again later*.

| Op | Result |
|---|---|
| READ | hit on a filled line: ACK and the data. Miss: start a refill and NACK. |
| WRITE | byte-masked write to a resident, filled line. Always ACK (writing a line that is not resident is an assertion error). |
| LOCK | Ref# + 1, allocating and refilling on a miss, then ACK. NACK if the set would be left with no unlocked way, if no MSHR is free or if Ref# is saturated. |
| UNLOCK | Ref# − 1, then ACK |

Replacement and refills:

* Victims rotate over ways that are unlocked and not pending.
* Dirty victims are queued to DRAM.
* `mshr_file` holds one entry per outstanding refill: the line address and the way reserved for it. There are 8 entries.
* DRAM read data may return in any order. A cycle that carries DRAM data accepts no request.
* After reset the tag array is cleared one set per cycle. `llc_ready` rises when the sweep is done, 4096 cycles at the default size.

## Hash-table and B-tree Collectors

Both answer query streams through valid/ready ports and share the LLC with the loop. Both only search; insertions are left to the host.

### `hash_collector`

The table is an array of `2^log2_buckets` buckets of 32 bytes:

* a 128-bit key;
* a 32-bit value;
* 12 unused bytes.

A key of 0 marks an empty bucket. The hash is the XOR of the four key words, masked to the table size. Collisions use linear probing: the search ends at the key, an empty bucket or after a full sweep.

Up to four keys are searched at once, each in its own context, and results return in query order.

### `btree_collector`

A node has five 16-byte entries, 128-byte aligned: a 64-bit key, a 32-bit payload and a 32-bit child pointer. Keys are sorted, and unused entries hold the all-ones key.

Each level works as follows:

1. Read the node's two lines.
2. Compare the search key against all five entries in parallel.
3. Take the first entry whose key is ≥ the search key. If it is equal, the key is found. Otherwise follow its child; a null child means the key is absent.

The result also reports how many levels were visited.

## Top level (`dasx_top`)

Parameters and their defaults:

| Parameter | Default |
|---|---|
| `NPE` | 8 |
| `NTAGS` | 32 |
| `LLC_SETS` | 4096 |
| `LLC_WAYS` | 16 |
| `LLC_LATENCY` | 20 |
| `NMSHR` | 8 |
| `HASH_CTX` | 4 |
| `RUNAHEAD` | 2 |

Port groups:

* `ib_*`: write the kernel.
* `vec_desc`, `trip_count`, `vec_start`, `vec_busy`, `vec_done`: run a loop. `vec_done` means the last tile was written back and all PEs halted.
* `hash_desc`, `hq_*`, `hr_*`: hash queries.
* `bt_desc`, `bq_*`, `br_*`: B-tree queries.
* `host_req_*`, `host_rsp_*`: direct LLC access, for example to read results.
* `dram_*`: line-wide requests with in-order acceptance. Read responses are tagged with the line address.
* `stat_*`: event counters for tiles, lock retries, refill retries, write-backs, PE stall cycles, barriers, LLC hits/misses/lock refusals/evictions and instructions retired per PE.

## Simulation

Everything runs under plain Verilator 5. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dasx_top \
  -y rtl -y tb +libext+.sv rtl/dasx_pkg.sv tb/dasx_asm_pkg.sv tb/tb_dasx_top.sv
./obj_dir/Vtb_dasx_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb/dram_model.sv` is a behavioural memory with a fixed latency, which testbenches preload through `poke32`/`poke8`.

The top-level testbenches:

* **`tb_dasx_top`** uses a 4-set × 8-way LLC and 1000-cycle DRAM, so that sets fill with locked lines.
  * It runs the integer kernel `C[i] = A[i]*B[i] + B[i+1] + 2*D[i] + (B[i] < A[i] ? 0 : 7)` with a BAR in every iteration. The vectors are three 4-byte arrays and one byte array.
  * While that loop runs, it also sends hash lookups (hits, misses, a collision chain) and three-level B-tree searches.
  * It then reruns a 5-iteration loop.
  * It checks every result against a model. It also checks that each mechanism happened at least once: several tiles, lock refusals and retries, refill retries, PE data stalls, dirty write-backs at both levels, barriers, a PE with no iteration in a tile, overlapping DRAM misses and the restart.
  * A 300-iteration loop takes about 11 500 cycles.
* **`tb_dasx_datacube`** rolls up a 400-row cube of 7 measures at the default size.
  * The measures are three 4-byte columns, two 2-byte columns and two 1-byte columns, and each row's total is stored.
  * This fills a Collector group with 8 vectors.
  * It checks every total, checks that tiles are 32 rows and reports cycles per row (about 11).
* **`tb_dasx_full`** runs the same flow at the default size (4 MB LLC). It then drives the host port to fill one set with 15 locks, sees the 16th refused, and forces dirty evictions.

Each block also has its own `tb_<block>.sv`.

## Where this differs from the published DASX design

* **No floating point.** The published PEs have an FPU and 32 FP registers. Its design is not given, so the PEs are integer-only. FP-heavy loops such as option pricing cannot run.
* **Instruction set.** Only the special operations (key loads/stores, %CUR, NEXT, %BAR) come from the design. The base ISA and all encodings are this implementation's own.
* **One object per 4-byte sector.** Elements are 1, 2 or 4 bytes, each in its own sector. Multi-sector objects (wider structs) are not supported, and a byte array costs as much Obj-Store space as a word array. The published example packs 25 bytes per iteration into 40 iterations per tile. This design gets 32 iterations for that layout.
* **Vector base alignment.** Vector bases must be 32-byte aligned, so that an 8-key block never straddles a line.
* **Ref# granularity.** Ref# counts Obj-Store tag blocks per line, not individual objects.
* **LLC model.** The LLC is one bank with a fixed 20-cycle latency. The NUCA tiles, ring and coherence of the host memory system are not modelled, and write-backs to the LLC trigger no coherence actions.
* **No TLB.** Collectors use physical addresses.
* **Hash values.** The hash Collector returns 4-byte values. It does not follow pointers into data slabs.
* **B-tree search.** One node is searched per level with a parallel compare. The published design prefetches within a level and may use a binary search.
* **Latencies.** Collector latencies are this RTL's own (address generation is combinational). They are not the cycle estimates quoted for the published design.
* **Refill time.** The Obj-Store is loaded by one engine through the single LLC port, one READ per cycle, while the PEs wait. Tiles are not double-buffered. For short kernels this refill gap matters: the roll-up example below takes about 11 cycles per row, most of it refill.

## File map

* `rtl/`: one module or package per file.
  * `dasx_pkg` has the shared types and encodings.
  * Blocks: `pe`, `ins_buffer`, `pe_barrier`, `obj_store`, `vec_agu` (key→address for one vector and tile), `collector_group`, `hash_collector`, `btree_collector`, `llc`, `mshr_file`, `llc_arbiter` and the top `dasx_top`.
* `tb/`: testbenches, the DRAM model and the kernel assembler package.

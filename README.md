# ABC: an L1 data cache that allocates by conflict

A small, highly associative buffer next to a direct-mapped cache removes
many conflict misses. A victim cache does this by moving every line evicted
from the main cache into the buffer, and swapping lines back on a buffer hit.
That needs a wide two-way data path between the two stores, on the critical
path. *Multilateral* caches keep the two stores unconnected. Each missing
line is placed in one of them and stays there until it is evicted. The open
question is where to put each line.

Allocation By Conflict (ABC) decides by looking at the block that the new
line would throw out of the main store, and not at the new line itself. If
that block is still in use, it stays and the new line goes to the buffer.
If not, it is replaced. "Still in use" is kept in a single extra bit per
main-store block, the **C bit**. No history table and no data path between
the stores are needed.

This repository holds synthesizable SystemVerilog for such a cache, in its
main configuration: a 32 KB direct-mapped main store **A** and a 4 KB
32-way buffer **B**, with 32-byte lines. Both are write-back and
write-allocate and both replace by LRU. Testbenches check it against an
independent reference model.

## The allocation rule

Definitions used throughout the code:

* **A-set**: the set of A that an address maps to. The **B-set** is the set
  of B it maps to (the low bits of the line address in both).
* **Conflict block**: the block A would evict if the missing line went into
  A. This is the lowest-numbered invalid way of the A-set, or else its LRU
  way. With a direct-mapped A it is simply the one block of the set.
* **CNR** (conflict with no replacement): a miss whose line is placed in B,
  so that nothing in A is replaced.
* **C bit** (one per A block):
  * cleared (0) when the block enters A (start of a tour);
  * cleared when the block is referenced (hit);
  * set (1) for *every* block of an A-set when a CNR happens in that set;
  * an invalid block counts as C=1.

So C=1 means "a CNR has happened in my set since I was last used". The block
could then have been evicted at that CNR without anyone missing it.

On a miss in both stores:

| conflict block | decision | effect |
|---|---|---|
| invalid, or C=1 | allocate in **A** | conflict block replaced (written back if dirty); new block gets C=0 |
| valid and C=0 | allocate in **B** | B-set LRU block replaced (written back if dirty); CNR: C=1 for all blocks of the A-set |

One consequence: a hot block of A, referenced at least once between
successive CNRs to its set, is never evicted by conflicting lines. Those
lines live in B instead, so the set grows into B on demand. A block that
sat unused through a CNR goes at the next miss to its set. Evicted lines go
straight to the next level from whichever store they were in. They never
move between A and B, so A and B always hold disjoint lines. An assertion
in `abc_dcache` checks that no address hits in both.

An example with a direct-mapped A. Lines X and Y map to the same A-set.
1. X misses. The set is empty, so X goes into A with C=0.
2. Y misses. X has C=0, so Y goes to B. This is a CNR, and X's C becomes 1.
3. X hits. X's C becomes 0.
4. Y hits in B. The C bits do not change.
5. Z, a third line of the same A-set, misses. X has C=0, so Z goes to B and
   X's C becomes 1.
6. W misses in the same set. X has C=1 (it was not used since step 5), so W
   replaces X in A.

## Access timing

`abc_dcache` is non-blocking. Each accepted request spends the next cycle in
a single lookup stage, where A and B are searched in parallel.

* **Hit (A or B)**: answered from the lookup stage, so the hit latency is
  1 cycle. A new request can be accepted in the same cycle, so hits can
  stream one per cycle. A hit updates the LRU state of its store. In A it
  also clears the block's C bit. A store hit writes the word under byte
  enables and marks the line dirty.
* **Miss**: the access takes a free miss register (MSHR, `N_MSHR` of them)
  and leaves the lookup stage. Later requests go on behind it and can hit
  under the miss or miss under it. The MSHR sends a read to the next level,
  tagged with its number.
* **Line arrival**: the ABC decision is taken in the cycle the line arrives,
  on the state of A at that moment. The line is installed in A or B. If it
  went to B, the C bits of the A-set are set in the same cycle. The access
  that missed is answered in that cycle too; for a store miss, the store data
  is merged into the line, which is installed dirty. A dirty victim goes into
  a write-back buffer (`WB_DEPTH` entries). An arriving line has priority
  over the lookup stage, which waits for that cycle.
* **Waiting in the lookup stage**: an access waits there, and holds up the
  requests behind it, in three cases:
  * its line is being fetched (a *delayed hit*; it hits once the line is in);
  * its line is still in the write-back buffer;
  * it misses and every MSHR is busy.
* **Next level**: write-backs are sent before pending reads, over one
  request channel. A request that is not accepted is held unchanged. The
  cache refuses arriving lines (`mem_resp_ready` low) while the write-back
  buffer is full.

Say the next level takes `L` cycles from accepting a read to returning the
line (`L` = 18 in the modelled system). Then an isolated miss is answered
`L+2` cycles after it was accepted. Answers carry the request's `id` and may
come back out of order. `cpu_resp_rdata` holds the addressed word; for a
store it is the value before the store.

## Modules

| file | what it is |
|---|---|
| `rtl/abc_pkg.sv` | widths (32-bit address, 32-bit word, 256-bit line, request tags), request structs, store operation enum, event struct, `merge_word` |
| `rtl/abc_dcache.sv` | **top**: lookup stage, MSHRs, write-back buffer, memory request channel; instantiates A and B |
| `rtl/abc_a_cache.sv` | store A: tags, valid, dirty, data, LRU, conflict-block choice, C bits and decision |
| `rtl/abc_cbits.sv` | the C-bit array with its update rules and the decision `alloc_to_a` |
| `rtl/abc_b_cache.sv` | store B: tags, valid, dirty, data, LRU, victim choice |
| `rtl/lru_age.sv` | true LRU per set using age counters (ages always a permutation of 0..WAYS-1) |

Each store takes one operation per cycle on the way its controller names:
`ST_HIT` (a reference, optionally writing a word) or `ST_FILL` (installs a
line and starts a tour). `abc_a_cache` also takes `cnr_i`. All lookups are
combinational reads of registered state, so a store's outputs depend only on
the set and tag presented.

### Parameters of `abc_dcache`

| parameter | default | meaning |
|---|---|---|
| `A_BYTES` | 32768 | capacity of A |
| `A_WAYS` | 1 | associativity of A (1, 2 and 4 are the studied values) |
| `B_BYTES` | 4096 | capacity of B |
| `B_WAYS` | 32 | associativity of B (4 sets at the defaults) |
| `N_MSHR` | 8 | miss registers, so up to 8 line fetches in flight (at most 8: the read tag is 3 bits) |
| `WB_DEPTH` | 4 | entries of the write-back buffer |

The line size (32 bytes) is fixed in `abc_pkg`. Set counts must come out as
powers of two and at least 2.

### Ports of `abc_dcache`

* Processor: `cpu_req_valid`/`cpu_req_ready` handshake with `cpu_req`
  (4-bit `id`, `we`, byte `addr`, `wdata`, `be`). Each request is answered
  by one `cpu_resp_valid` pulse with `cpu_resp_id` and `cpu_resp_rdata`. The
  processor must not reuse an id that is still waiting for its answer.
* Next level: `mem_req_valid`/`mem_req_ready` with `mem_req` (3-bit `id`,
  `we`, line address `laddr`, 256-bit `wdata`), held until accepted.
  Write-backs (`we=1`) get no answer. A read is answered by `mem_resp_valid`
  with `mem_resp_id` and `mem_resp_rdata`, taken when `mem_resp_ready` is
  high. Reads may be pipelined and answered in any order.
* `events`: one-cycle pulses for counting:
  * `hit_a`, `hit_b`, `miss` (lookup outcomes);
  * `alloc_a`, `alloc_b` (where an arriving line went; `alloc_b` is a CNR);
  * `wb` (dirty victim queued);
  * `delayed` (an access waits for its line to arrive);
  * `mshr_full` (a miss waits for an MSHR).
* `clk`, and `rst_n` (asynchronous, active low). Reset invalidates every
  line, sets every C bit, empties the MSHRs and the write-back buffer, and
  puts each set's LRU order at way 0 newest.

Synthesized at its defaults, the top has about 4,350 flip-flop bits (most
of them A's valid, dirty and C bits) plus about 317 kbit of memory arrays
(tags, data, MSHR and write-back buffer contents).

## How this departs from the system it was designed for

The cache was specified for a 16-wide out-of-order processor with a
non-blocking L1 data cache and *8 memory ports*. This implementation is
non-blocking but has **one port**: it looks up one access per cycle. The
allocation scheme, the C-bit rules, the stores, LRU, the write policy, the
latencies and delayed hits are all built.

Choices made here where the specification is silent:
* processor and memory interfaces, including the request tags;
* the 32-bit word with byte enables;
* how the cache is non-blocking: one lookup stage, MSHRs that each hold
  one access, delayed hits that wait in the lookup stage;
* taking the ABC decision when the line arrives;
* the write-back buffer, and sending write-backs before reads;
* merging store data into the fetched line on a store miss;
* the lowest invalid way being used before the LRU way;
* the reset state.

Victim caching, NTS, PCS and random allocation were only points of
comparison and are not included. Neither are two weaker ABC variants:
setting C only on the LRU block at a CNR, and 2-bit counters instead of
C bits.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog. With plain Verilator 5:

```sh
# end-to-end: direct-mapped, 2-way and 4-way A at reduced size, and
# 2-way and 4-way A at the full 32 KB + 4 KB
verilator --binary --timing --assert -Irtl -Itb \
  rtl/abc_pkg.sv tb/abc_tb_pkg.sv rtl/lru_age.sv rtl/abc_cbits.sv \
  rtl/abc_a_cache.sv rtl/abc_b_cache.sv rtl/abc_dcache.sv \
  tb/abc_mem_model.sv tb/abc_dcache_env.sv tb/tb_abc_dcache.sv \
  --top-module tb_abc_dcache -o tb && ./obj_dir/tb

# the same at full default size
#   ... replace tb/tb_abc_dcache.sv by tb/tb_abc_dcache_full.sv and the top name
# unit tests: tb_lru_age, tb_abc_cbits, tb_abc_a_cache, tb_abc_b_cache
verilator --binary --timing --assert -Irtl rtl/abc_pkg.sv rtl/lru_age.sv \
  rtl/abc_cbits.sv rtl/abc_a_cache.sv tb/tb_abc_a_cache.sv \
  --top-module tb_abc_a_cache -o tb && ./obj_dir/tb
```

What the tests check:

* `tb_lru_age`, `tb_abc_cbits`, `tb_abc_a_cache`, `tb_abc_b_cache` run
  thousands of random cycles against reference models. The models are
  written differently from the RTL, for example LRU as an MRU-ordered list.
  They compare every output each cycle.
* `tb_abc_dcache` and `tb_abc_dcache_full` use `abc_dcache_env`. It drives
  random loads and stores from an address pool built to collide in A and
  in B. A reference model of the whole scheme, with a shadow copy of memory,
  follows the cache access by access and line by line. It predicts:
  * the outcome of each lookup: hit A, hit B or miss;
  * for each arriving line, whether it goes to A or B and whether a dirty
    victim is written back;
  * the answer's id and load data.

  It also checks that every cycle an access waits in the lookup stage has
  one of the three reasons above, so a hit is never held behind a miss
  without cause. The first quarter of each run sends one access at a time
  and checks exact latencies (1 and L+2, plus any waiting cycles). After
  that, requests stream in and the memory model randomly withholds
  `mem_req_ready`, sometimes for long bursts. At the end the env reports how
  often each mechanism happened, and a mechanism that never happened counts
  as a failure. The mechanisms are:
  * hits in A and B;
  * the two kinds of allocation to A, and CNRs;
  * write-backs from A and from B, and B evictions;
  * store hits and store misses;
  * a block kept in A because it was referenced after a CNR;
  * hit under miss, miss under miss, delayed hits, all MSHRs busy;
  * waiting for a write-back, waiting for an arriving line;
  * memory request stalls, and arriving lines refused while the write-back
    buffer is full.
* `tb/abc_mem_model.sv` is a behavioural model of the next memory level. It
  pipelines reads with an 18-cycle latency and fills unwritten memory with
  a fixed function of the address (`abc_tb_pkg::init_word`).

The full-size test runs in well under a second with Verilator.

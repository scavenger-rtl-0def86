# Scavenger-style on-chip cache hierarchy in SystemVerilog

A user kernel on a large FPGA often uses only a small share of the block RAM
(BRAM). This design puts the spare BRAM to work as a cache hierarchy behind the
kernel's memories, and does it without losing clock rate. It has three ideas:

* **Big private caches that still reach a high clock rate.** Every private
  memory gets a direct-mapped first-level (L1) cache. A cache that spans most of
  the chip's BRAM would normally be held back by long wires, so its store is
  split into banks. Each bank has its own request and response buffers, which
  adds a few cycles of latency but keeps every path short.
* **A shared on-chip second level.** The BRAM that is still left after the L1s
  becomes a set-associative, multi-word shared cache (L2). It serves all memory
  spaces and sits in front of the off-chip central cache.
* **Caches that need not be a power of two in size.** A direct-mapped cache can
  have M·2^R lines (M odd). The index is then found with a small lookup table
  and a concatenation, so no divider is needed and the BRAM can be filled
  almost completely.

The RTL follows the memory-hierarchy architecture in *Scavenger: Automating
the Construction of Application-Optimized Memory Hierarchies* (FPL 2015). That
work publishes the architecture, not RTL. Where it leaves a detail open,
this implementation makes its own choice.
Every such choice is listed under [Departures and own choices](#departures-and-own-choices).

```
 client 0 ──► l1_cache ─┐
 client 1 ──► l1_cache ─┤   mem_arbiter    l2_cache            line port
 client 2 ──► l1_cache ─┼──► (round  ──► (4-way, 4-word  ──►  to off-chip
 client 3 ──► l1_cache ─┘     robin)       lines, LRU)        central cache
              │                            │
        crc_hash + cache_index       metadata store + 16 data stores
        cache_store (4 banks)        (cache_store, banked)
```

The top is `scavenger_top`. Its defaults are the largest configuration
reported for a four-memory list-merging kernel:

* four L1 caches of 2^16 64-bit words each (2048 KB in total), each on a
  4-bank store;
* a four-way L2 with 4096 sets of 4-word lines (512 KB).

That comes to about 26 Mbit of storage, roughly 70 % of the BRAM bits of a
Virtex-7 485T.

## The banked BRAM store (`banked_store`)

This block does the most to keep the clock rate up. It is also the easiest to
get wrong, so it comes first.

A store takes requests of the form *(write?, address, data)* on a valid/ready
channel. It answers every read, in request order, on a second valid/ready
channel. Writes get no answer. `cache_store` picks the store from `NBANKS`.
With `NBANKS = 1` it builds `mono_store`: one BRAM, with the answer one cycle
after acceptance. With `NBANKS > 1` it builds `banked_store`, described below.
The cache controllers only see the handshake, so banking is a single
parameter.

Inside `banked_store`:

1. **Bank selection.** The low `log2(NBANKS)` address bits pick the bank. The
   remaining bits address the word inside the bank. Consecutive words go to
   different banks.
2. **Input buffer per bank.** An accepted request goes into its bank's
   two-entry FIFO. The store is ready when the target bank's FIFO has room
   and, for a read, when the in-flight queue has room.
3. **BRAM.** A bank takes the head of its input FIFO when it can. A write can
   always go. A read goes only when the word it returns is sure to find room
   in the bank's output buffer (`entries + reads in flight < OUT_DEPTH`). This
   credit check means a client that stalls responses never loses data.
4. **Output buffer per bank.** This is a two-entry FIFO that catches the BRAM
   word one cycle after the read.
5. **In-flight queue.** Each accepted read pushes its bank number into a FIFO.
   The response port shows the output buffer of the bank named at the head of
   that queue. It waits if that bank's word has not arrived yet, even when
   other banks already hold later words. This is how responses from
   independent banks are put back into request order.

Two requests to the same address always go to the same bank and pass through
the same FIFO, so a read after a write always sees the new word.

Timing with no stalls: a read is answered **3 cycles** after acceptance (input
FIFO, BRAM, output FIFO), against 1 cycle for `mono_store`. Reads to
consecutive addresses are accepted one per cycle. The testbenches check both
numbers.

## Hashed and non-power-of-two indexing (`crc_hash`, `cache_index`)

Strided access patterns with power-of-two strides would pile up in a few
lines, so the L1 hashes the word address before it uses it. The hash is the
W-bit CRC of the W-bit address:

    h(a) = a(x) · x^W  mod  P(x),    P(x) = x^W + POLY

Here W equals the address width. P has a nonzero constant term, which makes x
invertible modulo P, so the hash is a bijection. The cache therefore stores
only the **tag** part of the hashed address. On a write-back it rebuilds the
original address with the inverse map, `a(x) = h(x) · x^-W mod P(x)`. That is
`crc_hash` with `INVERSE = 1`, which divides by x W times. Both directions are
XOR networks only. The default polynomial is the IEEE CRC-32 polynomial
(`scv_pkg::CRC32_POLY`); any full-degree polynomial with bit 0 set works.

`cache_index` splits the hashed address for a cache of `LINES = M·2^R` lines:

* **IB** (index base) is the low R bits.
* **tag** is all bits above IB.
* If M = 1, the index is IB.
* Otherwise, let K be the smallest width with `LINES < 2^K`. Take
  **IR** = the low `K − R + 4` bits of the tag. Then

      index = (IR mod M) · 2^R + IB = { LUT[IR], IB }

  The table has `2^(K−R+4)` constant entries, entry *i* = *i* mod M. The 4
  extra IR bits (`scv_pkg::NPOT_EXTRA_BITS`) keep the M ranges evenly loaded.
  With `K − R ≤ 4`, the table has at most 256 entries, so M is an odd number
  below 16.

Example: the module default is M = 5, R = 16 (327,680 lines = 2560 KB of
64-bit words). Then K = 19, IR is 7 bits, and the table has 128 entries of
3 bits each. The tag always keeps the IR bits, so `{tag, IB}` rebuilds the
hashed address exactly.

## First-level cache (`l1_cache`)

Each line holds one word: `{valid, dirty, tag, data}` in one store entry. The
store is a `cache_store` (banked by default). The controller serves one
request at a time:

| case | what happens |
|---|---|
| read hit | return the word |
| write (hit or miss) | overwrite the line, mark it dirty. No fill is needed, because a line is a single word. |
| read miss | fetch the word on the memory port, install it clean, return it |
| dirty victim | before anything else, write it back on the memory port. Its address comes from the inverse hash of `{stored tag, IB}`. |

A client request is accepted in the same cycle as the store read of its line.
The hash and index logic is combinational, in front of the store.

Timing with no stalls, counted from the accepting edge to the edge on which
the answer can be taken: a read hit takes **2 cycles** with the monolithic
store and **4 cycles** with the 4-bank store. The extra 2 cycles are the
store's bank buffers. A write hit takes the same lookup, then one more cycle to
write the line. The next request is accepted once the controller is idle
again.

After reset, the controller clears one line per cycle. `init_done` rises after
`LINES` cycles (65,536 at the top's defaults). Requests made before then wait.

## Shared cache (`l2_cache`)

Requests are word reads and word writes. Each carries the ID of the memory
space it belongs to. The key `{ID, address}` is split into the word offset
(the low `log2 WORDS` bits), the set (the next `log2 SETS` bits) and the tag
(everything else, ID included). Different memory spaces therefore never
alias, and no coherence is needed.

Storage is split the way last-level caches usually are:

* **One metadata store.** Each entry holds a whole set: `{valid, dirty, tag,
  age}` for every way.
* **`WAYS × WORDS` data stores.** Each stores one word position of one way for
  all sets. A word write touches one store. A line fill or eviction touches
  the `WORDS` stores of one way in parallel.
* Every store is a `cache_store`. The data stores are banked by default.

Replacement is true LRU. Each way has an age, where 0 means most recently
used. A touched way gets age 0, and every way that was younger ages by one. An
invalid way is filled before any valid way is evicted. The reset sweep writes
the ages 0…WAYS−1, so they always form a permutation.

A request passes through these steps:

1. Read the set's metadata. With `PARALLEL = 1`, the requested word of every
   way is read in the same step.
2. Compare the tags. This is a separate cycle.
3. Act on the result:
   * **Hit:** read the word from the hit way, or skip the read if it was
     already read in parallel. For a write, write the word and set dirty.
   * **Miss:** pick the victim. If the victim is dirty, read its whole line
     and send it out as a line write. Then request the new line, merge a
     write word into it, and write all its words.
4. Write back the metadata (ages, dirty, tag). Answer reads.

The line port carries `{ID, line address}` and whole lines of
`WORDS × DATA_W` bits.

## Interconnect (`mem_arbiter`)

Each cycle, the arbiter grants one valid request, in round-robin order
starting after the last winner. It forwards the request with the winner's
index as the ID. Responses carry that ID and go only to that client. The
arbiter keeps no per-request state of its own. It relies on the level below
to return each response with the ID of its request. The L2 does this by
serving one request at a time.

## Building without a level

A kernel that leaves too little BRAM for a useful shared cache is built with
`L2_EN = 0`. The arbiter's output then goes straight to the backing port.
That port becomes one word wide: `b_req_laddr = {ID, word address}`, and
`b_req_wline` / `b_resp_line` are `DATA_W` bits. The central cache may have
several reads in flight and answers them in order. A FIFO of
`2^ID_W` client IDs, one entry per outstanding read, steers each answer back
to its client. When the FIFO is full, further reads wait. The `l2_*` events
stay low.

A well-pipelined kernel may not want a local cache. With `L1_EN = 0`, the
client ports feed the arbiter directly, and the `l1_*` events stay low.

## Interfaces

All blocks use one clock and an asynchronous active-low reset `rst_n`.

**Client port** of the top (and the `c_*` port of `l1_cache`). This is the
private-memory interface: read request, read response, write.

* `c_req_valid / c_req_ready`: the request handshake. Hold the request stable
  until `c_req_ready`.
* `c_req_write`: 1 for a write, 0 for a read.
* `c_req_addr`: the word address, `ADDR_W` bits.
* `c_req_wdata`: the word to write, `DATA_W` bits.
* `c_resp_valid / c_resp_ready / c_resp_data`: one response per read, in
  order.

**Line port** of the top (`b_*`), to the off-chip central cache:

* `b_req_valid / b_req_ready`: the request handshake.
* `b_req_write`: 1 for an eviction, 0 for a fill request.
* `b_req_laddr = {ID, line address}`.
* `b_req_wline`: the evicted line.
* `b_resp_valid / b_resp_ready / b_resp_line`: one response per fill request.

**Event outputs** pulse for one cycle per event, for performance counters:
`l1_hit/l1_miss/l1_writeback` (one bit per client) and
`l2_hit/l2_miss/l2_evict`.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `N_CLIENTS` | 4 | private memories, each with one L1 |
| `ADDR_W`, `DATA_W` | 32, 64 | word address and word width |
| `L1_M`, `L1_R` | 1, 16 | L1 has `L1_M · 2^L1_R` lines. `L1_M` is odd and below 16. |
| `L1_NBANKS` | 4 | banks of each L1 store. 1 gives a monolithic store. |
| `L2_SETS`, `L2_WAYS`, `L2_WORDS` | 4096, 4, 4 | L2 geometry (all powers of two) |
| `L2_NBANKS` | 4 | banks of each L2 data store |
| `L2_PARALLEL` | 0 | 1 reads the data of all ways together with the metadata |
| `L1_EN` | 1 | 0 builds no first-level caches. Each client port goes to the interconnect unchanged. |
| `L2_EN` | 1 | 0 builds no shared cache. The interconnect goes straight to the line port, which then carries single words. |

Some evaluated configurations need different parameters:

| configuration | parameters |
|---|---|
| single 2 MB L1 | `L1_R = 18` |
| 2560 KB non-power-of-two L1 | `L1_M = 5, L1_R = 16` |
| 8192-set L2 | `L2_SETS = 8192` |
| 24-memory kernel | `N_CLIENTS = 24` |

The individual modules default to their own reported sizes:

* `l1_cache`: 2^18 lines;
* `l2_cache`: 8192 sets;
* `cache_index`: 5·2^16 lines.

## Departures and own choices

These points are open in the reference architecture and were decided here:

* **Handshakes.** Valid/ready channels everywhere, with in-order read
  responses.
* **Blocking controllers.** Both caches serve one request at a time.
  Throughput therefore equals 1 / latency. There is no hit-under-miss.
* **Write policy.** Write-back, write-allocate in both levels. An L1 write
  miss needs no fill.
* **Address bits.** L2 sets come from the low line-address bits, with no hash.
  Banks are interleaved on the low word-address bits.
* **Buffer depths.** Bank FIFO depth 2, in-flight queue depth 8.
* **L2 data stores.** They are always split per way and per word. The
  reference only calls for the per-way split at high associativity.
* **Interconnect.** Round-robin arbitration with ID-routed responses.
* **Backing port without the shared cache.** It carries single words, and
  the top keeps a FIFO of client IDs for the outstanding reads.
* **Word and address widths.** 64-bit words (derived from the reported cache
  sizes) and 32-bit word addresses.

These parts are not built:

* **Coherent-memory caches** and their snoopy protocol. The banked store could
  replace their BRAM store, but the protocol is outside this design.
* **Off-chip central cache, DRAM and host memory.** These are outside the
  design and appear only as the line port.
* **The compile-time flow** that measures leftover BRAM and picks the largest
  L2. Its output corresponds to choosing `L2_SETS` and `L2_WAYS`.

## Sizing against the evaluated kernels

The defaults hold the four-memory list-merging configuration exactly. The
other single-memory kernels fit on one client port, but need larger caches
than the defaults:

* The 2 MB L1 of the stride benchmark and of the single-worker stencil needs
  `L1_R = 18`. Its 1 MB shared cache (4 ways × 8192 sets × 4 words) needs `L2_SETS = 8192`.
* The 2560 KB L1 of the priority-queue kernel needs `L1_M = 5, L1_R = 16`.
  Here K − R = 3, which is within the indexing limit.

Two kernels do not fit as built:

* The 24-memory k-means filter kernel needs `N_CLIENTS = 24` (ID_W becomes 5). Each
  of its L1s is 2^14 words.
* The multi-worker stencil uses coherent memories, which are not built.

`tb_memperf` reproduces the shape of the stride / working-set sweep on a
reduced hierarchy: a 256-word L1, and a 4-way L2 of 256 sets × 4-word
lines. It reports the cost of the measured pass in cycles per access, with
the off-chip model answering after 0–10 cycles:

| working set | stride 1 | stride 4 |
|---|---|---|
| fits in L1 (64 accesses) | 5.0 | 5.0 |
| fits only in L2 (512 accesses) | 23.1 | 31.1 |
| fits in neither (8192 accesses) | 22.7: line reuse still gives 3 L2 hits per miss | 36.8: every access misses |

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_bram_bank` | one-cycle read, hold during idle and write |
| `tb_mono_store`, `tb_banked_store`, `tb_cache_store` | lone-read latency (1 / 3 / 3 cycles); one read per cycle when streaming; 3000 random operations with response back-pressure against a model |
| `tb_crc_hash` | forward hash against a bit-serial CRC; inverse undoes forward and vice versa; no collisions over all 2^16 inputs of a 16-bit instance |
| `tb_cache_index` | index and tag against integer arithmetic for M = 1, 5, 3; every line is reachable |
| `tb_mem_arbiter` | requests carry the right ID; each client gets its own responses in order; strict rotation under saturation |
| `tb_l1_cache` | power-of-two banked and non-power-of-two monolithic caches under random traffic against a reference memory; hit latency 4 / 2 cycles; hits, misses and write-backs all occur |
| `tb_l2_cache` | a serial 4-way banked cache and a parallel 2-way monolithic cache; an LRU sequence checked hit by hit; random multi-ID traffic against a reference |
| `tb_scavenger_top` | four clients at reduced size. Requires L1 hits, misses and write-backs, L2 hits, misses and dirty evictions, interconnect contention and client stalls. |
| `tb_scavenger_top_nol2` | the same traffic with `L2_EN = 0`. The memory model keeps several word reads in flight, so responses must be routed by the ID FIFO. Requires that to happen. |
| `tb_scavenger_top_nol1` | the same traffic with `L1_EN = 0`, so every access reaches the shared cache |
| `tb_scavenger_top_full` | the same checks with the top at its default size (65,536-cycle clear, then 3000 operations per client) |
| `tb_memperf` | single-client stride and working-set sweep, printing cycles per access. Checks that small sets hit in L1, middle sets hit in L2, and stride-1 sets larger than the L2 still hit 3 of 4 words thanks to the 4-word lines. |

For every module, a deliberately broken variant was run against its
testbench, and each one failed.

What the testbenches do not cover:

* timing closure and BRAM mapping on a real device;
* the application kernels themselves. Only the memory-performance sweep is
  reproduced, as synthetic traffic.

To run one testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/scv_pkg.sv tb/tb_scavenger_top.sv --top-module tb_scavenger_top
./obj_dir/Vtb_scavenger_top
```

Include `rtl/scv_pkg.sv` first. `-y` lets Verilator find the other modules by
file name: there is one module per file, and `rtl/` and `tb/` have no
subfolders. The testbenches use only two-state logic, and they reset or
initialise everything they read.

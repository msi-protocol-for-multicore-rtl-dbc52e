# Dual-core MSI cache coherence with a duplicate-tag controller

Two processor cores each have a small private data cache, and both caches sit
in front of one shared main memory. Once both caches may hold copies of the
same memory line, a store by one core can leave a stale copy in the other. This
RTL keeps the two caches coherent with the MSI protocol (Modified, Shared,
Invalid). It does not put a snoop controller inside each cache. Instead, one
central **coherency controller** looks at a **duplicate tag store** beside the
caches. That store holds a copy of every cache tag plus one 5-bit state word
per line, and the word describes the line as seen by *both* cores at once. The
controller classifies each access that the caches cannot simply serve into one
of sixteen protocol cases (St0 to St15). It then runs the memory traffic that
case needs: flushing the other core's modified copy, writing back an evicted
line, filling the cache, invalidating the other copy. While it works, the
requesting core is stalled.

The design follows a published teaching design for a two-core MIPS system on an
FPGA. That design specifies the cache organisation, the 5-bit state word, the
protocol case table and the block structure. The MIPS cores and the instruction
memory are not part of this RTL: each core's load/store port is a port of the
top module.

```
   core 0 (MIPS1) ports            core 1 (MIPS2) ports
          |                                |
     +---------+                      +---------+
     | dcache  |                      | dcache  |      4 lines x 4 words,
     +---------+                      +---------+      26-bit tag + valid
          |   \                        /   |
          |    +----------------------+    |
          |    |  coherence_tag       |    |   tag + 5-bit state, per cache,
          |    |  (duplicate tags)    |    |   per index
          |    +----------------------+    |
          |    | coherence_controller |----+   stall, fill, invalidate,
          +----|  (St0..St15 FSM)     |        flush / write-back
               +----------------------+
                          |
                    +-------------+
                    | main_memory |   line-wide, shared
                    +-------------+
```

## Address split and the data cache

Addresses are 32-bit byte addresses:

| bits   | field        | use                            |
|--------|--------------|--------------------------------|
| 1:0    | byte select  | byte / halfword within a word  |
| 3:2    | word select  | 1 of 4 words in the line       |
| 5:4    | index        | 1 of 4 lines                   |
| 31:6   | tag (26 bit) | compared with the stored tag   |

Each `dcache` is direct mapped, with 4 lines of 128 bits (four 32-bit words).
Each line has a tag and a valid bit. A load returns the addressed byte,
halfword or word in the same cycle, right-aligned and zero-extended. Sign
extension for `lb`/`lh` belongs in the core. Byte lanes are little-endian and
accesses must be naturally aligned. A store writes its byte lanes at the clock
edge. The cache never decides by itself that a store may go ahead, because that
depends on the line's coherence state. It writes only when its tag check hits
and the controller does not stall the core. The cache is write-back: a modified
line reaches memory only when it is evicted or another core needs it.

The cache also has a port for the controller. It can read out the line at
`coh_idx` (for flush and write-back), `fill` that line with a tag and 128 bits
of data, and invalidate it.

## The 5-bit state word

The duplicate tag store (`coherence_tag`) has one copy per cache. Each copy
holds 4 entries of {26-bit tag, 5-bit state}. The state is packed as
`{M[1:0], S, I[1:0]}`:

| state      | value    | meaning                                    | core 0 sees | core 1 sees |
|------------|----------|--------------------------------------------|-------------|-------------|
| NONE       | 00 0 00  | no cache holds the line (reset value)      | I           | I           |
| ONLY1      | 00 0 01  | clean copy in core 0's cache only          | S           | I           |
| ONLY2      | 00 0 10  | clean copy in core 1's cache only          | I           | S           |
| SHARED     | 00 1 00  | clean copies in both caches                | S           | S           |
| MOD1       | 01 0 00  | modified copy in core 0's cache            | M           | I           |
| MOD2       | 10 0 00  | modified copy in core 1's cache            | I           | M           |

So each core still sees ordinary MSI. The single word just stores both cores'
MSI states together, which lets the controller decide everything from one
lookup. An entry describes the line named by its tag. When both copies' entries
at an index name the same line, they always hold the same state, because every
update writes all entries that name the line. An entry may also name a line
that its own cache no longer holds (for example ONLY2 in core 0's copy). That
entry is then just bookkeeping. It is also why the reset state, with all tags 0
and state NONE, is legal.

Lookups are combinational. For each core's address and each copy, the store
returns whether the tags match (`mp_hit[p][j]`, named MP1Hit1, MP1Hit2, MP2Hit1
and MP2Hit2 in the original design), plus that entry's state and tag. The
controller thereby also sees the line the requesting core would have to evict.

## Protocol cases

An access *hits* the tag store when its address matches the entry at its index
in either copy. If it matches neither copy, it *misses*. Hit accesses take
their state from the matching entry; misses start from NONE.

Two kinds of access complete in one cycle with no stall and no state change: a
load whose core holds the line (St1 for core 0, St5 for core 1), and a store
whose core holds the line modified. Every other access is one controller
transaction:

| case | core | access | start state            | memory traffic              | end state |
|------|------|--------|------------------------|-----------------------------|-----------|
| St0  | 0    | load   | NONE (entry tag hits)  | fill                        | ONLY1     |
| St2  | 0    | load   | ONLY2                  | fill                        | SHARED    |
| St3  | 0    | load   | MOD2                   | flush core 1's copy, fill   | SHARED    |
| St4  | 1    | load   | NONE                   | fill                        | ONLY2     |
| St6  | 1    | load   | ONLY1                  | fill                        | SHARED    |
| St7  | 1    | load   | MOD1                   | flush core 0's copy, fill   | SHARED    |
| St8  | 0    | store  | NONE, ONLY1, ONLY2, SHARED | fill if core 0 lacks it; invalidate core 1's copy | MOD1 |
| St9  | 0    | store  | MOD2                   | flush, fill, invalidate     | MOD1      |
| St10 | 1    | store  | NONE, ONLY1, ONLY2, SHARED | fill if core 1 lacks it; invalidate core 0's copy | MOD2 |
| St11 | 1    | store  | MOD1                   | flush, fill, invalidate     | MOD2      |
| St12 | 0    | load   | miss                   | fill                        | ONLY1     |
| St13 | 0    | store  | miss                   | fill                        | MOD1      |
| St14 | 1    | load   | miss                   | fill                        | ONLY2     |
| St15 | 1    | store  | miss                   | fill                        | MOD2      |

A store to a line the core already holds clean (S to M) moves no data. It only
invalidates the other copy, which is the protocol's bus upgrade.

**Eviction.** Any transaction whose core must bring in a line first looks at the
line already at that index in its cache. If that line is modified by the core,
it is written back to memory first. If it is clean, it is dropped silently, and
if the other copy's entry names it, that entry's state is updated (SHARED
becomes ONLY-other, for example).

## Transactions, stalls and timing

The controller (`coherence_controller`) runs one transaction at a time through
these steps, skipping any that are not needed:

1. **FLUSH**: the other core holds the requested line modified, so its copy is
   written to memory.
2. **WB**: the requesting core's victim line is modified, so it is written back.
3. **FILL**: the requested line is read from memory into the requesting cache.
4. **UPDATE**: the new state is written into every entry that names the line.
   For a store, the other copy is invalidated. The victim's other entry is
   updated if needed.
5. **DONE**: for one cycle the waiting core's access completes, as a hit, while
   the other core is held. A core therefore cannot lose the line it has just
   fetched before it uses it.

`mp_stall[p]` is high while core p's access cannot complete. `coh_stall` is high
while any transaction runs, and both cores are held during it, except the
requester in its DONE cycle. If both cores need a transaction in the same cycle,
the core that was not served last goes first (round robin).

Timing, counted from the cycle an access is first presented to the cycle it
completes (inclusive):

* hit: 1 cycle
* transaction with m line transfers: `3 + m*(MEM_LATENCY+2)` cycles.
  With the default `MEM_LATENCY = 2`, an upgrade takes 3 cycles, a plain miss
  7, a miss with a victim write-back 11, and a load of a line the other core
  modified 11.

`main_memory` moves whole 128-bit lines. A request (`req`, `we`, `addr`,
`wdata`) is held until `ack`, which is high for one cycle `MEM_LATENCY+1`
cycles after the first request cycle. Read data arrives with `ack`. Contents
start at zero. `MEM_LINES` (default 256 lines = 4 KiB) sets the capacity, and
higher address bits alias.

## Top-level ports (`top_level`)

| port            | dir | width    | meaning |
|-----------------|-----|----------|---------|
| `clk`, `rst`    | in  | 1        | clock; synchronous active-high reset |
| `mp_memread`    | in  | [2]      | load request, per core (index 0 = MIPS1) |
| `mp_memwrite`   | in  | [2]      | store request |
| `mp_dataadr`    | in  | [2][32]  | byte address |
| `mp_writedata`  | in  | [2][32]  | store data, right-aligned |
| `mp_size`       | in  | [2][2]   | 0 byte, 1 halfword, 2 word |
| `mp_readdata`   | out | [2][32]  | load data, valid in the completing cycle |
| `mp_stall`      | out | [2]      | hold the access |
| `coh_stall`     | out | 1        | a coherence transaction is running |
| `coh_case`      | out | 5        | its case (0..15), 31 when idle |
| `out_msi`       | out | [2][5]   | state in each core's own tag copy at its current address |

A core drives a request and holds it unchanged while `mp_stall` is high. The
access takes effect at the end of the first cycle in which `mp_stall` is low. A
core must not drive a load and a store in the same cycle. Assertions check
this, along with a request held to the memory until it is acknowledged, legal
new states, and the cache hitting whenever the controller lets an access
through.

Parameters: `MEM_LINES` (256) and `MEM_LATENCY` (2). The cache geometry and the
state encoding are constants in `msi_pkg`, because the 5-bit word and the
address split are tied to two cores and 4 lines.

## Where this RTL departs from, or fills in, the original design

* **4 lines, not 8.** The original text once calls the cache "8 sets". Its own
  address split (index = bits 5:4, 26-bit tag) and its drawings give 4 lines,
  so 4 lines are built.
* **5-bit state ports.** The original schematic draws the state ports 7 bits
  wide, while its description, tables and waveforms use 5 bits. 5 bits are used.
* **Reading of the I field.** The original labels I = 01/10 as "not valid" in
  core 1/2. Its transition table only works if they mean "only core 1/2 holds a
  clean copy", and that reading is used here. The all-zero word is treated as
  "nobody holds the line".
* **Loading a line the other core modified (St3, St7)** ends SHARED after a
  flush, following the protocol's stated rules (M plus a remote read leads to
  write back and S). One row of the original case table instead gives "held by
  core 2 only" for both cases.
* **Evictions** are not in the original case table. They follow its MSI rules
  (write back from M, silent drop from S).
* **Own choices.** The following are this design's own: the controller's step
  sequence, the round-robin choice, the DONE cycle, the cache/controller and
  memory handshakes, the memory size and latency, little-endian byte lanes and
  zero extension.
* **Not included.** The MIPS cores, the instruction memory and instruction
  cache, and a 2-bit "cache size" input that the original test bench drives.
  Nothing describes what that input does, and the top has no port for it.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog:

* `tb_dcache`: random fills, invalidations and byte/halfword/word loads and
  stores, some stalled, against a shadow copy of the cache.
* `tb_coherence_tag`: random state writes and lookups by both cores against a
  shadow store.
* `tb_main_memory`: random line reads and writes. Checks data and the exact
  acknowledge cycle.
* `tb_coherence_controller`: the controller against small models of the tag
  store, caches and memory. One scenario per case St0 to St15 checks the case
  number, the exact order, addresses and data of the memory transfers, the
  invalidations and fills, the final tag-store contents and the latency.
  Further checks: hits never stall, and simultaneous requests are served round
  robin.
* `tb_top_level`: the whole system at default parameters. First, a directed
  walk through every case checks case, latency and resulting state. Then
  4000 random accesses per core go to lines that collide on two indices. Every
  load is checked against a flat reference memory. The test counts each
  mechanism (every case, hits, flushes, write-backs, fills, invalidations,
  upgrades, silent drops, simultaneous requests, byte and halfword accesses)
  and fails if any never occurred. In every cycle with no transaction in
  progress, each cache's valid bits and tags must agree with the duplicate tag
  store. A line valid in both caches must be SHARED in both copies.
* `tb_top_level_slow_memory`: the whole system with `MEM_LATENCY = 5` and a
  64-line memory. It checks that transaction latency still follows
  `3 + m*(MEM_LATENCY+2)` and that a read hit still takes one cycle. Then it
  runs random traffic from both cores on one index, checking every load.

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/msi_pkg.sv \
          tb/tb_top_level.sv --top-module tb_top_level -o sim
./obj_dir/sim
```

The end-to-end test runs in well under a second.

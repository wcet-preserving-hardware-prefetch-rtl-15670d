# Worst-case-safe hardware prefetching on a Bluetree memory tree

Sixteen cores share one off-chip memory. For a hard real-time system, each
core's worst-case memory latency has to be bounded and stay bounded. A
prefetcher normally works against that. Its speculative reads take memory
time that the worst-case analysis never counted, and useless prefetches can
delay demand reads.

This RTL implements a memory system where prefetching cannot add traffic
beyond what the worst-case analysis already allows for. It is based on
*WCET Preserving Hardware Prefetch for Many-Core Real-Time Systems*
(Garside and Audsley). The idea is to spend only "spare" memory turns on
prefetches:

* The memory tree is a binary tree of rate-limited 2-to-1 multiplexers.
  Under full load every multiplexer has a fixed turn pattern. When the
  owner of a turn has nothing to send, the multiplexer sends an empty
  **prefetch slot** in that turn. The slot occupies exactly the place
  that the owner's packet would have had under full load.
* When a core hits in its prefetch cache, a read it would otherwise have
  made disappears. The cache sends a **prefetch-hit notification** up
  the tree in that read's place.
* The prefetcher at the root puts a prefetch only into a slot or a hit.
  Every prefetch therefore stands in for a memory access that the
  analysis already counted.

Prefetched lines go into a small per-core **prefetch cache**, not into the
core's own cache, so prefetching never evicts anything the core's timing
analysis relies on.

## System structure

```
 core0  core1        core14 core15          (outside: soft processors)
   |      |            |      |
  P$0    P$1   ...   P$14   P$15            pcache: 512 B direct-mapped
   |      |            |      |
   +-mux--+    ...     +-mux--+             level 3 (8 multiplexers)
      |                   |
     ...                 ...                levels 2, 1
        \               /
         +---- mux ----+                    root multiplexer (bt_tree: 15 x bt_mux)
               |
          prefetcher                        prefetcher
               |
         memory controller                  (outside: DDR3, closed page)
```

The left input of each multiplexer is its high-priority (HP) side and the
right input is its low-priority (LP) side. Read core *i*'s index from the
most significant bit down: bit 3 picks the side at the root, bit 0 at the
bottom, and 1 means the LP side. Core 0 is HP all the way up and has the
best worst case. Core 15 is LP everywhere and has the worst. Core 1's path
from the root is HP,HP,HP,LP. Core 6's path is HP,LP,LP,HP.

## Packets

All traffic uses one packet type, `bt_pkg::bt_pkt_t`:

| type        | direction | meaning |
|-------------|-----------|---------|
| `PK_READ`   | up        | demand read: the core's own cache missed and so did the prefetch cache |
| `PK_SLOT`   | up        | empty prefetch slot made by a multiplexer |
| `PK_HIT`    | up        | prefetch-hit notification; the prefetcher also uses it as a slot |
| `PK_RESP`   | down      | read response, delivered to the core |
| `PK_PFDATA` | down      | prefetched line, stored in the core's prefetch cache |

A packet carries the core index, a 28-bit line address (32-bit byte
address, 16-byte lines) and a 128-bit data field. Only downward packets use
the data field. Downward packets are steered by the core index.

## The multiplexer: turns, blocking factor and slots

`bt_mux` is the part that carries the timing guarantee. Each side has a
single input register. A register can take a new packet in the same cycle
that its old packet leaves. The upward output is combinational from these
registers, so each level adds one cycle when unloaded.

`bt_arbiter` keeps a turn counter `cnt` that runs from 0 to M-1 (M is the
*blocking factor*, 4 by default):

* Turn 0 belongs to LP. Turns 1..M-1 belong to HP.
* The counter advances only when the parent accepts the output. A
  multiplexer stalled from above therefore keeps its place in the
  sequence.

Under full load the output pattern is LP, HP, HP, HP, LP, and so on. An LP
packet waits behind at most M-1 HP packets. An HP packet waits behind at
most one LP packet. This bound, applied level by level, is what the
worst-case analysis of the tree builds on. Section "Worst-case reasoning"
below works it through.

Slot rule: if the owner of the current turn has nothing while the other
side has a packet, that packet would go out of turn as a work-conserving
access.

* With `slot_en` high, the multiplexer sends a `PK_SLOT` instead, and the
  waiting packet leaves on its own next turn. That is never later than it
  would leave on a fully loaded tree.
* With `slot_en` low, the arbiter is plainly work-conserving.
* When neither side has anything, nothing is sent and the counter holds.

A slot is an ordinary packet to the multiplexers above it. The decision is
re-made every cycle until the parent accepts. So if the idle owner's
packet arrives while a slot is still waiting to move up, the real packet
replaces the slot. On deep LP paths under heavy load this happens most of
the time, so cores there receive few slots.

The **squash detector** covers a prefetch that meets the read it was meant
to prevent. This happens when the downward register holds prefetch data
for core c, line a, and the input register on c's side holds a read from c
for line a. Then:

* the prefetch goes down as a read response, and
* the waiting read is turned into a hit notification in place.

One memory access serves the read, and the read's slot in the tree is
reused as a hit.

The downward path is one register and a demultiplexer. It never blocks, so
a response crosses each level in exactly one cycle.

## Worst-case reasoning

Every upward packet (read, slot or hit) occupies exactly one turn in each
multiplexer it crosses. A slot or hit is sent only in a turn that, under
full load, a real access would have taken. The memory therefore sees at
most the packet sequence of the fully loaded tree. The only differences
are:

* some positions hold prefetches in place of accesses;
* some positions are abandoned slots, which cost the prefetcher one cycle
  and cost memory nothing.

A core's worst-case read latency is therefore its full-load latency, with
or without prefetching. For one multiplexer with memory time t_mem, the
upward wait is (B+1)·t_mem, where B = 1 on the HP side and B = M-1 on the
LP side. Adding memory time and one cycle down gives the total for one
level.

A deeper tree is harder. The worst case is a tree with every buffer full.
A multiplexer whose output is not taken by its parent does not advance
its turn counter, so the turn counters of the levels interact. The wait
comes from simulating the counters turn by turn (one block = one memory
access) until a packet entering at the bottom leaves the root. For 16
cores this gives the following waits, in blocks, by core index:

| m | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|----|----|----|----|----|----|
| 2 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 | 30 |
| 3 | 15 | 18 | 24 | 32 | 29 | 33 | 47 | 60 | 30 | 36 | 48 | 63 | 57 | 66 | 93 | 120 |
| 4 | 11 | 16 | 26 | 39 | 28 | 44 | 71 | 114 | 32 | 48 | 76 | 116 | 84 | 132 | 212 | 340 |
| 5 | 10 | 17 | 27 | 50 | 33 | 58 | 102 | 195 | 40 | 65 | 105 | 200 | 130 | 230 | 405 | 780 |

Multiply by t_mem and add one cycle per level for the return trip to get
the worst-case read latency.

`tb_wc_blocking` checks the RTL against this table. It saturates four
16-leaf trees (m = 2..5), with the root accepting one packet per cycle.
For every core and every m, the longest wait it measures equals the table
entry. It also checks two more things under full load:

* no slots appear;
* each core's share of the root is the product of (m-1)/m for each HP
  side and 1/m for each LP side on its path.

## The prefetcher

```
 tree root --+-- READ --> demand queue --> incoming squash --> demand mem queue --+
             |                                  |                                 |
             +- SLOT/HIT -> hit/slot queue --+  |  outstanding                 mem mux --> memory
             |                               |  +--- prefetches table         (round    |
             +--(observed)--> calculator     |        |          |            robin)   |
                 + stream buffers            v        |          |              ^      |
                     |                   PF merger ---+          |              |      |
                     +--> prefetch buffer --^   \---> PF queue --+--------------+      |
                                                                 |                     |
 tree root <-- output queue <-- outgoing squash filter <---------+---------------------+
```

* **Sorting.** Reads go to the demand queue. Slots and hits go to the
  hit/slot queue.
* **Calculator and stream buffers** (`pf_calculator`). Each core has 8
  stream entries, each holding {valid, last line}. A read or hit for line
  *a*:
  * If an entry holds *a*-1, the stream continues. The entry moves to *a*
    and line *a*+1 is proposed.
  * If an entry already holds *a*, the access is a repeat and nothing
    happens.
  * Otherwise a new stream starts in the core's round-robin victim entry.
    A read proposes nothing yet. A hit proposes *a*+1.

  So two misses to adjacent lines start a stream, and each useful
  prefetch asks for the next line. Proposals wait in the prefetch buffer
  and are dropped if it is full.
* **Merger** (`pf_merger`). It takes the head of the hit/slot queue every
  cycle. It fills the slot with the oldest waiting prefetch only when:
  * a prefetch is waiting,
  * a row of the outstanding table is free, and
  * the prefetch queue has room.

  The prefetch is then recorded in the outstanding table. Otherwise the
  slot is abandoned. Slots never wait, so they cannot back up into the
  tree.
* **Incoming squash filter** (`pf_squash`). A demand read for a line whose
  prefetch for the same core is still outstanding is discarded, and the
  table row is marked squashed.
* **Memory multiplexer** (`pf_mem_mux`). The demand memory queue and the
  prefetch queue take turns. Round robin is required here. A read
  absorbed by the squash filter is answered by its prefetch. With
  demand-first priority, a steady demand stream could hold that prefetch
  back, and with it the absorbed read, forever. A full-load simulation
  with demand-first priority hung this way.
* **Outgoing squash filter.** A returning prefetch whose row is marked
  squashed goes down as a read response, otherwise as prefetch data. The
  row is freed. A read that is squashed in the same cycle as its prefetch
  returns still counts as squashed.
* **Output queue.** Drives the tree's downward root port, one packet per
  cycle.

Squashing therefore happens in three places:

* the multiplexers,
* the prefetcher's filters,
* the prefetch cache, for a read still waiting to leave the cache.

In every case one memory access answers both the prefetch and the read.
The core receives exactly one response per read.

## The prefetch cache

`pcache` is 512 bytes, direct-mapped, with 32 lines of 16 bytes. Prefetch
data is written into it and not passed to the core. A core read is handled
as follows:

* **Hit:** the cache answers one cycle later and sends a `PK_HIT` up in
  place of the read.
* **Miss:** the cache sends a `PK_READ`. The read response is passed
  through to the core and is not cached.

The response port has no back-pressure. A response from the tree takes
priority over a pending hit response. The cache takes one request at a
time.

## Top-level interface (`wcet_pf_top`)

| port | width | meaning |
|------|-------|---------|
| `clk`, `rst_n` | 1 | one clock; synchronous active-low reset |
| `pf_enable` | 1 | prefetching and slot generation on |
| `cpu_req_valid/ready/addr[16]` | 1/1/28 | per core: read request, line address |
| `cpu_rsp_valid/addr/data[16]` | 1/28/128 | per core: read response, no back-pressure |
| `mem_req_valid/ready`, `mem_req` | 1/1/`mem_req_t` | to memory: {pf, table row, core, line} |
| `mem_rsp_valid/ready`, `mem_rsp` | 1/1/`mem_rsp_t` | from memory: request fields plus the line |
| `ev_*` | various | one pulse per event: slots per multiplexer, squashes, cache hits, merges, abandoned slots, absorbed reads, prefetches returned as responses, dropped proposals |

The memory controller may return responses in any order. A response is
matched by the fields it echoes, and a prefetch by its table row.

Parameters, all with the source system's values: `M` = 4 (blocking factor),
`NSTREAM` = 8 (streams per core), `PC_SIZE` = 512 (prefetch cache bytes).
Set in `bt_pkg`:

* `NCPU` = 16 cores, as in the source system;
* a line of four 32-bit words (16 bytes), which is how each stream fetch of
  "four words" is read here; the 32-bit word and address width are this
  design's choice;
* the outstanding-prefetch table, `PF_OUT` = 8 rows (this design's choice).

The prefetcher's queues hold `QDEPTH` = 4 entries each, a parameter of
`prefetcher` (this design's choice).

## What the simulations show

The end-to-end testbench runs the full 16-core system at default
parameters. Memory is modelled as closed-page, with every access taking 10
cycles and one access at a time. Each core reads 48 consecutive lines. All
read data is checked, and every core must finish.

Full load means one core plus 15 traffic generators reading a single
line on every cycle. Finish time of the core, in cycles, prefetching off →
on, by computation delay between reads:

| core (path from root) | delay 0 | 30 | 60 | 150 | 300 |
|------|---------|----|----|-----|-----|
| 1 (HP,HP,HP,LP) | 9857 → 9736 | 11012 → 9560 | 14774 → 9670 | 17678 → 9956 | 24564 → 14421 |
| 6 (HP,LP,LP,HP) | 22320 → 22298 | 22320 → 22298 | 44386 → 29547 | 44386 → 29547 | 44386 → 29382 |
| 15 (LP everywhere) | 132375 → 132364 | same | same | same | same |

Sixteen cores, each a streaming core, slowest finish time:

| run | prefetch off (cycles) | prefetch on (cycles) |
|-----|------------------|-----------------|
| 16 cores all streaming, delays 0-51 | 8540 | 14857 |
| 16 cores all streaming, delays 300-351 | 17646 | 16600 |

* Under full load, prefetching speeds up cores that have spare turns of
  their own, by up to 44%. In none of these runs does it slow them
  down. Core 15 is on the LP side of every multiplexer. It gets almost
  no slots and runs essentially unchanged. This matches the behaviour
  reported for the original hardware.
* A core's longest single read with prefetching on can exceed the
  measured longest read with it off by a few memory accesses (up to 55
  cycles in these runs). This comes from reordering inside the
  prefetcher's queues. The testbench allows 8 accesses of margin.
* Sixteen cores with long computation between reads leave memory with
  spare time. Prefetching then covers almost every line: 750 prefetches
  and 32 demand reads, against 768 demand reads without it. The run is
  6% faster.
* Sixteen cores with short delays saturate the 10-cycle memory: it is
  busy 90% of the time even without prefetching. With prefetching on, 15
  of the 16 cores finish within 13% of the slowest core's time without
  it, by cycle 9609. Core 15 alone takes until cycle 14857. The slot rule
  is not work-conserving. Once memory is saturated, a read waits at the
  prefetcher, and the tree's turns advance no faster than memory accepts
  reads. Core 15 is on the LP side everywhere. Its turns come after those
  of everyone else, so it gets only its full-load share: one root turn in
  256 at m = 4. Without slots, the same core picks up every turn the
  others leave idle.
  The worst case is not affected. The original system's 16-core runs
  reported gains. Its processors and memory differ from this model, and
  a saturated case like this one is not among its measurements. See also
  the slot rule in the next section.

## Where this implementation makes its own choices

* **Slot rule.** The source says a prefetch slot "can" be sent in place of
  a work-conserving access. Here a slot is always sent in that case when
  `slot_en` is high. A less aggressive policy, for example one that sends
  slots only while the prefetcher has work, could recover the
  average-case time lost by low-priority cores when memory saturates.
  The arbitration is in `bt_arbiter`, and `slot_en` is the hook for such
  a policy.
* **Stream detection.** A stream starts after two adjacent misses, the
  prefetch distance is one line, and hits always propose the next line.
  The source gives the table contents but not the exact rule.
* **Memory multiplexer.** The policy is round robin (see above). The
  source only says the two queues are multiplexed.
* **Sizes.** The source gives no queue depths, outstanding-table size, or
  word width. They are set as listed in the interface section.
* **Prefetch cache size.** The source reasons that 32 bytes would
  suffice, but states that 512 bytes was built. 512 is used.
* **Extensions.** The prefetch cache also squashes. The hit notification
  replaces the squashed read in place.
* **Fixed priority side.** The left input of every multiplexer is HP.
  The source allows the HP side to be configured. Here that means swapping
  the two child connections in `bt_tree`.
* **Initial prefetch.** The source describes two ways to give the
  prefetcher its first memory turns. Only slack stealing, through slots,
  is built. Reserving a fixed bandwidth share for the prefetcher in the
  arbitration is not.
* **Not modelled.** Writes are not modelled; only read traffic is.
  Everything runs in one clock domain. The original ran at 100 MHz
  against a 200 MHz DDR3 behind a vendor controller.
* **Outside the RTL.** The processors and the memory controller are not
  included. `tb/core_model.sv` and `tb/mem_model.sv` are simple
  behavioural stand-ins.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. From the repository
root, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/bt_pkg.sv tb/tb_pkg.sv tb/tb_wcet_pf_top.sv --top-module tb_wcet_pf_top
./obj_dir/Vtb_wcet_pf_top
```

Replace `tb_wcet_pf_top` with any other testbench:

| testbench | covers |
|-----------|--------|
| `tb_sync_fifo` | the FIFO |
| `tb_bt_arbiter` | turn model, full-load pattern, slots |
| `tb_bt_mux` | multiplexer: shares, slots, steering, squash |
| `tb_bt_tree` | 16-leaf latency and exact bandwidth shares under full load |
| `tb_wc_blocking` | worst-case blocking of the 16-core tree for m = 2..5, against the table above |
| `tb_pf_calculator` | stream calculator |
| `tb_pf_squash` | outstanding table and both squash filters |
| `tb_pf_merger` | slot merger |
| `tb_pf_mem_mux` | memory multiplexer |
| `tb_prefetcher` | prefetcher against the memory model |
| `tb_pcache` | prefetch cache |
| `tb_wcet_pf_top` | whole system, runs in a few seconds |

## Files

* `rtl/bt_pkg.sv`: packet types and sizes.
* `rtl/bt_arbiter.sv`, `rtl/bt_mux.sv`, `rtl/bt_tree.sv`: the memory tree.
* `rtl/pf_calculator.sv`, `rtl/pf_squash.sv`, `rtl/pf_merger.sv`,
  `rtl/pf_mem_mux.sv`, `rtl/sync_fifo.sv`, `rtl/prefetcher.sv`: the
  prefetcher.
* `rtl/pcache.sv`: the prefetch cache.
* `rtl/wcet_pf_top.sv`: the system.
* `tb/`: one testbench per block, `tb_wc_blocking` for the worst-case
  table, and the following models:
  * `tb_pkg.sv`: the memory contents function;
  * `mem_model.sv`: the memory;
  * `core_model.sv`: a core or a traffic generator.

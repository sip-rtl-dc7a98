# SIP: a separate property cache with self-paced graph prefetchers

Graph kernels such as BFS, SSSP and PageRank spend much of their time on
loads of *vertex properties* (`Prop[ID]`). These loads jump around memory, a
line is seldom reused before it would be evicted from an L1 or L2, and
bringing such lines into the normal cache hierarchy pushes out data that
does have locality (the CSR offset and neighbor lists, edge weights).

SIP ("Separating the Irregular Properties") adds three things next to one
processor core:

* a small **P-cache** (1 KB, fully associative, FIFO replacement, 1-cycle
  hit) that holds *only* property data and talks straight to the
  last-level cache (LLC), so properties never enter the D-cache or L2;
* a **structure prefetcher** in the D-cache that walks the graph's
  frontier, offset list and neighbor list by itself, ahead of the core;
* a **property prefetcher** in the P-cache that turns the vertex IDs the
  structure prefetcher finds into property prefetches.

A signed **timeliness counter** keeps the walk a bounded number of edges
ahead of the core: not so far ahead that the tiny P-cache evicts what it
prefetched, and not behind it.

Software is unchanged except at initialisation: one added instruction
writes SIP's registers (list base addresses, address ranges, data size,
frontier bounds, threshold). Property and edge accesses are recognised by
address range, so the core keeps using ordinary loads and stores.

This repository holds synthesizable SystemVerilog for the SIP block of one
core (`rtl/sip_top.sv`) and self-checking testbenches for every module.
The core, D-cache, L2, LLC and DRAM are conventional parts and are not
included; they connect through the ports of `sip_top`.

## Block diagram

```
              load/store queue (core)               configuration instruction
                     |                                        |
            +--------v-----------+                    +-------v-------+
            | sip_req_classifier |<-- ranges ---------| sip_cfg_regs  |-- cfg --> all blocks
            +---+------------+---+                    +-------+-------+
     prop range |            | other        edge_read         | restart
                |            +--> dc_req_* (to D-cache)       |
                |                     |                       v
                |                     +---- dec --> sip_timeliness_counter <-- inc / skip --+
                |                                      | stall, behind                    |
                |                                      v                                  |
                |        sp_req_* / sp_resp_* <--> sip_struct_prefetcher -----------------+
                |           (D-cache port)      stage1 -> FIFO -> stage2 -> FIFOs -> stage3
                |                                  |vertex IDs               |neighbor IDs
                |                                  v                         v
                |                              sip_prop_prefetcher (prop_list + ID*size)
                |                                            | prefetch address
            +---v--------------------------------------------v---+
            |                    sip_pcache                      |--> pc_resp_* (to core)
            +---------------------------+------------------------+
                                        | llc_req_* / llc_resp_*
                                       LLC
```

## The graph layout it expects

The graph is in CSR form with one data size for every list (a power of two
in bytes, register `size`):

* offset list `off_list`: `V+1` entries; vertex `v`'s edges are entries
  `off_list[v]` (front) up to, not including, `off_list[v+1]` (rear) of
* neighbor list `nei_list`: one destination vertex ID per edge;
* property list `prop_list`: one property per vertex, `Prop[v]`;
* the frontier: either all vertices with IDs `active1..active2`
  (all-active kernels such as PageRank), or an active list in memory from
  address `active1` up to, not including, `active2` (BFS, SSSP).

Every address SIP computes has the form `base + index * size`, done as a
shift by log2(size) and one add (`sip_addr_gen`).

## Configuration registers

`cfg_idx` is the register-index operand of the configuration instruction,
`cfg_wdata` its value. The index numbering is this design's own.

| idx | register    | meaning |
|-----|-------------|---------|
| 0   | `size`      | data size in bytes (power of two) |
| 1   | `active`    | bit 0: 1 = all-active, 0 = active list |
| 2   | `active1`   | all-active: minimal vertex ID; else: active list start address |
| 3   | `active2`   | all-active: maximal vertex ID (inclusive); else: active list end address (exclusive) |
| 4   | `off_list`  | offset list base address |
| 5   | `nei_list`  | neighbor list base address |
| 6   | `prop_list` | property list base address |
| 7/8 | `nei1/nei2` | neighbor list address range `[nei1, nei2)`; loads here are edge reads |
| 9/10| `prop1/prop2` | property address range `[prop1, prop2)`; accesses here use the P-cache |
| 11  | `threshold` | counter value at which edge prefetching stalls |

**Every configuration write restarts the prefetchers**: the FIFOs are
flushed, the counter is cleared and the walk begins again at `active1`.
Software therefore writes all registers at start-up and then, before each
BFS/SSSP level, the new `active1`/`active2` of that level's active list.
A walk ends by itself at the end of the frontier (`sp_busy` falls).
The threshold should not exceed the P-cache's line count (16), or
prefetched lines may be evicted before the core reads them.

## Request routing at the load/store queue

`sip_req_classifier` compares each request's address with the two ranges.
Inside `[prop1, prop2)` it goes to the P-cache, otherwise to the D-cache
(`dc_req_*`), combinationally, with `cpu_req_ready` taken from whichever
side was chosen. A load that goes to the D-cache and lies in
`[nei1, nei2)` is an *edge read*: it decrements the timeliness counter in
the cycle it is accepted. With both ranges left at zero, everything goes
to the D-cache and SIP is inert.

Because properties only ever live in the P-cache and nothing else does,
there is no copy of a line in two private caches and the coherence
protocol needs no change.

## The structure prefetcher's walk

`sip_struct_prefetcher` runs three stages joined by FIFOs of five entries
(one for vertices, one each for front and rear offsets):

1. **Vertex.** All-active: issues IDs `active1..active2` with no memory
   access. Active list: reads the list one entry at a time.
2. **Offsets.** Takes a vertex (`t_v`), hands its ID to the property
   prefetcher, and reads `off_list[v]` and `off_list[v+1]`.
3. **Edges.** Takes front/rear (`t_front`, `t_rear`), then for
   `t_offset = front .. rear-1` reads `nei_list[t_offset]` (`t_neighbor`)
   and hands each neighbor ID to the property prefetcher.

The stages share one read port into the D-cache (`sp_req_*`/`sp_resp_*`).
Requests carry a 2-bit tag naming the stage; responses must return the tag
and may come back in any order between stages. Each stage has at most one
request outstanding; stage 3 wins over stage 2, and stage 2 over stage 1,
so the pipeline drains before it fills. Since the point of these reads is
to bring structure lines into the D-cache, the core later finds them
there.

## Pacing: the timeliness counter

This is the subtle part. SIP's prefetchers are not triggered by misses;
they run on their own, so something must hold them at the right distance
from the core. `sip_timeliness_counter` keeps

```
count = (edge requests sent by stage 3)
      - (edge loads issued by the core)
      + (edges stage 3 gave up on)
```

* **Too early** (`count >= threshold`): stage 3 sends no more edge
  requests. Its FIFOs fill, which stops stage 2, which stops stage 1. The
  walk resumes as the core's edge loads bring the count down.
* **Too late** (`count < 0`): the core has overtaken the walk, so
  fetching the current vertex's remaining edges would be wasted. Stage 3
  drops that vertex and adds the number of its edges it had not fetched
  (`t_rear - t_offset`) to the count, then moves to the next vertex; if
  the count is still negative that vertex is dropped too. Once the count
  is back at zero or above, the walk carries on normally. This also lets
  the prefetcher start at the same time as the core: it simply drops
  vertices until it is ahead.

At the end of an iteration, once the core has read every edge of the
frontier and the walk is over, the count is exactly zero: every edge was
either fetched or dropped. The end-to-end testbench checks this after
every iteration.

The stall test is `count >= threshold` (the counter "reaching" the
threshold); a variant that stalls only when the count is strictly greater
would let the walk run one edge further ahead.

## The P-cache

`sip_pcache`: `CACHE_BYTES/LINE_BYTES` lines (1 KB of 64-byte lines = 16),
every line a candidate for every address, tags are full line addresses.
Victims are chosen by one pointer that steps round the lines (FIFO):
properties arrive in the order they will be used, and reuse over long
distances is not worth keeping.

* **Load hit**: accepted in the cycle it is presented; `pc_resp_valid` and
  the word follow at the next clock edge (the 1-cycle hit).
* **Load miss**: held (ready low) while the 64-byte line is read from the
  LLC and installed; the request then hits.
* **Hit under fill**: while a line fill (for a miss or a prefetch) is
  outstanding, load hits are still served in one cycle; misses and stores
  wait for the fill to finish. Without this, every prefetch fill would
  block the core for a full LLC round trip.
* **Store**: written through to the LLC (accepted when the LLC takes the
  write); a hit also updates the cached word; a miss does not allocate.
  A response pulse acknowledges it.
* **Prefetch**: accepted when the cache is idle and no core request is
  waiting; dropped if the line is present, otherwise fetched and
  installed like a miss.

There is one line fill at a time, and core requests go before prefetches. Accesses are aligned 32-bit words.

## Interfaces and timing

All handshakes are valid/ready; a transfer happens on a rising edge where
both are high. Reset is asynchronous, active low (`rst_n`); all control
state and all configuration registers reset to zero, the cache's tag and
data arrays are not reset (they are guarded by valid bits).

| port group | direction | contents |
|------------|-----------|----------|
| `cfg_we, cfg_idx[3:0], cfg_wdata[31:0]` | in | configuration instruction |
| `cpu_req_valid/ready/we/addr/wdata` | in (ready out) | load/store queue requests |
| `pc_resp_valid, pc_resp_rdata` | out | P-cache answers, 1 cycle after acceptance |
| `dc_req_valid/ready/we/addr/wdata` | out (ready in) | non-property requests to the D-cache |
| `sp_req_valid/ready/addr/tag`, `sp_resp_valid/data/tag` | out / in | structure prefetcher reads via the D-cache |
| `llc_req_valid/ready/we/addr/wdata`, `llc_resp_valid/data[511:0]` | out / in | P-cache to LLC |
| `sp_busy` | out | a walk is in progress |

Parameters of `sip_top`: `FIFO_DEPTH` (5), `CACHE_BYTES` (1024),
`LINE_BYTES` (64), `CNT_W` (32, counter width).

## What follows the description and what is this design's own

Taken from the SIP description: the P-cache's place, size, full
associativity, FIFO replacement and 1-cycle hit; routing by address range
with start/end registers; the register set; the three-stage walk with
FIFOs of depth 5 and the `t_*` registers; `base + index * size` with a
shifter; the counter's increment, decrement, stall at the threshold and
drop-and-add below zero.

Chosen here, where the description is silent: the register index
numbering; exclusive end addresses (inclusive maximal vertex ID);
restart on every configuration write; one data size for all lists; 32-bit
counter; the shared, tagged prefetcher memory port with one request per
stage and its priority; handing the active vertex's ID to the property
prefetcher from stage 2; the property prefetcher's 5-entry input FIFO
with vertex IDs first; 64-byte lines; write-through without
write-allocate; one fill at a time with hits served under it and core
requests before prefetches.

Not included: the core (and decoding of the configuration instruction),
the D-cache, L2, LLC and memory. Edge weights and other data are not
prefetched by SIP at all; they go through the normal hierarchy. A
multi-core system places one `sip_top` per core.

## Verification

Each module has a testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`, has a watchdog, and compares against
values computed independently in the testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_sip_cfg_regs` | every register, restart pulse, ignored indices |
| `tb_sip_addr_gen` | `base + index*size` for random values, all sizes 1..16 |
| `tb_sip_fifo` | random traffic against a queue model, full/empty, flush |
| `tb_sip_req_classifier` | routing, ready, edge-read pulse at range edges |
| `tb_sip_timeliness_counter` | count, stall and behind against an integer model |
| `tb_sip_struct_prefetcher` | walk order, dropped counts, neighbor IDs, stall, both frontier modes, restart with requests in flight |
| `tb_sip_prop_prefetcher` | prefetch addresses and order, priority |
| `tb_sip_pcache` | hit/miss prediction with a reference FIFO of lines, 1-cycle hit, write-through, prefetch fill/drop, eviction order |
| `tb_sip_pcache` (cont.) | a load hit served while a prefetch fill is outstanding |
| `tb_sip_top` | end to end at default sizes, below |
| `tb_sip_workloads` | BFS, SSSP and PageRank on an R-MAT graph, with and without prefetching, below |

`tb_sip_top` runs a processor model that uses only configuration writes
and ordinary loads and stores: BFS on a 7-vertex example graph, BFS on a
random 300-vertex graph with a double-buffered active list, and an
all-active pass summing neighbor properties. It checks the BFS levels and
sums against a software reference, every property value the P-cache
returns, that only property traffic reaches the P-cache and LLC port, and
that the counter is zero after every iteration. It also counts, and
requires, each mechanism: threshold stall, late-prefetch drop, P-cache
hit, miss, prefetch fill, redundant prefetch, FIFO eviction, write-through
store, edge-read decrement, both frontier modes and restart.

### Workloads

`tb_sip_workloads` builds a Graph500-style R-MAT graph (probabilities
0.57/0.19/0.19, 512 vertices, 4096 edges; SSSP weights 1..15) and runs
BFS, SSSP (Bellman-Ford over active lists) and one pull-style PageRank
iteration in 16.16 fixed point. Every kernel runs twice: once with the
prefetchers walking the frontier, once with an empty frontier configured,
so that only the separate P-cache remains. Latencies of the surrounding
models: 8 cycles for structure reads (an L2 hit), 32 cycles for a P-cache
line fill from the LLC, 4 cycles for the core's D-cache accesses. Results
are checked against software references; the test also requires that
prefetching reduce the P-cache demand misses. A typical run prints:

| kernel | P-cache hit rate, walk off | walk on | cycles, walk off | walk on |
|--------|-----------|---------|-----------|---------|
| BFS    | 75 % | 90 % | 66 073 | 56 930 |
| SSSP   | 75 % | 94 % | 113 777 | 86 644 |
| PR     | 79 % | 91 % | 61 181 | 52 043 |

These numbers come from simple latency models, not from a full system
simulation: the D-cache is modelled with a fixed latency, so the
structure prefetcher's benefit to structure loads is not in them, only its
effect on the P-cache.

## Simulating

With Verilator 5 (any testbench; replace the top module name):

```
verilator --binary --timing --assert --top-module tb_sip_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/sip_pkg.sv tb/tb_sip_top.sv \
    -o sim --Mdir obj_tb_sip_top
./obj_tb_sip_top/sim
```

The end-to-end test finishes in seconds. Lint a module with
`verilator --lint-only -Wall -Wno-fatal -y rtl +libext+.sv rtl/sip_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused configuration fields in blocks that
read only part of the register struct, unused FIFO fill counts, and
`rst_n` being seen both as asynchronous reset and in the assertions'
`disable iff`.

# CAM-based IPv4 forwarding engine: multizone pipelined cache + HLPM TCAM lookup table

A router has to find, for every packet, the longest routing prefix that
matches the destination address. This design does it in two layers:

* a small, fast **Multizone Pipelined Cache (MPC)** that answers most
  lookups in three cycles, and keeps accepting new lookups while earlier
  misses are still being resolved (it is *non-blocking*);
* a large **pipelined TCAM lookup table (LUT)** using *Hierarchical Longest
  Prefix Matching (HLPM)*. It finds the longest match without keeping the
  TCAM sorted by prefix length, so a new prefix can go into any free entry.

Misses leave the cache, are looked up in the LUT, and the answers flow back
and are written into the cache out of order while lookups keep running.

```
 lk_* ──► mpc_cache ──res_*──►                     (hit / miss + slot)
           │   ▲  └──rsv_*──►                      (misses resolved later)
     mreq_*│   │upd (route_update_t)
           ▼   │
   credit ─► hlpm_lut ──► answer FIFO (RQ_DEPTH) ──┘
           ▲
 tbl_* ────┘  (routing table writes)
```

`ip_forwarding_engine` is the top. All shared types are in `fwd_pkg`.

## The cache (mpc_cache)

### Two zones

The cache holds two kinds of entry:

* **Full-address zone.** It holds complete 32-bit addresses. The zone is two
  16-bit binary CAMs side by side: CAM1 holds address bits [31:16] and CAM2
  holds bits [15:0]. CAM2 is searched only in the rows where CAM1 hit.
* **Prefix zone.** It holds prefixes of 16 bits or less, in a 16-bit ternary
  CAM searched with address bits [31:16]. It is searched only when CAM1
  misses.

One Next-Hop Array (NHA) serves both zones. Full-address rows are
0..FZ_ENTRIES-1, and prefix rows follow them.

Caching a short prefix is only correct if no longer prefix sits underneath
it. The routing table is therefore expected to be *short-prefix expanded*:
every prefix of 16 bits or less is a leaf, and longer prefixes below it are
pushed down to their own /17+ entries. After this, an address can hit in at
most one zone, so no priority logic is needed between the zones. The
expansion is a software step done by whoever builds the table. It is not
in the RTL. The testbenches build tables that obey it.

### Three pipeline stages

| stage | lookup | update |
|---|---|---|
| S1 | search CAM1 with addr[31:16] | write CAM1 (full) or nothing (prefix) |
| S2 | CAM2 in the CAM1-hit rows, or the prefix TCAM if CAM1 missed | write CAM2 or the TCAM row |
| S3 | hit: read the NHA. Miss: compare with the PUR, then push to the OMB | write the NHA, clear the PUR |

A lookup accepted at a clock edge gives its `res_valid` three cycles later.
The result reports one of four sources:

* `SRC_FULL` or `SRC_PREFIX`: a cache hit;
* `SRC_PUR`: the miss matched the answer that is being written into the
  cache right now;
* `SRC_MISS`: a miss, reported with the OMB slot it was parked in.

### Outstanding Miss Buffer (mpc_omb)

The OMB is a small CAM: a 32-bit address plus a valid bit per slot
(OMB_DEPTH=10). It is what lets the cache keep running after a miss:

* **hit under miss:** later hits are answered while earlier misses wait;
* **miss under miss:** further misses take further slots.

Each slot also carries a "sent" flag. The lowest valid, unsent slot is
offered to the LUT on `mreq_*`.

When an answer comes back, one masked search compares it with every valid
slot at once. The mask is the prefix's care bits for a short prefix, or all
32 bits for a full address. Every slot that matches is freed, and the whole
set is reported in one cycle on `rsv_slots` with the next hop. One LUT
answer can therefore resolve several waiting packets, including different
addresses under the same short prefix.

### Out-of-order update: result FIFO and the PUR

LUT answers arrive whenever they are ready. They enter a small FIFO
(UPD_FIFO_DEPTH=4). From there they move one at a time into the **Pending
Update Register (PUR)**, which works through four states:

1. **Search.** The OMB search-and-clear runs. If it frees no slot, another
   answer for the same address or prefix has already been written into the
   cache. The answer is then dropped, so the cache never holds a duplicate.
2. **Enter.** The update takes the S1 slot. Lookups are held off for that
   one cycle.
3. **Pipe.** The update travels down the pipeline with the lookups. It
   writes CAM1, then CAM2 or the TCAM, then the NHA, one stage per cycle.
4. The PUR is cleared once the NHA has been written.

A PUR is needed because an answer is not in the cache until its NHA write,
yet its OMB slots were already freed in step 1. A lookup for that address
could miss during those cycles. So every miss reaching S3 is first compared
with the PUR, using the same mask as the OMB search. On a match, the miss
is answered from the PUR as `SRC_PUR` and is not put into the OMB.

Each zone picks the entry to replace with its own FIFO pointer.

A LUT answer of "no route" frees only OMB slots with the exact same
address. It reports `rsv_found=0` and is never cached.

### When the OMB is full

When a miss reaches S3 and the OMB has no free slot:

* that lookup, and the younger lookups already in S1/S2, are **squashed**
  (`squash_evt`);
* they are put into a 3-entry **replay queue**;
* `lk_ready` stays low until the queue is empty;
* the queue re-enters S1 as soon as the OMB has room. Updates have priority
  over replays, since only updates free OMB slots.

The pipeline itself never freezes, so answers keep draining into the cache
while lookups are held. Squashed lookups give no `res_valid` until they are
replayed. Results therefore stay in the order lookups were accepted, except
that a replayed lookup can come after an update's effect.

## The lookup table (hlpm_lut)

### First level: stop where the prefix ends

The TCAM is split into pipeline stages: 17 bits, then 15 bits, for IPv4.
Each stage (`hlpm_tcam_stage`) searches only the entries its predecessor
passed on. For each active entry it works out:

* **local match:** the entry's slice in this stage matches the address slice;
* **final match:** local match, and the entry's last bit in this stage is
  don't-care (the prefix ends here), or this is the last stage;
* **next active:** local match and the last bit is *not* don't-care. The
  entry is searched again in the next stage.

A prefix that ends in a deeper stage is always longer than one that ended
earlier. So when a stage produces final matches, they replace all earlier
candidates. After the last stage, only candidates that end in the *same*
stage can remain.

### Second level: the Length Column

Each entry stores a short length code: the number of prefix bits in the
stage where the prefix ends (4 bits for IPv4). The candidates go through a
bit-serial maximum search, one pipeline stage per code bit, most
significant bit first. At each bit:

* if exactly one candidate has a 1, it is the answer;
* if several have a 1, only those stay candidates;
* if none has a 1, all stay candidates.

If at most one candidate enters, the column only carries it along
(`res_second_level=0`). Any tie left at the end goes to the lowest entry
index. A next-hop SRAM is read with the winning index.

### Timing and write port

The LUT accepts a search every cycle and answers NSTAGES+LEN_W+1 cycles
later: 7 cycles for IPv4.

Prefixes are written one per cycle (`wr_*`) as a value and a length. The
care mask and length code are computed from the length, so the table
manager does not need to know the stage layout.

### IPv6

The module is generic. With ADDR_W=128, FIRST_W=32, NSTAGES=4, LEN_W=5 it
is a four-stage IPv6 table with a 5-bit Length Column. That configuration
is simulated in `tb_hlpm_lut`.

## Top level (ip_forwarding_engine)

### Flow between cache and LUT

The cache hands misses to the LUT under a credit counter. At most RQ_DEPTH
(8) searches are in flight, and answers are queued in an RQ_DEPTH-deep
FIFO. The LUT pipeline therefore never has to stop, even when the cache
holds answers back.

### Converting an answer

A LUT answer becomes a cache update as follows:

* If the winning prefix ended in the first TCAM stage, it is a short prefix
  (≤16 bits in an expanded table). It is written to the prefix zone with
  care bits [31:16].
* Any other found route is written to the full-address zone as the missing
  address itself.

### Top-level ports

| group | ports | use |
|---|---|---|
| lookup | `lk_valid/lk_ready/lk_addr` | one address per cycle |
| result | `res_valid, res_addr, res_src, res_nexthop, res_slot, res_cam1_hit` | 3 cycles after acceptance |
| resolution | `rsv_valid, rsv_slots, rsv_found, rsv_nexthop` | parked misses answered |
| table | `tbl_wr, tbl_index, tbl_valid, tbl_prefix, tbl_plen, tbl_nexthop` | routing table writes |
| events | `squash_evt, lut_search_evt, lut_short_evt, lut_second_evt` | for counters |

The packet buffer sits outside, on the processor side. It keeps a packet
that got `SRC_MISS` under its `res_slot` and sends it on when that slot
appears in `rsv_slots`.

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| CACHE_FZ_ENTRIES / CACHE_PZ_ENTRIES | 512 / 512 | zone sizes (a 1K-entry cache) |
| OMB_DEPTH | 10 | outstanding misses |
| UPD_FIFO_DEPTH | 4 | answers waiting for the PUR |
| LUT_ENTRIES | 18432 | TCAM entries (enough for ~17.5k expanded prefixes) |
| RQ_DEPTH | 8 | LUT searches in flight |
| NH_W (fwd_pkg) | 8 | next-hop width |

## Where this design makes its own choices

The following are decisions of this design rather than fixed parts of the
scheme:

* **Zone geometry.** The CAM1/CAM2 split and the three stages are part of
  the scheme. The equal zone sizes and the row layout of the shared NHA are
  this design's choices.
* **OMB full.** The squash-and-replay mechanism described above. Stalling
  the whole pipeline is the simpler alternative.
* **Replacement.** FIFO replacement in each zone.
* **Duplicates and no-route.** Duplicate answers are dropped. No-route
  answers are not cached.
* **Unsent miss choice.** The OMB sends the lowest unsent slot first.
* **Length code.** The code is "bits in the ending stage", saturated to
  LEN_W. For a 2-stage IPv4 table it is 0 for a /17 and 7 for a /24. A
  prefix ending in stage 1 saturates at 15, so a /15 and a /16 that both
  match tie, and the lowest entry wins. An expanded table never has both.
* **No cache invalidation.** Table writes do not flush or invalidate the
  cache.
* **Writes during searches.** Writes are not interlocked with searches in
  flight.
* **Sizes and interfaces.** Next-hop width, LUT size, FIFO depths and the
  cache-to-LUT handshake are all this design's choices.
* **Match-line circuits.** The TCAM and CAM cells are modelled as registers
  and comparators. The match-line precharge and don't-care detection
  circuits are not modelled. Only their logic function is kept.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N
failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/fwd_pkg.sv \
          tb/tb_ip_forwarding_engine.sv --top-module tb_ip_forwarding_engine -Mdir obj
./obj/Vtb_ip_forwarding_engine
```

| testbench | what it covers |
|---|---|
| `tb_hlpm_lut` | random tables against a reference longest-prefix search; IPv4 (64 entries) and IPv6 (32 entries) instances; latency 7 / 10; counts first-stage answers and Length Column decisions |
| `tb_ip_forwarding_engine` | small cache (8+8 entries, 2-entry OMB) and a 64-entry LUT; 3000 lookups with locality; counts and requires each mechanism listed below |
| `tb_ip_forwarding_engine_full` | the top with every default (1K cache, 10-entry OMB, 18432-entry LUT); 1500 lookups |

Mechanisms that `tb_ip_forwarding_engine` counts and requires:

* full-zone hit and prefix-zone hit, including prefix hits for addresses
  never looked up before;
* PUR hit;
* miss, hit under miss and miss under miss;
* OMB-full squash and replay;
* duplicate answer dropped;
* no-route answer;
* zone replacement wrap;
* first-stage LUT answer and Length Column decision.

Both top testbenches check every result, including latency and next hop,
against a reference model of the routing table. They also check that every
miss is resolved with the right next hop.

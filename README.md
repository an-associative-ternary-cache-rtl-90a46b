# Associative ternary route cache

An IP router has to find, for every packet, the routing-table entry with the
longest prefix that matches the destination address. A full longest-prefix
search walks a tree and costs several memory accesses. This design puts a
small associative cache in front of the routing table. It finds the port of
a recently used route in **one access**. Only a miss goes to the routing table.

The cache is a ternary content-addressable array. Each row stores one route
as a 32-cell word. The prefix bits are stored as 0 or 1 and every bit below
the prefix is a *don't-care*, so that the route 9.20.0.0/17 becomes

    00001001 00010100 0XXXXXXX XXXXXXXX  -> port

An incoming destination address is compared with every row at once. Several
rows can match (a /8 and a /24 inside it, say). The array is **ordered by
prefix length**, so the winner is simply the matching row nearest the top.

The organisation follows the published proposal "An Associative Ternary Cache
for IP Routing" (Rooney, Delgado-Frias, Summerville). That paper studies the
cache with a software simulator and describes its organisation, not its
circuits. The RTL here fills in the circuits, interfaces and timing. Each
such choice is marked below as this design's own.

## Sets of variable size

The 8192 rows are split into 32 **sets**, one per prefix length. Set 0 at the
top holds only /32 routes, set 1 only /31 routes, and so on down to set 31
with the /1 routes. Because a row's position fixes its prefix length,
"top-most match" and "longest match" are the same thing. No per-row length
compare is needed.

Unlike the fixed ways of a CPU cache, the sets differ in size. Each set is
sized in proportion to how many routes of that length a routing table holds.
Real tables are dominated by /16 to /24 routes (sets 8 to 16). The actual
sizes are this design's choice, modelled on backbone tables of the early
2000s. They are in `atc_pkg::set_weight` and add up to 8192:

| prefix | rows | prefix | rows | prefix | rows | prefix | rows |
|---|---|---|---|---|---|---|---|
| /32 | 16 | /24 | 4304 | /16 | 768 | /8 | 32 |
| /31 | 4 | /23 | 512 | /15 | 64 | /7 | 4 |
| /30 | 16 | /22 | 512 | /14 | 32 | /6 | 4 |
| /29 | 16 | /21 | 384 | /13 | 32 | /5 | 4 |
| /28 | 16 | /20 | 384 | /12 | 16 | /4 | 4 |
| /27 | 32 | /19 | 512 | /11 | 16 | /3 | 4 |
| /26 | 32 | /18 | 256 | /10 | 8 | /2 | 4 |
| /25 | 64 | /17 | 128 | /9 | 8 | /1 | 4 |

For another size `N` (parameter `ENTRIES`, at least 128), every set except
/24 gets `max(1, weight*N/8192)` rows and the /24 set takes the rest.
`atc_pkg::set_base(N, s)` and `set_size(N, s)` give the row range of set `s`.
Sets are contiguous: rows `set_base(N,s)` to `set_base(N,s+1)-1`.

A set is only a placement rule. A route of length L is always written into
set 32-L, and replacement picks a row inside that set. The search itself
treats all rows alike.

## One lookup, cycle by cycle

```
cycle t   lk_valid & lk_ready, lk_addr = A
          pattern array: match[i] = valid[i] & ((A ^ value[i]) & care[i]) == 0   (all rows)
          priority tree: lowest matching row  -> idx, hit
          port column:   port[idx]
          LRU:           row idx marked used (on a hit)
cycle t+1 res_valid = 1, res_hit = hit, res_port = port, res_addr = A
```

The search, priority and port read are one combinational path, registered
once. A hit therefore costs one cycle, and a new lookup can start every cycle.
The priority selection (`atc_priority`) is a balanced binary tree of
log2(ENTRIES) levels, not a ripple chain. Each node forwards its left child if
that child has a match. Answers come back in request order. `res_addr`
repeats the address, so the consumer can pair answer and request.

## Misses and insertion

On a miss the controller (`atc_ctrl`) stops taking lookups (`lk_ready` low).
It sends the address to the routing table on `rt_req_*`. The table answers on
`rt_resp_*` with the length of the longest matching prefix and its port.
The controller then

1. answers the lookup with that port (`res_hit = 0`), and
2. in the next cycle writes the route into the cache. The row is the
   address masked to `plen` bits, with don't-cares below. The port goes into
   the same row of the port column. The row lies in set `32 - plen`, at the
   position chosen by the LRU logic.

A table answer of length 0 means that only the default route matched. It is
answered but not cached, because no set holds zero-length prefixes. The table
reports only the length, not the prefix. The cache masks the address itself,
which gives the same row. Misses are handled one at a time, and the routing
table port carries one request at a time. Both are this design's choices.

## LRU replacement inside a set

Replacement is least-recently-used within the set, as in the original
proposal. How LRU is kept is this design's choice. Every row has a 32-bit
time stamp. A free-running counter advances on every use, a use being a hit
on the row or a write of the row, and copies itself into that row's stamp.
To place a new route, `atc_lru` runs a min-tree over all rows on the key

    { row not in the target set, row valid, stamp (0 if invalid) }

Rows outside the set lose, invalid rows win over valid ones (lowest index
first), and among valid rows the oldest stamp wins. The tree is combinational
and serves every set, since the set range only changes the first key bit.
The order is exact for 2^32 uses after reset, after which the counter wraps.
The output `evict` says whether the chosen row held a valid route.

## Sampling: catching wrong ports

A hit is not always right. The longest matching route may not be cached
while a shorter one is, and that one answers. Or the routing table may have
changed since the row was written. The original proposal counts both as
*port errors* and reduces them by **sampling**. Every third hit (a 33% rate)
is looked up again in the routing table, and the ports are compared.

* The hit is answered from the cache at once. The sample runs in the
  background while lookups go on.
* If the table's port differs, the row that hit is invalidated (one cycle)
  and the table's route is written into the cache (one cycle). The next
  lookup of that address gets the right port.
* `atc_sampler` counts hits modulo 3. If the routing table is busy when a
  hit is due, the sample moves to the next hit. A lookup that misses while a
  sample is outstanding waits until the sample and its correction are done.
  Both rules are this design's.

Sampling also repairs entries left stale by routing updates. The other
remedy, flushing the whole cache after an update, is the `flush` input. It
clears every valid bit in one cycle.

## Blocks and files

| file | block |
|---|---|
| `rtl/atc_pkg.sv` | widths, types, set geometry functions, prefix mask |
| `rtl/atc_tcam.sv` | ternary pattern array: value, care mask and valid per row; parallel compare; write, invalidate, flush |
| `rtl/atc_priority.sv` | top-most (longest-prefix) match, log-depth tree |
| `rtl/atc_port_ram.sv` | port column, combinational read |
| `rtl/atc_lru.sv` | time stamps and victim min-tree |
| `rtl/atc_sampler.sv` | every-third-hit sampling and port comparison |
| `rtl/atc_ctrl.sv` | lookup/miss/insert/sample/correct state machine, routing-table port |
| `rtl/atc_top.sv` | the cache: all of the above wired together |
| `tb/rt_model.sv` | behavioural routing table for simulation (linear longest-prefix search, fixed latency) |
| `tb/tb_*.sv` | one self-checking testbench per block, `tb_atc_top` end to end at full size, `tb_atc_trace` a trace-shaped workload |

### Top-level interface (`atc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears valid bits and state, not memory contents) |
| `lk_valid`, `lk_ready`, `lk_addr` | in/out/in | 1/1/32 | lookup request |
| `res_valid`, `res_hit`, `res_port`, `res_addr` | out | 1/1/8/32 | answer, in order; `res_hit=0` when the port came from the routing table |
| `flush` | in | 1 | invalidate all entries |
| `rt_req_valid`, `rt_req_ready`, `rt_req_addr` | out/in/out | 1/1/32 | request to the routing table; held until ready |
| `rt_resp_valid`, `rt_resp_plen`, `rt_resp_port` | in | 1/6/8 | routing-table answer: longest-match length (0..32) and port; at least one cycle after the request is taken |

Parameters: `ENTRIES` (8192), `SAMPLE_EVERY` (3). Port width (8 bits) and
stamp width (32 bits) are package constants chosen by this design.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
plain Verilator, for example the end-to-end test at full size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_atc_top -Mdir obj \
  rtl/atc_pkg.sv rtl/atc_tcam.sv rtl/atc_priority.sv rtl/atc_port_ram.sv \
  rtl/atc_lru.sv rtl/atc_sampler.sv rtl/atc_ctrl.sv rtl/atc_top.sv \
  tb/rt_model.sv tb/tb_atc_top.sv
obj/Vtb_atc_top
```

A block test needs only `atc_pkg.sv`, the block and its testbench. The full
run builds in about 20 s and simulates in about 30 s.

What the tests establish:

* `tb_atc_tcam` (128 rows): every match bit, for random keys and keys inside
  stored prefixes, against a shift-and-compare reference; invalidate, flush,
  flush and write in one cycle.
* `tb_atc_priority` (300 rows, not a power of two): lowest set bit for
  empty, one-hot, full and random vectors.
* `tb_atc_port_ram`: write and read-back.
* `tb_atc_lru` (128 rows): the victim against a scan of the set for 6000
  random states; set geometry covers the array, with the 8192-row table
  exactly.
* `tb_atc_sampler`: start on every third hit, deferral when busy, held sample, mismatch.
* `tb_atc_ctrl`: directed hit, miss (slow table), /32 and default-route
  answers, agreeing and disagreeing samples, a miss waiting behind a sample,
  and the request-hold rule.
* `tb_atc_top` (8192 rows, 16 K-route table): 40 000 lookups with temporal
  locality. Every miss must carry the exact longest-match port. Every hit
  must carry the port of some matching route, one cycle after acceptance.
  Then routing updates on cached routes must be corrected by sampling within
  16 lookups, and a flush must empty the cache. Each mechanism (hit, miss,
  fill, eviction, sample, correction, deferred sample, miss behind a sample,
  default route, port error, flush) has to occur at least once.

* `tb_atc_trace` (1024 rows, the 1K configuration): a synthetic trace with
  the shape of the smallest trace of the original study. It has 203 352
  lookups over 1 465 destinations. New destinations are spread evenly, and
  reuse favours recent destinations. Each answer is checked as in
  `tb_atc_top`. It runs in a few seconds and reports a 99.48% hit rate,
  97 port errors (0.047% of lookups) and 1 058 cache writes. For comparison,
  the original study measured 98.91%, 0.023% and 1 792 writes on the real
  trace. The resemblance comes from the trace's shape: the trace itself is
  not the same.

On the `tb_atc_top` trace the hit rate is 79.9%, and 2.4% of hits (779 of
31 956) returned the port of a shorter route. The trace is random routes
with a 75% reuse rate, not a real packet trace. These figures say nothing
about the 97.6-99.7% hit rates and 0.01-0.5% port error rates the original
study measured on real traces.

## Where to be careful

* **Size.** At 8192 rows the design holds about 860 kbit of flip-flops:
  value, care mask, port, stamp and valid per row. It also has 8192 32-bit
  ternary comparators, plus two trees over 8192 leaves. The search, priority
  and port read are one combinational cycle, as the one-access goal
  requires. That is a long path, but no timing closure was attempted. A
  real chip would build the array as a TCAM macro. The set-constant care
  masks could also be hard-wired per set instead of stored per row.
* **Miss path adds a cycle.** The original proposal notes that the cache
  adds no delay because the routing table receives the same address. Here
  the routing-table request leaves one cycle after the cache search, and
  only on a miss. A router that needs no added miss latency can start the
  table search in parallel with the lookup and ignore the answer on a hit.
  The controller does not do this.
* **Port errors are by design.** A hit may use a shorter route than the
  routing table would. Sampling fixes such rows over time but does not
  prevent the error.
* **Routing table.** Only modelled (`tb/rt_model.sv`). Any real
  longest-prefix engine that answers with (length, port) can be attached.
  The answer must not come in the cycle the request is taken. Assertions in
  `atc_ctrl` check the request-hold rule, and that answers come only when
  one is expected.
* **Not built.** Random and FIFO replacement were only comparison points in
  the original study. Extra selection rules in the priority stage (filtering,
  priority routing, alternative ports) are mentioned there as possible but
  not specified. The original study also names a third way to keep the
  cache coherent: pushing routing-table changes into the cache. It is not
  built. Sampling and `flush` are. The simulator's hit-rate bookkeeping is
  also left out.

# Layer-4 flow processor with port comparison and port matching

A router that forwards on layer-4 information (addresses, ports and protocol)
has to classify each packet against a set of filtering rules. That full
header classification is slow, and it gets slower as rules are added. A flow
cache avoids most of it. Only the first packet of a flow is classified in
full. The result is stored under the flow's 5-tuple, and later packets of the
same flow are forwarded straight from the cache.

The cost of a flow cache is its misses. Every miss pays for a cache search
and then for the full classification. This design puts two cheap filters in
front of the cache. Both use only the two port numbers:

* **Port comparison.** A packet whose source and destination ports are equal
  (DNS 53→53, NTP 123→123) belongs to a server-to-server exchange. Such
  exchanges are short-lived. The packet is classified directly and its flow
  is never cached, so it does not take up a cache entry.
* **Port matching.** In a client-server flow, one port is well known
  (below 1024) and the other is a random client port. The random one is
  almost always the larger. A table keeps one counter per port number and
  direction: how many cached flows have that port as their larger
  ("unknown") port. If the counter is zero, no cached flow can match the
  packet. The cache search is then skipped, and the packet goes straight to
  classification.

The SystemVerilog here implements the flow processor: the two filters, the
hashed flow cache with timeout-based eviction, an adaptive timeout
controller, a rule-based full header filter, and the control around them.
The rest of the router is not included: the input ports, the switching
fabric and the output port queues. The processor takes packet headers in
and gives one forwarding decision out per header.

## Files

| File | Module | Role |
|---|---|---|
| `rtl/fc_pkg.sv` | package `fc_pkg` | flow key, forwarding info and rule types; path codes; rule match and hash functions |
| `rtl/flow_processor.sv` | `flow_processor` | top: packet control, time base, wiring |
| `rtl/port_compare.sv` | `port_compare` | equal-port test, unknown port and its direction bit |
| `rtl/port_match_table.sv` | `port_match_table` | 65536 × 2 counters of cached flows per unknown port |
| `rtl/flow_cache_table.sv` | `flow_cache_table` | hashed flow cache, chained buckets, free stack, ageing scan |
| `rtl/full_header_filter.sv` | `full_header_filter` | ordered rule table, first-match linear search |
| `rtl/adaptive_timeout.sv` | `adaptive_timeout` | idle timeout steered by the filtered cache utilization |
| `tb/tb_*.sv` | | one self-checking testbench per module, plus `tb_flow_workloads` |
| `tb/flow_workload_driver.sv` | | traffic generator and checker used by `tb_flow_workloads` |

## How a packet is handled

```
            hdr_valid/hdr_key
                  |
           +--------------+  ports equal   +--------------------+
           | port_compare |--------------->|                    |
           +--------------+                |                    |
                  | unknown port, dir bit  |                    |
           +------------------+ count = 0  | full_header_filter |--> decision
           | port_match_table |----------->|     (slow path)    |    (then cache
           +------------------+            |                    |     the flow,
                  | count > 0              |                    |     unless the
           +------------------+   miss     |                    |     ports were
           | flow_cache_table |----------->|                    |     equal)
           +------------------+            +--------------------+
                  | hit
                  +--> decision (fast path)
```

The header is accepted in the idle state. Each header then leaves on exactly
one of four paths, reported on `dec_path`:

| `dec_path` | Condition | Work done | Cached afterwards |
|---|---|---|---|
| `PATH_PORT_EQUAL` | source port = destination port | full header filtering | no |
| `PATH_PORT_ZERO` | counter of the unknown port is 0 | full header filtering | yes |
| `PATH_CACHE_HIT` | counter > 0 and the 5-tuple is in the cache | cache search | (already) |
| `PATH_CACHE_MISS` | counter > 0 but the 5-tuple is not in the cache | cache search, then full header filtering | yes |

The unknown port is the larger of the two ports. The direction bit is 0 when
it is the source port and 1 when it is the destination port. A miss can only
happen when a different cached flow uses the same unknown port in the same
direction. For example, one client port may be used towards two servers.

The control is a small state machine. Its core follows three states: idle,
cache match and filtering. Port comparison happens in the cycle the header
is accepted. The counter read takes one more state. The decision goes out
as soon as the filter answers. A filtered flow is then inserted into the
cache before the next header is accepted. Decisions for dropped packets
(`dec_fwd.drop`) are cached like any other, so a denied flow is also
refused on the fast path.

## Keeping the port counters exact

The port-matching table is only safe if this invariant holds:

> counter[p][d] = number of flows in the cache whose unknown port is p in
> direction d.

If a counter were too low, a packet of a cached flow would skip the cache
search. It would still be forwarded correctly, but it would be inserted a
second time, creating a duplicate entry. If a counter were too high, the
design would only lose speed. The design keeps the invariant as follows:

* **One source of truth.** The flow cache reports every change it makes on
  `upd_valid/upd_inc/upd_key`: each insertion and each deletion by the
  ageing scan. The report comes in the cycle after the change. A second
  `port_compare` instance turns the reported key into the same (port,
  direction) index as on the packet path, and the counter is incremented or
  decremented in that cycle.
* **No equal-port flows.** Flows with equal ports are never inserted, so
  their (undefined) unknown port never needs a counter. An assertion in the
  top checks this.
* **Ordering.** One packet is handled at a time. A flow's insertion, and
  therefore its counter increment, is finished before the next header is
  taken. A counter read that falls in the same cycle as an update of the
  same counter gets the updated value. A deletion can race with a packet of
  the same flow that has already read a non-zero counter. That packet then
  misses in the cache and is re-inserted, which is correct.
* **Range.** A counter can never exceed the number of cache entries. Each
  counter is `$clog2(ENTRIES+1)` bits wide (13 at the default size).
  Assertions flag any wrap in either direction.

After reset both tables clear themselves. The 65536-row counter table takes
65536 cycles. `ready` rises when both are done, and headers are only taken
after that.

## Flow cache

`flow_cache_table` stores, for each entry:

* the 104-bit key;
* 8 bits of forwarding information: output port, priority and drop;
* a last-use time stamp;
* a link to the next entry in its hash bucket.

A bucket is a singly linked list that starts at a head pointer. The hash is
an XOR fold of the 5-tuple (`fc_pkg::flow_hash`). The number of buckets is a
power of two.

* **Lookup:** read the bucket head, then compare one entry per cycle along
  the chain. A hit refreshes the entry's time stamp. A miss walks the whole
  chain, so a miss at the same depth costs one cycle more than a hit.
* **Insert:** pop an index from the free-entry stack, write the entry, and
  link it in at the head of its bucket. Insertion takes one cycle. If the
  stack is empty, nothing is stored and `rsp_full` is raised. The top counts
  these events in `stat_full` and still forwards the packet.
* **Ageing:** whenever no command is waiting, a scan pointer steps through
  the entries. An entry idle for more than `timeout` ticks is unlinked. The
  scan walks the entry's bucket to find its predecessor, because the lists
  are singly linked. The entry is then pushed back on the free stack and the
  deletion is reported. Commands have priority over the scan but never
  interrupt a deletion that has started. A whole pass takes about `ENTRIES`
  idle cycles, which is far shorter than a tick.

Time stamps and the timeout are `TS_W` (16) bits, compared modulo 2^16. An
entry is always scanned long before its idle time could wrap.

## Adaptive timeout

The idle timeout is not fixed. It is re-assigned at every update, once per
tick by default:

```
rho(n)     = occupancy / ENTRIES
rho_hat(n) = (1 - w) * rho_hat(n-1) + w * rho(n)
T(n)       = T(n-1) + dT               if rho_hat(n-1) <= rho_min
           = max(T(n-1) - dT, T_min)   if rho_hat(n-1) >= rho_max
           = T(n-1)                    otherwise
```

The filtered utilization `rho_hat` is low-pass filtered, so short bursts do
not move the timeout. The controller lengthens the timeout while the cache
is under-used. It shortens the timeout when the cache is nearly full, but
never below `T_min`, which prevents thrashing. Defaults: `w` = 0.5,
`dT` = 2 ticks, `rho_min` = 0.90, `rho_max` = 0.98. With one tick per second,
`dT` is 2 s.

Implementation detail: `rho_hat` is kept in cache entries with 16 fraction
bits, not as a fraction of the capacity. The thresholds are multiplied by
`ENTRIES` at elaboration, so no divider is needed. The top brings
`rho_hat` out as `util_filtered`.

## Full header filter

The design only needs the filter to be a multi-field classifier whose rules
can change at run time. Its cost also grows with the number of rules, which
the flow cache is meant to hide. The filter here is the simplest such
classifier. It is an ordered table of `NUM_RULES` (64) rules, and the first
match wins. Each rule (`fc_pkg::rule_t`) has:

* a source address and mask;
* a destination address and mask;
* an inclusive source port range;
* an inclusive destination port range;
* a protocol value or a wildcard;
* an action.

One rule is tested per cycle. The filter time `T_f` is therefore (index of
the first matching rule + 1) cycles, or `NUM_RULES` cycles when no rule
matches. A packet that matches nothing gets the `NOMATCH_ACTION` parameter,
which drops it by default. Rules are written through `rw_*`, with an enable
bit per slot. Every slot is disabled after reset.

Changing rules does not flush the cache. Flows that are already cached keep
their old decision until they age out.

## Timing

Latency is counted in clock edges. It runs from the edge that accepts the
header to the edge that raises `dec_valid`. The cache is assumed idle, and P
is the number of cache entries compared.

| Path | Latency |
|---|---|
| cache hit | 3 + P |
| equal ports | 2 + T_f |
| zero counter | 3 + T_f |
| cache miss | 6 + P + T_f |

When a flow is inserted, the next header is accepted 2 cycles later than it
would otherwise be. A header can also wait for an ageing deletion that is
already in progress. `dec_valid` is a one-cycle pulse with no back-pressure.

## Parameters of `flow_processor`

| Parameter | Default | Meaning |
|---|---|---|
| `ENTRIES` | 4096 | flow cache entries; the largest configuration studied needs 3755 |
| `BUCKETS` | 4096 | hash buckets (power of two, ≤ 65536) |
| `NUM_PORTS` | 65536 | port-matching rows, one per 16-bit port |
| `NUM_RULES` | 64 | filter rule slots |
| `TS_W` | 16 | time stamp and timeout width (ticks) |
| `T_INIT` | 32 | timeout after reset (ticks) |
| `T_MIN` | 4 | lower bound of the timeout (ticks) |
| `DELTA_T` | 2 | timeout step (ticks) |
| `UPDATE_TICKS` | 1 | ticks between timeout updates |

The thresholds and the filter weight are parameters of `adaptive_timeout`.
The top uses their defaults.

Ports of the top: `clk`, `rst_n` (asynchronous, active low), `ready`, `tick`
(one pulse per time unit), the header input `hdr_valid/hdr_ready/hdr_key`,
the decision output `dec_valid/dec_key/dec_fwd/dec_path`, the rule write
port `rw_valid/rw_idx/rw_en/rw_rule`, and status: `timeout`, `occupancy`,
`util_filtered`, and the counters `stat_pkts`, `stat_hit`, `stat_equal`,
`stat_zero`, `stat_miss` and `stat_full`.

## What follows the source design and what is chosen here

These parts follow the source design:

* the four-path flow (equal ports → filter without caching; zero counter →
  filter and cache; otherwise search the cache);
* the choice of the larger port as the unknown port, and its one-bit
  direction;
* a two-column table of per-port counts, incremented on insertion and
  decremented on deletion;
* hashing with one singly linked list per bucket and five-field matching;
* the idle / match / filter control;
* the timeout equations and their constants (w = 0.5, dT = 2 s,
  rho_min = 0.9, rho_max = 0.98).

These are choices made here, where the source gives no value or method:

* the cache size (4096, chosen to cover every size studied) and the bucket
  count;
* the hash function, the free stack, and the background ageing scan;
* the counter width, and that only the unknown-port counter of each flow is
  kept;
* the whole internal design of the full header filter: rule format, 64
  rules, linear search, and drop on no match;
* the forwarding-information fields and widths (4-bit output port, 3-bit
  priority, drop flag);
* `T_min` = 4 s, the initial timeout of 32 s, one timeout update per second,
  and a 1 s tick;
* one packet in flight at a time, with no pipelining;
* caching of drop decisions;
* refusing to cache when the cache is full, instead of evicting.

The source counts 65537 rows in the port table. A 16-bit port field can
only address 65536 rows, so that is what is built.

## Verification

Every module has a self-checking testbench. Each one compares the module
against a reference written independently in the testbench, and ends by
printing `TB_RESULT checks=N failures=M`.

* `tb_port_compare`: corner ports and random pairs.
* `tb_port_match_table`: reset sweep length, random increments, decrements
  and lookups against a reference count, and same-cycle forwarding.
* `tb_full_header_filter`: random rule tables and headers against a
  first-match search, including the exact `T_f` of every search.
* `tb_adaptive_timeout`: the equations in real arithmetic, over phases
  where the timeout rises, falls, holds and sits at `T_min`.
* `tb_flow_cache_table`: a small table (64 entries, 8 buckets) with long
  chains. It predicts each lookup's result, probe count and latency; tests
  overflow; tests that ageing deletes idle entries and keeps refreshed
  ones; and checks that every change is reported once.
* `tb_flow_processor`: the whole processor at its default size. It predicts
  the path and decision of every packet and checks latencies. Its phases
  cover mixed traffic, overflow of the 4096-entry cache, and ageing with
  the timeout falling to `T_min` and rising again. It also checks the
  statistics counters. The run fails if any of these never happened: one
  of the four paths, overflow, ageing (including a deletion from the middle
  of a chain), a rise or a fall of the timeout, or a header waiting while
  the cache finishes an ageing deletion.
* `tb_flow_workloads`: three instances at cache sizes 332, 175 and 3755, the
  sizes at which campus and backbone traffic was studied. Each is driven
  with synthetic traffic: mostly client-server traffic for the campus
  cases, and 20% equal-port packets plus many one-time flows for the
  backbone case. Every decision is checked, and the fraction of packets
  that needed full header filtering is printed. The original traces are not
  reproduced, so these numbers describe the synthetic traffic only.

To run a testbench with Verilator (5.x), from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_flow_processor \
    -y rtl -y tb +libext+.sv rtl/fc_pkg.sv tb/tb_flow_processor.sv
./obj_dir/Vtb_flow_processor
```

Replace the top module and the testbench file to run another one. The
full-size test takes a few seconds. Most of its time is the 65536-cycle
table clear and about 1.2 million simulated cycles of traffic and ageing.

## Limits

* One packet at a time. A real line card would pipeline the counter read,
  the cache search and the filter, and would need to keep the counter
  invariant across packets in flight.
* The counter table is a plain 1.7 Mbit array with one registered read port
  and one read-modify-write port. A physical implementation would map it
  to SRAM macros.
* The ageing scan and packet commands share one cache engine. Under
  sustained back-to-back traffic the scan makes progress only in idle
  cycles.
* No clock frequency is assumed anywhere. Whether a given packet rate is
  met depends on the clock, the chain depths and the rule count. See the
  latency table.

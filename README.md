# Instruction cache for the C-processor

This is a set-associative instruction cache that keeps the instruction unit of
a pipelined processor supplied with code. The processor asks for two
consecutive 32-bit words ("quads") per request, starting at any quad address.
Behind the cache, main memory sits on a 32-bit bus that delivers bursts.

The central idea is that **fetching and serving run in parallel**.
- The **server** answers the processor.
- The **fetcher** moves whole *transfer blocks* from memory into the cache: demand fetches after a miss, and prefetches of the next transfer block ahead of use.

Two small buffers decouple the two engines from the single-ported cache RAM:
- The **read buffer** holds the last transfer block read from the RAM. Sequential code is served from it without touching the RAM.
- The **fetch buffer** receives the transfer block coming from memory. It has a valid bit per quad, so the processor can use quads before the block is complete.

The cache is indexed with *virtual* addresses extended by a process number. A
task switch therefore needs no flush, and address translation is only needed
after a miss.

The RTL is parameterised. The defaults are the configuration the study
recommends:
- 1024 quads (4 KiB) in 2-way sets
- LRU replacement
- blocks of 32 quads, split into 4 transfer blocks of 8 quads
- *prefetch_lookup_on_hits*
- both buffers
- wrap-around demand fetches
- stopping the fetcher on a miss, whether it is prefetching or demand fetching

## Addresses and geometry

A request address is 46 bits: a 16-bit process identification number
followed by a 30-bit quad address. Every quad address is one 32-bit word. At
the default sizes the address splits, from least to most significant, into
these fields:

| field | bits | meaning |
|---|---|---|
| word | 3 | quad within the transfer block |
| transfer block | 2 | transfer block within the block (4 per block) |
| set | 4 | one of 16 sets |
| tag | 37 | rest of the address, process number included |

A *block* (32 quads) is the unit that has a tag and takes part in
replacement. A *transfer block* (8 quads) is the unit that is fetched, and it
has its own data-valid bit. Fetching in smaller pieces keeps the miss penalty
down without paying a tag for every 8 quads.

All sizes are parameters of `icache` and must be powers of two. The field
widths follow from them and can drop to zero, so a single set, a
direct-mapped cache, or a transfer block as large as the block all work. A
transfer block must be at least 2 quads, one for each RAM half.

## The server

The server takes one request at a time. It looks the transfer block up in
this order:

1. **Read buffer.** A hit means the same transfer block as the previous RAM
   access. No RAM access, LRU update or prefetch decision is needed.
2. **Fetch buffer.** If the fetcher is fetching this transfer block, each
   quad is handed over as soon as its valid bit is set. A request that finds
   its block still arriving is therefore not treated as a miss.
3. **Status RAM, then data RAM.** On a tag match with the data-valid bit set,
   the whole row is read. It goes to the processor and is also loaded into
   the read buffer. The LRU state and the block's used-before bit are updated.
4. **Miss.** The server asks the fetcher for a demand fetch. If the fetcher is
   busy with another transfer block, the server stops it at once. The
   `PREFETCH_STOP` and `DEMAND_FETCH_STOP` parameters choose whether a
   prefetch and a demand fetch may be stopped. With the option off, or while
   the fetcher is already copying a complete block into the RAM, the server
   waits instead.

The read buffer is invalidated on a miss, on a flush, and whenever quads come
from the fetch buffer. So a read-buffer hit really means "no new transfer
block entered".

**Requests that cross a transfer block.** The two quads may lie in different
transfer blocks. The cache gives a separate ready signal per quad (`rsp_rdy0`,
`rsp_rdy1`) and serves the two halves one after the other, so no staging
register is needed. The instruction unit can start on the first quad early.
If both transfer blocks are valid in the same cached block, one data RAM
access returns both quads (see *split data RAM* below; `SPLIT_READ`).

**Latency** in clock cycles, from the cycle a request is accepted to the
ready signals, with the test memory timing (the clock is 100 time units; the
first quad comes 350 units after the request, then one every 150 units):

| case | cycles |
|---|---|
| read buffer hit | 2 |
| RAM hit | 3 |
| fetch buffer hit | 3 or more, until the quads have arrived |
| demand miss with wrap-around, fetcher idle | 8 (the requested quads come first) |

With the trace-A workload below, a request takes 2.5 cycles on average.

## The fetcher

The fetcher fetches one transfer block at a time, in three steps:

1. **Burst.** It opens the fetch buffer for the transfer block and sends one
   burst request. A demand fetch with `WRAP_AROUND` starts at the requested
   quad and wraps round inside the transfer block. A prefetch starts at quad 0.
2. **Collect.** Quads fill the fetch buffer as they arrive.
3. **Store.** Only when the transfer block is complete does the fetcher pick
   its place:
   - If a way of the set already has the block's tag, the transfer block joins it.
   - Otherwise the replacement victim is reallocated: new tag, all its valid and used-before bits cleared.

   The whole row is then written into the data RAM in one cycle, with the
   data-valid bit and, for tagged prefetching, the fetch buffer's used-before
   bit.

Choosing the block late means that a fetch which is stopped half way never
evicts anything.

The data RAM has a single port, and the server always wins it. A store that
collides with a server read waits a cycle.

A burst can end with "not available" from the memory management unit (the
page is not resident). The fetch is then dropped, and the waiting request
completes with `rsp_err`.

## Prefetching

Prefetching is one transfer block ahead: when the processor enters transfer
block *n*, the cache considers fetching *n+1*. The `PREFETCH` parameter
chooses the rule:

| `PREFETCH` | prefetch *n+1* when |
|---|---|
| `PF_NEVER` | never |
| `PF_ALWAYS` | always |
| `PF_ON_MISSES` | *n* missed |
| `PF_TAGGED` | *n* missed, or *n* was prefetched and this is its first use (used-before bit 0) |
| `PF_LOOKUP_ALWAYS` | a status lookup finds *n+1* absent |
| `PF_LOOKUP_HIT` (default) | *n* hit and a lookup finds *n+1* absent; after a miss the lookup is skipped |

A block that is already in the fetch buffer is never prefetched again.

The hard part is timing: when *n* is entered, the fetcher is often still
busy. The server therefore keeps one **pending decision**, which holds the
transfer block to consider and whether its entry was a miss and whether it
was used before. It is evaluated as soon as the fetcher is idle, which can
be right away. Entering another transfer block in the meantime replaces the
decision. Requests that stay in the same transfer block do not count as
entering it again. The lookup for `PF_LOOKUP_*` uses a separate read port of
the status RAM, so it costs the server no cycle.

## Storage

**Status RAM.** There is one row per set. For each way, the row holds:
- the tag
- one data-valid bit and one used-before bit per transfer block
- the set's replacement state

For LRU, the replacement state is a rank per way; with 2 ways this amounts to
one bit of information. For FIFO it is a counter. Random replacement uses a
free-running counter shared by all sets.

The status RAM is a register array with three combinational read ports:
server lookup, prefetch lookup and fetcher placement. It has two write ports:
"block used" and "transfer block stored". A flush clears every data-valid bit
in one cycle. Reset does the same, so the cache needs no separate flush after
reset.

**Split data RAM.** One row holds one transfer block and is addressed
`{set, way, transfer block}`. The row is split into two halves: quads 0-3 and
quads 4-7. The half with quads 0-3 has a +1 adder with an enable on its row
address. A read with the adder enabled returns quads 4-7 of row *r* and quads
0-3 of row *r+1*. That is exactly what a request for the last quad of one
transfer block and the first of the next needs, in one access. The server
uses it only when the next transfer block is in the same cached block and
valid.

**Buffers.** Both buffers are one transfer block wide, so they load from or
store to a RAM row in one cycle.
- The read buffer holds the transfer-block address and a valid bit.
- The fetch buffer holds the address, a valid bit per quad, whether the fetch is a demand fetch, and a used-before bit.

## Interfaces

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `req_valid`, `req_ready` | in/out | 1 | request handshake; a request is taken when both are high |
| `req_addr` | in | 46 | process number and quad address of the first quad |
| `rsp_quad0`, `rsp_quad1` | out | 32 | quad at the address and the next one |
| `rsp_rdy0`, `rsp_rdy1` | out | 1 | each quad valid; both are held until the next request is accepted |
| `rsp_err` | out | 1 | memory reported the page as not available |
| `flush_req` | in | 1 | invalidate the whole cache; taken when the server is idle |
| `mem_req` | out | 1 | one-cycle burst request |
| `mem_addr` | out | 46 | virtual address of the first quad of the burst |
| `mem_abort` | out | 1 | one-cycle cancel of the running burst |
| `mem_valid`, `mem_data` | in | 1, 32 | one quad of the burst, in wrap-around order |
| `mem_na` | in | 1 | the burst cannot be served (page not available) |
| `events` | out | struct | one-cycle pulses for monitoring (see `icache_events_t`) |

The memory side expects the bus unit and the memory management unit to:
- translate the virtual address
- return the `TB_QUADS` quads of the addressed transfer block, starting at `mem_addr` and wrapping at the transfer block boundary

The monitoring pulses are:
- read-buffer, RAM and fetch-buffer hits
- miss, prefetch start and fetcher stop
- split read, crossing request and RAM collision
- block stored, block replaced and wrapped fetch

## Parameters of `icache`

| parameter | default | meaning |
|---|---|---|
| `CACHE_QUADS` | 1024 | capacity in quads |
| `WAYS` | 2 | set size |
| `BLOCK_QUADS` | 32 | quads per block (one tag) |
| `TB_QUADS` | 8 | quads per transfer block (unit of fetch and of data-valid) |
| `REPL` | `REPL_LRU` | `REPL_LRU`, `REPL_FIFO`, `REPL_RANDOM` |
| `PREFETCH` | `PF_LOOKUP_HIT` | see the prefetch table |
| `WRAP_AROUND` | 1 | demand fetches start at the requested quad |
| `PREFETCH_STOP` | 1 | a miss stops a running prefetch |
| `DEMAND_FETCH_STOP` | 1 | a miss stops a running demand fetch |
| `SPLIT_READ` | 1 | use the +1 adder for crossing requests |

## Measured behaviour

These figures come from `tb_icache_sweep`. Each run is 100,000 requests of
the same synthetic trace A, one cycle between requests, at the test memory
timing. "Miss" counts requests whose transfer block was neither cached nor
already arriving. Traffic is quads read from memory.

| configuration | miss ratio | cycles/request | traffic (quads) |
|---|---|---|---|
| default (1024 quads, 2-way, 32/8, lookup on hits, all options) | 1.09 % | 2.55 | 72,850 |
| same, wrap-around and both stops off | 0.90 % | 2.59 | 74,411 |
| 64 quads | 2.73 % | 2.80 | 193,303 |
| 16384 quads | 1.05 % | 2.54 | 70,449 |
| transfer block 2 quads | 25.2 % | 4.80 | 66,410 |
| transfer block 32 quads | 1.21 % | 2.31 | 92,662 |
| prefetch never | 8.81 % | 3.08 | 69,082 |
| prefetch always | 1.05 % | 3.03 | 250,025 |
| prefetch on misses | 4.82 % | 2.87 | 70,263 |
| tagged prefetching | 1.10 % | 2.67 | 105,951 |
| trace B (more far jumps) | 2.75 % | 2.75 | 117,768 |

The trends match the study's:
- Prefetching is essential.
- *prefetch_always* multiplies memory traffic, and the extra RAM stores slow the server.
- The lookup-based rules give the best balance.
- Very small transfer blocks miss far more often.
- Stopping the fetcher raises the miss count a little, because stopped blocks are fetched again, but lowers the time per request.

The synthetic traces flush the cache and change process often, so the
working set is small and caches beyond a few hundred quads gain little.

## Departures from the study, and choices it leaves open

- **Not built: fetch bypass, two-ported RAM, in-cache prefetching, and
  prefetching more than one transfer block.** The study evaluates these as
  alternatives and drops them. With a fetch buffer, bypass gains nothing,
  and two-ported RAM gains little.
- **Server priority on the RAM.** The study only asks that server and fetcher
  exclude each other. Here the server always wins, and the fetcher's one-cycle
  store waits.
- **Prefetch lookup is free.** In the study a prefetch lookup occupies the
  RAM. Here a second status read port does it.
- **Handshakes and cycle counts** on both sides are this design's own. The
  study only gives times in abstract units.
- **The stop rule does not apply during a store.** A miss never stops the
  fetcher once the transfer block is complete and being written.
- **Flush** is a port and is taken between requests. Reset also invalidates
  everything.

The bus unit, the memory management unit and the instruction unit are
outside the cache. The testbenches model them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_icache` | the default cache, end to end. Directed cycle counts (read buffer 2, RAM 3, wrap-around miss 8), a process switch, a crossing request, a not-available page and a flush. Then 100,000 trace-A requests with every quad checked. Every mechanism must occur: read-buffer, RAM and fetch-buffer hits, misses, prefetches, stops, split reads, crossing requests, RAM collisions, replacements, wrapped fetches, flushes, errors. |
| `tb_icache_sweep` | 22 configurations side by side, 100,000 requests each, every quad checked. Configurations: cache sizes 64 to 16384 quads; set sizes 1, 2 and 4; block sizes 8 and 64 with equal transfer blocks; transfer blocks of 2 to 32 quads; all replacement and prefetch rules; trace B; and the options switched off. It prints miss ratio, cycles per request and memory traffic for each. |
| `tb_server` | a 512-quad, 4-way, FIFO, tagged-prefetch cache with no wrap-around, no split reads and no demand-fetch stop, assembled from the parts. |
| `tb_fetcher`, `tb_status_ram`, `tb_data_ram`, `tb_read_buffer`, `tb_fetch_buffer`, `tb_repl_logic`, `tb_prefetch_policy` | unit tests against independent reference models. These include the burst timing, grant waiting, stop rules, the +1 adder and exhaustive checks of the replacement and prefetch rules. |

Test infrastructure:
- **Memory model** (`bus_mem_model`). The content of each quad is a fixed function of its virtual address, so every delivered quad can be checked. Memory timing follows the study's default dynamic timing: cycle 100, latency 200, access 150. Quad addresses with bits 29..24 all ones stand for non-resident pages.
- **Trace driver** (`iu_trace_driver`). It builds synthetic instruction traces from sequences, loops, jumps, calls, returns and flushes, with the event probabilities of the study's traces A and B.

To simulate with Verilator 5, for example the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_icache \
        -y rtl -y tb +libext+.sv rtl/icache_pkg.sv tb/tb_icache.sv
    ./obj_dir/Vtb_icache

Run any other testbench the same way with its name. The modules are found
through `-y`.

## Files

- `rtl/icache_pkg.sv`: widths, quad and address types, algorithm enums, event struct.
- `rtl/icache.sv`: top level; wires the parts and arbitrates the data RAM.
- `rtl/server.sv`: request handling, lookups, miss handling and stop decision, pending prefetch decision.
- `rtl/fetcher.sv`: burst, fetch buffer filling, deferred placement, store.
- `rtl/prefetch_policy.sv`: the six prefetch rules.
- `rtl/status_ram.sv`, `rtl/repl_logic.sv`: tags, valid and used-before bits, LRU/FIFO/random.
- `rtl/data_ram.sv`: split data RAM with the +1 adder.
- `rtl/read_buffer.sv`, `rtl/fetch_buffer.sv`: the two transfer-block buffers.
- `tb/`: the testbenches, plus `bus_mem_model`, `iu_trace_driver` and `icache_run` (one configuration of the sweep).

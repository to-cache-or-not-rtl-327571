# Tunable per-port AXI caches for HLS-style accelerators

An accelerator produced by high-level synthesis reaches external memory
through one memory controller per AXI port ("bundle"). The plain controller
turns every load or store into its own AXI transaction and makes the
accelerator wait the full memory latency each time. This design puts a cache
*inside* the memory controller. The accelerator-side interface stays exactly
the same, so the accelerator's state machine is unchanged. The cache only
changes how quickly `done` comes back. Each port gets its own cache, or none,
and each cache is sized and tuned on its own through seven parameters: ways,
lines per way, line length, bus width, write-buffer depth, replacement policy
and write policy.

There is one place where the cache cannot stay invisible: the end of the
computation. A cache may report a store as finished while the data is still
in its write buffer or in a dirty line. So the accelerator ends every call by
sending each port a **write of size 0**. The memory controller decodes this
marker as a *flush* and answers it only after all the data is in memory and
acknowledged. A controller without a cache just acknowledges the marker.

The repository contains:

* the cache (`axi_cache`) and its three parts: frontend, cache memory and
  backend;
* the plain single-transaction controller (`std_axi_ctrl`);
* the wrapper that selects one of the two per port (`axi_mem_ctrl`);
* a small example accelerator, `c[index] = a[index] + b[index]` on 64-bit
  elements, wired to three ports with two differently tuned caches and one
  plain controller (`cached_accel_top`);
* performance counters for every port of that top (`metric_counters`).

## The memory-controller interface

Every controller, cached or not, presents the same port to the accelerator:

| signal | dir | meaning |
|---|---|---|
| `start_i` | in | one-cycle request pulse |
| `we_i` | in | 1 = store |
| `size_i` | in | access size in bits; `we_i=1, size_i=0` is the flush marker |
| `addr_i` | in | byte address |
| `wdata_i` | in | store data (`DATA_W` bits) |
| `done_o` | out | one-cycle completion pulse |
| `rdata_o` | out | load data, valid with `done_o` |
| `stat_o` | out | cache event pulses (all zero without a cache) |

The accelerator issues a request and then sits in a wait state until `done_o`.
Its schedule therefore never assumes a latency. A cache hit comes back two
cycles after `start_i`; a miss takes as long as the memory does.

## Plain controller (`std_axi_ctrl`)

The plain controller has three states: `IDLE`, `W_READ` and `W_WRITE`.

* A load drives AR and waits in `W_READ` for the single data beat.
* A store drives AW and W together and waits in `W_WRITE` for the response.
* Each valid is dropped after its own handshake.
* Only one transaction is ever in flight.

A fourth state, `W_NOP`, answers the flush marker one cycle later without any
bus traffic.

## The cache (`axi_cache`)

```
 controller ──valid/ready──▶ frontend ──▶ cache memory ──▶ backend ──AXI4──▶ memory
                                          (tags, data,      (read ctrl,
                                           valid/dirty,      write ctrl)
                                           replacement,
                                           write buffer)
```

`axi_mem_ctrl` turns the start pulse into a `valid` that stays high until
`ready`. It sets `flush` when it sees the size-0 store.

### Frontend

The frontend accepts a request in the first cycle that `valid` is high and no
other request is in progress. In that same cycle it passes the address
straight to the tag and data RAMs, so the RAM read starts immediately. It
registers the request fields for the cycles that follow. `ready` is the cache
memory's `done` pulse, together with its read data.

### Cache memory: lookup, miss and write policies

Addresses are split into `tag | set | offset`:

* the offset selects a byte within a line of `LINE_SIZE` elements;
* the set selects one of `WAY_SIZE` lines per way;
* each way has a tag RAM and a data RAM, both with a one-cycle synchronous
  read;
* valid bits, and dirty bits for write-back, are plain register files with one
  bit per line, so resetting them is instant.

**Lookup.** In the acceptance cycle every way's tag and line are read. In the
next cycle the tags are compared. A hit is answered in that cycle: the data,
`done`, and a replacement-state update.

**Read miss.**
1. Choose a victim way: an invalid way if there is one, otherwise the way the
   replacement policy names.
2. For write-back, a dirty victim is first pushed, whole, into the write
   buffer.
3. Ask the backend for the missing line as one AXI burst.
4. Write tag, data and valid when the line arrives, and answer in the
   following cycle.

**The overlap rule.** Before a line is fetched, the cache memory checks
whether any write still in the write buffer falls inside that line. "Still in
the buffer" means not yet acknowledged by the memory. If one does, the fetch
waits. Without this rule, a line that was just evicted, or a word that was
just written through, could be read back from memory before the write
landed, returning stale data. AXI does not order reads against writes, so the
cache has to do it.

**Write-through, no allocate** (the default):
* Every store goes into the write buffer. On a hit, the cached line is also
  updated.
* The store is reported done as soon as it is in the buffer.
* A store to a line that is not cached does not fetch that line.
* If the buffer is full, the store waits in `S_WT_WAIT`.

**Write-back, allocate:**
* A store hit updates the line and sets its dirty bit.
* A store miss fetches the line as a read miss would, then merges the store
  into it.
* Memory is written only on eviction or on a flush.

### Replacement (`cache_replacement`)

The replacement state is kept per set and is updated on every hit and every
refill:

* `REP_LRU` (the default) is true LRU. Each way has an age from 0 to
  `N_WAYS-1`. The victim is the oldest way.
* `REP_TREE` is tree pseudo-LRU. It uses `N_WAYS-1` bits per set, arranged as
  a binary tree. Following the bits from the root leads to the victim.
  Touching a way points every bit on its path away from it.

A direct-mapped cache (`N_WAYS = 1`) has no replacement state.

### Write buffer and outstanding writes (`cache_write_buffer`)

The write buffer is what lets stores finish early. It is a FIFO of
`BUFFER_SIZE` entries, each holding an address, data and byte strobes. An
entry is one bus word for write-through and one whole line for write-back.
Each entry passes three pointers:

1. **tail**: the cache memory pushes the entry here and can report the store
   done at once;
2. **issue**: the backend write controller sends the entry as a burst, then
   moves on *without waiting for its response*;
3. **head**: the entry is retired when its write response (B) returns.

Several writes can therefore be outstanding on the bus at once. This matters
because memory latency is tens of cycles. Entries stay in the buffer until
they are acknowledged, which is what makes the overlap rule above possible.
Write-back caches use the same buffer for evictions. A burst of dirty
evictions therefore does not stall the accelerator until the buffer is full.

### Flush

* **Write-through**: the flush waits until the buffer is empty. "Empty" means
  every response is back, not just every write issued.
* **Write-back**: the flush walks every set and way. Each dirty line it finds
  is moved into the buffer and its dirty bit is cleared. When the walk ends,
  the flush waits for the buffer to empty.

The walk visits every line whether or not it is dirty. A flush therefore costs
at least `WAY_SIZE × N_WAYS` cycles. In the example top this is 64 cycles per
call, which is most of a call that hits in every cache. See the numbers below.

### Backend (`cache_backend`)

The backend is two independent AXI controllers that can run at the same time:

* **Read controller**: issues one INCR burst of
  `LINE_SIZE·DATA_W / BUS_W` beats and collects the whole line.
* **Write controller**: drains the write buffer. It drives AW and W in
  parallel, with 1 beat per write-through word or a line's worth of beats per
  write-back line. `bready` is always high, and each B response retires the
  oldest entry.

All transactions use ID 0, so AXI returns responses in order. The bus may be
wider than an element (`BUS_W > DATA_W`); a wider bus means shorter bursts.

### Statistics (`stat_o`)

`stat_o` is a packed struct of one-cycle pulses:

| field | pulses when |
|---|---|
| `hit` | a request is answered in the cycle after acceptance |
| `miss` | a request is not answered then. This includes a store blocked by a full buffer |
| `buf_full` | once per cycle while the write buffer is full |
| `buf_stall` | once per cycle while a request waits for buffer space |
| `flush` | a flush completes |

### Performance counters (`metric_counters`)

Tuning a cache means measuring it. The example top therefore counts, for
each of its ports:

| reg | counter |
|---|---|
| 0 | AXI handshakes on all five channels (bus traffic) |
| 1 | hits |
| 2 | misses |
| 3 | cycles with the write buffer full |
| 4 | cycles a request waited for buffer space |
| 5 | memory requests completed |
| 6 | cycles with a request outstanding |
| 7 | flushes |

Register 6 divided by register 5 is the average memory access time. A
request is counted as busy from the cycle after its start to its done cycle,
so a cache hit counts 2 cycles. One more counter holds the clock cycles spent
inside accelerator calls.

To read a counter, put `{port, reg}` on `mreg_addr_i`. Port 3, register 0 is
the call-cycle counter. `mreg_data_o` returns the value one cycle later. The
counters are 32 bits and wrap. `mreg_clear_i` zeroes them all.

## Parameters

| parameter | meaning | default |
|---|---|---|
| `N_WAYS` | ways; 1 = direct mapped (power of 2) | 1 |
| `WAY_SIZE` | lines per way (power of 2) | 8 |
| `LINE_SIZE` | elements per line, not bits (power of 2) | 32 |
| `BUS_W` | AXI data width, 32…1024 | element width |
| `BUFFER_SIZE` | write-buffer entries = maximum pending writes | 2 |
| `REP_POLICY` | `REP_LRU` or `REP_TREE` | `REP_LRU` |
| `WR_POLICY` | `WP_WT` (write-through, no allocate) or `WP_WB` (write-back, allocate) | `WP_WT` |

Cache size in bytes is `N_WAYS × WAY_SIZE × LINE_SIZE × DATA_W/8`. A line
must be between 1 and 256 bus beats long, because that is the AXI4 burst
limit. `ADDR_W` (default 32) and `DATA_W` (default 64) set the address and
element widths.

## The example accelerator (`foo_accel`, `cached_accel_top`)

`foo_accel` is an FSM with datapath for `c[index] = a[index] + b[index]`. It
has one state per scheduling step and one wait state per memory operation:

* `S_0`: load `a`;
* `S_1`: wait;
* `S_2`: load `b`;
* `S_3`: wait;
* `S_4`: add and store `c`;
* `S_5`: wait;
* `S_6`: return.

Before the return, it sends the flush marker to all three ports (`S_FLUSH`)
and waits for all three to answer (`S_FLWAIT`).

`cached_accel_top` gives each pointer its own port:

| port | pointer | controller |
|---|---|---|
| gmem0 → `m0_*` | `a` | cache: direct mapped, 8 lines × 32 elements (2 KiB), bus = 64 bits, 2-entry buffer, write-through |
| gmem1 → `m1_*` | `b` | cache: 2 ways × 32 lines × 8 elements (4 KiB), 64-bit bus, 4-entry buffer, LRU, write-back |
| gmem2 → `m2_*` | `c` | plain controller |

The parameters are prefixed `G0_` and `G1_`. Setting `G0_USE_CACHE` or
`G1_USE_CACHE` to 0 swaps in the plain controller. The top also holds the
performance counters, watching all three ports. Their read port
(`mreg_addr_i`, `mreg_data_o`, `mreg_clear_i`) is brought out as top-level
pins.

Measured with a memory latency of 17 cycles:

* A call whose loads hit in both caches takes about 130 cycles.
* A call that misses in both takes about 210 cycles.

Most of the 130 cycles are the write-back flush walk of gmem1. Removing it
would need a dirty-line list, which this design does not have.

## How far it is checked

| testbench | what it covers |
|---|---|
| `tb_std_axi_ctrl` | plain controller transfers and the flush marker |
| `tb_cache_frontend` | acceptance and held-request rules |
| `tb_cache_replacement` | both policies against a reference model |
| `tb_cache_write_buffer` | FIFO order, outstanding count, overlap match |
| `tb_cache_backend` | bursts, parallel read/write, outstanding writes |
| `tb_cache_memory` | hit/miss timing, eviction, overlap stall, flush walk |
| `tb_axi_cache` | random traffic on a direct-mapped write-through cache, a 2-way tree write-back cache with a 64-bit bus and a 4-way LRU write-back cache with a 128-bit bus, checked against a reference memory, including outstanding-write counts |
| `tb_axi_mem_ctrl` | both controller variants behind the common interface |
| `tb_foo_accel` | schedule and cycle counts with a stand-in memory |
| `tb_metric_counters` | every counter against random events, the read latency, clear |
| `tb_cached_accel_top` | end to end at the default parameters: results, hits, misses, replacements, flushes, that a cached call is faster, and every counter against the memory models' own handshake counts |
| `tb_workload_caches` | FFT, Gram-Schmidt and digit-recognition access patterns through the cache configurations tuned for them |

`tb_workload_caches` replays three kernels' memory traffic through the cache
configurations a designer would step through when tuning each one:

* **FFT** (1024 complex floats, 8 KiB): 4 KiB direct mapped; 16 KiB 4-way;
  32 KiB direct mapped with 512-byte lines; 16 KiB 4-way with a 16-entry
  buffer; the same with a 256-bit bus.
* **Gram-Schmidt** (3 × 32×32 floats, 12 KiB): 4 KiB, 16 KiB and 32 KiB,
  then 16 KiB with a 256-bit bus.
* **Digit recognition** (about 72000 64-bit words): 8 KiB direct mapped with
  a 64-bit and with a 256-bit bus.

Every read is checked against a reference memory. When the data set fits in
the cache, each line that is read misses exactly once: 128 misses for FFT
with 64-byte lines, 16 with 512-byte lines, 176 and 24 for Gram-Schmidt, and
4496 for digit recognition. The testbench checks these counts. It also
checks the trends expected from tuning:

* a larger cache misses less;
* a 16-entry write buffer removes the stalls that a 2-entry buffer causes
  under the FFT's dense stores;
* a wider bus cuts AXI handshakes without changing misses.

For the FFT the handshake counts of the four larger configurations are
68544, 68432, 68544 and 67776. These match the figures reported for the same
configurations on the synthesized FFT accelerator, and the testbench checks
them. The access orders are generic versions of the kernels, so hit counts
depend on the exact schedule and are only reported.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_cached_accel_top \
    rtl/axi_cache_pkg.sv rtl/*.sv tb/axi_mem_model.sv tb/tb_cached_accel_top.sv
./obj_dir/Vtb_cached_accel_top
```

For a unit testbench, swap the top and the last file. `tb_axi_cache` and
`tb_workload_caches` also need `tb/cache_tester.sv`. `tb/axi_mem_model.sv` is
a behavioural AXI4 slave with a fixed latency, byte-addressed storage and
counters for handshakes and outstanding writes.

## Departures and limits

* **Whole elements only.** Every access moves a full `DATA_W`-bit element at
  an element-aligned address. `size_i` is used only to recognise the flush
  marker, so narrower accesses are not supported.
* **AXI responses.** `rresp` and `bresp` are ignored, and one ID is used for
  everything. The plain controller and the caches issue only INCR bursts.
* **The plain controller and flush.** It treats the size-0 store as a no-op
  that answers in one cycle.
* **Cost of the flush walk.** Flush time grows with cache size, even when
  nothing is dirty (see above).
* **No coherence.** The caches on different ports do not see each other's
  data. Each port must be the only writer of the memory it reaches, and data
  written through one port must not be read through another within a call.
* **Example kernel.** The three-port arrangement is the tuning example. The
  kernel running on it is the small `a + b` loop body, because that is the one
  whose schedule is fully specified. The FFT, Gram-Schmidt, digit-recognition
  and ResNet-18 accelerators that these caches were tuned for are not
  included. Only their cache configurations and access patterns are
  exercised.
* **Counter access.** The counters are read through a plain address/data
  port, not through a bus slave. Their register layout is this design's own.
* **Reset** is synchronous and active low throughout.

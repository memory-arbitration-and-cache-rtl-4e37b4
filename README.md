# Stream cache and service-cycle memory arbitration for a coprocessor array

A video coprocessor array (CPA) moves many continuous data streams between
its processors and one external SDRAM, which it shares with a CPU, a
graphics unit, a debugger and its own control traffic. Two problems follow:

* **Who gets the SDRAM, and when.** The CPU wants short latency for its
  random cache-miss bursts. The streams want a guaranteed bandwidth and a
  bounded wait, because a bounded wait sets how much buffering each needs.
* **Where the stream data wait.** Each stream needs a buffer in front of the
  SDRAM. Sized for its own worst case, 20 streams would need about 37 kB.
  If the buffers share one memory, the total only needs to cover the
  *average* buffering per stream. In the example configuration that is
  256 bytes per stream, or 5 kB in all.

This RTL solves both. A **service-cycle arbiter** gives random traffic
priority up to a fixed budget per time window, so stream latency stays
bounded. A **multiport stream cache** holds the buffers of up to 20
streams in one 5 kB memory. Its cache lines are handed out through a
linked list, so no compaction is ever needed.

```
 5 bus ports (16 bit)                                      debugger CPU GFX  cfg-ctl rt-ctl
   |  s2p / p2s converters                                     |     |   |      |      |
   v                                                           v     v   v      v      v
 +----------------------- stream_cache -------------------+  +------- mem_arbiter --------+
 | cache_ram 80 lines x 64 B (128-bit words, single port) |  | L1  service cycle N1/M1    |
 | linked_list  (free list + per-stream rings)            |  | L2a debugger > L3a         |
 | addr_gen     (FIFO pointers, SDRAM addresses)          |  | L3a CPU > GFX, gfx_priority|
 | fcfs_arb     (first-come-first-serve burst requests)   |--| L2b service cycle N2/M2    |
 | burst engine (one line buffer, 16 x 32-bit transfers)  |  | L3b config > run-time ctl  |
 +--------------------------------------------------------+  +----------------------------+
                         |  32-bit burst data                     | burst command (mc_*)
                         +--------------> SDRAM controller <------+
```

`cpa_mem_top` wires these together. The SDRAM controller, the SDRAM and
every requester other than the streams are outside the design. Their
requests, grants and burst commands are top-level ports.

## Service-cycle arbitration (`service_cycle_arb`)

Time is split into **service cycles** of N clock cycles (N = 1024). M of
them are reserved for periodic (stream) traffic and R = N − M for random
traffic. In the main configuration M = R = 512, which is the extreme case
the worst-case formula below is built around.

The rule is evaluated in every cycle where the memory accepts a new burst
(`mem_ready`):

* A random request wins while the random side has kept the memory busy
  for fewer than R cycles in the current service cycle.
* After that, a periodic request wins.
* If only one class is requesting, it is served either way. The arbiter
  never leaves the memory idle.

The budget counter `rand_used` counts every cycle in which the memory is
busy with a burst the random side owns. It is cleared at the start of every
service cycle. The position counter runs on every clock, whether the
memory is busy or not.

**Critical instance.** A random requester can use its R cycles at the end
of one service cycle and its fresh R cycles at the start of the next. That
shuts out the streams for 2R cycles in a row. Add the time to serve the |P|
queued streams, each taking one burst of c cycles, and a stream request
waits at most

    W = c·|P| + (⌈c·|P| / (N − R)⌉ + 1) · R

For the example figures, c = 18 (a 16-word burst plus about 2 cycles of
read/write turnaround), |P| = 20, N = 1024 and R = 512. That gives
W = 1384 cycles. From W, the buffer a stream of b-byte bursts needs is
b + W·b/t_ave, where t_ave is its average time between bursts (b = 64).
The example configuration takes t_ave = N·c/40 = 460.8 cycles, which
gives 64 + 1384·64/460.8 = 256 B per stream, or 5 kB for 20 streams.
A private buffer sized for a stream's peak rate (128 MB/s on a 96 MHz,
32-bit SDRAM) would instead need 1845 B, or 37 kB for 20 streams.

Because a burst is never cut, a random burst that starts just under the
budget can overrun it by at most one burst. The end-to-end testbench
therefore checks stream waits against W plus three burst lengths, and
random runs against 2R plus two bursts.

The same module is used twice in the tree: at level 1 and at level 2b.

## The arbitration tree (`mem_arbiter`, `fixed_prio_arb`, `gfx_prio_arb`)

```
L1  service_cycle_arb(N1, M1)
 ├─ random   : L2a fixed_prio_arb   debugger  >  L3a
 │                L3a gfx_prio_arb  CPU+peripherals  >  GFX (with gfx_priority)
 └─ periodic : L2b service_cycle_arb(N2, M2)
                  ├─ periodic (M2): the stream cache's FCFS winner
                  └─ random   (R2): L3b fixed_prio_arb  configuration-time > run-time control
```

Grants flow down combinationally. Each node presents `req_out` to its
parent and receives `gnt_in`. `gnt_src` reports the winner of the cycle.

**GFX priority.** The CPU normally beats the graphics unit. With
`gfx_priority = k ≠ 0`, the graphics unit takes the next grant once the CPU
has won k times while GFX was waiting. With k = 0, the CPU has strict
priority.

**Level 2b.** Here the stream traffic is the reserved class and the control
traffic the budgeted one. The values N2 = 1024 and M2 = 896 are this
design's choice (R2 = 128).

## FCFS ordering of stream bursts (`fcfs_arb`)

Each of the up to 20 streams raises one request when it can move a whole
line. The requests are served in order of arrival, using an age matrix:
bit [i][j] says that request i is older than request j.

* A new request becomes younger than every request already waiting.
* Requests that arrive in the same cycle are ordered by stream number,
  lowest first.
* A request is registered one cycle before it can be granted.
* A request that is dropped before being granted is withdrawn.

## Cache line allocation (`linked_list`)

The cache memory holds 80 lines of 64 bytes. A line is one SDRAM burst, or
four 128-bit cache words. The lines not owned by any stream form one free
list: a next-pointer table with a head, a tail and a count. After reset the
list is 0 → 1 → … → 79.

* **Allocate** (`LL_ALLOC`, stream s, n lines). The stream takes the first
  n lines from the head of the free list. Its lines are closed into a ring
  (the last points back to the first), which the stream uses as a circular
  FIFO. The free head moves to line n+1 of the old list. The command walks
  one line per cycle, so it takes n+1 cycles.
* **Release** (`LL_APPEND` or `LL_PREPEND`). When a stream is closed, its
  whole ring is spliced back in one cycle, either behind the tail or in
  front of the head of the free list.

The free list is always a single chain, whatever order streams are opened
and closed in, so it never has to be compacted. The following are refused
with `err`:

* allocating zero lines;
* allocating more lines than are free;
* allocating to a stream that already has lines;
* releasing a stream that has no lines.

A combinational lookup port (`lk_line` → `lk_next`) lets the address
generator follow a stream's ring.

## Stream buffering and bursts (`stream_cache`, `addr_gen`, converters, `cache_ram`)

**Bus ports.** Each of the 5 ports has a write channel and a read channel,
both carrying 16-bit words tagged with a stream number.

* The write side goes through `s2p_conv`, which packs 8 words (lowest first)
  into a 128-bit cache word. All 8 words of a group belong to the stream of
  the first word.
* The read side asks with `rd_req`/`rd_req_stream`. `p2s_conv` unpacks a
  128-bit cache word into 8 words, lowest first.
* All handshakes are valid/ready.

**Address generation.** `addr_gen` keeps, per stream:

* a write pointer and a read pointer, each a line in the ring plus a word
  within the line;
* a fill count and the capacity (lines × 4 words);
* the stream's SDRAM address. This starts at `cfg_base` and advances by
  64 bytes per burst. It does not wrap.

**Cache memory access.** `cache_ram` is one single-port array of 320 ×
128 bits with a one-cycle read latency. One port is enough. At full rate
each bus channel needs a cache access every 8th cycle. The SDRAM side needs
one every 4th cycle (four 32-bit words per 128-bit word). So 5 × 1/8 + 1/4
= 0.875 accesses per cycle against one available, assuming the bus and SDRAM
sides share one clock. The burst engine always gets the memory when it needs
it. The 10 port channels share the remaining cycles round robin:

* a write channel is served when its cache word is complete and the stream
  has a free word;
* a read channel is served when its converter is empty and the stream holds
  data.

**Burst requests.** A stream asks the FCFS unit for a burst in two cases:

* towards memory, when it holds a whole line;
* from memory, when it has room for a whole line. This is prefetching.

A stream does not ask while a burst of its own is running. The stream side
requests from the memory arbiter only while the burst engine is idle.

After a prefetch burst the engine needs about four more cycles to write
the line into the cache. If another stream burst is already waiting, the
top holds the arbiter's memory-ready input low for those cycles
(`mem_wait`), so no one is granted. Without this hold, a busy CPU would
slip a burst into every such gap. With 20 streams this cut the stream share
from 512 to about 300 cycles per service cycle. The price is a few cycles of
extra latency for a random request that arrives in such a gap.

**Burst engine.** It has one 16 × 32-bit line buffer.

* For a **write burst** it first reads the line's four cache words
  (4 cycles plus latency), then sends 16 words on `sd_wvalid`/`sd_wready`.
* For a **read burst** it collects 16 words from `sd_rvalid` and then
  writes four cache words.

Each 128-bit word goes out and comes in as four 32-bit words, lowest first.
The stream's FIFO pointer moves with every cache word the engine reads or
writes. Its SDRAM address moves on by 64 bytes when the burst is granted.

**Stream configuration.** Streams are set up through `cfg_*`.

* `CFG_OPEN` takes a stream number, direction (`DIR_TO_MEM` /
  `DIR_FROM_MEM`), line count and SDRAM base address. It allocates lines
  and initialises the stream.
* `CFG_CLOSE` releases the lines, appended or prepended as `cfg_prepend`
  selects. A stream should be closed only when it is idle (drained, with
  no burst running). The hardware does not check this.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NSTREAMS` | 20 | streams (FCFS inputs, address generator entries) |
| `NPORTS` | 5 | bus ports |
| `NLINES` | 80 | cache lines of 64 B (5 kB) |
| `N1`, `M1` | 1024, 512 | level-1 service cycle, periodic share |
| `N2`, `M2` | 1024, 896 | level-2b service cycle, stream share (own choice) |
| `gfx_priority` | input, 4 bits | level-3a setting |

Shared constants and enums are in `rtl/cpa_pkg.sv`. Widths used:

* bus word 16 bits;
* cache word 128 bits;
* SDRAM word 32 bits;
* 64-byte lines;
* 26-bit SDRAM byte addresses.

## Where this design departs from, or adds to, the description

* The meaning of the GFX priority value, the order of configuration-time
  vs. run-time control, and N2/M2 are not specified. The choices are
  described above.
* The random budget counts memory-busy cycles of the random class. A burst
  is never preempted, so the budget can be overrun by one burst.
* The cache array is a single-port memory time-shared by all ports rather
  than a true multiport memory. The bandwidth argument is given above.
* The burst engine handles one burst at a time and buffers a whole line.
  This adds about five cycles to each write burst. It also adds the
  memory hold after prefetch bursts described above.
* SDRAM addresses of a stream increase linearly from a base address.
  Address wrapping and 2-D access patterns are not provided.
* Only the stream (FIFO) use of the cache is built. The use of the same
  memory as a CPU cache is not.
* The SDRAM controller and SDRAM, the CPU, GFX unit, debugger, switch
  matrix and coprocessors are not part of the RTL. `tb/sdram_model.sv` is
  a behavioural SDRAM and controller model used only by the testbenches.
  It has 2 cycles of read latency, 2 cycles of turnaround, and 16 busy
  cycles for bursts of other requesters.
* All blocks use an asynchronous active-low reset `rst_n`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if it
hangs. The reference values are computed in the testbench, independently
of the RTL: scoreboards, a reference age queue, reference lists and the
like.

`tb_cpa_mem_top` runs the whole design at its default parameters:

* 20-stream capacity and 80 lines;
* N1 = 1024 and M1 = 512;
* stream traffic through all 5 ports, in both directions;
* an overloaded CPU, GFX, debugger and both kinds of control traffic.

It checks the following:

* every 16-bit word written through a port arrives in SDRAM in order;
* every prefetched word is read back correctly;
* the longest stream wait is within the W bound;
* random runs stay within 2R;
* the free list is whole again after all streams close.

It also counts how often each mechanism occurred, and counts a failure if
any of them never did:

* random first, periodic priority, and the critical 2R run;
* debugger over CPU, and GFX claiming a grant;
* configuration-time over run-time control;
* control over stream, and stream over control;
* FCFS queueing, write bursts, prefetch bursts, and a writer held back;
* the memory held while the burst engine stores a line;
* service-cycle wrap;
* line allocation, append and prepend release, and a refused allocation.

`tb_cpa_workload` runs the main example load, also at default parameters:

* 20 streams of 4 lines (256 B) each, which uses the whole 5 kB cache;
* a 21st allocation is refused;
* ten streams write to SDRAM and ten are prefetched, two of each on every
  port;
* the CPU requests back to back, so the random side is saturated.

It checks every word. With 20 requests queued in the FCFS unit, the longest
stream wait was 1402 cycles, against W = 1504 for the measured burst cost
c = 24. In every service cycle where the streams had requests pending
throughout, they got at least 489 cycles (M = 512, less one random burst
overrun). c is 24 here rather than 18 for two reasons: a write burst first
reads its line out of the cache, and the SDRAM model adds its turnaround.

The arbiter testbenches run with shorter service cycles so they can cover
many boundaries.

### Simulating with Verilator

Verilator 5 with `--timing` is needed. Give the package file first and let
`-y` find the modules. For example, the full design at its default size:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/cpa_pkg.sv tb/tb_cpa_mem_top.sv --top-module tb_cpa_mem_top
./obj_dir/Vtb_cpa_mem_top
```

It prints the longest stream wait against W, a count for each mechanism
and the `TB_RESULT` line. It takes well under a second. A single block works
the same way, for example the linked list:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/cpa_pkg.sv tb/tb_linked_list.sv --top-module tb_linked_list
./obj_dir/Vtb_linked_list
```

The testbenches change their parameters at the top of the file, which is
the place to try other sizes.

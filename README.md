# Shared L2 cache with Bit Set Insertion replacement

When several cores share one last-level cache and a program walks
cyclically over more lines than a cache set can hold, plain LRU gets no hits
at all: each line is evicted just before it is needed again. The Bit Set
Insertion Policy (BSIP) gives each cache line one extra bit, `k`, which marks
a line that has been re-used. On a miss, BSIP replaces a line that has not
been re-used. Re-used lines therefore stay in the cache while new lines pass
through a single slot. For a cyclic stream of five lines over a 4-way set,
LRU hits 0 times in 50 accesses. BSIP hits 27 times: from the second round
on, three lines of every five hit.

This repository holds synthesizable SystemVerilog for a dual-core cache
hierarchy built around that policy:

```
 core 0                      core 1                (outside this RTL)
  |  if_*      |  d_*          |  if_*      |  d_*
 L1 I        L1 D            L1 I        L1 D      l1_cache: 16 KB, 2-way, LRU, 2-cycle hit
  \___________\______________/___________/
               l2_arbiter                          round-robin, 1 request in flight,
                   |                               invalidates other L1 copies on a store
               l2_cache                            128 KB, 4-way, BSIP, 10-cycle hit,
                   |  mem_*                        write-back
              main memory                          (outside this RTL)
```

All caches use 256-byte lines. Cores issue 32-bit word loads, stores and
instruction fetches. Lines move between the levels whole, on a 2048-bit path.

## The BSIP decision (`bsip_policy`)

Each set keeps two pieces of state per way:

* a **recency rank** (0 = MRU … WAYS-1 = LRU), a true LRU stack;
* the **re-use bit `k`**.

`bsip_policy` is purely combinational. It takes the set's ranks, `k` bits,
valid bits and the lookup result. It returns the victim way and the state to
write back.

| event | `k` bits | recency stack |
|---|---|---|
| hit on way *h* | `k[h] = 1` | *h* moves to MRU |
| miss, set has an invalid way | new line: `k = 0` | new line moves to MRU |
| miss, some `k = 0` | the first `k = 0` line counted **from the MRU end** is replaced; the new line gets `k = 0` | new line moves to MRU |
| miss, every `k = 1` (the *all-set* case) | `k` cleared on the WAYS/2 lines nearest the LRU end, the victim among them | the LRU line is replaced **in place**: the new line stays at the LRU position |

Two consequences explain how it behaves:

* After a miss, the newest line sits at the MRU position with `k = 0`. If it
  is not re-used, the next miss in the set finds it first and replaces it.
  A thrashing stream therefore cycles through one way. The lines that were
  re-used keep their places.
* Once every line of a set has been re-used, nothing can be replaced without
  giving something up. Half of the set (the older half) then loses its
  protection, and the LRU line goes. The new line enters at the LRU end, so it
  does not push any protected line down the stack.

A worked example with 4 ways and the stream `A B C D E A B C D E …`:

```
A B C D   fill the four invalid ways            k = 0000
E         first k=0 from MRU is D -> E replaces D
A B C     hit: k set on A, B, C
D         first k=0 from MRU is E (way 3) -> D replaces E
E         first k=0 from MRU is D (way 3) -> E replaces D
A B C     hit ...
```

Way 3 churns and A, B and C stay: 3 hits per round. The storage cost is one
bit per line on top of the LRU ranks.

A line that has just been filled gets `k = 0` by default. Set the parameter
`SET_K_ON_FILL = 1` to give it `k = 1` instead. The two descriptions of the
policy that this design is based on disagree on this point; see "Departures
and choices" below.

## L1 caches (`l1_cache`, `lru_policy`)

Each core has an instruction cache and a data cache. Both are instances of
`l1_cache`: 16 KB, 2-way (32 sets), LRU. `lru_policy` is the LRU counterpart
of `bsip_policy`: a hit moves the line to MRU, and a miss replaces the LRU
line (or an invalid line first) and inserts the new line at MRU.

* A **load hit** answers 2 cycles after the request handshake.
* A **load miss** fetches the whole line from the L2. The word is returned in
  the cycle after the line arrives.
* A **store** is written through to the L2 as a one-word write. On a hit the
  local copy is updated too. A store miss allocates nothing. The store
  completes when the L2 acknowledges it.
* `inv_valid`/`inv_addr` removes a line. The arbiter raises it when another
  core's store reaches the L2.

## Shared L2 (`l2_cache`)

The L2 is 128 KB, 4-way (128 sets), with 256-byte lines and BSIP
replacement. Each line holds a tag, a valid bit, a dirty bit, a rank and `k`.
Requests are line reads or one-word writes.

* **Hit:** `resp_valid` pulses 10 cycles after the handshake, with the whole
  line. For a store the line is returned with the new word merged in, and the
  line becomes dirty.
* **Miss:** the BSIP victim is chosen at lookup. A dirty victim is sent to
  memory first as a posted line write (`mem_req.write = 1`, no answer). The
  line is then read (`mem_resp_valid` returns it). A store's word is merged
  into the line (write-allocate), and the line is installed with the miss
  update from `bsip_policy`. The answer comes in the cycle after the memory
  data.
* Events come out as one-cycle pulses: `hit_o`, `miss_o`, `writeback_o` and
  `all_set_o` (a miss that found every `k` set).

## Sharing and consistency (`l2_arbiter`)

The four L1 caches (I and D for each core) reach the L2 through a
round-robin arbiter. Requester `2c` is the I-cache of core *c*, and `2c+1`
is its D-cache. Only one request is in flight: the grant is held until the
L2 answers, and the answer is steered to the owner. `contention_o` pulses
when a request is forwarded while another requester is waiting.

There is no coherence protocol. Because the L1 data caches are write-through,
the L2 always holds the latest data. When a store is forwarded, the arbiter
invalidates that line in every other L1. Stores reach the L2 one at a time,
in arbiter order. A load that starts after a store has completed therefore
sees the stored value.

## Timing summary

Latencies are counted from the request handshake edge to the cycle in which
`resp_valid` is high, with no other traffic:

| access | cycles |
|---|---|
| L1 hit | 2 |
| L1 miss, L2 hit | 2 + 10 + 1 = 13 |
| L2 hit, seen at the L2 port | 10 |
| L2 miss | 10 + memory time (+ one write-back request if dirty) + 1 |

All caches are blocking: each handles one request at a time.

## Parameters and configurations

`multicore_cache_system` defaults to the dual-core configuration in which
BSIP is evaluated. The other configurations of the study are reached through
the parameters:

| configuration | NUM_CORES | L1_SIZE_BYTES | L2_SIZE_BYTES |
|---|---|---|---|
| dual core, BSIP evaluation (**default**) | 2 | 16384 | 131072 |
| dual core, larger L2 | 2 | 16384 | 524288 |
| quad core, BSIP evaluation | 4 | 16384 | 262144 |
| quad core, proposed sizing | 4 | 8192 | 1048576 |
| single core | 1 | 16384 | 131072 or 262144 |

Other parameters: `L1_WAYS` (2), `L1_LATENCY` (2), `L2_WAYS` (4),
`L2_LATENCY` (10) and `L2_SET_K_ON_FILL` (0). The line size (256 bytes) and
the word and address widths (32 bits) are set in `cache_pkg`. Cache sizes
must give a power-of-two number of sets. Latencies must be between 2 and 255.

## Departures and choices

Taken from the study: the two-level hierarchy, split private L1 caches with
a unified shared L2, the sizes, associativities, line size and latencies
above, LRU in the L1, BSIP in the L2, and write-back of the L2.

This design's own choices:

* **`k` on fill.** One description of BSIP sets `k` when a line is
  installed. The other sets `k` only on a hit and treats `k` as a mark of
  re-use. The default follows the second reading, because with the first a
  set is all-set after only WAYS misses and the protection collapses. The
  parameter gives the first reading.
* **Which half is cleared** in the all-set case: the half nearest the LRU
  end.
* **Storage.** The study rates BSIP's storage as O(m) bits per set, against
  O(m log m) for LRU. But the policy as described refers to the MRU end and
  the LRU position, so this implementation keeps the full LRU ranks and adds
  `k` on top of them: WAYS × (log2 WAYS + 1) bits per set.
* **Invalid ways are filled first**, in both policies.
* **L1 write-through with invalidation** replaces the MOESI coherence of the
  simulator the study used. That protocol is not part of this RTL.
* **Round-robin arbitration with one request in flight**, and blocking
  caches.
* **Arrays** are plain SystemVerilog arrays with asynchronous read. They
  synthesize as memories, but an SRAM-macro implementation would need a
  registered read and one more pipeline stage.
* **Reset** clears valid, dirty, `k` and the ranks. Tags and data are left
  as they are.

Outside this RTL: the processor cores, which drive the `if_*` and `d_*`
ports, and main memory, which is on the `mem_*` port.

## Files

| file | contents |
|---|---|
| `rtl/cache_pkg.sv` | widths, request structs, word/line helpers |
| `rtl/bsip_policy.sv` | BSIP victim choice and state update for one set |
| `rtl/lru_policy.sv` | LRU victim choice and state update for one set |
| `rtl/l1_cache.sv` | private L1 cache |
| `rtl/l2_cache.sv` | shared L2 cache with BSIP |
| `rtl/l2_arbiter.sv` | round-robin sharing of the L2 and invalidation |
| `rtl/multicore_cache_system.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
has a watchdog. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl \
    rtl/cache_pkg.sv tb/multicore_cache_system_tb.sv \
    --top-module multicore_cache_system_tb -o sim
./obj_dir/sim
```

Replace the testbench name for the others (`bsip_policy_tb`,
`lru_policy_tb`, `l1_cache_tb`, `l2_cache_tb`, `l2_arbiter_tb`,
`quad_core_system_tb`, `access_patterns_tb`).

What the testbenches show:

* **`bsip_policy_tb`** runs thousands of random accesses against an
  independent list-based model. It also checks the hand-worked thrashing
  case (27 hits of 50) and the all-set case, including the half-clear and
  the in-place insertion.
* **`lru_policy_tb`** does the same for LRU, on 2 and 4 ways. The thrashing
  stream gives 0 hits, and a stream that fits gives 27.
* **`l1_cache_tb`** and **`l2_cache_tb`** use models of the level below.
  They check data, the 2- and 10-cycle hit latencies, LRU and BSIP victims,
  write-through, write-back of dirty lines and invalidation.
* **`l2_arbiter_tb`** checks the round-robin order, response routing and
  invalidation against a reference.
* **`multicore_cache_system_tb`** runs the full-size dual-core hierarchy for
  about 10,000 cycles (a few seconds):
  * both cores run at once;
  * a store by one core must be seen by the other;
  * a thrashing stream must give exactly 27 L2 hits;
  * every mechanism must occur at least once: L1 and L2 hits and misses,
    write-backs, all-set events, arbiter contention and invalidations.
* **`quad_core_system_tb`** runs the same test on the quad-core
  configuration: 4 cores and a 256 KB L2.
* **`access_patterns_tb`** runs the four classes of access pattern through
  the full-size system. Each must give an exact number of L2 hits and
  misses:

  | pattern | L2 hits | L2 misses | LRU would hit |
  |---|---|---|---|
  | cache friendly: 4 lines, 10 rounds | 36 | 4 | 36 |
  | thrashing: 5 lines, 10 rounds | 27 | 23 | 0 |
  | streaming: 40 lines, once each | 0 | 40 | 0 |
  | mixed: 5 × [(A B C)², 8 new lines] | 27 | 43 | 15 |

  BSIP keeps the re-used lines A, B and C through every scan of new lines.

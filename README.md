# Reduced-tag set-associative cache with masked-FIFO way selection

In a set-associative cache every access compares the full tag of every way
in parallel. For a 16 KB 4-way cache with 16-byte lines that means four
20-bit comparisons per access, and tag comparison is a large share of cache
energy. Programs use only a few memory regions at a time, though, so most
stored tags share their upper bits. This design stores only the low part of
the tag (**TagL**) beside each line. The upper part (**TagH**) is kept once
per region in a small per-way table, the **Locality Buffer (LoB)**. Each line
holds a 2-bit pointer (**LCB**, locality compressed bits) into that table.
With the default 6 TagL bits, each way compares 6 bits per line plus one
14-bit TagH, instead of 20 bits per line.

This idea is known for direct-mapped caches. Carrying it over to
set-associative caches brings one new problem: choosing the victim way on a
miss. One LoB entry can serve many lines of a way, so a careless victim
choice throws away a region that many lines still use. The design solves
this with a **masked FIFO**: the usual FIFO victim order, except that ways
that would lose a useful LoB entry are skipped.

The RTL is parameterised SystemVerilog. It can be simulated with plain
Verilator, and it synthesises apart from the assertions.

## Address split and storage

```
 31            18 17      12 11        4 3      0
+----------------+----------+-----------+--------+
|   TagH (14)    | TagL (6) | Index (8) | Off (4)|
+----------------+----------+-----------+--------+
```

These are the defaults: 16 KB, 4 ways, 4 words of 32 bits per line, giving
256 sets. Each way has:

| structure | per entry | entries | where |
|---|---|---|---|
| cache lines | LCB (2) · Valid · TagL (6) · data (128) | 256 | `rt_cache_way` |
| Locality Buffer | TagH (14) · Valid · hit counter (4) | 4 = 2^LCB | `rt_locality_buffer` |
| Locality Miss Buffer | TagH (14) · Valid · hit counter (4) | 2 | `rt_locality_miss_buffer` |

Each set also has a one-hot FIFO register that records the way replaced
last (`rt_masked_fifo`).

The data array is a memory with a synchronous read port. The LCB, Valid and
TagL fields are flip-flops. This lets a way invalidate, in one cycle, every
line that points at a given LoB entry (see *Promotion and invalidation*).

## Lookup (hit path)

The index selects one line in every way. Each way then computes two results:

* **LowTagHit**: the line is valid and its TagL equals the address TagL.
* **LoBHit**: the LoB entry named by the line's LCB is valid and its TagH
  equals the address TagH.

A way hits only when both are true. Then the line's full tag equals the
address tag, so the result is never a false hit. The way hits are ORed into
the hit signal and encoded into a way number. The way number selects the
line, and the offset selects the word (`rt_hit_select`). TagH values are
unique within a LoB, so at most one way can hit, and an assertion checks
this.

## Misses, step 1: choosing the way (masked FIFO)

This part differs most from a normal cache. Three status vectors are formed
per way, with bit *w* standing for way *w+1*:

* **M1, empty line**: the indexed line of the way is not valid.
* **M2, AnyLoBEmpty**: the way's LoB has a free entry.
* **M3, AnyLoBHit**: some LoB entry of the way already holds the address
  TagH. That entry need not be the one the line's LCB points at.

`rt_fifo_mask_gen` turns them into a mask of acceptable victims:

| situation | mask |
|---|---|
| some indexed line is empty | empty lines in ways whose LoB already holds the TagH (M1 & M3); if none, all empty lines (M1) |
| no empty line, some way holds the TagH | M3: the new line can share that entry, and no LoB entry is lost |
| no empty line, no way holds the TagH | M2: ways with a free LoB entry, so the new region costs no existing one |
| mask still empty | all ways (plain FIFO) |

`rt_masked_fifo` starts at the FIFO successor of the last replaced way and
searches upward, wrapping around, for the first way whose mask bit is set.
Example: the last replaced way is way 1 (`0001`) and the mask is `1101`.
Plain FIFO would take way 2. The masked FIFO skips way 2 and takes way 3.

Why it matters: suppose a conventional FIFO picks way 2 while way 2's LoB
holds the only copy of TagH `0x0201`. Every line in way 2 that points at
that entry, at any index, is then lost or must be invalidated. One conflict
miss turns into many misses.

## Misses, step 2: what happens in the chosen way

`rt_miss_policy` looks at the chosen way and picks one of six miss actions.
A seventh value, `ACT_HIT`, stands for a hit.

| condition in the chosen way | action (`rt_action_e`) | line filled? |
|---|---|---|
| a LoB entry holds the TagH | `ACT_FILL_LOB`: fill line, LCB = that entry, its counter +1 | yes |
| LoMB holds the TagH, counter+1 > threshold | `ACT_SWAP_FILL`: swap LoB[line's LCB] with that LoMB entry, fill line | yes |
| LoMB holds the TagH, otherwise | `ACT_LOMB_COUNT`: LoMB counter +1, word bypasses the cache | no |
| TagH nowhere, free LoB entry | `ACT_NEW_LOB`: put TagH in the lowest free entry, fill line | yes |
| TagH nowhere, LoB full, free LoMB entry | `ACT_NEW_LOMB`: record TagH in the LoMB, bypass | no |
| TagH nowhere, both full | `ACT_REPLACE_LOMB`: replace a LoMB candidate, bypass | no |

When the LoB is full, a new region has to recur before it can displace a
LoB entry. Until then its words go straight to the CPU without being cached.
That is the job of the Locality Miss Buffer. The LoMB replacement candidate
is the lowest entry whose counter is at most 1. If no entry qualifies, it is
the entry with the smallest counter.

The FIFO register of the set advances only when a line is actually filled.

## Promotion and invalidation

A swap puts a new TagH into LoB entry *e*. Other lines of the same way may
still have LCB = *e*, and their TagL would now combine with the wrong TagH.
To rule that out, the swap also clears the valid bit of every line in that
way whose LCB is *e*, in the same clock edge. The line being filled is not
affected. This invalidation is a choice of this design. Without it the cache
could return wrong data, and the fault test of the top-level testbench shows
that it does.

## Interface and timing (`rt_cache`)

| port | dir | meaning |
|---|---|---|
| `cpu_req_valid/ready`, `cpu_req_addr[31:0]` | in/out | read request, taken when both are high |
| `cpu_resp_valid`, `cpu_resp_data[31:0]`, `cpu_resp_hit` | out | one-cycle response, one per request |
| `mem_req_valid/ready`, `mem_req_addr[31:0]` | out/in | line request, line-aligned, held until taken |
| `mem_resp_valid`, `mem_resp_data[127:0]` | in | returned line, word 0 in the low bits |
| `evt_valid`, `evt_action[2:0]`, `evt_way` | out | report of each completed access, for statistics |

* **Hit:** the response comes in the cycle after the request is taken.
* **Miss:** after the lookup cycle, the line is requested. The response comes
  in the same cycle as `mem_resp_valid`, and the line, LoB, LoMB and FIFO
  updates happen on that clock edge. With a memory that answers *L* cycles
  after taking the request, a miss takes 3 + *L* cycles.
* One access is in flight at a time.
* The cache is **read-only**: there is no write path. The architecture is
  specified and evaluated for reads only.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `CACHE_BYTES` | 16384 | capacity |
| `WAYS` | 4 | associativity (1 to 8 tested) |
| `LINE_WORDS`, `WORD_W` | 4, 32 | line of four 32-bit words |
| `TAGL_W` | 6 | stored low tag bits |
| `LCB_W` | 2 | LoB pointer width, LoB has 2^LCB_W entries |
| `LOMB_ENTRIES` | 2 | Locality Miss Buffer depth (this design's choice) |
| `HITCNT_W` | 4 | saturating hit-counter width (this design's choice) |
| `LOMB_THRESH` | 2 | LoMB promotion threshold (this design's choice) |

Six TagL bits is the smallest width at which a 16 KB 4-way cache matched
the full-tag hit ratio on embedded benchmarks. Reported optimum widths for
other configurations range from about 3 bits (32 KB) to 6 bits (8 KB with 4
or 8 ways). Set `TAGL_W` to match the configuration.

## Files

| file | contents |
|---|---|
| `rtl/rt_pkg.sv` | default sizes, `rt_action_e` |
| `rtl/rt_cache.sv` | top: control FSM, wiring of all parts |
| `rtl/rt_cache_way.sv` | one way: LCB / Valid / TagL / data, LowTagHit, invalidate-by-LCB |
| `rtl/rt_locality_buffer.sv` | LoB of one way: LoBHit, AnyLoBHit, AnyLoBEmpty |
| `rtl/rt_locality_miss_buffer.sv` | LoMB of one way: hit, free entry, replacement candidate |
| `rtl/rt_fifo_mask_gen.sv` | FIFO mask from M1, M2, M3 |
| `rtl/rt_masked_fifo.sv` | per-set FIFO register and masked victim search |
| `rtl/rt_hit_select.sv` | way hit, encoder, data multiplexer |
| `rtl/rt_miss_policy.sv` | miss action decoder |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/rt_cfg_harness.sv`, `tb/tb_rt_cache_configs.sv` | the cache in 9 size / way / TagL combinations |
| `tb/tb_rt_cache_locality.sv` | two alternating regions on a small direct-mapped cache |
| `tb/rt_lower_mem.sv`, `tb/rt_tb_pkg.sv` | memory model, memory content function |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends the
simulation. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rt_pkg.sv tb/rt_tb_pkg.sv tb/tb_rt_cache.sv --top-module tb_rt_cache
./obj_dir/Vtb_rt_cache
```

* `tb_rt_cache` runs the cache at its default size. It checks every response
  for the data word, the hit flag, the policy action, the way and the
  latency, against a behavioural model of the whole scheme written
  separately in the testbench. The trace has three parts:
  * a 16-access example trace on one set, where only the repeated lines
    hit;
  * a directed sequence that fills all LoBs, then the LoMBs, then promotes
    a region by a swap;
  * 20,000 random accesses.

  Each of the seven actions, a masked-FIFO override, a TagL match rejected
  by the LoB, and a swap invalidation must each occur at least once.
* `tb_rt_cache_configs` runs 8, 16 and 32 KB caches with 1, 2, 4 and 8 ways
  and several TagL widths on a synthetic program-like trace. The trace
  switches between loops in a few code regions and uses strided data
  accesses to three distant arrays. Every access is checked against the
  model. The testbench also prints the hit ratio next to that of a full-tag
  FIFO cache of the same geometry.
* `tb_rt_cache_locality` runs a 256-byte direct-mapped cache with a 24-bit
  tag (20 TagH + 4 TagL bits) and a 4-bit index. Two memory regions are
  used in turn. Each region misses once, taking a LoB entry, and after that
  every access to either region hits. One LoB entry would not be enough for
  this pattern; with four, both regions stay resident.
* The unit testbenches exercise each module on its own, exhaustively where
  the input space is small (mask generator, miss policy).

## How far to trust it, and where it departs

* The lookup structure, the LoB/LCB organisation, the masked-FIFO rule and
  the miss actions follow the architecture. The testbenches compare the RTL
  with an independent behavioural model, but that model encodes the same
  reading of the architecture. Both would agree on a misreading.
* **Design choices not fixed by the architecture:**
  * the LoMB depth, counter width and threshold;
  * the LoMB fallback when no entry has counter ≤ 1;
  * how the mask combines M2 and M3 when no line is empty, and the
    fallbacks when a mask comes out empty;
  * the FIFO reset state;
  * invalidation on a swap;
  * all timing and handshakes.
* **Lower-level fetch on bypass.** The lower level is always read on a
  miss, even for the bypass actions. The CPU needs the word either way.
* **Hit counters.** The LoB hit counter counts up only on a TagL miss with a
  LoB hit. No decision uses it. The LoMB counter drives promotion.
* **No write path.** There is no write-back, no write-through and no
  coherence.
* **Hit ratio against a full-tag cache.** On the synthetic trace, the
  reduced-tag cache with 4 or 8 ways is within about 1% of the full-tag
  FIFO cache. With 1 or 2 ways it is 4 to 10 points lower on that trace,
  because bypassed regions are not cached until they recur. The published
  benchmark results were not reproduced here, since their address traces
  are not part of this code.

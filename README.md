# Proactive memory-based computing for ALU thermal management

An integer ALU running a hot loop can heat past its safe temperature. One way to cool it without
slowing the whole core is *memory-based computing* (MBC): an add or a multiply is not computed but
looked up. The operand pair forms an address into a lookup table (LUT) holding precomputed results,
and the LUT is read through the cache hierarchy. Every operation moved to memory is switching
activity, and heat, taken off the ALU.

Sending every add and multiply to memory cools the ALU a lot but costs too much time. A LUT line
that is not in a nearby cache costs an L2 or memory access. The *proactive* scheme built here
therefore moves only a chosen subset of operations:

* A **decision function** per operation marks the operand region that a program uses most:
  `D(i,j) = (a <= i <= b && c <= j <= d) || (diag_en && i == j)`. Here `i` is operand 1 and `j` is
  operand 2. The bounds come from profiling the program offline.
* The LUT lines of that region are **preloaded** into a small private *L1 MBC cache*.
* Operations whose operands satisfy `D` go to memory while MBC is *engaged*. They hit in the L1 MBC
  cache and answer in one cycle. All other operations stay on the ALU.

The RTL is SystemVerilog-2017. It covers the MBC datapath of a multicore system: the steering, the
decision functions, the MBC unit, the preloader, the way-partitioned caches and the shared-L2
arbitration. The processor pipelines, their instruction/data L1 caches and main memory are outside
it. So is the thermal policy that decides when to engage. All of these connect through ports.

## Structure

```
pmbc_top
├── g_core[c].u_core : mbc_core          (one per core, NUM_CORES = 2)
│   ├── u_steer : issue_steer
│   │   └── u_dadd, u_dmul : decision_function
│   ├── u_alu   : int_alu
│   ├── u_mbc   : mbc_unit
│   ├── u_pre   : mbc_preloader
│   └── u_l1mbc : wp_cache   (2 KB, 4 ways, 1-cycle hit)   -- private L1 MBC cache
├── u_arb : l2_arbiter       (inst/data port + one miss port per core)
└── u_l2  : wp_cache         (128 KB, 16 ways, 10-cycle hit) -- shared L2
```

`pmbc_pkg` holds the shared types and constants: operation and partition-class enums, the
decision-function configuration struct, and the LUT address map.

## The path of one instruction

`mbc_core` takes one instruction at a time through a valid/ready issue handshake.
`issue_steer` then asks two questions, in order:

1. Is the operation supported by MBC? Only `OP_ADD` and `OP_MUL` are.
2. Do the operands satisfy *that operation's* decision function (`cfg_add` or `cfg_mul`)?

If both answers are yes and `engage` is high, the instruction goes to `mbc_unit`. Otherwise it goes
to `int_alu`. The result comes back on `res_valid`/`res_data`. `res_via_mbc` tells which unit
produced it.

A pair is only eligible when both operands are below 256. The bounds are 8-bit, and a single
lookup is exact only for 8-bit operands. So every operation sent to MBC gets its full 32-bit result
from one LUT entry. Building a wide result from several byte-wide lookups is never needed on this
path and is not implemented.

## LUT layout: the part to understand before changing anything

There are two LUTs, one for add and one for multiply. Each has 65,536 entries of 16 bits: the full
result of an 8×8-bit add (9 bits) or multiply (16 bits). Each LUT is therefore 128 KB. The memory
space is 256 MB (28-bit byte addresses). The multiply LUT sits at `0xFFC_0000` and the add LUT at
`0xFFE_0000`, the top 256 KB. `addr_class()` uses these regions to put a line into the right cache
partition.

A 32-byte line holds a **4×4 tile** of operand pairs. The tile bits of `i` and `j` are interleaved
in the byte offset:

```
offset = { i[7:4], j[7:4], i[3:2], j[3:2], i[1:0], j[1:0], 1'b0 }
           \_ tag / high set bits _/\_ L1 set _/\_ entry in line _/
```

Why tiles: decision regions are rectangles, often narrow in one operand. Suppose a line held 16
values of `j` for one `i`, and the set index came from `j` alone. Then every row of a region would
fall into the same few sets and conflict. With the layout above, the 16-set L1 MBC cache indexes
on `{i[3:2], j[3:2]}`. A 16×16 block of pairs then spreads evenly over all 16 sets. The 256-set L2
indexes on `{j[7:4], i[3:2], j[3:2]}`.

Where this layout appears:

* `pmbc_pkg::lut_addr` and `lut_entry_idx`;
* the preloader's tile walk;
* the testbench reference `tb_pkg::tb_lut_line` and `tb_ref_addr`, written independently from the
  formula above.

Change them together.

Capacity follows from the layout. A region `a..b × c..d` needs
`(b/4 − a/4 + 1) × (d/4 − c/4 + 1)` lines of 32 B each (integer division). Some examples:

| region | lines | bytes |
|---|---|---|
| 0 ≤ i ≤ 30, 0 ≤ j ≤ 30 | 64 | 2 KB |
| 0 ≤ i ≤ 20, 0 ≤ j ≤ 100 | 156 | 4.9 KB |
| 0 ≤ i < 13, 7 < j < 11 | 4 | 128 B |

Because entries are 16 bits, a region needs twice the storage it would need with byte-wide entries.
Byte-wide entries cannot hold a multiply result.

## Caches and partitioning (`wp_cache`)

One module serves as both the L1 MBC cache and the shared L2. It is set-associative with 32-byte
lines and has **way-based partitioning**. A request carries a class: `CLS_ID` (instruction/data),
`CLS_MUL` or `CLS_ADD`. The input `way_mask[class]` lists the ways that class may allocate into. The
number of those ways is the class's *partition factor*.

* A lookup hits in any way of the set.
* A miss fills the first invalid way of its partition, otherwise the least recently used way of its
  partition. A full LRU order is kept per set, so one class can never evict another class's lines.
* A class with an empty mask is served from the next level without allocating.
* Writes go through to the next level and never allocate on a miss. Only the inst/data port
  writes; LUT lines are read-only.
* The cache handles one request at a time. After reset it spends one cycle per set clearing the
  valid bits and LRU order (16 cycles for the L1 MBC cache, 256 for the L2), with `req_ready` low.

Typical masks:

| cache | ways | inst/data | MBC mul | MBC add |
|---|---|---|---|---|
| L2 (8-way example ratio 5/1/2, doubled) | 16 | `16'h03FF` | `16'h0C00` | `16'hF000` |
| L1 MBC, half per operation | 4 | `0` | `4'b0011` | `4'b1100` |
| L1 MBC, add-heavy program | 4 | `0` | `4'b0001` | `4'b1110` |

## Preloading (`mbc_preloader`)

A pulse on `preload_start` walks the multiply region and then the add region, one tile row at a
time. For each tile it issues an ordinary cache read, which allocates the line in its partition.
`preload_lines` counts the reads and `preload_busy` stays high until the last answer.

The diagonal term of `D` is not preloaded: it would add 64 lines per operation. Diagonal pairs are
fetched on their first use. When the MBC unit and the preloader both want the L1 MBC cache, the MBC
unit wins.

## Timing

| event | cycles |
|---|---|
| ALU operation, issue to result | 1 |
| MBC operation hitting the L1 MBC cache | 1 |
| L2 hit | 10 (20 ns at 500 MHz) |
| main memory (test model) | 100 (200 ns) |
| MBC operation missing L1, hitting L2 | ~12 |
| MBC operation missing both | ~113, plus waiting for the arbiter |

`l2_arbiter` grants the L2 round-robin among the inst/data port (requester 0) and the cores
(1..NUM_CORES). It holds each grant until the L2 answers.

## Top-level interface (`pmbc_top`)

Per core (packed arrays indexed by core):

* issue and result: `iss_valid/iss_ready/iss_op/iss_a/iss_b`, `res_valid/res_data/res_via_mbc`;
* control: `engage`, `cfg_add`, `cfg_mul` (type `dfunc_cfg_t`: `a, b, c, d, diag_en`),
  `preload_start`, and `l1_way_mask[core][class][way]`;
* status and counters: `preload_busy`, `preload_lines`, and `alu_ops`, `mbc_ops`, `sup_ops`
  (issued adds and multiplies), `mbc_hits`, `mbc_misses`. The ratio `mbc_ops / sup_ops` is the
  fraction of supported operations actually moved to memory: the run-time "benefit" of the
  decision function.

Shared:

* `id_req_*` / `id_resp_*`: line requests from the instruction/data L1 caches into the L2;
* `l2_way_mask[class][way]`, and the counters `l2_hits`, `l2_misses`;
* `mem_req_*` / `mem_resp_*`: a blocking, line-wide memory port. A write is acknowledged by
  `mem_resp_valid`, just like a read.

`engage` is meant to be driven by a thermal-management policy, for example one that raises it
some margin *below* the ALU's temperature limit. That is the point of acting proactively rather
than reactively.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_CORES` | 2 | cores / MBC slices |
| `L1_MBC_BYTES` | 2048 | private MBC cache; 1024, 3072 (with `L1_MBC_WAYS`=3) and 4096 are the other sizes of interest |
| `L1_MBC_WAYS` | 4 | |
| `L1_HIT_LAT` | 1 | |
| `L2_BYTES` | 131072 | |
| `L2_WAYS` | 16 | |
| `L2_HIT_LAT` | 10 | |

A cache size must equal ways × 32 B × a power-of-two number of sets (at least 2).

## Where this implementation departs from, or goes beyond, the published scheme

From the published scheme:

* the decision function (box plus optional diagonal, 8-bit bounds);
* the two-question steering order;
* preloading of the selected region;
* private L1 MBC caches and a shared L2, both partitioned by ways;
* two cores, a 128 KB 16-way L2 with 32 B lines, and latencies of 2/20/200 ns at 500 MHz;
* L1 MBC cache sizes of 1–4 KB.

This implementation's own choices:

* **LUT format.** 16-bit entries in 4×4 tiles, as described above. Published storage estimates
  assume about one byte per operand pair, so regions here need about twice the cache.
  Consequences:
  * The decision function `0 ≤ i ≤ 20, 0 ≤ j ≤ 100`, quoted as needing 2 KB, needs 4.9 KB here.
  * A full `0..30 × 0..30` region fits the 2 KB L1 MBC cache only when all four ways go to one
    operation.
* **Latency.** One source figure says an MBC access takes at most 7 cycles. The 20 ns / 200 ns
  hierarchy gives 10 and 100 cycles. The hierarchy figures are used.
* **Decision-function forms.** Other forms were explored in the published work, such as
  `i mod 2 = 0 and j = 17` or `i = 1 or …`. Only box + diagonal is built.
* **Execution slice.** It issues one instruction at a time and waits for its result. A real
  out-of-order core would overlap ALU operations with outstanding MBC misses.
* **Not designed here.** The LRU policy inside a partition, the write policy, the arbitration, the
  reset sweep, the ALU's operation set and its one-cycle latency.
* **Separate L1 MBC cache.** It is its own cache instance, not ways taken from a reconfigurable L1
  instruction/data cache. Those caches, with their way concatenation, are not built.
* **Full-width operands.** Decomposing 32-bit operands into byte-wide lookups is not built. It is
  only needed when operations outside the 8-bit region are sent to memory. That is the "send
  everything" baseline and the defect-tolerance use of MBC, not the proactive path.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`, and a watchdog ends a hung run. `tb/main_mem_model.sv` is a
behavioural 256 MB memory with a fixed latency. Its LUT regions return computed results.
`tb/tb_pkg.sv` holds the reference functions.

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/pmbc_pkg.sv tb/tb_pkg.sv tb/tb_pmbc_top.sv --top-module tb_pmbc_top
./obj_dir/Vtb_pmbc_top
```

Replace `tb_pmbc_top` with any other testbench name.

`tb_pmbc_top` runs the full default-size system in about 10 seconds:

* Two cores with different operand profiles preload at the same time. One core's multiply region
  is larger than its one-way partition.
* Both cores then run 1,500–1,700 random instructions each, with `engage` toggling, while the
  inst/data port reads and writes.
* Every result, every routing decision and every inst/data read is compared with a reference
  model.
* In-region operations after the preload must take exactly one cycle.
* Each mechanism must occur at least once: preload, L1 MBC hits and misses, L2 hits and misses,
  arbitration conflicts, each ALU-routing reason, diagonal-only selection and write-through.

Other testbenches:

* `tb_wp_cache` checks partition isolation and LRU victim choice directly.
* `tb_mbc_core` checks that a preloaded region gives only one-cycle hits.
* `tb_mbc_preloader` checks the exact sequence of preload reads.
* `tb_mbc_cache_sizes` builds the L1 MBC cache at 1, 2, 3 (3-way) and 4 KB. For each size it
  preloads an add region of exactly 32, 64, 96 or 128 lines and issues every operand pair in it.
  All of them must hit. On the 2 KB cache, the region `0 ≤ i ≤ 20, 0 ≤ j ≤ 100` (156 lines) must
  overflow the cache and miss, while every result stays correct.
* `tb_pmbc_4core` runs the system with `NUM_CORES = 4`, each core with its own region, all
  contending for the shared L2.

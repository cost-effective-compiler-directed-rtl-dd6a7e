# Compiler-directed memory prefetching and bypassing

A load that hits in the L1 data cache still costs a trip through the
load/store pipeline before its consumers can run. A load that misses costs
far more. This RTL implements a low-cost scheme, proposed by Ortega, Ayguadé,
Baer and Valero, that attacks both costs. It relies on two instructions that
the compiler places ahead of the loads they cover:

* `pref#` is a prefetch that also names a destination register and a bit
  mask of the elements of its cache line that later loads will read.
* `load#` is the same, except that its first element is a normal load result.

Two hardware mechanisms are driven only by these instructions:

1. **Memory instruction bypassing** (binding, into registers). At rename, a
   `pref#`/`load#` takes a free physical register for each marked element.
   It records a *special mapping* for each one in a secondary map table. When
   the line arrives, the elements are written into those registers. The
   ordinary loads that read those elements are recognised at decode and never
   execute: their mapping is moved from the secondary table into the main map
   table. Consumers then read the value as soon as it is there.
2. **Decoupled prefetching** (non-binding, into L1). A small PC-tagged table,
   the *Cache-Line Prefetching Table* (CLPT), learns the stride of each
   `pref#`/`load#`. It prefetches the line N strides ahead, so that the next
   execution of the same instruction finds its line in L1.

Neither mechanism speculates. Nothing has to be undone, so there is no
recovery logic. Because only compiler-chosen instructions train the
prefetcher, it needs no filtering. It issues at most one prefetch per new
line.

## How bypassing renames registers

The compiler gives the loads that read one line consecutive destination
registers. Example: `pref# r8, mask=1011` covers elements 0, 1 and 3 of a
line, and the loads that read them write r8, r9 and r10.

| cycle | instruction | main map | secondary map | effect |
|---|---|---|---|---|
| t   | `pref# r8, 1011` | unchanged | r8→p32, r9→p33, r10→p34 | p32..p34 marked not ready |
| ... | (older readers of r8..r10) | old values | | they still see the old values |
| t+k | `load r8` | r8→p32 | r8 cleared | bypassed: not sent to the load/store unit |
| t+k+1 | `load r9` | r9→p33 | r9 cleared | bypassed |
| later | line returns | | | the binder writes the elements to p32, p33, p34 and they become ready |

The j-th set bit of the mask maps to logical register `dest+j`. Element
positions with a clear mask bit are skipped. For `load#`, element j=0 goes
straight into the main map table, like the destination of a normal load.
Only the later elements get special mappings.

Rename takes a bundle of four instructions per cycle, the width of the
4-way core the scheme was evaluated on. The slots are renamed in program
order, and each slot sees the mappings made by the slots before it. So a
`pref#` and the loads it covers can sit in the same bundle, and a consumer
in that bundle already reads the bound register. If a slot cannot get enough
free registers, it stalls, and so does every later slot in the bundle.

A bypassed load can be decoded before its line has arrived. The ready bits in
`phys_regfile` then hold its consumers back, exactly as if the load were
still executing. This is the only synchronisation needed.

The core has to do two things at commit:
* Free `dec_old_pdest`, as in any renaming scheme.
* Free every `dec_stale_preg[j]` with `dec_stale[j]` set. These are special
  mappings that a newer `pref#`/`load#` replaced before any load used them.

## How the prefetcher works

`decoupled_prefetcher` is a two-stage pipeline fed by each executing
`pref#`/`load#` (its PC, effective address EA and type):

1. **CLPT** (`clpt`). The table is searched by PC, fully associatively.
   * On a hit, the stored *last effective address* moves on to stage 2.
   * On a miss, an entry is allocated: an invalid entry first, otherwise the
     least recently used one.
   * Either way, the entry's address becomes EA and it becomes the most
     recently used.
   * A type bit records whether the entry belongs to a `pref#` or a `load#`;
     on a hit it selects the depth N for stage 2.
2. **Address generation** (`pf_addr_gen`).
   * `stride = EA − last EA` and `target = EA + N·stride`.
   * N is `DEPTH_PREF` (1) for `pref#` and `DEPTH_LOAD` (2) for `load#`.
     `load#` gets the longer distance because compilers place binding loads
     close to their uses, while software prefetches already run ahead.
   * A request is made only if the target's line differs from EA's line. A
     zero stride, or a stride that stays inside the line, prefetches nothing.

Requests wait in `pf_queue` until `l1_port_arb` finds an L1 port that the
core's own accesses leave free this cycle. Demand accesses always win. A
request that arrives when the buffer is full is dropped.

LRU is stored as an age rank per entry. The ranks always form a permutation
of `0..ENTRIES−1`, and the victim is the entry of rank `ENTRIES−1`. An
assertion checks that exactly one entry holds that rank. A set of PCs that
is visited in turn and is larger than the table defeats LRU: every access
misses. The original evaluation saw this on one benchmark (swim), which kept
improving up to more than 16 entries.

## Blocks

```
cdpb_top
├── bypass_rename         main map, secondary map, free list (rename stage)
├── line_binder           writes returned line elements into bound registers
├── phys_regfile          physical registers + ready bits (scoreboard)
└── decoupled_prefetcher
    ├── clpt              Cache-Line Prefetching Table (PC tag, LRU)
    ├── pf_addr_gen       stride, N x stride target, same-line suppression
    ├── pf_queue          pending prefetches (FIFO)
    └── l1_port_arb       lends a free L1 port to the head prefetch
```

`cdpb_pkg` holds the operation encoding (`OP_OTHER`, `OP_LOAD`, `OP_PREFB`,
`OP_LOADB`) and the type bit.

The out-of-order core, the caches and main memory are not part of this RTL.
The top exposes their side of each interface:

| group | signals | direction | protocol |
|---|---|---|---|
| rename | `dec_*`, `src_preg`, `free_vec` | core ↔ design | a bundle of `DEC_W` instructions per cycle; outputs are combinational; slots with `dec_stall` set are not renamed and must be presented again |
| prefetch training | `ex_valid/pc/ea/type` | core → design | one `pref#`/`load#` per cycle, at execution |
| L1 ports | `demand_busy`, `pf_valid/port/addr` | both | a prefetch leaves on a one-hot port not in `demand_busy`; at the earliest 2 cycles after `ex_valid` |
| line return | `resp_*` | cache → design | valid/ready; `resp_pregs` are the `dec_pregs` of that `pref#`/`load#`, carried by the core |
| core registers | `wb_*`, `rd_*` | core ↔ design | write port 0 is the core's write-back, port 1 is the binder's |
| events | `stat_*` | design → core | one-cycle pulses: table hit, allocation, eviction, enqueue, drop, same-line suppression, wait for a port, binder write |

### Timing

* **Rename.** Outputs are valid in the decode cycle. The free list is a bit
  vector. Each slot takes up to `LINE_ELEMS` registers, lowest numbers
  first. Registers freed through `free_vec` can be taken from the next cycle.
  The ready bits of newly taken registers clear at the clock edge that ends
  the decode cycle.
* **Prefetch.** If `ex_valid` is high in cycle t, the table is updated at the
  end of t and the request is queued at the end of t+1. The prefetch can
  leave in t+2 if a port is free.
* **Binding.** A line response accepted at the end of cycle t is written one
  element per cycle, in cycles t+1 … t+k, for k marked elements.
  `resp_ready` is low meanwhile.

## Parameters

| parameter | default | where the value comes from |
|---|---|---|
| `DEC_W` | 4 | original proposal: the 4-way core of the main evaluation |
| `ENTRIES` (CLPT) | 16 | original proposal: 16 and 32 were evaluated, and 16 sufficed for all benchmarks but one |
| `DEPTH_PREF` / `DEPTH_LOAD` | 1 / 2 | original proposal: best average of the depths tried (1 and 2) |
| `PORTS` | 2 | original proposal: 2 ports for the 4-way machine (use 4 for the 8-way one) |
| `QDEPTH` | 8 | this design |
| `LINE_ELEMS`, `DATA_W` | 4, 64 | this design: 32-byte lines of doubles, as in an R10K-class L1 |
| `LOG_REGS`, `PHYS_REGS` | 32, 96 | 32 is the MIPS register count; 96 is this design's choice (64 renaming registers, more than the 25 extra registers the scheme was found to need) |
| `PC_W`, `ADDR_W` | 32, 32 | this design |

Storage at the defaults:
* The CLPT holds 16 × 70 bits = 140 bytes, inside the 150-byte bound the
  original authors give.
* The secondary map table holds 32 bytes.

## Where this RTL departs from, or adds to, the original description

* **When the table is trained.** The description says the table is
  activated when a `pref#`/`load#` is decoded. It also says the prefetch
  assist starts when the instruction reaches execution. The stride needs the
  effective address, so training happens at execution here.
* **"One prefetch per cache line".** This is read as: never prefetch the
  line that EA is already in. The target address is aligned to its line.
* **Own choices where the description gives no mechanism:**
  * the prefetch buffer, its depth and its drop rule;
  * one prefetch issued per cycle, to the lowest free port;
  * how the binder writes (one element per cycle, one register-file port);
  * the secondary table indexed by logical register;
  * the stale-mapping output.
* **One training event per cycle.** The prefetcher accepts one executing
  `pref#`/`load#` per cycle. A core with two L1 ports could execute two. It
  would then need to queue the second one, or the table would need a second
  lookup port.
* **No recovery checkpoints.** The map tables have no
  branch-misprediction checkpoints. That belongs to the core, which is
  outside this RTL.
* **Full-width CLPT fields.** The tag and address fields are 32 bits wide.
  At 32 entries that exceeds the 150-byte bound. The bound would need
  partial tags or addresses, and the original gives no field widths.
* **Reset.** All state is reset synchronously by `rst_n` (active low).

## Simulating

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
For example:

```
verilator --binary --timing --assert -Irtl rtl/cdpb_pkg.sv rtl/*.sv \
    tb/cdpb_top_tb.sv --top-module cdpb_top_tb -o sim && obj_dir/sim
```

Unit testbenches (`tb/<block>_tb.sv`):
* Each compares its block, cycle by cycle, with a reference model written
  separately in the testbench.
* `clpt_tb` uses a time-stamp LRU model.
* `decoupled_prefetcher_tb` uses a transaction model of the table, stage
  register and buffer. It also checks the two-cycle issue latency and the
  depth-2 `load#` target.
* `bypass_rename_tb` uses its own map tables and free set.
* `l1_port_arb_tb` is exhaustive for 2 and 4 ports.

`cdpb_top_tb` runs the whole design at its default parameters, in about
2,700 cycles:
* The testbench plays the core and an L1 cache: 1-cycle hits, 12-cycle
  misses, and random port traffic from the core.
* It runs strided loops of `pref#`/`load#` followed by the loads they
  cover. The loads sit in the same 4-wide bundle or in the next one.
* It checks that every covered load is bypassed and receives the bound
  register, and that the register is not ready before its line arrives.
* It checks the values the binder writes, and that every prefetch address is
  the N × stride line of an executed instruction.
* It counts these events and fails if any never occurs: table hits,
  allocations and LRU evictions, prefetches, waits for a port, buffer
  overflow, same-line suppression, bypassed loads, lines found in L1 because
  of a prefetch, and rename stalls.

`cdpb_workload_tb` drives loop kernels through two copies of the top, with
16 and 32 table entries. It measures prefetch coverage: the share of
`pref#` lines that were prefetched before they were touched.

| kernel | 16 entries | 32 entries |
|---|---|---|
| 8 array references, one line per iteration | 100 % | 100 % |
| 20 array references, visited in turn | 0 % (LRU thrashes) | 100 % |
| 2 references with an 8-byte stride | 96 % | 96 % |

The middle row is the weakness of LRU under round-robin access that the
original authors point out for small tables.

# A split L1 data cache for energy efficiency: stack cache plus pseudo set-associative cache

An L1 data cache is on the critical path and burns a large share of a core's
energy. This design saves energy by splitting it in two:

* **Specialized Stack Cache (SSC).** A tiny (512 B), direct-mapped, virtually
  tagged cache that receives every stack reference. Two pointer registers,
  the top of stack (TOS) and the safe-region bottom (SRB), let it skip most
  of the traffic a normal write-back cache sends to L2:
  * it never writes back a dirty line that has been popped;
  * it never fetches a line that a store misses on when that line cannot hold
    initialized data.
* **Pseudo Set-Associative Cache (PSAC).** A 32 KB cache built as four
  independent 8 KB direct-mapped *ways*. A steering table guesses the way
  from the address of the load/store instruction. The *Predictive Phased*
  (PredictPha) probe reads all four tag arrays but only the predicted data
  array. Most loads therefore cost one small data-array access, and a wrong
  guess costs one more data-array access, not a full search.

Both parts sit side by side between the processor and one shared L2 port:

```
                      processor (cpu_req, sp moves, TLB refill)
                                   |
                            stack_router ---- snoop: TOS <= va < STACK_TOP
                         /                 \
      psac (4 x psac_way + steering_table)   ssc (+ ssc_ptr_regs: TOS, SRB)
           |  physical addresses via tlb        |  virtual line addresses
           |                                    |  translated by tlb port B
            \________________ l2_arb __________/
                                 |
                              L2 port (32 B lines)
```

The default parameters are the recommended configuration: 4 ways of 8 KB, a
1024-entry steering table, a 512 B stack cache, a 64-entry TLB and 40-bit
physical addresses.

## The stack cache and its two pointers

This is the least conventional part, and the part most worth understanding
before changing anything.

**Stack direction.** The stack grows toward lower addresses. "Above the top
of stack" means the popped side, at lower addresses than the TOS. All checks
use 32 B line addresses. With `tos_line = TOS >> 5`, a line `L` is:

| term | condition | meaning |
|------|-----------|---------|
| dead | `L < tos_line` | wholly popped; its contents can never be read again |
| safe | `tos_line <= L < srb_line` | pushed since the SRB was last set, and never displaced from the SSC since |
| other | otherwise | live data that may exist only in L2 |

**How the SRB is kept** (in `ssc_ptr_regs`):

* **Process scheduled** (`sched_valid`): TOS and SRB are both set to the stack
  pointer. The safe region is empty.
* **Stack pointer moves** (`sp_move_valid`): the TOS follows. Pushing grows the
  safe region, because the SRB stays where it is. If a pop moves the TOS line
  past the SRB, the SRB is pulled back up to the TOS.
* **A dirty safe line `L` is displaced**: SRB := `L`. Line `L`, and every line
  farther from the TOS, leave the safe region. This is conservative: the line
  may not have held live data.
* A clean safe line displaced silently changes nothing. It can only hold
  uninitialized data.

**What the SSC does with it** (in `ssc`):

* **Displacing a dirty victim.**
  * If the victim is dead, it is dropped with no write back (`ev_wb_skipped`).
  * Otherwise it is written back, and the SRB rule above is applied.
* **Store miss.**
  * On a safe line, the line is allocated without an L2 read
    (`ev_fetch_skipped`). Bytes the store does not write read as zero. Those
    bytes are uninitialized stack memory, so no correct program reads them
    before writing them.
  * On any other line, the line is fetched.
* **Load miss.** Always fetched.

A consequence that matters when testing: **the SSC does not preserve memory
contents that the program has declared dead.** A value stored below the TOS
and read again after a pop is lost on purpose. The end-to-end testbench
therefore checks stack loads only against values stored while the word was
live.

The miss sequence is IDLE → EVICT → (write back) → ALLOC → (fetch) → answer.
EVICT notifies the pointer block of the displacement. ALLOC makes the
fetch-or-allocate decision with the SRB already updated. Each check takes one
cycle, off the hit path.

The SSC is virtually tagged, so hits need no translation. Its write backs and
fetches need physical line addresses, and get them from the TLB's second
port. If that page is not in the TLB, the L2 request waits and
`events.ssc_xlate_wait` is raised until software loads the entry.

## The pseudo set-associative cache and its probes

Each `psac_way` has a tag array and a data array with separate enables. Both
read synchronously. A probe lasts `PROBE_CYCLES` (2) cycles.

| access | probe 1 | probe 2 | answer after |
|--------|---------|---------|--------------|
| load, predicted way hits | all tags + predicted data | – | 2 |
| load, another way hits | all tags + predicted data | data of the hitting way | 4 |
| store, hit | all tags only | write data of the hitting way, set dirty | 4 |
| load or store, miss | all tags (+ predicted data for a load) | – | miss known at 2, then L2 |

`psac` also has a second probe scheme, selected with `SCHEME` (at the top:
`PSAC_SCHEME`). **FallBackPha** (`FALLBACK_PHA`) first probes only the
predicted way's tag, plus its data for a load. Only if that misses does it
read the other three tags, and then the data of the way that hit. A correct
guess is cheaper than under PredictPha, and a wrong one is slower: loads take
2 or 6 cycles, store hits 4 or 6, and a miss is known at 4. The default stays
PredictPha.

`act_tag` and `act_data` show, every cycle, which arrays are active. At most
one data array is ever active in a cycle. The testbenches check this, because
it is where the energy saving comes from.

**Steering table.**

* It has 1024 entries, indexed by instruction-address bits [11:2].
* After reset it fills itself with random way numbers. The source is a 16-bit
  LFSR taken modulo the number of ways. The fill takes 1024 cycles, with
  `req_ready` low.
* After a load or store hits in a way other than the predicted one, the entry
  is retrained to that way.

**Misses.**

* The line goes into the predicted way. The steering entry does not change.
* With `ADAPTIVE` set (at the top: `PSAC_ADAPTIVE`), each set remembers its
  most recently used way. If the predicted way is that MRU way, the line goes
  into a randomly chosen other way and the steering entry is moved to it
  (`events.psac_adapt`). The default leaves this off.
* A dirty victim is written back first. For a store, the victim's data array
  is read first in one extra cycle.
* The fill then arrives. Stores allocate, and the stored word is merged into
  the fill.

**TLB misses.** A request whose translation misses touches no array. It is
answered after one cycle with `cpu_resp_tlb_miss`, for the processor's
software refill.

## Routing stack references

`stack_router` sees each request with the decode-stage mark `cpu_req.sp`,
meaning the instruction addresses memory through the stack pointer:

* **Marked:** sent straight to the SSC. A hit answers in 1 cycle.
* **Unmarked, but inside the live stack** (`TOS <= va < STACK_TOP`, default
  `STACK_TOP = 0x8000_0000`, the top of the MIPS user segment): held one
  cycle, then redirected to the SSC. A hit answers in 2 cycles.
* **Everything else:** sent to the PSAC.

All stack references must reach the SSC, or the TOS/SRB reasoning breaks. The
snoop range is how this design makes sure of that.

## Interfaces and timing

Latency is counted in clock edges, from the edge that accepts the request to
the edge that samples the response.

* **Processor.**
  * `cpu_req_valid`/`cpu_req_ready` carry a `cpu_req_t`: `we`, `va`, `wdata`,
    `be`, `pc`, `sp`.
  * Words are 64 bits with byte enables.
  * One request is in flight at a time.
  * `cpu_resp_valid` is a one-cycle pulse, for stores too.
* **Stack pointer.**
  * `sched_valid` + `sched_sp` when a process is scheduled.
  * `sp_move_valid` + `sp_move_sp` whenever the stack pointer changes.
  * `tos` and `srb_line` are outputs, for observation.
* **TLB refill.** `tlb_wr_en`, `tlb_wr_idx`, `tlb_wr_valid`, `tlb_wr_vpn`,
  `tlb_wr_pfn`. Pages are 4 KB, with no address-space identifiers. Software
  must keep at most one valid entry per page.
* **L2.**
  * `l2_req_valid`/`l2_req_ready`, with `l2_req_we`, `l2_req_line` (35-bit
    physical line address) and `l2_req_wdata` (256 bits).
  * Each request gets exactly one `l2_rsp_valid` pulse. For a read it carries
    `l2_rsp_rdata`.
  * The SSC and the PSAC share the port through `l2_arb`: the SSC has
    priority, and one transaction is outstanding at a time.
* **Accounting.** `events` (`l1_events_t`) pulses once per occurrence of each
  mechanism: routing, redirection, SSC hit/miss/write back/skipped write
  back/fetch/skipped fetch, SRB shrink/reset, PSAC predicted hit/misprediction/
  miss/write back/adaptive redirect, TLB miss and translation wait. Together with
  `act_tag`/`act_data`, these are what an energy model needs.

| path | latency |
|------|---------|
| SSC hit, marked | 1 |
| SSC hit, redirected | 2 |
| PSAC load, predicted hit | 2 |
| PSAC load, other-way hit | 4 |
| PSAC store hit | 4 |
| TLB miss answer | 1 |
| misses | the above plus the L2 round trip plus write back |

## Files

* `rtl/l1_pkg.sv`: widths, `cpu_req_t`, `l1_events_t`, and the line/word helpers.
* `rtl/l1_dcache.sv`: the top.
* `rtl/stack_router.sv`, `rtl/ssc.sv`, `rtl/ssc_ptr_regs.sv`: the stack path.
* `rtl/psac.sv`, `rtl/psac_way.sv`, `rtl/steering_table.sv`: the PSAC.
* `rtl/tlb.sv`, `rtl/l2_arb.sv`: translation and the L2 port.
* `tb/*_tb.sv`: one self-checking testbench per module.
* `tb/l1_dcache_cfg_tb.sv`, `tb/l1_dcache_run.sv`: the end-to-end program
  run in the non-default configurations.
* `tb/ssc_check.sv`, `tb/psac_check.sv`: random checkers that `ssc_tb` and
  `psac_tb` instantiate once per configuration.
* `tb/l2_model.sv`: a behavioural L2 and memory. It has a 12-cycle latency,
  and a line never written reads as a hash of its address (`tb/tb_pkg.sv`).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the whole cache at full size:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/l1_pkg.sv tb/tb_pkg.sv rtl/*.sv tb/l2_model.sv tb/l1_dcache_tb.sv \
  --top-module l1_dcache_tb -o sim
./obj_dir/sim
```

(`rtl/l1_pkg.sv` appears twice in that list. Verilator warns about the
duplicate, which is harmless; drop it from the glob if you prefer.)

For another module, swap the testbench. `ssc_tb` also needs
`tb/ssc_check.sv`, and `psac_tb` needs `tb/psac_check.sv`. Leave out
`tb/l2_model.sv` for testbenches that do not use an L2: the TLB, steering
table, way, pointer registers and router testbenches.

`l1_dcache_tb` runs about 4000 random operations in about 55k cycles:

* heap traffic over 64 KB, from 64 instruction addresses;
* calls and returns up to 40 frames deep;
* stack traffic, marked and unmarked;
* accesses to an unmapped page.

It maps stack pages only on demand. It checks every load against a reference
model and checks hit latencies with immediately repeated accesses. It fails
if any of the 16 event kinds of the default configuration never occurs, and
also if the adaptive redirect (off by default) ever does.

`l1_dcache_cfg_tb` runs the same program through three other builds of the
whole cache at once: the 3-way 24 KB PSAC (the smaller configuration for
area-constrained designs), the FallBackPha scheme, and adaptive fill. Each
build must show every one of its mechanisms, and the adaptive build must
actually redirect fills. Compile it with `tb/l2_model.sv` and
`tb/l1_dcache_run.sv`.

`ssc_tb` runs the SSC at 256 B, 512 B, 1 KB and 2 KB. `psac_tb` runs the
PSAC as 4-way PredictPha, 3-way (24 KB) PredictPha, 4-way FallBackPha and
4-way adaptive PredictPha, checking data, latencies and the at-most-one
data array rule in each.

## How far it can be trusted, and where it departs

Every module has a testbench that passes. Each testbench has also been run
against a deliberately broken copy of its module, and it fails there.

The following follow the original proposal:

* the SSC/PSAC split;
* the TOS/SRB rules;
* the PredictPha and FallBackPha probe orders and phased stores;
* the adaptive MRU fill variant, as an option;
* the sizes;
* the 2-cycle probe latency;
* steering by instruction address with random initial contents;
* filling misses into the predicted way;
* the one-cycle penalty of snooped stack references.

The following are choices of this design, where the proposal is silent:

* **Conventions:** the downward-growing stack, line-granular TOS/SRB
  comparisons, and zero fill of allocated lines.
* **Sizes and formats:** 64-bit words, 32-bit virtual addresses, 4 KB pages,
  and the 32 B SSC line.
* **Policies:** write-allocate in both caches, and steering retraining after a
  misprediction.
* **Mechanisms:** the LFSR initialization, the snoop address range, the TLB's
  second port for SSC traffic, and the arbiter.
* **Operation:** one request in flight, and no SSC flush on a context switch.

The virtually tagged SSC assumes one address space at a time. Flush it, or
add address-space tags, before using it with several processes.

Not built:

* **The other probe schemes:** Sequential, FallBack-Regular and plain
  phased. Only PredictPha (the default) and FallBackPha are implemented.
* **The L2 cache, main memory and processor.** They are outside this block.

One timing departure: a FallBackPha store that hits outside the predicted
way takes 6 cycles here (three probes: predicted tag, other tags, data
write). The published energy-and-time table lists 8 for that case; no fourth
probe is needed for it in this design.

The 3-way 24 KB PSAC and the other SSC sizes are parameter settings
(`PSAC_WAYS`, `SSC_BYTES`). The block testbenches exercise both, and
`l1_dcache_cfg_tb` runs the 3-way PSAC through the whole cache. The other
SSC sizes are not run end to end.

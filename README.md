# A configurable two-level TLB hierarchy for RV64 Sv39

Every fetch, load and store of a RISC-V core running with Sv39 virtual memory
needs its virtual page number translated to a physical frame. Walking the
3-level page table for each access is far too slow, so the translations are
cached in TLBs: a small, fast L1 TLB next to the instruction fetch and another
next to the data access, and a larger, slower L2 TLB shared by both, in front
of the hardware page table walker.

The usual organisation fixes the shape of these buffers: fully-associative L1
TLBs, whose every entry is compared with every lookup, and a direct-mapped L2
TLB. Fully-associative lookups grow the critical path and the logic as the
TLB grows, and a direct-mapped L2 TLB suffers conflict misses. This design
turns both into **set-associative templates**. The number of entries and the
number of ways are separate parameters, so the same RTL builds anything from
direct-mapped (1 way) to fully-associative (ways = entries):

* the virtual page number (VPN) is split into an **index**, its low
  log2(sets) bits, which picks a set, and a **tag**, the rest, which is
  compared with the ways of that set only;
* a refill goes to the first free way of the set, otherwise to a victim chosen
  by **pseudo-LRU kept per set**, or by a **random** (LFSR) policy;
* the L1 TLBs live in flip-flops and answer one cycle after the request;
* the L2 TLB lives in a synchronous-read memory (block RAM on an FPGA), one
  row per set and one lane per way, written through a per-way mask. Its valid
  bits are kept apart in flip-flops.

The default build is the largest configuration this organisation was evaluated
with:

| structure | entries | ways | sets | replacement | storage |
|---|---|---|---|---|---|
| data L1 TLB | 128 | 8 | 16 | pseudo-LRU | flip-flops |
| instruction L1 TLB | 64 | 8 | 8 | pseudo-LRU | flip-flops |
| shared L2 TLB | 1024 | 8 | 128 | random | synchronous memory, 128 x 8 x 70 bits |
| PTW cache | 8 | fully assoc. | 1 | pseudo-LRU | flip-flops |

## Structure

```
 core fetch ──► tlb_l1 (IS_ITLB=1) ──┐ miss                 ┌──────────── ptw ─────────────┐
                                     ├─► rr_arbiter ──────► │ tlb_l2 ──(miss)──► walk       │ ──► mem_req / mem_resp
 core ld/st ──► tlb_l1 (IS_ITLB=0) ──┘   (round robin)      │   (tlb_sram)      ▲ ptw_cache │     (page table entries)
        ▲  answer                                           └───────────────────┴───────────┘
        └──────────────────────── walk answer, routed by requester id ◄─────────┘
```

| file | module | role |
|---|---|---|
| `rtl/tlb_pkg.sv` | package | Sv39 sizes, PTE layout, permission bits, request/answer structs, permission check |
| `rtl/tlb_hierarchy.sv` | top | wires the two L1 TLBs, the arbiter and the walker |
| `rtl/tlb_l1.sv` | L1 TLB | one template for the instruction and the data TLB |
| `rtl/rr_arbiter.sv` | arbiter | round-robin choice of which L1 miss the walker takes |
| `rtl/ptw.sv` | page table walker | holds the L2 TLB and the PTW cache, walks the table |
| `rtl/tlb_l2.sv` | L2 TLB | set-associative, memory-based, whole-set flush |
| `rtl/tlb_sram.sv` | memory | 1 read / 1 write port, registered read, lane write mask |
| `rtl/ptw_cache.sv` | PTW cache | fully-associative cache of non-leaf page table entries |
| `rtl/tlb_plru.sv` | replacement | tree pseudo-LRU, one tree per set |
| `rtl/tlb_random_repl.sv` | replacement | 16-bit LFSR victim |

## How a translation proceeds

1. **L1 lookup (cycle t).** The L1 TLB indexes its set with the VPN's low bits
   and compares the tag with all ways of the set. In cycle t+1 it raises
   either `resp_valid` with the physical address and the page-fault flag, or a
   one-cycle `miss` pulse. With `satp_sv39` low, or in machine mode, the
   address passes through unchanged, also in one cycle.
2. **Miss.** The L1 TLB drops `req_ready` and raises `ptw_req_valid` with the
   VPN. The round-robin arbiter hands one of the two L1 requests at a time to
   the walker, which returns the requester's number with the answer.
3. **L2 lookup.** The walker reads the set's row from the L2 memory. One cycle
   later the row is compared with the registered tag, gated by the valid bits.
   A hit ends the request.
4. **Walk.** On an L2 miss the walker starts from `satp_ppn`. At each level it
   forms the entry address `table_ppn * 4096 + 8 * VPN[level]`. If the PTW
   cache knows that entry, because it is a non-leaf entry read before, the
   walker moves down a level without touching memory. Otherwise it reads the
   entry over `mem_req`/`mem_resp`.
   * An entry with V clear, or with W set and R clear, is a fault.
   * An entry with R or X set is the leaf. A 2 MiB or 1 GiB leaf whose low
     frame bits are not zero (a misaligned superpage) is a fault.
   * Any other entry points to the next table. It goes into the PTW cache and
     the walk continues one level down. Such a pointer at level 0 is a fault.
5. **Refill and answer.** The leaf is written into the L2 TLB and returned to
   the L1 TLB. The L1 TLB writes it into its set and answers the waiting
   request one cycle later. Results that are faults are not stored anywhere.

Cost in cycles, from the request to the answer: an L1 hit takes 1. An L1 miss
that hits the L2 TLB takes 4, without contention at the arbiter. In cycle t+1
the miss is signalled, the request is handed over and the L2 row is read; in
t+2 the row is compared; in t+3 the walker answers; in t+4 the L1 TLB
answers. A full walk adds, for each level the PTW cache
cannot answer, one memory round trip.

### Superpages

Sv39 has 4 KiB pages and 2 MiB and 1 GiB superpages. The walker returns, for a
superpage leaf, the **4 KiB piece** of it that holds the address: the upper
frame bits come from the leaf, the lower ones from the VPN. Both TLB levels
store that piece like an ordinary 4 KiB translation. This keeps one
tag/index scheme for every page size. The cost is that a superpage takes one
entry per 4 KiB piece touched.

### Permissions

The instruction and data TLBs differ only in the permission check (`IS_ITLB`
makes every request a fetch). The rules are applied on every hit and on the
answer of a walk:
* A must be set;
* a fetch needs X, a load R, a store W and D;
* user mode needs U;
* supervisor mode may load or store a U page only with `sum` set, and never
  fetch from it.

The hardware does not update the A and D bits; a page with them clear faults.

### Flushing (`sfence.vma`)

`sfence.valid` with `has_addr` flushes one page, without it everything.

* **L1 TLBs**: a single-page flush clears the valid bit of the one matching
  entry; a full flush clears all valid bits.
* **L2 TLB**: its tags sit in the memory and could only be compared a cycle
  later, so a single-page flush clears **every valid bit of the set** the page
  maps to. This is simpler and never wrong; it only costs extra misses.
* **PTW cache**: any sfence empties it.
* **In-flight walk**: a flush during a walk lets the walk finish and answer,
  but neither TLB stores its result.

Address-space identifiers are not used: every flush ignores `rs2`, and the G
bit has no effect.

## Parameters

`tlb_hierarchy` parameters (all other modules take theirs from it):

| parameter | default | meaning |
|---|---|---|
| `ITLB_ENTRIES`, `ITLB_WAYS` | 64, 8 | instruction TLB size and associativity |
| `DTLB_ENTRIES`, `DTLB_WAYS` | 128, 8 | data TLB size and associativity |
| `L1_REPL` | `REPL_PLRU` | L1 replacement (`REPL_PLRU` or `REPL_RANDOM`) |
| `L2_ENTRIES`, `L2_WAYS` | 1024, 8 | L2 TLB size and associativity; `L2_ENTRIES = 0` removes the L2 TLB |
| `L2_REPL` | `REPL_RANDOM` | L2 replacement |
| `PTWC_ENTRIES` | 8 | PTW cache entries |

Entries and ways must be powers of two, with ways ≤ entries. The five
evaluated configurations are reached as follows (fully-associative means ways
= entries):

| configuration | DTLB | ITLB | L2 TLB |
|---|---|---|---|
| I | 32 / 32 ways | 32 / 32 ways | `L2_ENTRIES = 0` |
| II | 32 / 32 ways | 32 / 32 ways | 128 / 4 ways |
| III | 32 / 32 ways | 32 / 32 ways | 512 / 4 ways |
| IV | 64 / 8 ways | 128 / 8 ways | 1024 / 8 ways |
| V (default) | 128 / 8 ways | 64 / 8 ways | 1024 / 8 ways |

## Interface of `tlb_hierarchy`

All signals are synchronous to `clk`. `rst_n` is an active-low asynchronous
reset that clears every valid bit and state machine. Memory contents are not
reset.

* `itlb_req_*`, `dtlb_req_*`: valid/ready requests with a 39-bit virtual
  address; the data side also gives `dtlb_req_acc` (`ACC_LOAD`/`ACC_STORE`).
  Each TLB takes one request at a time. Each request gets exactly one
  `*_resp_valid` cycle with `*_resp_paddr` (56 bits) and `*_resp_pf`.
* `priv`, `sum`, `satp_sv39`, `satp_ppn`: the core's privilege level,
  mstatus.SUM, the satp mode, and the root page table frame.
* `sfence`: `{valid, has_addr, vpn}` for one cycle per `sfence.vma`.
* `mem_req_valid/ready/addr`, `mem_resp_valid/data`: reads of 64-bit page
  table entries. There is one request at a time, and the answer may come any
  number of cycles later.
* `ev_*`: one-cycle event pulses for performance counters: L1 misses, L2
  hits and misses, PTW cache hits, memory reads.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Expected
values are worked out independently of the RTL: hand-derived pseudo-LRU
victims, a reference LFSR, model arrays, and page tables whose walks are
counted by hand.

| testbench | what it shows |
|---|---|
| `tb_tlb_plru` | victims after known touch sequences; victim never the last-used way; sets independent |
| `tb_tlb_random_repl` | victim equals a reference LFSR; every way is chosen |
| `tb_tlb_sram` | masked writes, one-cycle reads, read-during-write returns old data |
| `tb_tlb_l1` | one-cycle hits; pseudo-LRU eviction within a full set; every permission rule; faults not stored; single and full flush; flush during a walk; random stream |
| `tb_tlb_l2` | one-cycle lookup; 4-way keeps 4 of 5 same-set pages while direct-mapped evicts; whole-set flush; same-cycle refill |
| `tb_ptw_cache` | same-cycle hits, replacement, duplicate inserts, flush |
| `tb_rr_arbiter` | rotation, stall, fairness under random traffic |
| `tb_ptw` | 3 memory reads for a cold walk, 1 with the PTW cache, 0 on an L2 hit; 2 MiB / 1 GiB pieces; each fault kind; flush during a walk |
| `tb_tlb_hierarchy` | the default (Conf. V) build end to end, both TLBs in parallel, checked against a reference page map; counts and requires L1/L2 hits and misses, evictions at both levels, PTW cache hits, arbiter contention, faults, superpages, remap plus single-page flush, full flush, bare mode |
| `tb_tlb_configs` | Conf. I–IV and a 1024-entry L2 TLB at 1, 4 and 8 ways, all on one page stream, plus a small build with the policies swapped; the direct-mapped L2 TLB misses far more than the set-associative ones |

`tb_tlb_configs` drives 16 pages 20 times over through both TLBs. The pages
are `base + 1024*a + 16*b`, with a and b from 0 to 3. All 16 fall into one set
of an 8-way L1 TLB, so the L1 TLB keeps missing. In a 1024-entry L2 TLB they
form 4 sets of 4 pages each. A 4-way or 8-way L2 TLB holds them all; a
direct-mapped one cannot. In the last build all 16 pages map to one L2 set of 4 ways. The counts, which the testbench checks:

| build | L1 misses | L2 hits | L2 misses | page table reads |
|---|---|---|---|---|
| Conf. I (no L2) | 32 | 0 | 0 | 37 |
| Conf. II | 32 | 6 | 26 | 31 |
| Conf. III | 32 | 16 | 16 | 21 |
| Conf. IV | 640 | 624 | 16 | 21 |
| 1024-entry L2, direct-mapped | 640 | 156 | 484 | 489 |
| 1024-entry L2, 4-way | 640 | 624 | 16 | 21 |
| 1024-entry L2, 8-way (Conf. V L2) | 640 | 624 | 16 | 21 |
| 16-entry direct-mapped L1s (random), 64-entry 4-way L2 (pseudo-LRU) | 640 | 156 | 484 | 489 |

`tb_pt_mem` (page-table memory with random latency and back-pressure) and
`tb_cfg_run` (one configuration plus its driver) are testbench helpers.

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/tlb_pkg.sv tb/tb_tlb_hierarchy.sv --top-module tb_tlb_hierarchy -o sim
./obj_dir/sim
```

Every testbench finishes in well under a second of simulation time.

## Where this design makes its own choices

The set-associative organisation, the timing, the storage split, the
replacement policies and the flush rules listed above are the basis of this
design. The following points are this implementation's own choices and may
differ from other implementations of the same idea:

* **Blocking L1 miss handling.** After a miss the L1 TLB takes no new request
  until the walk answers, and then answers the held request itself. A core
  that replays the access instead would simply see a hit on the replay.
* **Superpages as 4 KiB pieces**, in both TLB levels (see above).
* **PTW cache placement.** It is looked up before every memory read of the
  walk, keyed by the physical address of the entry, and flushed on any
  `sfence`. Its size (8 entries) and its policy are assumptions; other
  designs place it in parallel with the walk.
* **Random source**: a 16-bit Galois LFSR that steps once per replacement.
* **No ASIDs, no hardware A/D update, no MXR**, and a walk answers only one
  request at a time.
* A way refilled in the same cycle as an L2 lookup of its set counts as absent
  for that lookup.

Area, clock frequency and benchmark miss rates of a complete FPGA system are
beyond the reach of this RTL alone. The core, its caches and the memory are
not included: the core's side of the TLBs and the page-table memory port are
the top's ports.

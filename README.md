# A banked, task-tagged TLB that survives context switches

A conventional TLB loses its contents at every context switch. It is
either flushed, or the next task slowly overwrites it. Under
multiprogramming, every task therefore starts each time slice with a
burst of misses. This design stops that with three ideas:

* **One bank per task.** Each of the ITLB and DTLB is split into 32 small
  fully associative banks of 32 entries (1024 entries per side, 32 KB
  pages). A bank belongs to one task. A shared bank-tag register names the
  task that owns it.
* **A context switch is nearly free.** It only clears the "current" mark
  of the running task's bank. When a task comes back, its bank is found
  again by its task tag, and all the translations the task built up are
  still there.
* **Prefetching fills the gaps.** A small prefetch buffer per side is
  filled around each miss, so pages a task has not touched yet are often
  ready when it reaches them.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable, apart from
the testbenches and one behavioural memory model in `tb/`. Each file
starts with a comment giving its function, interface and timing.

## Translating an address

The virtual address is split into a VPN, bits [31:15], and a page offset,
bits [14:0]. The VPN goes to all 32 banks and to the prefetch buffer at
once. Every bank compares it against its entries as a CAM. Only the
*current* bank may answer: a bank is selected by the AND of its current
bit and its hit signal. If the current bank misses but the prefetch buffer
hits, the buffer answers instead. The chosen PPN is joined with the
offset to form the physical address (`translation_select`).

Hits are combinational. A lookup that hits the current bank or the
prefetch buffer answers in the cycle it is presented. A prefetch-buffer
hit does two more things at the next clock edge:

* it copies the translation into the current bank (the LRU entry is
  replaced, as in any TLB);
* it restarts the prefetch logic around that page.

## Bank tags and the miss cases (the core of the design)

`bank_tag_file` holds 32 registers, one per bank and shared by ITLB and
DTLB. Bank *b* of the ITLB and bank *b* of the DTLB always belong to the
same task. Each register holds:

| field    | meaning |
|----------|---------|
| task tag | names the owning task: the PPN of the access that opened the bank (default), or a process ID (`USE_PID = 1`) |
| current  | this is the running task's bank; at most one is set |
| valid    | the bank holds a live task |
| LRU      | 5-bit age, used to pick a victim bank |

A lookup that hits neither the current bank nor the prefetch buffer
stalls: its hit output stays low. The requester holds the request, and
the miss handler `mmu_ctrl` takes over. It fetches the page-table entry
through the memory port. Then, in its fill cycle, one of three things
happens:

1. **A bank is current.** The task has run before in this slice and just
   touched a new page. The translation is written into the current bank.
   No tag changes.
2. **No bank is current, and the task tag matches a valid bank.** This is
   the first access after a context switch, and the task has run before.
   That bank is made current again and becomes most recently used. The
   translation is written into it. Everything the task left there is
   usable again at once.
3. **No bank is current, and no tag matches.** This is a new task, or its
   bank was taken by others. A victim bank is chosen: the first invalid
   bank, otherwise the least recently used one. Its entries are flushed in
   *both* the ITLB and the DTLB. It is then made current and valid, and
   the task tag is written into it.

In every case the prefetch logic of the side that missed starts from the
missed VPN. The handler then returns to idle, and the stalled lookup hits
in the next cycle.

**The task tag.** By default the tag is the PPN returned by the walk that
found no current bank. After a context switch that is normally the first
instruction fetch, so the tag is the physical page of the code where the
task resumes. This needs no help from the operating system. The price is
that a task resuming on a different code page is not recognised: it gets
a new bank, and its old one ages out. A more serious limit is shared code.
Two processes that resume on the same *physical* code page get the same
tag, and so would share one bank and each other's data translations. On a
system that shares code pages between processes, use `USE_PID = 1`. The
`pid` input is then the tag.

**Timing.** Let L be the number of cycles from the memory accepting a
request to its response. A demand miss then hits L+3 cycles after the
lookup first missed:

* one cycle to latch the miss;
* one cycle to issue the request;
* L cycles of walk;
* one cycle to fill.

The end-to-end testbench checks this figure.

The handler serves one miss at a time. When both sides miss in the same
cycle, the ITLB goes first.

## Context switch and clear-TLB

Two one-cycle inputs come from the operating system:

* `ctx_switch` clears every current bit and empties both prefetch buffers.
  Nothing else changes: the banks and their tags stay as they are.
* `clear_tlb` clears every valid bit and every current bit, and empties
  both prefetch buffers. The operating system must raise it whenever a
  page is swapped out to disk or a page frame is released. Those are the
  only events that make a kept translation wrong. After it, every task
  starts again in case 3, and stale banks are flushed as they are reused.

If either signal arrives while a miss is being walked, that walk's result
is dropped. The walk was for the old task. The requester's next lookup
misses again and is handled afresh. A prefetch run in flight is likewise
abandoned, and its last response discarded.

## Prefetching

Each side has its own prefetch buffer and prefetch logic. They share the
one memory port with the miss handler, through `walk_arbiter`. The miss
handler has priority, so a demand miss waits for at most one prefetch
request already in flight.

* **Sequential prefetching (`sp_prefetch_logic`, the default).** After a
  miss at VPN *v*, it requests *v*+1 … *v*+9, then *v*−1 … *v*−8: 17
  pages, one request at a time. Pages that are present go into the
  17-entry buffer, which uses FIFO replacement. A new miss restarts the
  run from the new page.
* **Distance prefetching (`dp_prefetch_logic`, `PF_MODE = PF_DP`).** On
  every miss it forms the distance *d* to the previous miss. It records
  in a table that the previous distance was followed by *d*. The table has
  64 rows, indexed by the low 6 bits of the distance and tagged with the
  rest, and each row keeps the 2 most recent follower distances. It then
  prefetches *v*+*s* for each distance *s* stored in row *d*, into a
  16-entry buffer. The table is cleared at every context switch. A new
  task therefore needs four misses on a constant stride before the first
  prediction, which `tb_novel_tlb_dp` checks. Distance prefetching costs
  the table and still has to relearn after each switch. That is why
  sequential prefetching is the default.

## Memory port

The memory system is the processor's conventional page-table walk and
main memory; it is not part of this RTL. The top exposes it as `mem_*`:

* a valid/ready request carrying a VPN. Until it is accepted, the
  request may change or be withdrawn: a higher-priority requester may
  take the port, or a prefetch run may restart. The memory must sample
  the VPN in the cycle it raises ready;
* one outstanding request at a time;
* a one-cycle response carrying `ok` (page present) and the PPN.

An absent page (`ok` low) on a demand miss pulses `i_fault` or `d_fault`
and fills nothing. The requester must then drop the lookup. On a prefetch
the page is simply skipped. `tb/page_table_model.sv` is a behavioural
stand-in used by the testbenches.

## Modules

| module | role |
|--------|------|
| `tlb_pkg` | sizes, prefetch-mode enum, event struct, miss-handler states |
| `novel_tlb` | top: two sides, bank-tag file, miss handler, arbiter |
| `tlb_side` | one of ITLB/DTLB: 32 × `tlb_bank`, `prefetch_buffer`, `translation_select`, prefetch logic |
| `tlb_bank` | 32-entry CAM with true LRU (per-entry ages), flush |
| `bank_tag_file` | task tags, current/valid bits, bank LRU, match and victim logic |
| `translation_select` | current-AND-hit select, prefetch-buffer fallback, PA forming |
| `prefetch_buffer` | fully associative buffer, FIFO replacement, flush |
| `sp_prefetch_logic` | sequential prefetcher, +9/−8 |
| `dp_prefetch_logic` | distance prefetcher, 64 × 2 table |
| `mmu_ctrl` | miss handler (the three fill cases) |
| `walk_arbiter` | memory-port sharing, fixed priority |

Main parameters of `novel_tlb`, with their defaults:

* `NBANKS = 32`, `BANK_ENTRIES = 32`;
* `VA_W = 32`, `OFFSET_W = 15` (32 KB pages);
* `PA_W = 32`;
* `PF_ENTRIES = 17`, `SP_FWD = 9`, `SP_BWD = 8`;
* `PF_MODE = PF_SP`, `DP_ROWS = 64`, `DP_SLOTS = 2`, `DP_PF_ENTRIES = 16`;
* `USE_PID = 0`.

For a 36-bit virtual address space (VPN [35:15]), set `VA_W = 36`.
`tb_novel_tlb_small` runs that configuration.

At the defaults, synthesis gives about 84,000 flip-flops, almost all of
them in the 2 × 1024 TLB entries. The banks are written as flip-flop
arrays with parallel comparators. In silicon they would be CAM macros,
which this RTL does not model.

The `events` output carries one-cycle pulses for performance counters:

* hits in the bank and in the prefetch buffer, per side;
* demand walks;
* each fill case;
* evictions of a live bank;
* faults;
* prefetch requests and prefetch fills.

## Simulation

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. Build and run one with plain Verilator
5 from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb rtl/tlb_pkg.sv tb/tb_pt_pkg.sv \
    tb/tb_novel_tlb.sv --top-module tb_novel_tlb -Mdir obj -o sim && obj/sim
```

Substitute any other testbench name:

* `tb_novel_tlb` runs end to end at full size, in well under a second. It
  runs 8 tasks for three rounds, then 40 tasks (which forces evictions),
  then a clear-TLB, a task larger than one bank, and a page fault. A
  reference model of the bank tags predicts match or allocate at each
  task switch. Each page a task kept must hit with no stall when it
  returns. Every translation is checked against the page table. The test
  counts each mechanism and fails if one never occurs.
* `tb_novel_tlb_dp` runs the same top with distance prefetching.
* `tb_novel_tlb_small` runs the top at small sizes: 4 banks of 4
  entries, 36-bit virtual and 40-bit physical addresses, and process IDs
  as task tags. Six tasks share the four banks in a random order and all
  use the same virtual pages. A reference model predicts whether each
  returning task gets its bank back; kept pages must then hit with no
  stall.
* There is one testbench per module: `tb_tlb_bank`, `tb_bank_tag_file`,
  `tb_prefetch_buffer`, `tb_translation_select`, `tb_sp_prefetch_logic`,
  `tb_dp_prefetch_logic`, `tb_walk_arbiter`, `tb_mmu_ctrl`, `tb_tlb_side`.
  Each has a random part that compares against a reference model
  written in the testbench. `tb_tlb_bank`, `tb_prefetch_buffer`,
  `tb_translation_select` and `tb_sp_prefetch_logic` also test a second,
  non-default size. `tb_mmu_ctrl` also tests `USE_PID = 1`.

`tb/tb_pt_pkg.sv` defines the test page table. Task *t* maps page *v* to
`{t[6:0], v[9:0] ^ 10'h2a5}`, and pages from `'h1f000` up are absent.

## What follows the source design and what was chosen here

These follow the design as published:

* 32 banks of 32 entries, fully associative with LRU replacement;
* 32 KB pages;
* bank tags with a task tag, current, valid and LRU bits;
* the AND-of-current-and-hit select;
* the prefetch-buffer-hit copy into the current bank;
* the three miss cases, including the flush of both sides' victim bank;
* the context-switch and clear-TLB actions;
* ITLB and DTLB sharing the bank tags;
* the task tag being a PPN, or a PID when available;
* the SP window of +9/−8 with 17 entries;
* the DP sizes: 64 rows, 2 slots, 16 entries.

These are this design's own choices:

* the 32-bit physical address;
* all handshakes and latencies;
* one miss handled at a time, ITLB first;
* the memory-port priority;
* FIFO replacement in the prefetch buffer;
* the SP request order;
* the DP table indexing, slot order and clearing at a context switch;
* that clear-TLB also clears the current bits;
* dropping a miss overlapped by a context switch;
* the fault pulse.

Three more choices deserve attention:

* **DTLB miss with no current bank.** It is handled like case 2 or case
  3 above, using the *data* page's PPN as the task tag. The intended use
  is that the first access after a switch is an instruction fetch, so
  this should not normally arise.
* **Prefetched copies.** Translations copied from the prefetch buffer
  into a bank are left in the buffer as well.
* **No filtering.** The prefetchers do not skip pages already present in
  the current bank.

Not included:

* the conventional page-table walker and memory;
* the operating-system changes (raising `ctx_switch` and `clear_tlb`);
* the single 1024-entry TLB that served as the point of comparison;
* the published miss-rate results on SPEC95 programs, which need traces
  of those programs and are not reproduced here.

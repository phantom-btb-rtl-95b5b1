# Phantom-BTB in SystemVerilog

Server workloads (databases, web servers) touch more taken branches than a
practical branch target buffer can hold: a 1K-entry BTB misses constantly,
while a 16K-entry one costs over 100 KB of dedicated storage and extra access
latency. Phantom-BTB keeps a small, fast, conventional BTB and gives it a
large second level that has **no storage of its own**: a *virtual table*
whose entries are ordinary 64-byte lines in the L2 cache, in a reserved
physical address range. Because an L2 access is far too slow to sit in the
prediction path, the virtual table is never looked up on demand. Instead it
holds *temporal groups* — runs of branches that missed the BTB one after
another — and a BTB miss *prefetches* the group that historically followed
it into a small buffer next to the BTB. When the front end then reaches
those branches, they are found in the buffer and moved into the BTB.

This repository is a synthesizable RTL implementation of that mechanism, in
the configuration the proposal evaluates as its main one: 1K-entry 4-way
dedicated BTB, 64-entry prefetch buffer, 4K-group virtual table, six branches
per group, 16 prefetch MSHRs, 48-bit virtual and 46-bit physical addresses.
The L2 cache itself and the processor are not part of it; they connect
through the top-level ports.

## How a branch flows through it

1. **Lookup.** Each branch address is looked up in the dedicated BTB and the
   prefetch buffer in the same cycle. A BTB hit predicts normally.
2. **BTB miss.** The miss is a *prefetch trigger*: the prefetch engine maps
   the branch's 32-instruction code region to a virtual-table index and reads
   that L2 line. If the prefetch buffer already holds the branch, the
   prediction is taken from the buffer and the entry is moved into the BTB
   through its normal write port (one entry per cycle, only for branches the
   front end actually asks for).
3. **Feedback.** When the branch resolves taken it is written to the BTB as
   in any BTB. If its lookup had missed the dedicated BTB, it is also
   appended to the group being built in the temporal group generator.
4. **Group written.** After six missed branches the group is packed into a
   line and written to the L2 — at the index of the *previous* group's last
   branch. The last branch of this group becomes the index for the next one.
5. **Group read back.** When, later, a branch in that earlier region misses
   again, the engine fetches the group. The trigger comes one group ahead of
   the branches it covers, so the 12+ cycle L2 latency is hidden behind the
   execution of the intervening code.

The L2 is unaware of the metadata except for a small controller extension
(`pbtb_l2_filter`): replies in the reserved range go to the prefetch engine,
an L2 miss in that range is answered with an empty reply rather than going
off chip, evictions of metadata lines are dropped, and metadata requests are
marked to bypass coherence.

## Temporal groups: format and indexing

This is the part of the design whose details matter most.

**Branch entry (78 bits, `br_entry_t`)**

| bits | field | meaning |
|------|-------|---------|
| 77:32 | `pc`    | branch word address (48-bit VA >> 2) |
| 31:30 | `btype` | 0 conditional, 1 jump, 2 call, 3 return/indirect |
| 29:0  | `tgt`   | low 30 bits of the target word address |

The full target is `{pc[45:30], tgt}`: targets are assumed to lie in the same
4 GB window as the branch. The same 78-bit entry is stored in the prefetch
buffer and in groups; the dedicated BTB stores a 38-bit tag instead of the
full address (70 bits per entry).

**Group line (512 bits).** Slot *k* (0 = oldest) occupies bits
`[78k +: 78]`, k = 0..5; bits 511:468 are zero. Groups are only written when
all six slots are filled.

**Index.** region = `pc >> 5` (aligned 32-instruction region); index =
`region[11:0]`; line address = `vt_base + index`. The table is direct mapped
and untagged: two regions with the same low index bits share a line and the
later write wins. A group may contain branches that are already in the BTB or
in other groups; this redundancy is inherent to the scheme.

## Blocks and files

| file | block |
|------|-------|
| `rtl/pbtb_pkg.sv` | widths, `br_entry_t`, branch-type enum, event struct, target and region helpers |
| `rtl/pbtb_btb.sv` | dedicated BTB: 256 sets x 4 ways, tree pseudo-LRU, combinational lookup, one write port |
| `rtl/pbtb_prefetch_buffer.sv` | 64-entry fully associative buffer, FIFO fill by ring pointer, removal on install, up to six pushes per cycle |
| `rtl/pbtb_tgg.sv` | temporal group generator: collects six missed branches, writes the line to the L2 |
| `rtl/pbtb_prefetch_engine.sv` | trigger -> index -> L2 read, 16 MSHRs with merging, unpacks replies into the buffer |
| `rtl/pbtb_l2_filter.sv` | L2 controller extension: routing, empty replies, eviction drop, coherence bypass |
| `rtl/pbtb_top.sv` | everything wired together, BTB write-port arbitration, virtual-table base register |

## Top-level interface (`pbtb_top`)

All flops use a synchronous active-low reset `rst_n`.

* `cfg_base_we`, `cfg_base[39:0]` — load the table's base line address.
  After reset it is the top 4096 lines of the physical space.
* `lk_valid`, `lk_pc[45:0]` → `pred_hit`, `pred_from_pb`, `pred_btype`,
  `pred_target[45:0]`, combinational in the same cycle.
* `fb_valid`, `fb_taken`, `fb_btb_miss`, `fb_entry` — one resolved branch per
  cycle. `fb_btb_miss` must repeat whether that branch's lookup missed the
  dedicated BTB (`!(pred_hit && !pred_from_pb)`); the front end carries it
  down the pipeline.
* `vt_rd_*` (valid/ready, line address, id) and `vt_wr_*` (valid/ready, line
  address, 512-bit data) — virtual-table traffic to the L2.
* `l2r_*` — every L2 reply or miss notification (line address, requester id,
  hit, data); the filter turns them into `l1_rsp_*` (non-metadata hits),
  `mem_rd_*` (non-metadata misses, off-chip fill) or the internal reply to the
  prefetch engine one cycle later.
* `ev_*` → `mem_wb_*` — L2 evictions; dirty non-metadata lines are written
  back, metadata lines dropped.
* `req_addr` → `req_coh_bypass` — combinational classification of a request
  entering the L2.
* `events` (`pbtb_events_t`) — one-cycle pulses for counters;
  `pb_occupancy` — buffer fill level.

Timing: a trigger becomes an L2 read request one cycle after the lookup; a
completed group becomes a write request one cycle after its sixth branch; an
L2 reply reaches the prefetch buffer three cycles after it enters the filter
(filter register, engine register, buffer write).

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `BTB_ENTRIES` | 1024 | dedicated BTB entries (power-of-two sets) |
| `BTB_WAYS` | 4 | BTB associativity (power of two) |
| `PB_ENTRIES` | 64 | prefetch buffer entries (power of two) |
| `VT_GROUPS` | 4096 | virtual table lines; index width is log2 of this |
| `MSHRS` | 16 | outstanding virtual-table reads |
| `L2_ID_W` | 8 | requester id width on the L2 ports |
| `VT_BASE_RESET` | 2^40 - 4096 | reset value of the table base |

The defaults are the evaluated configuration; 1K/2K-group tables and
2K/4K-entry BTBs (the proposal's sensitivity studies) only need the
parameters changed. Entry format, six-entry groups and the 32-instruction
trigger region are package constants.

Dedicated storage at the defaults: BTB 1024 x 71 bits, prefetch buffer
64 x 79 bits, generator 5 x 78 bits + 12-bit index + one 512-bit output line
register, engine 16 x 13 bits + request register, 40-bit base register.

## What is specified and what is chosen here

Taken from the Phantom-BTB proposal: the block structure; BTB size,
associativity and 70-bit entry; 78-bit branch entries, six per 64-byte group;
4K-entry direct-mapped untagged virtual table with 12-bit index and 40-bit
base; the rule that a group is indexed by the region of the previous group's
last branch; 32-instruction regions; triggering on every dedicated-BTB miss;
16 MSHRs; 64-entry FIFO prefetch buffer searched in parallel with the BTB,
installing into the BTB on a hit and removing the entry; the four L2
controller rules.

Chosen here, because the proposal leaves them open:

* Branch address stored as a 46-bit word address. The proposal speaks of
  the "full branch address" but sizes the entry at 78 bits, which only fits
  if the two zero bits of 4-byte instructions are dropped.
* Aligned 32-instruction regions and index = low 12 bits of the region
  number (the proposal says only "a region surrounding the branch").
* Tree pseudo-LRU replacement in the BTB; single-cycle combinational lookup.
* Only taken branches are written to the BTB and collected into groups.
* Lookups that hit in the prefetch buffer still count as dedicated-BTB
  misses, both as triggers and for group building.
* BTB write-port arbitration: feedback first; a buffer hit that loses keeps
  its entry in the buffer and is installed on its next lookup.
* Duplicate entries are not pushed into the prefetch buffer; a whole group
  is pushed in one cycle.
* The first group after reset, and a group that completes while the previous
  write is still waiting, are discarded; a trigger with no free MSHR is
  discarded. The table is only a hint, so nothing breaks.
* Group line layout, branch-type encoding, handshakes, ids and reset values.

## Verification

Each block has a self-checking testbench in `tb/` that compares against a
reference model written separately in the testbench and prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|-----------|----------------|
| `tb_pbtb_btb` | hits, targets and types against a reference BTB with its own pseudo-LRU, directed victim cases, reset |
| `tb_pbtb_prefetch_buffer` | hit/entry, FIFO overwrite, removal, duplicate skipping, occupancy, against a sequence-number model |
| `tb_pbtb_tgg` | cycle-exact write requests, packing, index of the previous group, drops under backpressure |
| `tb_pbtb_prefetch_engine` | cycle-exact requests, MSHR merge and exhaustion, empty replies, unpacking one cycle after a reply |
| `tb_pbtb_l2_filter` | routing at and around both edges of the reserved range |
| `tb_pbtb_top` | end to end at the default size (below) |
| `tb_pbtb_sweep` | five configurations side by side (below) |

`tb_pbtb_top` runs the whole design, with default parameters, against a
behavioural L2 (`tb/pbtb_l2_model.sv`: 12-cycle latency, 1200 lines, FIFO
eviction, plus background application reads) and a synthetic program of 3000
taken branches looped six times with 5% of branches randomly skipped per pass.
A plain 1K-entry BTB runs beside it as the baseline. Every predicted target
must be correct, every virtual-table address must fall in the table, and
every mechanism (buffer hit, install, deferred install, duplicate skip, group
dropped, MSHR merge and drop, empty reply, metadata eviction, and so on) must
occur. In that run the baseline BTB predicts almost none of the branches
after the first pass (the loop is three times its size), while Phantom-BTB
predicts roughly 50-70% of them. This is a sanity check of the mechanism on a
synthetic loop, not a reproduction of the proposal's IPC results on server
workloads.

`tb_pbtb_sweep` runs the sizes of the proposal's sensitivity studies on one
6000-branch synthetic loop (helper `tb/pbtb_sweep_lane.sv`: one configuration
with its own L2 model and same-sized baseline BTB). Typical result, share of
lookups predicted after the first pass:

| dedicated BTB | virtual table | Phantom-BTB | same BTB alone |
|---------------|---------------|-------------|----------------|
| 1K | 1K groups | 60% | 0% |
| 1K | 2K groups | 70% | 0% |
| 1K | 4K groups | 70% | 0% |
| 2K | 4K groups | 70% | 0% |
| 4K | 4K groups | 87% | 33% |

The trend (more virtual-table entries help until index aliasing disappears;
the virtual table still adds on top of a larger BTB) is checked, the
percentages are not: they depend entirely on the synthetic program.

The two request ports (`vt_rd_*`, `vt_wr_*`) carry concurrent assertions
that a request stays up and unchanged until accepted, and the prefetch engine
asserts that every reply names an outstanding MSHR; build with `--assert` to
enable them.

Running a testbench with plain Verilator (from the repository root):

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/pbtb_pkg.sv tb/tb_pbtb_top.sv --top-module tb_pbtb_top -Mdir obj
    ./obj/Vtb_pbtb_top

Swap in any other `tb_*.sv` and its module name. Every testbench finishes in
a few seconds.

## Limits

* The L2 cache, the processor pipeline, its direction predictor and return
  address stack are outside this RTL. The testbench's L2 is behavioural, with
  FIFO rather than LRU replacement and far smaller than the 4 MB L2 assumed
  in the evaluation.
* The server workloads used to evaluate Phantom-BTB are full-system traces;
  they are not reproduced here.
* The prefetch buffer and BTB lookups are wide combinational searches (64
  and 4 comparators of 46 and 38 bits); a timing-driven implementation would
  likely register the lookup or split the buffer search.

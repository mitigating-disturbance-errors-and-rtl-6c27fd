# PCM controller extensions: a write-disturbance barrier and a merging read-modify-write cache

Phase-change memory (PCM) has two problems that a memory controller can work
around in logic.

* **Write disturbance.** Writing a cell (in particular a RESET, which turns a 1
  into a 0 here) heats its neighbours. After enough such writes on one line,
  bits of the rows above and below flip. The usual fix, verify-and-correct,
  reads both neighbours before and after every write, which costs a lot of
  bandwidth. The **in-module disturbance barrier (IMDB)** instead tracks, per bank,
  the few lines that are actually written hard. It counts their 1-to-0 flips.
  When a line has flipped enough bits to endanger its neighbours, it asks for a
  rewrite of the two neighbour rows. It then keeps that line's data in a small
  SRAM buffer, so that later writes to the line never reach the array.
* **Read-modify-write (RMW).** The host writes 64 B blocks but the PCM works on
  256 B pages, so every small write needs a page read first. The **cache-based
  RMW** keeps fetched pages in a cache. It also treats reads and writes alike
  ("typeless"): any command that misses allocates a page and fetches it. Before
  the fetch is issued, the RMW waits a few cycles and merges later commands to
  other blocks of the same page into that one page read.

Both units are written in synthesizable SystemVerilog at the sizes the design
was evaluated with:

* IMDB: 4 banks, each with a 256-entry main table, an 8-entry barrier buffer
  and an AppLE group size of 8.
* RMW: a 32K-entry page cache and a merge window of 8 cycles.

The top level `pcm_controller_top` puts the two side by side. They sit at
different places of a PCM system: the RMW sits in the host-side controller, and
the IMDB sits in the memory module behind the media controller. Neither that
controller nor the PCM devices are part of this RTL, so each unit keeps its own
ports.

## IMDB: tracking aggressors per bank

### Data kept per bank

A main-table entry (108 bits) holds:

* the line address: row and column, 25 bits;
* RewriteCntr (8 bits): how often this line has triggered neighbour rewrites;
* ZeroFlipCntr: eight 9-bit sub-counters, one per 64-bit word of the 512-bit
  line, each counting that word's 1-to-0 flips;
* MaxZFCIdx (3 bits).

The main table is fully associative. A barrier-buffer entry (553 bits) holds
the address, the full line data, RewriteCntr and an 8-bit FreqCntr.

### What happens to a write

The media controller hands each prepared write to the IMDB of its bank as the
new data plus the old data it has already read from the array.
`imdb_plane` then does one of the following:

| Case | Action | Result | Cycles |
|---|---|---|---|
| Address in the barrier buffer | The data is updated there and FreqCntr goes up. The array is not written. | `RES_ABSORBED` | 1 |
| Address in the main table | The integrated counter adds each word's 1-to-0 flips (zeros of `~old \| new`) to the sub-counters. The sub-counters saturate at 511. | `RES_HIT` | 2 |
| Hit where the largest sub-counter reaches the threshold | See "Promotion" below. | `RES_PROMOTED` | 5 |
| Miss | Inserted with probability 1/128. | `RES_FILTERED` if not inserted | 2 or more |
| Miss, inserted into a free entry | A new entry starts with the count of zeros in each word of its data ("prior knowledge"). A line full of zeros is already close to the threshold. | `RES_INSERTED` | 2 or more |
| Miss, inserted over a victim | Same start value; the slot is the AppLE victim. | `RES_REPLACED` | 2 or more |

**Threshold.** The threshold is 511. The array tolerates about 1K disturbing
writes per line, and both neighbours can disturb a line, so the limit is
1K/2 − 1.

**Promotion.** When the threshold is reached:

1. Rewrite requests go out for row−1 and row+1 in the same column, and
   RewriteCntr is incremented.
2. The line is moved into the barrier buffer. This is a three-cycle swap: read
   the main table, read the barrier-buffer victim, write both.
3. If the buffer is full, its least frequently used line is demoted:
   * it goes back to the freed main-table slot, keeping its RewriteCntr;
   * its ZeroFlipCntr is reinitialised from its data;
   * its data leaves as a write-back request.

**AppLE.** Checking all 256 entries for the best victim would need 256 read
ports. AppLE splits the table into 32 groups of 8 instead. Each cycle it reads
one random entry of the next group through the table's single read port, so a
full round takes 32 cycles.

* The best candidate is an invalid entry first. After that it is the entry with
  the smallest largest-sub-counter, with the smaller RewriteCntr breaking a
  tie.
* The round runs while the plane is idle, which in a real module means while
  the array is busy writing.
* A miss into a full table takes the result of the last finished round. If no
  round has finished since the last replacement, the miss waits for one.

**Power failure.** `flush_req` puts every plane into flush mode:

1. Every barrier-buffer line is sent out as a write-back, one per cycle.
2. After that, every command passes untracked (`RES_BYPASS`).
3. `flush_done` rises once all four banks have drained.

The main table only holds counters, so it needs no flush.

### Ordering rules this design adds

* Rewrites and write-backs leave through a small output queue per plane.
  `imdb` arbitrates between the four queues round-robin onto one port, tagged
  with the bank.
* A plane accepts a new write only while its queue has room for the up to
  three requests a promotion can create.
* A plane also accepts no new write while a write-back is still queued. This
  matters when a line was just demoted: without the rule, a newer write to that
  line could reach the array before the older data in its queued write-back.

## RMW: one page read for many small commands

### Per-entry state

Each entry of the page cache (`rmw_merge`) has:

* **V** — the page data is valid;
* **U** — an update with the PCM is in flight: a page read or a write-back;
* per 64 B block:
  * **M** — a command has been merged on this block;
  * **T** — the type of that merged command;
  * the block data.

### Address decoder

The address decoder (`rmw_addr_decoder`) is a lookup table:

* Every slot compares its tag with the page address.
* The one-hot match vector selects the stored cache index.
* The OR of the vector is the `found` flag.

Slot *i* always stores index *i*. The lookup is combinational.

### Command at the head of the 32-entry InputQ

Commands are handled one per cycle:

* **Page found, V=0** (the page is being fetched):
  * If the block's M bit is clear, the command is merged into the entry: M and
    T are set, and the data is kept if it is a write.
  * Otherwise it waits.
* **Page found, V=1, read:** the block is returned from the cache.
* **Page found, V=1, write:**
  * If U=0, the block is updated, U is set, and a page write-back is queued.
  * Otherwise the write waits for the previous write-back to be acknowledged.
* **Page not found:**
  * The pseudo-LRU victim is taken if it has U=0 and the Merger is free. The
    entry gets V=0, U=1 and the command's M/T bits.
  * Otherwise the command waits at the head of InputQ.

### Merger and De-merger

**Merger.** The Merger holds the new page read for the pending threshold (8
cycles). In each of those cycles it looks through InputQ for the oldest command
to the same page and to a block whose M bit is still clear, and merges it. The
merged command leaves a hole in InputQ, which the head skips. When the window
ends, the page read goes to the PCM.

**De-merger.** When the page returns (through ModifyQ), the De-merger:

1. fills the page, keeping the blocks that merged writes already hold;
2. sends one response per merged read, one per cycle, into RespQ;
3. queues one page write-back if any merged command was a write;
4. sets V and clears M and T.

**Arbitration.** Page reads and write-backs share the PCM port. They are granted
first-come, first-served, using issue stamps.

### Why no dirty bit

Every write is written back immediately. So an entry with U=0 always matches the
PCM and can be replaced without a write-back. U stays set until the PCM
acknowledges the write.

## Timing summary

| Unit | Operation | Cycles (accept to `done_valid`) |
|---|---|---|
| imdb_plane | absorbed write | 1 |
| imdb_plane | hit | 2 |
| imdb_plane | promotion (hit + 3-cycle swap) | 5 |
| imdb_plane | miss with free entry / filtered | 2 |
| imdb_plane | miss into full table right after a replacement | waits for a 32-cycle AppLE round |
| rmw_merge | read hit | next cycle into RespQ |
| rmw_merge | miss to page read issued | the 8-cycle merge window plus the latch and dispatch registers; the window does not advance in cycles in which the De-merger runs or the head changes the cache |

All interfaces are valid/ready. Lookups in the tables and in the address
decoder are combinational. All state changes happen at the rising clock edge.
Reset is asynchronous and active low.

## Files

| File | Contents |
|---|---|
| `rtl/imdb_pkg.sv` | widths and entry, request and result types of the IMDB |
| `rtl/imdb_integrated_counter.sv` | per-word zero and flip counters |
| `rtl/imdb_apple.sv` | group sampler for replacement |
| `rtl/imdb_main_table.sv` | 256-entry CAM-tagged counter table |
| `rtl/imdb_barrier_buffer.sv` | 8-line data buffer with LFU victim |
| `rtl/imdb_plane.sv` | per-bank state machine |
| `rtl/imdb.sv` | four banks and the output arbiter |
| `rtl/sync_fifo.sv` | small valid/ready FIFO used by both units |
| `rtl/rmw_pkg.sv` | RMW widths and command type |
| `rtl/rmw_addr_decoder.sv` | index lookup table |
| `rtl/rmw_plru.sv` | tree pseudo-LRU |
| `rtl/rmw_merge.sv` | the RMW with Merger and De-merger |
| `rtl/pcm_controller_top.sv` | top level |

Each file opens with a description of its interface and timing, and of what
follows the original design versus what was chosen here.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/imdb_pkg.sv rtl/rmw_pkg.sv \
    tb/tb_rmw_merge.sv --top-module tb_rmw_merge -o sim
./obj_dir/sim +verilator+rand+reset+2
```

* `tb_imdb_integrated_counter`, `tb_imdb_apple`, `tb_imdb_main_table` and
  `tb_imdb_barrier_buffer` compare the leaf blocks with models inside the
  testbench.
* `tb_imdb_plane` runs at the default sizes. It walks one line through
  insertion, hits, promotion and absorption, checking the latency of each step.
  It then fills the barrier buffer and checks the LFU demotion and its
  write-back, and fills the main table to check that the AppLE victim comes from
  the only low-count group. Finally it checks flush and bypass, and measures the
  1/128 insertion rate on a second plane.
* `tb_imdb` checks bank steering, back-to-back acceptance across banks, and
  round-robin fairness under random back-pressure.
* `tb_rmw_addr_decoder` runs random allocations against a reference map.
* `tb_rmw_merge` uses an 8-entry cache and a PCM model with random latency that
  may answer out of order. Every read must return the last write issued before
  it. The test also checks the merge window and that all merge, stall and
  write-back events occur.
* `tb_pcm_controller_top` runs both units end to end at reduced sizes and counts
  every mechanism. The test body is in `tb/pcm_top_test.svh`.
* `tb_pcm_controller_top_full` runs the same test at the full default sizes,
  with no parameter overrides (about 440K cycles, roughly a minute in
  Verilator). There, every bank's main table fills up and AppLE replacement
  happens.

## Where this RTL departs from the original design, and what it leaves out

* **Cache location.** The page cache is an on-chip array. The original keeps it
  in a DRAM beside the controller, together with the address indirection table.
  At 32K entries × 256 B this array is 8 MB: it simulates fine, but it is far
  beyond a realistic on-chip SRAM. For a smaller cache, set `RMW_ENTRIES` to a
  power of two.
* **Replacement policy.** The RMW cache uses tree pseudo-LRU instead of true LRU.
* **Counter width.** The integrated counter outputs 7 bits per word, not the
  6 bits printed in the block diagram, because a 64-bit word can hold 64 zeros.
* **Address split.** The 25-bit line address is split into 16 row bits and
  9 column bits; only the total width is given.
* **Added states and rules.** These are choices of this design:
  * the swap, flush and bypass states of the plane;
  * the output-queue ordering rules;
  * the 16-bit LFSRs used as random sources;
  * the tie-breaking orders in AppLE and in the LFU choice;
  * the rule that the Merger pauses while the De-merger runs.
* **Not built:**
  * the media controller (queues, pre-write reads, verify-and-correct);
  * the PCM devices, the DRAM cache and AIT, and the host;
  * the shared-resource variant of the RMW, which keeps its tables in the
    external DRAM;
  * the components of the cycle-level controller simulator described
    alongside: request receiver, AIT manager, micro-command engine, data
    processing unit and wear-leveling.

  These parts are either external chips, simulator components, or given only
  by name.

## Synthesis notes

* Lint reports three kinds of unused signal bits:
  * the FreqCntr field of the barrier-buffer read port in `imdb_plane`;
  * the occupancy outputs of two RMW queues.

  The opening comment of each module explains why.
* At 32K entries, the RMW holds about 67 Mbit of page data in flip-flops.
  Generic synthesis of that array takes a long time. An instance of
  `rmw_merge` with 64 entries synthesizes without problems.

# L2 data prefetchers for a high-bandwidth, high-capacity cache hierarchy

This RTL puts four hardware data prefetchers side by side in front of the
second-level cache of a three-level on-chip hierarchy, so they can be
compared on the same reference stream. The hierarchy is of the Itanium 2
kind: 16 KB L1d, 256 KB 8-way L2 with 128-byte blocks, 4 MB L3, and a core
that issues up to four memory references per cycle. All four prefetchers
bring blocks into the L2. They differ in what they learn from:

| prefetcher | trained by | tables | default aggressiveness |
|---|---|---|---|
| Sequential Tagged | L2 misses and first hits on prefetched blocks | one bit per L2 block | degree 4 |
| Stride, on-miss insertion | every load (lookup in AG, update at Commit) | 32-entry Load Table | distance 4 |
| PC/DC | L2 events, keyed by load PC | 256-entry Index Table, 256-entry Global History Buffer | degree 4 |
| P-DFCM | L2 events, keyed by load PC | 256-entry History Table, 512-entry Delta Table | degree 4 |

P-DFCM is the new method in this set. Like PC/DC it predicts from the
sequence of address differences ("deltas") of each load. PC/DC rebuilds that
sequence by walking a linked list, one table access per cycle. P-DFCM instead
keeps a hash of the recent deltas, as the DFCM value predictor does. So one
update and one lookup per L2 miss are enough.

The aggressiveness settings are:

* **Degree n**: the prefetcher issues the next n addresses, the first in the
  trigger cycle and the rest one per cycle.
* **Distance n**: it issues only the n-th next address.

The defaults are the settings the comparison found best.

## Where the prefetchers sit in the memory pipeline

A load passes through these stages: AG (address generation), M1 (L1d access
and, in parallel, L2 tag lookup), then on to Commit. `pf_top` sees the load in
three places:

* **AG** (`ag_i`, up to four loads per cycle). The Stride prefetcher's Load
  Table (LT) is read here.
* **M1** (`m1_i`, `m1_l2ref_i`). A reference that reaches the L2 is looked
  up in the L2 tag directory (`l2_tags`). `m1_l2ref_i` marks references that
  missed in L1d. Because the L1d is write-through, stores are marked too. Two
  outcomes count as an **L2 event**:
  * a miss;
  * a hit on a block whose prefetch bit is still set, meaning the first use
    of a prefetched block.

  At most one event per cycle is passed on, from the lowest-numbered port.
  Sequential Tagged, PC/DC and P-DFCM are trained only by these events. The
  output `ev_o` shows the event. Each event carries a load flag, taken from
  `m1_load_i`. Sequential Tagged reacts to every event. PC/DC and P-DFCM
  learn per load PC, so they ignore store events.
* **Commit** (`cm_i`, `cm_l2_miss_i`, one load per cycle). This is the single
  write port of the Stride LT.

Blocks come back through the fill port (`fill_*`). `fill_pf_i` marks a block
fetched by a prefetch, and the directory then sets its prefetch bit.
Prefetches leave on a valid/ready port (`pf_req_*`) towards the L2 queue.

`sel_i` chooses which prefetcher writes the Prefetch Address Buffer.
`SEL_NONE` gives the no-prefetch baseline. All four keep training whatever
`sel_i` says, so switching does not start from cold tables.

## L2 tag directory and the prefetch bit (`l2_tags`)

The directory has 256 sets of 8 ways. Each way holds a valid bit, a 17-bit tag
and a prefetch bit. Four lookups are combinational in M1. A hit on a block
whose prefetch bit is set is reported on `lk_pf_hit_o`, and the bit is
cleared at the clock edge, so each prefetched block produces exactly one
"first hit" event.

A fill goes into an invalid way if there is one. Otherwise it goes into the
way named by a per-set round-robin pointer. A fill of a block that is already
present is ignored. The probe port has no side effects. `pf_top` uses it to
throw away a buffered prefetch whose block is already resident.

## Degree and distance (`pf_sequencer`)

`pf_sequencer` is shared by Sequential Tagged and Stride. It takes a trigger,
a base address and a step.

* With degree N, it issues base+step at once, then base+2·step …
  base+N·step, one per cycle.
* With distance N, it issues only base+N·step.

A new trigger drops a sequence still running. PC/DC and P-DFCM produce their
own sequences, because their steps are not constant.

## Sequential Tagged (`seq_tagged_pf`)

On every L2 event (miss or first hit on a prefetched block), it prefetches
the blocks that follow the referenced block. The block-aligned address goes
to the sequencer with a step of 128 bytes. The prefetch bit in the L2 tags is
what makes the method "tagged": a stream keeps running ahead while its
prefetched blocks are being used.

## Stride with on-miss insertion (`stride_lt_pf`)

The LT is direct mapped on PC bits [6:2]. Each entry holds the full PC tag,
the last address, the stride and a 2-bit confidence counter. It has four read
ports and one write port.

* **Lookup (AG):** every load reads the LT. A tag hit with confidence ≥ 2 and
  a non-zero stride arms a prefetch. The prefetch is issued in M1, the next
  cycle: a+4·s by default (distance 4), or a+s … a+N·s in degree mode. There
  is one sequencer per read port.
* **Update (Commit):** a load that hits in the LT updates its entry whether
  or not it missed in the cache.
  * If the new stride equals the stored one, the counter goes up by 1.
  * Otherwise the counter goes down by 1. The stored stride is replaced only
    while the counter is below 2.
* **Insertion (Commit):** a load that misses in the LT is inserted only if it
  missed in L2. This "on-miss insertion" is why 32 entries are enough.

A load therefore needs one insertion and three further commits with the same
stride before it prefetches.

## PC/DC over a Global History Buffer (`pcdc_pf`)

**Tables.**

* The Index Table (IT) is indexed by PC[9:2] and tagged with the rest of the
  PC. It holds the GHB position of that load's latest L2 event.
* The GHB is a 256-entry circular buffer written in event order. Each entry
  holds an address and a link to the previous entry of the same load.

GHB positions carry one extra wrap bit. A link is followed only while its
target is among the last 256 entries written. This recognises links into
overwritten entries.

**Sequence of one event** for load PC at address a:

1. **Update, in the event cycle:** read IT, write GHB[head] = {a, link},
   write IT with the new head. The IT read and write use separate ports, so
   one event per cycle is accepted.
2. **Walk, one GHB read per cycle:** follow the links and collect up to
   `HIST` = 16 addresses of this load, newest first.
3. **Search, one cycle:** form the deltas d0 (newest), d1, d2, … Find the
   nearest k ≥ 1 where (dk, dk+1) = (d0, d1).
4. **Issue, one per cycle:** replay the deltas that followed the match in the
   past, dk-1 … d0, repeating with period k. Add each to the running address.
   Degree N issues the first N results; distance N issues only the N-th.

For a load with a full history, the first prefetch leaves 18 cycles after the
event (16 + 2).

**Override.** A new L2 event overrides any walk, search or issue in progress.
The original GHB state machine behaves the same way. It means PC/DC
prefetches only when L2 events are spaced out enough for the walk to finish.
The end-to-end testbench shows this: with one event every 4 cycles, PC/DC
almost never issues. This per-miss walking is the cost that P-DFCM avoids.

## P-DFCM (`pdfcm_pf`)

**Tables.**

* The History Table (HT) has 256 entries, indexed by PC[9:2] and tagged with
  the rest of the PC. Each entry holds the load's last address, a 9-bit hash
  of its recent deltas, and a 2-bit confidence counter.
* The Delta Table (DT) has 512 entries. It maps a history hash to the delta
  that followed that history last time.

**History hash.** The hash is fold-and-shift with a shift of 5 ("FS R-5"):

    hist' = ((hist << 5) XOR fold(delta)) mod 512

Here fold(delta) XORs the 32 delta bits down to 9 bits. With n = 9 index bits
and a shift of 5, a delta falls out of the hash after two updates. The
history order is therefore ceil(n/5) = 2 deltas. A constant stride settles on
one DT entry, and a pattern such as +64, +64, +1024 uses one entry per
position.

**Update, in the event cycle** (load PC, address a, HT hit):

1. d = a − HT.last.
2. DT[HT.hist] ← d, and the new history is hash(HT.hist, d). The counter goes
   up if DT[HT.hist] already held d, and down otherwise.
3. HT ← {a, new history, counter}.

A load that misses in HT is allocated with history 0 and confidence 0, and
predicts nothing.

**Predict, from the next cycle** (when confidence ≥ 2), one DT read per cycle:

1. d' = DT[hist].
2. Issue a + d'.
3. hist ← hash(hist, d') and a ← a + d'.

Degree N issues each of the N addresses. Distance N runs N steps and issues
only the last. A zero delta ends the chain, and so does a new L2 event. For a
steady stream, prefetches leave in the 1st to 4th cycles after the event.

## Prefetch Address Buffer (`pab`) and output filter

The buffer is an 8-entry FIFO with four write ports, because Stride can
deliver four prefetches in one cycle. Writes are taken in port order.

* An address whose L2 block is already queued is merged (`merge_o`).
* An address that finds the buffer full is dropped (`drop_o`).
* A pop in the same cycle frees its slot for these writes.

In `pf_top`, the oldest entry is probed in the L2 tags. If the block is
resident, the entry is discarded without a request. Otherwise it is offered on
`pf_req_*` and leaves when `pf_req_ready_i` is high. Requests are block
aligned.

## Files and parameters

| file | content |
|---|---|
| `rtl/pf_pkg.sv` | address type, `pf_mode_e` (degree/distance), `pf_sel_e`, `mem_ref_t`, `l2_event_t` |
| `rtl/pf_top.sv` | the subsystem (top) |
| `rtl/l2_tags.sv` | L2 tag directory: `SIZE_B`=262144, `WAYS`=8, `BLK_B`=128, `NPORTS`=4 |
| `rtl/pf_sequencer.sv` | degree/distance generator: `MODE`, `N` |
| `rtl/seq_tagged_pf.sv` | Sequential Tagged: `MODE`=degree, `N`=4 |
| `rtl/stride_lt_pf.sv` | Stride: `ENTRIES`=32, `NRD`=4, `MODE`=distance, `N`=4 |
| `rtl/pcdc_pf.sv` | PC/DC: `IT_ENTRIES`=256, `GHB_ENTRIES`=256, `HIST`=16, `MODE`=degree, `N`=4 |
| `rtl/pdfcm_pf.sv` | P-DFCM: `HT_ENTRIES`=256, `DT_ENTRIES`=512, `MODE`=degree, `N`=4 |
| `rtl/pab.sv` | Prefetch Address Buffer: `DEPTH`=8 (power of two), `NIN`=4 |

Other details of the RTL:

* Addresses and PCs are 32 bits. PCs are taken as word aligned.
* Reset is asynchronous and active low. It empties every table. The L2 tag
  bits are not reset, because they are only read behind a valid bit.
* Everything is synthesizable.
* Table storage as built:
  * LT: 368 B
  * PC/DC: 2.4 KB
  * P-DFCM: 4.2 KB

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Mdir obj_top \
      -y rtl rtl/pf_pkg.sv tb/tb_pf_top.sv --top-module tb_pf_top
    ./obj_top/Vtb_pf_top

| testbench | what it shows |
|---|---|
| `tb_pf_sequencer` | degree and distance sequences, negative steps, override |
| `tb_pab` | fill, merge, drop, FIFO order, random run against a queue model |
| `tb_l2_tags` | hits, fills, prefetch bit set and cleared once, four ports, probe, round-robin eviction, random run against a model |
| `tb_seq_tagged_pf` | next blocks after misses and first hits, in degree and distance modes |
| `tb_stride_lt_pf` | on-miss insertion, confidence build-up and decay, all four read ports in one cycle, AG-to-M1 timing, degree and distance modes |
| `tb_pcdc_pf`, `tb_pdfcm_pf` | a stride load and a three-delta pattern load interleaved. After warm-up each event must produce exactly that load's next four addresses, at the expected cycles. A store event must be ignored. Also tests the override. |
| `tb_pf_configs` | the five settings (degree 1, distance 2, degree 2, distance 4, degree 4) for Sequential Tagged, PC/DC and P-DFCM |
| `tb_pf_top` | the whole subsystem at default sizes (see below) |

`tb_pf_top` uses a pipeline model (AG, M1, Commit three cycles later) and a
memory model with 30-cycle fills, and runs a stride-load plus pattern-load
workload. It runs the workload five times, once per `sel_i` setting, and
checks:

* the baseline issues no prefetches;
* every prefetcher issues prefetches, sees its prefetched blocks used and has
  fewer demand misses than the baseline.

It also counts each mechanism and fails if one never occurs: L2 miss events,
first hits, buffer merges and drops, resident-block discards, four
references in a cycle, and a prediction cut short by a new event.

## How far to trust it, and where it departs

The RTL follows these points of the described method:

* table sizes;
* the training sources and the pipeline stages where each table is read,
  updated and issues;
* on-miss insertion;
* the prefetch bit in the L2 tags;
* the P-DFCM update and predict steps and its FS R-5 hash with order
  ceil(n/5);
* the PC/DC event-by-event override;
* the eight-entry buffer;
* one-per-cycle issue for degree above one;
* the selected degree and distance.

Own choices, where the description stops:

* **Organisation:**
  * All tables are direct mapped, with full PC tags.
  * The L2 replacement policy is round-robin.
  * The PAB is FIFO, merges same-block addresses and drops when full.
  * There is a resident-block filter at the buffer output.
  * The event arbitration takes the lowest port first.
* **Confidence:** the Stride and P-DFCM counters are 2-bit, with a prefetch
  threshold of 2.
* **Widths:** deltas are stored at full 32-bit width.
* **PC/DC:**
  * Pattern search is nearest-match on the newest delta pair, with periodic
    replay.
  * The walk depth is 16.
  * The IT read, GHB write and IT write are done in one cycle on separate
    ports, instead of three single-port accesses, so that one event per cycle
    is accepted.
* **P-DFCM:**
  * The confidence check reads the DT once more in the update cycle.
  * Degree and distance above one are produced by chaining predictions
    through the DT.

The core, L1d (with its Miss Address File, store buffer and coalescing write
buffers), L2 data banks and queue, L2 miss file, L3, forwarding crossbar and
main memory are not part of this RTL. `pf_top` meets them only at its AG, M1,
Commit, fill and request ports. The reported IPC results come from full
benchmark programs on that whole machine, so they cannot be reproduced with
this RTL. The testbenches use synthetic address streams instead.

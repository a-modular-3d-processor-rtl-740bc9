# A stackable out-of-order core: one design, with or without a second die

This RTL implements the parts of an out-of-order processor core that can be
split over two bonded silicon layers while still working when only the bottom
layer is manufactured. The product idea: a single core design is sold in two
forms. The low-cost part is an ordinary planar die. The high-end part has a
second die bonded face to face on top. That die holds the upper halves of the
scheduler, the load/store queues, the SRAM arrays and the branch predictor's
tagged tables. Nothing is redesigned between the two. One strap input,
`stack_present`, tells the bottom die whether the upper half exists.

The key technique is the **phantom component**. With the upper layer absent,
each split structure fakes the control signals the missing half would have
produced, so the unchanged bottom-layer logic sees a consistent, smaller
machine:

| structure | what the missing half pretends |
|---|---|
| reservation station | its entries look *occupied* to the allocator and *empty / never ready* to the picker |
| load/store queues | the large L2 LDQ/STQ always report *full*, so everything goes to the L1 queues |
| SRAM arrays (ROB/PRF, DL1, queues) | the row-decoder root never selects the upper rows |
| tagged arrays (TLB, BTB) | as SRAM, plus one redundant tag bit so the tag width never changes |
| branch predictor | the tagged TAGE tables' HIT lines are held at *miss* |

Default parameters are the stacked sizes. The same instance shrinks to the
planar sizes when `stack_present` is low:

| | single layer | stacked |
|---|---|---|
| RS entries | 32 | 64 (32 pairs) |
| L1 LDQ / L1 STQ | 32 / 20 | 32 / 20 |
| L2 LDQ / L2 STQ | none | 80 / 50 |
| micro-op queue | 24 | 48 |
| DTLB0 (4-way) | 16 | 32 |
| DL1 data array | 32 KB | 64 KB |
| branch predictor | gshare, 4 KB | TAGE, 5 tables, 7.25 KB |

## The stacked scheduler (`stacked_rs`, `rs_picker`)

This is the least obvious part. The RS entries form **pairs**: entry *i* of
layer 0 and entry *i* of layer 1 sit one above the other.

* **Tag broadcast.** Each layer's entries are cut into segments of 8 on a
  segmented broadcast bus. The segments of layer 1 lie over those of layer 0,
  so the bus is no longer than for 32 entries. A segment's repeater is enabled
  only while the segment holds a valid entry. The layer-1 repeaters are off
  when the layer is absent. The enables come out on `seg_active`.
* **Select.** A pair has *one* BID/GRANT port on the global picker, so the
  picker has 32 ports, not 64. The pair's BID is the OR of its two entries'
  per-port bids (a wired-NOR pull-down in silicon). When a GRANT comes back for
  an execution port, a local one-of-two pick sends it to the entry that bid for
  that port. If both did, the older one gets it. One bit per pair records which
  entry is older. The pair also shares a single payload-RAM read port, because
  only one of its entries can issue per cycle.
* **Allocation.** Up to 4 uops per cycle go into free entries, the whole bottom
  layer first. A uop therefore lands above another only when the bottom layer
  is full. This keeps heat in the bottom die and avoids pairs competing for
  their shared port. A group is accepted only if all of its uops fit.
* **Phantom layer.** Layer-1 BIDs are masked. The local pick treats the layer-1
  entry as empty. The allocator's usage vector shows every layer-1 entry as
  taken. The picker thus sees an empty upper layer while the allocator sees a
  full one.

`rs_picker` grants each of the 6 execution ports to the lowest-numbered
bidding pair that has not already been granted a port. The priority rule is
this design's choice. A tag broadcast in cycle *t* lets a dependant bid in
*t+1*. An issued entry is freed in the same cycle.

## The partitioned load/store queues (`stacked_lsq`)

There are two levels of queue:

* The **L1 LDQ (32) and L1 STQ (20)** are on the bottom layer and fully
  associative. An executing L1 load takes its data from the youngest older L1
  store to the same word.
* The **L2 LDQ (80) and L2 STQ (50)** are on the top layer and cannot be
  searched. An L2 load only reads memory. An L2 store only holds its address
  and data until it writes memory at commit. No signal crosses between the L2
  queues and the L1 queues, which keeps them cheap and needs few vertical
  connections.

A memory uop is placed by prediction:

* **Store Forwarding Predictor (SFP)**, indexed by store PC.
* **Load Receiving Table (LRT)**, indexed by load PC.

Both are `fwd_pred_table`s of 1K sets with 8-bit partial tags and 10-bit
*resetting* counters. While the counter is non-zero, the uop goes to the L1
queue. Otherwise it goes to the L2 queue, or to the L1 queue when the L2 queue
is full (`alloc_fallback`). When the layer is absent the L2 queues always look
full.

Wrong placement is caught at commit by **filtered load re-execution**:

1. Each load remembers the sequence number of the newest store whose value it
   could have seen. That is the store it forwarded from, or else the last store
   committed when it executed.
2. At load commit, `ssbf` (256 sets × 2 ways) returns the sequence number of
   the last store committed to the load's address. If that store is younger
   than the one the load saw, the load reads memory again.
3. If the new value differs, `cm_flush` discards everything younger and the
   load commits with the correct value.
4. The offending store's PC is looked up by sequence number in the Store PC
   Table (`spct`, 2K sets). The SFP entry of that store and the LRT entry of the
   load are set to the maximum count. A successful L1 forward sets them too.
5. A uop that commits without forwarding and without causing a flush decrements
   its counter by one.

The filter is conservative. An evicted entry's sequence number goes into a
per-set floor, and aliasing partial tags merge to the newer number. It can
cause an extra re-execution but can never miss one.

Limits of this model: one allocation and one commit per cycle, whole-word
accesses with no partial overlap, and every flush empties all uncommitted
queue entries.

## Stackable arrays (`stack_sram`, `stack_tag_array`, `stack_fifo`)

* **`stack_sram`** puts sets `0..N/2-1` on layer 0 and the rest on layer 1. The
  decoder root is on layer 0. It takes the top address bit ANDed with
  `stack_present`, so without the layer every access falls into layer 0 (the
  upper half of the address space aliases onto the lower).
* **`stack_tag_array`** is a set-associative tagged structure built the same
  way. Its tag always includes the set bit that the missing layer removes. When
  stacked that bit is redundant. Without the layer it tells apart two keys that
  now share a set. The defaults are DTLB0. The ITLB, DTLB1, BTB and iBTB would
  be further instances with other parameters.
* **`stack_fifo`** is a queue whose pointers wrap at `DEPTH` or `DEPTH/2`. The
  defaults are the micro-op queue. The byte queue (3/6) and the instruction
  fetch queue (18/36) are further instances.

## Two predictors in one (`tage_bp`)

* **Table 0** is on the bottom layer: 16K two-bit counters.
* **Tables 1–4** are on the stacked layer: 512 entries each, with an 8-bit tag,
  a 3-bit counter and a 2-bit useful field. They use global-history lengths 5,
  11, 23 and 47.

Without the layer, table 0 is indexed by PC XOR history (gshare) and the tagged
tables always miss. With the layer, the history in table 0's index is replaced
by zeros (bimodal) and the longest-history tagged hit provides the prediction.

The update is a simplified TAGE:

* The provider's counter moves towards the outcome.
* The provider's useful counter moves when it disagreed with the alternate
  prediction.
* A misprediction allocates an entry in a longer table, or ages the useful
  counters of the longer tables if none is free.
* There is no periodic useful-counter reset.

Prediction and training happen in the same cycle with the resolved direction.
After reset the tables are cleared one index per cycle for 16384 cycles
(`init_busy`).

## The top (`m3d_core`)

`m3d_core` wires these together around one `stack_present` input:

* micro-op queue → RS, one uop per cycle;
* RS issue → tag broadcast one cycle later, plus one external wakeup port for
  variable-latency results;
* load/store queues → DL1 data array. This is two `stack_sram` copies of
  16384 words, so that executing loads and re-executing loads each have a read
  port;
* a re-execution flush from the queues also flushes the RS;
* branch predictor and DTLB0 with their own ports.

What a full core would add is not here, and appears as ports: the x86 front
end, rename, execution units, the ROB and commit, cache tags and miss
handling, L2, and the prefetchers.

## Files and simulation

* `rtl/m3d_pkg.sv`: widths and sizes, the uop and payload structs, and
  sequence-number comparison.
* `rtl/`: one module per file, as named above.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

To run a testbench, for example the end-to-end one:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    --top-module tb_m3d_core rtl/m3d_pkg.sv tb/tb_m3d_core.sv -o sim
./obj_dir/sim
```

`tb_m3d_core` runs the top at its default (full) sizes, once without and once
with the stacked layer. It checks the following:

* exact RS + queue capacity, 56 and 112 uops;
* every uop issues once, on its port;
* dependence order;
* architecturally correct committed loads, including the DL1 aliasing without
  the layer;
* the RS is emptied by a re-execution flush;
* the loop-exit prediction of the stacked predictor;
* the DTLB holds 16 and 32 pages.

It also counts that each mechanism actually happened: queue-full stall,
shared-port conflict, issue from layer 1, forwarding, re-execution flush, L2
placement, full fallback and tagged prediction. It runs in about a second.

## Where this departs from, or adds to, the description it follows

* Everything the description leaves open is this design's own choice and is
  stated in each file's header. This covers:
  * the picker priority;
  * segment length;
  * entry and payload formats;
  * widths (32-bit PCs, addresses and data; 19-bit sequence numbers; 8-bit
    physical tags);
  * the contents of the store filter and the SPCT indexing;
  * predictor table sizes, hashes and history lengths;
  * replacement policies;
  * reset behaviour.
* The single-layer gshare XORs the PC with the global history. This matches
  the statement that stacked mode replaces the history with zeros.
* Scheduling is non-speculative: there is no replay, and wakeup is single
  cycle. Branch-predictor history is updated at resolution, not
  speculatively.
* The counts in the tables above follow the sizes given for the design. The
  performance results (about 25% over the planar core) come from a
  cycle-level x86 simulation of the whole core and cannot be reproduced with
  this RTL alone.

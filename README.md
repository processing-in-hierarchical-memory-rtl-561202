# Pyramid: a near-memory accelerator for graph-based nearest-neighbour search

Approximate nearest-neighbour search (ANNS) finds the K stored vectors that lie
closest to a query vector. For data sets of up to a few hundred million vectors,
the best method is a best-first walk over a proximity graph. Each step takes
the closest node not yet expanded and reads its neighbour list. It computes the
distance from the query to every neighbour not seen before and keeps a sorted
list of the best K nodes. The walk does little arithmetic and touches memory at
random. On a CPU it is therefore bound by the memory bus.

Pyramid moves the work next to the memory that holds the data. It has two
levels:

* **Main-memory level (`pyramid_m`).** Distance units sit beside every DRAM
  rank, so a feature vector never crosses the memory channel. Only a
  `{query, node, distance}` record of 9 bytes comes back to the memory
  controller hub (MCH). The MCH holds a single systolic Top-K sorter, walks the
  graph and hands neighbour lists out to the ranks.
* **Storage level (`pyramid_s`).** This level is for data sets too large for
  DRAM, such as a billion vectors. The vectors are grouped into clusters around
  about 10^8 centres. Only the centres' graph lives in the DIMMs. The
  main-memory level finds the 60 centres nearest to a query. The storage level
  then reads those clusters from flash and computes a distance beside each flash
  channel, as the bytes stream past. It sorts the results per query in the SSD
  controller.

A query carries a mode bit. In million-scale mode the main-memory result is the
answer. In billion-scale mode it is only a list of clusters. The main-memory
level handles one query at a time. The storage level handles a whole batch. The
two work in parallel: while batch *n* is scanned in flash, the centre search of
batch *n+1* fills the other bank.

```
 host ──hq_*──► pyramid_top ──res_*──► host
                 │
                 ├─ pyramid_m
                 │   ├─ mch ── topk_pq (K=100, central queue)
                 │   ├─ neighbor_dimm (address generation + buffer) ── nd_* DRAM port
                 │   └─ feature_dimm ×3
                 │        ├─ query feature register, round-robin MUX, distance FIFO
                 │        └─ rank_nmc ×8 ── visited_cam, dist_calc ── fd_* DRAM port
                 └─ pyramid_s
                     ├─ two batch banks (query vectors, cluster ids)
                     ├─ cluster-to-page translation, per-channel job FIFOs
                     ├─ flash_ch_dist ×32 ── fl_* flash controller port
                     └─ ssd_sorter (100 × topk_pq)
```

All logic runs on one clock, `clk`, with an active-low asynchronous reset
`rst_n`. Every stream uses a valid/ready handshake: a word moves on a rising
edge where both are high.

## The Top-K queue (`topk_pq`)

This is the part that ties the search together, and the least obvious one. It
holds K stages. Each stage has a *QReg*, which holds a result in order, and a
*TReg*, which carries a candidate moving down the queue. A new candidate enters
TReg[0]. On every clock, each stage with a TReg in flight compares the two
values:

* If the TReg's distance is less than or equal to the QReg's, or the QReg is
  empty, the TReg takes the QReg's place. The old QReg entry moves into
  TReg[i+1].
* Otherwise the TReg itself moves on to TReg[i+1].

A pair that leaves stage K−1 is dropped. The queue accepts one insertion per
clock, whatever the fill level. QReg[0] is always the minimum, and the QRegs
stay sorted as soon as `busy` (any TReg in flight) falls.

Each entry also has an *expanded* flag. `head_idx` is the first valid entry
that has not been expanded, found with a priority encoder over the QRegs. The
MCH reads that entry, marks it expanded and sends its id to the neighbor DIMM.
An expanded entry still moves down the queue when closer nodes arrive, so the
final list holds every node that was seen, expanded or not. Marking is only
allowed while the queue is not busy, and an assertion checks this.

## Distance units beside the ranks (`rank_nmc`, `dist_calc`, `visited_cam`)

Each rank NMC owns a share of the nodes. Node `n` belongs to NMC
`n mod 24`, at local position `n div 24`. For each neighbour id it receives,
the NMC works as follows:

1. It looks the id up in a CAM of visited nodes (256 rows). On a hit, the id is
   dropped and counted on `filtered`.
2. On a miss, it writes the id into the CAM. It then requests the 128-byte
   feature as two 64-byte bursts, at DRAM addresses `local*2` and `local*2+1`.
3. It feeds each burst to `dist_calc`. This unit has 64 lanes of subtract and
   square, an adder tree and an accumulator. The distance appears two clocks
   after the last burst.
4. It pushes the record `{qid, nid, dist}` toward the DIMM's distance FIFO.

The burst size of 64 bytes follows from one rank's DDR4-3200 data rate against
a 500 MHz NMC clock: 1600 MHz × 2 × 8 bits / 500 MHz ≈ 51 bytes per NMC clock.
This is rounded up to one 64-byte burst. Only one feature is in flight per NMC.

A full CAM does not store further ids. It raises `cam_overflow`, and such a
node may then be computed twice. That is harmless, because the queue accepts
duplicates and only the wasted work grows. Loading a new query vector clears
every CAM.

Each `feature_dimm` holds eight NMCs, which is four ranks with two NMCs per
rank. It also holds the query feature register they share, a round-robin MUX
and a 16-entry distance FIFO. `neighbor_dimm` turns a node id into the
address of its fixed 160-byte list: `base + id*40*4`. It reads the list as
twenty 8-byte words and returns 40 ids, with unused slots holding
`0xFFFFFFFF`.

## Search flow in the MCH (`mch`)

1. **Load.** Take a query. Broadcast its vector to the three feature DIMMs
   (this also clears the CAMs). Flush the queue.
2. **Seed.** Send the entry node given with the query to its NMC.
3. **Step.** This is repeated STEPS=128 times, or until no unexpanded entry is
   left:
   * Wait until nothing is in flight: no NMC busy, all FIFOs empty and the
     queue not busy.
   * Take the head entry, mark it expanded and fetch its neighbours.
   * Route each id to its NMC. Ids of `0xFFFFFFFF` are skipped.
   * Drain all three FIFOs, in round robin, into the queue, one record per
     clock.
4. **Output.** In million-scale mode, stream the queue (up to K entries, nearest
   first) with `res_last` on the final one. In billion-scale mode, hand the
   first NPROBE ids (the nearest cluster centres) and the query vector to the
   storage level.

Each step waits for the previous one to drain completely. This makes the result
independent of DRAM timing, so the testbenches can compare the result bit for
bit with a software model of the same walk. The cost is the waiting time,
counted on `ev_stall`.

## Storage level and batching (`pyramid_s`, `flash_ch_dist`, `ssd_sorter`)

The storage level has two banks. Each bank holds up to BATCH=100 queries: the
vector of each and its NPROBE=60 cluster ids. The MCH fills one bank. A query
with `hq_close` set, or the hundredth query, closes the bank. If the scanner is
idle, it then starts on that bank while the MCH fills the other bank (counted
on `ev_overlap`). The scanner works as follows:

1. It clears the 100 per-query sorters.
2. For every query and every cluster id, it computes the flash page
   `CID_BASE + cid*PPC + p`. It sends the job `{slot, page, query vector}` to the
   two-entry job FIFO of channel `page mod 32`. A full FIFO stalls the issue
   (counted on `ev_job_stall`).
3. Each `flash_ch_dist` requests its page and parses the byte stream. For each
   record it computes the distance, one element per byte, so the unit keeps
   pace with the channel. It passes `{slot, vid, dist}` on.
4. `ssd_sorter` accepts one record per clock from the 32 channels in round
   robin. It inserts each record into the Top-K queue of its slot.
5. When all channels are idle and the sorters settle, the bank's results are
   streamed out query by query.

### Flash page layout

Each page read returns these bytes, with words little-endian:

| bytes             | content                                    |
|-------------------|--------------------------------------------|
| 0–3               | number of records N in this page           |
| then N × 132      | 4-byte vector id, then 128 one-byte elements |
| rest              | padding, skipped                           |

With 16 KB pages, one page holds up to 124 vectors.

### Output arbitration

The top module merges both levels onto one result port. Once a list has started,
it is finished before the other level may send.

## Default sizes

| parameter | default | where it comes from |
|-----------|---------|---------------------|
| `DIM` | 128 | one-byte elements, as in SIFT |
| `K` | 100 | Top-100 results |
| `R_SLOTS` | 40 | neighbours per node |
| `STEPS` | 128 | own choice (the number of search steps is fixed but not given) |
| `NPROBE` | 60 | clusters scanned per query |
| `SUB_BYTES` | 64 | feature bytes per NMC clock (see above) |
| `N_DIMM`, `NMC_PER_DIMM` | 3, 8 | 2 channels × 8 ranks, 2 NMCs per rank; 1 neighbor DIMM + 3 feature DIMMs of 4 ranks (own reading) |
| `CAM_DEPTH` | 256 | own choice (≈ 128 steps × 40 / 24 NMCs) |
| `N_CH` | 32 | flash channels |
| `BATCH` | 100 | queries per storage batch = number of SSD sorters |
| `K_S` | 100 | own choice |
| `PPC` | 1 | pages per cluster, own choice |

Ids and distances are 32 bits wide. Query ids are 8 bits wide. Widths shared by
all modules are in `rtl/pyr_pkg.sv`.

## How far to trust it, and where it departs

* **Queue head.** The search expands the *nearest* unexpanded entry. This is
  ordinary best-first search, and QReg[0] holds the minimum. The "expanded" flag
  is added to make this work with a queue that keeps every result.
* **Own choices where the source is silent:**
  * the data layouts (neighbour lists, feature addresses, node-to-NMC striping,
    flash pages);
  * the handshakes and FIFO depths;
  * the mode and batch-close bits;
  * the CAM size and its behaviour on overflow;
  * the number of search steps.
* **Firmware.** The cluster-to-page translation is done in logic, not in SSD
  firmware.
* **Clocks.** DRAM and flash timing are not modelled in the RTL. They sit
  behind the burst read ports, and the testbench models add fixed latencies and
  random back-pressure. The whole design runs on one clock, where the real split
  would be a 500 MHz logic clock against DDR4-3200 and an 800 MHz flash channel.
* **Capacity at billion scale.** The centre graph fits in 64 GB of DIMMs
  (1.2·10^8 centres × 288 B ≈ 35 GB). With one 16 KB page per cluster, though,
  10^9 vectors in 1.2·10^8 clusters need about 2 TB of flash, not 1 TB. Several
  small clusters would have to share a page, which this design does not do.
  Million-scale sets of up to 10^8 vectors (≈ 29 GB) fit.
* **Data sets with other vectors.** Vectors of 100 signed bytes (SPACEV) must be
  converted by the host: zero-padded to 128 elements and offset by 128.
* **Not included:**
  * DRAM and flash devices;
  * flash controllers;
  * the SSD microcontroller, its DRAM and the PCIe link;
  * the host.

  Simple models of the memories exist only in `tb/`.
* **Warnings.** The lint output contains warnings about unused signals and width
  extensions. It also contains warnings about memories without reset feeding
  logic that has an asynchronous reset. Those memories are written before they
  are read.

## Testbenches

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each compares
the module's results against reference models written independently in
`tb/tb_ann_pkg.sv`:

* an insertion-sort Top-K model;
* a software graph walk;
* a cluster scan.

The test data is generated from hash functions of the node id, so no data files
are needed. Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops
itself with a watchdog.

* `tb_pyramid_top` runs the whole design at reduced sizes. It mixes
  million-scale and billion-scale queries. It counts that every mechanism
  occurred at least once: the CAM filter and CAM overflow, step stalls, batch
  starts, overlap of the two levels, and job-FIFO stalls.
* `tb_pyramid_top_full` uses every default. It runs one billion-scale and one
  million-scale query over a 3000-node graph. It takes several minutes to build
  and well under a minute to run.

To simulate one, list the two packages first and let Verilator find the rest:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/pyr_pkg.sv tb/tb_ann_pkg.sv tb/tb_pyramid_top.sv --top-module tb_pyramid_top
./obj_dir/Vtb_pyramid_top
```

Warnings do not stop the build if you add `-Wno-fatal`. Each memory model
(`feat_dram_model`, `nbr_dram_model`, `flash_model`) only accepts requests
after reset.

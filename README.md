# CHIP-KNN in SystemVerilog: a multi-bank K-nearest-neighbours search engine

Exact K-nearest-neighbour (KNN) search compares one query vector with every
point of a large data set and keeps the K closest. For data sets of millions of
points the work is dominated by streaming the data out of DRAM/HBM, so this
accelerator is organised around memory bandwidth:

* the data set is split into **NUM_PE partitions, one per memory bank**, and
  one processing element (PE) scans each partition at full port width;
* inside a PE the partition is read in **tiles** that fit on chip (128 KB by
  default). Three stages (load, distance, sort) run on three consecutive tiles
  at once, through ping-pong buffers, so that a tile costs the time of the
  slowest stage only;
* the top-K selection uses a **two-phase compare-and-swap array** that accepts
  one candidate every three cycles whatever K is, so it can be replicated
  (`SORT_FACTOR` copies per PE) to keep up with the distance stage;
* each PE streams its K best to a **global top-K merger**, which returns the K
  nearest neighbours of the whole data set.

The default build is the configuration for 16-feature points on an HBM board
with 28 usable banks:

| parameter | default | meaning |
|---|---|---|
| `D` | 16 | features per point (float32) |
| `K` | 10 | neighbours returned |
| `PORT_WIDTH` | 512 | bits per memory word |
| `BUF_BYTES` | 131072 | tile size in bytes (128 KB → B = 2048 points at D=16) |
| `SORT_FACTOR` | 3 | parallel top-K sorters per PE |
| `NUM_PE` | 28 | PEs = memory banks (top only) |
| `ADDR_W` | 64 | memory byte-address width |

Derived inside the PE: `LANES = PORT_WIDTH/32` floats per word,
`DIST_FACTOR = LANES/D` points per word when `D <= LANES`, otherwise
`DIST_II = D/LANES` words per point, and `B = BUF_BYTES/(4*D)` points per tile.
`D` must divide `LANES` or be a multiple of it, and `SORT_FACTOR` must be a
multiple of `DIST_FACTOR`.

## Using the top (`chip_knn_top`)

1. Put partition p (points of D floats, row-major, point after point) at
   address 0 of bank p. Tile t of a PE starts at byte `t*BUF_BYTES`.
2. Drive `num_tiles` (tiles per PE, equal for all PEs), `pe_points[p]` (points
   really present in partition p, at most `num_tiles*B`; the rest of the last
   tile is ignored), `metric` (0 Manhattan, 1 Euclidean squared) and
   `query[D]`, then pulse `start` for one cycle.
3. When `done` pulses, `nn[0..K-1]` holds `{distance, id}` pairs, nearest
   first. Point j of partition p has id `p*num_tiles*B + j`. Unused entries
   (fewer than K points in total) hold distance `0x7F7FFFFF` and id
   `0xFFFFFFFF`. `busy` is high from `start` to `done`.

Each bank has its own read port, AXI-like:

| signals | direction | meaning |
|---|---|---|
| `m_ar_valid/ready`, `m_ar_addr`, `m_ar_len` | request | one burst per tile: byte address, length in words |
| `m_r_valid/ready`, `m_r_data`, `m_r_last` | data | one word per beat, `r_last` on the last |

The PE takes one burst per tile and accepts a data word every cycle
(`r_ready` stays high during a burst); gaps in `r_valid` simply stretch the
load stage. `rst_n` is an asynchronous active-low reset of all control state.

Latency of one query ≈ `(num_tiles + 2) × max(load, distance, sort cycles per
tile)` + a local merge of `(SORT_FACTOR·K + K)·3` cycles + a global merge of
`(NUM_PE·K + K)·3` cycles. At the defaults a tile costs about 2,060 load,
2,050 distance and 2,081 sort cycles; a 4M-point data set is 74 tiles per PE.

## Inside a PE (`knn_pe`)

```
 bank ──► load_buf ──► search buffer [2] ──► dist_calc ──► distance banks [2][SF] ──► topk_sorter ×SF ──► local_topk_merger ──► out stream
```

**Pipeline steps.** Work proceeds in steps. In step s, `load_buf` writes tile
s into search buffer `s mod 2`, `dist_calc` reads tile s−1 from the other
search buffer and writes its distances into distance-buffer set
`(s−1) mod 2`, and the sorters read tile s−2 from the other distance set. A
step ends when every stage that had work has finished, so the PE runs
`num_tiles + 2` steps and the first and last two are partly empty. This
step-lock control is simpler than free-running handshakes and loses nothing
when the stages are balanced, which the defaults are (see the cycle table
below).

**Distance stage (`dist_calc`, `dist_unit`).** One memory word (LANES floats)
is read per cycle. When a word holds several points (`DIST_FACTOR > 1`, e.g.
D=4 on a 512-bit port: 4 points), `DIST_FACTOR` distance units work side by
side. When a point spans several words (`DIST_II > 1`, e.g. D=32: 2 words),
one unit forms a partial sum per word and a float adder accumulates the
partial sums, giving one distance every `DIST_II` cycles. A distance unit
subtracts the query, takes `|x−q|` (Manhattan: clear the sign bit) or
`(x−q)²`, and sums the lanes with a balanced tree of float32 adders; all this
is combinational between the buffer read register and the distance write.

**Banking of distances.** Point i of a tile goes to distance bank
`i mod SORT_FACTOR`. Since the points that come out together are consecutive,
they always fall into different banks, so each bank has one write port, and
sorter b only ever reads bank b.

**Sort stage (`topk_sorter` ×SF).** Sorter b scans bank b (`B/SF` points)
and then K dummy items of maximum distance, at one item per three cycles.
Positions past `num_points` are fed as dummies too. The sorters are cleared at
`start` only: their lists carry over from tile to tile, so no partial result
ever goes back to memory.

**Local merge.** After the last tile, `local_topk_merger` feeds the SF lists
(SF·K items) and K dummies through one more `topk_sorter`; with
`SORT_FACTOR = 1` it is left out. The PE then streams its K results, nearest
first, on `out_valid/out_ready` and holds each item while `out_ready` is low.

## The top-K sorter

This is the least obvious part. The sorter holds K+1 registers `s[0..K]` of
`{distance, id}`; `s[1..K]` are the candidates, `s[0]` is a landing slot. Per
item:

1. write the new item into `s[0]`;
2. *ahead* phase: for every odd j, compare `s[j]` and `s[j+1]`; the larger
   distance moves to the lower index;
3. *behind* phase: for every odd j, compare `s[j]` and `s[j−1]`; again the
   larger moves down.

Each phase swaps disjoint pairs, so all compares of a phase are parallel and
the cost per item is three cycles for any K. Large values bubble toward
`s[0]` by up to two places per item, and `s[0]` is overwritten by the next
item, which is how the largest of the K+1 drops out. Why nothing that belongs
in the top K can be lost: a value that must leave is either already in
`s[0]`, or entered within the last K items and has had as many swaps as it
has places to travel, or has been in the array for at least K items and has
reached `s[0]`. After the last real item, K more items of maximum distance
push every real value through the array, and `s[1..K]` ends sorted, largest
in `s[1]`; the port `best[i] = s[K−i]` gives nearest first.

Example, K=4, slots `[s0 s1 s2 s3 s4]`, items 7, 3, 9, 1, 5 then four
dummies M (maximum distance); each row is the array after the behind phase:

```
after 7 : [M 7 M M M]
after 3 : [M 3 M 7 M]
after 9 : [M 9 M 3 7]
after 1 : [M 1 9 7 3]
after 5 : [9 5 7 1 3]     9 has reached s0 and is overwritten next
after M : [M 7 5 3 1]     sorted, largest first; stays so for the other dummies
```

(M is the maximum distance.) The two merger blocks reuse the same sorter:
merging lists is just feeding their items, followed by K dummies.

Distances are compared as unsigned 32-bit patterns. For non-negative floats
this is the numeric order, so no float comparator is needed; ties never swap.

## Arithmetic

float32 throughout, IEEE layout, round to nearest even; subnormal inputs and
results are flushed to zero, and there is no NaN or infinity handling
(an overflowing result becomes infinity, NaN is never produced). A point whose
distance overflows to infinity ranks behind the empty entries and is never
reported. Euclidean distance is the squared distance (no square root). The
adder tree sums lanes pairwise in a fixed order, so results are exactly
reproducible but may differ in the last bit from a sequential sum.

## Files

| file | role |
|---|---|
| `rtl/knn_pkg.sv` | types `float_t`, `id_t`, `knn_item_t`, `metric_e`; `DIST_MAX`, `ID_INVALID`, `ITEM_EMPTY` |
| `rtl/chip_knn_top.sv` | NUM_PE PEs + global merger |
| `rtl/knn_pe.sv` | one PE: control, ping-pong buffers, sorter feeders, output stream |
| `rtl/load_buf.sv` | burst reader writing a tile into a search buffer |
| `rtl/dist_calc.sv` | reads a tile, writes DIST_FACTOR distances per step |
| `rtl/dist_unit.sv` | combinational distance of M lanes (adder tree) |
| `rtl/fp32_add.sv`, `rtl/fp32_mul.sv` | combinational float32 add / multiply |
| `rtl/sdp_ram.sv` | simple dual-port RAM, registered read |
| `rtl/topk_sorter.sv` | the two-phase compare-and-swap sorter |
| `rtl/local_topk_merger.sv` | merges SORT_FACTOR lists in a PE |
| `rtl/global_topk_merger.sv` | merges NUM_PE streamed lists |
| `tb/mem_bank_model.sv` | behavioural memory bank: fixed latency, optional random gaps, data computed from the address |
| `tb/tb_fp_pkg.sv` | testbench reference models (float arithmetic on `real`, reference distance with the same tree order) |

## Simulation

Each testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Build any of them with plain Verilator
5; the package files go first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_chip_knn_top \
    rtl/knn_pkg.sv tb/tb_fp_pkg.sv $(ls rtl/*.sv | grep -v knn_pkg) \
    tb/mem_bank_model.sv tb/tb_chip_knn_top.sv
./obj_dir/Vtb_chip_knn_top
```

| testbench | what it covers |
|---|---|
| `tb_fp32_add`, `tb_fp32_mul` | 35,000 random and corner operand pairs each against a `real` model |
| `tb_dist_unit` | both metrics, 16 and 3 lanes |
| `tb_topk_sorter` | random streams, K=10 and K=5 (odd), ties, clear; checks II = 3 |
| `tb_local_topk_merger`, `tb_global_topk_merger` | merged result and cycle count; backpressure on the PE streams |
| `tb_load_buf` | burst of 2,048 words with and without memory gaps, cycle count |
| `tb_dist_calc` | DIST_FACTOR > 1, = 1 and DIST_II > 1, both metrics |
| `tb_knn_pe` | three PE shapes (one at the defaults), partial tiles, gaps, output backpressure, both metrics |
| `tb_chip_knn_top` | 3 PEs, 4 queries alternating metric; counts and requires stage overlap, masked points, memory gaps, held outputs, local merges and metric switches |
| `tb_chip_knn_full` | the top with every parameter at its default (28 PEs, one tile each), checked against a software search |
| `tb_table3_configs` | one PE at each of the seven configurations below, one full tile, correct top-10 and stage cycle counts |

Run with `+verilator+rand+reset+2` to start from random register values;
all testbenches pass that way.

## Per-tile stage cycles

`tb_table3_configs` builds one PE per configuration of the original
accelerator's evaluation (K=10, 128 KB tiles) and measures each stage on one
tile. The reference column is the cycle count reported for the original
HLS implementation.

| D | port | SF | load (ref) | distance (ref) | sort (ref) |
|---|---|---|---|---|---|
| 2 | 256 | 12 | 4,107 (4,315) | 4,098 (4,230) | 4,130 (4,257) |
| 4 | 512 | 12 | 2,059 (2,247) | 2,050 (2,096) | 2,081 (2,105) |
| 8 | 512 | 6 | 2,059 (2,300) | 2,050 (2,172) | 2,081 (2,147) |
| 16 | 512 | 3 | 2,059 (2,264) | 2,050 (2,193) | 2,081 (2,102) |
| 32 | 512 | 3 | 2,059 (2,264) | 2,050 (2,313) | 1,058 (1,043) |
| 64 | 512 | 1 | 2,059 (2,247) | 2,050 (2,027) | 1,568 (1,568) |
| 128 | 256 | 1 | 4,107 (4,215) | 4,098 (4,259) | 800 (2,951) |

Load and distance track the reference to within 12%; the gap is memory and
pipeline overhead of the original that the memory model here does not have.
Sorting matches except at D=128, where the original sorter is slower than its
item count explains; here it costs `(B/SF + K)·3` cycles.

## Where this design departs from the original

* **Distance initiation interval for wide points.** `DIST_II` here is
  `D/LANES` (2 for D=32, 4 for D=64, 16 for D=128 at 256 bits), which gives
  one word per cycle and the reported per-tile distance cycles. The original's
  configuration table lists 3 and 12 for D=64 and D=128, which does not agree
  with its own cycle counts; the cycle counts were followed.
* **Metric at run time.** The original fixes the metric when the accelerator
  is generated; here `metric` is an input, so one build serves both.
* **One module.** The original builds one kernel per FPGA die plus a merger
  kernel, linked by on-chip streams. Here everything is one module with the
  same streams; splitting it per die is a placement matter.
* **Query and results on ports.** The original reads the query from and
  writes the result to device memory; here they are ports of the top.
* **Partial tiles.** The original assumes the data fill whole tiles; here
  `pe_points` marks the end of each partition and the rest of its last tile
  is ignored.
* **Odd K.** The original's compare loops, taken literally, reach one slot
  past the K+1 used; here the pairs stay inside slots 0..K, which is still a
  correct sort (tested with K=5).
* **Own choices where the original says nothing:** the memory port protocol,
  the stream handshake, ids, reset, rounding and subnormal handling, the
  step-lock pipeline control and the cyclic distance banking.
* **Not included:** the design-space exploration tool that picks the
  parameters, the memory banks and their controllers (a behavioural model is
  used in simulation), and the host software.

## Trust and limits

All blocks are exercised by the testbenches above, against independent
software models, and each testbench has been shown to fail on a deliberately
broken copy of its module. The end-to-end test at full size covers one tile
per PE (57,344 points); multi-tile operation is covered at full PE size
(`tb_knn_pe`, 3 tiles) and with small parameters at the top. Synthesis
timing has not been studied: the distance unit is one long combinational
path (subtract, square, log2(LANES) adder levels) and would need pipeline
registers to reach a few hundred MHz on an FPGA.

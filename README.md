# Sparse 3D/4D point-cloud convolution with a hopping-index rule book

Point clouds from LIDAR or depth sensors are extremely sparse once voxelised:
well over 90 % of a 3D grid, and over 99 % of a 4D (space + time) grid, is
empty. A dense CNN spends almost all of its work on zeros. A sparse CNN stores
only the occupied points, each as a coordinate plus a feature vector, and
convolves only between points that are actually neighbours. The catch is that
the spatial structure is gone. Someone has to work out, for every point, which
other points fall inside the kernel window and at which kernel offset. That
list of (input, kernel offset, output) triples is the **rule book**.

This RTL is an accelerator for that scheme, modelled on the 65 nm SCNN chip in
*"A Sparse Convolution Neural Network Accelerator for 3D/4D Point-Cloud Image
Recognition on Low Power Mobile Device with Hopping-Index Rule Book for
Efficient Coordinate Management"*. It builds the rule book in hardware. It then
streams the convolution through the same 10 x 10 array of 8-bit processing
elements that built the rule book. The rule book is not a hash table. It is a
chain of plain memory indirections, the *hopping-index rule book* (HIRB):

```
 input_mem[i] = {features, end_i} --end_i--> index_mem[end_(i-1) .. end_i - 1] = {kidx, target}
                                                     |               |
                                                     v               v
                                         weight_lut[kidx] (10x10)   out_accum[target] += ...
```

Sections below follow the order data takes through the chip. The part that
takes most thought is the coordinate manager (section 3).

## 1. One layer, step by step

`scnn_top` processes one sub-space of at most `NPTS` = 1024 points per run. It
does not tile a scene into sub-spaces or split the channels into tiles; the
host does both.

1. **Load.** The host writes the coordinates, *sorted* by X, then Y, Z and T,
   into `coord_mem`. It writes 10 input-channel features per point into
   `input_mem` and the 10 x 10 weight matrix of each kernel offset into
   `weight_lut`.
2. **Coordinate management (CM)**, which needs `run_cm`. `top_ctrl` switches the
   PE array to DIST mode. `coord_manager` writes the rule book into `index_mem`
   and each point's end address into `input_mem`.
3. **Clear.** The output accumulators 0..n-1 are zeroed, one per cycle.
4. **Sparse convolution (SC)**, which needs `run_sc`. The PE array is switched
   to MAC mode. `scnn_engine` walks the rule book and `out_accum` sums the
   results.
5. **Readout.** The host reads each output point through `post_proc`, which
   applies ReLU, a right shift and saturation to int8. The raw 24-bit
   accumulators are also available.

A run with `run_sc` alone reuses the rule book already in the index memory.
Successive layers that keep the same coordinates (stride 1) can skip CM this
way.

## 2. The hopping-index rule book

| memory      | one entry                                   | written by     | default depth |
|-------------|---------------------------------------------|----------------|---------------|
| `coord_mem` | (X, Y, Z, T), 8 bit each                    | host           | 1024          |
| `input_mem` | 10 x int8 features + 16-bit end address     | host / CM      | 1024          |
| `index_mem` | 8-bit kernel index + 16-bit target address  | CM             | 16384         |
| `weight_lut`| 10 x 10 int8 weights of one kernel offset   | host           | 128           |
| `out_accum` | 10 x 24-bit accumulators                    | SC             | 1024          |

The rules of input `i` occupy `index_mem[end(i-1) .. end(i)-1]`, with
`end(-1) = 0`. A rule carries a kernel index, not weights. All channel pairs
share that index, and it selects a whole 10 x 10 matrix from the LUT, so
weights are stored once per offset instead of once per rule.

Together the memories hold about 100.9 kB; the original chip lists 108.5 kB of
on-chip memory. It does not say how that is split, so the depths above are
this design's choice.

## 3. Coordinate manager: building the rule book

**Neighbour test.** Points p and q are neighbours when every per-axis distance
satisfies |p_a - q_a| <= `thr`. T takes part only in 4D mode (`dim4`). This is
exactly the (2 thr + 1)^D kernel window. Each point is its own neighbour, at
the centre offset. Outputs are the input points (submanifold convolution).

2D data fits the same scheme: give every point the same Z (and T) and use 3D
mode. Only the 9 offsets with dz = 0 are then used.

**Kernel index.** A rule from input p to output q uses

    kidx = sum over a in {X=0, Y=1, Z=2, T=3} of (p_a - q_a + thr) * K^a,   K = 2 thr + 1

In 3D mode the T term is left out. `weight_lut` has 128 entries, so `thr` may
be at most 1 in 4D (81 offsets) and at most 2 in 3D (125 offsets).

**Search narrowing.** The points are sorted with X as the major key, so all
candidates with |dx| <= thr form one contiguous address range. The manager
keeps a window-start pointer that only ever moves forward. When a query begins,
the pointer is advanced past candidates with dx < -thr. The scan for that query
ends at the first block that holds a candidate with dx > thr.

**Blocks and partial distances.** Candidates are fetched ten at a time, one per
PE-array row, and the array computes per-axis differences in DIST mode:

* Phase 1 turns on only the X, Z and T columns. A candidate survives if it is
  in the X window and within `thr` in Z and (in 4D) T.
* Phase 2 turns on only the Y column. It runs only if some candidate survived
  phase 1. Otherwise the block ends there, saving the phase-2 cycles and the
  array activity. `skip_cnt` counts these skipped phase 2s.
* Survivors of both phases are written as rules, one per cycle, in increasing
  target order.

**Cost.** Each block takes 4 cycles, plus 2 when phase 2 runs, plus one cycle
per rule written. Each query adds 3 cycles.

**Overflow.** If more rules are found than `index_mem` holds, the extra rules
are dropped, `overflow` is set and the end addresses saturate at the depth. The
convolution that follows is then incomplete, so the host should split the
sub-space.

**Measured narrowing.** On a full 1024-point 3D sub-space (`tb_scnn_top_full`),
the manager evaluates 10 714 candidate blocks. A sequential all-pairs search
would need 1024 x 103 = 105 472 blocks, so that is about 9.8 times fewer. In
4D it evaluates 19 869 blocks, about 5.3 times fewer, and 12 % of them end
after phase 1.

**How this differs from the original.** The original chip also uses an octree
to narrow the search; its levels and tables are not public in enough detail to
rebuild. This design narrows along the sorted X order only. On a 1024-point
sub-space it scans all points in a slab of 2 thr + 1 X values. As a result, CM
takes about 10 times as many cycles as SC here (3D, 1024 points: 81 k CM cycles
against 8 k SC cycles). The original chip reports 14.7 % of runtime for
coordinate management. Closing that gap needs a finer spatial index, for
example slice start tables per X value with early exit in Y.

## 4. The reconfigurable PE array

`pe_array` holds 10 x 10 `scnn_pe` elements. Results are registered, one cycle
after `en`.

* **MAC mode.** Row r receives input channel r of the current point. PE (r,c)
  receives the weight from input channel r to output channel c. Each column sums
  its 10 products, so one rule gives 10 output-channel partial sums in one
  cycle. Channel counts above 10 are handled by the host, one 10 x 10 channel
  tile per run.
* **DIST mode.** Column a receives axis a of the query point. PE (r,a) receives
  axis a of candidate r and returns the signed difference. The `col_en` input
  switches columns off, which is how the phases above compute only part of the
  distance.

## 5. Sparse convolution engine and output side

`scnn_engine` is input-stationary. It fetches point i (its features and end
address), then issues one rule per cycle until it reaches the end address. Each
rule passes through a 4-stage pipeline:

1. index-memory read;
2. weight-LUT read;
3. PE array;
4. accumulate.

Fetching each input point costs 3 cycles, so a layer takes about
`rules + 3 * n_pts` cycles. For example, 4076 rules over 1024 points take 8181
cycles, clear and drain included.

`out_accum` does a two-stage read-modify-write on a synchronous memory. It
forwards the value it wrote in the previous cycle when the next rule hits the
same target. Rule books from the coordinate manager never produce such a pair,
so in the full design this path is only a safeguard.

`post_proc` computes `sat_int8(relu(acc) >>> shift)`. The original chip only
names a post-processing stage; its contents are this design's choice.

## 6. Interfaces and timing

All logic runs on one clock, `clk`, with an asynchronous active-low reset,
`rst_n`. The original chip runs up to 300 MHz; no timing closure has been done
for this RTL.

* **Load ports** (`coord_*`, `feat_*`, `w_*`) write in the cycle their enable is
  high. Do not load while `busy` is high.
* **Run control.** `start` is a one-cycle pulse. `run_cm` and `run_sc` select
  the phases. `n_pts`, `dim4`, `thr`, `relu_en` and `shift` must stay stable
  until `done`, which pulses for one cycle.
* **Status.** `n_rules`, `overflow`, `skip_cnt`, `winadv_cnt` and `block_cnt`
  report on CM. `mac_rules` reports on SC. `cm_cycles` and `sc_cycles` give the
  cycles spent in each phase.
* **Readout.** `rd_en`/`rd_addr` in cycle t gives `rd_valid`, `rd_data` (int8)
  and `rd_acc` (24-bit) in cycle t+2.

Shared types and widths are in `rtl/scnn_pkg.sv`.

## 7. Parameters

| parameter   | default | origin                                                |
|-------------|---------|-------------------------------------------------------|
| `PE_ROWS`, `PE_COLS` | 10 | 10 x 10 PE array of the original chip        |
| `DATA_W`    | 8       | 8-bit (INT8) datapath of the original chip            |
| `END_W`     | 16      | 16-bit end address of the original chip               |
| `KIDX_W`    | 8       | 8-bit kernel index of the original chip               |
| `NPTS`      | 1024    | design choice (points per sub-space)                  |
| `IDX_DEPTH` | 16384   | design choice (16 rules per point on average)         |
| `LUT_DEPTH` | 128     | design choice (covers 81 4D / 125 3D offsets)         |
| `ACC_W`     | 24      | design choice                                         |
| `COORD_W`   | 8       | design choice                                         |

`NPTS`, `IDX_DEPTH` and `LUT_DEPTH` are parameters of `scnn_top`. The other
values are package constants.

## 8. What is not here

* The on-chip oscillator (DCO) and the scan/test interface of the original chip.
  Clock and host ports replace them.
* The octree levels of the neighbour search (see section 3).
* Tiling of scenes into sub-spaces and of channels into 10 x 10 tiles. Both are
  left to the host.
* Writing results back into the input memory for the next layer. The host reads
  them out and reloads them.

## 9. Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_scnn_pe`         | products and coordinate differences, corners and random values |
| `tb_pe_array`        | column sums and per-PE differences against dot-product and difference references, column gating, hold |
| `tb_coord_mem`, `tb_input_mem`, `tb_index_mem`, `tb_weight_lut` | write/read-back against shadow copies |
| `tb_out_accum`       | random accumulation stream with frequent same-target hits against a model; the bypass must fire |
| `tb_post_proc`       | ReLU/shift/saturate against a reference |
| `tb_top_ctrl`        | phase order, clear range, array mode per phase, done/busy, with stub sub-blocks |
| `tb_coord_manager`   | rule book and end addresses against a brute-force all-pairs search (3D, 4D, thr 2, one point, overflow); skip and window advance must occur |
| `tb_scnn_engine`     | accumulation stream against a direct evaluation of a random rule book; rate of one rule per cycle plus 3 cycles per point |
| `tb_scnn_top`        | whole layers at 64 points / 512 rules against a direct sparse convolution computed from coordinates: 3D, rule-book reuse, 4D, thr 2, overflow; every mechanism must occur |
| `tb_scnn_top_full`   | default sizes: full 1024-point 3D and 4D sub-spaces, every output checked |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/scnn_pkg.sv tb/tb_scnn_top_full.sv --top-module tb_scnn_top_full
./obj_dir/Vtb_scnn_top_full
```

The full-size test finishes in about a second. The test point clouds are drawn
by walking a small grid in X, Y, Z, T order and keeping each cell at random.
The points therefore come out already sorted and free of duplicates, as the
hardware requires.

## 10. Workloads

The original chip was evaluated on ScanNet (3D) and Synthia 4D segmentation
with MinkowskiNet-style networks. Their scene sizes and channel counts are not
given there. From general knowledge, such scenes hold 10^5 points or more and
the networks use 32 to 256 channels. A whole scene therefore never fits at
once; it runs as sub-spaces of up to 1024 points and as 10 x 10 channel tiles.

`tb_scnn_top_full` runs one such 3D layer and one 4D layer on full 1024-point
sub-spaces, using synthetic clouds. Per sub-space, the design checks these:

* A 3x3x3 kernel needs 27 LUT entries and a 3x3x3x3 kernel 81, against the 128
  built.
* The rule book fits while a sub-space averages at most 16 neighbours per point.
  The 1024-point test clouds average 4.0 (3D) and 8.3 (4D).

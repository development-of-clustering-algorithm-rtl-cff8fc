# Streaming pixel clustering for detector readout FPGAs

When a charged particle crosses a hybrid pixel detector (Medipix / Timepix style), the charge it
frees spreads over several neighbouring pixels. The particle's energy is only recovered by
adding up the signals of all touching pixels: a **cluster**. Clustering is normally done in
software after the whole data set has been stored. This design does it in the readout FPGA,
while the pixels stream in. It sends out one record per cluster, with pixel count, summed energy
and energy-weighted centre, instead of the raw pixels. Clusters are reported as soon as they
can no longer grow, not only at the end of the frame.

Two pixels belong to the same cluster when they share an edge **or a corner** (8-neighbourhood).

The algorithm follows the published method "Development of Clustering Algorithm for Pixel
Detectors for FPGA". The two-row bitmap, matching by AND/OR, merging by OR, the sequential
pairwise scan of the cluster store and the completion rule come from that method. Widths,
handshakes, memory organisation, the sorter's method, the centroid arithmetic and the error
handling are choices made here. Each file's header says which is which.

## The cluster bitmap

The central trick is how a cluster is stored so that "do these two clusters touch?" becomes a
bit operation.

Every pixel at (x, y) is drawn into a bitmap as a 2 x 2 footprint: bits (x, y), (x+1, y),
(x, y+1) and (x+1, y+1). Two pixels' footprints overlap exactly when |dx| <= 1 and |dy| <= 1,
that is, when they touch. So two clusters touch if and only if the AND of their bitmaps is
non-zero, and the bitmap of the joined cluster is the OR of the two.

A whole-detector bitmap per cluster would cost 65536 bits for a 256 x 256 matrix. This design
relies on the input being **sorted by {y, x}**. Then a cluster can only grow at its top edge,
and only two bitmap rows need to be kept:

| field    | content                                                     |
|----------|-------------------------------------------------------------|
| `last_y` | highest pixel row of the cluster                            |
| `row_lo` | footprint bits in row `last_y` (from rows `last_y-1`, `last_y`) |
| `row_hi` | footprint bits in row `last_y+1` (from row `last_y`)        |
| sums     | `npix`, `esum` = sum E, `sum_xe` = sum x*E, `sum_ye` = sum y*E |

A new pixel is always in the current row `cur_y`. A stored cluster is compared with it after
**alignment** (`cluster_align`):

* `last_y == cur_y`: used as is;
* `last_y == cur_y - 1`: `row_hi` becomes the lower row and the upper row is empty;
* `last_y <= cur_y - 2`: no later pixel can reach it. The cluster is **complete** and is sent
  out.

The aligned copy is only used for the comparison. A cluster that stays in memory keeps its own
rows and `last_y`; otherwise an idle cluster would be shifted up row after row and never
complete.

For the last column the x+1 bit is dropped. The overlap test stays exact, because no pixel lies
beyond that column.

## One pass over the store per pixel

`cluster_engine` holds the open clusters in `cluster_memory`, a circular queue. For every
pixel:

1. **accept** (1 clock): the pixel becomes the working cluster W (`pixel_to_cluster`).
2. **scan** (1 clock per stored cluster): pop the head C and align it to the pixel's row.
   * C is complete: send it to the output (stalls while the output is not ready);
   * C touches W (`cluster_match`): W := W joined with C (`cluster_merge`). C is dropped, and
     the grown W is compared with the rest;
   * otherwise push C back at the tail, unchanged.
3. **write** (1 clock): push W.

After each pass the store holds clusters that are pairwise not joinable. A pixel can join up to
three earlier clusters (left, lower-left and lower-right neighbours), and the scan handles any
number. An end-of-frame token flushes every stored cluster and is then passed on.

**Cost.** A pixel takes n + 2 clocks when n clusters are open, plus any output stalls. At low
occupancy, n grows with the hit density, so the time per frame grows quadratically with the
pixel count. At high occupancy, pixels join existing clusters instead of opening new ones,
so n and the time fall again. `tb_occupancy_sweep` measures this with one 256 x 256 frame per
hit probability p = 0.001 + 0.005 k (k = 0 .. 99), sorted input, output always ready:

| p      | pixels | clusters | clocks per frame |
|--------|-------:|---------:|-----------------:|
| 0.001  |     65 |       65 |              916 |
| 0.041  |  2 705 |    2 268 |           73 111 |
| 0.081  |  5 093 |    3 640 |          187 015 |
| 0.161  | 10 505 |    4 807 |          531 523 |
| 0.241  | 15 811 |    4 253 |          887 836 |
| 0.321  | 21 036 |    2 730 |        1 118 772 |
| 0.401  | 26 283 |    1 152 |          985 381 |
| 0.481  | 31 504 |      355 |          546 307 |
| 0.496  | 32 723 |      253 |          451 770 |

The peak lies near 22 000 pixels, at about 1.1 million clocks. The sweep runs one frame per
step, so single points scatter with the random hit pattern.

The clock counts include the centroid unit's back-pressure: it takes 13 clocks per cluster,
and the engine waits while it is busy. These are this implementation's numbers. The published
method reports the same rise-and-fall shape, peaking near 17 000 pixels at about 1.6 million
clocks, but not the cost of each step. Absolute clock counts will differ from other
implementations.

**Capacity.** With sorted input, open clusters end either in the current row or in the row
below. No more than COLS/2 clusters can end in one row, so at most COLS = 256 are open at a
time. `MAX_CLUSTERS` defaults to 256, and the store cannot overflow on sorted input. If it is
made smaller, or the input breaks the order, a full store makes the engine send W out unjoined
and pulse `overflow`. No energy is lost, but that cluster may come out in pieces.

## Sorted input and the sorter

Some detectors read out in {y, x} order; others do not. `pixel_sorter` makes any frame sorted.
It collects the frame in a frame buffer: one 14-bit energy word per pixel, plus one 256-bit
occupancy word per row. At the end-of-frame token it drains the buffer row by row. A priority
encoder picks the lowest occupied column, and the pixel is sent and its bit cleared. An empty
row is skipped in one clock. The drain therefore takes at most pixels + ROWS + 1 clocks, and
leaves the buffer empty for the next frame. A pixel sent twice keeps its last energy. No input
is accepted while the sorter drains, or during the ROWS clocks after reset while it clears its
occupancy memory.

With the sorter in the path, clusters come out only after the whole frame has arrived. Without
it (`sort_en = 0`), clusters come out during readout.

The engine checks the order itself. A pixel that does not come after the previous one in the
same frame pulses `order_err`. The engine still processes it, but that frame may be clustered
wrongly.

## Centroids

`centroid_unit` turns the sums into the energy-weighted centre:

    cx = floor((sum_xe << 4) / esum),   cy likewise

This is unsigned fixed point with 4 fractional bits (8.4 for a 256-pixel axis). Two restoring
dividers run side by side, one quotient bit per clock. Because x < 256, the quotient is known
to fit in 12 bits, so 12 steps suffice. Truncation limits the resolution to 1/16 pixel, far
below any detector's spatial resolution. A cluster with zero energy gets (0, 0).

## Interfaces

Every stream uses valid/ready: an item moves on a rising clock edge where both are high. The
sender must hold the item while valid is high and ready is low. A frame is a sequence of
pixels followed by one token with `eof = 1`; the token carries no data.

Top level `pixel_clustering_top` (parameter `MAX_CLUSTERS`, default 256):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `sort_en` | in | 1 | 1: input goes through the sorter. Change only between frames. |
| `in_valid`, `in_ready`, `in_eof` | in/out/in | 1 | input stream |
| `in_pix` | in | 30 | `pixel_t` {y[7:0], x[7:0], e[13:0]} |
| `out_valid`, `out_ready`, `out_eof` | out/in/out | 1 | output stream |
| `out_cl` | out | 63 | `cluster_out_t` {npix[16:0], esum[29:0], cx[11:0], cy[11:0], last_y[7:0]} |
| `order_err` | out | 1 | one-clock pulse: input pixel out of {y, x} order |
| `overflow` | out | 1 | one-clock pulse: cluster store full, cluster sent out unjoined |

All types and widths are in `rtl/clust_pkg.sv`. The matrix size is set by `COLS` and `ROWS`
there, the energy width by `EW`, and the centroid fraction by `FRAC`; the sum widths follow
from them.

## Files

| file | block |
|------|-------|
| `rtl/clust_pkg.sv` | shared types and sizes |
| `rtl/pixel_to_cluster.sv` | pixel to one-pixel cluster (2 x 2 footprint) |
| `rtl/cluster_align.sv` | row alignment and completion test |
| `rtl/cluster_match.sv` | AND of bitmaps, OR of result bits |
| `rtl/cluster_merge.sv` | OR of bitmaps, sums added |
| `rtl/cluster_memory.sv` | circular queue of open clusters |
| `rtl/cluster_engine.sv` | scan controller |
| `rtl/centroid_unit.sv` | energy-weighted centre |
| `rtl/pixel_sorter.sv` | frame-buffer sorter |
| `rtl/pixel_clustering_top.sv` | sorter, engine and centroid unit in a chain |

Each `tb/tb_<module>.sv` tests one module. `tb/tb_ref_pkg.sv` is the reference: a flood fill
over a whole frame held as an array. It shares no code with the RTL.

## Verification

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

* Unit tests check footprints bit by bit, alignment and completion, matching against a direct
  neighbour test, merging, and the queue against a model.
* `tb_cluster_engine` compares every cluster with the flood-fill reference over random frames
  at several densities, with output back-pressure. It checks the n + 2 clock cost per pixel
  exactly, and forces an order error and a store overflow.
* `tb_pixel_sorter` checks order, energies, repeated pixels, an empty frame, and the drain time
  bound.
* `tb_centroid_unit` checks the quotients, pass-through fields, tokens, and a latency of
  12 clocks.
* `tb_pixel_clustering_top` runs both input modes, switches between them, and counts every
  mechanism (merge, early output, flush, stall, sorter, mode switch, order error, overflow).
  It uses a second instance with `MAX_CLUSTERS = 4` for the overflow.
* `tb_full_frame` runs whole 256 x 256 frames at the default parameters, at four points of
  the sweep plus one frame through the sorter, and compares every cluster with the reference.
* `tb_occupancy_sweep` runs the 100-step sweep above (one frame per step, about a minute of
  simulation). It checks every cluster, and checks that the curve rises steeply, peaks at an
  intermediate occupancy and falls again.

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
      rtl/clust_pkg.sv tb/tb_ref_pkg.sv tb/tb_full_frame.sv --top-module tb_full_frame
    ./obj_dir/Vtb_full_frame

Replace the testbench name to run another; `tb_ref_pkg.sv` is only needed by the engine, top
and full-frame tests. The full-frame test takes a few seconds.

## Limits and open points

* **Memory style.** The cluster store and the sorter's memories are read asynchronously. On an
  FPGA they would map to distributed RAM or registers. Block RAM would need a registered read
  and a one-clock prefetch in the scan.
* **Throughput.** The scan visits one stored cluster per clock, and the centroid unit handles
  one cluster at a time. A small FIFO between engine and centroid unit would remove the stalls
  that completed clusters cause in the scan; it is not included.
* **Frame format.** Pixel packet formats, serial links and detector control of real readout
  systems are not modelled. The design starts at decoded {x, y, energy} pixels.
* **Unsorted input without the sorter** is processed, but the result is not guaranteed; only
  `order_err` reports it.

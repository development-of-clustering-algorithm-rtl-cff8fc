// pixel_to_cluster: turns one received pixel into the cluster data format.
//
// A pixel at (x, y) with energy E becomes a one-pixel cluster whose two-row bitmap has bits x
// and x+1 set in row y (row_lo) and in row y+1 (row_hi). This 2 x 2 footprint is what lets a
// single AND/OR test decide whether two clusters share an edge or a corner. Bit x+1 is
// dropped for the last column: no pixel lies beyond it, and the test stays exact. The sums
// start at npix = 1, E, x*E and y*E. Purely combinational, no clock.
module pixel_to_cluster
  import clust_pkg::*;
(
  input  pixel_t   pix,
  output cluster_t cl
);
  logic [COLS-1:0] bits;

  always_comb begin
    bits = '0;
    bits[pix.x] = 1'b1;
    if (pix.x != XW'(COLS - 1)) bits[pix.x + XW'(1)] = 1'b1;

    cl.row_lo   = bits;
    cl.row_hi   = bits;
    cl.s.npix   = NPIXW'(1);
    cl.s.esum   = ESUMW'(pix.e);
    cl.s.sum_xe = XSUMW'(pix.e) * XSUMW'(pix.x);
    cl.s.sum_ye = YSUMW'(pix.e) * YSUMW'(pix.y);
    cl.s.last_y = pix.y;
  end
endmodule

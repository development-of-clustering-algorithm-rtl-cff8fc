// cluster_merge: joins two aligned clusters into one.
//
// The bitmaps of the joined cluster are the bitwise OR of the two inputs' bitmaps; pixel
// count, energy sum and the x*E and y*E sums are added. Both inputs must be aligned to the
// same row, whose number is taken from input a. Combinational.
module cluster_merge
  import clust_pkg::*;
(
  input  cluster_t a,
  input  cluster_t b,
  output cluster_t m
);
  always_comb begin
    m.row_lo   = a.row_lo | b.row_lo;
    m.row_hi   = a.row_hi | b.row_hi;
    m.s.npix   = a.s.npix + b.s.npix;
    m.s.esum   = a.s.esum + b.s.esum;
    m.s.sum_xe = a.s.sum_xe + b.s.sum_xe;
    m.s.sum_ye = a.s.sum_ye + b.s.sum_ye;
    m.s.last_y = a.s.last_y;
  end
endmodule

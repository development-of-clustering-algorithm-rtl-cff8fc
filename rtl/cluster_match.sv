// cluster_match: decides whether two aligned clusters belong together.
//
// Both two-row bitmaps must refer to the same rows (see cluster_align). The bitmaps are ANDed
// bit by bit and all result bits are ORed: a 1 means the clusters share an edge or a corner.
// Combinational.
module cluster_match
  import clust_pkg::*;
(
  input  cluster_t a,
  input  cluster_t b,
  output logic     hit
);
  assign hit = |{a.row_lo & b.row_lo, a.row_hi & b.row_hi};
endmodule

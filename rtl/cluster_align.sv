// cluster_align: brings a stored cluster into the frame of the row now being received.
//
// Input pixels arrive sorted by {y, x}, so a cluster can only grow at its top. A stored cluster
// keeps two bitmap rows relative to its own highest pixel row last_y. For the current row cur_y:
//   last_y == cur_y      the cluster is already aligned and is passed on unchanged;
//   last_y == cur_y - 1  its upper row becomes the lower row, the upper row is cleared and
//                        last_y is moved to cur_y;
//   last_y <  cur_y - 1  nothing received from now on can touch it: complete is raised.
// A cluster above cur_y can only come from input that breaks the sort order; it is passed on
// unchanged (the clustering of such input is not guaranteed). Combinational.
module cluster_align
  import clust_pkg::*;
(
  input  cluster_t      c,
  input  logic [YW-1:0] cur_y,
  output cluster_t      a,
  output logic          complete
);
  logic [YW:0] next_y;

  always_comb begin
    next_y   = {1'b0, c.s.last_y} + (YW+1)'(1);
    a        = c;
    complete = 1'b0;
    if (c.s.last_y == cur_y) begin
      a = c;
    end else if (next_y == {1'b0, cur_y}) begin
      a.row_lo   = c.row_hi;
      a.row_hi   = '0;
      a.s.last_y = cur_y;
    end else if (next_y < {1'b0, cur_y}) begin
      complete = 1'b1;
    end
  end
endmodule

// pixel_clustering_top: clustering of pixel-detector data inside the readout FPGA.
//
// A stream of hit pixels (x, y, energy) from one detector frame goes in; a stream of clusters
// (groups of touching pixels, corners included) comes out, each with its pixel count, summed
// energy and energy-weighted centre. The chain is
//   [pixel_sorter] -> cluster_engine -> centroid_unit
// The engine needs its input sorted by {y, x}. For a detector that already sends its pixels in
// that order, sort_en = 0 feeds the engine directly and clusters start to come out during
// readout; for one that does not, sort_en = 1 routes the frame through the frame-buffer sorter
// first. sort_en must only change between frames, while no frame is in flight.
//
// Interface: valid/ready streams. Input frame = pixels, then one token with in_eof = 1.
// Output = clusters, then one token with out_eof = 1 once the frame is fully clustered.
// order_err and overflow are one-clock status pulses from the engine (see cluster_engine).
// Timing: set by the engine, n + 2 clocks per pixel with n open clusters, plus 13 clocks per
// cluster in the centroid unit, which overlap with the engine's work.
module pixel_clustering_top
  import clust_pkg::*;
#(
  parameter int unsigned MAX_CLUSTERS = COLS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sort_en,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_eof,
  input  pixel_t       in_pix,
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_eof,
  output cluster_out_t out_cl,
  output logic         order_err,
  output logic         overflow
);
  // sorter
  logic   s_in_valid, s_in_ready, s_out_valid, s_out_ready, s_out_eof;
  pixel_t s_out_pix;
  // engine
  logic   e_in_valid, e_in_ready, e_in_eof;
  pixel_t e_in_pix;
  logic   e_out_valid, e_out_ready, e_out_eof;
  csum_t  e_out_sum;

  assign s_in_valid  = sort_en && in_valid;
  assign s_out_ready = sort_en && e_in_ready;
  assign in_ready    = sort_en ? s_in_ready : e_in_ready;

  assign e_in_valid  = sort_en ? s_out_valid : in_valid;
  assign e_in_eof    = sort_en ? s_out_eof   : in_eof;
  assign e_in_pix    = sort_en ? s_out_pix   : in_pix;

  pixel_sorter u_sorter (
    .clk, .rst_n,
    .in_valid(s_in_valid), .in_ready(s_in_ready), .in_eof(in_eof), .in_pix(in_pix),
    .out_valid(s_out_valid), .out_ready(s_out_ready), .out_eof(s_out_eof), .out_pix(s_out_pix)
  );

  cluster_engine #(.MAX_CLUSTERS(MAX_CLUSTERS)) u_engine (
    .clk, .rst_n,
    .in_valid(e_in_valid), .in_ready(e_in_ready), .in_eof(e_in_eof), .in_pix(e_in_pix),
    .out_valid(e_out_valid), .out_ready(e_out_ready), .out_eof(e_out_eof), .out_sum(e_out_sum),
    .order_err, .overflow
  );

  centroid_unit u_centroid (
    .clk, .rst_n,
    .in_valid(e_out_valid), .in_ready(e_out_ready), .in_eof(e_out_eof), .in_sum(e_out_sum),
    .out_valid, .out_ready, .out_eof, .out_cl
  );
endmodule

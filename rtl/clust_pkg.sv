// clust_pkg: types and constants shared by the pixel clustering pipeline.
//
// The detector is a 256 x 256 pixel matrix (a full-detector bitmap of one bit per pixel is
// 8 KB, the size quoted for the brute-force variant). Pixels arrive as {y, x, energy}.
// A cluster in flight is stored as a two-row bitmap: row_lo holds the dilated pixels of the
// cluster's highest pixel row (last_y), row_hi those of row last_y + 1. A pixel at (x, y) sets
// the bits x and x+1 in rows y and y+1, so two clusters touch (share an edge or a corner)
// exactly when their bitmaps overlap. Beside the bitmap a cluster carries the sums needed for
// its energy and energy-weighted centre: pixel count, energy sum, sum of x*E and of y*E.
// The energy width (14 bits) and all sum widths are choices of this design.
package clust_pkg;

  localparam int unsigned COLS   = 256;             // detector columns (x)
  localparam int unsigned ROWS   = 256;             // detector rows (y)
  localparam int unsigned XW     = $clog2(COLS);    // 8
  localparam int unsigned YW     = $clog2(ROWS);    // 8
  localparam int unsigned EW     = 14;              // pixel energy (counts)
  localparam int unsigned NPIXW  = XW + YW + 1;     // pixel count, up to a full frame
  localparam int unsigned ESUMW  = EW + XW + YW;    // energy sum
  localparam int unsigned XSUMW  = ESUMW + XW;      // sum of x * E
  localparam int unsigned YSUMW  = ESUMW + YW;      // sum of y * E
  localparam int unsigned FRAC   = 4;               // fractional bits of a centroid
  localparam int unsigned CXW    = XW + FRAC;
  localparam int unsigned CYW    = YW + FRAC;

  typedef struct packed {
    logic [YW-1:0] y;
    logic [XW-1:0] x;
    logic [EW-1:0] e;
  } pixel_t;

  // Sums that travel with a cluster and leave the engine with it.
  typedef struct packed {
    logic [NPIXW-1:0] npix;
    logic [ESUMW-1:0] esum;
    logic [XSUMW-1:0] sum_xe;
    logic [YSUMW-1:0] sum_ye;
    logic [YW-1:0]    last_y;   // highest pixel row of the cluster
  } csum_t;

  typedef struct packed {
    logic [COLS-1:0] row_hi;    // bitmap row last_y + 1
    logic [COLS-1:0] row_lo;    // bitmap row last_y
    csum_t           s;
  } cluster_t;

  // Finished cluster as it leaves the centroid unit.
  typedef struct packed {
    logic [NPIXW-1:0] npix;
    logic [ESUMW-1:0] esum;
    logic [CXW-1:0]   cx;       // energy-weighted x, FRAC fractional bits, truncated
    logic [CYW-1:0]   cy;       // energy-weighted y, FRAC fractional bits, truncated
    logic [YW-1:0]    last_y;
  } cluster_out_t;

endpackage

// centroid_unit: energy-weighted average coordinates of each finished cluster.
//
// For every cluster leaving the clustering engine it computes
//   cx = (sum of x*E << FRAC) / (sum of E),   cy likewise with y,
// as unsigned fixed-point numbers with FRAC fractional bits, truncated toward zero. Both
// quotients come from one restoring divider each, running side by side, one quotient bit per
// clock. Because every x lies below COLS, the quotient is known to fit in CXW bits, so only CXW
// steps are needed. A cluster whose energy sum is zero gets cx = cy = 0. Frame-end tokens pass
// through unchanged. The energy-weighted centre is what the readout reports per cluster; the
// fixed-point format, truncation and the divider itself are this design's choices.
//
// Interface: valid/ready stream in (csum_t) and out (cluster_out_t), one cluster at a time.
// Timing: out_valid rises CXW clocks after the clock edge that accepts a cluster, one clock
// after it for a frame-end token or a zero-energy cluster; the result then waits for
// out_ready. One cluster is in flight at a time.
module centroid_unit
  import clust_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         in_eof,
  input  csum_t        in_sum,
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_eof,
  output cluster_out_t out_cl
);
  localparam int unsigned QW = (CXW > CYW) ? CXW : CYW;
  localparam int unsigned RW = ((XSUMW > YSUMW) ? XSUMW : YSUMW) + FRAC + 1;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_OUT} state_t;
  state_t state;

  logic [RW-1:0]         rem_x, rem_y, den;
  logic [QW-1:0]         qx, qy;
  logic [$clog2(QW)-1:0] bit_i;
  logic                  eof_q;
  logic [NPIXW-1:0]      npix_q;
  logic [ESUMW-1:0]      esum_q;
  logic [YW-1:0]         lasty_q;

  logic [RW-1:0]         tr;     // divisor shifted to the current quotient bit
  assign tr = den << bit_i;

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_eof   = eof_q;

  always_comb begin
    out_cl        = '0;
    out_cl.npix   = npix_q;
    out_cl.esum   = esum_q;
    out_cl.cx     = CXW'(qx);
    out_cl.cy     = CYW'(qy);
    out_cl.last_y = lasty_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rem_x <= '0;
      rem_y <= '0;
      den   <= '0;
      qx    <= '0;
      qy    <= '0;
      bit_i <= '0;
      eof_q <= 1'b0;
      npix_q  <= '0;
      esum_q  <= '0;
      lasty_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          eof_q <= in_eof;
          npix_q  <= in_eof ? '0 : in_sum.npix;
          esum_q  <= in_eof ? '0 : in_sum.esum;
          lasty_q <= in_eof ? '0 : in_sum.last_y;
          rem_x <= RW'(in_sum.sum_xe) << FRAC;
          rem_y <= RW'(in_sum.sum_ye) << FRAC;
          den   <= RW'(in_sum.esum);
          qx    <= '0;
          qy    <= '0;
          bit_i <= $clog2(QW)'(QW - 1);
          state <= (in_eof || in_sum.esum == '0) ? S_OUT : S_DIV;
        end
        S_DIV: begin
          if (rem_x >= tr) begin
            rem_x        <= rem_x - tr;
            qx[bit_i]    <= 1'b1;
          end
          if (rem_y >= tr) begin
            rem_y        <= rem_y - tr;
            qy[bit_i]    <= 1'b1;
          end
          if (bit_i == '0) state <= S_OUT;
          else             bit_i <= bit_i - 1'b1;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

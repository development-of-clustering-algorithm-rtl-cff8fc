// cluster_engine: on-the-fly clustering of a {y, x}-sorted pixel stream.
//
// Each accepted pixel is converted to a one-pixel cluster, the working cluster W, and then
// compared in turn with every cluster in the cluster memory, one stored cluster per clock:
//   - a stored cluster that ended two or more rows below the pixel is complete and is sent to
//     the output (nothing later in the frame can reach it);
//   - a stored cluster that touches W is merged into W and removed from memory, and the grown W
//     goes on being compared with the rest;
//   - any other cluster is written back unchanged (its rows stay tied to its own last row).
// After the pass W is written to memory. The memory thus always holds clusters that are
// pairwise not joinable. An end-of-frame token flushes every stored cluster to the output and
// is then passed on as an output end-of-frame token.
//
// Interface: valid/ready streams. Input: in_eof = 1 marks a frame-end token (in_pix ignored).
// Output: out_eof = 1 marks the frame-end token, otherwise out_sum holds one finished cluster.
// order_err pulses for a pixel that does not follow the previous one in {y, x} order within the
// frame; such input is still processed but may be clustered wrongly. overflow pulses when W
// cannot be stored because the memory is full; W is then sent out as it is, so that cluster may
// come out split. With sorted input and MAX_CLUSTERS >= COLS this cannot happen.
//
// Timing: a pixel takes n + 2 clocks when n clusters are stored (one accept cycle, n scan
// cycles, one write cycle), plus any cycles the output stalls. The work per frame therefore
// grows with the product of pixel count and open clusters. The two-row bitmap, the matching by
// AND/OR, merging by OR, the sequential pairwise scan and the completion rule follow the
// algorithm this design implements; the queue organisation, the stream handshake, the
// end-of-frame token and the overflow and order-error handling are this design's choices.
module cluster_engine
  import clust_pkg::*;
#(
  parameter int unsigned MAX_CLUSTERS = COLS
) (
  input  logic   clk,
  input  logic   rst_n,
  // pixel stream in
  input  logic   in_valid,
  output logic   in_ready,
  input  logic   in_eof,
  input  pixel_t in_pix,
  // cluster stream out
  output logic   out_valid,
  input  logic   out_ready,
  output logic   out_eof,
  output csum_t  out_sum,
  // status pulses
  output logic   order_err,
  output logic   overflow
);
  localparam int unsigned CW = $clog2(MAX_CLUSTERS) + 1;

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_WRITE, S_FLUSH, S_EOF} state_t;
  state_t state;

  cluster_t        w_q;             // working cluster
  logic [YW-1:0]   cur_y;
  logic [CW-1:0]   n_left;          // stored clusters still to visit in this pass
  logic [YW+XW-1:0] prev_pos;
  logic            prev_vld;

  // memory
  logic            m_push, m_pop, m_full, m_empty;
  cluster_t        m_wdata, m_rdata;
  logic [CW-1:0]   m_count;

  // datapath
  cluster_t        pix_cl, head_al, merged;
  logic            head_done, hit;

  cluster_memory #(.DEPTH(MAX_CLUSTERS)) u_mem (
    .clk, .rst_n, .push(m_push), .wdata(m_wdata), .pop(m_pop), .rdata(m_rdata),
    .count(m_count), .full(m_full), .empty(m_empty)
  );

  pixel_to_cluster u_conv  (.pix(in_pix), .cl(pix_cl));
  cluster_align    u_align (.c(m_rdata), .cur_y(cur_y), .a(head_al), .complete(head_done));
  cluster_match    u_match (.a(w_q), .b(head_al), .hit(hit));
  cluster_merge    u_merge (.a(w_q), .b(head_al), .m(merged));

  // ---------------------------------------------------------------- control (combinational)
  logic step;   // the head cluster is dealt with this cycle

  always_comb begin
    in_ready  = (state == S_IDLE);
    out_valid = 1'b0;
    out_eof   = 1'b0;
    out_sum   = m_rdata.s;
    m_push    = 1'b0;
    m_pop     = 1'b0;
    m_wdata   = m_rdata;
    step      = 1'b0;
    unique case (state)
      S_SCAN: begin
        if (head_done) begin
          out_valid = 1'b1;
          step      = out_ready;
        end else begin
          step      = 1'b1;
          m_push    = !hit;
        end
        m_pop = step;
      end
      S_WRITE: begin
        m_wdata = w_q;
        if (m_full) begin
          out_valid = 1'b1;
          out_sum   = w_q.s;
        end else begin
          m_push = 1'b1;
        end
      end
      S_FLUSH: begin
        out_valid = 1'b1;
        step      = out_ready;
        m_pop     = step;
      end
      S_EOF: begin
        out_valid = 1'b1;
        out_eof   = 1'b1;
        out_sum   = '0;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- control (sequential)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      w_q       <= '0;
      cur_y     <= '0;
      n_left    <= '0;
      prev_pos  <= '0;
      prev_vld  <= 1'b0;
      order_err <= 1'b0;
      overflow  <= 1'b0;
    end else begin
      order_err <= 1'b0;
      overflow  <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          n_left <= m_count;
          if (in_eof) begin
            prev_vld <= 1'b0;
            state    <= m_empty ? S_EOF : S_FLUSH;
          end else begin
            w_q      <= pix_cl;
            cur_y    <= in_pix.y;
            prev_pos <= {in_pix.y, in_pix.x};
            prev_vld <= 1'b1;
            order_err <= prev_vld && ({in_pix.y, in_pix.x} <= prev_pos);
            state    <= m_empty ? S_WRITE : S_SCAN;
          end
        end
        S_SCAN: if (step) begin
          if (!head_done && hit) w_q <= merged;
          n_left <= n_left - 1'b1;
          if (n_left == CW'(1)) state <= S_WRITE;
        end
        S_WRITE: begin
          if (!m_full) state <= S_IDLE;
          else if (out_ready) begin
            overflow <= 1'b1;
            state    <= S_IDLE;
          end
        end
        S_FLUSH: if (step) begin
          n_left <= n_left - 1'b1;
          if (n_left == CW'(1)) state <= S_EOF;
        end
        S_EOF: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Output must hold steady while it waits for ready.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_sum) && $stable(out_eof));
endmodule

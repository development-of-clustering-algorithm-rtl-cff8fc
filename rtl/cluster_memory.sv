// cluster_memory: the store of pairwise-matched clusters, organised as a circular queue.
//
// The engine scans the store by popping the oldest cluster at the head and, when it is kept,
// pushing it back at the tail in the same cycle, so one pass over `count` entries visits every
// stored cluster exactly once. The head is read asynchronously (rdata is valid in the cycle
// pop is asserted); a push writes at the tail on the clock edge. Push and pop in the same cycle
// leave count unchanged. Pushing when full or popping when empty is a usage error (asserted).
// DEPTH is this design's choice: with sorted input at most COLS clusters are ever open at
// once (COLS/2 ending in each of the last two rows), so DEPTH = COLS never overflows.
module cluster_memory
  import clust_pkg::*;
#(
  parameter int unsigned DEPTH = COLS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  cluster_t               wdata,
  input  logic                   pop,
  output cluster_t               rdata,
  output logic [$clog2(DEPTH):0] count,
  output logic                   full,
  output logic                   empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  cluster_t        mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;

  assign rdata = mem[rd_ptr];
  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign empty = (count == '0);

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      if (push && !pop)      count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule

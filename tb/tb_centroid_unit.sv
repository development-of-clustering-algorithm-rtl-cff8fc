// tb_centroid_unit: clusters built from random pixel sets (so the sums are consistent) go
// through the centroid unit with random output back-pressure. Checks the truncated
// fixed-point centroids, pass-through of npix, esum and last_y, the zero-energy case, frame-end
// tokens, and that out_valid rises CXW clocks after the accepting clock edge.
module tb_centroid_unit;
  import clust_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, in_eof = 0, out_valid, out_ready = 1, out_eof;
  csum_t in_sum = '0;
  cluster_out_t out_cl;
  int checks = 0, failures = 0;

  centroid_unit dut (.clk, .rst_n, .in_valid, .in_ready, .in_eof, .in_sum, .out_valid,
                     .out_ready, .out_eof, .out_cl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit rand_ready = 1;
  always @(posedge clk) #2 if (rand_ready) out_ready = ($urandom_range(0, 99) < 60);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      automatic longint sx = 0, sy = 0, se = 0;
      automatic int k = $urandom_range(1, 40);
      automatic bit eof = (n % 17 == 5);
      automatic bit zero = (n % 23 == 7);
      automatic int t_acc, t_out;
      for (int i = 0; i < k; i++) begin
        automatic int e = zero ? 0 : $urandom_range(0, 16383);
        automatic int x = $urandom_range(0, COLS - 1), y = $urandom_range(0, ROWS - 1);
        se += e;
        sx += longint'(e) * x;
        sy += longint'(e) * y;
      end
      @(negedge clk);
      in_valid = 1;
      in_eof = eof;
      in_sum.npix = NPIXW'(k);
      in_sum.esum = ESUMW'(se);
      in_sum.sum_xe = XSUMW'(sx);
      in_sum.sum_ye = YSUMW'(sy);
      in_sum.last_y = YW'(n);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      t_acc = $time;
      #1 in_valid = 0;
      @(negedge clk);
      while (!(out_valid && out_ready)) @(negedge clk);
      check(out_eof == eof, "eof flag");
      if (!eof) begin
        automatic longint wx = (se == 0) ? 0 : (sx << FRAC) / se;
        automatic longint wy = (se == 0) ? 0 : (sy << FRAC) / se;
        check(out_cl.cx == CXW'(wx), $sformatf("cx %0d expected %0d", out_cl.cx, wx));
        check(out_cl.cy == CYW'(wy), $sformatf("cy %0d expected %0d", out_cl.cy, wy));
        check(out_cl.npix == NPIXW'(k) && out_cl.esum == ESUMW'(se), "npix and esum");
        check(out_cl.last_y == YW'(n), "last_y");
      end
      @(posedge clk);
    end
    // latency with the output always ready
    @(negedge clk);
    rand_ready = 0;
    out_ready = 1;
    in_valid = 1;
    in_eof = 0;
    in_sum = '{npix: 1, esum: 10, sum_xe: 1000, sum_ye: 20, last_y: 0};
    @(posedge clk);
    #1 in_valid = 0;
    begin
      automatic int cyc = 0;
      while (!out_valid) begin
        @(posedge clk);
        #1 cyc++;
      end
      check(cyc == CXW, $sformatf("latency %0d clocks", cyc));
      check(out_cl.cx == CXW'(100 << FRAC) && out_cl.cy == CYW'(2 << FRAC), "latency sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cluster_engine: end-to-end check of the clustering engine against a flood-fill reference.
//
// Two engines share the stimulus: one at the default memory size, one with MAX_CLUSTERS = 4 to
// provoke the memory-full case. Tests:
//   1. latency: isolated pixels in one row; the i-th pixel must take exactly i + 2 clocks;
//   2. random sorted frames of several densities, with random output back-pressure; every
//      output cluster must equal one reference cluster and none may be left over;
//   3. a frame with two pixels swapped: order_err must pulse exactly once;
//   4. overflow on the small engine: isolated pixels beyond its capacity are sent out on
//      their own, so the clusters still match, and overflow pulses once per extra pixel.
// Counted mechanisms (each must occur): merge, cluster completed before frame end, flush at
// frame end, output stall, order error, overflow.
module tb_cluster_engine;
  import clust_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   sel;                       // 0: default engine, 1: small engine
  logic   in_valid, in_eof, out_ready;
  pixel_t in_pix;
  logic   rdy[2], ov[2], oe[2], oerr[2], ovf[2];
  csum_t  os[2];
  logic   in_ready, out_valid, out_eof;
  csum_t  out_sum;

  cluster_engine dut0 (.clk, .rst_n, .in_valid(in_valid && !sel), .in_ready(rdy[0]),
    .in_eof, .in_pix, .out_valid(ov[0]), .out_ready(out_ready && !sel), .out_eof(oe[0]),
    .out_sum(os[0]), .order_err(oerr[0]), .overflow(ovf[0]));
  cluster_engine #(.MAX_CLUSTERS(4)) dut1 (.clk, .rst_n, .in_valid(in_valid && sel),
    .in_ready(rdy[1]), .in_eof, .in_pix, .out_valid(ov[1]), .out_ready(out_ready && sel),
    .out_eof(oe[1]), .out_sum(os[1]), .order_err(oerr[1]), .overflow(ovf[1]));

  assign in_ready  = sel ? rdy[1] : rdy[0];
  assign out_valid = sel ? ov[1]  : ov[0];
  assign out_eof   = sel ? oe[1]  : oe[0];
  assign out_sum   = sel ? os[1]  : os[0];

  int checks = 0, failures = 0;
  int n_merge = 0, n_early = 0, n_flush = 0, n_stall = 0, n_order = 0, n_ovf = 0;
  bit eof_sent, eof_seen, check_clusters;
  int bp_pct;                        // percentage of clocks with out_ready low
  pixel_t frame[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (oerr[0] || oerr[1]) n_order++;
    if (ovf[0] || ovf[1]) n_ovf++;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      if (out_eof) eof_seen = 1;
      else begin
        if (out_sum.npix > 1) n_merge++;
        if (eof_sent) n_flush++; else n_early++;
        if (check_clusters) begin
          automatic bit ok = take(out_sum.npix, out_sum.esum, out_sum.sum_xe, out_sum.sum_ye,
                                  out_sum.last_y);
          if (!ok)
            $display("  unexpected cluster npix=%0d esum=%0d sxe=%0d sye=%0d last_y=%0d",
                     out_sum.npix, out_sum.esum, out_sum.sum_xe, out_sum.sum_ye, out_sum.last_y);
          if (!ok) foreach (expect_q[k]) $display("    expected npix=%0d esum=%0d sxe=%0d sye=%0d last_y=%0d", expect_q[k].npix, expect_q[k].esum, expect_q[k].sxe, expect_q[k].sye, expect_q[k].last_y);
          check(ok, "output cluster matches reference");
        end
      end
    end
  end

  always @(negedge clk) out_ready <= ($urandom_range(0, 99) >= bp_pct);

  // presents one item from a falling edge on, holds it until the rising edge that takes it
  task automatic send(input pixel_t p, input bit eof);
    @(negedge clk);
    in_valid = 1;
    in_eof   = eof;
    in_pix   = p;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  // sends `frame` and an end-of-frame token, waits for the output end-of-frame token
  task automatic run_frame();
    eof_sent = 0;
    eof_seen = 0;
    foreach (frame[i]) send(frame[i], 0);
    eof_sent = 1;
    send('0, 1);
    while (!eof_seen) @(posedge clk);
    if (check_clusters) check(expect_q.size() == 0, "no reference cluster left over");
  endtask

  function automatic void random_frame(int rows, int permille);
    clear_frame();
    frame.delete();
    for (int y = 0; y < rows; y++)
      for (int x = 0; x < COLS; x++)
        if ($urandom_range(0, 999) < permille) begin
          void'(add_pixel(x, y, $urandom_range(1, 16383)));
          frame.push_back('{y: YW'(y), x: XW'(x), e: EW'(ener[y][x])});
        end
    cluster_frame();
  endfunction

  initial begin
    sel = 0; in_valid = 0; in_eof = 0; in_pix = '0; bp_pct = 0; check_clusters = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // 1. latency of the sequential scan
    begin
      automatic int t0, t1, want = 0;
      clear_frame();
      frame.delete();
      for (int i = 0; i < 12; i++) begin
        void'(add_pixel(3 * i, 5, 100 + i));
        frame.push_back('{y: 8'd5, x: XW'(3 * i), e: EW'(100 + i)});
        want += i + 2;
      end
      cluster_frame();
      send(frame[0], 0);
      t0 = ($time - 1) / 10;
      for (int i = 1; i < frame.size(); i++) send(frame[i], 0);
      eof_sent = 1;
      eof_seen = 0;
      send('0, 1);
      t1 = ($time - 1) / 10;
      while (!eof_seen) @(posedge clk);
      check(t1 - t0 == want, $sformatf("scan latency %0d clocks, expected %0d", t1 - t0, want));
      check(expect_q.size() == 0, "latency frame clusters");
    end

    // 2. random frames
    for (int f = 0; f < 12; f++) begin
      automatic int dens[4] = '{20, 100, 300, 500};
      bp_pct = (f % 3) * 30;
      random_frame(24 + f, dens[f % 4]);
      run_frame();
    end
    bp_pct = 0;

    // 3. order violation
    random_frame(8, 200);
    begin
      automatic pixel_t t = frame[3];
      frame[3] = frame[4];
      frame[4] = t;
    end
    check_clusters = 0;
    n_order = 0;
    run_frame();
    check(n_order == 1, $sformatf("order_err pulses %0d, expected 1", n_order));
    check_clusters = 1;

    // 4. overflow on the small engine
    sel = 1;
    clear_frame();
    frame.delete();
    for (int i = 0; i < 7; i++) begin
      void'(add_pixel(4 * i, 9, 7 + i));
      frame.push_back('{y: 8'd9, x: XW'(4 * i), e: EW'(7 + i)});
    end
    cluster_frame();
    run_frame();
    check(n_ovf == 3, $sformatf("overflow pulses %0d, expected 3", n_ovf));
    sel = 0;

    check(n_merge > 0, "merge happened");
    check(n_early > 0, "cluster completed before frame end");
    check(n_flush > 0, "flush at frame end");
    check(n_stall > 0, "output stall");
    check(n_order > 0, "order error");
    check(n_ovf > 0, "overflow");
    $display("mechanisms: merge=%0d early=%0d flush=%0d stall=%0d order=%0d overflow=%0d",
             n_merge, n_early, n_flush, n_stall, n_order, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

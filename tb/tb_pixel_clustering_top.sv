// tb_pixel_clustering_top: end-to-end test of the clustering chain.
//
// Random frames (a band of rows at several hit densities) are clustered by the design and by a
// flood-fill reference; every output cluster (pixel count, energy, centroid, last row) must
// equal one reference cluster and none may be left over. Frames run in both modes: sorted
// input straight into the engine (sort_en = 0) and shuffled input through the sorter
// (sort_en = 1), with random output back-pressure. A shuffled frame sent with sort_en = 0 must
// raise order_err. A second instance with MAX_CLUSTERS = 4 is driven past its capacity to
// raise overflow. Counted mechanisms, each of which must occur: merge, cluster out before the
// frame ended, flush at frame end, output stall, sorter used, mode switch, order error,
// overflow.
module tb_pixel_clustering_top;
  import clust_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   sel = 0;                   // 0: default instance, 1: small instance
  logic   sort_en = 0, in_valid = 0, in_eof = 0, out_ready = 1;
  pixel_t in_pix = '0;
  logic   rdy[2], ov[2], oe[2], oerr[2], ovf[2];
  cluster_out_t oc[2];
  logic   in_ready, out_valid, out_eof;
  cluster_out_t out_cl;

  pixel_clustering_top dut (.clk, .rst_n, .sort_en, .in_valid(in_valid && !sel),
    .in_ready(rdy[0]), .in_eof, .in_pix, .out_valid(ov[0]), .out_ready(out_ready && !sel),
    .out_eof(oe[0]), .out_cl(oc[0]), .order_err(oerr[0]), .overflow(ovf[0]));
  pixel_clustering_top #(.MAX_CLUSTERS(4)) dut_small (.clk, .rst_n, .sort_en(1'b0),
    .in_valid(in_valid && sel), .in_ready(rdy[1]), .in_eof, .in_pix, .out_valid(ov[1]),
    .out_ready(out_ready && sel), .out_eof(oe[1]), .out_cl(oc[1]), .order_err(oerr[1]),
    .overflow(ovf[1]));

  assign in_ready  = sel ? rdy[1] : rdy[0];
  assign out_valid = sel ? ov[1]  : ov[0];
  assign out_eof   = sel ? oe[1]  : oe[0];
  assign out_cl    = sel ? oc[1]  : oc[0];

  int checks = 0, failures = 0;
  int n_merge = 0, n_early = 0, n_flush = 0, n_stall = 0, n_sorted_frames = 0;
  int n_switch = 0, n_order = 0, n_ovf = 0;
  bit eof_sent, eof_seen, check_clusters = 1;
  int bp_pct = 0;
  pixel_t frame[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) #2 out_ready = ($urandom_range(0, 99) >= bp_pct);

  always @(posedge clk) if (rst_n) begin
    if (oerr[0] || oerr[1]) n_order++;
    if (ovf[0] || ovf[1]) n_ovf++;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      if (out_eof) eof_seen = 1;
      else begin
        if (out_cl.npix > 1) n_merge++;
        if (eof_sent) n_flush++; else n_early++;
        if (check_clusters) begin
          automatic bit ok = take_out(out_cl.npix, out_cl.esum, out_cl.cx, out_cl.cy,
                                      out_cl.last_y);
          if (!ok)
            $display("  unexpected cluster npix=%0d esum=%0d cx=%0d cy=%0d last_y=%0d",
                     out_cl.npix, out_cl.esum, out_cl.cx, out_cl.cy, out_cl.last_y);
          check(ok, "output cluster matches reference");
        end
      end
    end
  end

  task automatic send(input pixel_t p, input bit eof);
    @(negedge clk);
    in_valid = 1;
    in_eof   = eof;
    in_pix   = p;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  task automatic run_frame();
    eof_sent = 0;
    eof_seen = 0;
    foreach (frame[i]) send(frame[i], 0);
    eof_sent = 1;
    send('0, 1);
    while (!eof_seen) @(posedge clk);
    if (check_clusters) check(expect_q.size() == 0, "no reference cluster left over");
  endtask

  function automatic void random_frame(int y0, int rows, int permille, bit shuffle);
    clear_frame();
    frame.delete();
    for (int y = y0; y < y0 + rows; y++)
      for (int x = 0; x < COLS; x++)
        if ($urandom_range(0, 999) < permille) begin
          void'(add_pixel(x, y, $urandom_range(1, 16383)));
          frame.push_back('{y: YW'(y), x: XW'(x), e: EW'(ener[y][x])});
        end
    if (shuffle) frame.shuffle();
    cluster_frame();
  endfunction

  task automatic set_mode(bit m);
    if (m != sort_en) n_switch++;
    sort_en = m;
  endtask

  initial begin
    automatic int dens[4] = '{10, 80, 250, 450};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 10; f++) begin
      automatic bit m = f % 2;
      set_mode(m);
      bp_pct = (f % 3) * 25;
      random_frame((f * 23) % 200, 20 + 2 * f, dens[f % 4], m);
      if (m) n_sorted_frames++;
      run_frame();
    end
    bp_pct = 0;

    // shuffled frame with the sorter bypassed: order_err expected, clusters not checked
    set_mode(0);
    random_frame(40, 10, 150, 1);
    check_clusters = 0;
    n_order = 0;
    run_frame();
    check(n_order > 0, "order_err on unsorted input");
    check_clusters = 1;

    // overflow on the small instance: 7 isolated pixels in one row, room for 4 clusters
    sel = 1;
    clear_frame();
    frame.delete();
    for (int i = 0; i < 7; i++) begin
      void'(add_pixel(5 + 4 * i, 100, 50 + i));
      frame.push_back('{y: 8'd100, x: XW'(5 + 4 * i), e: EW'(50 + i)});
    end
    cluster_frame();
    run_frame();
    sel = 0;
    check(n_ovf == 3, $sformatf("overflow pulses %0d, expected 3", n_ovf));

    check(n_merge > 0, "merge happened");
    check(n_early > 0, "cluster out before frame end");
    check(n_flush > 0, "flush at frame end");
    check(n_stall > 0, "output stall");
    check(n_sorted_frames > 0, "sorter used");
    check(n_switch > 1, "mode switch");
    check(n_order > 0, "order error");
    check(n_ovf > 0, "overflow");
    $display("mechanisms: merge=%0d early=%0d flush=%0d stall=%0d sorter_frames=%0d switch=%0d order=%0d overflow=%0d",
             n_merge, n_early, n_flush, n_stall, n_sorted_frames, n_switch, n_order, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

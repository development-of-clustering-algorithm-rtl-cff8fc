// tb_full_frame: whole 256 x 256 frames through the design at its default parameters.
//
// Hit pixels are drawn with one probability for the entire frame, as in the occupancy sweep
// the design is meant for (probabilities 0.001 + 0.005 k, k = 0 .. 99). Four points of that
// sweep are run with sorted input (k = 0, 15, 50, 99) and one more frame goes through the
// sorter. Every output cluster is compared with a flood-fill reference. For each frame the
// clocks from the first pixel accepted to the output end-of-frame token are printed with the
// pixel and cluster counts; the run checks that the clock count never falls below the scan
// cost of the engine, pixels * 2 + pixels that found clusters to compare with.
module tb_full_frame;
  import clust_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   sort_en = 0, in_valid = 0, in_eof = 0, out_ready = 1;
  pixel_t in_pix = '0;
  logic   in_ready, out_valid, out_eof, order_err, overflow;
  cluster_out_t out_cl;

  pixel_clustering_top dut (.clk, .rst_n, .sort_en, .in_valid, .in_ready, .in_eof, .in_pix,
                            .out_valid, .out_ready, .out_eof, .out_cl, .order_err, .overflow);

  int checks = 0, failures = 0, n_out = 0, n_err = 0;
  bit eof_seen;
  longint clocks;
  pixel_t frame[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    clocks++;
    if (order_err || overflow) n_err++;
    if (out_valid && out_ready) begin
      if (out_eof) eof_seen = 1;
      else begin
        n_out++;
        check(take_out(out_cl.npix, out_cl.esum, out_cl.cx, out_cl.cy, out_cl.last_y),
              "output cluster matches reference");
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

  task automatic run(int k, bit sorted_in);
    automatic int  permille10 = 10 + 50 * k;   // probability in units of 1e-4
    automatic int  n_ref;
    clear_frame();
    frame.delete();
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < COLS; x++)
        if ($urandom_range(0, 9999) < permille10) begin
          void'(add_pixel(x, y, $urandom_range(1, 16383)));
          frame.push_back('{y: YW'(y), x: XW'(x), e: EW'(ener[y][x])});
        end
    if (!sorted_in) frame.shuffle();
    cluster_frame();
    n_ref = expect_q.size();
    sort_en = !sorted_in;
    n_out = 0;
    eof_seen = 0;
    clocks = 0;
    foreach (frame[i]) send(frame[i], 0);
    send('0, 1);
    while (!eof_seen) @(posedge clk);
    check(expect_q.size() == 0, "no reference cluster left over");
    check(n_out == n_ref, "cluster count");
    check(clocks >= 2 * longint'(frame.size()), "clock count at least two per pixel");
    $display("p=%0d.%04d %s pixels=%0d clusters=%0d clocks=%0d",
             permille10 / 10000, permille10 % 10000, sorted_in ? "sorted  " : "via sort",
             frame.size(), n_ref, clocks);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 1);
    run(15, 1);
    run(50, 1);
    run(99, 1);
    run(15, 0);
    check(n_err == 0, "no order error or overflow on sorted full frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_occupancy_sweep: clustering time against frame occupancy, one frame per sweep step.
//
// Runs one 256 x 256 frame for each hit probability p = 0.001 + 0.005 k, k = 0 .. 99, with
// sorted input straight into the engine and the output always ready. Every output cluster is
// compared with the flood-fill reference. For each frame it prints pixels, clusters and clocks
// (first pixel accepted to output end-of-frame token). It then checks the shape of the curve:
// clocks rise steeply from the sparsest frames, reach a peak at an intermediate occupancy,
// and fall again towards the densest frames, where new pixels join existing clusters instead
// of opening new ones.
module tb_occupancy_sweep;
  import clust_pkg::*;
  import tb_ref_pkg::*;

  localparam int STEPS = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   in_valid = 0, in_eof = 0;
  pixel_t in_pix = '0;
  logic   in_ready, out_valid, out_eof, order_err, overflow;
  cluster_out_t out_cl;

  pixel_clustering_top dut (.clk, .rst_n, .sort_en(1'b0), .in_valid, .in_ready, .in_eof,
                            .in_pix, .out_valid, .out_ready(1'b1), .out_eof, .out_cl,
                            .order_err, .overflow);

  int checks = 0, failures = 0, n_out = 0, n_err = 0, bad = 0;
  bit eof_seen;
  longint clocks;
  longint clk_of[STEPS];
  int     pix_of[STEPS];

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
    if (out_valid) begin
      if (out_eof) eof_seen = 1;
      else begin
        n_out++;
        if (!take_out(out_cl.npix, out_cl.esum, out_cl.cx, out_cl.cy, out_cl.last_y)) bad++;
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

  initial begin
    automatic int k_peak = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < STEPS; k++) begin
      automatic int prob = 10 + 50 * k;     // units of 1e-4
      automatic int n_ref, npix = 0;
      clear_frame();
      bad = 0;
      n_out = 0;
      eof_seen = 0;
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++)
          if ($urandom_range(0, 9999) < prob) void'(add_pixel(x, y, $urandom_range(1, 16383)));
      cluster_frame();
      n_ref = expect_q.size();
      clocks = 0;
      for (int y = 0; y < ROWS; y++)
        for (int x = 0; x < COLS; x++)
          if (hit[y][x]) begin
            send('{y: YW'(y), x: XW'(x), e: EW'(ener[y][x])}, 0);
            npix++;
          end
      send('0, 1);
      while (!eof_seen) @(posedge clk);
      check(bad == 0 && expect_q.size() == 0 && n_out == n_ref,
            $sformatf("k=%0d clusters match reference", k));
      clk_of[k] = clocks;
      pix_of[k] = npix;
      $display("SWEEP k=%0d p=0.%04d pixels=%0d clusters=%0d clocks=%0d", k, prob, npix, n_ref,
               clocks);
    end
    foreach (clk_of[k]) if (clk_of[k] > clk_of[k_peak]) k_peak = k;
    $display("peak at k=%0d: %0d pixels, %0d clocks", k_peak, pix_of[k_peak], clk_of[k_peak]);
    check(k_peak > 5 && k_peak < STEPS - 5, "peak at an intermediate occupancy");
    check(clk_of[10] > 20 * clk_of[0], "steep rise from the sparsest frames");
    check(clk_of[STEPS - 1] < clk_of[k_peak] / 2, "clocks fall towards the densest frames");
    check(n_err == 0, "no order error or overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

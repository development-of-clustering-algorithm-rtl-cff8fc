// tb_pixel_sorter: frames of random pixels sent in shuffled order (with some repeated pixels,
// whose last energy must win) must come back once each in {y, x} order with their energies,
// followed by one end-of-frame token. With the output always ready the drain must finish
// within pixels + ROWS + 1 clocks; other frames run with random back-pressure. An empty
// frame must give just the token.
module tb_pixel_sorter;
  import clust_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, in_eof = 0, out_valid, out_ready = 1, out_eof;
  pixel_t in_pix = '0, out_pix;
  int checks = 0, failures = 0;
  int bp_pct = 0;

  pixel_sorter dut (.clk, .rst_n, .in_valid, .in_ready, .in_eof, .in_pix, .out_valid,
                    .out_ready, .out_eof, .out_pix);

  always @(posedge clk) #2 out_ready = ($urandom_range(0, 99) >= bp_pct);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

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
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      automatic int     e_of [int];      // key y*COLS+x, last energy sent
      automatic pixel_t sent[$];
      automatic int     keys[$];
      automatic int     n = (f == 3) ? 0 : $urandom_range(1, 3000);
      automatic int     got = 0, cyc = 0;
      automatic bit     order_ok = 1, e_ok = 1;
      bp_pct = (f % 2) ? 40 : 0;
      for (int i = 0; i < n; i++) begin
        automatic pixel_t p;
        if (i > 0 && $urandom_range(0, 19) == 0) p = sent[$urandom_range(0, sent.size() - 1)];
        else begin
          p.x = XW'($urandom);
          p.y = YW'($urandom);
        end
        p.e = EW'($urandom);
        sent.push_back(p);
        e_of[int'(p.y) * COLS + int'(p.x)] = int'(p.e);
      end
      foreach (sent[i]) send(sent[i], 0);
      send('0, 1);
      foreach (e_of[k]) keys.push_back(k);
      keys.sort();
      // collect the drain
      forever begin
        @(negedge clk);
        cyc++;
        if (out_valid && out_ready) begin
          if (out_eof) break;
          if (got >= keys.size() || int'(out_pix.y) * COLS + int'(out_pix.x) != keys[got])
            order_ok = 0;
          else if (int'(out_pix.e) != e_of[keys[got]]) e_ok = 0;
          got++;
        end
      end
      check(order_ok, $sformatf("frame %0d: pixels in {y, x} order", f));
      check(e_ok, $sformatf("frame %0d: energies", f));
      check(got == keys.size(), $sformatf("frame %0d: %0d pixels out, %0d expected", f, got,
                                          keys.size()));
      if (bp_pct == 0)
        check(cyc <= keys.size() + ROWS + 1, $sformatf("frame %0d: drain took %0d clocks", f, cyc));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

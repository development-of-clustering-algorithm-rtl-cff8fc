// tb_cluster_match: pairs of one-pixel clusters on the same row or on adjacent rows (aligned
// by hand) must match exactly when the pixels share an edge or a corner; random sparse bitmaps
// are checked against a bit-by-bit overlap search.
module tb_cluster_match;
  import clust_pkg::*;
  cluster_t a, b;
  logic     hit;
  int checks = 0, failures = 0, n_hit = 0;

  cluster_match dut (.a, .b, .hit);

  function automatic logic [COLS-1:0] foot(int x);
    logic [COLS-1:0] r = '0;
    r[x] = 1'b1;
    if (x + 1 < COLS) r[x+1] = 1'b1;
    return r;
  endfunction

  initial begin
    // pixel A at (xa, y), pixel B at (xb, y) or (xb, y-1) aligned to row y
    for (int n = 0; n < 600; n++) begin
      automatic int xa = $urandom_range(0, COLS - 1);
      automatic int xb = (n % 2) ? $urandom_range(0, COLS - 1) : xa + $urandom_range(0, 6) - 3;
      automatic bit below = $urandom_range(0, 1);
      if (xb < 0) xb = 0;
      if (xb >= COLS) xb = COLS - 1;
      a = '0;
      b = '0;
      a.row_lo = foot(xa);
      a.row_hi = foot(xa);
      b.row_lo = foot(xb);                  // B's footprint in row y
      b.row_hi = below ? '0 : foot(xb);     // B in row y-1 has nothing in row y+1
      #1;
      checks++;
      if (hit != ((xa - xb) <= 1 && (xb - xa) <= 1)) begin
        failures++;
        $display("FAIL pixels xa=%0d xb=%0d below=%0d hit=%0d", xa, xb, below, hit);
      end
      n_hit += hit;
    end
    // random sparse bitmaps
    for (int n = 0; n < 300; n++) begin
      automatic bit want = 0;
      a = '0;
      b = '0;
      for (int k = 0; k < 3; k++) begin
        a.row_lo[$urandom_range(0, COLS-1)] = 1'b1;
        a.row_hi[$urandom_range(0, COLS-1)] = 1'b1;
        b.row_lo[$urandom_range(0, COLS-1)] = 1'b1;
        b.row_hi[$urandom_range(0, COLS-1)] = 1'b1;
      end
      for (int k = 0; k < COLS; k++)
        if ((a.row_lo[k] && b.row_lo[k]) || (a.row_hi[k] && b.row_hi[k])) want = 1;
      #1;
      checks++;
      if (hit != want) begin
        failures++;
        $display("FAIL random bitmaps hit=%0d want=%0d", hit, want);
      end
    end
    checks++;
    if (n_hit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

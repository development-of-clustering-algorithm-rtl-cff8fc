// tb_cluster_merge: random cluster pairs; the joined bitmap is checked bit by bit against the
// union and every sum against the arithmetic sum of the inputs.
module tb_cluster_merge;
  import clust_pkg::*;
  cluster_t a, b, m;
  int checks = 0, failures = 0;

  cluster_merge dut (.a, .b, .m);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic bit ok = 1;
      for (int i = 0; i < COLS / 32; i++) begin
        a.row_lo[i*32 +: 32] = $urandom & $urandom;
        a.row_hi[i*32 +: 32] = $urandom & $urandom;
        b.row_lo[i*32 +: 32] = $urandom & $urandom;
        b.row_hi[i*32 +: 32] = $urandom & $urandom;
      end
      a.s.npix   = NPIXW'($urandom_range(1, 30000));
      b.s.npix   = NPIXW'($urandom_range(1, 30000));
      a.s.esum   = ESUMW'($urandom_range(0, 1 << 28));
      b.s.esum   = ESUMW'($urandom_range(0, 1 << 28));
      a.s.sum_xe = XSUMW'($urandom) << 4;
      b.s.sum_xe = XSUMW'($urandom) << 4;
      a.s.sum_ye = YSUMW'($urandom) << 3;
      b.s.sum_ye = YSUMW'($urandom) << 3;
      a.s.last_y = 8'($urandom);
      b.s.last_y = a.s.last_y;
      #1;
      for (int k = 0; k < COLS; k++) begin
        if (m.row_lo[k] != (a.row_lo[k] || b.row_lo[k])) ok = 0;
        if (m.row_hi[k] != (a.row_hi[k] || b.row_hi[k])) ok = 0;
      end
      check(ok, "bitmap union");
      check(longint'(m.s.npix) == longint'(a.s.npix) + longint'(b.s.npix), "npix");
      check(longint'(m.s.esum) == longint'(a.s.esum) + longint'(b.s.esum), "esum");
      check(longint'(m.s.sum_xe) == longint'(a.s.sum_xe) + longint'(b.s.sum_xe), "sum_xe");
      check(longint'(m.s.sum_ye) == longint'(a.s.sum_ye) + longint'(b.s.sum_ye), "sum_ye");
      check(m.s.last_y == a.s.last_y, "last_y");
    end
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

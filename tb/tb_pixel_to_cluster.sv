// tb_pixel_to_cluster: random and edge pixels; checks every bitmap bit against the 2 x 2
// footprint rule and the four starting sums, computed here from the pixel fields.
module tb_pixel_to_cluster;
  import clust_pkg::*;
  pixel_t   pix;
  cluster_t cl;
  int checks = 0, failures = 0;

  pixel_to_cluster dut (.pix, .cl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pixel x=%0d y=%0d e=%0d", what, pix.x, pix.y, pix.e);
    end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      pix.x = (n == 0) ? 8'd255 : (n == 1) ? 8'd0 : 8'($urandom);
      pix.y = 8'($urandom);
      pix.e = 14'($urandom);
      #1;
      begin
        automatic bit ok_lo = 1, ok_hi = 1;
        for (int k = 0; k < COLS; k++) begin
          automatic bit want = (k == int'(pix.x)) || (k == int'(pix.x) + 1);
          if (cl.row_lo[k] != want) ok_lo = 0;
          if (cl.row_hi[k] != want) ok_hi = 0;
        end
        check(ok_lo, "row_lo");
        check(ok_hi, "row_hi");
      end
      check(cl.s.npix == 1, "npix");
      check(cl.s.esum == pix.e, "esum");
      check(cl.s.sum_xe == longint'(pix.x) * pix.e, "sum_xe");
      check(cl.s.sum_ye == longint'(pix.y) * pix.e, "sum_ye");
      check(cl.s.last_y == pix.y, "last_y");
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

// tb_cluster_align: random stored clusters presented with the current row equal to, one
// above, and several above their last row (and one sort-order violation); checks the
// alignment and the completion flag against the rule written out here.
module tb_cluster_align;
  import clust_pkg::*;
  cluster_t      c, a;
  logic [YW-1:0] cur_y;
  logic          complete;
  int checks = 0, failures = 0;

  cluster_align dut (.c, .cur_y, .a, .complete);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: last_y=%0d cur_y=%0d", what, c.s.last_y, cur_y);
    end
  endtask

  function automatic logic [COLS-1:0] rnd_row();
    logic [COLS-1:0] r;
    for (int i = 0; i < COLS / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      automatic int d = n % 4;   // 0: same row, 1: next row, 2: two or more rows up, 3: order violation
      c.row_lo   = rnd_row();
      c.row_hi   = rnd_row();
      c.s.npix   = NPIXW'($urandom);
      c.s.esum   = ESUMW'($urandom);
      c.s.sum_xe = {6'($urandom), 32'($urandom)};
      c.s.sum_ye = {6'($urandom), 32'($urandom)};
      c.s.last_y = 8'($urandom_range(0, 200));
      cur_y = (d == 0) ? c.s.last_y : (d == 1) ? c.s.last_y + 8'd1 :
              (d == 2) ? c.s.last_y + 8'($urandom_range(2, 50)) :
                         c.s.last_y - 8'($urandom_range(1, c.s.last_y == 0 ? 0 : 1));
      if (d == 3 && c.s.last_y == 0) cur_y = 0;
      #1;
      case (d)
        0, 3: begin
          check(!complete, "not complete");
          check(a == c, "unchanged");
        end
        1: begin
          check(!complete, "not complete");
          check(a.row_lo == c.row_hi, "row_lo from row_hi");
          check(a.row_hi == '0, "row_hi cleared");
          check(a.s.last_y == cur_y, "last_y moved");
          check(a.s.esum == c.s.esum && a.s.npix == c.s.npix && a.s.sum_xe == c.s.sum_xe,
                "sums kept");
        end
        default: check(complete, "complete");
      endcase
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

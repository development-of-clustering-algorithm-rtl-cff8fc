// tb_cluster_memory: random push/pop traffic, including simultaneous push and pop, against a
// queue model; checks the head entry, count, full and empty every clock, and wraps the
// pointers several times. DEPTH is reduced to 8 so that full is reached often.
module tb_cluster_memory;
  import clust_pkg::*;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  cluster_t wdata, rdata;
  logic [$clog2(DEPTH):0] count;
  cluster_t model[$];
  int checks = 0, failures = 0, n_full = 0;

  cluster_memory #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .count,
                                        .full, .empty);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    push = 0;
    pop  = 0;
    wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(count == model.size(), "count");
      check(full == (model.size() == DEPTH), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rdata == model[0], "head");
      n_full += full;
      pop  = (model.size() > 0) && ($urandom_range(0, 99) < ((n / 300) % 2 ? 70 : 35));
      push = ((model.size() < DEPTH) || pop) && ($urandom_range(0, 99) < 60);
      wdata.row_lo = {8{$urandom}};
      wdata.row_hi = {8{$urandom}};
      wdata.s = {3{$urandom}};
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    check(n_full > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

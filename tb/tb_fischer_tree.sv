// tb_fischer_tree: self-checking test of the readout tree.
// Random sets of fired patterns (N not a power of two) are read out with
// and without back-pressure. Checks: addresses come in ascending order,
// each fired pattern exactly once per event, one address per cycle when
// road_ready stays high, first address one cycle after firing, busy, and
// that a pattern firing late in an event is still read.
module tb_fischer_tree;
  localparam int N  = 37;
  localparam int AW = $clog2(N);
  logic clk = 0, rst_n = 0, init = 0;
  logic [N-1:0] fired = '0;
  logic road_valid, road_ready = 0, busy;
  logic [AW-1:0] road_addr;
  int checks = 0, failures = 0;

  fischer_tree #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 60; ev++) begin
      bit exp [N];
      bit seen [N];
      int nexp, ngot, last, cycles;
      bit bp;
      bp = (ev % 2) == 1;
      @(negedge clk); init = 1; fired = '0; road_ready = 0;
      @(negedge clk); init = 0;
      check(!road_valid && !busy, "idle after init");
      nexp = 0;
      for (int i = 0; i < N; i++) begin
        exp[i] = ($urandom_range(0, 3) == 0) || (ev == 1);
        seen[i] = 0;
        fired[i] = exp[i];
        if (exp[i]) nexp++;
      end
      road_ready = 1;
      @(negedge clk);
      if (nexp > 0) check(road_valid, "first road one cycle after firing");
      ngot = 0; last = -1; cycles = 0;
      while (ngot < nexp && cycles < 10 * N) begin
        if (bp) road_ready = ($urandom_range(0, 1) == 1);
        if (road_valid) check(busy, "busy while a road is out");
        if (road_valid && road_ready) begin
          check(exp[road_addr] && !seen[road_addr], "address fired and not yet read");
          check(int'(road_addr) > last, "ascending order");
          seen[road_addr] = 1; last = int'(road_addr); ngot++;
        end else if (!bp) check(0, "gap in readout without back-pressure");
        @(negedge clk);
        cycles++;
      end
      check(ngot == nexp, "all fired patterns read");
      road_ready = 1;
      // a pattern fired late in the event that was not fired before
      begin
        int late;
        late = -1;
        for (int i = 0; i < N; i++) if (!exp[i]) late = i;
        if (late >= 0) begin
          fired[late] = 1;
          @(negedge clk);
          check(road_valid && int'(road_addr) == late, "late firing pattern read");
          @(negedge clk);
        end
      end
      repeat (2) @(negedge clk);
      check(!road_valid && !busy, "nothing read twice");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

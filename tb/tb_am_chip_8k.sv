// tb_am_chip_8k: the chip's reference workload at full size.
// 8000 different patterns are stored (layer l of pattern p holds the word
// l*8192 + p, so no two patterns share a layer word). Then 4000 different
// input patterns, each equal to one stored pattern, are applied:
//  - first as 4000 single-pattern events: each must give exactly its road,
//    two cycles after its hits;
//  - then all 4000 in one event, one input pattern per cycle on all 8
//    layers (every input pattern matches): the 4000 roads must all come
//    out once, with no road that was not applied, at one per cycle.
module tb_am_chip_8k;
  import am_pkg::*;
  localparam int NP = 8000, NIN = 4000, AW = 13;
  logic clk = 0, rst_n = 0, init = 0;
  logic [3:0] threshold = 4'd8;
  logic wr_en = 0; logic [AW-1:0] wr_addr = '0; pattern_t wr_data = '0;
  logic [NLAYER-1:0] hit_valid = '0; ss_t [NLAYER-1:0] hit_ss = '0;
  logic road_valid, road_ready = 1, busy;
  logic [AW-1:0] road_addr;

  am_chip dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int target(int k);
    return (k * 2 + 1) % NP;   // 4000 distinct stored patterns
  endfunction

  task automatic apply(int p);
    hit_valid = '1;
    for (int l = 0; l < NLAYER; l++) hit_ss[l] = SS_W'(l * 8192 + p);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [NP];
    int ngot, cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(p);
      for (int l = 0; l < NLAYER; l++) wr_data[l] = SS_W'(l * 8192 + p);
    end
    @(negedge clk); wr_en = 0;
    // 4000 single-pattern events
    for (int k = 0; k < NIN; k++) begin
      @(negedge clk); init = 1;
      @(negedge clk); init = 0;
      apply(target(k));
      @(negedge clk); hit_valid = '0;
      check(!road_valid, "no road one cycle after the hits");
      @(negedge clk);
      check(road_valid && int'(road_addr) == target(k), "road two cycles after the hits");
      @(negedge clk);
      check(!road_valid && !busy, "exactly one road");
    end
    // one event with all 4000 input patterns
    @(negedge clk); init = 1;
    @(negedge clk); init = 0; road_ready = 0;
    for (int k = 0; k < NIN; k++) begin apply(target(k)); @(negedge clk); end
    hit_valid = '0;
    @(negedge clk);
    foreach (seen[i]) seen[i] = 0;
    road_ready = 1;
    ngot = 0; cycles = 0;
    while (road_valid && cycles < 2 * NIN) begin
      check(!seen[road_addr] && (road_addr % 2 == 1), "road applied and new");
      seen[road_addr] = 1; ngot++;
      @(negedge clk); cycles++;
    end
    check(ngot == NIN, "all 4000 roads read");
    check(cycles == NIN, "one road per cycle");
    check(!busy, "idle after readout");
    $display("roads read: %0d in %0d cycles", ngot, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_am_chip: self-checking test of one associative memory chip.
// A small chip is loaded with patterns whose layer words are drawn from a
// few values so that full and partial matches are common. Each event sends
// a random stream of hits on random layers; the expected roads are the
// loaded patterns whose number of matched layers reaches the threshold,
// computed in the testbench. The roads read out (with random back-pressure)
// must be exactly that set, each once, in ascending order after the
// first one (latched while the hits still arrived). A separate event checks
// the two-cycle hit-to-road latency and a one-road-per-cycle drain.
module tb_am_chip;
  import am_pkg::*;
  localparam int NP = 48;
  localparam int AW = $clog2(NP);

  logic clk = 0, rst_n = 0, init = 0;
  logic [3:0] threshold = 4'd8;
  logic wr_en = 0; logic [AW-1:0] wr_addr = '0; pattern_t wr_data = '0;
  logic [NLAYER-1:0] hit_valid = '0; ss_t [NLAYER-1:0] hit_ss = '0;
  logic road_valid, road_ready = 1, busy;
  logic [AW-1:0] road_addr;

  am_chip #(.NPATT(NP)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ss_t pat [NP][NLAYER];
  bit  loaded [NP];

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

  task automatic start_event();
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NP - 3; p++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(p); loaded[p] = 1;
      for (int l = 0; l < NLAYER; l++) begin
        wr_data[l] = SS_W'($urandom_range(0, 2) + 16 * l);
        pat[p][l] = wr_data[l];
      end
    end
    for (int p = NP - 3; p < NP; p++) loaded[p] = 0;
    @(negedge clk); wr_en = 0;

    // random events
    for (int ev = 0; ev < 40; ev++) begin
      bit m [NP][NLAYER];
      bit exp [NP];
      int nexp, ngot, last, guard;
      threshold = 4'($urandom_range(5, 8));
      start_event();
      road_ready = 0;  // hold the roads until all hits are in
      for (int p = 0; p < NP; p++) for (int l = 0; l < NLAYER; l++) m[p][l] = 0;
      for (int h = 0; h < 4; h++) begin
        @(negedge clk);
        for (int l = 0; l < NLAYER; l++) begin
          hit_valid[l] = ($urandom_range(0, 3) != 0);
          hit_ss[l] = SS_W'($urandom_range(0, 2) + 16 * l);
          for (int p = 0; p < NP; p++)
            if (loaded[p] && hit_valid[l] && pat[p][l] == hit_ss[l]) m[p][l] = 1;
        end
      end
      @(negedge clk); hit_valid = '0;
      nexp = 0;
      for (int p = 0; p < NP; p++) begin
        int n; n = 0;
        for (int l = 0; l < NLAYER; l++) n += m[p][l];
        exp[p] = (n >= threshold);
        nexp += exp[p];
      end
      ngot = 0; last = -1; guard = 0;
      @(negedge clk);
      while (guard < 4 * NP) begin
        road_ready = ($urandom_range(0, 3) != 0);
        if (road_valid && road_ready) begin
          check(exp[road_addr], "road expected");
          // the first road was latched while hits still came in; the
          // rest follow in ascending address order
          if (ngot > 0) check(int'(road_addr) > last, "ascending");
          exp[road_addr] = 0; if (ngot > 0) last = int'(road_addr); ngot++;
        end
        @(negedge clk);
        guard++;
      end
      road_ready = 1;
      check(ngot == nexp, "all roads read");
      check(!busy, "idle after readout");
    end

    // latency and drain rate: three patterns complete on the same hit
    threshold = 4'd8;
    begin
      ss_t common [NLAYER];
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = AW'(10 + 7 * p); loaded[10 + 7 * p] = 1;
        for (int l = 0; l < NLAYER; l++) begin wr_data[l] = SS_W'(1000 + l); pat[10 + 7 * p][l] = wr_data[l]; end
      end
      @(negedge clk); wr_en = 0;
      start_event();
      @(negedge clk);
      hit_valid = '1;
      for (int l = 0; l < NLAYER; l++) hit_ss[l] = SS_W'(1000 + l);
      @(negedge clk); hit_valid = '0;     // cycle t+1: layer flip-flops set
      check(!road_valid, "no road one cycle after the hit");
      @(negedge clk);                     // cycle t+2
      check(road_valid && road_addr == AW'(10), "road two cycles after the hit");
      @(negedge clk);
      check(road_valid && road_addr == AW'(17), "second road next cycle");
      @(negedge clk);
      check(road_valid && road_addr == AW'(24), "third road next cycle");
      @(negedge clk);
      check(!road_valid && !busy, "drained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

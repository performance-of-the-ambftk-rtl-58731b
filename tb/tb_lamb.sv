// tb_lamb: self-checking test of a LAMB (reduced: 8 chips, 2 output links,
// 16 patterns per chip). Every chip gets its own random patterns; hits are
// broadcast on the layer buses; the roads on each output stream must be
// exactly the fired patterns of that stream's chips, computed by the
// testbench, followed by one end-of-event word, with done after it.
// Also checks the three-cycle hit-to-road latency through chip and
// collector.
module tb_lamb;
  import am_pkg::*;
  localparam int NC = 8, NO = 2, NP = 16, AW = 4, CW = 3, G = NC / NO;
  logic clk = 0, rst_n = 0, init = 0;
  logic [3:0] threshold = 4'd7;
  logic pat_wr = 0; logic [CW-1:0] pat_chip = '0; logic [AW-1:0] pat_addr = '0; pattern_t pat_data = '0;
  logic [NLAYER-1:0] hit_valid = '0; ss_t [NLAYER-1:0] hit_ss = '0;
  logic event_end = 0, done;
  logic [NO-1:0] out_valid, out_ready = '1;
  link_word_t [NO-1:0] out_word;
  int checks = 0, failures = 0;

  lamb #(.NCHIP(NC), .NOUT(NO), .NPATT(NP)) dut (.*);
  always #5 clk = ~clk;

  ss_t pat [NC][NP][NLAYER];
  int  got [NO][$];
  bit  eoe [NO];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NO; o++)
      if (out_valid[o] && out_ready[o]) begin
        if (out_word[o].ctrl) begin check(is_eoe(out_word[o]) && !eoe[o], "one EOE"); eoe[o] = 1; end
        else begin check(!eoe[o], "no road after EOE"); got[o].push_back(int'(out_word[o].data)); end
      end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < NP; p++) begin
        @(negedge clk);
        pat_wr = 1; pat_chip = CW'(c); pat_addr = AW'(p);
        for (int l = 0; l < NLAYER; l++) begin pat_data[l] = SS_W'($urandom_range(0, 2) + 8 * l); pat[c][p][l] = pat_data[l]; end
      end
    @(negedge clk); pat_wr = 0;
    for (int ev = 0; ev < 25; ev++) begin
      bit m [NC][NP][NLAYER];
      int exp [NO][$];
      threshold = 4'($urandom_range(6, 8));
      @(negedge clk); init = 1;
      for (int o = 0; o < NO; o++) begin got[o].delete(); eoe[o] = 0; end
      @(negedge clk); init = 0;
      foreach (m[c, p, l]) m[c][p][l] = 0;
      for (int o = 0; o < NO; o++) exp[o].delete();
      for (int h = 0; h < 5; h++) begin
        @(negedge clk);
        for (int l = 0; l < NLAYER; l++) begin
          hit_valid[l] = $urandom_range(0, 3) != 0;
          hit_ss[l] = SS_W'($urandom_range(0, 2) + 8 * l);
          if (hit_valid[l]) for (int c = 0; c < NC; c++) for (int p = 0; p < NP; p++) if (pat[c][p][l] == hit_ss[l]) m[c][p][l] = 1;
        end
      end
      @(negedge clk); hit_valid = '0;
      repeat (3) @(negedge clk);
      event_end = 1;
      for (int c = 0; c < NC; c++) for (int p = 0; p < NP; p++) begin
        int n; n = 0;
        for (int l = 0; l < NLAYER; l++) n += m[c][p][l];
        if (n >= threshold) exp[c / G].push_back(((c % G) << AW) | p);
      end
      for (int i = 0; i < 200 && !done; i++) @(negedge clk);
      check(done, "done");
      for (int o = 0; o < NO; o++) begin
        exp[o].sort(); got[o].sort();
        check(eoe[o], "EOE on every stream");
        check(exp[o] == got[o], "roads of the stream");
        if (exp[o] != got[o] && failures < 4) $display("exp %p got %p", exp[o], got[o]);
      end
      event_end = 0;
    end
    // latency: pattern 5 of chip 6 completed by one hit cycle
    threshold = 4'd8;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    @(negedge clk);
    hit_valid = '1;
    for (int l = 0; l < NLAYER; l++) hit_ss[l] = pat[6][5][l];
    @(negedge clk); hit_valid = '0;
    @(negedge clk);
    check(!out_valid[1], "no road two cycles after the hit");
    @(negedge clk);
    check(out_valid[1] && !out_word[1].ctrl, "road three cycles after the hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_road_collector: self-checking test of road merging on one link.
// Eight chip models hold random numbers of roads (valid/ready) and report
// busy while they have roads. Checks: every road appears exactly once with
// the right {chip, address} word; a chip that keeps requesting is served
// in round-robin turn (no chip served twice while another waits); one word
// per cycle without back-pressure; chips that stay busy before offering
// their roads hold back the end-of-event word, which comes only after
// event_end and after every road, and done follows it.
module tb_road_collector;
  import am_pkg::*;
  localparam int NC = 8, AW = 13;
  logic clk = 0, rst_n = 0, init = 0;
  logic [NC-1:0] road_valid, road_ready, chip_busy;
  logic [NC-1:0][AW-1:0] road_addr;
  logic event_end = 0, out_valid, out_ready = 1, done;
  link_word_t out_word;
  int checks = 0, failures = 0;

  road_collector #(.NCHIP(NC), .ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;

  int rq [NC][$];
  int hold [NC];   // cycles a chip stays busy before offering its roads
  int expected_words [$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // chip models: outputs refreshed shortly after each falling edge; the
  // grant is sampled just before the rising edge that acts on it
  logic [NC-1:0] grant;
  always @(negedge clk) begin
    #1;
    for (int c = 0; c < NC; c++) begin
      road_valid[c] = rq[c].size() > 0 && hold[c] == 0;
      road_addr[c]  = road_valid[c] ? AW'(rq[c][0]) : '0;
      chip_busy[c]  = rq[c].size() > 0;
    end
    #3;
    grant = road_ready;
  end

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) if (hold[c] > 0) hold[c]--;
    for (int c = 0; c < NC; c++) if (grant[c]) begin
      check(road_valid[c], "pop only a valid road");
      void'(rq[c].pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hold[c]) hold[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 20; ev++) begin
      int words [$];
      int nexp, ngot, guard, last_chip;
      bit bp, eoe_seen;
      words.delete();
      bp = ev % 2;
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      nexp = 0;
      for (int c = 0; c < NC; c++) begin
        int n; n = (ev == 0) ? 3 : $urandom_range(0, 4);
        hold[c] = (ev == 0) ? 0 : $urandom_range(0, 12);
        for (int i = 0; i < n; i++) begin
          int a; a = $urandom_range(0, 8191);
          rq[c].push_back(a);
          words.push_back((c << AW) | a);
          nexp++;
        end
      end
      ngot = 0; guard = 0; eoe_seen = 0; last_chip = -1;
      while (!done && guard < 400) begin
        @(negedge clk);
        if (guard == 5) event_end = 1;
        // the word now in the output register moves at the next rising edge
        out_ready = bp ? ($urandom_range(0, 1) == 1) : 1'b1;
        if (out_valid && out_ready) begin
          if (out_word.ctrl) begin
            check(is_eoe(out_word), "end-of-event word");
            check(event_end && ngot == nexp, "EOE after event_end and all roads");
            eoe_seen = 1;
          end else begin
            int idx[$];
            int ch;
            idx = words.find_first_index(x) with (x == int'(out_word.data));
            check(idx.size() == 1, "road word expected");
            if (idx.size() == 1) words.delete(idx[0]);
            ch = int'(out_word.data) >> AW;
            // with all chips loaded in the first event the grant order must rotate
            if (ev == 0 && last_chip >= 0) check(ch == (last_chip + 1) % NC, "round-robin order");
            last_chip = ch;
            ngot++;
          end
        end else if (ev == 0 && guard > 1 && ngot < nexp && guard < nexp) begin
          check(0, "one word per cycle without back-pressure");
        end
        guard++;
      end
      out_ready = 1;
      check(eoe_seen && done, "done after EOE");
      check(ngot == nexp && words.size() == 0, "all roads sent once");
      event_end = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

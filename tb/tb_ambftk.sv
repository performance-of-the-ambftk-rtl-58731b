// tb_ambftk: end-to-end test of the board at reduced size (2 LAMBs of 4
// chips, 2 output links per LAMB, 32 patterns per chip, 16-word FIFOs).
// Patterns are preloaded into every chip; a series of events is sent, some
// over the input links and some downloaded word by word through the VME
// port; the roads arriving on each output link between end-of-event words
// must equal the roads computed by the testbench's own model of the board
// (threshold 7 of 8 layers). The output links are randomly stalled.
// Then an auxiliary link is filled beyond its FIFO depth to provoke an
// overflow, and its words are read back.
// Each mechanism is counted and must occur: link and VME input, output
// stall, partial (7-layer) roads, several roads in one chip, roads of
// several chips merged on one link, aux link traffic and FIFO overflow.
module tb_ambftk;
  import am_pkg::*;
  localparam int NL = 2, OPL = 2, CPL = 4, NP = 32, FD = 16, NI = 12;
  localparam int NO = NL * OPL, AW = 5, CW = 2, G = CPL / OPL, GW = 1, NEV = 14;

  logic clk = 0, rst_n = 0;
  logic [NI-1:0] in_valid = '0; link_word_t [NI-1:0] in_word = '0;
  logic vme_wr = 0; logic [3:0] vme_link = '0; link_word_t vme_word = '0;
  logic [NI-1:0] fifo_overflow;
  logic pat_wr = 0; logic [0:0] pat_lamb = '0; logic [CW-1:0] pat_chip = '0; logic [AW-1:0] pat_addr = '0;
  pattern_t pat_data = '0;
  logic [3:0] threshold = 4'd7;
  logic [NO-1:0] out_valid, out_ready = '1;
  link_word_t [NO-1:0] out_word;
  logic [3:0] aux_valid, aux_ready = '0;
  link_word_t [3:0] aux_word;
  logic [31:0] events_done;

  ambftk #(.NLAMB(NL), .OUT_PER_LAMB(OPL), .CHIPS_PER_LAMB(CPL), .NPATT(NP), .FIFO_DEPTH(FD)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_link_ev = 0, n_vme_ev = 0, n_stall = 0, n_partial = 0, n_backlog = 0, n_merge = 0, n_aux = 0, n_overflow = 0;

  ss_t pat [NL][CPL][NP][NLAYER];
  int  exp_q [NO][$];          // per link: flattened expected events, -1 separates events
  int  cur [NO][$];
  int  got_ev [NO];
  bit  mismatch_seen;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // output link monitor: compare each event's roads with the model
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NO; o++) begin
      if (out_valid[o] && !out_ready[o]) n_stall++;
      if (out_valid[o] && out_ready[o]) begin
        if (out_word[o].ctrl) begin
          int e [$];
          e.delete();
          check(is_eoe(out_word[o]), "EOE word");
          while (exp_q[o].size() > 0 && exp_q[o][0] != -1) e.push_back(exp_q[o].pop_front());
          check(exp_q[o].size() > 0, "expected event exists");
          if (exp_q[o].size() > 0) void'(exp_q[o].pop_front());
          e.sort(); cur[o].sort();
          check(e == cur[o], "roads of the event on the link");
          if (e != cur[o] && !mismatch_seen) begin mismatch_seen = 1; $display("link %0d exp %p got %p", o, e, cur[o]); end
          cur[o].delete();
          got_ev[o]++;
        end else cur[o].push_back(int'(out_word[o].data));
      end
    end
  end

  always @(negedge clk) out_ready = NO'($urandom) | NO'($urandom);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_event(int ev);
    ss_t hits [NLAYER][$];
    bit  m [NL][CPL][NP][NLAYER];
    int  per_link [NO][$];
    bit  via_vme;
    via_vme = (ev % 3 == 1);
    foreach (m[a, c, p, l]) m[a][c][p][l] = 0;
    for (int l = 0; l < NLAYER; l++) begin
      int n; n = $urandom_range(0, 4);
      for (int h = 0; h < n; h++) begin
        ss_t s; s = SS_W'($urandom_range(0, 2) + 16 * l);
        hits[l].push_back(s);
        for (int a = 0; a < NL; a++) for (int c = 0; c < CPL; c++) for (int p = 0; p < NP; p++)
          if (pat[a][c][p][l] == s) m[a][c][p][l] = 1;
      end
    end
    // model: roads per output link
    for (int a = 0; a < NL; a++) for (int c = 0; c < CPL; c++) begin
      int nroads; nroads = 0;
      for (int p = 0; p < NP; p++) begin
        int n; n = 0;
        for (int l = 0; l < NLAYER; l++) n += m[a][c][p][l];
        if (n >= 7) begin
          per_link[a * OPL + c / G].push_back(((c % G) << AW) | p);
          nroads++;
          if (n == 7) n_partial++;
        end
      end
      if (nroads >= 2) n_backlog++;
    end
    for (int o = 0; o < NO; o++) begin
      int chips_seen; chips_seen = 0;
      for (int g = 0; g < G; g++) begin
        bit any; any = 0;
        foreach (per_link[o][i]) if ((per_link[o][i] >> AW) == g) any = 1;
        chips_seen += any;
      end
      if (chips_seen >= 2) n_merge++;
      foreach (per_link[o][i]) exp_q[o].push_back(per_link[o][i]);
      exp_q[o].push_back(-1);
    end
    // do not run more than one event ahead of the board
    while (int'(events_done) < ev - 1) @(negedge clk);
    if (via_vme) begin
      n_vme_ev++;
      for (int l = 0; l < NLAYER; l++) begin
        for (int h = 0; h <= hits[l].size(); h++) begin
          @(negedge clk);
          vme_wr = 1; vme_link = 4'(l);
          if (h < hits[l].size()) begin vme_word.ctrl = 0; vme_word.data = 16'(hits[l][h]); end
          else vme_word = eoe_word();
        end
      end
      @(negedge clk); vme_wr = 0;
    end else begin
      int maxn; maxn = 0;
      n_link_ev++;
      for (int l = 0; l < NLAYER; l++) if (hits[l].size() > maxn) maxn = hits[l].size();
      for (int h = 0; h <= maxn; h++) begin
        @(negedge clk);
        for (int l = 0; l < NLAYER; l++) begin
          in_valid[l] = (h <= hits[l].size());
          if (h < hits[l].size()) begin in_word[l].ctrl = 0; in_word[l].data = 16'(hits[l][h]); end
          else in_word[l] = eoe_word();
        end
        // some traffic on aux link 9 alongside
        in_valid[9] = (h == 0); in_word[9] = link_word_t'(17'(ev));
      end
      @(negedge clk); in_valid = '0;
    end
  endtask

  int aux_exp [$];
  always @(posedge clk) if (rst_n) begin
    if (aux_valid[1] && aux_ready[1]) begin
      check(aux_exp.size() > 0 && int'(aux_word[1]) == aux_exp[0], "aux link 9 word");
      if (aux_exp.size() > 0) void'(aux_exp.pop_front());
      n_aux++;
    end
  end

  initial begin
    mismatch_seen = 0;
    for (int o = 0; o < NO; o++) got_ev[o] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < NL; a++) for (int c = 0; c < CPL; c++) for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      pat_wr = 1; pat_lamb = 1'(a); pat_chip = CW'(c); pat_addr = AW'(p);
      for (int l = 0; l < NLAYER; l++) begin pat_data[l] = SS_W'($urandom_range(0, 2) + 16 * l); pat[a][c][p][l] = pat_data[l]; end
    end
    @(negedge clk); pat_wr = 0;
    aux_ready[1] = 1;
    for (int ev = 0; ev < NEV; ev++) begin
      if (ev % 3 != 1) aux_exp.push_back(ev);
      send_event(ev);
    end
    for (int i = 0; i < 2000 && int'(events_done) < NEV; i++) @(negedge clk);
    check(int'(events_done) == NEV, "all events completed");
    for (int o = 0; o < NO; o++) check(got_ev[o] == NEV && exp_q[o].size() == 0, "every link ended every event");
    check(fifo_overflow == '0, "no overflow during events");
    // overflow on aux link 8 (not read)
    for (int i = 0; i < FD + 3; i++) begin @(negedge clk); in_valid[8] = 1; in_word[8] = link_word_t'(17'(100 + i)); end
    @(negedge clk); in_valid = '0;
    check(fifo_overflow[8] && fifo_overflow[7:0] == '0, "overflow on the filled link only");
    if (fifo_overflow[8]) n_overflow++;
    for (int i = 0; i < FD; i++) begin
      @(negedge clk);
      check(aux_valid[0] && int'(aux_word[0]) == 100 + i, "aux link 8 keeps the first words");
      aux_ready[0] = 1; @(negedge clk); aux_ready[0] = 0;
    end
    @(negedge clk);
    check(!aux_valid[0], "aux link 8 empty");
    $display("mechanisms: link_events=%0d vme_events=%0d stall_cycles=%0d partial_roads=%0d multi_road_chips=%0d merged_links=%0d aux_words=%0d overflows=%0d",
             n_link_ev, n_vme_ev, n_stall, n_partial, n_backlog, n_merge, n_aux, n_overflow);
    check(n_link_ev > 0, "link input used");
    check(n_vme_ev > 0, "VME download used");
    check(n_stall > 0, "output stall happened");
    check(n_partial > 0, "partial-match road happened");
    check(n_backlog > 0, "chip with several roads happened");
    check(n_merge > 0, "roads of several chips merged");
    check(n_aux > 0, "aux link words read");
    check(n_overflow > 0, "FIFO overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

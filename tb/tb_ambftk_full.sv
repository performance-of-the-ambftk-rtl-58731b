// tb_ambftk_full: one complete operation of the board at its full size
// (12 input links, 4 LAMBs of 32 chips of 8000 patterns, 16 output links).
// Six patterns are preloaded in chips spread over the board, including the
// first and last pattern address and the first and last chip. One event
// is sent over the input links, with hits that complete five of them on
// all 8 layers and one on only 6 layers; a second event, downloaded through
// VME, completes one other pattern. Every output link must deliver exactly
// the roads of its chips, then its end-of-event word.
module tb_ambftk_full;
  import am_pkg::*;
  localparam int NPAT = 6;
  logic clk = 0, rst_n = 0;
  logic [11:0] in_valid = '0; link_word_t [11:0] in_word = '0;
  logic vme_wr = 0; logic [3:0] vme_link = '0; link_word_t vme_word = '0;
  logic [11:0] fifo_overflow;
  logic pat_wr = 0; logic [1:0] pat_lamb = '0; logic [4:0] pat_chip = '0; logic [12:0] pat_addr = '0;
  pattern_t pat_data = '0;
  logic [3:0] threshold = 4'd8;
  logic [15:0] out_valid, out_ready = '1;
  link_word_t [15:0] out_word;
  logic [3:0] aux_valid, aux_ready = '0;
  link_word_t [3:0] aux_word;
  logic [31:0] events_done;

  ambftk dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int lambs [NPAT] = '{0, 3, 2, 1, 1, 3};
  int chips [NPAT] = '{0, 31, 17, 9, 8, 30};
  int addrs [NPAT] = '{0, 7999, 4000, 1234, 1235, 77};
  int got [16][$];
  int eoes [16];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic ss_t word_of(int k, int l);
    return SS_W'(16'h100 * (k + 1) + l);
  endfunction

  always @(posedge clk) if (rst_n)
    for (int o = 0; o < 16; o++)
      if (out_valid[o] && out_ready[o]) begin
        if (out_word[o].ctrl) begin check(is_eoe(out_word[o]), "EOE word"); eoes[o]++; end
        else got[o].push_back(int'(out_word[o].data));
      end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_event(bit sel [NPAT]);
    int exp [16][$];
    for (int k = 0; k < NPAT; k++)
      if (sel[k]) exp[lambs[k] * 4 + chips[k] / 8].push_back(((chips[k] % 8) << 13) | addrs[k]);
    for (int o = 0; o < 16; o++) begin
      exp[o].sort(); got[o].sort();
      check(exp[o] == got[o], $sformatf("roads on output link %0d", o));
      got[o].delete();
    end
  endtask

  initial begin
    bit sel [NPAT];
    for (int o = 0; o < 16; o++) eoes[o] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NPAT; k++) begin
      @(negedge clk);
      pat_wr = 1; pat_lamb = 2'(lambs[k]); pat_chip = 5'(chips[k]); pat_addr = 13'(addrs[k]);
      for (int l = 0; l < NLAYER; l++) pat_data[l] = word_of(k, l);
    end
    @(negedge clk); pat_wr = 0;
    // event 1 over the links: patterns 0..4 on all layers, pattern 5 on layers 0..5
    for (int h = 0; h <= NPAT; h++) begin
      @(negedge clk);
      for (int l = 0; l < NLAYER; l++) begin
        in_valid[l] = 1;
        if (h < NPAT - 1 || (h == NPAT - 1 && l < 6)) begin in_word[l].ctrl = 0; in_word[l].data = 16'(word_of(h, l)); end
        else if (h == NPAT - 1) begin in_word[l].ctrl = 0; in_word[l].data = 16'h7777; end
        else in_word[l] = eoe_word();
      end
    end
    @(negedge clk); in_valid = '0;
    for (int i = 0; i < 200 && events_done < 1; i++) @(negedge clk);
    check(events_done == 1, "first event completed");
    sel = '{1, 1, 1, 1, 1, 0};
    expect_event(sel);
    // event 2 through VME: pattern 3 only
    for (int l = 0; l < NLAYER; l++) begin
      @(negedge clk); vme_wr = 1; vme_link = 4'(l); vme_word.ctrl = 0; vme_word.data = 16'(word_of(3, l));
      @(negedge clk); vme_word = eoe_word();
    end
    @(negedge clk); vme_wr = 0;
    for (int i = 0; i < 200 && events_done < 2; i++) @(negedge clk);
    check(events_done == 2, "second event completed");
    sel = '{0, 0, 0, 1, 0, 0};
    expect_event(sel);
    for (int o = 0; o < 16; o++) check(eoes[o] == 2, "each link ended both events");
    check(fifo_overflow == '0, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hit_distributor: self-checking test of event sequencing and hit fan-out.
// The layer FIFOs are modelled by queues holding several events, each layer
// ending every event with an end-of-event word and sometimes carrying an
// unknown control word that must be discarded. A monitor checks that every
// hit appears on its layer bus in order, zero-extended, within the event
// opened by the latest init pulse; that event_end only rises after every
// layer reached its end-of-event word and stays until coll_done; and that
// events_done counts the completed events.
module tb_hit_distributor;
  import am_pkg::*;
  localparam int NEV = 30;
  logic clk = 0, rst_n = 0;
  logic [NLAYER-1:0] fifo_empty, fifo_pop, hit_valid;
  link_word_t [NLAYER-1:0] fifo_word;
  ss_t [NLAYER-1:0] hit_ss;
  logic init, event_end, coll_done = 0;
  logic [31:0] events_done;
  int checks = 0, failures = 0;

  hit_distributor dut (.*);
  always #5 clk = ~clk;

  link_word_t fq [NLAYER][$];
  int         exp_ev [NLAYER][$];
  ss_t        exp_ss [NLAYER][$];
  int         eoe_left [NLAYER][$];   // cycle index bookkeeping: events whose EOE is still queued
  int cur_ev = -1;
  int inits = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  always_comb begin
    for (int l = 0; l < NLAYER; l++) begin
      fifo_empty[l] = (fq[l].size() == 0);
      fifo_word[l]  = fifo_empty[l] ? '0 : fq[l][0];
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FIFO pops and monitor
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NLAYER; l++) begin
      if (fifo_pop[l]) begin
        check(fq[l].size() > 0, "pop of an empty FIFO");
        if (is_eoe(fq[l][0])) void'(eoe_left[l].pop_front());
        void'(fq[l].pop_front());
      end
      if (hit_valid[l]) begin
        check(exp_ss[l].size() > 0, "unexpected hit");
        if (exp_ss[l].size() > 0) begin
          check(hit_ss[l] == exp_ss[l][0], "hit value and order");
          check(exp_ev[l][0] == cur_ev, "hit within its event");
          void'(exp_ss[l].pop_front()); void'(exp_ev[l].pop_front());
        end
      end
    end
    if (init) begin cur_ev++; inits++; end
    if (event_end) begin
      for (int l = 0; l < NLAYER; l++)
        check(eoe_left[l].size() == 0 || eoe_left[l][0] > cur_ev, "event_end after every layer's EOE");
    end
  end

  // collectors: answer event_end after a random delay
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (event_end) begin
        int prev_done;
        prev_done = events_done;
        repeat ($urandom_range(0, 4)) begin @(posedge clk); check(event_end, "event_end held until coll_done"); end
        @(negedge clk); coll_done = 1;
        @(negedge clk); coll_done = 0;
        check(events_done == prev_done + 1, "event counted");
        check(!event_end, "event_end released");
      end
    end
  end

  initial begin
    for (int ev = 0; ev < NEV; ev++)
      for (int l = 0; l < NLAYER; l++) begin
        int n; n = $urandom_range(0, 5);
        for (int h = 0; h < n; h++) begin
          link_word_t w;
          w.ctrl = 0; w.data = 16'($urandom);
          fq[l].push_back(w); exp_ss[l].push_back(SS_W'(w.data)); exp_ev[l].push_back(ev);
          if ($urandom_range(0, 9) == 0) begin w.ctrl = 1; w.data = 16'h0BAD; fq[l].push_back(w); end
        end
        fq[l].push_back(eoe_word()); eoe_left[l].push_back(ev);
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (events_done == NEV);
    repeat (5) @(posedge clk);
    check(inits == NEV + 1, "one init per event");
    for (int l = 0; l < NLAYER; l++) check(exp_ss[l].size() == 0 && fq[l].size() == 0, "all hits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_input_fifo: self-checking test of an input FIFO.
// Words written by the link and by VME are read back in order against a
// queue model, with random reads; filling the FIFO must drop words and set
// the sticky overflow flag, as must a VME write colliding with a link word.
module tb_input_fifo;
  import am_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  logic link_valid = 0, vme_wr = 0, rd_en = 0;
  link_word_t link_word = '0, vme_word = '0, rd_word;
  logic empty, overflow;
  int checks = 0, failures = 0;
  link_word_t q[$];

  input_fifo #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      if (!empty) check(rd_word == q[0], "head word");
      rd_en = !empty && ($urandom_range(0, 2) != 0);
      link_valid = 0; vme_wr = 0;
      if (q.size() < D - 1) begin
        if ($urandom_range(0, 1)) begin link_valid = 1; link_word = link_word_t'($urandom); end
        else if ($urandom_range(0, 1)) begin vme_wr = 1; vme_word = link_word_t'($urandom); end
      end
      @(posedge clk); #1;
      if (rd_en) void'(q.pop_front());
      if (link_valid) q.push_back(link_word); else if (vme_wr) q.push_back(vme_word);
      rd_en = 0; link_valid = 0; vme_wr = 0;
    end
    check(!overflow, "no overflow under depth");
    // fill beyond depth
    while (q.size() > 0) begin @(negedge clk); rd_en = 1; @(posedge clk); #1; void'(q.pop_front()); rd_en = 0; end
    for (int i = 0; i < D + 3; i++) begin
      @(negedge clk); link_valid = 1; link_word = link_word_t'(i);
      if (i < D) q.push_back(link_word);
    end
    @(negedge clk); link_valid = 0;
    check(overflow, "overflow flagged");
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      check(!empty && rd_word == q[0], "kept words intact");
      rd_en = 1; @(posedge clk); #1; void'(q.pop_front()); rd_en = 0;
    end
    @(negedge clk);
    check(empty, "empty after draining");
    check(overflow, "overflow is sticky");
    // collision on a fresh FIFO
    rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk); link_valid = 1; vme_wr = 1; link_word = link_word_t'(17'h1234); vme_word = link_word_t'(17'h5678);
    @(negedge clk); link_valid = 0; vme_wr = 0;
    check(overflow, "collision flagged");
    check(!empty && rd_word == link_word_t'(17'h1234), "link word kept on collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

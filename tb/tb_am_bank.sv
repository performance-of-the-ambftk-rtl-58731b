// tb_am_bank: self-checking test of the pattern array.
// Loads a small bank with random patterns whose layer words come from a
// narrow range (so that hits match often), leaves some patterns unloaded,
// then drives random hits over several events and compares every layer
// flip-flop with a reference model kept in the testbench. Also checks that
// init clears everything and that the flip-flops update one cycle after
// the hit.
module tb_am_bank;
  import am_pkg::*;
  localparam int NP = 24;
  localparam int AW = $clog2(NP);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0; logic [AW-1:0] wr_addr = '0; pattern_t wr_data = '0;
  logic init = 0; logic [NLAYER-1:0] hit_valid = '0; ss_t [NLAYER-1:0] hit_ss = '0;
  logic [NP-1:0][NLAYER-1:0] layer_match;

  am_bank #(.NPATT(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ss_t ref_pat [NP][NLAYER];
  bit  ref_loaded [NP];
  bit  ref_match [NP][NLAYER];

  task automatic compare(string what);
    for (int p = 0; p < NP; p++)
      for (int l = 0; l < NLAYER; l++) begin
        checks++;
        if (layer_match[p][l] !== ref_match[p][l]) begin
          failures++;
          if (failures < 10) $display("FAIL %s: pattern %0d layer %0d got %0b exp %0b", what, p, l, layer_match[p][l], ref_match[p][l]);
        end
      end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin ref_loaded[p] = 0; for (int l = 0; l < NLAYER; l++) ref_match[p][l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    compare("after reset");
    // load all but the last 4 patterns
    for (int p = 0; p < NP - 4; p++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(p);
      for (int l = 0; l < NLAYER; l++) begin
        wr_data[l] = SS_W'($urandom_range(0, 3) + (l << 10));
        ref_pat[p][l] = wr_data[l];
      end
      ref_loaded[p] = 1;
    end
    @(negedge clk); wr_en = 0;
    for (int ev = 0; ev < 20; ev++) begin
      @(negedge clk); init = 1;
      @(negedge clk); init = 0;
      for (int p = 0; p < NP; p++) for (int l = 0; l < NLAYER; l++) ref_match[p][l] = 0;
      compare("after init");
      for (int h = 0; h < 6; h++) begin
        @(negedge clk);
        for (int l = 0; l < NLAYER; l++) begin
          hit_valid[l] = ($urandom_range(0, 2) != 0);
          // unloaded patterns hold random words; hits also probe them
          hit_ss[l]    = SS_W'($urandom_range(0, 3) + (l << 10));
        end
        // flip-flops must not change before the clock edge
        compare("before edge");
        for (int p = 0; p < NP; p++)
          for (int l = 0; l < NLAYER; l++)
            if (ref_loaded[p] && hit_valid[l] && ref_pat[p][l] == hit_ss[l]) ref_match[p][l] = 1;
        @(negedge clk);
        hit_valid = '0;
        compare("after hit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_majority: self-checking test of the majority logic.
// Random layer-match vectors and every threshold from 0 to 8 are applied;
// each pattern's output is compared with a count of its set layers.
module tb_majority;
  import am_pkg::*;
  localparam int NP = 40;
  logic [NP-1:0][NLAYER-1:0] layer_match;
  logic [3:0] threshold;
  logic [NP-1:0] fired;
  int checks = 0, failures = 0;

  majority #(.NPATT(NP)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int p = 0; p < NP; p++) layer_match[p] = NLAYER'($urandom);
      if (it == 0) layer_match = '1;
      for (int t = 0; t <= NLAYER; t++) begin
        threshold = 4'(t);
        #1;
        for (int p = 0; p < NP; p++) begin
          int n; bit exp;
          n = 0;
          for (int l = 0; l < NLAYER; l++) if (layer_match[p][l]) n++;
          exp = (t > 0) && (n >= t);
          checks++;
          if (fired[p] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL pattern %0d count %0d threshold %0d fired %0b", p, n, t, fired[p]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

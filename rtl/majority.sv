// majority: per-pattern majority logic of an associative memory chip.
//
// For every pattern the layer-match flags are counted, and the pattern fires
// (becomes a road) when the count reaches the run-time threshold, the
// requisite number of hit layers. A threshold of zero fires nothing.
// Purely combinational. That a majority stage follows the layer flip-flops
// is from the design description; the adder and comparator form and the
// zero-threshold rule are choices of this design.
module majority
  import am_pkg::*;
#(
  parameter int unsigned NPATT = am_pkg::NPATT_CHIP,
  parameter int unsigned CNT_W = $clog2(NLAYER + 1)
) (
  input  logic [NPATT-1:0][NLAYER-1:0] layer_match,
  input  logic [CNT_W-1:0]             threshold,
  output logic [NPATT-1:0]             fired
);

  always_comb begin
    for (int p = 0; p < NPATT; p++) begin
      logic [CNT_W-1:0] cnt;
      cnt = '0;
      for (int l = 0; l < NLAYER; l++) cnt = cnt + CNT_W'(layer_match[p][l]);
      fired[p] = (threshold != '0) && (cnt >= threshold);
    end
  end

endmodule

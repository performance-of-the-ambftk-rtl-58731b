// am_chip: one associative memory chip (8000 patterns, 8 layers).
//
// Hits arrive on 8 layer buses and are compared with every stored pattern
// in parallel (am_bank). A match sets the pattern's layer flip-flop; the
// majority stage fires a pattern once the number of matched layers reaches
// the threshold; the Fischer tree reads the fired patterns out, one road
// address per cycle. init starts a new event.
//
// Timing: a hit on the bus in cycle t sets its layer flip-flop at the end
// of t; if that completes the majority the road address is at the output
// from cycle t+2 (two-cycle latency), and a backlog of roads drains at one
// per cycle under road_ready. busy is high while a fired road is unread.
// The structure (array, per-layer flip-flops, majority, tree readout) and
// the sizes are from the design description; the ports, the latency and
// the threshold input are this design's choices.
module am_chip
  import am_pkg::*;
#(
  parameter int unsigned NPATT  = am_pkg::NPATT_CHIP,
  parameter int unsigned ADDR_W = (NPATT > 1) ? $clog2(NPATT) : 1,
  parameter int unsigned CNT_W  = $clog2(NLAYER + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic [CNT_W-1:0]  threshold,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  pattern_t          wr_data,
  input  logic [NLAYER-1:0] hit_valid,
  input  ss_t [NLAYER-1:0]  hit_ss,
  output logic              road_valid,
  output logic [ADDR_W-1:0] road_addr,
  input  logic              road_ready,
  output logic              busy
);

  logic [NPATT-1:0][NLAYER-1:0] layer_match;
  logic [NPATT-1:0]             fired;

  am_bank #(.NPATT(NPATT), .ADDR_W(ADDR_W)) u_bank (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .init, .hit_valid, .hit_ss, .layer_match
  );

  majority #(.NPATT(NPATT), .CNT_W(CNT_W)) u_majority (
    .layer_match, .threshold, .fired
  );

  fischer_tree #(.N(NPATT), .ADDR_W(ADDR_W)) u_tree (
    .clk, .rst_n, .init, .fired, .road_valid, .road_addr, .road_ready, .busy
  );

endmodule

// lamb: local associative memory board, NCHIP chips on shared layer buses.
//
// All chips see the same 8 layer buses, the same init and threshold, so
// every hit is compared with the patterns of all chips in the same cycle.
// Patterns are written one chip at a time (pat_chip selects it). The chips
// are split into NOUT groups of NCHIP/NOUT; each group's roads are merged
// by a road_collector onto one output stream. done is high when every
// stream has sent its end-of-event word.
// Timing: as am_chip plus one register in the collector, so a road leaves
// the LAMB three cycles after the hit that completed it.
// The chip count and the number of output links follow the design
// description; the grouping of chips onto links is this design's choice.
module lamb
  import am_pkg::*;
#(
  parameter int unsigned NCHIP  = 32,
  parameter int unsigned NOUT   = 4,
  parameter int unsigned NPATT  = am_pkg::NPATT_CHIP,
  parameter int unsigned ADDR_W = (NPATT > 1) ? $clog2(NPATT) : 1,
  parameter int unsigned CNT_W  = $clog2(NLAYER + 1),
  parameter int unsigned CHIP_W = (NCHIP > 1) ? $clog2(NCHIP) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   init,
  input  logic [CNT_W-1:0]       threshold,
  input  logic                   pat_wr,
  input  logic [CHIP_W-1:0]      pat_chip,
  input  logic [ADDR_W-1:0]      pat_addr,
  input  pattern_t               pat_data,
  input  logic [NLAYER-1:0]      hit_valid,
  input  ss_t [NLAYER-1:0]       hit_ss,
  input  logic                   event_end,
  output logic [NOUT-1:0]        out_valid,
  output link_word_t [NOUT-1:0]  out_word,
  input  logic [NOUT-1:0]        out_ready,
  output logic                   done
);

  localparam int unsigned GROUP = NCHIP / NOUT;

  logic [NCHIP-1:0]             road_valid, road_ready, busy;
  logic [NCHIP-1:0][ADDR_W-1:0] road_addr;
  logic [NOUT-1:0]              grp_done;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    am_chip #(.NPATT(NPATT), .ADDR_W(ADDR_W), .CNT_W(CNT_W)) u_chip (
      .clk, .rst_n, .init, .threshold,
      .wr_en     (pat_wr && pat_chip == CHIP_W'(c)),
      .wr_addr   (pat_addr),
      .wr_data   (pat_data),
      .hit_valid, .hit_ss,
      .road_valid(road_valid[c]),
      .road_addr (road_addr[c]),
      .road_ready(road_ready[c]),
      .busy      (busy[c])
    );
  end

  for (genvar g = 0; g < NOUT; g++) begin : g_coll
    road_collector #(.NCHIP(GROUP), .ADDR_W(ADDR_W)) u_coll (
      .clk, .rst_n, .init,
      .road_valid(road_valid[g*GROUP +: GROUP]),
      .road_addr (road_addr[g*GROUP +: GROUP]),
      .road_ready(road_ready[g*GROUP +: GROUP]),
      .chip_busy (busy[g*GROUP +: GROUP]),
      .event_end,
      .out_valid (out_valid[g]),
      .out_word  (out_word[g]),
      .out_ready (out_ready[g]),
      .done      (grp_done[g])
    );
  end

  assign done = &grp_done;

  initial assert (NCHIP % NOUT == 0) else $error("NCHIP must be a multiple of NOUT");

endmodule

// am_bank: the pattern array of an associative memory chip.
//
// Each of the NPATT patterns holds one SS_W-bit superstrip word per layer.
// Every layer has its own hit bus; in every cycle the word on each valid bus
// is compared with the word of that layer in all patterns at once, and a
// match sets the pattern's flip-flop for that layer. The flip-flops keep
// their state for the rest of the event, whatever later hits arrive, and
// are cleared together by init. This is the logical behaviour of the
// full-custom layer word (compare cells plus set/reset latch on the match
// line); the cells' circuit techniques are not modelled.
//
// Interface and timing:
//   wr_en/wr_addr/wr_data  write all layers of one pattern in one cycle and
//                          mark it loaded. Only loaded patterns can match.
//   hit_valid/hit_ss       one superstrip per layer bus per cycle.
//   init                   clears every layer flip-flop (wins over a hit in
//                          the same cycle).
//   layer_match            flip-flop outputs, valid the cycle after the hit.
// The loaded flags are cleared by reset; the pattern words are not reset.
// The layer count and word width follow the design description; the
// loaded flag and the write port are choices of this design.
module am_bank
  import am_pkg::*;
#(
  parameter int unsigned NPATT  = am_pkg::NPATT_CHIP,
  parameter int unsigned ADDR_W = (NPATT > 1) ? $clog2(NPATT) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [ADDR_W-1:0]             wr_addr,
  input  pattern_t                      wr_data,
  input  logic                          init,
  input  logic [NLAYER-1:0]             hit_valid,
  input  ss_t  [NLAYER-1:0]             hit_ss,
  output logic [NPATT-1:0][NLAYER-1:0]  layer_match
);

  ss_t                mem [NPATT][NLAYER];
  logic [NPATT-1:0]   loaded;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int l = 0; l < NLAYER; l++) mem[wr_addr][l] <= wr_data[l];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded <= '0;
    end else if (wr_en) begin
      loaded[wr_addr] <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPATT; p++) layer_match[p] <= '0;
    end else if (init) begin
      for (int p = 0; p < NPATT; p++) layer_match[p] <= '0;
    end else if (|hit_valid) begin
      for (int p = 0; p < NPATT; p++) begin
        if (loaded[p]) begin
          for (int l = 0; l < NLAYER; l++) begin
            if (hit_valid[l] && mem[p][l] == hit_ss[l]) layer_match[p][l] <= 1'b1;
          end
        end
      end
    end
  end

endmodule

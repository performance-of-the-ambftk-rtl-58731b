// road_collector: merges the roads of a group of chips onto one output link.
//
// Each chip offers one road at a time (valid/ready). The collector grants
// the chips round-robin, starting after the last one served, and sends a
// road word {chip index within the group, pattern address} zero-extended to
// the 16 data bits of the link (3 + 13 bits at the default sizes). After
// event_end, when no chip of the group is busy, it sends one end-of-event
// control word and raises done until the next init.
// Timing: the output is a register; one word per cycle while out_ready is
// high; a grant pops the chip's road in the same cycle it is registered.
// That roads are collected from the chips onto output links is from the
// design description; arbitration, word format and end-of-event are this
// design's choices.
module road_collector
  import am_pkg::*;
#(
  parameter int unsigned NCHIP  = 8,
  parameter int unsigned ADDR_W = 13,
  parameter int unsigned CHIP_W = (NCHIP > 1) ? $clog2(NCHIP) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          init,
  input  logic [NCHIP-1:0]              road_valid,
  input  logic [NCHIP-1:0][ADDR_W-1:0]  road_addr,
  output logic [NCHIP-1:0]              road_ready,
  input  logic [NCHIP-1:0]              chip_busy,
  input  logic                          event_end,
  output logic                          out_valid,
  output link_word_t                    out_word,
  input  logic                          out_ready,
  output logic                          done
);

  logic [CHIP_W-1:0] last;
  logic              sent_eoe;
  logic              load, found;
  logic [CHIP_W-1:0] pick;

  assign load = !out_valid || out_ready;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= NCHIP; k++) begin
      logic [CHIP_W-1:0] c;
      c = CHIP_W'((int'(last) + k) % NCHIP);
      if (!found && road_valid[c]) begin
        found = 1'b1;
        pick  = c;
      end
    end
    road_ready = '0;
    if (load && found) road_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
      last      <= CHIP_W'(NCHIP - 1);
      sent_eoe  <= 1'b0;
    end else if (init) begin
      out_valid <= 1'b0;
      sent_eoe  <= 1'b0;
    end else if (load) begin
      if (found) begin
        out_valid     <= 1'b1;
        out_word.ctrl <= 1'b0;
        out_word.data <= LINK_DATA_W'({pick, road_addr[pick]});
        last          <= pick;
      end else if (event_end && !sent_eoe && !(|chip_busy)) begin
        out_valid <= 1'b1;
        out_word  <= eoe_word();
        sent_eoe  <= 1'b1;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

  assign done = sent_eoe && !out_valid;

  initial assert (CHIP_W + ADDR_W <= LINK_DATA_W)
    else $error("road word does not fit in a link word");

endmodule

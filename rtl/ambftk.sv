// ambftk: the associative memory board.
//
// Hits enter on NIN serial input links (seen here as 16-bit words with a
// control flag at 100 MHz) or are written by VME; each link has an input
// FIFO. Links 0..7 carry the hits of layers 0..7: the hit distributor
// sequences events and broadcasts every hit to all chips of all NLAMB
// LAMBs at once. Each LAMB holds CHIPS_PER_LAMB chips and sends its roads
// on OUT_PER_LAMB output links, so the board has NLAMB*OUT_PER_LAMB output
// links; link l*OUT_PER_LAMB+j carries LAMB l's group j. Each output link
// ends an event with an end-of-event word; after all have done so the
// next event starts. Links 8..11 are only buffered: their words are
// offered on the aux ports.
// Patterns are preloaded with pat_wr, addressed by LAMB, chip and pattern.
// Timing: a hit popped from its FIFO reaches the chips the next cycle; a
// road leaves on its output link about four cycles after the hit that
// completed it, then one road per cycle per link.
// Link, LAMB and chip counts and the input FIFOs written also by VME are
// from the design description; the event protocol, the pattern load port
// and the use of links 8..11 are this design's choices.
module ambftk
  import am_pkg::*;
#(
  parameter int unsigned NIN            = 12,
  parameter int unsigned NLAMB          = 4,
  parameter int unsigned OUT_PER_LAMB   = 4,
  parameter int unsigned CHIPS_PER_LAMB = 32,
  parameter int unsigned NPATT          = am_pkg::NPATT_CHIP,
  parameter int unsigned FIFO_DEPTH     = 512,
  parameter int unsigned NOUT           = NLAMB * OUT_PER_LAMB,
  parameter int unsigned ADDR_W         = (NPATT > 1) ? $clog2(NPATT) : 1,
  parameter int unsigned CHIP_W         = (CHIPS_PER_LAMB > 1) ? $clog2(CHIPS_PER_LAMB) : 1,
  parameter int unsigned LAMB_W         = (NLAMB > 1) ? $clog2(NLAMB) : 1,
  parameter int unsigned CNT_W          = $clog2(NLAYER + 1),
  parameter int unsigned NAUX           = NIN - NLAYER
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // input links and VME download
  input  logic       [NIN-1:0]      in_valid,
  input  link_word_t [NIN-1:0]      in_word,
  input  logic                      vme_wr,
  input  logic [$clog2(NIN)-1:0]    vme_link,
  input  link_word_t                vme_word,
  output logic       [NIN-1:0]      fifo_overflow,
  // pattern preload and configuration
  input  logic                      pat_wr,
  input  logic [LAMB_W-1:0]         pat_lamb,
  input  logic [CHIP_W-1:0]         pat_chip,
  input  logic [ADDR_W-1:0]         pat_addr,
  input  pattern_t                  pat_data,
  input  logic [CNT_W-1:0]          threshold,
  // output links
  output logic       [NOUT-1:0]     out_valid,
  output link_word_t [NOUT-1:0]     out_word,
  input  logic       [NOUT-1:0]     out_ready,
  // links 8..11
  output logic       [NAUX-1:0]     aux_valid,
  output link_word_t [NAUX-1:0]     aux_word,
  input  logic       [NAUX-1:0]     aux_ready,
  output logic [31:0]               events_done
);

  logic       [NIN-1:0]    f_empty, f_pop;
  link_word_t [NIN-1:0]    f_word;
  logic [NLAYER-1:0]       hit_valid;
  ss_t  [NLAYER-1:0]       hit_ss;
  logic                    init, event_end;
  logic [NLAMB-1:0]        lamb_done;

  for (genvar i = 0; i < NIN; i++) begin : g_fifo
    input_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .link_valid(in_valid[i]),
      .link_word (in_word[i]),
      .vme_wr    (vme_wr && vme_link == $clog2(NIN)'(i)),
      .vme_word,
      .rd_en     (f_pop[i]),
      .empty     (f_empty[i]),
      .rd_word   (f_word[i]),
      .overflow  (fifo_overflow[i])
    );
  end

  hit_distributor u_dist (
    .clk, .rst_n,
    .fifo_empty (f_empty[NLAYER-1:0]),
    .fifo_word  (f_word[NLAYER-1:0]),
    .fifo_pop   (f_pop[NLAYER-1:0]),
    .hit_valid, .hit_ss, .init, .event_end,
    .coll_done  (&lamb_done),
    .events_done
  );

  for (genvar a = 0; a < NAUX; a++) begin : g_aux
    assign aux_valid[a]      = !f_empty[NLAYER+a];
    assign aux_word[a]       = f_word[NLAYER+a];
    assign f_pop[NLAYER+a]   = aux_ready[a] && !f_empty[NLAYER+a];
  end

  for (genvar l = 0; l < NLAMB; l++) begin : g_lamb
    lamb #(.NCHIP(CHIPS_PER_LAMB), .NOUT(OUT_PER_LAMB), .NPATT(NPATT),
           .ADDR_W(ADDR_W), .CNT_W(CNT_W), .CHIP_W(CHIP_W)) u_lamb (
      .clk, .rst_n, .init, .threshold,
      .pat_wr   (pat_wr && pat_lamb == LAMB_W'(l)),
      .pat_chip, .pat_addr, .pat_data,
      .hit_valid, .hit_ss, .event_end,
      .out_valid(out_valid[l*OUT_PER_LAMB +: OUT_PER_LAMB]),
      .out_word (out_word[l*OUT_PER_LAMB +: OUT_PER_LAMB]),
      .out_ready(out_ready[l*OUT_PER_LAMB +: OUT_PER_LAMB]),
      .done     (lamb_done[l])
    );
  end

endmodule

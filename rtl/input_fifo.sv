// input_fifo: input FIFO of one board input link.
//
// Words reach the FIFO either from the serial link receiver (link_valid,
// one word per 100 MHz cycle) or from a VME write (vme_wr), which lets
// hits be downloaded without the links. A serial link cannot be throttled,
// so a word that finds the FIFO full is dropped and the sticky overflow
// flag is set; if link and VME write in the same cycle the link word is
// kept and the VME word counts as dropped. The head word is visible on
// rd_word while empty is low and is removed by rd_en.
// Timing: a word written in cycle t is readable from cycle t+1.
// That the board has input FIFOs fed by the links and by VME is from the
// design description; depth, drop policy and priority are this design's.
module input_fifo
  import am_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       link_valid,
  input  link_word_t link_word,
  input  logic       vme_wr,
  input  link_word_t vme_word,
  input  logic       rd_en,
  output logic       empty,
  output link_word_t rd_word,
  output logic       overflow
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  link_word_t        mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [PTR_W:0]    count;
  logic              full, do_wr, do_rd;
  link_word_t        wr_word;

  assign full    = (count == (PTR_W+1)'(DEPTH));
  assign empty   = (count == '0);
  assign wr_word = link_valid ? link_word : vme_word;
  assign do_wr   = (link_valid || vme_wr) && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_word = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == PTR_W'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == PTR_W'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PTR_W+1)'(do_wr) - (PTR_W+1)'(do_rd);
      if (((link_valid || vme_wr) && full) || (link_valid && vme_wr)) overflow <= 1'b1;
    end
  end

  // A pop is only issued when a word is there.
  a_no_underflow: assert property (@(posedge clk) rd_en |-> !empty);

endmodule

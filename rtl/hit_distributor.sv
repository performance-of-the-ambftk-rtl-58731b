// hit_distributor: event sequencing and hit fan-out of the board.
//
// Each of the NLAYER layer FIFOs holds the hits of one layer; an event ends
// with an end-of-event control word in every layer. The distributor
//   INIT  : pulses init, which clears all chips for the new event;
//   RUN   : every cycle moves the next hit of each layer that has not yet
//           reached its end-of-event word onto that layer's bus, which
//           fans out to every chip of every LAMB (the 16-bit hit is
//           zero-extended to the 18-bit layer word); other control words
//           are discarded;
//   DRAIN : once all layers have reached end-of-event, waits DRAIN cycles
//           so that the last hits' roads are visible as busy chips;
//   END   : holds event_end until coll_done says every output link has
//           carried its end-of-event word, then counts the event.
// Timing: a hit popped in cycle t is on the bus (registered) in t+1.
// Fan-out of hits to all patterns is from the design description; the
// event protocol, the states and the drain time are this design's.
module hit_distributor
  import am_pkg::*;
#(
  parameter int unsigned DRAIN = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NLAYER-1:0]     fifo_empty,
  input  link_word_t [NLAYER-1:0] fifo_word,
  output logic [NLAYER-1:0]     fifo_pop,
  output logic [NLAYER-1:0]     hit_valid,
  output ss_t  [NLAYER-1:0]     hit_ss,
  output logic                  init,
  output logic                  event_end,
  input  logic                  coll_done,
  output logic [31:0]           events_done
);

  typedef enum logic [1:0] {S_INIT, S_RUN, S_DRAIN, S_END} state_t;

  state_t                 state;
  logic [NLAYER-1:0]      layer_done;
  logic [$clog2(DRAIN+1)-1:0] drain_cnt;

  always_comb begin
    for (int l = 0; l < NLAYER; l++)
      fifo_pop[l] = (state == S_RUN) && !layer_done[l] && !fifo_empty[l];
  end

  assign init      = (state == S_INIT);
  assign event_end = (state == S_END);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      layer_done  <= '0;
      drain_cnt   <= '0;
      hit_valid   <= '0;
      hit_ss      <= '0;
      events_done <= '0;
    end else begin
      hit_valid <= '0;
      unique case (state)
        S_INIT: begin
          layer_done <= '0;
          state      <= S_RUN;
        end
        S_RUN: begin
          for (int l = 0; l < NLAYER; l++) begin
            if (fifo_pop[l]) begin
              if (is_eoe(fifo_word[l])) begin
                layer_done[l] <= 1'b1;
              end else if (!fifo_word[l].ctrl) begin
                hit_valid[l] <= 1'b1;
                hit_ss[l]    <= SS_W'(fifo_word[l].data);
              end
            end
          end
          if (&layer_done) begin
            drain_cnt <= $bits(drain_cnt)'(DRAIN);
            state     <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          if (drain_cnt == '0) state <= S_END;
          else                 drain_cnt <= drain_cnt - 1'b1;
        end
        S_END: begin
          if (coll_done) begin
            events_done <= events_done + 1;
            state       <= S_INIT;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

endmodule

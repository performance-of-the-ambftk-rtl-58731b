// fischer_tree: readout of fired patterns, one address per clock cycle.
//
// A pattern waits for readout while it is fired and has not been read in
// this event. The waiting flags are the leaves of a binary OR tree (padded
// to a power of two); each inner node says whether any leaf below it waits.
// From the root, the descent goes to the left child whenever that child
// has a waiting leaf, so it reaches the lowest waiting address in ADDR_W
// steps. The address is loaded into the output register and its read flag
// is set at once, so it is never selected twice in an event.
//
// Interface and timing: road_valid/road_addr is a registered valid/ready
// output; a new address is loaded whenever the register is empty or being
// taken, so a backlog drains at one road per cycle. A pattern that fires in
// cycle t is at the output in cycle t+1 if nothing else is waiting.
// init clears the read flags and the output register.
// busy is high while a road waits or sits in the output register.
// A binary-tree readout is from the design description; its exact
// (modified) form is not given, and this plain tree with read flags is this
// design's choice.
module fischer_tree #(
  parameter int unsigned N      = 8000,
  parameter int unsigned ADDR_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic [N-1:0]      fired,
  output logic              road_valid,
  output logic [ADDR_W-1:0] road_addr,
  input  logic              road_ready,
  output logic              busy
);

  localparam int unsigned L = 1 << ADDR_W;

  logic [N-1:0]      taken;
  logic [2*L-1:0]    node;     // heap order: node 1 is the root, leaves at L..2L-1
  logic              any_wait;
  logic [ADDR_W-1:0] sel;

  always_comb begin
    node[0] = 1'b0;
    for (int i = 0; i < L; i++) node[L+i] = (i < N) ? (fired[i] & ~taken[i]) : 1'b0;
    for (int i = L - 1; i >= 1; i--) node[i] = node[2*i] | node[2*i+1];
    any_wait = node[1];
  end

  always_comb begin
    int unsigned idx;
    idx = 1;
    for (int k = 0; k < ADDR_W; k++) idx = node[2*idx] ? 2*idx : 2*idx + 1;
    sel = ADDR_W'(idx - L);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taken      <= '0;
      road_valid <= 1'b0;
      road_addr  <= '0;
    end else if (init) begin
      taken      <= '0;
      road_valid <= 1'b0;
    end else if (!road_valid || road_ready) begin
      road_valid <= any_wait;
      if (any_wait) begin
        road_addr  <= sel;
        taken[sel] <= 1'b1;
      end
    end
  end

  assign busy = any_wait | road_valid;

endmodule

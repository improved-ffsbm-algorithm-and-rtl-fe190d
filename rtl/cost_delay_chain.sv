// cost_delay_chain: carries the MVD cost from level to level of the adder tree.
//
// All nodes of one adder-tree level test the same candidate MV in a cycle,
// and with one common predicted MV they share one MVD cost.  A candidate
// reaches the 8x8 level one cycle after the PE array holds it, the 16x8/8x16
// level a cycle later and the 16x16 level a cycle after that, so the cost
// from the look-up table is shifted serially through one register per level
// (LEVELS = 3) and each register's value is broadcast to its level.
//
// `cost_in` is registered into stage 0 at each rising edge; `cost_out[k]`
// is the cost for level k.  The candidate offset and a valid flag travel with
// the cost.  The chain follows the architecture; the tag fields and the
// synchronous reset of the valid bits are this design's own.
module cost_delay_chain
  import ffsbm_pkg::*;
#(
  parameter int unsigned LEVELS = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid_in,
  input  off_t             off_in,
  input  logic [COSTW-1:0] cost_in,
  output logic             valid_out [LEVELS],
  output off_t             off_out   [LEVELS],
  output logic [COSTW-1:0] cost_out  [LEVELS]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < LEVELS; k++) valid_out[k] <= 1'b0;
    end else begin
      valid_out[0] <= valid_in;
      for (int k = 1; k < LEVELS; k++) valid_out[k] <= valid_out[k-1];
    end
  end

  always_ff @(posedge clk) begin
    off_out[0]  <= off_in;
    cost_out[0] <= cost_in;
    for (int k = 1; k < LEVELS; k++) begin
      off_out[k]  <= off_out[k-1];
      cost_out[k] <= cost_out[k-1];
    end
  end

endmodule

// best_mv_node: one node of the adder tree's decision part.
//
// For the candidate presented in a cycle the node forms the rate-distortion
// cost J = SAD + MVD cost and keeps the smallest J seen since `clear`,
// together with the candidate offset that produced it.  A later candidate
// replaces the kept one only if its J is strictly smaller, so on a tie the
// candidate visited first in the scan wins.
//
// Timing: `valid`, `sad`, `cost` and `off` are sampled at the rising edge;
// `best_j`/`best_off` are registered.  `clear` (synchronous, same priority
// as reset) empties the node before a new macroblock.  J = SAD + cost is the
// criterion of the AVS encoder; the strict-less tie rule is this design's.
module best_mv_node
  import ffsbm_pkg::*;
#(
  parameter int unsigned SADW = SAD16W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic [SADW-1:0]  sad,
  input  logic [COSTW-1:0] cost,
  input  off_t             off,
  output logic             has_best,
  output logic [JW-1:0]    best_j,
  output off_t             best_off
);

  logic [JW-1:0] j;
  logic          better;

  assign j      = JW'(sad) + JW'(cost);
  assign better = valid && (!has_best || (j < best_j));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      has_best <= 1'b0;
      best_j   <= '1;
      best_off <= '0;
    end else if (better) begin
      has_best <= 1'b1;
      best_j   <= j;
      best_off <= off;
    end
  end

endmodule

// adder_tree: three-level SAD merging tree with the nine best-MV nodes.
//
// The 256 ADs of the candidate held by the PE array are reduced to the four
// 8x8 SADs, which are registered (level 1).  Level 2 merges pairs of 8x8 SADs
// into the two 16x8 SADs (top = TL+TR, bottom = BL+BR) and the two 8x16 SADs
// (left = TL+BL, right = TR+BR), registered.  Level 3 merges the two 8x16
// SADs into the 16x16 SAD, registered, as the merge diagram of the
// architecture draws it (the two 16x8 SADs would give the same sum).  SADs of larger blocks are thus never
// recomputed from pixels.  Each level's registered SADs go to its best-MV
// nodes together with that level's MVD cost from the cost delay chain.
//
// Timing: a candidate whose ADs are presented in cycle T is judged by the
// 8x8 nodes in T+1, by the 16x8/8x16 nodes in T+2 and by the 16x16 node in
// T+3; `lvl_valid[k]`, `lvl_off[k]` and `lvl_cost[k]` must be the values of
// the cost delay chain, which has the same latency.  Block numbering of the
// outputs follows ffsbm_pkg::blk_e.  The merge structure and the three
// pipeline levels follow the architecture.
module adder_tree
  import ffsbm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  pix_t             ad        [MB][MB],
  input  logic             lvl_valid [3],
  input  off_t             lvl_off   [3],
  input  logic [COSTW-1:0] lvl_cost  [3],
  output logic             has_best  [NBLK],
  output logic [JW-1:0]    best_j    [NBLK],
  output off_t             best_off  [NBLK]
);

  // ---- level 1: 8x8 SADs from the ADs -----------------------------------
  logic [SAD8W-1:0] sad8_d [4];
  logic [SAD8W-1:0] sad8_q [4];

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      sad8_d[b] = '0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          sad8_d[b] = sad8_d[b] + SAD8W'(ad[(b / 2) * 8 + r][(b % 2) * 8 + c]);
    end
  end

  always_ff @(posedge clk) sad8_q <= sad8_d;

  // ---- level 2: 16x8 and 8x16 SADs --------------------------------------
  logic [SAD8W:0] sad2_q [4];   // 0: 16x8 top, 1: 16x8 bottom, 2: 8x16 left, 3: 8x16 right

  always_ff @(posedge clk) begin
    sad2_q[0] <= (SAD8W+1)'(sad8_q[0]) + (SAD8W+1)'(sad8_q[1]);
    sad2_q[1] <= (SAD8W+1)'(sad8_q[2]) + (SAD8W+1)'(sad8_q[3]);
    sad2_q[2] <= (SAD8W+1)'(sad8_q[0]) + (SAD8W+1)'(sad8_q[2]);
    sad2_q[3] <= (SAD8W+1)'(sad8_q[1]) + (SAD8W+1)'(sad8_q[3]);
  end

  // ---- level 3: 16x16 SAD ----------------------------------------------
  logic [SAD16W-1:0] sad3_q;

  always_ff @(posedge clk)
    sad3_q <= SAD16W'(sad2_q[2]) + SAD16W'(sad2_q[3]);

  // ---- decision nodes ----------------------------------------------------
  logic [SAD16W-1:0] node_sad [NBLK];

  always_comb begin
    for (int b = 0; b < 4; b++) node_sad[b] = SAD16W'(sad8_q[b]);
    for (int b = 0; b < 4; b++) node_sad[4 + b] = SAD16W'(sad2_q[b]);
    node_sad[8] = sad3_q;
  end

  for (genvar b = 0; b < NBLK; b++) begin : g_node
    localparam int unsigned L = (b < 4) ? 0 : (b < 8) ? 1 : 2;
    best_mv_node #(.SADW(SAD16W)) u_node (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear),
      .valid    (lvl_valid[L]),
      .sad      (node_sad[b]),
      .cost     (lvl_cost[L]),
      .off      (lvl_off[L]),
      .has_best (has_best[b]),
      .best_j   (best_j[b]),
      .best_off (best_off[b])
    );
  end

endmodule

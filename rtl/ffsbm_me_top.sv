// ffsbm_me_top: variable block size integer motion estimator for one
// 16x16 macroblock, searching a window of adaptive size.
//
// The controlling processor decides per macroblock the half ranges W and H
// (up to 32) and the window centre, which is the predicted MV of the 16x16
// block, and sends them with lambda as one command.  The estimator then
// visits every candidate of the (2W+1) x (2H+1) window, one per clock, and
// returns for each of the nine partitions (four 8x8, two 16x8, two 8x16,
// one 16x16) the MV minimising J = SAD + lambda * bits(MV - predicted MV).
//
// Structure:
//   me_controller    scan sequencing, input modes, two-pass split
//   col_formatter    arranges each incoming search-area column (mode a / b)
//   pe_array         48 x 16 PEs, top 16 x 16 active, yields 256 ADs/cycle
//   mvd_cost_lut     MVD cost of the candidate (same for all nine blocks)
//   cost_delay_chain carries the cost to the three adder-tree levels
//   adder_tree       8x8 -> 16x8/8x16 -> 16x16 SAD merge + best-MV nodes
//
// Interfaces:
//   command   cmd_valid/cmd_ready/cmd (ffsbm_pkg::cmd_t); accepted only when
//             idle; `done` pulses when `result` is final (it then stays
//             until the next accepted command).
//   current   cur_we/cur_row/cur_data writes one 16-pixel row of the current
//             macroblock; write all 16 rows before the command.
//   search    when `col_req` is high, `col_data` must in the same cycle carry
//             search-area column `col_x` (0 .. 2W+15, left to right), rows
//             col_y0 .. col_y0+47 in natural order (rows past 2H+15 are
//             don't-care).  Search-area row 0 / column 0 is the pixel at
//             (centre - (W, H)) of the reference frame.
// A search takes 16 * passes + (2W+1)(2H+1) cycles plus 5 cycles of
// acceptance, pipeline drain and done; passes = 1 if H <= 16, else 2.
module ffsbm_me_top
  import ffsbm_pkg::*;
#(
  parameter int unsigned ROWS = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  cmd_t        cmd,
  input  logic        cur_we,
  input  logic [3:0]  cur_row,
  input  pix_t        cur_data [MB],
  output logic        col_req,
  output logic [RW:0] col_x,
  output logic [RW:0] col_y0,
  input  pix_t        col_data [ROWS],
  output logic        busy,
  output logic        done,
  output result_t     result   [NBLK]
);

  cmd_t   cmd_q;
  logic   clear, mode_b, cand_valid;
  shift_e shift;
  logic [$clog2(ROWS)-1:0] rot;
  off_t   cand_off;

  me_controller #(.ROWS(ROWS)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cmd_valid  (cmd_valid),
    .cmd_ready  (cmd_ready),
    .cmd        (cmd),
    .cmd_q      (cmd_q),
    .clear      (clear),
    .shift      (shift),
    .col_req    (col_req),
    .col_x      (col_x),
    .col_y0     (col_y0),
    .mode_b     (mode_b),
    .rot        (rot),
    .cand_valid (cand_valid),
    .cand_off   (cand_off),
    .busy       (busy),
    .done       (done)
  );

  pix_t col_in [ROWS];

  col_formatter #(.ROWS(ROWS)) u_fmt (
    .col_nat (col_data),
    .mode_b  (mode_b),
    .rot     (rot),
    .col_out (col_in)
  );

  pix_t ad [MB][MB];

  pe_array #(.ROWS(ROWS), .COLS(MB), .ACT(MB)) u_array (
    .clk      (clk),
    .shift    (shift),
    .col_in   (col_in),
    .cur_we   (cur_we),
    .cur_row  (cur_row),
    .cur_data (cur_data),
    .ad       (ad)
  );

  logic [COSTW-1:0] cost;

  mvd_cost_lut #(.RANGE(RMAX)) u_lut (
    .off    (cand_off),
    .lambda (cmd_q.lambda),
    .cost   (cost)
  );

  logic             lvl_valid [3];
  off_t             lvl_off   [3];
  logic [COSTW-1:0] lvl_cost  [3];

  cost_delay_chain #(.LEVELS(3)) u_chain (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (cand_valid),
    .off_in    (cand_off),
    .cost_in   (cost),
    .valid_out (lvl_valid),
    .off_out   (lvl_off),
    .cost_out  (lvl_cost)
  );

  logic          has_best [NBLK];
  logic [JW-1:0] best_j   [NBLK];
  off_t          best_off [NBLK];

  adder_tree u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .ad        (ad),
    .lvl_valid (lvl_valid),
    .lvl_off   (lvl_off),
    .lvl_cost  (lvl_cost),
    .has_best  (has_best),
    .best_j    (best_j),
    .best_off  (best_off)
  );

  always_comb begin
    for (int b = 0; b < NBLK; b++) begin
      result[b].off  = best_off[b];
      result[b].mv_x = cmd_q.pmv_x + MVW'(best_off[b].dx);
      result[b].mv_y = cmd_q.pmv_y + MVW'(best_off[b].dy);
      result[b].j    = best_j[b];
    end
  end

  // Every partition has seen at least one candidate when the search ends.
  for (genvar b = 0; b < NBLK; b++) begin : g_chk
    a_has_best: assert property (@(posedge clk) disable iff (!rst_n) done |-> has_best[b]);
  end

endmodule

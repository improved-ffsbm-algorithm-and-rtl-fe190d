// pe_array: the 2-D PE array that holds one candidate block per cycle.
//
// ROWS x COLS processing elements (48 x 16 by default).  The top ACT rows
// (16) are active PEs: each pairs a current-macroblock pixel with the search
// pixel at the same position and outputs their absolute difference, so the
// 256 ADs of one candidate appear together.  The remaining rows are inactive
// and only store search pixels.  All search pixels move together:
//   SH_LEFT : every column takes its right neighbour, the rightmost column
//             takes `col_in` (a new search-area column, row 0 at the top);
//   SH_UP   : every row takes the row below, row ROWS-1 takes row 0;
//   SH_DOWN : every row takes the row above, row 0 takes row ROWS-1.
// The vertical moves are circular over the full array height.
//
// The current macroblock is written one row per cycle (`cur_we`, `cur_row`,
// `cur_data`) before a search starts.  `ad[r][c]` is combinational from the
// registers.  Array shape, active region and shift directions follow the
// architecture; the row-wise current-block write port is this design's own.
module pe_array
  import ffsbm_pkg::*;
#(
  parameter int unsigned ROWS = 48,
  parameter int unsigned COLS = 16,
  parameter int unsigned ACT  = 16
) (
  input  logic   clk,
  input  shift_e shift,
  input  pix_t   col_in   [ROWS],
  input  logic   cur_we,
  input  logic [$clog2(ACT)-1:0] cur_row,
  input  pix_t   cur_data [COLS],
  output pix_t   ad       [ACT][COLS]
);

  pix_t ref_pix [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      pix_t right_n, below_n, above_n, ad_w;
      assign right_n = (c == COLS - 1) ? col_in[r] : ref_pix[r][(c + 1) % COLS];
      assign below_n = ref_pix[(r + 1) % ROWS][c];
      assign above_n = ref_pix[(r + ROWS - 1) % ROWS][c];

      pe #(.ACTIVE(r < ACT)) u_pe (
        .clk        (clk),
        .shift      (shift),
        .from_right (right_n),
        .from_below (below_n),
        .from_above (above_n),
        .cur_we     (cur_we && (r < ACT) && (int'(cur_row) == r)),
        .cur_in     (cur_data[c]),
        .ref_pix    (ref_pix[r][c]),
        .ad         (ad_w)
      );

      if (r < ACT) begin : g_ad
        assign ad[r][c] = ad_w;
      end
    end
  end

endmodule

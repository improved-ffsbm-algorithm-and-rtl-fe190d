// col_formatter: arranges one new search-area column for the PE array.
//
// The search-area buffer delivers a column in natural order: element k is
// the pixel of search-area row (row0 + k).  The PE array accepts it in one of
// two input modes.  Mode (a) keeps natural order (row 0 at the top; rows
// past the used part are don't-care padding).  Mode (b) is used while the
// array content is rotated upwards by S rows, after S upward shifts: the
// column is rotated the same way, so PE row r receives element (r + S) mod
// ROWS.  With S = 2H this places rows 2H..2H+15 at the top, the padding in
// the middle and rows 0..2H-1 at the bottom.
//
// Purely combinational.  The two modes follow the architecture; doing the
// rotation inside the estimator rather than in the buffer is this design's
// own choice.
module col_formatter
  import ffsbm_pkg::*;
#(
  parameter int unsigned ROWS = 48
) (
  input  pix_t  col_nat [ROWS],
  input  logic  mode_b,
  input  logic [$clog2(ROWS)-1:0] rot,
  output pix_t  col_out [ROWS]
);

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      if (mode_b) col_out[r] = col_nat[(r + int'(rot)) % ROWS];
      else        col_out[r] = col_nat[r];
    end
  end

endmodule

// pe: one processing element of the motion estimation PE array.
//
// Every PE holds one search-area pixel that can be moved to a neighbour in
// three directions: leftward (take the pixel of the right neighbour), upward
// (take the pixel of the PE below) and downward (take the pixel of the PE
// above).  An active PE (ACTIVE=1, the 16x16 block at the top of the array)
// also holds one pixel of the current macroblock and outputs the absolute
// difference of the two pixels every cycle; an inactive PE only stores and
// moves its search pixel.
//
// Interface: `shift` selects the move applied at the next rising edge;
// `from_right`, `from_below`, `from_above` are the neighbours' pixels.  The
// current pixel is written through `cur_we`/`cur_in`.  `ref_pix` and `ad` are
// combinational from the registers, so the AD of the candidate held now is
// available in the same cycle.  The shift directions and the split into
// active and inactive PEs follow the architecture; the reset-free storage and
// the separate current-pixel write port are this design's choice.
module pe
  import ffsbm_pkg::*;
#(
  parameter bit ACTIVE = 1'b1
) (
  input  logic   clk,
  input  shift_e shift,
  input  pix_t   from_right,
  input  pix_t   from_below,
  input  pix_t   from_above,
  input  logic   cur_we,
  input  pix_t   cur_in,
  output pix_t   ref_pix,
  output pix_t   ad
);

  pix_t ref_q;

  always_ff @(posedge clk) begin
    unique case (shift)
      SH_LEFT: ref_q <= from_right;
      SH_UP:   ref_q <= from_below;
      SH_DOWN: ref_q <= from_above;
      default: ref_q <= ref_q;
    endcase
  end

  assign ref_pix = ref_q;

  if (ACTIVE) begin : g_active
    pix_t cur_q;
    always_ff @(posedge clk)
      if (cur_we) cur_q <= cur_in;
    assign ad = (cur_q > ref_q) ? pix_t'(cur_q - ref_q) : pix_t'(ref_q - cur_q);
  end else begin : g_inactive
    // No current pixel: the AD output is unused and held at zero.
    assign ad = '0;
  end

endmodule

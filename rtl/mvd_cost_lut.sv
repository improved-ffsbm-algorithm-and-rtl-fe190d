// mvd_cost_lut: MVD cost look-up for the rate-distortion criterion.
//
// Every block uses the 16x16 block's predicted MV p, which is also the
// search window centre, so the MVD m - p of a candidate is simply its offset
// (dx, dy) in the window.  The cost is
//   cost = lambda * (len(4*dx) + len(4*dy))
// where len(v) is the length of the signed Exp-Golomb code of v and the
// factor 4 expresses the integer-pel offset in quarter-pel MVD units.  A
// ROM of RMAX+1 entries, filled at elaboration from the code-length formula,
// is indexed by |dx| and by |dy| (the code length is symmetric).
//
// Combinational: the cost belongs to the offset presented in the same cycle.
// A look-up table for the MVD cost follows the architecture; the code-length
// formula, the quarter-pel scaling and the multiplication by lambda are this
// design's reading of the AVS bit cost.
module mvd_cost_lut
  import ffsbm_pkg::*;
#(
  parameter int unsigned RANGE = RMAX
) (
  input  off_t            off,
  input  logic [LAMW-1:0] lambda,
  output logic [COSTW-1:0] cost
);

  localparam int unsigned LENW = 5;
  localparam int unsigned IDXW = $clog2(RANGE + 1);
  typedef logic [LENW-1:0] len_t;

  function automatic len_t rom_entry(input int unsigned a);
    return len_t'(se_len(4 * int'(a)));
  endfunction

  len_t rom [RANGE+1];
  for (genvar a = 0; a <= RANGE; a++) begin : g_rom
    assign rom[a] = rom_entry(a);
  end

  logic [OFFW-1:0] ax, ay;
  logic [LENW:0]   bits;

  always_comb begin
    ax = off.dx[OFFW-1] ? OFFW'(-off.dx) : OFFW'(off.dx);
    ay = off.dy[OFFW-1] ? OFFW'(-off.dy) : OFFW'(off.dy);
    if (ax > OFFW'(RANGE)) ax = OFFW'(RANGE);
    if (ay > OFFW'(RANGE)) ay = OFFW'(RANGE);
    bits = (LENW+1)'(rom[IDXW'(ax)]) + (LENW+1)'(rom[IDXW'(ay)]);
    cost = COSTW'(lambda * bits);
  end

endmodule

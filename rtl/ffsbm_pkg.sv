// ffsbm_pkg: shared constants, types and helper functions of the FFSBM
// variable block size motion estimator.
//
// The estimator evaluates one integer candidate motion vector per clock for
// all nine AVS partitions of a 16x16 macroblock (four 8x8, two 16x8, two 8x16
// and one 16x16).  Sizes that follow the architecture: a 16-pixel-wide,
// 48-row PE array, search ranges up to +/-32 in each direction.  Widths of
// the SAD, cost and motion vector fields are this design's own choice.
package ffsbm_pkg;

  localparam int unsigned PIXW   = 8;    // luma sample width
  localparam int unsigned MB     = 16;   // macroblock edge
  localparam int unsigned RMAX   = 32;   // largest W and H
  localparam int unsigned RW     = 6;    // width of W, H (0..32)
  localparam int unsigned OFFW   = 7;    // signed candidate offset (-32..32)
  localparam int unsigned MVW    = 12;   // signed integer-pel motion vector
  localparam int unsigned LAMW   = 8;    // lambda_motion multiplier
  localparam int unsigned SAD8W  = 14;   // 64 * 255 fits
  localparam int unsigned SAD16W = 16;   // 256 * 255 fits
  localparam int unsigned COSTW  = 14;   // lambda * (bits_x + bits_y)
  localparam int unsigned JW     = 17;   // SAD16 + cost

  typedef logic [PIXW-1:0] pix_t;

  // Partition indices of the nine blocks.  8x8: 0 top-left, 1 top-right,
  // 2 bottom-left, 3 bottom-right.  16x8 (width x height): 4 top, 5 bottom.
  // 8x16: 6 left, 7 right.  16x16: 8.
  localparam int unsigned NBLK = 9;
  typedef enum logic [3:0] {
    B8_TL = 4'd0, B8_TR = 4'd1, B8_BL = 4'd2, B8_BR = 4'd3,
    B16X8_T = 4'd4, B16X8_B = 4'd5, B8X16_L = 4'd6, B8X16_R = 4'd7,
    B16X16 = 4'd8
  } blk_e;

  // Move applied to every search pixel of the PE array at a clock edge.
  typedef enum logic [1:0] {
    SH_HOLD = 2'd0, SH_LEFT = 2'd1, SH_UP = 2'd2, SH_DOWN = 2'd3
  } shift_e;

  // Candidate offset relative to the window centre (the predicted MV).
  typedef struct packed {
    logic signed [OFFW-1:0] dx;
    logic signed [OFFW-1:0] dy;
  } off_t;

  // Command sent by the controlling processor for one macroblock.
  typedef struct packed {
    logic [RW-1:0]         w;       // horizontal half range, window 2W+1
    logic [RW-1:0]         h;       // vertical half range,  window 2H+1
    logic signed [MVW-1:0] pmv_x;   // predicted MV of the 16x16 block
    logic signed [MVW-1:0] pmv_y;
    logic [LAMW-1:0]       lambda;  // lambda_motion
  } cmd_t;

  // Result for one partition.
  typedef struct packed {
    off_t                  off;     // best MV minus predicted MV (the MVD)
    logic signed [MVW-1:0] mv_x;    // best MV
    logic signed [MVW-1:0] mv_y;
    logic [JW-1:0]         j;       // SAD + MVD cost of the best MV
  } result_t;

  // Length in bits of the signed Exp-Golomb code se(v) of value v.
  function automatic int unsigned se_len(input int v);
    int unsigned k, n;
    k = (v > 0) ? unsigned'(2 * v - 1) : unsigned'(-2 * v);
    n = 0;
    for (int i = 1; i < 32; i++)
      if (((k + 1) >> i) != 0) n = i;
    return 2 * n + 1;
  endfunction

endpackage

// me_controller: sequences the search of one macroblock.
//
// A command from the controlling processor gives the half ranges W and H
// (window of (2W+1) x (2H+1) candidates around the predicted MV), the
// predicted MV and lambda.  The search area is (2W+16) columns by (2H+16)
// rows.  The window is covered in vertical passes of at most ROWS-15
// candidate rows (33 for a 48-row array): one pass if 2H+16 <= ROWS,
// otherwise a top pass of 33 rows and a second pass for the rest.  A pass
// with vertical base v0 and S = (its candidate rows - 1) runs:
//   LOAD : 16 cycles of leftward shifts bringing in search-area columns
//          0..15 in input mode (a); after them the array holds candidate
//          column x = 0, vertical position 0.
//   SCAN : one candidate per cycle.  Within candidate column x the array
//          is shifted S times, upward if x is even, downward if x is odd
//          (circularly), visiting positions 0..S or S..0.  Then a leftward
//          shift brings in search-area column x+16, in input mode (b)
//          (rotated by S) after an even x and mode (a) after an odd x.
// After the last pass the pipeline drains for 3 cycles (the adder tree
// depth) and `done` pulses for one cycle.  A search therefore takes
// 16*passes + (2W+1)(2H+1) cycles of array activity, 4257 at W = H = 32.
//
// Interface: `cmd_valid`/`cmd_ready` handshake (ready only when idle);
// `shift`, `col_req`, `col_x` (search-area column), `col_y0` (search-area
// row shown at PE row 0 in mode (a)), `mode_b`, `rot` drive the array and
// column formatter in the same cycle; `cand_valid`/`cand_off` tag the
// candidate the array holds in the current cycle; `clear` pulses when a
// command is accepted.  Scan order, input modes, the two-pass split and its
// 16 extra cycles follow the architecture; the handshake, state encoding and
// drain/done timing are this design's own.
module me_controller
  import ffsbm_pkg::*;
#(
  parameter int unsigned ROWS = 48
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cmd_valid,
  output logic   cmd_ready,
  input  cmd_t   cmd,
  output cmd_t   cmd_q,
  output logic   clear,
  output shift_e shift,
  output logic   col_req,
  output logic [RW:0] col_x,
  output logic [RW:0] col_y0,
  output logic   mode_b,
  output logic [$clog2(ROWS)-1:0] rot,
  output logic   cand_valid,
  output off_t   cand_off,
  output logic   busy,
  output logic   done
);

  localparam int unsigned PASS_ROWS = ROWS - MB + 1;   // candidate rows per pass
  localparam int unsigned SMAX      = ROWS - MB;       // vertical shifts per pass

  typedef enum logic [2:0] { ST_IDLE, ST_LOAD, ST_SCAN, ST_DRAIN, ST_DONE } state_e;

  state_e          state;
  logic [3:0]      lcnt;          // load column counter
  logic [RW:0]     x;             // candidate column 0..2W
  logic [RW:0]     vcnt;          // shifts done in this column 0..S
  logic [RW:0]     v0;            // first candidate row of this pass
  logic [1:0]      dcnt;          // drain counter

  logic [RW:0]     two_w, two_h, s_pass, vpos;

  always_comb begin
    two_w  = (RW+1)'(cmd_q.w) << 1;
    two_h  = (RW+1)'(cmd_q.h) << 1;
    s_pass = ((two_h - v0) > (RW+1)'(SMAX)) ? (RW+1)'(SMAX) : (two_h - v0);
    vpos   = x[0] ? (s_pass - vcnt) : vcnt;
  end

  assign cmd_ready = (state == ST_IDLE);
  assign busy      = (state != ST_IDLE);
  assign done      = (state == ST_DONE);
  assign clear     = cmd_valid && cmd_ready;

  always_comb begin
    shift      = SH_HOLD;
    col_req    = 1'b0;
    col_x      = '0;
    mode_b     = 1'b0;
    cand_valid = 1'b0;
    cand_off.dx = OFFW'(signed'({1'b0, x})) - OFFW'(signed'({1'b0, cmd_q.w}));
    cand_off.dy = OFFW'(signed'({1'b0, v0})) + OFFW'(signed'({1'b0, vpos}))
                - OFFW'(signed'({1'b0, cmd_q.h}));
    col_y0     = v0;
    rot        = $clog2(ROWS)'(s_pass);
    unique case (state)
      ST_LOAD: begin
        shift   = SH_LEFT;
        col_req = 1'b1;
        col_x   = (RW+1)'(lcnt);
      end
      ST_SCAN: begin
        cand_valid = 1'b1;
        if (vcnt < s_pass) begin
          shift = x[0] ? SH_DOWN : SH_UP;
        end else if (x < two_w) begin
          shift   = SH_LEFT;
          col_req = 1'b1;
          col_x   = x + (RW+1)'(MB);
          mode_b  = !x[0];
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      lcnt  <= '0;
      x     <= '0;
      vcnt  <= '0;
      v0    <= '0;
      dcnt  <= '0;
      cmd_q <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (cmd_valid) begin
          cmd_q <= cmd;
          v0    <= '0;
          lcnt  <= '0;
          state <= ST_LOAD;
        end
        ST_LOAD: begin
          lcnt <= lcnt + 4'd1;
          if (lcnt == 4'(MB - 1)) begin
            x     <= '0;
            vcnt  <= '0;
            state <= ST_SCAN;
          end
        end
        ST_SCAN: begin
          if (vcnt < s_pass) begin
            vcnt <= vcnt + 1'b1;
          end else if (x < two_w) begin
            x    <= x + 1'b1;
            vcnt <= '0;
          end else if (v0 + s_pass < two_h) begin
            v0    <= v0 + (RW+1)'(PASS_ROWS);
            lcnt  <= '0;
            state <= ST_LOAD;
          end else begin
            dcnt  <= '0;
            state <= ST_DRAIN;
          end
        end
        ST_DRAIN: begin
          dcnt <= dcnt + 2'd1;
          if (dcnt == 2'd2) state <= ST_DONE;
        end
        ST_DONE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The processor may not ask for a range the PE array cannot cover.
  a_cmd_range: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd_valid && cmd_ready) |-> (cmd.w <= RW'(RMAX) && cmd.h <= RW'(RMAX)));

  // Column requests stay inside the (2W+16)-column search area, and the
  // array is only moved while a search is running.
  a_col_in_area: assert property (@(posedge clk) disable iff (!rst_n)
    col_req |-> (col_x < two_w + (RW+1)'(MB)));
  a_idle_still: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_IDLE) |-> (shift == SH_HOLD && !cand_valid));

endmodule

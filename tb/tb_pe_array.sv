// tb_pe_array: a model 48 x 16 pixel grid receives the same moves and input
// columns as the PE array (random sequences of left, up, down and hold
// moves, with random current-block rows written now and then); every cycle
// the 256 ADs must equal |cur - model| over the top 16 rows.  The circular
// wrap of the vertical moves is exercised by long runs of one direction.
module tb_pe_array;
  import ffsbm_pkg::*;
  localparam int ROWS = 48;

  logic clk = 1'b0;
  shift_e shift = SH_HOLD;
  pix_t col_in [ROWS];
  logic cur_we = 1'b0;
  logic [3:0] cur_row = '0;
  pix_t cur_data [MB];
  pix_t ad [MB][MB];
  int checks = 0, failures = 0;
  int n_wrap_up = 0, n_wrap_down = 0;

  pix_t m_ref [ROWS][MB];
  pix_t m_cur [MB][MB];

  pe_array #(.ROWS(ROWS), .COLS(MB), .ACT(MB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input shift_e s, input bit wr);
    pix_t nxt [ROWS][MB];
    shift = s;
    for (int k = 0; k < ROWS; k++) col_in[k] = pix_t'($urandom);
    cur_we = wr; cur_row = 4'($urandom_range(0, 15));
    for (int c = 0; c < MB; c++) cur_data[c] = pix_t'($urandom);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < MB; c++)
        case (s)
          SH_LEFT: nxt[r][c] = (c == MB - 1) ? col_in[r] : m_ref[r][c + 1];
          SH_UP:   nxt[r][c] = m_ref[(r + 1) % ROWS][c];
          SH_DOWN: nxt[r][c] = m_ref[(r + ROWS - 1) % ROWS][c];
          default: nxt[r][c] = m_ref[r][c];
        endcase
    m_ref = nxt;
    if (wr) for (int c = 0; c < MB; c++) m_cur[cur_row][c] = cur_data[c];
    @(negedge clk);
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < MB; c++) begin
        int d;
        d = int'(m_cur[r][c]) - int'(m_ref[r][c]);
        if (d < 0) d = -d;
        checks++;
        if (int'(ad[r][c]) != d) begin
          failures++;
          if (failures < 10) $display("FAIL move %0d: ad[%0d][%0d]=%0d exp %0d", s, r, c, ad[r][c], d);
        end
      end
  endtask

  initial begin
    @(negedge clk);
    for (int r = 0; r < MB; r++) begin
      cur_we = 1'b1; cur_row = 4'(r);
      for (int c = 0; c < MB; c++) begin cur_data[c] = pix_t'($urandom); m_cur[r][c] = cur_data[c]; end
      @(negedge clk);
    end
    cur_we = 1'b0;
    // fill the whole array with 16 left moves, then the model is exact
    for (int i = 0; i < MB; i++) begin
      shift = SH_LEFT;
      for (int k = 0; k < ROWS; k++) col_in[k] = pix_t'($urandom);
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < MB - 1; c++) m_ref[r][c] = m_ref[r][c + 1];
        m_ref[r][MB - 1] = col_in[r];
      end
      @(negedge clk);
    end
    for (int i = 0; i < 60; i++) begin step(SH_UP, 0); n_wrap_up++; end     // more than a full turn
    for (int i = 0; i < 60; i++) begin step(SH_DOWN, 0); n_wrap_down++; end
    for (int i = 0; i < 400; i++) step(shift_e'($urandom_range(0, 3)), $urandom_range(0, 7) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

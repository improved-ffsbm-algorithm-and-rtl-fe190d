// tb_workload_fig2: adaptive window sizes from a measured MVD field.
//
// tb/fig2_mvdx.hex holds |horizontal MVD| of the 16x16 blocks of one CIF
// frame of the "Foreman" sequence (18 rows x 23 columns of macroblocks as
// printed with the algorithm's description).  A behavioural model of the
// controlling processor turns it into the next frame's horizontal half
// ranges: W = 4 * mean over the 5 x 5 macroblocks around each one
// (neighbours outside the frame are left out of the mean), limited to 32.
// The vertical MVD field is not available, so every macroblock uses H = 2.
//
// The estimator then searches one whole macroblock row (row 7, through the
// moving object) with these windows on synthetic content: a random search
// area with the current block copied, plus noise, from a random position
// inside the window.  Each macroblock's nine results are compared with an
// exhaustive reference (ties broken by scan order), and its array cycles
// with 16 + (2W+1)(2H+1).  The bench also reports the cycle saving of the
// row and of the whole frame against a fixed +/-32 window (4257 cycles).
module tb_workload_fig2;
  import ffsbm_pkg::*;

  localparam int ROWS = 48;
  localparam int MBR = 18, MBC = 23;
  localparam int SAW = 2 * RMAX + MB;
  localparam int HV  = 2;
  localparam int ROW_UNDER_TEST = 7;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    cmd_valid = 1'b0, cmd_ready;
  cmd_t    cmd;
  logic    cur_we = 1'b0;
  logic [3:0] cur_row = '0;
  pix_t    cur_data [MB];
  logic    col_req;
  logic [RW:0] col_x, col_y0;
  pix_t    col_data [ROWS];
  logic    busy, done;
  result_t result [NBLK];

  ffsbm_me_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [3:0] mvdx [MBR * MBC];
  int wtab [MBR][MBC];
  pix_t sa  [SAW][SAW];
  pix_t cur [MB][MB];
  int cur_w = 0, cur_h = 0;

  always_comb begin
    for (int k = 0; k < ROWS; k++) begin
      int yy;
      yy = int'(col_y0) + k;
      if (yy < 2 * cur_h + MB && int'(col_x) < 2 * cur_w + MB) col_data[k] = sa[yy][int'(col_x)];
      else col_data[k] = pix_t'(k * 29 + 3);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_len(input int v);
    int k, nb;
    k  = (v > 0) ? 2 * v - 1 : -2 * v;
    nb = 0;
    while ((k + 1) >> nb > 1) nb++;
    return 2 * nb + 1;
  endfunction

  task automatic search_mb(input int w, input int h, input int lambda, output int cycles);
    int ref_j [NBLK], ref_dx [NBLK], ref_dy [NBLK];
    int mx, my;
    cur_w = w; cur_h = h;
    mx = $urandom_range(0, 2 * w) - w; my = $urandom_range(0, 2 * h) - h;
    for (int r = 0; r < SAW; r++)
      for (int c = 0; c < SAW; c++) sa[r][c] = pix_t'($urandom_range(0, 255));
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < MB; c++) begin
        int v;
        v = int'(sa[my + h + r][mx + w + c]) + int'($urandom_range(0, 8)) - 4;
        cur[r][c] = pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
    for (int r = 0; r < MB; r++) begin
      @(negedge clk);
      cur_we = 1'b1; cur_row = 4'(r);
      for (int c = 0; c < MB; c++) cur_data[c] = cur[r][c];
    end
    @(negedge clk) cur_we = 1'b0;
    // exhaustive reference in scan order (one pass: H <= 16), first minimum wins
    for (int b = 0; b < NBLK; b++) ref_j[b] = 1 << 30;
    for (int x = 0; x <= 2 * w; x++)
      for (int i = 0; i <= 2 * h; i++) begin
        int dx, dy, s8 [4], sad [NBLK], cost;
        dx = x - w;
        dy = ((x % 2) == 0 ? i : 2 * h - i) - h;
        for (int b = 0; b < 4; b++) s8[b] = 0;
        for (int r = 0; r < MB; r++)
          for (int c = 0; c < MB; c++) begin
            int d;
            d = int'(cur[r][c]) - int'(sa[dy + h + r][dx + w + c]);
            s8[(r / 8) * 2 + c / 8] += (d < 0) ? -d : d;
          end
        sad[0] = s8[0]; sad[1] = s8[1]; sad[2] = s8[2]; sad[3] = s8[3];
        sad[4] = s8[0] + s8[1]; sad[5] = s8[2] + s8[3];
        sad[6] = s8[0] + s8[2]; sad[7] = s8[1] + s8[3];
        sad[8] = s8[0] + s8[1] + s8[2] + s8[3];
        cost = lambda * (ref_len(4 * dx) + ref_len(4 * dy));
        for (int b = 0; b < NBLK; b++)
          if (sad[b] + cost < ref_j[b]) begin ref_j[b] = sad[b] + cost; ref_dx[b] = dx; ref_dy[b] = dy; end
      end
    cmd = '0; cmd.w = RW'(w); cmd.h = RW'(h); cmd.lambda = LAMW'(lambda);
    cmd_valid = 1'b1;
    @(posedge clk);
    @(negedge clk) cmd_valid = 1'b0;
    cycles = 0;
    while (!done) begin
      if (dut.shift != SH_HOLD || dut.cand_valid) cycles++;
      @(negedge clk);
    end
    checks++;
    if (cycles != 16 + (2 * w + 1) * (2 * h + 1)) begin
      failures++; $display("FAIL W=%0d: %0d cycles", w, cycles);
    end
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (int'(result[b].j) != ref_j[b] || int'(result[b].off.dx) != ref_dx[b] ||
          int'(result[b].off.dy) != ref_dy[b]) begin
        failures++;
        $display("FAIL W=%0d blk %0d: J=%0d exp %0d", w, b, result[b].j, ref_j[b]);
      end
    end
    // the planted block must be found by the 16x16 partition when lambda is small
    checks++;
    if (int'(result[8].off.dx) != mx || int'(result[8].off.dy) != my) begin
      failures++; $display("FAIL W=%0d: planted (%0d,%0d) not found", w, mx, my);
    end
  endtask

  initial begin
    longint row_cycles, row_full, frame_cycles, frame_full;
    $readmemh("tb/fig2_mvdx.hex", mvdx);
    // processor model: window widths for the next frame
    for (int i = 0; i < MBR; i++)
      for (int j = 0; j < MBC; j++) begin
        int s, n;
        s = 0; n = 0;
        for (int m = i - 2; m <= i + 2; m++)
          for (int k = j - 2; k <= j + 2; k++)
            if (m >= 0 && m < MBR && k >= 0 && k < MBC) begin s += int'(mvdx[m * MBC + k]); n++; end
        wtab[i][j] = (4 * s) / n;
        if (wtab[i][j] > RMAX) wtab[i][j] = RMAX;
      end
    frame_cycles = 0;
    for (int i = 0; i < MBR; i++)
      for (int j = 0; j < MBC; j++) frame_cycles += 16 + (2 * wtab[i][j] + 1) * (2 * HV + 1);
    frame_full = longint'(MBR * MBC) * 4257;
    // spot check of the window computation against hand-worked values
    checks++;
    if (wtab[0][0] != 0 || wtab[7][9] != 12 || wtab[3][9] != 9) begin
      failures++; $display("FAIL window table %0d %0d %0d", wtab[0][0], wtab[7][9], wtab[3][9]);
    end
    for (int c = 0; c < MB; c++) cur_data[c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    row_cycles = 0; row_full = 0;
    for (int j = 0; j < MBC; j++) begin
      int cyc;
      search_mb(wtab[ROW_UNDER_TEST][j], HV, 2, cyc);
      row_cycles += cyc;
      row_full += 4257;
    end
    $display("row %0d: %0d array cycles vs %0d for a fixed +/-32 window",
             ROW_UNDER_TEST, row_cycles, row_full);
    $display("frame (H=%0d): %0d array cycles vs %0d, ratio %0d.%02d", HV, frame_cycles, frame_full,
             frame_full / frame_cycles, (frame_full * 100 / frame_cycles) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

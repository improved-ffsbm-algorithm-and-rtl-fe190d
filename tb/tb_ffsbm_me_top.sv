// tb_ffsbm_me_top: end-to-end test of the motion estimator at its default
// size (48-row PE array, ranges up to +/-32).
//
// For each test macroblock the bench builds a random search area, copies a
// block of it (plus small noise) into the current macroblock, writes it,
// and issues a command.  A behavioural search-area buffer answers column
// requests; rows beyond the search area are filled with random padding so
// that a wrong input arrangement shows up.  The reference computes J = SAD +
// lambda*(len(4dx)+len(4dy)) for every candidate and every partition with a
// straightforward loop, picks the minimum, and breaks ties by the
// serpentine column scan order of the architecture.  Also checked: the
// number of array cycles, 16*passes + (2W+1)(2H+1) (4257 at W = H = 32), and
// the number of candidates evaluated.  Each mechanism (upward, downward and
// leftward shifts, input modes a and b, one- and two-pass searches, best
// updates) is counted and must occur.
module tb_ffsbm_me_top;
  import ffsbm_pkg::*;

  localparam int ROWS = 48;
  localparam int SAW  = 2 * RMAX + MB;   // largest search area edge (80)

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
  int n_up = 0, n_down = 0, n_mode_a = 0, n_mode_b = 0, n_one_pass = 0,
      n_two_pass = 0, n_updates = 0;

  pix_t sa  [SAW][SAW];    // search area [row][col]
  pix_t cur [MB][MB];
  int   cur_w, cur_h;

  // Behavioural search-area buffer: natural order column, random padding.
  always_comb begin
    for (int k = 0; k < ROWS; k++) begin
      int yy;
      yy = int'(col_y0) + k;
      if (yy < 2 * cur_h + MB && int'(col_x) < 2 * cur_w + MB)
        col_data[k] = sa[yy][int'(col_x)];
      else
        col_data[k] = pix_t'(k * 37 + int'(col_x) * 11 + 5);
    end
  end

  // Mechanism counters
  always @(posedge clk) begin
    if (dut.shift == SH_UP)   n_up++;
    if (dut.shift == SH_DOWN) n_down++;
    if (dut.shift == SH_LEFT && dut.u_ctrl.state == dut.u_ctrl.ST_SCAN) begin
      if (dut.mode_b) n_mode_b++; else n_mode_a++;
    end
  end
  for (genvar b = 0; b < NBLK; b++) begin : g_upd
    always @(posedge clk) if (dut.u_tree.g_node[b].u_node.better) n_updates++;
  end

  // Watchdog
  initial begin
    repeat (400000) @(posedge clk);
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

  function automatic int scan_rank(input int dx, input int dy, input int w, input int h);
    int vy, p, v, x, s;
    vy = dy + h; p = vy / 33; v = vy - 33 * p; x = dx + w;
    s  = (2 * h - 33 * p < 32) ? 2 * h - 33 * p : 32;
    return p * 1000000 + x * 100 + ((x % 2 == 0) ? v : s - v);
  endfunction

  task automatic run_mb(input int w, input int h, input int lambda, input int mx, input int my,
                        input int noise);
    int ref_j [NBLK], ref_dx [NBLK], ref_dy [NBLK], ref_rk [NBLK];
    int cycles, cands, expect_cycles, passes;
    int pmvx, pmvy;
    cur_w = w; cur_h = h;
    for (int r = 0; r < SAW; r++)
      for (int c = 0; c < SAW; c++) sa[r][c] = pix_t'($urandom_range(0, 255));
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < MB; c++) begin
        int v;
        v = int'(sa[my + h + r][mx + w + c]) + int'($urandom_range(0, 2 * noise)) - noise;
        cur[r][c] = pix_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
    // write current MB
    for (int r = 0; r < MB; r++) begin
      @(negedge clk);
      cur_we = 1'b1; cur_row = 4'(r);
      for (int c = 0; c < MB; c++) cur_data[c] = cur[r][c];
    end
    @(negedge clk) cur_we = 1'b0;
    // reference
    for (int b = 0; b < NBLK; b++) begin ref_j[b] = 1 << 30; ref_rk[b] = 1 << 30; end
    for (int dy = -h; dy <= h; dy++)
      for (int dx = -w; dx <= w; dx++) begin
        int s8 [4], sad [NBLK], cost, rk;
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
        rk = scan_rank(dx, dy, w, h);
        for (int b = 0; b < NBLK; b++)
          if (sad[b] + cost < ref_j[b] || (sad[b] + cost == ref_j[b] && rk < ref_rk[b])) begin
            ref_j[b] = sad[b] + cost; ref_dx[b] = dx; ref_dy[b] = dy; ref_rk[b] = rk;
          end
      end
    // command
    pmvx = int'($urandom_range(0, 200)) - 100;
    pmvy = int'($urandom_range(0, 200)) - 100;
    cmd.w = RW'(w); cmd.h = RW'(h); cmd.lambda = LAMW'(lambda);
    cmd.pmv_x = MVW'(pmvx); cmd.pmv_y = MVW'(pmvy);
    cmd_valid = 1'b1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk) cmd_valid = 1'b0;
    cycles = 0; cands = 0;
    while (!done) begin
      if (dut.shift != SH_HOLD || dut.cand_valid) cycles++;
      if (dut.cand_valid) cands++;
      @(negedge clk);
    end
    passes = (2 * h + MB <= ROWS) ? 1 : 2;
    if (passes == 1) n_one_pass++; else n_two_pass++;
    expect_cycles = 16 * passes + (2 * w + 1) * (2 * h + 1);
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("FAIL W=%0d H=%0d: %0d array cycles, expected %0d", w, h, cycles, expect_cycles);
    end
    checks++;
    if (cands != (2 * w + 1) * (2 * h + 1)) begin
      failures++;
      $display("FAIL W=%0d H=%0d: %0d candidates", w, h, cands);
    end
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (int'(result[b].j) != ref_j[b] || int'(result[b].off.dx) != ref_dx[b] ||
          int'(result[b].off.dy) != ref_dy[b] ||
          int'(result[b].mv_x) != pmvx + ref_dx[b] || int'(result[b].mv_y) != pmvy + ref_dy[b]) begin
        failures++;
        $display("FAIL W=%0d H=%0d blk %0d: got J=%0d (%0d,%0d) mv (%0d,%0d), expected J=%0d (%0d,%0d)",
                 w, h, b, result[b].j, result[b].off.dx, result[b].off.dy,
                 result[b].mv_x, result[b].mv_y, ref_j[b], ref_dx[b], ref_dy[b]);
      end
    end
    // a command offered right after done must not disturb the results until
    // it is accepted; results must also hold while idle
    @(negedge clk);
    checks++;
    if (int'(result[8].j) != ref_j[8] || !cmd_ready || busy) begin
      failures++; $display("FAIL results not held after done");
    end
    $display("W=%0d H=%0d lambda=%0d: %0d array cycles, 16x16 best (%0d,%0d) J=%0d",
             w, h, lambda, cycles, int'(result[8].off.dx), int'(result[8].off.dy), int'(result[8].j));
  endtask

  initial begin
    cmd = '0;
    for (int c = 0; c < MB; c++) cur_data[c] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // the architecture's largest window: two passes, 4257 cycles
    run_mb(32, 32, 4, 13, -21, 3);
    run_mb(2, 1, 2, -1, 1, 0);
    run_mb(0, 0, 1, 0, 0, 0);
    run_mb(5, 16, 8, 3, 15, 4);     // largest single-pass height
    run_mb(3, 17, 0, -2, 17, 2);    // smallest two-pass height
    run_mb(7, 0, 3, 6, 0, 1);
    run_mb(0, 9, 3, 0, -8, 1);
    for (int i = 0; i < 4; i++) begin
      int w, h;
      w = $urandom_range(0, 12); h = $urandom_range(0, 20);
      run_mb(w, h, $urandom_range(0, 20), $urandom_range(0, 2 * w) - w,
             $urandom_range(0, 2 * h) - h, $urandom_range(0, 40));
    end
    // every mechanism must have happened
    checks++; if (n_up == 0)       begin failures++; $display("FAIL no upward shift"); end
    checks++; if (n_down == 0)     begin failures++; $display("FAIL no downward shift"); end
    checks++; if (n_mode_a == 0)   begin failures++; $display("FAIL no mode (a) column"); end
    checks++; if (n_mode_b == 0)   begin failures++; $display("FAIL no mode (b) column"); end
    checks++; if (n_one_pass == 0) begin failures++; $display("FAIL no one-pass search"); end
    checks++; if (n_two_pass == 0) begin failures++; $display("FAIL no two-pass search"); end
    checks++; if (n_updates == 0)  begin failures++; $display("FAIL no best update"); end
    $display("mechanisms: up=%0d down=%0d modeA=%0d modeB=%0d onepass=%0d twopass=%0d updates=%0d",
             n_up, n_down, n_mode_a, n_mode_b, n_one_pass, n_two_pass, n_updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

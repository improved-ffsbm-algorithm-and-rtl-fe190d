// tb_me_controller: the controller drives a model PE array whose cells hold
// search-area coordinates instead of pixels.  Whenever the controller marks
// a candidate valid, the model's top-left 16 x 16 cells must be exactly the
// search-area block of that candidate offset (checked for all 256 cells).
// Each candidate of the (2W+1) x (2H+1) window must be visited once, the
// number of busy array cycles must be 16 * passes + (2W+1)(2H+1), and
// `done` must follow.  Runs one- and two-pass windows, W = 0 and H = 0.
module tb_me_controller;
  import ffsbm_pkg::*;
  localparam int ROWS = 48;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready;
  cmd_t cmd, cmd_q;
  logic clear, col_req, mode_b, cand_valid, busy, done;
  shift_e shift;
  logic [RW:0] col_x, col_y0;
  logic [5:0] rot;
  off_t cand_off;
  int checks = 0, failures = 0;

  me_controller #(.ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  // model array of coordinates (row * 1000 + col); -1 = padding
  int m [ROWS][MB];

  always @(posedge clk) begin
    int nxt [ROWS][MB];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < MB; c++)
        case (shift)
          SH_LEFT: begin
            if (c < MB - 1) nxt[r][c] = m[r][c + 1];
            else begin
              int src, row;
              src = mode_b ? (r + int'(rot)) % ROWS : r;
              row = int'(col_y0) + src;
              nxt[r][c] = (row < 2 * int'(cmd_q.h) + MB) ? row * 1000 + int'(col_x) : -1;
            end
          end
          SH_UP:   nxt[r][c] = m[(r + 1) % ROWS][c];
          SH_DOWN: nxt[r][c] = m[(r + ROWS - 1) % ROWS][c];
          default: nxt[r][c] = m[r][c];
        endcase
    m <= nxt;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int w, input int h);
    int seen [int];
    int cycles, bad;
    cmd = '0; cmd.w = RW'(w); cmd.h = RW'(h); cmd.lambda = 8'd1;
    @(negedge clk) cmd_valid = 1'b1;
    @(posedge clk);
    checks++;
    if (!clear) begin failures++; $display("FAIL no clear on accept"); end
    @(negedge clk) cmd_valid = 1'b0;
    cycles = 0; bad = 0;
    while (!done) begin
      if (shift != SH_HOLD || cand_valid) cycles++;
      if (cand_valid) begin
        int dx, dy, key;
        dx = int'(cand_off.dx); dy = int'(cand_off.dy);
        key = (dy + 64) * 1000 + dx + 64;
        if (dx < -w || dx > w || dy < -h || dy > h || seen.exists(key)) bad++;
        seen[key] = 1;
        for (int r = 0; r < MB; r++)
          for (int c = 0; c < MB; c++)
            if (m[r][c] != (dy + h + r) * 1000 + (dx + w + c)) bad++;
      end
      @(negedge clk);
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL W=%0d H=%0d: %0d wrong cells/candidates", w, h, bad); end
    checks++;
    if (seen.num() != (2 * w + 1) * (2 * h + 1)) begin
      failures++; $display("FAIL W=%0d H=%0d: %0d candidates", w, h, seen.num());
    end
    checks++;
    if (cycles != 16 * ((2 * h + MB <= ROWS) ? 1 : 2) + (2 * w + 1) * (2 * h + 1)) begin
      failures++; $display("FAIL W=%0d H=%0d: %0d cycles", w, h, cycles);
    end
    $display("W=%0d H=%0d: %0d cycles, %0d candidates", w, h, cycles, seen.num());
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(2, 2);
    run(0, 0);
    run(4, 0);
    run(0, 5);
    run(3, 16);
    run(2, 17);
    run(32, 32);
    run(5, 24);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

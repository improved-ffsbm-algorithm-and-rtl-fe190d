// tb_adder_tree: random AD arrays are presented one per cycle as candidate
// k, with offset and cost travelling through a model delay line of one
// register per level.  A reference computes the nine SADs of every
// candidate directly from the ADs and keeps, per partition, the first
// candidate with the smallest SAD + cost.  The registered results are
// compared after the pipeline has drained, and the 16x16 result must not
// change before the third cycle after the last candidate (pipeline depth).
module tb_adder_tree;
  import ffsbm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  pix_t ad [MB][MB];
  logic lvl_valid [3];
  off_t lvl_off [3];
  logic [COSTW-1:0] lvl_cost [3];
  logic has_best [NBLK];
  logic [JW-1:0] best_j [NBLK];
  off_t best_off [NBLK];
  int checks = 0, failures = 0;

  adder_tree dut (.*);

  always #5 clk = ~clk;

  // model delay line for valid/offset/cost
  logic v_in; off_t o_in; logic [COSTW-1:0] c_in;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lvl_valid[0] <= 1'b0; lvl_valid[1] <= 1'b0; lvl_valid[2] <= 1'b0;
    end else begin
      lvl_valid[0] <= v_in; lvl_valid[1] <= lvl_valid[0]; lvl_valid[2] <= lvl_valid[1];
    end
    lvl_off[0] <= o_in; lvl_off[1] <= lvl_off[0]; lvl_off[2] <= lvl_off[1];
    lvl_cost[0] <= c_in; lvl_cost[1] <= lvl_cost[0]; lvl_cost[2] <= lvl_cost[1];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v_in = 1'b0; o_in = '0; c_in = '0;
    for (int r = 0; r < MB; r++) for (int c = 0; c < MB; c++) ad[r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      int ref_j [NBLK]; off_t ref_off [NBLK];
      int n;
      n = (run == 0) ? 1 : 50 + 30 * run;
      for (int b = 0; b < NBLK; b++) ref_j[b] = 1 << 30;
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      for (int k = 0; k < n; k++) begin
        int s8 [4], sad [NBLK], lim;
        lim = (run % 2) ? 255 : 6;   // small ADs give many ties
        for (int b = 0; b < 4; b++) s8[b] = 0;
        for (int r = 0; r < MB; r++)
          for (int c = 0; c < MB; c++) begin
            ad[r][c] = pix_t'($urandom_range(0, lim));
            s8[(r / 8) * 2 + c / 8] += int'(ad[r][c]);
          end
        v_in = ($urandom_range(0, 4) != 0) || k == 0;
        o_in = off_t'($urandom);
        c_in = COSTW'($urandom_range(0, (run % 2) ? 4000 : 20));
        sad[0] = s8[0]; sad[1] = s8[1]; sad[2] = s8[2]; sad[3] = s8[3];
        sad[4] = s8[0] + s8[1]; sad[5] = s8[2] + s8[3];
        sad[6] = s8[0] + s8[2]; sad[7] = s8[1] + s8[3];
        sad[8] = s8[0] + s8[1] + s8[2] + s8[3];
        if (v_in)
          for (int b = 0; b < NBLK; b++)
            if (sad[b] + int'(c_in) < ref_j[b]) begin ref_j[b] = sad[b] + int'(c_in); ref_off[b] = o_in; end
        @(negedge clk);
      end
      v_in = 1'b0;
      // pipeline depth: 16x16 result may still change for 3 cycles
      @(negedge clk); @(negedge clk);
      checks++;
      if (run == 0 && has_best[8]) begin failures++; $display("FAIL 16x16 level too early"); end
      @(negedge clk);
      for (int b = 0; b < NBLK; b++) begin
        checks++;
        if (!has_best[b] || int'(best_j[b]) != ref_j[b] || best_off[b] != ref_off[b]) begin
          failures++;
          $display("FAIL run %0d blk %0d: J %0d exp %0d", run, b, best_j[b], ref_j[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_best_mv_node: random candidate streams, with and without gaps, are
// compared with a model that keeps the first strictly smallest
// J = SAD + cost; `clear` must empty the node.
module tb_best_mv_node;
  import ffsbm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0;
  logic [SAD16W-1:0] sad; logic [COSTW-1:0] cost; off_t off;
  logic has_best; logic [JW-1:0] best_j; off_t best_off;
  int checks = 0, failures = 0;

  best_mv_node #(.SADW(SAD16W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_j; off_t m_off; logic m_has;
    sad = '0; cost = '0; off = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      checks++;
      if (has_best) begin failures++; $display("FAIL clear"); end
      m_has = 1'b0; m_j = 0; m_off = '0;
      for (int i = 0; i < 300; i++) begin
        int j;
        valid = ($urandom_range(0, 3) != 0);
        sad = SAD16W'($urandom_range(0, (run % 2) ? 50 : 65000));
        cost = COSTW'($urandom_range(0, (run % 2) ? 20 : 8000));
        off = off_t'($urandom);
        j = int'(sad) + int'(cost);
        if (valid && (!m_has || j < m_j)) begin m_has = 1'b1; m_j = j; m_off = off; end
        @(negedge clk);
        checks++;
        if (has_best != m_has || (m_has && (int'(best_j) != m_j || best_off != m_off))) begin
          failures++;
          $display("FAIL run %0d i %0d: got %0d exp %0d", run, i, best_j, m_j);
        end
      end
      valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_col_formatter: random columns in both input modes and every rotation.
// Mode (a) must pass the column through; mode (b) with rotation S must
// place natural element (r + S) mod 48 at row r, i.e. rows S..S+15 at the
// top and rows 0..S-1 at the bottom.
module tb_col_formatter;
  import ffsbm_pkg::*;
  localparam int ROWS = 48;

  pix_t nat [ROWS], out [ROWS];
  logic mode_b;
  logic [5:0] rot;
  int checks = 0, failures = 0;

  col_formatter #(.ROWS(ROWS)) dut (.col_nat(nat), .mode_b, .rot, .col_out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int s;
      s = t % 33;
      for (int k = 0; k < ROWS; k++) nat[k] = pix_t'($urandom);
      mode_b = t[0]; rot = 6'(s);
      #1;
      for (int r = 0; r < ROWS; r++) begin
        int src;
        src = mode_b ? r + s : r;
        if (src >= ROWS) src -= ROWS;
        checks++;
        if (out[r] !== nat[src]) begin
          failures++;
          $display("FAIL mode_b=%0d S=%0d row %0d", mode_b, s, r);
        end
      end
      // Fig.4(b) shape: row 0 holds natural row S, row 48-S holds natural row 0
      if (mode_b && s > 0) begin
        checks++;
        if (out[0] !== nat[s] || out[ROWS - s] !== nat[0]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mvd_cost_lut: every offset of a +/-32 window with several lambdas.
// The expected cost is lambda * (len(4dx) + len(4dy)), len being the
// signed Exp-Golomb code length, computed here by counting the bits of
// the code number plus one.
module tb_mvd_cost_lut;
  import ffsbm_pkg::*;

  off_t off;
  logic [LAMW-1:0] lambda;
  logic [COSTW-1:0] cost;
  int checks = 0, failures = 0;

  mvd_cost_lut dut (.off, .lambda, .cost);

  function automatic int ref_len(input int v);
    int k, nb;
    k  = (v > 0) ? 2 * v - 1 : -2 * v;
    nb = 0;
    while ((k + 1) >> nb > 1) nb++;
    return 2 * nb + 1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lams [4] = '{1, 4, 37, 255};
    foreach (lams[l])
      for (int dy = -32; dy <= 32; dy++)
        for (int dx = -32; dx <= 32; dx++) begin
          int expv;
          off.dx = OFFW'(dx); off.dy = OFFW'(dy); lambda = LAMW'(lams[l]);
          #1;
          expv = lams[l] * (ref_len(4 * dx) + ref_len(4 * dy));
          checks++;
          if (int'(cost) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL dx=%0d dy=%0d lambda=%0d cost=%0d exp=%0d",
                                        dx, dy, lams[l], cost, expv);
          end
        end
    // spot values: len(0)=1, len(4)=len(-4)=7, len(128)=17
    checks++;
    if (ref_len(0) != 1 || ref_len(4) != 7 || ref_len(-4) != 7 || ref_len(128) != 17) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

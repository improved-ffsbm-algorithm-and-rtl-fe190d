// tb_cost_delay_chain: a random stream of (valid, offset, cost) is fed in;
// level k must show the value fed k+1 cycles earlier, and reset must clear
// the valid bits.
module tb_cost_delay_chain;
  import ffsbm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic vin; off_t oin; logic [COSTW-1:0] cin;
  logic vout [3]; off_t oout [3]; logic [COSTW-1:0] cout [3];
  int checks = 0, failures = 0;
  logic hv [$]; off_t ho [$]; logic [COSTW-1:0] hc [$];

  cost_delay_chain #(.LEVELS(3)) dut (.clk, .rst_n, .valid_in(vin), .off_in(oin), .cost_in(cin),
                                      .valid_out(vout), .off_out(oout), .cost_out(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 1'b1; oin = '0; cin = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (vout[0] || vout[1] || vout[2]) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      vin = ($urandom_range(0, 1) == 1); oin = off_t'($urandom); cin = COSTW'($urandom);
      hv.push_front(vin); ho.push_front(oin); hc.push_front(cin);
      @(negedge clk);
      for (int k = 0; k < 3; k++)
        if (hv.size() > k) begin
          checks++;
          if (vout[k] != hv[k] || (hv[k] && (oout[k] != ho[k] || cout[k] != hc[k]))) begin
            failures++;
            $display("FAIL i=%0d level %0d", i, k);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pe: checks both PE variants.  Random neighbour pixels and moves are
// applied; a model register predicts the stored search pixel, and for the
// active PE the absolute difference to the written current pixel.
module tb_pe;
  import ffsbm_pkg::*;

  logic clk = 1'b0;
  shift_e shift;
  pix_t fr, fb, fa, cin;
  logic cwe;
  pix_t ref_a, ad_a, ref_i, ad_i;
  int checks = 0, failures = 0;

  pe #(.ACTIVE(1'b1)) u_act (.clk, .shift, .from_right(fr), .from_below(fb), .from_above(fa),
                             .cur_we(cwe), .cur_in(cin), .ref_pix(ref_a), .ad(ad_a));
  pe #(.ACTIVE(1'b0)) u_ina (.clk, .shift, .from_right(fr), .from_below(fb), .from_above(fa),
                             .cur_we(cwe), .cur_in(cin), .ref_pix(ref_i), .ad(ad_i));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_ref, m_cur, exp_ad;
    // load a known value into both PEs first
    @(negedge clk);
    shift = SH_LEFT; fr = 8'd100; fb = 8'd0; fa = 8'd0; cwe = 1'b1; cin = 8'd30;
    m_ref = 100; m_cur = 30;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      exp_ad = (m_cur > m_ref) ? m_cur - m_ref : m_ref - m_cur;
      if (int'(ref_a) != m_ref || int'(ref_i) != m_ref || int'(ad_a) != exp_ad || ad_i != 0) begin
        failures++;
        $display("FAIL i=%0d ref %0d/%0d ad %0d exp ref %0d ad %0d", i, ref_a, ref_i, ad_a, m_ref, exp_ad);
      end
      shift = shift_e'($urandom_range(0, 3));
      fr = pix_t'($urandom); fb = pix_t'($urandom); fa = pix_t'($urandom);
      cwe = ($urandom_range(0, 3) == 0); cin = pix_t'($urandom);
      case (shift)
        SH_LEFT: m_ref = fr;
        SH_UP:   m_ref = fb;
        SH_DOWN: m_ref = fa;
        default: ;
      endcase
      if (cwe) m_cur = cin;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_distributor: checks the split of the exact sum at the rounding
// point. For random sums and exponents it checks that hi + low == m, that
// the kept part has its leading one at bit 23 above the split (or sits on
// the subnormal grid), and that round_up is the round-to-nearest-even
// decision, all worked out here with real arithmetic.
module tb_fp_distributor;
  import fpadd_pkg::*;
  logic [50:0] m, hi;
  logic [7:0] exp_large;
  logic [26:0] low;
  logic signed [5:0] sh;
  logic round_up;
  int checks = 0, failures = 0, n_up = 0, n_neg = 0, n_sub = 0;

  fp_distributor dut (.m, .exp_large, .hi, .low, .sh, .round_up);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int p, want_sh, s;
    real scale, frac_part, kept;
    logic want_up;
    for (int i = 0; i < 30000; i++) begin
      m = 51'({$urandom, $urandom}) >> $urandom_range(0, 50);
      if (i % 4 == 0) m = m & ~51'(($urandom & 32'hFF));         // ties more likely
      if (i % 9 == 0) m = (51'(1) << $urandom_range(24, 50)) | (51'(1) << $urandom_range(0, 23));
      exp_large = (i % 3 == 0) ? 8'($urandom_range(1, 40)) : 8'($urandom_range(1, 254));
      #1;
      p = -1;
      for (int j = 0; j < 51; j++) if (m[j]) p = j;
      want_sh = (p - 23 > 27 - int'(exp_large)) ? p - 23 : 27 - int'(exp_large);
      if (p < 0) want_sh = 27 - int'(exp_large);
      s = want_sh;
      scale = 2.0 ** s;
      // Real-valued kept part and fraction below the last place.
      kept = (s > 0) ? $floor(real'(m) / scale) : real'(m);
      frac_part = (s > 0) ? (real'(m) - kept * scale) / scale : 0.0;
      want_up = (frac_part > 0.5) || (frac_part == 0.5 && (kept - 2.0 * $floor(kept / 2.0)) == 1.0);
      checks++;
      if ((m != 0 && int'(sh) != want_sh) ||
          real'(hi) + real'(low) != real'(m) ||
          (s > 0 && real'(hi) != kept * scale) ||
          round_up !== want_up) begin
        failures++;
        if (failures < 10) $display("FAIL m=%h e=%0d sh=%0d/%0d up=%b/%b", m, exp_large, sh, want_sh, round_up, want_up);
      end
      if (round_up) n_up++;
      if (sh < 0) n_neg++;
      if (27 - int'(exp_large) > p - 23) n_sub++;
    end
    $display("round_up=%0d negative_shift=%0d subnormal=%0d", n_up, n_neg, n_sub);
    checks++;
    if (n_up == 0 || n_neg == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

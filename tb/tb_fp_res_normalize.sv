// tb_fp_res_normalize: checks the residue magnitude and its normalisation.
// For random low bits, split positions, round decisions and exponents the
// value sig * 2^(E - 150) (E = exp_large + lead - 49, or the subnormal grid
// when E < 1) must equal the residue magnitude times 2^(exp_large - 176),
// where the magnitude is low, or 2^sh - low after a round-up.
module tb_fp_res_normalize;
  logic [26:0] low;
  logic signed [5:0] sh;
  logic round_up, zero;
  logic [7:0] exp_large;
  logic [23:0] sig;
  logic [5:0] lead;
  int checks = 0, failures = 0, n_sub = 0;

  fp_res_normalize dut (.low, .sh, .round_up, .exp_large, .sig, .lead, .zero);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s, e, er, q;
    real mag, got, want;
    logic [26:0] mg;
    for (int i = 0; i < 30000; i++) begin
      e = (i % 3 == 0) ? $urandom_range(1, 60) : $urandom_range(1, 254);
      s = $urandom_range(1, 27);
      // In the adder the split never lies below the subnormal grid.
      if (s < 27 - e) s = 27 - e;
      round_up = $urandom;
      // A residue has at most 24 significant bits and, like the operands,
      // no bits below the subnormal grid (bit 27 - exp_large).
      mg = 27'($urandom) & ((27'(1) << s) - 27'(1));
      if (s > 24) mg = mg & ~((27'(1) << (s - 24)) - 27'(1));
      if (e < 27) mg = mg & ~((27'(1) << (27 - e)) - 27'(1));
      if (round_up) begin
        if (s > 1 && mg > (27'(1) << (s - 1))) mg = 27'((28'(1) << s) - 28'(mg));
        if (mg == 0 || s == 1) round_up = 1'b0;
      end
      if (round_up) begin
        low = 27'((28'(1) << s) - 28'(mg));
      end else low = mg;
      sh = 6'(s);
      exp_large = 8'(e);
      #1;
      mag = real'(mg);
      q = int'(lead);
      er = e + q - 49;
      got = (er >= 1) ? real'(sig) * (2.0 ** (er - 150)) : real'(sig) * (2.0 ** -149);
      want = mag * (2.0 ** (e - 176));
      checks++;
      if (zero !== (mg == 0) || (mg != 0 && (got != want || (er >= 1) != sig[23]))) begin
        failures++;
        if (failures < 10) $display("FAIL low=%h sh=%0d up=%b e=%0d sig=%h lead=%0d", low, s, round_up, e, sig, lead);
      end
      if (mg != 0 && er < 1) n_sub++;
    end
    checks++;
    if (n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

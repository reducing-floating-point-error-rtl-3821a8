// tb_fp_round_norm: checks the rounding increment and the renormalisation
// on carry: (carry ? 2 * sig : sig) == kept + round_up.
module tb_fp_round_norm;
  logic [23:0] kept, sig;
  logic round_up, carry;
  int checks = 0, failures = 0, n_carry = 0;

  fp_round_norm dut (.kept, .round_up, .sig, .carry);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      kept = (i % 10 == 0) ? 24'hFF_FFFF : 24'($urandom);
      round_up = $urandom;
      #1;
      checks++;
      if ((carry ? 2.0 * real'(sig) : real'(sig)) != real'(kept) + real'(round_up) ||
          (carry && sig != 24'h80_0000)) begin
        failures++;
        if (failures < 10) $display("FAIL kept=%h up=%b sig=%h c=%b", kept, round_up, sig, carry);
      end
      if (carry) n_carry++;
    end
    checks++;
    if (n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

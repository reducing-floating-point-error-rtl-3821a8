// tb_fp_res_sign_exp: checks residue sign (sum sign, flipped on round-up,
// +0 for a zero residue) and exponent exp_large + lead - 49.
module tb_fp_res_sign_exp;
  logic sum_sign, round_up, zero, sign;
  logic [7:0] exp_large;
  logic [5:0] lead;
  logic signed [9:0] exp;
  int checks = 0, failures = 0;

  fp_res_sign_exp dut (.sum_sign, .round_up, .exp_large, .lead, .zero, .sign, .exp);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic want_sign;
    for (int i = 0; i < 20000; i++) begin
      sum_sign = $urandom; round_up = $urandom; zero = ($urandom_range(0, 7) == 0);
      exp_large = 8'($urandom_range(1, 254)); lead = 6'($urandom_range(0, 26));
      #1;
      want_sign = zero ? 1'b0 : (round_up ? !sum_sign : sum_sign);
      checks++;
      if (sign !== want_sign || int'(exp) != int'(exp_large) + int'(lead) - 49) begin
        failures++;
        if (failures < 10) $display("FAIL ss=%b up=%b z=%b e=%0d lead=%0d -> %b %0d", sum_sign, round_up, zero, exp_large, lead, sign, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

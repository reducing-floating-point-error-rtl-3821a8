// tb_fp_exp_add: checks the sum exponent exp_large + sh - 26 + carry over
// the whole input range.
module tb_fp_exp_add;
  logic [7:0] exp_large;
  logic signed [5:0] sh;
  logic carry;
  logic signed [9:0] exp;
  int checks = 0, failures = 0;

  fp_exp_add dut (.exp_large, .sh, .carry, .exp);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 1; e < 255; e++)
      for (int s = -23; s <= 27; s++)
        for (int c = 0; c < 2; c++) begin
          exp_large = 8'(e); sh = 6'(s); carry = 1'(c);
          #1;
          checks++;
          if (int'(exp) != e + s - 26 + c) begin
            failures++;
            if (failures < 10) $display("FAIL e=%0d sh=%0d c=%0d exp=%0d", e, s, c, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

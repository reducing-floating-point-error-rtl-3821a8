// tb_fp_post_shift: checks that the post-shifter scales the kept part by
// 2^-sh: kept * 2^sh == hi for right shifts, kept == hi * 2^-sh for left.
module tb_fp_post_shift;
  logic [50:0] hi;
  logic signed [5:0] sh;
  logic [23:0] kept;
  int checks = 0, failures = 0;

  fp_post_shift dut (.hi, .sh, .kept);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s;
    logic [23:0] k;
    for (int i = 0; i < 20000; i++) begin
      k = {1'b1, 23'($urandom)};
      s = $urandom_range(0, 50) - 23;
      if (s > 27) s = 27;
      if (s >= 0) hi = 51'(k) << s;
      else begin k = k >> (-s); hi = 51'(k); end
      sh = 6'(s);
      #1;
      checks++;
      if ((s >= 0 && real'(kept) * (2.0 ** s) != real'(hi)) ||
          (s < 0 && real'(kept) != real'(hi) * (2.0 ** (-s)))) begin
        failures++;
        if (failures < 10) $display("FAIL hi=%h sh=%0d kept=%h", hi, s, kept);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

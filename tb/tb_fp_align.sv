// tb_fp_align: checks the selective swap and pre-shifter. The aligned
// smaller significand times 2^diff must equal the smaller significand times
// 2^26 (no bit lost) below the far threshold; far is set from 26 on.
module tb_fp_align;
  import fpadd_pkg::*;
  logic [23:0] sig_x, sig_y;
  logic swap, far_case;
  logic [7:0] exp_diff;
  logic [50:0] sig_large, sig_small;
  int checks = 0, failures = 0;

  fp_align dut (.sig_x, .sig_y, .swap, .exp_diff, .sig_large, .sig_small, .far_case);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real big, sml;
    for (int i = 0; i < 20000; i++) begin
      sig_x = $urandom; sig_y = $urandom; swap = $urandom;
      exp_diff = 8'($urandom_range(0, 40));
      #1;
      big = swap ? sig_y : sig_x;
      sml = swap ? sig_x : sig_y;
      checks++;
      if (real'(sig_large) != big * (2.0 ** 26) || far_case !== (exp_diff >= 26) ||
          (!far_case && real'(sig_small) * (2.0 ** exp_diff) != sml * (2.0 ** 26))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h swap=%b d=%0d", sig_x, sig_y, swap, exp_diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

// tb_fp_exp_diff: checks the exponent Sub/Mux: swap when y has the larger
// magnitude, larger exponent, absolute exponent difference.
module tb_fp_exp_diff;
  import fpadd_pkg::*;
  fp_unpacked_t ux, uy;
  logic swap;
  logic [7:0] exp_large, exp_diff;
  int checks = 0, failures = 0;

  fp_exp_diff dut (.ux, .uy, .swap, .exp_large, .exp_diff);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ex, ey;
    logic want_swap;
    for (int i = 0; i < 20000; i++) begin
      ux = '0; uy = '0;
      ex = $urandom_range(1, 254);
      ey = (i % 3 == 0) ? ex : $urandom_range(1, 254);
      ux.exp = 8'(ex); uy.exp = 8'(ey);
      ux.sig = {1'b1, 23'($urandom)};
      uy.sig = (i % 5 == 0) ? ux.sig : {1'b1, 23'($urandom)};
      #1;
      want_swap = (ey * 33554432.0 + uy.sig) > (ex * 33554432.0 + ux.sig);
      checks++;
      if (swap !== want_swap || int'(exp_large) != (ex > ey ? ex : ey) ||
          int'(exp_diff) != (ex > ey ? ex - ey : ey - ex)) begin
        failures++;
        if (failures < 10) $display("FAIL ex=%0d ey=%0d swap=%b large=%0d diff=%0d", ex, ey, swap, exp_large, exp_diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

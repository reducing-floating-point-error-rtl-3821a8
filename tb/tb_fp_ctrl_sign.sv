// tb_fp_ctrl_sign: directed and random checks of the effective operation,
// sum sign and result selection (normal, pass-through, special).
module tb_fp_ctrl_sign;
  import fpadd_pkg::*;
  fp_unpacked_t ux, uy;
  logic swap, far_case, sum_zero, eff_sub, sum_sign;
  sum_sel_e sel;
  logic [31:0] special;
  int checks = 0, failures = 0;

  fp_ctrl_sign dut (.ux, .uy, .swap, .far_case, .sum_zero, .eff_sub, .sum_sign, .sel, .special);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [1:0] want_sel;
    logic [31:0] want_sp;
    logic want_sign;
    for (int i = 0; i < 20000; i++) begin
      ux = '0; uy = '0;
      ux.sign = $urandom; uy.sign = $urandom;
      ux.is_nan = ($urandom_range(0, 9) == 0);
      uy.is_nan = ($urandom_range(0, 9) == 0);
      ux.is_inf = !ux.is_nan && ($urandom_range(0, 5) == 0);
      uy.is_inf = !uy.is_nan && ($urandom_range(0, 5) == 0);
      swap = $urandom; far_case = $urandom; sum_zero = $urandom;
      #1;
      // Expected values.
      if (ux.is_nan || uy.is_nan || (ux.is_inf && uy.is_inf && ux.sign != uy.sign)) begin
        want_sel = 2; want_sp = 32'h7FC0_0000;
      end else if (ux.is_inf || uy.is_inf) begin
        want_sel = 2; want_sp = ux.is_inf ? {ux.sign, 31'h7F80_0000} : {uy.sign, 31'h7F80_0000};
      end else begin
        want_sel = far_case ? 1 : 0; want_sp = special;
      end
      want_sign = sum_zero ? (ux.sign && uy.sign) : (swap ? uy.sign : ux.sign);
      checks++;
      if (eff_sub !== (ux.sign != uy.sign) || sum_sign !== want_sign ||
          2'(sel) !== want_sel || special !== want_sp) begin
        failures++;
        if (failures < 10) $display("FAIL ux=%p uy=%p sel=%0d", ux, uy, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

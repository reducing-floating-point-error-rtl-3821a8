// tb_fp_sig_add: checks the significand adder/subtractor against 64-bit
// integer arithmetic, and its zero flag.
module tb_fp_sig_add;
  logic [50:0] a, b, m;
  logic eff_sub, zero;
  int checks = 0, failures = 0;

  fp_sig_add dut (.a, .b, .eff_sub, .m, .zero);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint unsigned ea, eb, em;
    for (int i = 0; i < 20000; i++) begin
      ea = {$urandom, $urandom} >> 14;
      eb = (i % 10 == 0) ? ea : (ea >> $urandom_range(0, 30));
      a = 51'(ea); b = 51'(eb); eff_sub = $urandom;
      #1;
      em = eff_sub ? ea - eb : ea + eb;
      checks++;
      if (64'(m) != em || zero !== (em == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h sub=%b m=%h", a, b, eff_sub, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

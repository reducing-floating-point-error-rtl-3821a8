// tb_fp_pack: checks packing against the value it represents: a packed
// normal or subnormal number must equal sig * 2^(exp - 150) (exp taken as 1
// for a subnormal significand), exponents of 255 and above must give Inf
// with ovf, and bypass must pass its word unchanged.
module tb_fp_pack;
  import fpadd_pkg::*;
  import fp_ref_pkg::*;
  logic sign, bypass, ovf;
  logic signed [9:0] exp;
  logic [23:0] sig;
  logic [31:0] bypass_val;
  fp32_t z;
  int checks = 0, failures = 0;

  fp_pack dut (.sign, .exp, .sig, .bypass, .bypass_val, .z, .ovf);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int e;
    real v;
    logic [31:0] want;
    for (int i = 0; i < 20000; i++) begin
      sign = $urandom; bypass = ($urandom_range(0, 9) == 0); bypass_val = $urandom;
      if (i % 4 == 0) begin sig = 24'($urandom) & 24'h7F_FFFF; e = 1; end
      else begin sig = {1'b1, 23'($urandom)}; e = $urandom_range(1, 260); end
      exp = 10'(e);
      #1;
      v = real'(sig) * (2.0 ** (e - 150));
      if (sign) v = -v;
      if (bypass) want = bypass_val;
      else if (sig[23] && e >= 255) want = {sign, 8'hFF, 23'h0};
      else want = r2f(v);
      if (!bypass && sig == 0) want = {sign, 31'h0};
      checks++;
      if (z !== want || ovf !== (!bypass && sig[23] && e >= 255)) begin
        failures++;
        if (failures < 10) $display("FAIL s=%b e=%0d sig=%h z=%h want=%h", sign, e, sig, z, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

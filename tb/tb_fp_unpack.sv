// tb_fp_unpack: checks field extraction and classification of fp_unpack
// against values computed here by arithmetic on the encoding.
module tb_fp_unpack;
  import fpadd_pkg::*;
  fp32_t x, y;
  fp_unpacked_t ux, uy;
  int checks = 0, failures = 0;

  fp_unpack dut (.x, .y, .ux, .uy);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_one(input logic [31:0] b, input fp_unpacked_t u);
    int e;
    logic [23:0] sig;
    e   = (b[30:23] == 0) ? 1 : int'(b[30:23]);
    sig = (b[30:23] == 0) ? {1'b0, b[22:0]} : (24'd8388608 + 24'(b[22:0]));
    checks++;
    if (u.sign !== b[31] || int'(u.exp) != e || u.sig !== sig ||
        u.is_zero !== (b[30:0] == 0) ||
        u.is_inf !== (b[30:0] == 31'h7F80_0000) ||
        u.is_nan !== (b[30:0] > 31'h7F80_0000)) begin
      failures++;
      if (failures < 10) $display("FAIL %h -> %p", b, u);
    end
  endtask

  initial begin
    logic [31:0] v [6] = '{32'h0, 32'h8000_0000, 32'h7F80_0000, 32'h7FC0_0000, 32'h0000_0001, 32'h3F80_0000};
    foreach (v[i]) begin
      x = v[i]; y = v[(i + 1) % 6]; #1;
      check_one(x, ux); check_one(y, uy);
    end
    for (int i = 0; i < 20000; i++) begin
      x = $urandom; y = $urandom;
      if (i % 4 == 0) x[30:23] = 8'h00;
      if (i % 4 == 1) y[30:23] = 8'hFF;
      #1;
      check_one(x, ux); check_one(y, uy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule

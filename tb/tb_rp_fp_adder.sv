// tb_rp_fp_adder: self-checking test of the residue-preserving adder.
//
// Drives directed and random operand pairs and compares the sum and the
// residue with fp_ref_pkg (binary64-based rounding written independently
// of the design). Also checks sum + residue == x + y in binary64 for finite
// results. Purely combinational DUT, so each vector is applied and sampled
// after a #1 delay.
module tb_rp_fp_adder;
  import fp_ref_pkg::*;
  import fpadd_pkg::*;

  fp32_t x, y, sum, residue;
  int checks = 0, failures = 0;
  int n_far = 0, n_round_up = 0, n_sub = 0, n_spec = 0, n_res_nz = 0;

  rp_fp_adder dut (.x, .y, .sum, .residue);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] es, er;
    x = a; y = b;
    #1;
    es = ref_sum(a, b);
    er = ref_residue(a, b);
    checks++;
    if (sum !== es && !(es == 32'h7FC0_0000 && sum[30:22] == 9'h1FF)) begin
      failures++;
      if (failures < 10) $display("SUM  FAIL %h + %h: got %h exp %h", a, b, sum, es);
    end
    checks++;
    if (residue !== er) begin
      failures++;
      if (failures < 10) $display("RES  FAIL %h + %h: got %h exp %h", a, b, residue, er);
    end
    if (!is_special(sum) && !is_special(a) && !is_special(b)) begin
      checks++;
      if (f2r(sum) + f2r(residue) != f2r(a) + f2r(b) &&
          (a[30:23] > b[30:23] ? a[30:23] - b[30:23] : b[30:23] - a[30:23]) < 29) begin
        failures++;
        if (failures < 10) $display("EXACT FAIL %h + %h", a, b);
      end
    end
    if (!is_special(a) && !is_special(b) && a[30:0] != 0 && b[30:0] != 0 &&
        (a[30:23] > b[30:23] ? a[30:23] - b[30:23] : b[30:23] - a[30:23]) >= 26) n_far++;
    if (residue != 0 && residue[31] != sum[31]) n_round_up++;
    if (sum[30:23] == 0 && sum[22:0] != 0) n_sub++;
    if (is_special(sum)) n_spec++;
    if (residue != 0) n_res_nz++;
  endtask

  initial begin
    logic [31:0] a;
    // Directed cases.
    apply(32'h3F80_0000, 32'h3F80_0000);   // 1 + 1 = 2
    apply(32'h3F80_0000, 32'h3380_0000);   // 1 + 2^-24: tie, even -> 1, residue 2^-24
    apply(32'h3F80_0001, 32'h3380_0000);   // tie, odd -> up, residue -2^-24
    apply(32'h3F80_0000, 32'h3DCC_CCCD);   // 1 + 0.1
    apply(32'h4B80_0000, 32'h3F80_0000);   // 2^24 + 1
    apply(32'h3F80_0000, 32'hBF80_0000);   // 1 - 1 = +0
    apply(32'h8000_0000, 32'h8000_0000);   // -0 + -0
    apply(32'h0000_0001, 32'h0000_0001);   // subnormals
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    apply(32'h7F80_0000, 32'hFF80_0000);   // Inf - Inf
    apply(32'h7F80_0000, 32'h3F80_0000);   // Inf + 1
    apply(32'h3F80_0000, 32'h2F80_0000);   // far: 1 + 2^-32
    apply(32'h3F80_0000, 32'hB300_0000);   // 1 - 2^-25
    for (int i = 0; i < 300000; i++) begin
      a = $urandom;
      if (i % 7 == 0) a[30:23] = 8'($urandom_range(0, 40));
      apply(a, gen_pair_y(a, i % 7));
      apply(gen_pair_y(a, i % 7), a);
    end
    $display("far=%0d round_up=%0d subnormal=%0d special=%0d residue_nonzero=%0d",
             n_far, n_round_up, n_sub, n_spec, n_res_nz);
    checks++;
    if (n_far == 0 || n_round_up == 0 || n_sub == 0 || n_spec == 0 || n_res_nz == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

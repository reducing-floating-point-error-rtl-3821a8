// tb_rp_accumulator_full: the summation workload at full length.
//
// Sums one million pseudo-random binary32 values in [0, 1) (multiples of
// 2^-24, so the binary64 running sum kept here is exact) through the
// residue-preserving unit at full rate, with the unit in its default
// configuration. After every value S and R are compared bit for bit with a
// model of the recurrence. Every 100 000 values it prints the error of the
// unit's S, of a plain binary32 running sum and of S + R against the exact
// sum. At the end the unit's error must be within one ulp of S and below
// the plain binary32 error, and the rate must be one value every two cycles.
module tb_rp_accumulator_full;
  import fpadd_pkg::*;
  import fp_ref_pkg::*;

  localparam int N = 1_000_000;

  logic clk = 0, rst_n = 0, clear = 0, x_valid = 0, x_ready, busy;
  fp32_t x_data, sum, residue;
  logic [31:0] count;
  int checks = 0, failures = 0;
  longint cyc = 0;

  rp_accumulator dut (.clk, .rst_n, .clear, .x_valid, .x_ready, .x_data,
                      .sum, .residue, .count, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2 * N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] ms, mr, u, s_old, naive, xv;
    real exact, e_unit, e_naive, e_sr, ulp;
    longint t_start;
    int mism;
    ms = 0; mr = 0; naive = 0; exact = 0.0; mism = 0;
    x_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    x_valid = 1;
    #1;
    t_start = cyc;
    $display("    additions   error(unit S)   error(binary32)   error(S+R)");
    for (int i = 1; i <= N; i++) begin
      xv = r2f(real'($urandom_range(0, 24'hFF_FFFF)) * (2.0 ** -24));
      x_data = xv;
      @(posedge clk);     // Step 2
      @(negedge clk);
      @(posedge clk);     // Step 3
      u     = ref_sum(mr, xv);
      s_old = ms;
      ms    = ref_sum(s_old, u);
      mr    = ref_residue(s_old, u);
      naive = ref_sum(naive, xv);
      exact = exact + f2r(xv);
      @(negedge clk);
      if (sum != ms || residue != mr) mism++;
      if (i % 100000 == 0) begin
        e_unit  = f2r(sum) - exact;
        e_naive = f2r(naive) - exact;
        e_sr    = f2r(sum) + f2r(residue) - exact;
        $display("%13d   %13.6f   %15.6f   %10.6f", i, e_unit, e_naive, e_sr);
      end
    end
    x_valid = 0;
    checks++;
    if (mism != 0) begin
      failures++;
      $display("FAIL %0d steps differ from the model", mism);
    end
    e_unit  = f2r(sum) - exact;  if (e_unit < 0) e_unit = -e_unit;
    e_naive = f2r(naive) - exact; if (e_naive < 0) e_naive = -e_naive;
    e_sr    = f2r(sum) + f2r(residue) - exact; if (e_sr < 0) e_sr = -e_sr;
    mism = int'(sum[30:23]) - 150;
    ulp = 2.0 ** mism;
    checks++;
    if (!(e_unit <= ulp)) begin failures++; $display("FAIL unit error %f above one ulp %f", e_unit, ulp); end
    checks++;
    if (!(e_unit < e_naive)) begin failures++; $display("FAIL unit error %f not below binary32 error %f", e_unit, e_naive); end
    checks++;
    if (count != N) begin failures++; $display("FAIL count %0d", count); end
    checks++;
    if (cyc - t_start > 2 * longint'(N) + 1) begin failures++; $display("FAIL %0d cycles", cyc - t_start); end
    e_unit  = f2r(sum);
    e_sr    = e_unit + f2r(residue);
    e_naive = f2r(naive);
    $display("final: exact %f  unit %f (S+R %f)  binary32 %f  cycles %0d",
             exact, e_unit, e_sr, e_naive, cyc - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rp_accumulator: end-to-end test of the residue-preserving summation
// unit. A stream of operands is fed with random gaps in x_valid; after each
// transfer the registered S and R are compared bit for bit with a model of
// the recurrence U = R + X, S = S + U, R = residue(S + U) built on
// fp_ref_pkg. It checks the timing (S/R change two edges after the
// transfer, one value per two cycles at full rate), back-pressure, clear,
// and counts the mechanisms the unit has: a rounded-up sum (negative
// residue relative to S), a rounded-down sum with a non-zero residue, the
// far pass-through in Step 3, a subnormal residue, a special value, clear,
// and a stall; each must occur at least once.
module tb_rp_accumulator;
  import fpadd_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, x_valid = 0, x_ready, busy;
  fp32_t x_data, sum, residue;
  logic [31:0] count;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_far = 0, n_sub = 0, n_spec = 0, n_clear = 0, n_stall = 0, n_bp = 0;
  logic [31:0] ms = 0, mr = 0, mcount = 0;
  longint cyc = 0;

  rp_accumulator dut (.clk, .rst_n, .clear, .x_valid, .x_ready, .x_data,
                      .sum, .residue, .count, .busy);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (x_valid && !x_ready) n_bp++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d: S=%h/%h R=%h/%h count=%0d/%0d",
                                  what, cyc, sum, ms, residue, mr, count, mcount);
    end
  endtask

  // Model of one step of the recurrence.
  task automatic model_step(input logic [31:0] xv);
    logic [31:0] u, s_old;
    u     = ref_sum(mr, xv);
    s_old = ms;
    ms    = ref_sum(s_old, u);
    mr    = ref_residue(s_old, u);
    mcount++;
    if (!is_special(s_old) && !is_special(u) && s_old[30:0] != 0 && u[30:0] != 0 &&
        (s_old[30:23] > u[30:23] ? s_old[30:23] - u[30:23] : u[30:23] - s_old[30:23]) >= 26) n_far++;
    if (mr != 0 && mr[31] != ms[31]) n_up++;
    if (mr != 0 && mr[31] == ms[31]) n_down++;
    if (mr[30:23] == 0 && mr[22:0] != 0) n_sub++;
    if (is_special(ms)) n_spec++;
  endtask

  task automatic send(input logic [31:0] xv, input int gap);
    longint t0;
    repeat (gap) begin
      @(negedge clk);
      x_valid = 0;
      n_stall++;
    end
    @(negedge clk);
    x_valid = 1;
    x_data  = xv;
    @(posedge clk);
    while (!x_ready) @(posedge clk);
    model_step(xv);
    #1;
    t0 = cyc;
    check("busy after transfer", busy && !x_ready);
    @(posedge clk);
    #1;
    check("result two edges after transfer", sum == ms && residue == mr && count == mcount && !busy);
    check("latency", cyc - t0 == 1);
  endtask

  function automatic logic [31:0] pick(input int i);
    logic [31:0] v;
    v = $urandom;
    case (i % 8)
      0, 1, 2: v[30:23] = 8'($urandom_range(118, 130));   // typical data
      3: v[30:23] = 8'($urandom_range(90, 110));         // small addends
      4: v[30:23] = 8'($urandom_range(0, 3));            // subnormal range
      5: v = ms ^ 32'h8000_0001;                         // cancel the sum
      6: v[30:23] = 8'($urandom_range(1, 254));
      default: v[30:23] = 8'($urandom_range(125, 127));
    endcase
    return v;
  endfunction

  initial begin
    longint t_start;
    x_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset state", sum == 0 && residue == 0 && count == 0 && x_ready);

    // Tiny operands: sums and residues near the subnormal range.
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] v;
      v = $urandom;
      v[30:23] = 8'($urandom_range(0, 30));
      send(v, 0);
    end

    // Mixed stream with gaps.
    for (int i = 0; i < 20000; i++) begin
      send(pick(i), ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0);
      if (i % 5000 == 4999) begin
        // Inject an infinity, then clear (Step 1 again).
        send(32'h7F80_0000, 0);
        @(negedge clk);
        x_valid = 0;
        clear = 1;
        @(negedge clk);
        clear = 0;
        ms = 0; mr = 0; mcount = 0;
        n_clear++;
        check("clear", sum == 0 && residue == 0 && count == 0);
      end
    end

    // Full-rate throughput: x_valid held high, one value every two cycles.
    @(negedge clk);
    x_valid = 1;
    x_data = 32'h3DCC_CCCD;   // 0.1
    @(posedge clk);
    while (!x_ready) @(posedge clk);
    #1;
    t_start = cyc;
    for (int i = 0; i < 1000; i++) begin
      model_step(32'h3DCC_CCCD);
      @(posedge clk);
      @(posedge clk);
    end
    #1;
    x_valid = 0;
    check("full-rate result", sum == ms && residue == mr && count == mcount);
    check("two cycles per value", cyc - t_start == 2000);

    $display("round_up=%0d round_down=%0d far=%0d subnormal=%0d special=%0d clear=%0d stall=%0d backpressure=%0d",
             n_up, n_down, n_far, n_sub, n_spec, n_clear, n_stall, n_bp);
    check("round-up seen", n_up > 0);
    check("round-down seen", n_down > 0);
    check("far pass-through seen", n_far > 0);
    check("subnormal residue seen", n_sub > 0);
    check("special seen", n_spec > 0);
    check("clear seen", n_clear > 0);
    check("stall seen", n_stall > 0);
    check("back-pressure seen", n_bp > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

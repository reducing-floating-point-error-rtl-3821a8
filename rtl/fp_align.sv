// fp_align: the Selective-swap and Pre-shifter units.
//
// The larger significand is placed at bits [SUM_W-2 -: 24] of a SUM_W-bit
// field (the top bit is left free for the carry) and the smaller one is
// placed the same way and shifted right by the exponent difference. With
// GUARD_W guard bits no bit of the smaller operand is lost for a shift below
// GUARD_W, so the adder that follows forms the exact sum. For a shift of
// GUARD_W or more `far_case` is raised: the smaller operand is then below a
// quarter of an ulp of the larger one, the rounded sum is the larger operand
// and the residue is the smaller operand itself, which the adder passes
// through. The guard width is this design's choice. Combinational.
module fp_align
  import fpadd_pkg::*;
(
  input  logic [SIG_W-1:0] sig_x,
  input  logic [SIG_W-1:0] sig_y,
  input  logic             swap,
  input  logic [EXP_W-1:0] exp_diff,
  output logic [SUM_W-1:0] sig_large,
  output logic [SUM_W-1:0] sig_small,
  output logic             far_case
);

  logic [SIG_W-1:0] sig_big, sig_sml;

  always_comb begin
    sig_big       = swap ? sig_y : sig_x;
    sig_sml     = swap ? sig_x : sig_y;
    far_case       = (exp_diff >= EXP_W'(GUARD_W));
    sig_large = {1'b0, sig_big, {GUARD_W{1'b0}}};
    sig_small = far_case ? '0 : ({1'b0, sig_sml, {GUARD_W{1'b0}}} >> exp_diff);
  end

endmodule

// rp_fp_adder: residue-preserving single-precision floating-point adder.
//
// A conventional IEEE 754 binary32 adder (Unpack, exponent Sub/Mux,
// selective swap, pre-shifter, significand Add, post-shifter, Normalize,
// exponent Add, Pack) that also returns the rounding residue: the exact
// difference between x + y and the rounded sum, itself a binary32 number.
// The extra units are a distributor that splits the exact sum at the
// rounding point, a residue Normalize, a residue Sign & exp logic and a
// second Pack; no second adder is needed because the significand adder is
// wide enough to hold every bit of the exact sum. For an exponent
// difference of 26 or more the sum is the larger operand, passed straight
// from Unpack to Pack, and the residue is the smaller operand.
//
// Round-to-nearest-even, subnormals kept, IEEE special values. On overflow
// or a NaN/Inf result the residue is +0. sum + residue == x + y exactly
// in every other case. Purely combinational, no pipelining, as in the
// architecture this design follows; rounding mode, the pass-through
// threshold and the residue on specials are this design's choices.
module rp_fp_adder
  import fpadd_pkg::*;
(
  input  fp32_t x,
  input  fp32_t y,
  output fp32_t sum,
  output fp32_t residue
);

  fp_unpacked_t ux, uy;
  logic             swap, far_case, eff_sub, m_zero, sum_sign, round_up, carry;
  logic             res_zero, res_sign, sum_ovf, res_ovf_unused;
  logic [EXP_W-1:0] exp_large, exp_diff;
  logic [SUM_W-1:0] sig_large, sig_small, m, hi;
  logic [LOW_W-1:0] low;
  logic signed [SH_W-1:0]   sh;
  logic [SIG_W-1:0] kept, sum_sig, res_sig;
  logic [POS_W-1:0] res_lead;
  logic signed [SEXP_W-1:0] sum_exp, res_exp;
  sum_sel_e         sel;
  logic [31:0]      special, sum_bypass_val, res_bypass_val, small_op;
  fp32_t            res_packed;

  fp_unpack u_unpack (.x, .y, .ux, .uy);

  fp_exp_diff u_exp_diff (.ux, .uy, .swap, .exp_large, .exp_diff);

  fp_align u_align (
    .sig_x(ux.sig), .sig_y(uy.sig), .swap, .exp_diff,
    .sig_large, .sig_small, .far_case
  );

  fp_ctrl_sign u_ctrl (
    .ux, .uy, .swap, .far_case, .sum_zero(m_zero),
    .eff_sub, .sum_sign, .sel, .special
  );

  fp_sig_add u_sig_add (.a(sig_large), .b(sig_small), .eff_sub, .m, .zero(m_zero));

  fp_distributor u_dist (.m, .exp_large, .hi, .low, .sh, .round_up);

  // Sum path.
  fp_post_shift u_post (.hi, .sh, .kept);
  fp_round_norm u_round (.kept, .round_up, .sig(sum_sig), .carry);
  fp_exp_add    u_exp_add (.exp_large, .sh, .carry, .exp(sum_exp));

  assign sum_bypass_val = (sel == SEL_SPECIAL) ? special : (swap ? y : x);
  fp_pack u_pack_sum (
    .sign(sum_sign), .exp(sum_exp), .sig(sum_sig),
    .bypass(sel != SEL_NORMAL), .bypass_val(sum_bypass_val),
    .z(sum), .ovf(sum_ovf)
  );

  // Residue path.
  fp_res_normalize u_res_norm (
    .low, .sh, .round_up, .exp_large, .sig(res_sig), .lead(res_lead), .zero(res_zero)
  );
  fp_res_sign_exp u_res_se (
    .sum_sign, .round_up, .exp_large, .lead(res_lead), .zero(res_zero),
    .sign(res_sign), .exp(res_exp)
  );

  // Far case: the smaller operand is the residue (+0 if it is a zero).
  assign small_op       = swap ? x : y;
  assign res_bypass_val = (sel == SEL_LARGE && small_op[30:0] != '0) ? small_op : 32'h0;
  fp_pack u_pack_res (
    .sign(res_sign), .exp(res_exp), .sig(res_sig),
    .bypass(sel != SEL_NORMAL), .bypass_val(res_bypass_val),
    .z(res_packed), .ovf(res_ovf_unused)
  );

  assign residue = sum_ovf ? '0 : res_packed;

endmodule

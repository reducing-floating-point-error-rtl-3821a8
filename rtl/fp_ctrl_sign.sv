// fp_ctrl_sign: the Control & sign logic unit.
//
// From the operand signs and classes it decides whether the significands are
// added or subtracted, which sign the sum carries and where the sum comes
// from: the rounded exact sum, the larger operand passed straight from Unpack
// to Pack (far_case case), or a special value. Specials follow IEEE 754 (NaN in or
// Inf - Inf gives the quiet NaN 0x7FC00000, an Inf operand gives that Inf);
// an exact zero sum is +0 unless both operands are -0. These rules are this
// design's choice. Combinational.
module fp_ctrl_sign
  import fpadd_pkg::*;
(
  input  fp_unpacked_t ux,
  input  fp_unpacked_t uy,
  input  logic         swap,
  input  logic         far_case,
  input  logic         sum_zero,
  output logic         eff_sub,
  output logic         sum_sign,
  output sum_sel_e     sel,
  output logic [31:0]  special
);

  always_comb begin
    eff_sub = ux.sign ^ uy.sign;
    if (sum_zero)
      sum_sign = ux.sign & uy.sign;
    else
      sum_sign = swap ? uy.sign : ux.sign;

    special = QNAN;
    sel     = SEL_NORMAL;
    if (ux.is_nan || uy.is_nan || (ux.is_inf && uy.is_inf && eff_sub)) begin
      sel     = SEL_SPECIAL;
      special = QNAN;
    end else if (ux.is_inf || uy.is_inf) begin
      sel     = SEL_SPECIAL;
      special = {ux.is_inf ? ux.sign : uy.sign, POS_INF[30:0]};
    end else if (far_case) begin
      sel     = SEL_LARGE;
    end
  end

endmodule

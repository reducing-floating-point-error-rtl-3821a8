// fp_res_sign_exp: the Sign & exp logic unit of the residue path.
//
// The residue has the sign of the sum when the sum was rounded down and the
// opposite sign when it was rounded up. Its biased exponent is
// exp_large + lead - 49 (the weight of bit `lead` of the exact sum); the
// packer turns a residue below the normal range into a subnormal because its
// significand then lacks bit 23. A zero residue is +0 (this design's
// choice). Combinational.
module fp_res_sign_exp
  import fpadd_pkg::*;
(
  input  logic                     sum_sign,
  input  logic                     round_up,
  input  logic [EXP_W-1:0]         exp_large,
  input  logic [POS_W-1:0]         lead,
  input  logic                     zero,
  output logic                     sign,
  output logic signed [SEXP_W-1:0] exp
);

  always_comb begin
    sign = zero ? 1'b0 : (sum_sign ^ round_up);
    exp  = $signed({2'b0, exp_large}) + $signed({4'b0, lead}) - $signed(SEXP_W'(LEAD_OFS));
  end

endmodule

// fp_exp_add: the exponent Add unit of the sum path.
//
// The sum's biased exponent is the larger operand's exponent moved by the
// post-shift and by a rounding carry: exp = exp_large + sh - 26 + carry.
// (Bit j of the exact sum weighs 2^(exp_large - 127 + j - 49); a 24-bit
// significand whose last place is bit sh therefore has that exponent.) The
// result is signed and wide enough for the packer to see an overflow. A
// subnormal sum comes out with exponent 1 and a significand below 2^23.
// Combinational.
module fp_exp_add
  import fpadd_pkg::*;
(
  input  logic [EXP_W-1:0]         exp_large,
  input  logic signed [SH_W-1:0]   sh,
  input  logic                     carry,
  output logic signed [SEXP_W-1:0] exp
);

  always_comb
    exp = $signed({2'b0, exp_large}) + SEXP_W'(sh) - $signed(SEXP_W'(LSB_OFS)) + $signed({9'b0, carry});

endmodule

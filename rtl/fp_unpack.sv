// fp_unpack: the Unpack unit of the residue-preserving adder.
//
// Splits both IEEE single operands into sign, effective exponent and 24-bit
// significand and flags zero, infinity and NaN. A subnormal is given
// exponent 1 and hidden bit 0 so that later stages need no special case for
// it. Purely combinational. The block itself is named in the architecture
// this design follows; the subnormal handling is this design's choice.
module fp_unpack
  import fpadd_pkg::*;
(
  input  fp32_t        x,
  input  fp32_t        y,
  output fp_unpacked_t ux,
  output fp_unpacked_t uy
);

  function automatic fp_unpacked_t unpack(input fp32_t a);
    fp_unpacked_t u;
    logic exp_zero, exp_ones;
    exp_zero  = (a.exp == '0);
    exp_ones  = (a.exp == '1);
    u.sign    = a.sign;
    u.exp     = exp_zero ? EXP_W'(1) : a.exp;
    u.sig     = {~exp_zero, a.frac};
    u.is_zero = exp_zero && (a.frac == '0);
    u.is_inf  = exp_ones && (a.frac == '0);
    u.is_nan  = exp_ones && (a.frac != '0);
    return u;
  endfunction

  assign ux = unpack(x);
  assign uy = unpack(y);

endmodule

// fp_exp_diff: the exponent Sub and Mux units.
//
// Sub forms the difference of the two effective exponents; the Mux passes
// on the larger one. The operand with the larger magnitude (exponent first,
// significand on a tie) is the one kept on top, so `swap` is set when y is
// larger than x; comparing the significands on equal exponents is this
// design's choice and keeps the significand subtraction non-negative.
// Purely combinational.
module fp_exp_diff
  import fpadd_pkg::*;
(
  input  fp_unpacked_t     ux,
  input  fp_unpacked_t     uy,
  output logic             swap,
  output logic [EXP_W-1:0] exp_large,
  output logic [EXP_W-1:0] exp_diff
);

  logic [EXP_W:0] d_xy;   // ex - ey with borrow in the top bit

  always_comb begin
    d_xy = {1'b0, ux.exp} - {1'b0, uy.exp};
    if (d_xy[EXP_W])
      swap = 1'b1;
    else if (d_xy == '0)
      swap = (uy.sig > ux.sig);
    else
      swap = 1'b0;
    exp_large = swap ? uy.exp : ux.exp;
    exp_diff  = d_xy[EXP_W] ? (uy.exp - ux.exp) : d_xy[EXP_W-1:0];
  end

endmodule

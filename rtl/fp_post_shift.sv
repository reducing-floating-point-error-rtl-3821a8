// fp_post_shift: the Post-shifter of the sum path.
//
// Moves the part of the exact sum that the distributor kept into a 24-bit
// significand: a right shift by sh when the sum had more bits than fit, a
// left shift by -sh after a deep cancellation. In both cases the result has
// its leading one at bit 23, or lower for a subnormal sum. Combinational.
module fp_post_shift
  import fpadd_pkg::*;
(
  input  logic [SUM_W-1:0]       hi,
  input  logic signed [SH_W-1:0] sh,
  output logic [SIG_W-1:0]       kept
);

  // The distributor guarantees the kept part fits in SIG_W bits after the
  // shift, so the truncation drops only zeros.
  always_comb begin
    if (sh >= 0)
      kept = SIG_W'(hi >> sh);
    else
      kept = SIG_W'(hi << (-sh));
  end

endmodule

// fp_sig_add: the significand Add unit.
//
// Adds or, on an effective subtraction, subtracts the aligned smaller
// significand from the larger one on the full SUM_W width. Since the
// operands are ordered by magnitude the result is the exact magnitude of the
// sum and never negative. This is the same adder a conventional adder has;
// the residue comes out of its extra low-order bits. Combinational.
module fp_sig_add
  import fpadd_pkg::*;
(
  input  logic [SUM_W-1:0] a,
  input  logic [SUM_W-1:0] b,
  input  logic             eff_sub,
  output logic [SUM_W-1:0] m,
  output logic             zero
);

  always_comb begin
    m    = eff_sub ? (a - b) : (a + b);
    zero = (m == '0);
  end

endmodule

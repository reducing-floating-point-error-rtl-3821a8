// fp_round_norm: the Normalize unit of the sum path.
//
// Adds the round-up decided by the distributor to the 24-bit significand.
// When that carries out (1.11..1 rounded up) the significand becomes 1.00..0
// and `carry` asks the exponent adder for one more. A subnormal significand
// that rounds up into bit 23 simply becomes the smallest normal one.
// Combinational.
module fp_round_norm
  import fpadd_pkg::*;
(
  input  logic [SIG_W-1:0] kept,
  input  logic             round_up,
  output logic [SIG_W-1:0] sig,
  output logic             carry
);

  logic [SIG_W:0] inc;

  always_comb begin
    inc   = {1'b0, kept} + (SIG_W+1)'(round_up);
    carry = inc[SIG_W];
    sig   = carry ? {1'b1, {(SIG_W-1){1'b0}}} : inc[SIG_W-1:0];
  end

endmodule

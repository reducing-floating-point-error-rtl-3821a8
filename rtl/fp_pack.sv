// fp_pack: the Pack unit; one instance packs the sum, another the residue.
//
// Takes a sign, a signed biased exponent and a 24-bit significand with the
// hidden bit in bit 23. A significand below 2^23 is packed as a subnormal
// (exponent field 0), which also covers zero. An exponent of 255 or more
// gives an infinity of the same sign and raises `ovf` (round-to-nearest
// overflow). When `bypass` is set the word on `bypass_val` is sent out
// unchanged: the pass-through path from Unpack and the special values use
// it. Combinational.
module fp_pack
  import fpadd_pkg::*;
(
  input  logic                     sign,
  input  logic signed [SEXP_W-1:0] exp,
  input  logic [SIG_W-1:0]         sig,
  input  logic                     bypass,
  input  logic [31:0]              bypass_val,
  output fp32_t                    z,
  output logic                     ovf
);

  always_comb begin
    ovf = 1'b0;
    if (bypass) begin
      z = bypass_val;
    end else if (!sig[SIG_W-1]) begin
      z = '{sign: sign, exp: '0, frac: sig[FRAC_W-1:0]};
    end else if (exp >= SEXP_W'(255)) begin
      z   = '{sign: sign, exp: '1, frac: '0};
      ovf = 1'b1;
    end else begin
      z = '{sign: sign, exp: exp[EXP_W-1:0], frac: sig[FRAC_W-1:0]};
    end
  end

endmodule

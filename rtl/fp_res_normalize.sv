// fp_res_normalize: the Normalize unit of the residue path.
//
// The residue is what the rounding of the sum left out: the low bits
// themselves when the sum was rounded down, or 2^sh - low (the low bits
// negated modulo 2^sh, no full adder) when it was rounded up. Its leading
// one `lead` is found and the magnitude is shifted so that the leading one
// sits in bit 23. A residue that would fall below the normal range is
// instead aligned to the subnormal grid (last place 2^-149); exp_large is
// needed for that test. The residue of a sum of two single-precision numbers
// always fits in 24 bits, so the right shift by up to three places drops
// nothing. Combinational.
module fp_res_normalize
  import fpadd_pkg::*;
(
  input  logic [LOW_W-1:0]       low,
  input  logic signed [SH_W-1:0] sh,
  input  logic                   round_up,
  input  logic [EXP_W-1:0]       exp_large,
  output logic [SIG_W-1:0]       sig,
  output logic [POS_W-1:0]       lead,
  output logic                   zero
);

  logic [LOW_W-1:0] mag, mask;
  logic signed [9:0] e_res, left;

  always_comb begin
    if (sh > 0)
      mask = (LOW_W'(1) << sh) - LOW_W'(1);
    else
      mask = '0;
    mag  = round_up ? ((-low) & mask) : (low & mask);
    zero = (mag == '0);

    lead = '0;
    for (int i = 0; i < LOW_W; i++)
      if (mag[i]) lead = POS_W'(i);

    // Biased exponent of the residue if it is normal.
    e_res = $signed({2'b0, exp_large}) + $signed({4'b0, lead}) - $signed(10'(LEAD_OFS));
    if (e_res >= 1)
      left = $signed(10'(SIG_W - 1)) - $signed({4'b0, lead});
    else
      left = $signed({2'b0, exp_large}) - $signed(10'(SUB_LSB));

    if (left >= 0)
      sig = SIG_W'({{(SIG_W){1'b0}}, mag} << left);
    else
      sig = SIG_W'(mag >> (-left));
  end

endmodule

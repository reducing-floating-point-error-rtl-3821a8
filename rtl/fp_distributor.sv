// fp_distributor: the distributor unit, the first of the units the
// residue-preserving adder adds to a conventional adder.
//
// It receives the exact sum magnitude m from the significand adder and
// splits it at the rounding point. The rounding point is chosen so that the
// sum keeps 24 significant bits, or fewer when the sum falls into the
// subnormal range: sh = max(p - 23, 27 - exp_large), p being the position of
// the leading one of m. A positive sh means the bits m[sh-1:0] fall below the
// sum's last place; they go out on `low`, to the residue path, while the
// bits above go out on `hi`, to the post-shifter of the sum path. A
// negative sh (deep cancellation) means the sum is exact and must be shifted
// left; `low` is then zero. The round-to-nearest-even decision is made here
// so that the sum path and the residue path use the same one: round up when
// the first dropped bit is set and either a later dropped bit or the kept
// last bit is set. Rounding mode and this split of work are this design's
// choices. Combinational.
module fp_distributor
  import fpadd_pkg::*;
(
  input  logic [SUM_W-1:0]       m,
  input  logic [EXP_W-1:0]       exp_large,
  output logic [SUM_W-1:0]       hi,
  output logic [LOW_W-1:0]       low,
  output logic signed [SH_W-1:0] sh,
  output logic                   round_up
);

  logic [POS_W-1:0] p;
  logic signed [9:0] by_lead, by_exp, sh_w;
  logic [SUM_W-1:0] mask, half, below_half;
  logic rbit, sticky, kept_lsb;

  always_comb begin
    p = '0;
    for (int i = 0; i < SUM_W; i++)
      if (m[i]) p = POS_W'(i);

    by_lead = $signed({4'b0, p}) - $signed(10'(SIG_W - 1));
    by_exp  = $signed(10'(SUB_LSB)) - $signed({2'b0, exp_large});
    sh_w    = (by_lead > by_exp) ? by_lead : by_exp;
    sh      = SH_W'(sh_w);

    if (sh_w > 0) begin
      mask       = (SUM_W'(1) << sh_w) - SUM_W'(1);
      half       = SUM_W'(1) << (sh_w - 10'sd1);
      below_half = half - SUM_W'(1);
      rbit       = |(m & half);
      sticky     = |(m & below_half);
      kept_lsb   = |(m & (SUM_W'(1) << sh_w));
    end else begin
      mask       = '0;
      half       = '0;
      below_half = '0;
      rbit       = 1'b0;
      sticky     = 1'b0;
      kept_lsb   = 1'b0;
    end
    round_up = rbit & (sticky | kept_lsb);
    hi       = m & ~mask;
    low      = LOW_W'(m & mask);
  end

endmodule

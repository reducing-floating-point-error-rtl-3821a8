// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Converts IEEE binary32 bit patterns to and from `real` (binary64) with an
// explicit round-to-nearest-even written on the integer fields of the
// binary64 value, so the testbenches do not depend on how a simulator treats
// `shortreal`. The sum of two binary32 numbers whose exponents differ by
// less than 30 is exact in binary64, and for larger differences the binary64
// sum rounds to the same binary32 value, so f2r(x)+f2r(y) followed by r2f
// gives the correctly rounded binary32 sum.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] b);
    logic [63:0] d;
    real v;
    if (b[30:23] == 8'h00) begin
      v = real'(b[22:0]) * (2.0 ** -149);
      return b[31] ? -v : v;
    end
    if (b[30:23] == 8'hFF)
      d = {b[31], 11'h7FF, b[22:0], 29'b0};
    else
      d = {b[31], 11'(int'(b[30:23]) - 127 + 1023), b[22:0], 29'b0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s;
    int          e, shift;
    logic [63:0] m, kept, rem, half;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF)
      return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'b0};
    if (d[62:52] == 11'h000)
      return {s, 31'b0};
    e = int'(d[62:52]) - 1023;
    m = {11'b0, 1'b1, d[51:0]};
    if (e >= 128) return {s, 8'hFF, 23'b0};
    shift = (e >= -126) ? 29 : 29 + (-126 - e);
    if (shift >= 60) return {s, 31'b0};
    kept = m >> shift;
    rem  = m & ((64'd1 << shift) - 64'd1);
    half = 64'd1 << (shift - 1);
    if (rem > half || (rem == half && kept[0])) kept = kept + 64'd1;
    if (e >= -126) begin
      if (kept == (64'd1 << 24)) begin
        kept = 64'd1 << 23;
        e    = e + 1;
      end
      if (e >= 128) return {s, 8'hFF, 23'b0};
      return {s, 8'(e + 127), kept[22:0]};
    end
    return {s, 31'(kept)};
  endfunction

  function automatic logic is_special(input logic [31:0] b);
    return b[30:23] == 8'hFF;
  endfunction

  // Correctly rounded binary32 sum.
  function automatic logic [31:0] ref_sum(input logic [31:0] x, input logic [31:0] y);
    return r2f(f2r(x) + f2r(y));
  endfunction

  // Exact rounding residue x + y - ref_sum(x, y); +0 when the sum or an
  // operand is Inf/NaN or the residue is zero.
  function automatic logic [31:0] ref_residue(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] s, big, sml, r;
    if (is_special(x) || is_special(y)) return 32'h0;
    s = ref_sum(x, y);
    if (is_special(s)) return 32'h0;
    if (x[30:0] >= y[30:0]) begin big = x; sml = y; end
    else begin big = y; sml = x; end
    r = r2f((f2r(big) - f2r(s)) + f2r(sml));
    return (r[30:0] == 0) ? 32'h0 : r;
  endfunction

  // Operand generator that mixes random patterns with the cases that
  // matter: close exponents, cancellation, subnormals, specials, overflow.
  function automatic logic [31:0] gen_pair_y(input logic [31:0] x, input int kind);
    logic [31:0] y;
    int e;
    y = $urandom;
    case (kind)
      0: ;                                                   // random
      1: begin                                               // close exponents
           e = int'(x[30:23]) - int'($urandom_range(0, 30));
           if (e < 0) e = 0;
           if (e > 254) e = 254;
           y[30:23] = 8'(e);
         end
      2: begin                                               // cancellation
           y = x ^ 32'h8000_0000;
           y[7:0] = 8'($urandom);
         end
      3: y[30:23] = 8'h00;                                   // subnormal
      4: y[30:23] = 8'hFF;                                   // Inf / NaN
      5: begin y = x; y[30:23] = 8'hFE; end                  // overflow
      default: y[30:23] = 8'($urandom_range(1, 254));
    endcase
    return y;
  endfunction

endpackage

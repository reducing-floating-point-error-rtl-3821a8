// fpadd_pkg: shared types and constants of the residue-preserving
// single-precision adder.
//
// IEEE 754 binary32 fields, the unpacked operand record passed between the
// Unpack, Sub/Mux, Control and Pre-shifter stages, and the width of the exact
// significand datapath. The datapath keeps GUARD_W bits below the 24-bit
// significand of the larger operand plus one carry bit, so that for every
// exponent difference below GUARD_W the exact sum of the two operands is held
// without loss; that is what lets the residue of rounding be read off the
// bits below the rounding point. GUARD_W = 26 is this design's choice: it is
// the smallest width for which an operand shifted further always leaves the
// rounded sum unchanged.
package fpadd_pkg;

  localparam int EXP_W   = 8;
  localparam int FRAC_W  = 23;
  localparam int SIG_W   = FRAC_W + 1;            // 24, hidden bit included
  localparam int GUARD_W = 26;                    // bits kept below the larger significand
  localparam int SUM_W   = 1 + SIG_W + GUARD_W;   // 51: carry, significand, guard bits
  localparam int LOW_W   = GUARD_W + 1;           // 27: widest part below the rounding point
  localparam int POS_W   = 6;                     // holds positions 0..SUM_W-1
  localparam int SH_W    = 6;                     // signed post-shift -23..27
  localparam int SEXP_W  = 10;                    // signed biased exponent before packing

  // Offsets that tie bit positions of the exact sum to biased exponents.
  // Bit j of the exact sum weighs 2^(exp_large - 127 + j - LEAD_OFS).
  localparam int LEAD_OFS = SIG_W - 1 + GUARD_W;  // 49: exponent of a leading one at bit j
  localparam int LSB_OFS  = GUARD_W;              // 26: exponent of a 24-bit value whose last place is bit j
  localparam int SUB_LSB  = GUARD_W + 1;          // 27: bit j = SUB_LSB - exp_large weighs 2^-149

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Operand after unpacking. exp is the effective biased exponent (1 for a
  // subnormal), sig carries the hidden bit in bit 23.
  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [SIG_W-1:0]  sig;
    logic              is_zero;
    logic              is_inf;
    logic              is_nan;
  } fp_unpacked_t;

  // Where the sum comes from.
  typedef enum logic [1:0] {
    SEL_NORMAL  = 2'd0,   // rounded exact sum
    SEL_LARGE   = 2'd1,   // larger operand passed through (far_case case)
    SEL_SPECIAL = 2'd2    // Inf or NaN
  } sum_sel_e;

  localparam logic [31:0] QNAN    = 32'h7FC0_0000;
  localparam logic [31:0] POS_INF = 32'h7F80_0000;

endpackage

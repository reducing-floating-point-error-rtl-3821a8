# Residue-preserving floating-point summation

Every floating-point addition rounds. In a long running sum the rounding
errors pile up, and after a million single-precision additions the result
can be off in its third or fourth significant digit. This design keeps that
lost part instead of discarding it. An IEEE 754 single-precision adder is
extended to return two numbers: the usual rounded sum, and the **residue**.
The residue is the exact difference between the true sum and the rounded sum.
A small accumulator keeps the residue in a register and adds it back into
the next operand. With single-precision hardware, the running sum then stays
within one unit in the last place (ulp) of the exact sum. Its accuracy is
close to that of a double-precision accumulator.

The method comes from the paper *Reducing Floating-Point Error Based on
Residue-Preservation and Its Evaluation on an FPGA*: the summation
recurrence, and the adder built from a conventional one plus a few added
units. The RTL here is an independent implementation. Widths, rounding,
special cases, timing and the handshake were chosen for this design; they
are listed under [Departures and choices](#departures-and-choices).

## The recurrence

For a stream X0, X1, … the accumulator keeps a sum S and a residue R:

```
Step 1  R = S = 0
Step 2  U = R + X_i                 (rounded; the residue of this addition is dropped)
Step 3  S = S + U                   (rounded)
        R = (S_old + U) - S         (exact, produced by the same adder)
Step 4  next i
```

Anything that rounding cuts from `S + U` is carried into the next step
through R, so it is not lost. Only the rounding of Step 2 loses
information. This design does not recover that loss.

A plainer version of the same idea recovers R in software with two more
operations: `V = S_new - S_old` and `R = U - V`. The adder here makes both
unnecessary. It has already seen every bit of the exact sum, so the residue
is just the bits below the rounding point.

## The residue-preserving adder (`rp_fp_adder`)

This is a combinational, unpipelined binary32 adder. Its sum path is a
textbook adder:

```
Unpack -> exponent Sub / Mux -> Selective swap -> Pre-shifter -> significand Add
       -> Post-shifter -> Normalize (round) -> exponent Add -> Pack -> sum
```

Four units are added, and they share the significand adder (there is no
second adder):

```
significand Add -> distributor -> residue Normalize -> Sign & exp logic -> Pack -> residue
```

### Why the datapath is 51 bits wide

The residue can only be read off the exact sum if no bit of the smaller
operand is lost during alignment. The pre-shifter therefore works on a
51-bit field:

```
bit 50        carry of the addition
bits 49..26   larger significand (hidden bit at 49)
bits 25..0    GUARD_W = 26 guard bits
```

The smaller significand is placed at the same position and shifted right by
the exponent difference d. For d ≤ 25 all of its bits stay inside the field,
so the significand adder (`fp_sig_add`) produces the exact magnitude
`m = |x + y|` on a fixed scale. Bit j of m has weight
`2^(exp_large - 127 + j - 49)`. The operands are ordered by magnitude, with
the significands compared when the exponents are equal, so a subtraction
never goes negative.

For d ≥ 26 the smaller operand is less than a quarter ulp of the larger one.
That holds even when the larger operand is a power of two being reduced.
The rounded sum is then exactly the larger operand, and the residue is
exactly the smaller one. This **far case** bypasses the datapath. The larger
operand goes straight from Unpack to the sum Pack, and the smaller one to the
residue Pack. Because of the far case, 26 guard bits are enough for the
whole exponent range.

### The distributor: one rounding decision, two outputs

`fp_distributor` finds the leading one p of m and picks the rounding point:

```
sh = max(p - 23, 27 - exp_large)
```

The first term keeps 24 significant bits. The second stops the result at
the subnormal grid (last place 2^-149) when the sum is tiny. The two paths
then get:

* **Sum path, `hi`:** the bits at and above sh. The post-shifter moves them
  into a 24-bit significand. A negative sh means a deep cancellation: the sum
  is exact and is shifted left.
* **Residue path, `low`:** the bits below sh. There are at most 27 of them.

The round-to-nearest-even decision is made here once and used by both paths.
The sum rounds up when the first dropped bit is 1 and either a later dropped
bit or the last kept bit is 1.

* If the sum is not rounded up, the residue is `+low` with the sum's sign.
* If it is rounded up, the sum overshoots. The residue is then
  `-(2^sh - low)`, with the opposite sign. `2^sh - low` is the low bits
  negated modulo 2^sh, so this needs no adder.

The sum exponent is `exp_large + sh - 26`, plus 1 if rounding carried out of
the significand (`fp_exp_add`, `fp_round_norm`).

### Normalising the residue

`fp_res_normalize` finds the leading one `lead` of the residue magnitude and
shifts it to bit 23. The Sign & exp logic (`fp_res_sign_exp`) gives the
exponent `exp_large + lead - 49`. A residue below the normal range is aligned
to the subnormal grid instead. It always lands on that grid exactly, because
no operand has bits below it.

The residue of a sum of two binary32 numbers is always representable in
binary32. Its magnitude therefore never needs more than 24 bits, and the
right shift of at most 3 places drops nothing. The testbenches check
`sum + residue == x + y` exactly.

### Special cases

| inputs / result                       | sum                     | residue |
|---------------------------------------|-------------------------|---------|
| NaN operand, or +Inf + −Inf           | quiet NaN `0x7FC00000`  | +0      |
| one Inf operand                       | that Inf                | +0      |
| overflow after rounding               | ±Inf                    | +0      |
| exact zero, e.g. x + (−x)             | +0 (−0 if both are −0)  | +0      |
| subnormal operands or results         | handled exactly, IEEE   | exact   |

## The accumulator (`rp_accumulator`, top)

One `rp_fp_adder` serves both steps of the recurrence. The two cycles are
shown below. `S`, `R`, `U` and `count` are registers.

```
cycle   state   adder inputs   registered on the closing edge
  0     STEP2   R, x_data      U       (x_ready = 1; the transfer happens here)
  1     STEP3   S, U           S, R, count+1  (busy = 1, x_ready = 0)
```

* **Input handshake:** `x_valid`/`x_ready`. A value is taken at a rising
  edge where both are high.
* **Throughput:** one value every two cycles when `x_valid` is held high.
* **Latency:** `sum` and `residue` show X_i two edges after it was accepted.
* **Reset and clear:** `clear` (synchronous) and `rst_n` (asynchronous, active
  low) perform Step 1.
* **Outputs:** `sum` is the result of the summation. `sum + residue` is
  closer still, if the consumer can use two words.
* **Assertion:** `x_ready` and `busy` are never high together.

There is only one adder on the path between registers, so the clock period
is one full binary32 add.

## Departures and choices

* **Rounding mode:** not specified by the method. Round-to-nearest-even is
  used throughout, with IEEE subnormals and special values.
* **One shared adder:** the two additions per value share one adder, taking
  2 cycles per value. A design that needs one value per cycle would put two
  `rp_fp_adder` instances in series. The residue of the first one would be
  left unused.
* **Guard width and far bypass:** the 26 guard bits and the far-case bypass
  are this design's way of keeping "all the bits" of the exact sum.
* **Wiring differences from the reference architecture:**
  * The exponent difference reaches the significand adder only through the
    pre-shifter.
  * The exponent adder takes its shift from the distributor, not from the
    control block.
  * The round decision lives in the distributor.
* **Residue on specials:** +0 on overflow, Inf and NaN. This is a choice.
* **Not included:** the published FPGA figures for this adder were about
  1000 logic elements and 27 MHz on a Cyclone II, against about 1340 for a
  double-precision adder. They come from a vendor flow and are not
  reproduced here. The plainer four-operation form of the recurrence is also
  not built.

## Verification

Each module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. `tb/fp_ref_pkg.sv` is the reference.
It converts binary32 to and from `real` and does its own round-to-nearest-even
on the binary64 fields, so it does not rely on the simulator's `shortreal`.

* **`tb_rp_fp_adder`:** checks about 600 000 operand pairs. The pairs are
  random, plus close exponents, cancellations, subnormals, Inf/NaN and
  overflow. Each is checked bit for bit against the reference for both sum
  and residue, and for exactness of sum + residue.
* **`tb_rp_accumulator`:** runs 23 000 values with random gaps, a clear, an
  infinity and a full-rate burst, compared bit for bit with a model of the
  recurrence. It checks latency and the 2-cycle rate. It also requires each
  of these to happen at least once: round-up, round-down, far bypass,
  subnormal residue, special value, clear, stall and back-pressure.
* **`tb_rp_accumulator_full`:** the accuracy workload. It sums 10^6
  pseudo-random values in [0, 1). Every value is a multiple of 2^-24, so a
  binary64 running sum is exact and serves as the truth. A typical run gives:

  | additions | error of S | error of plain binary32 sum | error of S + R |
  |-----------|------------|-----------------------------|----------------|
  | 100 000   | 0.0008     | −0.0031                     | 0.000000       |
  | 500 000   | −0.0069    | 3.45                        | 0.000000       |
  | 1 000 000 | 0.0043     | 3.57                        | 0.000000       |

  The test requires the error of S to be at most one ulp of S (2^-5 near
  5·10^5) and below that of the plain sum. It also checks the count and the
  2 000 000-cycle run time.

The leaf-block testbenches check each unit against an arithmetic statement
of what it must do, for example "kept × 2^sh equals hi" or "sig × 2^(E−150)
equals the residue value", rather than against a second copy of its logic.

## Simulating

All sources are plain SystemVerilog. The packages must come first. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fpadd_pkg.sv tb/fp_ref_pkg.sv tb/tb_rp_accumulator_full.sv \
    --top-module tb_rp_accumulator_full -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The full workload runs in
about a second. For lint, use
`verilator --lint-only -Wall -y rtl rtl/fpadd_pkg.sv rtl/rp_accumulator.sv`.

## Module map

| module             | unit of the adder / role                                      |
|--------------------|---------------------------------------------------------------|
| `fpadd_pkg`        | binary32 struct, unpacked-operand struct, datapath widths     |
| `fp_unpack`        | Unpack: fields, hidden bit, zero/Inf/NaN                      |
| `fp_exp_diff`      | exponent Sub and Mux: swap, larger exponent, difference       |
| `fp_align`         | Selective swap and Pre-shifter, far-case detection            |
| `fp_ctrl_sign`     | Control & sign logic: add/subtract, sign, special results     |
| `fp_sig_add`       | significand Add, 51 bits, exact                               |
| `fp_distributor`   | rounding point, hi/low split, round-to-nearest-even decision  |
| `fp_post_shift`    | Post-shifter of the sum                                       |
| `fp_round_norm`    | Normalize of the sum: increment and carry renormalisation     |
| `fp_exp_add`       | exponent Add of the sum                                       |
| `fp_pack`          | Pack (one instance for the sum, one for the residue)          |
| `fp_res_normalize` | residue magnitude and normalisation                           |
| `fp_res_sign_exp`  | residue sign and exponent                                     |
| `rp_fp_adder`      | the residue-preserving adder                                  |
| `rp_accumulator`   | top: S/R registers, two-step control, handshake               |

The widths live in `fpadd_pkg`. The design is written for binary32: the
hidden-bit position, the offsets 26, 27 and 49 and the 51-bit datapath
follow from `SIG_W` and `GUARD_W`. A different format would need those
constants reworked together.

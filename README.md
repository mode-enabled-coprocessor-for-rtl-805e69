# Mode-enabled floating-point multiplier coprocessor

A coprocessor that multiplies IEEE-754 floating-point numbers in single
precision (binary32) or double precision (binary64) and rounds the product
in one of four selectable rounding modes. The rounding mode is the "mode"
of the coprocessor: it travels with every operation, so a program can mix
round-to-nearest-even with directed rounding (for interval arithmetic, for
instance) at no cost.

The significand product, the expensive part of any floating-point
multiplier, is formed with the *Urdhva-Tiryagbhyam* ("vertically and
crosswise") rule of Vedic mathematics: all digit-by-digit products are
formed at once by small 2x2 multiplier cells and then summed column by
column. Everything around it (sign, biased exponent, normalisation,
guard/round/sticky rounding, packing) is a conventional IEEE-754
multiplier.

The RTL follows the single and double precision multipliers described by
D. Kumar and G. C. Lall, "Mode Enabled Coprocessor for Precision
Multipliers". That description gives the algorithm step by step but not
the circuit-level structure, the interface or the treatment of special
values; where this RTL had to choose, it says so below and in each file's
header.

## Block structure

```
mecp_top                      coprocessor: precision select, result return
├── fp_mult  (EW=8,  MW=23)   single precision multiplier
│   ├── vedic_mult (N=24)     Urdhva significand multiplier, 144 vedic_2x2 cells
│   ├── fp_normalize          leading-one search, exponent adjust, denormalise
│   └── fp_round              guard/round/sticky rounding in 4 modes, packing
└── fp_mult  (EW=11, MW=52)   double precision multiplier
    ├── vedic_mult (N=53)     729 vedic_2x2 cells
    ├── fp_normalize
    └── fp_round
mecp_pkg                      rounding-mode enum, format constants
```

`fp_mult` is one parameterised unit; the two precisions are two instances
of it with different exponent (`EW`) and fraction (`MW`) widths.

## The multiplication, step by step

For operands `a = (sA, eA, fA)` and `b = (sB, eB, fB)` with bias
`2^(EW-1) - 1` (127 or 1023):

1. **Unpack.** The hidden bit is made explicit: 1 when the exponent field
   is non-zero, 0 when it is zero. A zero exponent field (a denormal)
   counts as exponent 1. The significands are `P = MW+1` bits: 24 or 53.
2. **Sign, exponent, significand.** `s = sA xor sB`;
   `e = eA + eB - bias` (the biased exponent if the significand product
   lies in [1,2)); `prod = sigA * sigB`, a 2P-bit unsigned product from
   `vedic_mult`.
3. **Normalise** (`fp_normalize`). The leading one of `prod` is found and
   shifted to the MSB, lowering the exponent by one per position. With two
   normal operands the product lies in [1,4): either no shift and `e+1`
   (product in [2,4)) or one shift and `e`. Denormal operands can need many
   positions. If the exponent would end below 1 the result is a denormal:
   the significand is shifted back right by `1 - e`, the bits that fall off
   are ORed into a sticky bit, and the exponent field becomes 0.
4. **Round** (`fp_round`). The top P bits are kept; the next bit is the
   guard bit, the one after it the round bit, and the OR of everything
   below (plus the sticky bit from step 3) the sticky bit.
5. **Pack.** The hidden bit is dropped and `{s, exponent, fraction}` is
   output.

Exponent arithmetic is carried in `EW+3` signed bits, enough for the
smallest possible exponent (two denormals) and the largest (two numbers
near overflow).

## The Urdhva significand multiplier (`vedic_mult`)

This is the part that differs from a textbook multiplier, so it is worth
understanding in detail.

The leaf cell, `vedic_2x2`, multiplies two 2-bit numbers the way the
sutra does by hand: the *vertical* product of the low bits is `p[0]`; the
two *crosswise* products `a1·b0` and `a0·b1` are added in a half adder for
`p[1]` and a carry; the vertical product of the high bits plus that carry,
through a second half adder, gives `p[3:2]`. Four AND gates, two half
adders.

`vedic_mult` applies the same rule one level up, in radix 4. Each N-bit
operand is cut into `D = ceil(N/2)` two-bit digits (the top digit of the
53-bit double precision significand is zero-padded). A `vedic_2x2` cell is
placed for every digit pair `(a_i, b_j)`, so all `D²` partial products
(each 0..9) appear in parallel: 144 cells for single precision, 729 for
double. Then, for each output column `k = 0 .. 2D-2`:

```
column_k = carry_k + Σ_{i+j=k} a_i·b_j        (vertical and crosswise terms)
digit_k  = column_k mod 4
carry_k+1 = column_k div 4
```

and the final carry fills the top digit. Column `k` holds at most
`min(k+1, 2D-1-k)` terms, so the widest column of the double precision
multiplier sums 27 partial products plus the carry; the column adder is
sized `clog2(9·D+1)+2` bits. The carries ripple through the 2D columns,
which makes this a compact but deep combinational path; nothing in it is
pipelined.

The choice of radix-4 digits with a column carry chain is this RTL's own
reading of how the 2x2 cells are combined into an NxN multiplier; the
original only names the method and shows a 2x2 cell.

## Rounding modes

`rmode` (type `mecp_pkg::rmode_e`) is sampled with every operation:

| `rmode` | name | adds one ulp when |
|---|---|---|
| 0 `RM_RNE` | round to nearest, ties to even | `G & (R | S | lsb)` |
| 1 `RM_RUP` | round up, toward +∞ | result positive and `G | R | S` |
| 2 `RM_RDN` | round down, toward −∞ | result negative and `G | R | S` |
| 3 `RM_RTZ` | round toward zero | never |

The increment is added to the packed `{exponent, fraction}` word rather
than to the significand alone. A significand of all ones that rounds up
therefore carries into the exponent (1.11…1 becomes 10.0 and the exponent
goes up), and the largest denormal that rounds up becomes the smallest
normal number, both without a second normalising shift. A carry into the
all-ones exponent yields infinity.

Overflow (exponent at or above all ones before rounding) gives infinity
when the mode rounds away from zero for that sign (RNE; RUP for positive;
RDN for negative) and the largest finite number otherwise, as IEEE-754
requires. The mode encoding (the order in which the four modes are
listed) is this RTL's own.

## Special operands

Not covered by the original description; this RTL follows IEEE-754:

| operands | result |
|---|---|
| either is NaN, or ∞ × 0 | canonical quiet NaN, sign 0 (`7fc00000`, `7ff8000000000000`) |
| ∞ × non-zero (incl. ∞) | ∞ with the XOR sign |
| 0 × finite | zero with the XOR sign |

No exception flags (invalid, overflow, underflow, inexact) are produced.

## Coprocessor interface and timing (`mecp_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | issue an operation this cycle |
| `in_dp` | in | 1 | 0: single precision, operands in `[31:0]`; 1: double precision |
| `rmode` | in | 2 | rounding mode |
| `a`, `b` | in | 64 | operands |
| `out_valid` | out | 1 | result valid |
| `out_dp` | out | 1 | precision of the returned result |
| `result` | out | 64 | product; single precision results are zero-extended |

Timing: each `fp_mult` has one register stage at its output, so a result
appears exactly **one cycle** after `in_valid`, and a new operation of
either precision can be issued **every cycle**. `in_valid` is steered to
the unit chosen by `in_dp`; since only one operation is issued per cycle,
at most one unit returns a result in a cycle (an assertion in `mecp_top`
checks this). There is no back-pressure. Reset clears `out_valid` and the
result registers.

The original design reports separately synthesised single and double
precision multipliers; joining them behind one 64-bit port with a
precision bit, the one-cycle latency and the valid strobe are this RTL's
own choices. The host processor interface is not specified beyond that.

For orientation, the original implementation on a Xilinx Virtex-4
(xc4vsx35) was reported at 2688 slices / 5148 four-input LUTs and a
50.2 ns critical path for single precision, and 12447 slices / 22789 LUTs
and a 203.8 ns path for double precision, against 13055 slices for a
Booth-based double precision multiplier. This RTL was not mapped to that
device, so those figures are not reproduced here.

## Where this RTL departs from or adds to the original

- The original says that during normalisation the bits are shifted left
  and the exponent is *incremented* with each shift. A left shift doubles
  the significand, so the exponent must be *decremented*; this RTL
  decrements per left shift and increments by one when the product is in
  [2,4).
- Denormal results (gradual underflow) and denormal inputs are handled
  fully; the original only sets the hidden bit to 0 for a zero exponent.
- "Round-up" and "round-down" are implemented as IEEE-754 rounding toward
  +∞ and −∞.
- NaN, infinity, overflow saturation, the interface, latency and reset
  are IEEE-754 conventions or this RTL's own choices (see above).
- The double precision widths (11-bit exponent, 52-bit fraction, bias
  1023) are those of IEEE-754 binary64; the original states only the
  single precision widths.
- The Booth multiplier used as an area baseline in the original is not
  part of this design.

## Files

| file | contents |
|---|---|
| `rtl/mecp_pkg.sv` | rounding-mode enum and format constants |
| `rtl/vedic_2x2.sv` | 2x2 Urdhva cell |
| `rtl/vedic_mult.sv` | NxN Urdhva multiplier |
| `rtl/fp_normalize.sv` | normalisation and denormalisation |
| `rtl/fp_round.sv` | rounding and packing |
| `rtl/fp_mult.sv` | complete floating-point multiplier, either precision |
| `rtl/mecp_top.sv` | the coprocessor |
| `tb/fp_ref_pkg.sv` | exact-value reference model and operand generator |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mecp_pkg.sv tb/fp_ref_pkg.sv tb/tb_mecp_top.sv --top-module tb_mecp_top
./obj_dir/Vtb_mecp_top
```

Replace `tb_mecp_top` by `tb_fp_mult`, `tb_fp_round`, `tb_fp_normalize`,
`tb_vedic_mult` or `tb_vedic_2x2` for the unit tests. Each runs in a few
seconds.

What the testbenches check:

- `tb_vedic_2x2`: all 16 input pairs.
- `tb_vedic_mult`: N = 5 exhaustively, N = 24 and N = 53 on 4000 random
  and corner operands (all ones, single bits, zero), against `*`.
- `tb_fp_normalize`: 20000 products against a one-position-at-a-time
  shift model, including denormal results and sticky collection.
- `tb_fp_round`: 20000 cases in all four modes against a
  remainder-versus-half-ulp model, including ties, carries into the
  exponent, overflow and denormals.
- `tb_fp_mult`: both precisions, 30000 back-to-back operations each,
  operands biased toward denormals, overflow, underflow, infinities, NaNs
  and all-ones fractions, against the reference model in `fp_ref_pkg`
  (which works on exact integer values, not on guard/round/sticky bits).
  Double precision round-to-nearest results are also compared with the
  simulator's native `real` multiplication. Directed cases (1.5 × 2 = 3,
  max × 2 = ∞, ∞ × 0 = NaN, …) and the one-cycle latency are checked.
- `tb_mecp_top`: 40000 operations on the full-size coprocessor with random
  precision, mode and idle cycles. It counts, and requires at least once,
  each of: both precisions, a precision switch, each rounding mode, a
  product in [2,4), a left normalising shift, a rounding increment, a
  rounding carry into the exponent, a denormal result, overflow,
  underflow to zero, and NaN, infinity and zero operands.

## Changing the design

- Other formats: instantiate `fp_mult` with other `EW`/`MW` (for example
  `EW=5, MW=10` for half precision); the Urdhva multiplier, normaliser and
  rounder all follow the parameters. The reference model in
  `tb/fp_ref_pkg.sv` handles any format up to 64 bits.
- Pipelining: the significand multiplier's column carry chain is the long
  path. Registering the column sums, or the normaliser input, adds latency
  without changing the interface other than the `out_valid` delay.
- Flags: `fp_round` already computes the inexact condition internally
  (`g | r | s`) if exception flags are wanted.

// fp_round: mode-enabled rounding and packing of a normalised product.
//
// The top P = MW+1 bits of the normalised 2P-bit product are the result
// significand. The next bit is the guard bit, the one after it the round
// bit, and the OR of all lower bits (and of any bit lost while
// denormalising) the sticky bit. Whether to add one unit in the last place
// depends on the selected mode:
//   round-to-nearest-even : guard and (round or sticky or lsb)
//   round-up (to +inf)    : positive result and any of guard/round/sticky
//   round-down (to -inf)  : negative result and any of guard/round/sticky
//   round-to-zero         : never
// The increment is added to the packed {exponent, fraction} word, so a
// carry out of the fraction bumps the exponent (1.11..1 rounding to 10.0,
// or the largest denormal rounding to the smallest normal) without a
// separate renormalising shift; a carry into the all-ones exponent gives
// infinity. An exponent already at or above all ones before rounding is an
// overflow: the result is infinity when the mode rounds away from zero for
// this sign and the largest finite number otherwise. The hidden bit is
// dropped when packing.
//
// Interface: sign, exp_in (signed biased exponent, 0 for a denormal), mant
// (normalised 2P-bit product), sticky_in, rmode; res is the packed
// IEEE-754 result of 1+EW+MW bits, whose sign bit is the sign input
// passed straight through.
// Timing: purely combinational.
// Guard/round/sticky and the four modes follow the published design; the packed-word
// increment and the overflow rule are this design's own (IEEE-754) choices.
module fp_round
  import mecp_pkg::*;
#(
  parameter int unsigned EW = 8,   // exponent field width
  parameter int unsigned MW = 23,  // fraction field width
  localparam int unsigned P   = MW + 1,
  localparam int unsigned PW  = 2 * P,
  localparam int unsigned EXW = EW + 3,
  localparam int unsigned FW  = 1 + EW + MW
) (
  input  logic                  sign,
  input  logic signed [EXW-1:0] exp_in,
  input  logic [PW-1:0]         mant,
  input  logic                  sticky_in,
  input  rmode_e                rmode,
  output logic [FW-1:0]         res
);

  localparam logic [EW-1:0] EXP_MAX = '1;

  logic          g, r, s, lsb, inexact, inc, away;
  logic [EW+MW-1:0] body;

  always_comb begin
    lsb     = mant[P];
    g       = mant[P-1];
    r       = mant[P-2];
    s       = (|mant[P-3:0]) | sticky_in;
    inexact = g | r | s;
    unique case (rmode)
      RM_RNE:  inc = g & (r | s | lsb);
      RM_RUP:  inc = ~sign & inexact;
      RM_RDN:  inc = sign & inexact;
      default: inc = 1'b0;
    endcase
    // Does the mode send an out-of-range magnitude to infinity?
    away = (rmode == RM_RNE) || (rmode == RM_RUP && !sign) || (rmode == RM_RDN && sign);

    if (exp_in >= $signed(EXW'(EXP_MAX))) begin
      body = away ? {EXP_MAX, {MW{1'b0}}} : {EXP_MAX - EW'(1), {MW{1'b1}}};
    end else begin
      body = {exp_in[EW-1:0], mant[PW-2 -: MW]} + (EW+MW)'(inc);
    end
    res = {sign, body};
  end

endmodule

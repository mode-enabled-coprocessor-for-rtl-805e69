// fp_normalize: normalisation of the double-width significand product.
//
// The product of two P-bit significands (P = MW+1, hidden bit included) is
// 2P bits wide. With two normal operands its leading one sits in one of
// the top two bit positions; with a denormal operand it can sit lower. A
// leading-zero count finds it and the product is shifted left until the
// leading one is the MSB, the exponent being lowered by one for every
// position shifted (one position less, i.e. +1, when the product is in
// [2,4)). The incoming exponent is the biased exponent the result would
// have if the product lay in [1,2), i.e. eA + eB - bias.
//
// If the normalised exponent falls below 1 the result is a denormal: the
// significand is shifted right again by (1 - exponent), the bits that leave
// at the bottom are ORed into a sticky bit, and the exponent becomes 0.
// Overflow (exponent >= 2^EW - 1) is passed on unchanged and handled by the
// rounding stage.
//
// Interface: prod is the 2P-bit product, exp_in a signed biased exponent;
// mant is the normalised product (its MSB is the hidden bit of a normal
// result, 0 for a denormal), exp_out the signed biased exponent (0 for a
// denormal), sticky the OR of bits lost in the denormalising shift.
// A zero product gives mant = 0 and is otherwise not special here.
// Timing: purely combinational.
// Left-shift normalisation with exponent adjustment follows the published design;
// gradual underflow to denormals is this design's own completion of it.
module fp_normalize #(
  parameter int unsigned EW = 8,   // exponent field width
  parameter int unsigned MW = 23,  // fraction field width
  localparam int unsigned P   = MW + 1,
  localparam int unsigned PW  = 2 * P,
  localparam int unsigned EXW = EW + 3,
  localparam int unsigned LZW = $clog2(PW + 1)
) (
  input  logic [PW-1:0]         prod,
  input  logic signed [EXW-1:0] exp_in,
  output logic [PW-1:0]         mant,
  output logic signed [EXW-1:0] exp_out,
  output logic                  sticky
);

  logic [LZW-1:0]        lz;
  logic [PW-1:0]         shifted;
  logic signed [EXW-1:0] e_norm;
  logic [EXW-1:0]        rsh;
  logic [PW-1:0]         lost_mask;

  // Leading-zero count: the highest set bit wins.
  always_comb begin
    lz = LZW'(PW);
    for (int i = 0; i < PW; i++) begin
      if (prod[i]) lz = LZW'(PW - 1 - i);
    end
  end

  always_comb begin
    shifted   = prod << lz;
    e_norm    = exp_in + EXW'(1) - EXW'(lz);
    rsh       = '0;
    lost_mask = '0;
    mant      = shifted;
    exp_out   = e_norm;
    sticky    = 1'b0;
    if (e_norm < EXW'(1)) begin
      rsh     = EXW'(1) - e_norm;
      exp_out = '0;
      if (rsh >= EXW'(PW)) begin
        mant   = '0;
        sticky = |shifted;
      end else begin
        lost_mask = ~({PW{1'b1}} << rsh);
        mant      = shifted >> rsh;
        sticky    = |(shifted & lost_mask);
      end
    end
  end

endmodule

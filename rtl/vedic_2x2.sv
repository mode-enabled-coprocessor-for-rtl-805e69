// vedic_2x2: 2-bit by 2-bit unsigned multiplier, the leaf cell of the
// Urdhva-Tiryagbhyam ("vertically and crosswise") significand multiplier.
//
// The product is formed the way the sutra forms it by hand: the vertical
// product of the low bits gives p[0]; the two crosswise products a1*b0 and
// a0*b1 are added with a half adder to give p[1] and a carry; the vertical
// product of the high bits plus that carry, through a second half adder,
// gives p[2] and p[3]. Four AND gates and two half adders, no carry chain.
//
// Interface: a, b are 2-bit unsigned operands, p the 4-bit product.
// Timing: purely combinational.
// The cell itself is part of the published design; the gate-level arrangement is the
// textbook Urdhva 2x2 cell.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic v0, x0, x1, v1;  // vertical and crosswise bit products
  logic c1;              // carry out of the crosswise sum

  always_comb begin
    v0   = a[0] & b[0];
    x0   = a[1] & b[0];
    x1   = a[0] & b[1];
    v1   = a[1] & b[1];
    c1   = x0 & x1;
    p[0] = v0;
    p[1] = x0 ^ x1;
    p[2] = v1 ^ c1;
    p[3] = v1 & c1;
  end

endmodule

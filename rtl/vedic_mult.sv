// vedic_mult: N-bit by N-bit unsigned multiplier built by the
// Urdhva-Tiryagbhyam ("vertically and crosswise") method.
//
// The operands are cut into D = ceil(N/2) radix-4 digits (2-bit groups,
// the top one zero-padded when N is odd). Every pair of digits a_i, b_j is
// multiplied by a vedic_2x2 cell, giving D*D 4-bit partial products that
// are all formed in parallel. The product is then assembled column by
// column as the sutra prescribes: column k collects the vertical and
// crosswise products a_i*b_j with i + j = k, adds the carry handed on from
// column k-1, keeps the low radix-4 digit as product digit k and passes
// the rest on as the carry into column k+1. Single precision (N = 24)
// uses 12 digits and 144 cells, double precision (N = 53) 27 digits and
// 729 cells.
//
// Interface: a, b are N-bit unsigned operands, p the full 2N-bit product.
// Timing: purely combinational; the column carries form a ripple chain of
// 2D columns. For odd N the top two bits of the 4D-bit column result
// belong to the zero padding and are always zero; they are left unused.
// The Urdhva method and its 2x2 cell come from the published design; the radix-4
// digit grouping and the column carry chain are this design's own reading
// of how the cells are combined.
module vedic_mult #(
  parameter int unsigned N = 24  // operand width: 24 = single precision significand
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned D  = (N + 1) / 2;       // radix-4 digits per operand
  localparam int unsigned CW = $clog2(9 * D + 1) + 2;  // column sum width

  logic [2*D-1:0] ap, bp;
  assign ap = (2*D)'(a);
  assign bp = (2*D)'(b);

  // Digit products from the 2x2 cells: pp[i][j] = a_i * b_j.
  logic [3:0] pp [D][D];
  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      vedic_2x2 u_cell (.a(ap[2*i +: 2]), .b(bp[2*j +: 2]), .p(pp[i][j]));
    end
  end

  // Column sums with carry hand-on.
  logic [4*D-1:0] full;
  logic [CW-1:0]  col, carry;
  always_comb begin
    carry = '0;
    full  = '0;
    for (int k = 0; k < 2 * D - 1; k++) begin
      col = carry;
      for (int i = 0; i < D; i++) begin
        if (k - i >= 0 && k - i < D) col = col + CW'(pp[i][k-i]);
      end
      full[2*k +: 2] = col[1:0];
      carry          = col >> 2;
    end
    full[4*D-2 +: 2] = carry[1:0];
  end

  assign p = full[2*N-1:0];

endmodule

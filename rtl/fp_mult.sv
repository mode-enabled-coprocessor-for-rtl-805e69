// fp_mult: IEEE-754 floating-point multiplier with a Vedic significand
// multiplier and selectable rounding mode.
//
// One parameterised unit serves both precisions: EW = 8, MW = 23 is the
// single precision multiplier, EW = 11, MW = 52 the double precision one.
// The datapath follows the classic steps:
//   1. unpack: the hidden bit is made explicit, 1 for a non-zero exponent
//      field and 0 for a zero one (a denormal then uses exponent 1);
//   2. sign = signA xor signB; exponent = eA + eB - bias; significand
//      product = sigA * sigB, formed by the Urdhva multiplier vedic_mult;
//   3./4. the 2P-bit product is normalised (fp_normalize) and rounded to P
//      bits with guard, round and sticky bits in the selected mode
//      (fp_round);
//   5. the result is packed without its hidden bit.
// Special operands are decoded alongside: NaN, or infinity times zero,
// gives the canonical quiet NaN (sign 0, exponent all ones, fraction MSB
// set); infinity times a non-zero number gives a signed infinity; zero
// times a finite number gives a signed zero.
//
// Interface: in_valid qualifies a, b and rmode; one cycle later out_valid
// is high with result. A new operation may be issued every cycle.
// Timing: one register stage at the output, so latency 1, throughput 1.
// Reset (rst_n, active low, synchronous) clears out_valid and result.
// The unpack/multiply/normalise/round/pack sequence and the four rounding
// modes follow the published design; NaN/infinity handling, the single output
// register and the valid handshake are this design's own choices.
module fp_mult
  import mecp_pkg::*;
#(
  parameter int unsigned EW = SP_EW,  // exponent field width
  parameter int unsigned MW = SP_MW,  // fraction field width
  localparam int unsigned P   = MW + 1,
  localparam int unsigned PW  = 2 * P,
  localparam int unsigned EXW = EW + 3,
  localparam int unsigned FW  = 1 + EW + MW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [FW-1:0] a,
  input  logic [FW-1:0] b,
  input  rmode_e        rmode,
  output logic          out_valid,
  output logic [FW-1:0] result
);

  localparam logic [EW-1:0]         EXP_ONES = '1;
  localparam logic signed [EXW-1:0] BIAS     = EXW'((1 << (EW - 1)) - 1);

  // Unpacked fields.
  logic          sa, sb, s;
  logic [EW-1:0] ea, eb;
  logic [MW-1:0] fa, fb;
  logic [P-1:0]  siga, sigb;
  logic          nan_a, nan_b, inf_a, inf_b, zero_a, zero_b;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    s      = sa ^ sb;
    siga   = {ea != '0, fa};
    sigb   = {eb != '0, fb};
    nan_a  = (ea == EXP_ONES) && (fa != '0);
    nan_b  = (eb == EXP_ONES) && (fb != '0);
    inf_a  = (ea == EXP_ONES) && (fa == '0);
    inf_b  = (eb == EXP_ONES) && (fb == '0);
    zero_a = (ea == '0) && (fa == '0);
    zero_b = (eb == '0) && (fb == '0);
  end

  // Biased exponent of the product if the significand product is in [1,2).
  // A denormal operand's exponent field 0 stands for exponent 1.
  logic signed [EXW-1:0] e_sum;
  always_comb begin
    e_sum = $signed(EXW'(ea == '0 ? EW'(1) : ea)) + $signed(EXW'(eb == '0 ? EW'(1) : eb)) - BIAS;
  end

  // Significand product.
  logic [PW-1:0] prod;
  vedic_mult #(.N(P)) u_sigmul (.a(siga), .b(sigb), .p(prod));

  // Normalisation.
  logic [PW-1:0]         mant;
  logic signed [EXW-1:0] e_norm;
  logic                  sticky;
  fp_normalize #(.EW(EW), .MW(MW)) u_norm (
    .prod(prod), .exp_in(e_sum), .mant(mant), .exp_out(e_norm), .sticky(sticky)
  );

  // Rounding and packing.
  logic [FW-1:0] rounded;
  fp_round #(.EW(EW), .MW(MW)) u_round (
    .sign(s), .exp_in(e_norm), .mant(mant), .sticky_in(sticky), .rmode(rmode), .res(rounded)
  );

  // Special-case selection.
  logic [FW-1:0] res_d;
  always_comb begin
    if (nan_a || nan_b || (inf_a && zero_b) || (zero_a && inf_b))
      res_d = {1'b0, EXP_ONES, 1'b1, {(MW-1){1'b0}}};
    else if (inf_a || inf_b)
      res_d = {s, EXP_ONES, {MW{1'b0}}};
    else if (zero_a || zero_b)
      res_d = {s, {(EW+MW){1'b0}}};
    else
      res_d = rounded;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) result <= res_d;
    end
  end

endmodule

// mecp_top: mode-enabled multiplier coprocessor.
//
// The coprocessor holds a single precision and a double precision IEEE-754
// multiplier (two fp_mult instances, each with its own Urdhva significand
// multiplier) behind one operand/result port. Each operation carries two
// mode fields: the precision (in_dp: 0 = single, operands and result in
// bits [31:0]; 1 = double, all 64 bits) and the rounding mode (rmode, see
// mecp_pkg). The issuing logic routes the valid strobe to the selected
// unit; the result of whichever unit completed is returned, zero-extended
// to 64 bits for single precision, with out_dp telling which it was.
//
// Interface: in_valid/in_dp/rmode/a/b are sampled on a rising clk edge;
// out_valid/out_dp/result follow one cycle later. One operation per cycle,
// of either precision, in any mix.
// Timing: latency 1 cycle, throughput 1 operation per cycle.
// Reset: rst_n, active low, synchronous.
// Both precisions and the rounding mode come from the published design; combining
// them behind one port with a precision bit is this design's own choice.
module mecp_top
  import mecp_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic            in_dp,
  input  rmode_e          rmode,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic            out_valid,
  output logic            out_dp,
  output logic [XLEN-1:0] result
);

  localparam int unsigned SP_FW = 1 + SP_EW + SP_MW;
  localparam int unsigned DP_FW = 1 + DP_EW + DP_MW;

  logic             sp_valid, dp_valid;
  logic [SP_FW-1:0] sp_result;
  logic [DP_FW-1:0] dp_result;

  fp_mult #(.EW(SP_EW), .MW(SP_MW)) u_sp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid && !in_dp),
    .a(a[SP_FW-1:0]), .b(b[SP_FW-1:0]), .rmode(rmode),
    .out_valid(sp_valid), .result(sp_result)
  );

  fp_mult #(.EW(DP_EW), .MW(DP_MW)) u_dp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid && in_dp),
    .a(a[DP_FW-1:0]), .b(b[DP_FW-1:0]), .rmode(rmode),
    .out_valid(dp_valid), .result(dp_result)
  );

  always_comb begin
    out_valid = sp_valid | dp_valid;
    out_dp    = dp_valid;
    result    = dp_valid ? XLEN'(dp_result) : XLEN'(sp_result);
  end

  // Only one operation is issued per cycle, so at most one unit completes.
  a_one_result : assert property (@(posedge clk) disable iff (!rst_n) !(sp_valid && dp_valid));

endmodule

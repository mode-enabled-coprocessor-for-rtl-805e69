// tb_mecp_top: end-to-end test of the multiplier coprocessor at its
// default configuration. One operation is issued per cycle with a random
// precision and rounding mode, so single and double precision operations
// interleave back to back. Every result is checked against the exact-value
// reference model one cycle after issue, together with out_valid and
// out_dp; the upper half of a single precision result must be zero.
// The test counts how often each mechanism of the datapath was exercised
// and fails if one never was: both precisions, a precision switch between
// consecutive operations, all four rounding modes, a product in [2,4)
// (exponent incremented), a left normalising shift (denormal operand),
// a rounding increment, a rounding carry into the exponent, a denormal
// result, overflow, underflow to zero, and NaN, infinity and zero operands.
module tb_mecp_top;
  import mecp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_dp, out_valid, out_dp;
  rmode_e      rmode;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  mecp_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_dp(in_dp), .rmode(rmode),
                .a(a), .b(b), .out_valid(out_valid), .out_dp(out_dp), .result(result));

  typedef enum int {
    M_SP, M_DP, M_SWITCH, M_RNE, M_RUP, M_RDN, M_RTZ, M_PROD_GE2, M_LSHIFT, M_ROUND_INC,
    M_ROUND_CARRY, M_DENORMAL, M_OVERFLOW, M_UNDERFLOW_ZERO, M_NAN, M_INF, M_ZERO, M_NUM
  } mech_e;
  int seen [M_NUM];
  string names [M_NUM] = '{"single", "double", "precision switch", "mode RNE", "mode round-up",
    "mode round-down", "mode round-to-zero", "product in [2,4)", "left normalising shift",
    "rounding increment", "rounding carry", "denormal result", "overflow", "underflow to zero",
    "NaN", "infinity", "zero"};

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Classify the operation on the inputs from its operands and its expected
  // result: a rounding increment shows as a result that differs from the
  // round-to-zero one, a carry as one whose exponent differs from it.
  task automatic classify(logic dp, logic [63:0] x, logic [63:0] y, logic [63:0] w, logic prev_dp);
    int ew = dp ? 11 : 8, mw = dp ? 52 : 23;
    logic [63:0] ex = (x >> mw) & ((64'd1 << ew) - 1), ey = (y >> mw) & ((64'd1 << ew) - 1);
    logic [63:0] ew_ = (w >> mw) & ((64'd1 << ew) - 1), fw = w & ((64'd1 << mw) - 1);
    logic [63:0] emax = (64'd1 << ew) - 1;
    logic finite = ex != emax && ey != emax;
    logic nonzero = (x & ((64'd1 << (ew + mw)) - 1)) != 0 && (y & ((64'd1 << (ew + mw)) - 1)) != 0;
    logic [63:0]  siga = (x & ((64'd1 << mw) - 1)) | (ex != 0 ? 64'd1 << mw : 64'd0);
    logic [63:0]  sigb = (y & ((64'd1 << mw) - 1)) | (ey != 0 ? 64'd1 << mw : 64'd0);
    logic [127:0] sprod = 128'(siga) * 128'(sigb);
    logic [63:0]  trunc = fp_mul_ref(x, y, ew, mw, 3);  // round-to-zero result
    logic prod_ge2, lshift, inc, carry;
    prod_ge2 = sprod[2 * mw + 1];
    lshift   = !sprod[2 * mw + 1] && !sprod[2 * mw];
    inc      = (w != trunc) && ew_ != emax;
    carry    = inc && (((w >> mw) & ((64'd1 << ew) - 1)) != ((trunc >> mw) & ((64'd1 << ew) - 1)));
    seen[dp ? M_DP : M_SP]++;
    if (dp != prev_dp) seen[M_SWITCH]++;
    seen[M_RNE + int'(rmode)]++;
    if (finite && nonzero) begin
      if (prod_ge2) seen[M_PROD_GE2]++;
      if (lshift) seen[M_LSHIFT]++;
      if (inc) seen[M_ROUND_INC]++;
      if (carry) seen[M_ROUND_CARRY]++;
      if (ew_ == 0 && fw != 0) seen[M_DENORMAL]++;
      if (ew_ == emax || (ew_ == emax - 1 && fw == (64'd1 << mw) - 1)) seen[M_OVERFLOW]++;
      if (ew_ == 0 && fw == 0) seen[M_UNDERFLOW_ZERO]++;
    end
    if ((ex == emax && (x & ((64'd1 << mw) - 1)) != 0) || (ey == emax && (y & ((64'd1 << mw) - 1)) != 0))
      seen[M_NAN]++;
    if ((ex == emax && (x & ((64'd1 << mw) - 1)) == 0) || (ey == emax && (y & ((64'd1 << mw) - 1)) == 0))
      seen[M_INF]++;
    if (!nonzero) seen[M_ZERO]++;
  endtask

  initial begin
    logic        dp, prev_dp;
    logic [63:0] x, y, want;
    in_valid = 1'b0; in_dp = 1'b0; rmode = RM_RNE; a = '0; b = '0;
    prev_dp = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid high after reset");
    end
    for (int t = 0; t < 40000; t++) begin
      dp = 1'($urandom);
      x = dp ? fp_rand(11, 52) : 64'(32'(fp_rand(8, 23)));
      y = dp ? fp_rand(11, 52) : 64'(32'(fp_rand(8, 23)));
      // Now and then (2 - 2 ulp) * (1 + ulp) = 2 - 2 ulp^2, whose
      // significand is all ones before rounding: rounding up carries into
      // the exponent.
      if (t % 50 == 7) begin
        x = dp ? 64'h3ffffffffffffffe : 64'h3ffffffe;
        y = dp ? 64'h3ff0000000000001 : 64'h3f800001;
        x[dp ? 63 : 31] = 1'($urandom);
      end
      in_valid = 1'b1;
      in_dp = dp;
      rmode = rmode_e'($urandom_range(0, 3));
      a = x;
      b = y;
      want = dp ? fp_mul_ref(x, y, 11, 52, int'(rmode)) : 64'(32'(fp_mul_ref(x, y, 8, 23, int'(rmode))));
      #1;
      classify(dp, x, y, want, prev_dp);
      prev_dp = dp;
      @(negedge clk);
      checks++;
      if (!out_valid || out_dp != dp || result !== want) begin
        failures++;
        $display("FAIL op %0d dp=%b %h * %h rm=%0d: valid=%b dp=%b got %h want %h",
                 t, dp, x, y, rmode, out_valid, out_dp, result, want);
      end
      // An idle cycle now and then.
      if ($urandom_range(0, 15) == 0) begin
        in_valid = 1'b0;
        a = {$urandom, $urandom};
        @(negedge clk);
        checks++;
        if (out_valid) begin
          failures++;
          $display("FAIL out_valid high after an idle cycle");
        end
      end
    end
    in_valid = 1'b0;
    for (int m = 0; m < M_NUM; m++) begin
      $display("%-22s %0d", names[m], seen[m]);
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", names[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

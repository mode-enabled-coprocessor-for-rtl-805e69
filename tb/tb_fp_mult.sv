// tb_fp_mult: the floating-point multiplier in its single precision
// default configuration and in the double precision configuration, both
// fed every cycle with random operands biased toward denormals, overflow,
// underflow, infinities, NaNs and all-ones fractions, in all four rounding
// modes. Results are compared with the exact-value reference model; the
// double precision round-to-nearest results are also compared with the
// simulator's own IEEE double multiplication. The one-cycle latency is
// checked on every operation.
module tb_fp_mult;
  import mecp_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          sv, so;
  logic [31:0]   sa, sb, sr;
  logic          dv, dov;
  logic [63:0]   da, db, dr;
  rmode_e        rm;
  int checks = 0, failures = 0, cycle = 0;
  int n_mode[4], n_real = 0, n_special = 0, n_den = 0, n_ovf = 0;

  fp_mult dut_sp (.clk(clk), .rst_n(rst_n), .in_valid(sv), .a(sa), .b(sb), .rmode(rm),
                  .out_valid(so), .result(sr));
  fp_mult #(.EW(11), .MW(52)) dut_dp (.clk(clk), .rst_n(rst_n), .in_valid(dv), .a(da), .b(db),
                  .rmode(rm), .out_valid(dov), .result(dr));

  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] want, logic [63:0] x, logic [63:0] y);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s %h * %h rm=%0d: got %h want %h", what, x, y, rm, got, want);
    end
  endtask

  initial begin
    logic [31:0] xs, ys, ws;
    logic [63:0] xd, yd, wd;
    logic [63:0] directed [6][3];
    sv = 0; dv = 0; sa = 0; sb = 0; da = 0; db = 0; rm = RM_RNE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Directed single precision cases, round to nearest even.
    directed[0] = '{64'h3fc00000, 64'h40000000, 64'h40400000};  // 1.5 * 2 = 3
    directed[1] = '{64'h40490fdb, 64'h3f800000, 64'h40490fdb};  // pi * 1 = pi
    directed[2] = '{64'h7f7fffff, 64'h40000000, 64'h7f800000};  // max * 2 = inf
    directed[3] = '{64'h00800000, 64'h3f000000, 64'h00400000};  // min normal / 2 = denormal
    directed[4] = '{64'h7f800000, 64'h00000000, 64'h7fc00000};  // inf * 0 = NaN
    directed[5] = '{64'hc0000000, 64'h40400000, 64'hc0c00000};  // -2 * 3 = -6
    for (int i = 0; i < 6; i++) begin
      sa = directed[i][0][31:0];
      sb = directed[i][1][31:0];
      sv = 1'b1;
      @(negedge clk);
      sv = 1'b0;
      checks++;
      if (!so) begin
        failures++;
        $display("FAIL latency: no result one cycle after issue");
      end
      check("sp-directed", 64'(sr), directed[i][2], directed[i][0], directed[i][1]);
    end
    // Random stream, one operation per cycle in both units.
    sv = 1'b1;
    dv = 1'b1;
    for (int t = 0; t < 30000; t++) begin
      xs = 32'(fp_rand(8, 23));
      ys = 32'(fp_rand(8, 23));
      xd = fp_rand(11, 52);
      yd = fp_rand(11, 52);
      sa = xs; sb = ys; da = xd; db = yd;
      rm = rmode_e'($urandom_range(0, 3));
      @(negedge clk);
      // Results of the operation issued in this cycle.
      begin
        ws = 32'(fp_mul_ref(64'(xs), 64'(ys), 8, 23, int'(rm)));
        wd = fp_mul_ref(xd, yd, 11, 52, int'(rm));
        checks += 2;
        if (!so || !dov) begin
          failures++;
          $display("FAIL out_valid missing one cycle after issue");
        end
        check("sp", 64'(sr), 64'(ws), 64'(xs), 64'(ys));
        check("dp", dr, wd, xd, yd);
        if (rm == RM_RNE && !(wd[62:52] == '1 && wd[51:0] != 0)) begin
          real prod;
          prod = $bitstoreal(xd) * $bitstoreal(yd);
          check("dp-real", dr, $realtobits(prod), xd, yd);
          n_real++;
        end
        n_mode[int'(rm)]++;
        if (ws[30:23] == '0 && ws[22:0] != 0) n_den++;
        if (wd[62:52] == '0 && wd[51:0] != 0) n_den++;
        if (ws[30:23] == '1 || wd[62:52] == '1) n_special++;
        if ((ws[30:23] == '1 && xs[30:23] != '1 && ys[30:23] != '1) || ws[30:0] == 31'h7f7fffff) n_ovf++;
      end
    end
    sv = 1'b0;
    dv = 1'b0;
    @(negedge clk);
    checks++;
    if (so || dov) begin
      failures++;
      $display("FAIL out_valid stays high with no operation issued");
    end
    $display("double results also checked against real multiplication: %0d", n_real);
    $display("modes %0d %0d %0d %0d, denormal results %0d, inf/NaN results %0d, overflows %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_den, n_special, n_ovf);
    checks++;
    if (n_den == 0 || n_special == 0 || n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

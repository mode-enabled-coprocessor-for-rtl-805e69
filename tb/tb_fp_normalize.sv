// tb_fp_normalize: normalisation of single precision products. The
// reference walks the product one position at a time, as done by hand:
// shift left and lower the exponent until the MSB is one, then, while the
// exponent is below 1, shift right, raise it and collect the lost bits.
module tb_fp_normalize;
  localparam int EW = 8, MW = 23, P = MW + 1, PW = 2 * P, EXW = EW + 3;
  logic [PW-1:0]         prod, mant;
  logic signed [EXW-1:0] exp_in, exp_out;
  logic                  sticky;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_denorm = 0;

  fp_normalize dut (.prod(prod), .exp_in(exp_in), .mant(mant), .exp_out(exp_out), .sticky(sticky));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [PW-1:0] m;
      int e;
      logic st, den;
      int sh;
      sh = $urandom_range(0, PW - 1);
      prod = PW'(({$urandom, $urandom} | 64'd1) >> (64 - PW));
      prod = prod >> ($urandom_range(0, 3) == 0 ? sh : $urandom_range(0, 1));
      if (prod == 0) prod = 1;
      exp_in = EXW'($urandom_range(0, 300)) - EXW'(120);
      // reference
      m = prod;
      e = int'(exp_in) + 1;
      st = 1'b0;
      while (!m[PW-1]) begin
        m = m << 1;
        e--;
      end
      if (e != int'(exp_in) + 1) n_left++;
      else n_right++;
      den = (e < 1);
      if (den) n_denorm++;
      while (e < 1) begin
        st = st | m[0];
        m = m >> 1;
        e++;
      end
      if (den) e = 0;
      #1;
      checks++;
      if (mant != m || int'(exp_out) != e || sticky != st) begin
        failures++;
        $display("FAIL prod=%h exp_in=%0d: mant=%h exp=%0d st=%b, want %h %0d %b",
                 prod, exp_in, mant, exp_out, sticky, m, e, st);
      end
    end
    $display("left shifts %0d, product in [2,4) %0d, denormal %0d", n_left, n_right, n_denorm);
    checks++;
    if (n_left == 0 || n_right == 0 || n_denorm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

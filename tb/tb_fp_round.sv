// tb_fp_round: rounding and packing in all four modes, single precision.
// The reference treats everything below the kept significand (including
// the incoming sticky bit) as one remainder and compares it with half an
// ulp, then adds the increment to the significand and renormalises a
// carry-out by hand.
module tb_fp_round;
  import mecp_pkg::*;
  localparam int EW = 8, MW = 23, P = MW + 1, PW = 2 * P, EXW = EW + 3, FW = 1 + EW + MW;
  logic                  sign, sticky_in;
  logic signed [EXW-1:0] exp_in;
  logic [PW-1:0]         mant;
  rmode_e                rmode;
  logic [FW-1:0]         res;
  int checks = 0, failures = 0;
  int n_mode[4], n_inc = 0, n_carry = 0, n_ovf = 0, n_den = 0;

  fp_round dut (.sign(sign), .exp_in(exp_in), .mant(mant), .sticky_in(sticky_in), .rmode(rmode), .res(res));

  function automatic logic [FW-1:0] ref_round(logic s, int e, logic [PW-1:0] m, logic st, int rm);
    logic [P:0] sig, rem, half;
    logic up, inexact;
    sig = (P+1)'(m[PW-1:P]);
    rem = {m[P-1:0], st};
    half = (P+1)'(1) << P;
    inexact = rem != 0;
    case (rm)
      0: up = (rem > half) || (rem == half && sig[0]);
      1: up = inexact && !s;
      2: up = inexact && s;
      default: up = 1'b0;
    endcase
    if (e >= 255) begin
      if (rm == 0 || (rm == 1 && !s) || (rm == 2 && s)) return {s, 8'hff, 23'd0};
      return {s, 8'hfe, {23{1'b1}}};
    end
    sig = sig + (P+1)'(up);
    if (sig[P]) begin
      sig = sig >> 1;
      e = e + 1;
    end
    if (e == 0 && sig[MW]) e = 1;
    if (e >= 255) return {s, 8'hff, 23'd0};
    return {s, 8'(e), sig[MW-1:0]};
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [FW-1:0] want;
      int e;
      sign = 1'($urandom);
      rmode = rmode_e'($urandom_range(0, 3));
      sticky_in = ($urandom_range(0, 3) == 0);
      e = $urandom_range(0, 3) == 0 ? $urandom_range(250, 256) : $urandom_range(1, 254);
      mant = {1'b1, 47'({$urandom, $urandom})};
      if ($urandom_range(0, 3) == 0) mant[PW-1 -: P] = '1;             // carry-out case
      if ($urandom_range(0, 3) == 0) mant[P-3:0] = '0;                 // ties
      if ($urandom_range(0, 4) == 0) begin                              // denormal
        e = 0;
        mant = mant >> $urandom_range(1, 30);
      end
      exp_in = EXW'(e);
      #1;
      want = ref_round(sign, e, mant, sticky_in, int'(rmode));
      checks++;
      n_mode[int'(rmode)]++;
      if (e < 255 && want != ref_round(sign, e, mant, sticky_in, 3)) begin
        n_inc++;                                   // differs from truncation
        if (mant[PW-1 -: P] == '1) n_carry++;
      end
      if (e >= 255) n_ovf++;
      if (e == 0) n_den++;
      if (res !== want) begin
        failures++;
        $display("FAIL s=%b e=%0d m=%h st=%b rm=%0d: got %h want %h", sign, e, mant, sticky_in, rmode, res, want);
      end
    end
    $display("modes %0d %0d %0d %0d, increments %0d, carries %0d, overflows %0d, denormals %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_inc, n_carry, n_ovf, n_den);
    checks++;
    if (n_inc == 0 || n_carry == 0 || n_ovf == 0 || n_den == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fp_ref_pkg: reference model for the testbenches of the floating-point
// multiplier.
//
// fp_mul_ref multiplies two IEEE-754 numbers of any format up to double
// precision (ew exponent bits, mw fraction bits, held in the low bits of a
// 64-bit word) and rounds in one of the four modes. It works on exact
// values rather than bit fields: the exact product is an integer N times
// 2^q, q chosen so that N carries the target precision (or the denormal
// range's fixed ulp), and the discarded remainder is compared with half an
// ulp to decide the rounding. It shares no structure with the RTL
// (no guard/round/sticky bits, no normalising shifter), so the two can
// check each other.
package fp_ref_pkg;

  function automatic logic [63:0] fp_pack(int ew, int mw, logic s, longint unsigned e, longint unsigned f);
    return (64'(s) << (ew + mw)) | (64'(e) << mw) | 64'(f);
  endfunction

  function automatic logic [63:0] fp_mul_ref(logic [63:0] a, logic [63:0] b, int ew, int mw, int rm);
    longint unsigned emax_field = (64'd1 << ew) - 1;
    longint bias = (64'sd1 <<< (ew - 1)) - 1;
    longint unsigned fmask = (64'd1 << mw) - 1;
    logic sa = a[ew+mw], sb = b[ew+mw], s;
    longint unsigned ea = (a >> mw) & emax_field, eb = (b >> mw) & emax_field;
    longint unsigned fa = a & fmask, fb = b & fmask;
    logic nan_a, nan_b, inf_a, inf_b, zero_a, zero_b;
    logic [127:0] ma, mb, prod, n, rem, half;
    longint xa, xb, k, e_res, q, shift, emin, efield;
    logic up;
    s = sa ^ sb;
    nan_a = (ea == emax_field) && (fa != 0);
    nan_b = (eb == emax_field) && (fb != 0);
    inf_a = (ea == emax_field) && (fa == 0);
    inf_b = (eb == emax_field) && (fb == 0);
    zero_a = (ea == 0) && (fa == 0);
    zero_b = (eb == 0) && (fb == 0);
    if (nan_a || nan_b || (inf_a && zero_b) || (zero_a && inf_b))
      return fp_pack(ew, mw, 1'b0, emax_field, 64'd1 << (mw - 1));
    if (inf_a || inf_b) return fp_pack(ew, mw, s, emax_field, 0);
    if (zero_a || zero_b) return fp_pack(ew, mw, s, 0, 0);
    // Value of an operand = m * 2^(x), m integer.
    ma = (ea == 0) ? 128'(fa) : 128'(fa | 64'(64'd1 << mw));
    mb = (eb == 0) ? 128'(fb) : 128'(fb | 64'(64'd1 << mw));
    xa = ((ea == 0) ? 1 : longint'(ea)) - bias - longint'(mw);
    xb = ((eb == 0) ? 1 : longint'(eb)) - bias - longint'(mw);
    prod = ma * mb;  // exact value = prod * 2^(xa+xb)
    k = 0;
    for (int i = 0; i < 128; i++) if (prod[i]) k = longint'(i);
    e_res = k + xa + xb;          // unbiased exponent of the leading one
    emin = 1 - bias;
    if (e_res < emin) e_res = emin;
    q = e_res - longint'(mw);              // weight of the last kept place
    shift = q - (xa + xb);
    if (shift <= 0) begin
      n = prod << (-shift);
      rem = 0;
      half = 1;
    end else if (shift >= 120) begin
      n = 0;
      rem = prod;                 // non-zero and far below half an ulp
      half = 128'd1 << 126;
    end else begin
      n = prod >> shift;
      rem = prod & ((128'd1 << shift) - 1);
      half = 128'd1 << (shift - 1);
    end
    case (rm)
      0: up = (rem > half) || (rem == half && n[0]);
      1: up = (rem != 0) && !s;
      2: up = (rem != 0) && s;
      default: up = 1'b0;
    endcase
    if (up) n = n + 1;
    if (n >= (128'd1 << (mw + 1))) begin
      n = n >> 1;
      e_res = e_res + 1;
    end
    efield = (n >= (128'd1 << mw)) ? e_res + bias : 0;
    if (efield >= longint'(emax_field)) begin
      if (rm == 0 || (rm == 1 && !s) || (rm == 2 && s))
        return fp_pack(ew, mw, s, emax_field, 0);
      return fp_pack(ew, mw, s, emax_field - 1, fmask);
    end
    return fp_pack(ew, mw, s, 64'(efield), 64'(n) & fmask);
  endfunction

  // Random operand with a bias toward the interesting exponents: zero
  // (denormals), one, the overflow edge, all ones (inf/NaN), and the
  // neighbourhood of the bias, and toward all-ones fractions.
  function automatic logic [63:0] fp_rand(int ew, int mw);
    longint unsigned emax_field = (64'd1 << ew) - 1;
    longint unsigned bias = (64'd1 << (ew - 1)) - 1;
    longint unsigned e, f;
    int sel = $urandom_range(0, 15);
    f = {$urandom, $urandom} & ((64'd1 << mw) - 1);
    case (sel)
      0: e = 0;
      1: e = 1;
      2: e = emax_field;
      3: e = emax_field - 1;
      4, 5: e = bias + 64'($urandom_range(0, 8)) - 4;
      6: e = bias / 2 + 64'($urandom_range(0, 60));   // products near underflow
      7: e = bias + bias / 2 + 64'($urandom_range(0, 60));  // products near overflow
      default: e = 64'($urandom) % emax_field;
    endcase
    case ($urandom_range(0, 7))
      0: f = (64'd1 << mw) - 1;
      1: f = 0;
      2: f = f | ((64'd1 << mw) - (64'd1 << (mw / 2)));
      default: ;
    endcase
    if (sel == 2 && $urandom_range(0, 1) == 0) f = 0;  // infinity
    return fp_pack(ew, mw, 1'($urandom), e, f);
  endfunction

endpackage

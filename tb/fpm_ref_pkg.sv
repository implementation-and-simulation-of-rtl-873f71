// fpm_ref_pkg: bit-exact reference model of the floating-point multiplier,
// written with plain integer arithmetic for the testbenches.
//
// ref_mul() multiplies two operands of a format with an 8-bit exponent
// (bias 127) and an f-bit fraction (f <= 30) and returns the truncated
// result, the three flags, the significand product and a few
// facts about the case, which the testbenches use to count how often each
// mechanism of the multiplier was exercised.
package fpm_ref_pkg;

  typedef struct {
    longint unsigned result;
    bit              overflow;
    bit              underflow;
    bit              invalid;
    longint unsigned product;      // significand product before normalisation
    bit              shifted;      // product needed a right shift
    int              exp_int;      // e_a + e_b - 127 before normalisation
    bit              normal_ops;   // both operands normal
    bit              special;      // zero/inf/nan/denormal operand
  } ref_t;

  function automatic ref_t ref_mul(int f, longint unsigned a, longint unsigned b);
    ref_t r;
    longint unsigned fmask = (64'd1 << f) - 1;
    bit sa = a[f+8], sb = b[f+8];
    int ea = int'((a >> f) & 255);
    int eb = int'((b >> f) & 255);
    longint unsigned fa = a & fmask, fb = b & fmask;
    bit s = sa ^ sb;
    bit az = (ea == 0) && (fa == 0), ad = (ea == 0) && (fa != 0);
    bit ai = (ea == 255) && (fa == 0), an = (ea == 255) && (fa != 0);
    bit bz = (eb == 0) && (fb == 0), bd = (eb == 0) && (fb != 0);
    bit bi = (eb == 255) && (fb == 0), bn = (eb == 255) && (fb != 0);
    longint unsigned ma = fa | (64'd1 << f), mb = fb | (64'd1 << f);
    longint unsigned p = ma * mb;
    longint unsigned inf_w  = (longint'(s) << (f + 8)) | (64'd255 << f);
    longint unsigned zero_w = longint'(s) << (f + 8);
    int e;

    r = '{default: 0};
    r.shifted    = (p >> (2 * f + 1)) & 1;
    r.product    = p;
    r.exp_int    = ea + eb - 127;
    r.normal_ops = !(az || ad || ai || an || bz || bd || bi || bn);
    r.special    = !r.normal_ops;
    e = r.exp_int + int'(r.shifted);

    if (an || bn || (ai && (bz || bd)) || (bi && (az || ad))) begin
      r.invalid = 1;
      r.result  = (64'd255 << f) | (64'd1 << (f - 1));
    end else if (ai || bi) begin
      r.result = inf_w;
    end else if (az || bz) begin
      r.result = zero_w;
    end else if (ad || bd) begin
      r.underflow = 1;
      r.result    = zero_w;
    end else if (e >= 255) begin
      r.overflow = 1;
      r.result   = inf_w;
    end else if (e <= 0) begin
      r.underflow = 1;
      r.result    = zero_w;
    end else begin
      r.result = zero_w | (longint'(e) << f) | (((r.shifted ? p >> 1 : p) >> f) & fmask);
    end
    return r;
  endfunction

endpackage

// jste_pkg: sizes, number formats and arithmetic shared by the JSTE receiver.
//
// Sizes: M antenna branches, L channel taps (16-state trellis => L = 5), N = M + L is the
// order of the joint covariance matrix R(n) whose Cholesky factor is tracked.
//
// Fixed point (Cholesky processor): 16-bit precision extended to a 20-bit word so that the
// growth of the factor does not overflow. Values are two's complement with CFRAC = 15
// fractional bits, so a 16-bit Q1.15 input sample maps onto the low bits of the word and
// the four extra bits are integer headroom (range +-16).
//
// Floating point (FBS processor): 16-bit two's complement mantissa and 5-bit exponent.
// value = m / 2^15 * 2^(e - 16). Numbers are kept normalised (m[15] != m[14]); zero is
// m = 0. Results are truncated, an exponent above 31 saturates, one below 0 flushes to zero.
// The float helpers are written as functions so that the BS, MAC and ISQRT units and the
// testbenches use one definition of the format.
package jste_pkg;

  localparam int unsigned M_ANT  = 4;   // antenna branches (own choice)
  localparam int unsigned L_TAP  = 5;   // channel memory length (16-state trellis)
  localparam int unsigned CW     = 20;  // Cholesky word width
  localparam int unsigned CFRAC  = 15;  // fractional bits of the Cholesky word
  localparam int unsigned YW     = 16;  // antenna sample width (Q1.15)
  localparam int unsigned VW     = 16;  // Viterbi word width
  localparam int unsigned VFRAC  = 10;  // fractional bits of Viterbi words

  typedef struct packed {
    logic signed [15:0] m;
    logic        [4:0]  e;
  } fp_t;

  typedef struct packed {
    fp_t re;
    fp_t im;
  } cfp_t;

  localparam fp_t FP_ZERO = '{m: 16'sd0, e: 5'd0};
  localparam fp_t FP_ONE  = '{m: 16'sd16384, e: 5'd17};
  localparam fp_t FP_HALF = '{m: 16'sd16384, e: 5'd16};

  // Normalise a wide mantissa: value = v / 2^38 * 2^(e - 16).
  function automatic fp_t fp_norm(input logic signed [39:0] v, input int e);
    fp_t r;
    logic signed [39:0] t;
    int s;
    int en;
    t = v;
    s = 0;
    if (v == '0) return FP_ZERO;
    for (int i = 0; i < 39; i++) begin
      if (t[39] == t[38]) begin
        t = t <<< 1;
        s = s + 1;
      end
    end
    en = e + 1 - s;
    if (en < 0) begin
      r = FP_ZERO;
    end else if (en > 31) begin
      r.m = v[39] ? -16'sd32768 : 16'sd32767;
      r.e = 5'd31;
    end else begin
      r.m = t[39:24];
      r.e = en[4:0];
    end
    return r;
  endfunction

  function automatic fp_t fp_mul(input fp_t a, input fp_t b);
    logic signed [31:0] p;
    p = a.m * b.m;
    return fp_norm({p, 8'd0}, int'(a.e) + int'(b.e) - 16);
  endfunction

  function automatic fp_t fp_neg(input fp_t a);
    logic signed [39:0] v;
    v = 40'(a.m) <<< 23;
    return fp_norm(-v, int'(a.e));
  endfunction

  function automatic fp_t fp_add(input fp_t a, input fp_t b);
    logic signed [39:0] va, vb;
    int ea, eb, em;
    if (a.m == 0) return b;
    if (b.m == 0) return a;
    ea = int'(a.e);
    eb = int'(b.e);
    em = (ea > eb) ? ea : eb;
    va = 40'(a.m) <<< 23;
    vb = 40'(b.m) <<< 23;
    va = va >>> ((em - ea > 39) ? 39 : (em - ea));
    vb = vb >>> ((em - eb > 39) ? 39 : (em - eb));
    return fp_norm(va + vb, em);
  endfunction

  function automatic fp_t fp_sub(input fp_t a, input fp_t b);
    return fp_add(a, fp_neg(b));
  endfunction

  // a / b; a zero divisor saturates with the sign of the dividend.
  function automatic fp_t fp_div(input fp_t a, input fp_t b);
    logic signed [39:0] na, q;
    fp_t r;
    if (a.m == 0) return FP_ZERO;
    if (b.m == 0) begin
      r.m = a.m[15] ? -16'sd32768 : 16'sd32767;
      r.e = 5'd31;
      return r;
    end
    na = 40'(a.m) <<< 22;
    q  = na / 40'(b.m);
    return fp_norm(q <<< 16, int'(a.e) - int'(b.e) + 16);
  endfunction

  // Integer square root of a 30-bit number (bit-by-bit, 15 result bits).
  function automatic logic [14:0] isqrt30(input logic [29:0] x);
    logic [31:0] rem, root, trial;
    rem  = 32'(x);
    root = '0;
    for (int i = 14; i >= 0; i--) begin
      trial = (root << (i + 1)) + (32'd1 << (2 * i));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | (32'd1 << i);
      end
    end
    return root[14:0];
  endfunction

  // 1 / sqrt(a) for a > 0; a <= 0 returns the largest positive number.
  function automatic fp_t fp_isqrt(input fp_t a);
    logic [15:0] mm2;
    logic [14:0] s;
    int t, t2;
    fp_t sq, r;
    if (a.m <= 0) begin
      r.m = 16'sd32767;
      r.e = 5'd31;
      return r;
    end
    // a = m * 2^t with t = e - 31
    t = int'(a.e) - 31;
    if ((t & 1) != 0) begin
      mm2 = 16'(a.m) << 1;
      t2  = t - 1;
    end else begin
      mm2 = 16'(a.m);
      t2  = t;
    end
    // sqrt(mm2 * 2^14) = sqrt(mm2) * 2^7
    s  = isqrt30({mm2, 14'd0});
    // sqrt(a) = s * 2^(t2/2 - 7) = (s / 2^15) * 2^(e' - 16) with e' = t2/2 + 24
    sq = fp_norm(40'(s) <<< 23, (t2 >>> 1) + 24);
    return fp_div(FP_ONE, sq);
  endfunction

  // Fixed point word with `frac` fractional bits to float.
  function automatic fp_t fp_from_fix(input logic signed [23:0] q, input int frac);
    return fp_norm(40'(q) <<< 14, 40 - frac);
  endfunction

  // Float to a saturated 16-bit fixed point word with `frac` fractional bits.
  function automatic logic signed [15:0] fp_to_fix(input fp_t a, input int frac);
    logic signed [47:0] v;
    int sh;
    sh = int'(a.e) - 31 + frac;
    v  = 48'(a.m);
    if (sh >= 0) begin
      if (sh > 20) sh = 20;
      v = v <<< sh;
    end else begin
      if (sh < -40) sh = -40;
      v = v >>> (-sh);
    end
    if (v > 48'sd32767) return 16'sd32767;
    if (v < -48'sd32768) return -16'sd32768;
    return v[15:0];
  endfunction

  // Multiply by 2^-k (k >= 0) by lowering the exponent; underflow flushes to zero.
  function automatic fp_t fp_shr(input fp_t a, input int k);
    fp_t r;
    r = a;
    if (int'(a.e) - k < 0) return FP_ZERO;
    r.e = 5'(int'(a.e) - k);
    return r;
  endfunction

  // Complex helpers.
  function automatic cfp_t cfp_shr(input cfp_t a, input int k);
    cfp_t r;
    r.re = fp_shr(a.re, k);
    r.im = fp_shr(a.im, k);
    return r;
  endfunction

  function automatic cfp_t cfp_conj(input cfp_t a);
    cfp_t r;
    r.re = a.re;
    r.im = fp_neg(a.im);
    return r;
  endfunction

  function automatic cfp_t cfp_mul(input cfp_t a, input cfp_t b);
    cfp_t r;
    r.re = fp_sub(fp_mul(a.re, b.re), fp_mul(a.im, b.im));
    r.im = fp_add(fp_mul(a.re, b.im), fp_mul(a.im, b.re));
    return r;
  endfunction

  function automatic cfp_t cfp_add(input cfp_t a, input cfp_t b);
    cfp_t r;
    r.re = fp_add(a.re, b.re);
    r.im = fp_add(a.im, b.im);
    return r;
  endfunction

  function automatic cfp_t cfp_sub(input cfp_t a, input cfp_t b);
    cfp_t r;
    r.re = fp_sub(a.re, b.re);
    r.im = fp_sub(a.im, b.im);
    return r;
  endfunction

  // Value of a float in simulation (testbench use).
  function automatic real fp_real(input fp_t a);
    real r;
    r = real'(a.m) / 32768.0;
    for (int k = 16; k < int'(a.e); k++) r = r * 2.0;
    for (int k = int'(a.e); k < 16; k++) r = r / 2.0;
    return r;
  endfunction

endpackage

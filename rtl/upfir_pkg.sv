// upfir_pkg: constants shared by the upsampling distributed-arithmetic FIR
// filter. It holds the default filter size (N = 5 taps of the input stream,
// upsampling K = 5), the coefficient word format, and the elaboration-time
// functions that compute raised-cosine coefficient sets: rc_coef (one
// coefficient), rc_flat (the default COEFS parameter of the modules, for up
// to MAX_COEFS coefficients in all) and the fixed 5x5 sets RC_BETA03 and
// RC_BETA05.
//
// The coefficient set of an N-tap filter upsampled K times has N*K entries
// c[j], j = 0..N*K-1. Output sample k (0..K-1) of input period n is
//   y[nK+k] = sum_{i=0}^{N-1} c[iK+k] * x[n-i]
// The sets below are the raised-cosine pulse
//   h(t) = sinc(t/K) * cos(pi*beta*t/K) / (1 - (2*beta*t/K)^2)
// sampled at c[j] = round(1024 * h(j - floor(N/2)*K)), so that the middle
// input sample, x[n-floor(N/2)], has its pulse peak at k = 0. At k = 0 every
// other tap falls on a zero of the pulse, so the output there equals
// 1024 * x[n-floor(N/2)] exactly. The sets are computed at elaboration from
// this formula, for any N and K.
// The roll-off 0.3 set is the example filter of the design; the roll-off 0.5
// set is used for the binary-stream demonstration and for the second filter
// of a two-filter build. The word format (12-bit signed, 1.0 = 1024) is this
// design's choice.
package upfir_pkg;

  localparam int unsigned TAPS_DEF     = 5;   // N
  localparam int unsigned UPSAMPLE_DEF = 5;   // K
  localparam int unsigned COEF_W_DEF   = 12;  // signed coefficient width
  localparam int unsigned COEF_ONE     = 1024; // value of 1.0
  localparam int unsigned NCOEF_DEF    = TAPS_DEF * UPSAMPLE_DEF;

  localparam real PI = 3.14159265358979;

  // One coefficient set of the default size, c[0] first. Sets of several
  // filters are concatenations of these, filter 0 first.
  typedef logic signed [0:NCOEF_DEF-1][31:0] coef_set_t;

  // Coefficient j of a raised-cosine filter with `taps` input samples,
  // upsampling `upsample` and roll-off `beta`, scaled so that 1.0 = COEF_ONE
  // and rounded half away from zero. Evaluated at elaboration only.
  function automatic int rc_coef(int j, int taps, int upsample, real beta);
    real t, x, d, h;
    t = real'(j - (taps / 2) * upsample);
    x = t / real'(upsample);
    if (j == (taps / 2) * upsample) begin
      h = 1.0;
    end else begin
      d = 1.0 - (2.0 * beta * x) ** 2;
      if (d < 1.0e-9 && d > -1.0e-9)   // limit at t = +-K/(2 beta)
        h = PI / 4.0 * $sin(PI * x) / (PI * x);
      else
        h = $sin(PI * x) / (PI * x) * $cos(PI * beta * x) / d;
    end
    h = h * real'(COEF_ONE);
    return $rtoi(h >= 0.0 ? h + 0.5 : h - 0.5);
  endfunction

  function automatic coef_set_t rc_set(real beta);
    coef_set_t r;
    for (int j = 0; j < int'(NCOEF_DEF); j++)
      r[j] = 32'(rc_coef(j, TAPS_DEF, UPSAMPLE_DEF, beta));
    return r;
  endfunction

  // Default coefficients for a module parameter of type
  // logic signed [0:nf-1][0:taps*upsample-1][31:0]: nf copies of the raised
  // cosine of `beta`. The result is a wide vector with the last coefficient
  // in the lowest 32 bits, so that a size cast to the parameter's width
  // (keeping the low bits) yields exactly that array, c[0] of filter 0 first.
  localparam int unsigned MAX_COEFS = 256;  // limit on nf * taps * upsample
  typedef logic [32*MAX_COEFS-1:0] coef_flat_t;

  function automatic coef_flat_t rc_flat(int nf, int taps, int upsample, real beta);
    coef_flat_t r = '0;
    int total = nf * taps * upsample;
    for (int f = 0; f < nf; f++)
      for (int j = 0; j < taps * upsample; j++)
        r[32 * (total - 1 - (f * taps * upsample + j)) +: 32] =
            32'(rc_coef(j, taps, upsample, beta));
    return r;
  endfunction

  // The two default-size sets used by the tests and the two-filter build.
  localparam coef_set_t RC_BETA03 = rc_set(0.3);
  localparam coef_set_t RC_BETA05 = rc_set(0.5);

endpackage

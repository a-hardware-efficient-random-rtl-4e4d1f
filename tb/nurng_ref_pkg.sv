// nurng_ref_pkg: reference models shared by the testbenches.
//
// norm_icdf() is an independent rational approximation of the standard normal
// inverse CDF (absolute error below 1e-8 over (0, 0.5]); it does not use the
// coefficient table. x_of() gives the uniform value that a floating point
// number (part, octave, mantissa fraction) stands for in the lower half of
// (0, 1): part 0 covers (0, 0.25) with octave e at [2^-(e+3), 2^-(e+2)),
// part 1 covers [0.25, 0.5) with octave e at [0.5-2^-(e+2), 0.5-2^-(e+3))
// and its last octave as wide as the one before it. fp_ref() is a behavioural
// model of the floating point generation loop.
package nurng_ref_pkg;

  function automatic real norm_icdf(real p);
    real q, r, num, den;
    if (p < 0.02425) begin
      q   = $sqrt(-2.0 * $ln(p));
      num = (((((-7.784894002430293e-03 * q - 3.223964580411365e-01) * q
              - 2.400758277161838e+00) * q - 2.549732539343734e+00) * q
              + 4.374664141464968e+00) * q + 2.938163982698783e+00);
      den = ((((7.784695709041462e-03 * q + 3.224671290700398e-01) * q
              + 2.445134137142996e+00) * q + 3.754408661907416e+00) * q + 1.0);
      return num / den;
    end else if (p > 1.0 - 0.02425) begin
      return -norm_icdf(1.0 - p);
    end else begin
      q   = p - 0.5;
      r   = q * q;
      num = (((((-3.969683028665376e+01 * r + 2.209460984245205e+02) * r
              - 2.759285104469687e+02) * r + 1.383577518672690e+02) * r
              - 3.066479806614716e+01) * r + 2.506628277459239e+00) * q;
      den = (((((-5.447609879822406e+01 * r + 1.615858368580409e+02) * r
              - 1.556989798598866e+02) * r + 6.680131188771972e+01) * r
              - 1.328068155288572e+01) * r + 1.0);
      return num / den;
    end
  endfunction

  function automatic real pow2(int e);
    real v = 1.0;
    if (e >= 0) repeat (e) v = v * 2.0;
    else        repeat (-e) v = v / 2.0;
    return v;
  endfunction

  function automatic real x_of(bit part, int e, real f, int n_oct1);
    if (!part)           return pow2(-(e + 3)) * (1.0 + f);
    if (e < n_oct1 - 1)  return 0.5 - pow2(-(e + 2)) + pow2(-(e + 3)) * f;
    return 0.5 - pow2(-(n_oct1 + 1)) + pow2(-(n_oct1 + 1)) * f;
  endfunction

  // Number of leading zeros of the w least significant bits of v.
  function automatic int lz_ref(longint unsigned v, int w);
    int n = 0;
    for (int i = w - 1; i >= 0; i--) begin
      if (v[i]) break;
      n++;
    end
    return n;
  endfunction

endpackage

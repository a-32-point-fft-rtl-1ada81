// fft_ref_pkg: reference models used by the testbenches of the Vedic FFT.
//
// Two independent references are provided:
//   * a bit-exact integer model of the fixed-point arithmetic (twiddles as
//     signed integers scaled by 2**7, ordinary '*' products, halving by an
//     arithmetic shift, round-half-up and saturation of twiddle products);
//   * a floating-point DFT, X(k) = sum_n x(n) exp(-j 2 pi n k / N), used to
//     check that the fixed-point result stays close to the true transform.
// Neither uses the design's modules or its package.
package fft_ref_pkg;

  localparam int W       = 8;          // bits per real/imaginary part
  localparam int FRAC    = W - 1;      // twiddle fraction bits
  localparam int MAXV    = (1 << (W - 1)) - 1;
  localparam int MINV    = -(1 << (W - 1));
  localparam real PI_R   = 3.14159265358979323846;

  typedef struct {
    int re;
    int im;
  } ci_t;

  function automatic int round_near(real v);
    real a;
    a = (v < 0.0) ? -v : v;
    return (v < 0.0) ? -$rtoi(a + 0.5) : $rtoi(a + 0.5);
  endfunction

  // Twiddle exp(-j 2 pi k / m) as signed integers, 1.0 == 2**FRAC.
  function automatic ci_t tw(int k, int m);
    ci_t t;
    t.re = round_near($cos(2.0 * PI_R * k / m) * (1 << FRAC));
    t.im = round_near(-$sin(2.0 * PI_R * k / m) * (1 << FRAC));
    return t;
  endfunction

  function automatic int sat(int v, ref int nsat);
    if (v > MAXV) begin nsat++; return MAXV; end
    if (v < MINV) begin nsat++; return MINV; end
    return v;
  endfunction

  // Twiddle product with rounding (half up) and saturation.
  function automatic ci_t cmul(ci_t x, ci_t t, ref int nsat);
    ci_t y;
    int  ar, ai;
    ar   = x.re * t.re - x.im * t.im;
    ai   = x.re * t.im + x.im * t.re;
    y.re = sat((ar + (1 << (FRAC - 1))) >>> FRAC, nsat);
    y.im = sat((ai + (1 << (FRAC - 1))) >>> FRAC, nsat);
    return y;
  endfunction

  // Radix-2 DIF butterfly with halving: f = (a+b)>>1, g = ((a-b)>>1) * W_m^k.
  function automatic void bfly(ci_t a, ci_t b, int k, int m, output ci_t f, output ci_t g,
                               ref int nsat);
    ci_t d;
    f.re = (a.re + b.re) >>> 1;
    f.im = (a.im + b.im) >>> 1;
    d.re = (a.re - b.re) >>> 1;
    d.im = (a.im - b.im) >>> 1;
    g    = cmul(d, tw(k, m), nsat);
  endfunction

  // Whole fixed-point FFT of n points; result in bit-reversed position order.
  function automatic void fft_fixed(int n, ref ci_t x[], output ci_t y[], ref int nsat);
    ci_t cur[];
    ci_t f, g;
    cur = new[n];
    foreach (x[i]) cur[i] = x[i];
    for (int m = n; m >= 2; m /= 2) begin
      for (int base = 0; base < n; base += m) begin
        for (int k = 0; k < m / 2; k++) begin
          bfly(cur[base+k], cur[base+k+m/2], k, m, f, g, nsat);
          cur[base+k]       = f;
          cur[base+k+m/2]   = g;
        end
      end
    end
    y = cur;
  endfunction

  function automatic int bit_reverse(int v, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) if ((v & (1 << i)) != 0) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  // Floating-point DFT bin k of x, divided by n.
  function automatic void dft_bin(int n, ref ci_t x[], input int k, output real re, output real im);
    re = 0.0;
    im = 0.0;
    for (int i = 0; i < n; i++) begin
      real a;
      a  = -2.0 * PI_R * i * k / n;
      re += x[i].re * $cos(a) - x[i].im * $sin(a);
      im += x[i].re * $sin(a) + x[i].im * $cos(a);
    end
    re /= n;
    im /= n;
  endfunction

endpackage

// fft_pkg: shared types, constants and twiddle-factor arithmetic for the
// 32-point radix-2 decimation-in-frequency FFT built on Urdhva Tiryakbhyam
// (Vedic) multipliers.
//
// Number formats (this design's own choice; the 8-bit width follows the
// 8x8 Vedic multiplier the FFT is built around):
//   * A sample is a complex number whose real and imaginary parts are
//     DATA_W-bit two's-complement integers (cplx_t).
//   * A twiddle factor W = cos(a) - j sin(a) is held in sign-magnitude form
//     (twiddle_t): each part has a sign bit and a DATA_W-bit unsigned
//     magnitude with DATA_W-1 fraction bits, so 1.0 is 2**(DATA_W-1) and is
//     exact. Sign-magnitude lets the unsigned Vedic multiplier do every
//     product, including the twiddle of 1.0.
// Twiddle values are computed at elaboration time from the formula
//   mag = round(|cos(2*pi*k/M)| * 2**(DATA_W-1))   (real part)
//   mag = round(|sin(2*pi*k/M)| * 2**(DATA_W-1))   (imaginary part, sign of -sin)
// so no table is stored.
package fft_pkg;

  // Width of one real or imaginary part; equals the Vedic multiplier width.
  localparam int unsigned DATA_W = 8;
  // Fraction bits of a twiddle magnitude (1.0 == 1 << TW_FRAC).
  localparam int unsigned TW_FRAC = DATA_W - 1;
  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  typedef struct packed {
    logic              re_neg;
    logic [DATA_W-1:0] re_mag;
    logic              im_neg;
    logic [DATA_W-1:0] im_mag;
  } twiddle_t;

  localparam real PI = 3.14159265358979323846;

  // Twiddle factor W_m^k = exp(-j*2*pi*k/m) in the twiddle_t format.
  function automatic twiddle_t twiddle(int k, int m);
    twiddle_t w;
    real ang, c, s;
    ang = 2.0 * PI * real'(k) / real'(m);
    c   = $cos(ang);
    s   = -$sin(ang);
    // Values within 1e-12 of zero are treated as exactly zero (positive).
    w.re_neg = (c < -1.0e-12);
    w.im_neg = (s < -1.0e-12);
    w.re_mag = DATA_W'(int'((c < 0.0 ? -c : c) * real'(1 << TW_FRAC)));
    w.im_mag = DATA_W'(int'((s < 0.0 ? -s : s) * real'(1 << TW_FRAC)));
    return w;
  endfunction

  // Five-bit (generally log2(n)-bit) bit reversal of an index.
  function automatic int unsigned bitrev(int unsigned idx, int unsigned nbits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < nbits; i++) r |= ((idx >> i) & 1) << (nbits - 1 - i);
    return r;
  endfunction

endpackage

// dif_butterfly: one radix-2 decimation-in-frequency butterfly of an M-point
// butterfly block, with twiddle factor W_M^K = exp(-j*2*pi*K/M).
//
//   f = (a + b) / 2
//   g = ((a - b) / 2) * W_M^K
//
// Sum and difference follow the radix-2 DIF butterfly; the twiddle multiply
// goes through cplx_mult_vedic. Halving at every stage keeps the data in
// DATA_W bits through all five stages of the 32-point FFT, so the whole
// transform returns X(k)/32. The halving (an arithmetic shift right, i.e.
// rounding toward minus infinity) is this design's own choice. The twiddle
// is fixed per instance by the parameters K and M and computed at
// elaboration time.
//
// Interface: a, b (cplx_t) in; f, g (cplx_t) out; sat is high when the
// twiddle product saturated.
// Timing: purely combinational.
module dif_butterfly
  import fft_pkg::*;
#(
  parameter int unsigned M = 2,   // size of the butterfly block this butterfly belongs to
  parameter int unsigned K = 0    // twiddle exponent, 0 .. M/2-1
) (
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t f,
  output cplx_t g,
  output logic  sat
);

  localparam twiddle_t W = twiddle(int'(K), int'(M));

  logic signed [DATA_W:0] sum_re, sum_im, dif_re, dif_im;
  cplx_t                  d_half;

  always_comb begin
    sum_re    = (DATA_W+1)'(a.re) + (DATA_W+1)'(b.re);
    sum_im    = (DATA_W+1)'(a.im) + (DATA_W+1)'(b.im);
    dif_re    = (DATA_W+1)'(a.re) - (DATA_W+1)'(b.re);
    dif_im    = (DATA_W+1)'(a.im) - (DATA_W+1)'(b.im);
    f.re      = sample_t'(sum_re >>> 1);
    f.im      = sample_t'(sum_im >>> 1);
    d_half.re = sample_t'(dif_re >>> 1);
    d_half.im = sample_t'(dif_im >>> 1);
  end

  cplx_mult_vedic u_cmul (.x(d_half), .w(W), .y(g), .sat(sat));

endmodule

// cplx_mult_vedic: multiplies a complex sample by a complex twiddle factor
// with four unsigned Vedic multipliers.
//
//   y.re = x.re*w.re - x.im*w.im
//   y.im = x.re*w.im + x.im*w.re
//
// Each real product is formed in sign-magnitude: the magnitude of the
// two's-complement sample part (at most 2**(DATA_W-1), which still fits in
// DATA_W unsigned bits) is multiplied by the twiddle magnitude in a
// vedic_mult, and the product is negated when the two signs differ. The two
// products of each output part are added at full precision, rounded to the
// nearest integer (halves rounded up) after dropping the TW_FRAC twiddle
// fraction bits, and saturated to DATA_W bits. The use of four multipliers,
// sign-magnitude products, rounding and saturation are this design's own
// choices; the source describes only that the FFT's multiplications are
// done with the Vedic multiplier.
//
// Interface: x (cplx_t), w (twiddle_t) in; y (cplx_t) out; sat is high when
// either output part had to be saturated.
// Timing: purely combinational.
module cplx_mult_vedic
  import fft_pkg::*;
(
  input  cplx_t    x,
  input  twiddle_t w,
  output cplx_t    y,
  output logic     sat
);

  localparam int unsigned PROD_W = 2 * DATA_W;     // unsigned product
  localparam int unsigned ACC_W  = PROD_W + 2;     // signed sum of two products

  logic [DATA_W-1:0] xr_mag, xi_mag;
  logic              xr_neg, xi_neg;
  logic [PROD_W-1:0] p_rr, p_ii, p_ri, p_ir;

  always_comb begin
    xr_neg = x.re[DATA_W-1];
    xi_neg = x.im[DATA_W-1];
    xr_mag = xr_neg ? DATA_W'(-x.re) : DATA_W'(x.re);
    xi_mag = xi_neg ? DATA_W'(-x.im) : DATA_W'(x.im);
  end

  vedic_mult #(.WIDTH(DATA_W)) u_mul_rr (.a(xr_mag), .b(w.re_mag), .p(p_rr));
  vedic_mult #(.WIDTH(DATA_W)) u_mul_ii (.a(xi_mag), .b(w.im_mag), .p(p_ii));
  vedic_mult #(.WIDTH(DATA_W)) u_mul_ri (.a(xr_mag), .b(w.im_mag), .p(p_ri));
  vedic_mult #(.WIDTH(DATA_W)) u_mul_ir (.a(xi_mag), .b(w.re_mag), .p(p_ir));

  // Apply the sign of a product to its unsigned magnitude.
  function automatic logic signed [ACC_W-1:0] signed_prod(logic [PROD_W-1:0] mag, logic neg);
    logic signed [ACC_W-1:0] v;
    v = signed'({2'b00, mag});
    return neg ? -v : v;
  endfunction

  // Drop TW_FRAC bits with round-half-up, then saturate to DATA_W bits.
  function automatic sample_t round_sat(logic signed [ACC_W-1:0] acc, output logic ovf);
    logic signed [ACC_W-1:0] r;
    localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 << (DATA_W - 1)) - 1);
    localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 << (DATA_W - 1));
    r = (acc + ACC_W'(1 << (TW_FRAC - 1))) >>> TW_FRAC;
    ovf = 1'b0;
    if (r > MAXV) begin
      ovf = 1'b1;
      r   = MAXV;
    end else if (r < MINV) begin
      ovf = 1'b1;
      r   = MINV;
    end
    return r[DATA_W-1:0];
  endfunction

  logic signed [ACC_W-1:0] acc_re, acc_im;
  logic                    ovf_re, ovf_im;

  always_comb begin
    acc_re = signed_prod(p_rr, xr_neg ^ w.re_neg) - signed_prod(p_ii, xi_neg ^ w.im_neg);
    acc_im = signed_prod(p_ri, xr_neg ^ w.im_neg) + signed_prod(p_ir, xi_neg ^ w.re_neg);
    y.re   = round_sat(acc_re, ovf_re);
    y.im   = round_sat(acc_im, ovf_im);
    sat    = ovf_re | ovf_im;
  end

endmodule

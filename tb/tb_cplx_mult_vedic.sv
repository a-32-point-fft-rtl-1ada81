// tb_cplx_mult_vedic: checks the complex twiddle multiplier against the
// integer reference model (products with '*', round half up, saturation) for
// every twiddle of a 32-point FFT, the extreme sample values and random
// samples, and counts how often saturation occurred.
`timescale 1ns/1ps
module tb_cplx_mult_vedic;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t    x, y;
  twiddle_t w;
  logic     sat_o;
  int checks = 0, failures = 0, sat_seen = 0;

  cplx_mult_vedic dut (.x(x), .w(w), .y(y), .sat(sat_o));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Convert a reference twiddle (signed integers) into the sign-magnitude port format.
  function automatic twiddle_t to_port(ci_t t);
    twiddle_t r;
    r.re_neg = t.re < 0;
    r.im_neg = t.im < 0;
    r.re_mag = 8'(t.re < 0 ? -t.re : t.re);
    r.im_mag = 8'(t.im < 0 ? -t.im : t.im);
    return r;
  endfunction

  task automatic apply(int xr, int xi, int k);
    ci_t xin, t, exp_y;
    int  ns;
    ns     = 0;
    xin.re = xr;
    xin.im = xi;
    t      = tw(k, 32);
    exp_y  = cmul(xin, t, ns);
    x.re   = 8'(xr);
    x.im   = 8'(xi);
    w      = to_port(t);
    #1;
    checks++;
    if (int'(y.re) != exp_y.re || int'(y.im) != exp_y.im || sat_o != (ns != 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=(%0d,%0d) k=%0d: got (%0d,%0d) sat=%0b expected (%0d,%0d) sat=%0b",
                 xr, xi, k, y.re, y.im, sat_o, exp_y.re, exp_y.im, ns != 0);
    end
    if (sat_o) sat_seen++;
  endtask

  initial begin
    int ext[5] = '{-128, -127, 0, 1, 127};
    for (int k = 0; k < 16; k++) begin
      foreach (ext[i]) foreach (ext[j]) apply(ext[i], ext[j], k);
      for (int r = 0; r < 2000; r++) apply(int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128, k);
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturated products: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

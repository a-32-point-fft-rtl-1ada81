// tb_dif_butterfly: checks radix-2 DIF butterflies with several twiddles
// (W_2^0, W_8^1, W_8^2, W_32^5, W_32^12) against the integer reference
// butterfly, and checks the twiddled output against the exact floating-point
// value ((a-b)/2) * W within 1.5 LSB when nothing saturates.
`timescale 1ns/1ps
module tb_dif_butterfly;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NB = 5;
  localparam int BM[NB] = '{2, 8, 8, 32, 32};
  localparam int BK[NB] = '{0, 1, 2, 5, 12};

  cplx_t a, b;
  cplx_t f [NB];
  cplx_t g [NB];
  logic  s [NB];
  int checks = 0, failures = 0, sat_seen = 0;

  for (genvar i = 0; i < NB; i++) begin : g_dut
    dif_butterfly #(.M(BM[i]), .K(BK[i])) dut (.a(a), .b(b), .f(f[i]), .g(g[i]), .sat(s[i]));
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int ar, int ai, int br, int bi);
    ci_t ca, cb, ef, eg;
    int  ns;
    ca.re = ar; ca.im = ai; cb.re = br; cb.im = bi;
    a.re = 8'(ar); a.im = 8'(ai); b.re = 8'(br); b.im = 8'(bi);
    #1;
    for (int i = 0; i < NB; i++) begin
      real dr, di, ang, xr, xi;
      ns = 0;
      bfly(ca, cb, BK[i], BM[i], ef, eg, ns);
      checks++;
      if (int'(f[i].re) != ef.re || int'(f[i].im) != ef.im || int'(g[i].re) != eg.re ||
          int'(g[i].im) != eg.im || s[i] != (ns != 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL M=%0d K=%0d a=(%0d,%0d) b=(%0d,%0d): f=(%0d,%0d) g=(%0d,%0d) exp f=(%0d,%0d) g=(%0d,%0d)",
                   BM[i], BK[i], ar, ai, br, bi, f[i].re, f[i].im, g[i].re, g[i].im,
                   ef.re, ef.im, eg.re, eg.im);
      end
      if (s[i]) sat_seen++;
      else begin
        // Independent floating-point check of the twiddled difference.
        dr  = real'((ar - br) >>> 1);
        di  = real'((ai - bi) >>> 1);
        ang = -2.0 * PI_R * BK[i] / BM[i];
        xr  = dr * $cos(ang) - di * $sin(ang);
        xi  = dr * $sin(ang) + di * $cos(ang);
        checks++;
        if ((real'(g[i].re) - xr) > 1.5 || (xr - real'(g[i].re)) > 1.5 ||
            (real'(g[i].im) - xi) > 1.5 || (xi - real'(g[i].im)) > 1.5) begin
          failures++;
          if (failures < 10) $display("FAIL float M=%0d K=%0d g=(%0d,%0d) vs (%f,%f)",
                                      BM[i], BK[i], g[i].re, g[i].im, xr, xi);
        end
      end
    end
  endtask

  initial begin
    apply(0, 0, 0, 0);
    apply(127, 127, -128, -128);
    apply(-128, 127, 127, -128);
    apply(100, -50, 3, 7);
    for (int r = 0; r < 5000; r++)
      apply(int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128,
            int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128);
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturating butterfly evaluations: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bfly_block: checks a 32-point and a 4-point butterfly block. Every output
// position k and k+M/2 is compared with the reference butterfly of inputs k
// and k+M/2 with twiddle W_M^k, for random inputs.
`timescale 1ns/1ps
module tb_bfly_block;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t x32 [32];
  cplx_t y32 [32];
  cplx_t x4  [4];
  cplx_t y4  [4];
  logic  s32, s4;
  int checks = 0, failures = 0;

  bfly_block #(.M(32)) dut32 (.x(x32), .y(y32), .sat(s32));
  bfly_block #(.M(4))  dut4  (.x(x4),  .y(y4),  .sat(s4));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ci_t to_ci(cplx_t c);
    ci_t r;
    r.re = int'(c.re);
    r.im = int'(c.im);
    return r;
  endfunction

  function automatic bit same(cplx_t c, ci_t e);
    return int'(c.re) == e.re && int'(c.im) == e.im;
  endfunction

  initial begin
    for (int r = 0; r < 500; r++) begin
      int ns32, ns4;
      foreach (x32[i]) begin
        x32[i].re = 8'($urandom_range(255));
        x32[i].im = 8'($urandom_range(255));
      end
      foreach (x4[i]) begin
        x4[i].re = 8'($urandom_range(255));
        x4[i].im = 8'($urandom_range(255));
      end
      #1;
      ns32 = 0;
      ns4  = 0;
      for (int k = 0; k < 16; k++) begin
        ci_t ef, eg;
        bfly(to_ci(x32[k]), to_ci(x32[k+16]), k, 32, ef, eg, ns32);
        checks++;
        if (!same(y32[k], ef) || !same(y32[k+16], eg)) begin
          failures++;
          if (failures < 10) $display("FAIL M=32 k=%0d", k);
        end
      end
      for (int k = 0; k < 2; k++) begin
        ci_t ef, eg;
        bfly(to_ci(x4[k]), to_ci(x4[k+2]), k, 4, ef, eg, ns4);
        checks++;
        if (!same(y4[k], ef) || !same(y4[k+2], eg)) begin
          failures++;
          if (failures < 10) $display("FAIL M=4 k=%0d", k);
        end
      end
      checks++;
      if (s32 != (ns32 != 0) || s4 != (ns4 != 0)) begin
        failures++;
        $display("FAIL saturation flag");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

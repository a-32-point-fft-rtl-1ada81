// bfly_block: an M-point radix-2 DIF butterfly block, the unit from which
// each FFT stage is built (the 32-, 16-, 8-, 4- and 2-point blocks).
//
// The block holds M/2 butterflies. Butterfly k (k = 0 .. M/2-1) takes inputs
// k and k+M/2, writes its sum output f to position k and its twiddled
// difference output g to position k+M/2, with twiddle factor W_M^k. The two
// halves of the output are the inputs of the two M/2-point blocks of the
// next stage.
//
// The block sizes follow the published 32-point FFT diagram; the pairing of
// inputs k and k+M/2 with twiddle W_M^k is the standard radix-2 DIF flow
// graph, which that diagram's stage order and bit-reversed output imply.
//
// Interface: x[0..M-1] in, y[0..M-1] out (cplx_t); sat is the OR of the
// butterflies' saturation flags.
// Timing: purely combinational.
module bfly_block
  import fft_pkg::*;
#(
  parameter int unsigned M = 32   // block size, a power of two >= 2
) (
  input  cplx_t x [M],
  output cplx_t y [M],
  output logic  sat
);

  localparam int unsigned H = M / 2;

  logic [H-1:0] bf_sat;

  for (genvar k = 0; k < H; k++) begin : g_bf
    dif_butterfly #(.M(M), .K(k)) u_bf (
      .a  (x[k]),
      .b  (x[k+H]),
      .f  (y[k]),
      .g  (y[k+H]),
      .sat(bf_sat[k])
    );
  end

  assign sat = |bf_sat;

endmodule

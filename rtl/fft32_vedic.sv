// fft32_vedic: fully parallel 32-point radix-2 decimation-in-frequency FFT
// whose twiddle multiplications use Urdhva Tiryakbhyam (Vedic) multipliers.
//
// Structure: log2(N) = 5 stages. Stage s (s = 0..4) consists of
// 2**s butterfly blocks of M = N >> s points each: one 32-point
// block, then two 16-point, four 8-point, eight 4-point and sixteen 2-point
// blocks. Block b of stage s works on positions b*M .. b*M+M-1. Input
// samples enter in natural order; the output of the last stage is in
// bit-reversed order, and is delivered that way: out_data[p] holds X(k) for
// k = bit-reverse of p over 5 bits (out_data[1] is X(16), out_data[2] is
// X(8), ...).
//
// Every butterfly halves its results, so out_data = X(k) / 32 where
// X(k) = sum_n x(n) * exp(-j*2*pi*n*k/32), each part rounded to DATA_W bits.
// The five stages of 32- down to 2-point blocks, the natural-order input and
// the bit-reversed output follow the published design; the per-stage
// scaling is this design's own choice.
//
// Interface: in_data[n] is x(n), sampled with in_valid. out_data and
// out_valid come from registers; out_sat tells that some butterfly of that
// transform saturated (only inputs with complex magnitude close to or above
// 2**(DATA_W-1)-1 can cause it).
// Timing: the five stages are combinational between the input pins and the
// output register; a new 32-sample frame can be accepted every clock, and its
// transform appears one clock later (latency 1, throughput one frame per
// clock). The output register and the active-low synchronous reset are this
// design's own choices.
module fft32_vedic
  import fft_pkg::*;
#(
  parameter int unsigned N = 32   // number of points, a power of two
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data  [N],
  output logic  out_valid,
  output cplx_t out_data [N],
  output logic  out_sat
);

  localparam int unsigned STAGES = $clog2(N);

  logic [STAGES-1:0] stage_sat;   // some butterfly of stage s saturated

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned M      = N >> s;
    localparam int unsigned BLOCKS = 1 << s;
    cplx_t             s_in  [N];   // stage input, natural position order
    cplx_t             s_out [N];   // stage output
    logic [BLOCKS-1:0] blk_sat;
    if (s == 0) begin : g_first
      assign s_in = in_data;
    end else begin : g_next
      assign s_in = g_stage[s-1].s_out;
    end
    for (genvar b = 0; b < BLOCKS; b++) begin : g_block
      cplx_t blk_in  [M];
      cplx_t blk_out [M];
      for (genvar i = 0; i < M; i++) begin : g_wire
        assign blk_in[i]      = s_in[b*M+i];
        assign s_out[b*M+i]   = blk_out[i];
      end
      bfly_block #(.M(M)) u_blk (.x(blk_in), .y(blk_out), .sat(blk_sat[b]));
    end
    assign stage_sat[s] = |blk_sat;
  end

  cplx_t fft_out [N];
  assign fft_out = g_stage[STAGES-1].s_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sat   <= 1'b0;
      for (int i = 0; i < N; i++) out_data[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= fft_out;
        out_sat  <= |stage_sat;
      end
    end
  end

  // A result is presented only for a frame accepted on the previous clock.
  a_valid_follows_input: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(in_valid));

endmodule

// tb_fft32_vedic: end-to-end test of the 32-point Vedic FFT at its default
// size. Frames are an impulse, a constant, single complex tones, random
// frames and frames built to saturate a butterfly. They are sent both
// back-to-back (one frame per clock) and with idle clocks between them.
// Each output frame is checked
//   * bit-exactly against the integer reference FFT (bit-reversed order),
//   * against the floating-point DFT X(k)/32 within TOL LSB (frames without
//     saturation),
//   * for its timing: out_valid exactly one clock after in_valid.
// Counted mechanisms (each must occur): back-to-back frames, idle clocks
// between frames, saturated frames, reset with a frame in flight.
`timescale 1ns/1ps
module tb_fft32_vedic;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int  NP  = 32;
  localparam int  LOG = 5;
  localparam real TOL = 3.0;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  in_valid;
  cplx_t in_data  [NP];
  logic  out_valid;
  cplx_t out_data [NP];
  logic  out_sat;

  fft32_vedic dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_frames = 0, n_back_to_back = 0, n_idle = 0, n_sat = 0, n_reset_flush = 0;
  int n_sat_bounded = 0;   // saturated frames whose samples all had |x| <= 127
  bit cur_bounded = 1'b1;
  real max_err = 0.0;
  int  cycle = 0;

  typedef struct {
    ci_t ref_out [NP];
    real fre [NP];
    real fim [NP];
    bit  sat;
    bit  bounded;
    int  sent_cycle;
  } exp_t;
  exp_t pending [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle++;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL (cycle %0d): %s", cycle, msg);
  endtask

  // Build the expected result of one frame and drive it for one clock.
  task automatic send(ref ci_t x[]);
    exp_t e;
    ci_t  y[];
    int   ns;
    ns = 0;
    fft_fixed(NP, x, y, ns);
    foreach (y[p]) e.ref_out[p] = y[p];
    for (int p = 0; p < NP; p++) dft_bin(NP, x, bit_reverse(p, LOG), e.fre[p], e.fim[p]);
    e.sat     = (ns != 0);
    e.bounded = cur_bounded;
    @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      in_data[i].re = 8'(x[i].re);
      in_data[i].im = 8'(x[i].im);
    end
    in_valid     = 1'b1;
    e.sent_cycle = cycle;
    pending.push_back(e);
    n_frames++;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
      foreach (in_data[i]) in_data[i] = cplx_t'($urandom);
      n_idle++;
    end
  endtask

  // Output checker.
  cplx_t held [NP];
  bit    have_held = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (pending.size() == 0) fail("out_valid without a frame sent");
      else begin
        e = pending.pop_front();
        checks++;
        if (cycle - e.sent_cycle != 1) fail($sformatf("latency %0d, expected 1", cycle - e.sent_cycle));
        for (int p = 0; p < NP; p++) begin
          checks++;
          if (int'(out_data[p].re) != e.ref_out[p].re || int'(out_data[p].im) != e.ref_out[p].im)
            fail($sformatf("position %0d (X(%0d)): got (%0d,%0d) expected (%0d,%0d)", p,
                           bit_reverse(p, LOG), out_data[p].re, out_data[p].im,
                           e.ref_out[p].re, e.ref_out[p].im));
          if (!e.sat) begin
            real er, ei;
            er = real'(out_data[p].re) - e.fre[p];
            ei = real'(out_data[p].im) - e.fim[p];
            if (er < 0) er = -er;
            if (ei < 0) ei = -ei;
            if (er > max_err) max_err = er;
            if (ei > max_err) max_err = ei;
            checks++;
            if (er > TOL || ei > TOL)
              fail($sformatf("X(%0d) far from DFT: got (%0d,%0d) DFT/32 (%f,%f)", bit_reverse(p, LOG),
                             out_data[p].re, out_data[p].im, e.fre[p], e.fim[p]));
          end
        end
        checks++;
        if (out_sat != e.sat) fail($sformatf("out_sat=%0b expected %0b", out_sat, e.sat));
        if (e.sat) n_sat++;
        if (e.sat && e.bounded) n_sat_bounded++;
      end
      held      = out_data;
      have_held = 1;
    end else if (rst_n && have_held) begin
      // With no new frame the previous result stays on the outputs.
      checks++;
      if (out_data != held) fail("output changed without a new frame");
    end
    if (!rst_n) have_held = 0;
  end

  // Back-to-back detection: in_valid high on two consecutive clocks.
  logic prev_valid = 1'b0;
  always @(posedge clk) begin
    if (rst_n && in_valid && prev_valid) n_back_to_back++;
    prev_valid <= rst_n && in_valid;
  end

  // Random frame whose samples have complex magnitude at most rmax.
  function automatic void rand_frame(ref ci_t x[], input int rmax);
    foreach (x[i]) begin
      do begin
        x[i].re = int'($urandom_range(2 * rmax)) - rmax;
        x[i].im = int'($urandom_range(2 * rmax)) - rmax;
      end while (x[i].re * x[i].re + x[i].im * x[i].im > rmax * rmax);
    end
  endfunction

  initial begin
    ci_t x[];
    x        = new[NP];
    rst_n    = 1'b0;
    in_valid = 1'b0;
    foreach (in_data[i]) in_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (out_valid !== 1'b0) fail("out_valid high after reset");

    // Impulse at n = 0: every bin equals x(0)/32.
    foreach (x[i]) begin x[i].re = 0; x[i].im = 0; end
    x[0].re = 127;
    send(x);
    idle(2);
    // Constant frame: all energy in X(0).
    foreach (x[i]) begin x[i].re = 60; x[i].im = -30; end
    send(x);
    // Single complex tones exp(j 2 pi t n / 32) for t = 1, 3, 17, back to back.
    for (int t = 1; t < 32; t += 7) begin
      foreach (x[i]) begin
        x[i].re = round_near(100.0 * $cos(2.0 * PI_R * t * i / NP));
        x[i].im = round_near(100.0 * $sin(2.0 * PI_R * t * i / NP));
      end
      send(x);
    end
    idle(1);
    // Random frames, alternately back to back and with gaps.
    for (int r = 0; r < 200; r++) begin
      rand_frame(x, 127);
      send(x);
      if (r % 3 == 0) idle(1 + r % 4);
    end
    // Frames built to saturate a butterfly of the first stage.
    cur_bounded = 1'b0;
    for (int r = 0; r < 4; r++) begin
      foreach (x[i]) begin
        x[i].re = (i < 16) ? 127 - r : -128 + r;
        x[i].im = (i < 16) ? 127 - r : -128 + r;
      end
      send(x);
    end
    for (int r = 0; r < 20; r++) begin
      foreach (x[i]) begin
        x[i].re = int'($urandom_range(255)) - 128;
        x[i].im = int'($urandom_range(255)) - 128;
      end
      send(x);
    end
    idle(3);
    // Reset while a frame is in flight: it must be dropped.
    cur_bounded = 1'b1;
    rand_frame(x, 100);
    send(x);
    rst_n = 1'b0;
    void'(pending.pop_back());
    n_reset_flush++;
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) fail("out_valid high in reset");
    rst_n = 1'b1;
    rand_frame(x, 120);
    send(x);
    idle(3);

    checks++;
    if (pending.size() != 0) fail($sformatf("%0d frames never came out", pending.size()));
    checks += 4;
    if (n_back_to_back == 0) fail("no back-to-back frames");
    if (n_idle == 0) fail("no idle clocks");
    if (n_sat == 0) fail("no saturated frame");
    if (n_reset_flush == 0) fail("no reset with a frame in flight");
    $display("frames=%0d back_to_back=%0d idle_clocks=%0d saturated=%0d reset_flush=%0d max_err_vs_dft=%f",
             n_frames, n_back_to_back, n_idle, n_sat, n_reset_flush, max_err);
    $display("saturated frames among those with all |x(n)| <= 127: %0d", n_sat_bounded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vedic_mult: exhaustive check of the 8x8 Urdhva Tiryakbhyam multiplier.
// All 65536 operand pairs are applied and the product is compared with the
// ordinary integer product a*b. A 16x16 instance is checked with random
// operands and the extreme values, since the method generalises to any width.
`timescale 1ns/1ps
module tb_vedic_mult;
  localparam int unsigned WIDTH = 8;

  logic [WIDTH-1:0]   a, b;
  logic [2*WIDTH-1:0] p;
  int checks = 0, failures = 0;

  vedic_mult #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .p(p));

  logic [15:0] a16, b16;
  logic [31:0] p16;
  vedic_mult #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << WIDTH); i++) begin
      for (int j = 0; j < (1 << WIDTH); j++) begin
        a = WIDTH'(i);
        b = WIDTH'(j);
        #1;
        checks++;
        if (p !== (2*WIDTH)'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", i, j, p, i * j);
        end
      end
    end
    for (int r = 0; r < 20000; r++) begin
      longint unsigned e;
      a16 = (r == 0) ? 16'hffff : 16'($urandom);
      b16 = (r == 0) ? 16'hffff : (r == 1) ? 16'h0 : 16'($urandom);
      #1;
      e = longint'(a16) * longint'(b16);
      checks++;
      if (p16 !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit %0d * %0d: got %0d expected %0d", a16, b16, p16, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// vedic_mult: unsigned WIDTH x WIDTH multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method.
//
// For every column k = 0 .. 2*WIDTH-2 the crosswise bit products a[i]&b[j]
// with i+j == k are generated all at once and added together with the carry
// coming out of column k-1. Bit 0 of that column sum is product bit p[k];
// the rest of the sum is the carry passed to column k+1. After the last
// column the remaining carry is product bit p[2*WIDTH-1]. For WIDTH = 8 this
// is the P0 .. P14 column scheme with 15 steps; carries are passed on as one
// number, which adds the same weights as splitting them into single carry
// bits spread over later columns.
//
// The column-by-column Urdhva Tiryakbhyam scheme and the 8-bit default are
// those of the published 8x8 Vedic multiplier; passing each carry on as one
// number, and producing the top bit from the final carry, are this
// design's own formulation.
//
// Interface: a, b unsigned WIDTH bits; p unsigned 2*WIDTH bits.
// Timing: purely combinational.
module vedic_mult #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] p
);

  // A column sum never exceeds WIDTH products plus a carry below 2*WIDTH.
  localparam int unsigned SUM_W = $clog2(4 * WIDTH) + 1;

  always_comb begin
    logic [SUM_W-1:0] col_sum;
    logic [SUM_W-1:0] carry;
    carry = '0;
    p     = '0;
    for (int k = 0; k < 2 * WIDTH - 1; k++) begin
      col_sum = carry;
      for (int i = 0; i < WIDTH; i++) begin
        if (k - i >= 0 && k - i < WIDTH) begin
          col_sum = col_sum + SUM_W'(a[i] & b[k-i]);
        end
      end
      p[k]  = col_sum[0];
      carry = col_sum >> 1;
    end
    p[2*WIDTH-1] = carry[0];
  end

endmodule

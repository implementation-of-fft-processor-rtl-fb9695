// vedic_mul4: 4 x 4 unsigned multiplier in the Urdhva-Tiryakbhyam
// ("vertically and crosswise") form.
//
// The product is formed column by column, least significant first. Column c
// adds every bit product a[i]&b[j] with i+j = c (the vertical and crosswise
// lines of the method) to the carry left by column c-1. The lowest bit of
// that sum is product bit c; the rest is carried into column c+1. The carry
// into column 0 is zero. Seven columns give bits 0..6; the final carry is
// bit 7. This column-and-carry procedure follows the source design (its
// worked decimal example and its 4-bit multiplier test); the way the column
// sums are written out here is this design's own.
//
// Purely combinational: y is valid in the same cycle as a and b.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] y
);

  logic [1:0] carry   [8];

  always_comb begin
    carry[0] = '0;
    for (int c = 0; c < 7; c++) begin
      logic [2:0] s;   // at most 4 products + a carry of 3
      s = 3'(carry[c]);
      for (int i = 0; i < 4; i++) begin
        if (c - i >= 0 && c - i < 4) s = s + 3'(a[i] & b[c-i]);
      end
      y[c]        = s[0];
      carry[c+1]  = s[2:1];
    end
    y[7] = carry[7][0];
  end

endmodule

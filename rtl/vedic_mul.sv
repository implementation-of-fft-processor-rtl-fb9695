// vedic_mul: N x N unsigned multiplier built from 4 x 4 Urdhva-Tiryakbhyam
// blocks.
//
// Both operands are cut into N/4 four-bit digits. Every digit pair (i, j) is
// multiplied by one vedic_mul4, and the method is applied once more at digit
// level: column c gathers the 8-bit products with i+j = c (the vertical and
// crosswise pairs), and column c is added into the result at bit 4*c, so the
// carry of each column flows into the next. Reducing an N x N multiplier to
// 4 x 4 blocks follows the source design; the digit-column arrangement of
// the blocks is this design's choice.
//
// N must be a multiple of 4 (default 8, the width of one bank word).
// Purely combinational.
module vedic_mul #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] y
);

  localparam int unsigned D = N / 4;   // digits per operand

  logic [7:0] pp [D][D];   // digit products

  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      vedic_mul4 u_m4 (.a(a[4*i +: 4]), .b(b[4*j +: 4]), .y(pp[i][j]));
    end
  end

  // Column c (c = 0 .. 2D-2) holds pp[i][c-i]; columns are summed with their
  // weight 16^c, the carry of each column reaching the next.
  always_comb begin
    logic [2*N-1:0] acc;
    acc = '0;
    for (int c = 0; c < 2 * D - 1; c++) begin
      logic [2*N-1:0] col;
      col = '0;
      for (int i = 0; i < D; i++) begin
        if (c - i >= 0 && c - i < D) col = col + (2*N)'(pp[i][c-i]);
      end
      acc = acc + (col << (4 * c));
    end
    y = acc;
  end

  initial begin
    assert (N % 4 == 0 && N >= 4) else $error("vedic_mul: N must be a multiple of 4");
  end

endmodule

// vedic_smul: signed N x N multiplier around the unsigned Vedic multiplier.
//
// The operands are taken to sign and magnitude, the magnitudes are
// multiplied by vedic_mul, and the product is negated when the signs differ.
// The magnitude of the most negative value, 2^(N-1), still fits in N
// unsigned bits, so every pair of inputs gives the exact product.
// Sign-magnitude handling is this design's choice; the source design gives
// only unsigned Vedic multiplication. Purely combinational.
module vedic_smul #(
  parameter int unsigned N = 8
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] y
);

  logic [N-1:0]   mag_a, mag_b;
  logic [2*N-1:0] mag_y;
  logic           neg;

  always_comb begin
    mag_a = a[N-1] ? N'(-a) : N'(a);
    mag_b = b[N-1] ? N'(-b) : N'(b);
    neg   = a[N-1] ^ b[N-1];
  end

  vedic_mul #(.N(N)) u_mul (.a(mag_a), .b(mag_b), .y(mag_y));

  assign y = neg ? -$signed(mag_y) : $signed(mag_y);

endmodule

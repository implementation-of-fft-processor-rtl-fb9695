// vedic_cmul: complex twiddle multiplier of the radix-4 processing unit.
//
// Computes p = x * w for a data sample x and a twiddle factor w using four
// real Vedic multipliers, one adder and one subtractor:
//   p.re = x.re*w.re - x.im*w.im,   p.im = x.re*w.im + x.im*w.re.
// The twiddle is a fixed-point number with TW_FRAC fraction bits (1.0 =
// 2^TW_FRAC). The exact products are rounded to the nearest integer
// (half rounded up) at the data's scale and saturated to OW bits (OW = DW
// by default; one more bit keeps a rotated full-scale sample unsaturated).
// Four multipliers for one complex product follow the source design; the
// rounding and saturation are this design's choices. Purely combinational.
module vedic_cmul #(
  parameter int unsigned DW      = 8,
  parameter int unsigned TW      = 8,
  parameter int unsigned TW_FRAC = 6,
  parameter int unsigned OW      = DW
) (
  input  logic signed [DW-1:0] x_re,
  input  logic signed [DW-1:0] x_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [OW-1:0] p_re,
  output logic signed [OW-1:0] p_im
);

  // Common operand width, a multiple of 4 for the Vedic blocks.
  localparam int unsigned MW = (((DW > TW) ? DW : TW) + 3) / 4 * 4;
  localparam int unsigned PW = 2 * MW + 1;   // one product plus one bit for the sum

  logic signed [MW-1:0]   xr, xi, wr, wi;
  logic signed [2*MW-1:0] rr, ii, ri, ir;

  assign xr = MW'(x_re);
  assign xi = MW'(x_im);
  assign wr = MW'(w_re);
  assign wi = MW'(w_im);

  vedic_smul #(.N(MW)) u_rr (.a(xr), .b(wr), .y(rr));
  vedic_smul #(.N(MW)) u_ii (.a(xi), .b(wi), .y(ii));
  vedic_smul #(.N(MW)) u_ri (.a(xr), .b(wi), .y(ri));
  vedic_smul #(.N(MW)) u_ir (.a(xi), .b(wr), .y(ir));

  function automatic logic signed [OW-1:0] round_sat(input logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC;
    if (r > PW'((1 << (OW - 1)) - 1))       return {1'b0, {(OW-1){1'b1}}};
    else if (r < -PW'(1 << (OW - 1)))       return {1'b1, {(OW-1){1'b0}}};
    else                                     return r[OW-1:0];
  endfunction

  always_comb begin
    p_re = round_sat(PW'(rr) - PW'(ii));
    p_im = round_sat(PW'(ri) + PW'(ir));
  end

endmodule

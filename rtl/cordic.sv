// cordic: CORDIC core of the twiddle factor generator, in rotation or
// vectoring mode.
//
// Rotation mode (mode = 0) turns the vector (x_in, y_in) by the angle z_in;
// vectoring mode (mode = 1) turns (x_in, y_in) onto the positive x axis and
// adds its angle to z_in, leaving the vector's length in x_out. ITER
// micro-rotations by +/-atan(2^-i) are unrolled, each made of two shifts and
// three additions. The CORDIC gain (about 1.6468) is then removed by
// multiplying x and y by K = 0.6072529 on two signed Vedic multipliers, so
// that x_out and y_out have the scale of x_in and y_in.
//
// Angles are binary: the full turn is 2^16, so 16384 is 90 degrees and
// z_in, z_out are signed 16-bit. Rotation converges for |z_in| up to about
// 99.8 degrees; vectoring needs x_in >= 0. The rotation and vectoring modes
// and the use of CORDIC for twiddles follow the source design; the angle
// format, the widths, the iteration count and gain correction on Vedic
// multipliers are this design's choices. Purely combinational.
module cordic #(
  parameter int unsigned XW   = 16,   // x and y width, a multiple of 4
  parameter int unsigned ITER = 14    // micro-rotations, at most 16
) (
  input  logic                 mode,     // 0: rotation, 1: vectoring
  input  logic signed [XW-1:0] x_in,
  input  logic signed [XW-1:0] y_in,
  input  logic signed [15:0]   z_in,
  output logic signed [XW-1:0] x_out,
  output logic signed [XW-1:0] y_out,
  output logic signed [15:0]   z_out
);

  localparam int unsigned IW = XW + 4;   // internal width: gain and sign guard

  // atan(2^-i) in units of 2^-16 turn: round(atan(2^-i) * 65536 / (2*pi)).
  localparam logic [15:0] ATAN [16] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163, 16'd81,
    16'd41,   16'd20,   16'd10,   16'd5,    16'd3,   16'd1,   16'd1,   16'd0
  };

  // 1/gain in XW fraction bits.
  localparam logic signed [IW-1:0] K_Q = IW'(longint'(0.6072529350088813 * (2.0 ** XW)));

  logic signed [IW-1:0] xr, yr;
  logic signed [15:0]   zr;

  always_comb begin
    logic signed [IW-1:0] x, y, xs, ys;
    logic signed [15:0]   z;
    logic                 ccw;
    x = IW'(x_in);
    y = IW'(y_in);
    z = z_in;
    for (int i = 0; i < ITER; i++) begin
      ccw = mode ? y[IW-1] : ~z[15];
      xs  = x >>> i;
      ys  = y >>> i;
      if (ccw) begin
        x = x - ys;
        y = y + xs;
        z = z - $signed(ATAN[i]);
      end else begin
        x = x + ys;
        y = y - xs;
        z = z + $signed(ATAN[i]);
      end
    end
    xr = x;
    yr = y;
    zr = z;
  end

  logic signed [2*IW-1:0] xk, yk;

  vedic_smul #(.N(IW)) u_kx (.a(xr), .b(K_Q), .y(xk));
  vedic_smul #(.N(IW)) u_ky (.a(yr), .b(K_Q), .y(yk));

  // Round the gain-corrected values back to XW bits.
  function automatic logic signed [XW-1:0] rescale(input logic signed [2*IW-1:0] v);
    logic signed [2*IW-1:0] r;
    r = (v + (2*IW)'(1 <<< (XW - 1))) >>> XW;
    if (r > (2*IW)'((1 << (XW - 1)) - 1))      return {1'b0, {(XW-1){1'b1}}};
    else if (r < -(2*IW)'(1 << (XW - 1)))      return {1'b1, {(XW-1){1'b0}}};
    else                                        return r[XW-1:0];
  endfunction

  always_comb begin
    x_out = rescale(xk);
    y_out = rescale(yk);
    z_out = zr;
  end

  initial begin
    assert (ITER <= 16 && XW % 4 == 0) else $error("cordic: ITER <= 16 and XW a multiple of 4");
  end

endmodule

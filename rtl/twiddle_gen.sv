// twiddle_gen: twiddle factor generator of the 64-point FFT, with no
// twiddle ROM.
//
// For the exponent p that the address generator gives for a butterfly, it
// produces the three twiddles the butterfly's legs 1, 2 and 3 need,
//   W^(m*p) = exp(-j*2*pi*m*p/64),  m = 1, 2, 3  (exponents taken mod 64).
// Each exponent e is split into a quadrant q = e[5:4] and a residue
// r = e[3:0]. A cordic in rotation mode turns the unit vector by
// -2*pi*r/64 (at most -84.4 degrees, inside its range), and the quadrant is
// applied exactly by swapping and negating: W^e = (-j)^q * W^r.
// The twiddles are registered: tw_* are valid one clock after p, when the
// butterfly's data come out of the memory banks.
//
// Twiddles are fixed point with TW_FRAC = TW-2 fraction bits: 1.0 is 64 and
// -1.0 is -64 at TW = 8. Generating twiddles by CORDIC instead of a ROM
// follows the source design; the quadrant split, the widths and the
// registered output are this design's choices.
module twiddle_gen
  import fft_pkg::*;
#(
  parameter int unsigned TW   = TW_W,   // twiddle part width
  parameter int unsigned XW   = 16,     // CORDIC width, a multiple of 4
  parameter int unsigned ITER = 14      // CORDIC micro-rotations
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [IDX_W-1:0]     p,        // exponent of leg 1
  output logic signed [TW-1:0] tw_re [3], // W^p, W^2p, W^3p
  output logic signed [TW-1:0] tw_im [3]
);

  localparam int unsigned SHIFT = (XW - 4) - (TW - 2); // CORDIC 1.0 is 2^(XW-4)
  localparam logic signed [XW-1:0] ONE = XW'(1) <<< (XW - 4);

  logic [IDX_W-1:0]     e    [3];
  logic signed [XW-1:0] c_re [3];
  logic signed [XW-1:0] c_im [3];
  logic signed [15:0]   z    [3];

  for (genvar m = 0; m < 3; m++) begin : g_leg
    always_comb begin
      e[m] = IDX_W'((m + 1) * p);     // mod 64 by truncation
      // -2*pi*r/64 in units of 2^-16 turn is -r * 1024
      z[m] = -$signed({2'b00, e[m][3:0], 10'b0});
    end

    logic signed [15:0] z_unused;
    cordic #(.XW(XW), .ITER(ITER)) u_cordic (
      .mode (1'b0),
      .x_in (ONE),
      .y_in ('0),
      .z_in (z[m]),
      .x_out(c_re[m]),
      .y_out(c_im[m]),
      .z_out(z_unused)
    );

    // Round from CORDIC scale to the twiddle scale.
    logic signed [XW-1:0] r_re, r_im;
    always_comb begin
      r_re = (c_re[m] + (XW'(1) <<< (SHIFT - 1))) >>> SHIFT;
      r_im = (c_im[m] + (XW'(1) <<< (SHIFT - 1))) >>> SHIFT;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tw_re[m] <= '0;
        tw_im[m] <= '0;
      end else begin
        unique case (e[m][5:4])
          2'd0: begin tw_re[m] <= TW'(r_re);  tw_im[m] <= TW'(r_im);  end
          2'd1: begin tw_re[m] <= TW'(r_im);  tw_im[m] <= TW'(-r_re); end
          2'd2: begin tw_re[m] <= TW'(-r_re); tw_im[m] <= TW'(-r_im); end
          2'd3: begin tw_re[m] <= TW'(-r_im); tw_im[m] <= TW'(r_re);  end
        endcase
      end
    end
  end

endmodule

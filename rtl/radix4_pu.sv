// radix4_pu: Vedic radix-4 processing unit, the single 4-point butterfly
// that the FFT uses for all 48 of its butterflies, in decimation in
// frequency (dit = 0) or decimation in time (dit = 1).
//
// The 4-point butterfly on inputs c0..c3 is
//   b0 = c0 +   c1 + c2 +   c3
//   b1 = c0 - j*c1 - c2 + j*c3
//   b2 = c0 -   c1 + c2 -   c3
//   b3 = c0 + j*c1 - c2 - j*c3
// (multiplying by j only swaps and negates parts), and every result is
// divided by 4 with rounding and saturation, so that three stages cannot
// overflow 8 bits. The twiddles W1..W3 of legs 1..3 are applied on three
// Vedic complex multipliers, after the butterfly in DIF and before it in DIT:
//   DIF: y0 = b0(a)/4, y_m = W_m * b_m(a)/4          (m = 1..3)
//   DIT: y  = b(a0, W1*a1, W2*a2, W3*a3)/4
// The three multipliers serve both orders, dit switching their inputs;
// each order has its own set of butterfly adders, which keeps the datapath
// free of combinational loops. In DIT the products keep one extra bit until the
// division by 4. The outputs are registered when en is high: the result
// appears one clock after its inputs.
//
// One radix-4 unit reused for every butterfly, its twiddle products on
// Vedic multipliers, and support for both DIF and DIT follow the source
// design. The fixed scaling by 1/4 per stage, the rounding and the shared
// multipliers are this design's choices.
module radix4_pu
  import fft_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned TW = TW_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 dit,       // 0: DIF, 1: DIT
  input  logic signed [DW-1:0] a_re [4],
  input  logic signed [DW-1:0] a_im [4],
  input  logic signed [TW-1:0] w_re [3],   // twiddles of legs 1, 2, 3
  input  logic signed [TW-1:0] w_im [3],
  output logic signed [DW-1:0] y_re [4],
  output logic signed [DW-1:0] y_im [4]
);

  localparam int unsigned CW = DW + 1;   // butterfly inputs (DIT products)
  localparam int unsigned SW = CW + 3;   // butterfly sums, with sign guard

  function automatic logic signed [DW-1:0] sat(input logic signed [SW-1:0] r);
    if (r > SW'((1 << (DW - 1)) - 1))   return {1'b0, {(DW-1){1'b1}}};
    else if (r < -SW'(1 << (DW - 1)))   return {1'b1, {(DW-1){1'b0}}};
    else                                 return r[DW-1:0];
  endfunction

  function automatic logic signed [DW-1:0] quarter(input logic signed [SW-1:0] v);
    return sat((v + SW'(2)) >>> 2);
  endfunction

  // One 4-point butterfly with division by 4.
  typedef logic signed [SW-1:0] sum_t [4];
  typedef logic signed [DW-1:0] res_t [4];

  function automatic void bfly(input sum_t cr, input sum_t ci, output res_t br, output res_t bi);
    br[0] = quarter(cr[0] + cr[1] + cr[2] + cr[3]);
    bi[0] = quarter(ci[0] + ci[1] + ci[2] + ci[3]);
    br[1] = quarter(cr[0] + ci[1] - cr[2] - ci[3]);
    bi[1] = quarter(ci[0] - cr[1] - ci[2] + cr[3]);
    br[2] = quarter(cr[0] - cr[1] + cr[2] - cr[3]);
    bi[2] = quarter(ci[0] - ci[1] + ci[2] - ci[3]);
    br[3] = quarter(cr[0] - ci[1] - cr[2] + ci[3]);
    bi[3] = quarter(ci[0] + cr[1] - ci[2] - cr[3]);
  endfunction

  sum_t ar, ai, pr, pi;
  res_t f_re, f_im;                          // DIF butterfly, on the inputs
  res_t t_re, t_im;                          // DIT butterfly, on the products
  logic signed [DW-1:0] x_re [4], x_im [4];  // multiplier inputs
  logic signed [CW-1:0] p_re [4], p_im [4];  // multiplier outputs
  logic signed [DW-1:0] r_re [4], r_im [4];  // unit results

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      ar[m] = SW'(a_re[m]);
      ai[m] = SW'(a_im[m]);
    end
    bfly(ar, ai, f_re, f_im);
  end

  // Twiddle multipliers: on the inputs in DIT, on the DIF results in DIF.
  always_comb begin
    for (int m = 0; m < 4; m++) begin
      x_re[m] = dit ? a_re[m] : f_re[m];
      x_im[m] = dit ? a_im[m] : f_im[m];
    end
  end

  assign p_re[0] = CW'(x_re[0]);
  assign p_im[0] = CW'(x_im[0]);

  for (genvar m = 1; m < 4; m++) begin : g_twiddle
    vedic_cmul #(.DW(DW), .TW(TW), .TW_FRAC(TW - 2), .OW(CW)) u_cmul (
      .x_re(x_re[m]), .x_im(x_im[m]),
      .w_re(w_re[m-1]), .w_im(w_im[m-1]),
      .p_re(p_re[m]), .p_im(p_im[m])
    );
  end

  always_comb begin
    for (int m = 0; m < 4; m++) begin
      pr[m] = SW'(p_re[m]);
      pi[m] = SW'(p_im[m]);
    end
    bfly(pr, pi, t_re, t_im);
    for (int m = 0; m < 4; m++) begin
      r_re[m] = dit ? t_re[m] : sat(pr[m]);
      r_im[m] = dit ? t_im[m] : sat(pi[m]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < 4; m++) begin
        y_re[m] <= '0;
        y_im[m] <= '0;
      end
    end else if (en) begin
      for (int m = 0; m < 4; m++) begin
        y_re[m] <= r_re[m];
        y_im[m] <= r_im[m];
      end
    end
  end

endmodule

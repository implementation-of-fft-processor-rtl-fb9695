// tb_vedic_cmul: random and extreme tests of the complex twiddle
// multiplier. The expected value is the exact complex product from the
// simulator's own multiplication, rounded half up at 6 fraction bits and
// saturated to 8 bits.
module tb_vedic_cmul;
  logic signed [7:0] x_re, x_im, w_re, w_im, p_re, p_im;
  int checks = 0, failures = 0;

  vedic_cmul dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_round(input int v);
    int r;
    r = (v + 32) >>> 6;
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  task automatic try(input int xr, input int xi, input int wr, input int wi);
    x_re = 8'(xr); x_im = 8'(xi); w_re = 8'(wr); w_im = 8'(wi);
    #1;
    checks++;
    if (int'(p_re) != ref_round(xr * wr - xi * wi) || int'(p_im) != ref_round(xr * wi + xi * wr)) begin
      failures++;
      $display("FAIL: (%0d,%0d)*(%0d,%0d) = (%0d,%0d)", xr, xi, wr, wi, p_re, p_im);
    end
  endtask

  initial begin
    try(-128, -128, -128, -128);   // saturates high in the real part
    try(-128, 127, -128, 127);
    try(127, 127, 64, 0);
    try(100, -37, 0, -64);         // times -j
    try(-128, 0, 64, 0);
    for (int t = 0; t < 20000; t++)
      try(int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128,
          int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

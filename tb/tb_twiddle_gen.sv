// tb_twiddle_gen: checks the three twiddles W^p, W^2p, W^3p for all 64
// exponents p against round(64*cos), round(-64*sin) of 2*pi*m*p/64 within
// one LSB, and that they appear exactly one clock after p.
module tb_twiddle_gen;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] p = '0;
  logic signed [7:0] tw_re [3], tw_im [3];
  int checks = 0, failures = 0;

  twiddle_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real er, ei;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < 64; q++) begin
      p = 6'(q);
      @(negedge clk);
      p = 6'(q + 17);   // a different exponent while the result is checked
      for (int m = 1; m <= 3; m++) begin
        er =  64.0 * $cos(2.0 * PI * real'(m * q) / 64.0);
        ei = -64.0 * $sin(2.0 * PI * real'(m * q) / 64.0);
        checks++;
        if (fabs(real'(tw_re[m-1]) - er) > 1.0 || fabs(real'(tw_im[m-1]) - ei) > 1.0) begin
          failures++;
          $display("FAIL: W^(%0d*%0d) = (%0d,%0d), expected (%0.2f,%0.2f)", m, q, tw_re[m-1], tw_im[m-1], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

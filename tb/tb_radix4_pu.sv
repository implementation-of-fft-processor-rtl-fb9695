// tb_radix4_pu: random tests of the radix-4 processing unit in both
// orders, DIF (twiddles after the butterfly) and DIT (before). Inputs are
// random 8-bit samples and random unit twiddles (round(64*cos),
// round(64*sin) of random angles); the expected outputs are the exact
// butterfly in double precision with the same quantised twiddles applied
// after (DIF) or before (DIT) it, divided by 4, within 1.6 LSB per part
// (two roundings). Also
// checks the one-clock latency and that the outputs hold while en is low.
module tb_radix4_pu;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, dit = 1'b0;
  logic signed [7:0] a_re [4], a_im [4], w_re [3], w_im [3], y_re [4], y_im [4];
  int checks = 0, failures = 0;

  radix4_pu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real br [4], bi [4], cr [4], ci [4], er, ei, th;
    logic signed [7:0] hold_re, hold_im;
    foreach (a_re[m]) begin a_re[m] = '0; a_im[m] = '0; end
    foreach (w_re[m]) begin w_re[m] = '0; w_im[m] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      for (int m = 0; m < 4; m++) begin
        a_re[m] = 8'(int'($urandom_range(255)) - 128);
        a_im[m] = 8'(int'($urandom_range(255)) - 128);
        if (t < 50) begin   // extreme inputs
          a_re[m] = (m % 2 == 0) ? 8'sd127 : -8'sd128;
          a_im[m] = (m < 2) ? -8'sd128 : 8'sd127;
        end
      end
      for (int m = 0; m < 3; m++) begin
        th = 2.0 * PI * real'($urandom_range(1023)) / 1024.0;
        w_re[m] = 8'(int'(64.0 * $cos(th)));
        w_im[m] = 8'(int'(64.0 * $sin(th)));
      end
      en = 1'b1;
      dit = 1'(t % 2);
      // reference: DIT rotates the inputs first
      for (int m = 0; m < 4; m++) begin
        cr[m] = real'(a_re[m]); ci[m] = real'(a_im[m]);
        if (dit && m > 0) begin
          cr[m] = (real'(a_re[m]) * real'(w_re[m-1]) - real'(a_im[m]) * real'(w_im[m-1])) / 64.0;
          ci[m] = (real'(a_re[m]) * real'(w_im[m-1]) + real'(a_im[m]) * real'(w_re[m-1])) / 64.0;
        end
      end
      br[0] = cr[0] + cr[1] + cr[2] + cr[3];
      bi[0] = ci[0] + ci[1] + ci[2] + ci[3];
      br[1] = cr[0] + ci[1] - cr[2] - ci[3];
      bi[1] = ci[0] - cr[1] - ci[2] + cr[3];
      br[2] = cr[0] - cr[1] + cr[2] - cr[3];
      bi[2] = ci[0] - ci[1] + ci[2] - ci[3];
      br[3] = cr[0] - ci[1] - cr[2] + ci[3];
      bi[3] = ci[0] + cr[1] - ci[2] - cr[3];
      @(negedge clk);
      en = 1'b0;
      for (int m = 0; m < 4; m++) begin
        br[m] /= 4.0; bi[m] /= 4.0;
        if (m == 0 || dit) begin er = br[m]; ei = bi[m]; end
        else begin
          er = (br[m] * real'(w_re[m-1]) - bi[m] * real'(w_im[m-1])) / 64.0;
          ei = (br[m] * real'(w_im[m-1]) + bi[m] * real'(w_re[m-1])) / 64.0;
        end
        if (er > 127.0) er = 127.0;
        if (er < -128.0) er = -128.0;
        if (ei > 127.0) ei = 127.0;
        if (ei < -128.0) ei = -128.0;
        checks++;
        if (fabs(real'(y_re[m]) - er) > 1.6 || fabs(real'(y_im[m]) - ei) > 1.6) begin
          failures++;
          $display("FAIL: test %0d dit %0d leg %0d: (%0d,%0d), expected (%0.2f,%0.2f)", t, dit, m, y_re[m], y_im[m], er, ei);
        end
      end
      // outputs hold while en is low
      hold_re = y_re[2]; hold_im = y_im[2];
      a_re[0] = a_re[0] + 8'sd5;
      @(negedge clk);
      checks++;
      if (y_re[2] != hold_re || y_im[2] != hold_im) begin
        failures++;
        $display("FAIL: outputs changed with en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cordic: tests the CORDIC core in both modes against double-precision
// trigonometry. Rotation: random vectors turned by random angles up to
// +/-95 degrees. Vectoring: random vectors with x >= 0, checking length
// and angle. Tolerances: 8 LSB on x and y; 6 units of 2^-16 turn on the
// residual rotation angle, and on the vectoring angle 8 units plus the
// angle that 8 LSB subtend at the vector's length.
module tb_cordic;
  localparam real PI = 3.14159265358979323846;
  localparam real TURN = 65536.0;

  logic mode;
  logic signed [15:0] x_in, y_in, z_in, x_out, y_out, z_out;
  int checks = 0, failures = 0;

  cordic dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    real th, ex, ey, ez, mag;
    mode = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      x_in = 16'(int'($urandom_range(16000)) - 8000);
      y_in = 16'(int'($urandom_range(16000)) - 8000);
      z_in = 16'(int'($urandom_range(34600)) - 17300);
      #1;
      th = 2.0 * PI * real'(z_in) / TURN;
      ex = real'(x_in) * $cos(th) - real'(y_in) * $sin(th);
      ey = real'(x_in) * $sin(th) + real'(y_in) * $cos(th);
      chk(fabs(real'(x_out) - ex) <= 8.0 && fabs(real'(y_out) - ey) <= 8.0 && fabs(real'(z_out)) <= 6.0,
          $sformatf("rotate (%0d,%0d) by %0d: (%0d,%0d) z %0d, expected (%0.1f,%0.1f)",
                    x_in, y_in, z_in, x_out, y_out, z_out, ex, ey));
    end
    mode = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      x_in = 16'($urandom_range(8000));
      y_in = 16'(int'($urandom_range(16000)) - 8000);
      z_in = 16'(int'($urandom_range(8000)) - 4000);
      #1;
      mag = $sqrt(real'(x_in) * real'(x_in) + real'(y_in) * real'(y_in));
      ez  = real'(z_in) + $atan2(real'(y_in), real'(x_in)) * TURN / (2.0 * PI);
      chk(fabs(real'(x_out) - mag) <= 8.0 && fabs(real'(y_out)) <= 8.0 &&
          fabs(real'(z_out) - ez) <= 8.0 + (8.0 / mag) * TURN / (2.0 * PI),
          $sformatf("vector (%0d,%0d) z %0d: len %0d y %0d z %0d, expected len %0.1f z %0.1f",
                    x_in, y_in, z_in, x_out, y_out, z_out, mag, ez));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

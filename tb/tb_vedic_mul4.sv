// tb_vedic_mul4: exhaustive test of the 4 x 4 Urdhva-Tiryakbhyam
// multiplier: all 256 operand pairs against the integer product, with the
// five operand pairs of the reference waveform (0x0, 0x6, 3x2, 2x3, 4x7)
// checked first.
module tb_vedic_mul4;
  logic [3:0] a, b;
  logic [7:0] y;
  int checks = 0, failures = 0;

  vedic_mul4 dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input int x, input int z);
    a = 4'(x); b = 4'(z);
    #1;
    checks++;
    if (y !== 8'(x * z)) begin
      failures++;
      $display("FAIL: %0d * %0d = %0d", x, z, y);
    end
  endtask

  initial begin
    try(0, 0); try(0, 6); try(3, 2); try(2, 3); try(4, 7);
    for (int x = 0; x < 16; x++)
      for (int z = 0; z < 16; z++) try(x, z);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

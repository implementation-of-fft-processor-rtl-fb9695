// tb_vedic_mul: tests the N x N Vedic multiplier at its default N = 8
// (exhaustively, all 65536 pairs) and at N = 16 and N = 32 (random pairs
// plus the extreme operands) against the integer product.
module tb_vedic_mul;
  logic [7:0]  a8, b8;   logic [15:0] y8;
  logic [15:0] a16, b16; logic [31:0] y16;
  logic [31:0] a32, b32; logic [63:0] y32;
  int checks = 0, failures = 0;

  vedic_mul            dut8  (.a(a8),  .b(b8),  .y(y8));
  vedic_mul #(.N(16))  dut16 (.a(a16), .b(b16), .y(y16));
  vedic_mul #(.N(32))  dut32 (.a(a32), .b(b32), .y(y32));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int x = 0; x < 256; x++)
      for (int z = 0; z < 256; z++) begin
        a8 = 8'(x); b8 = 8'(z); #1;
        chk(y8 == 16'(x * z), $sformatf("8-bit %0d * %0d = %0d", x, z, y8));
      end
    for (int t = 0; t < 2000; t++) begin
      a16 = (t == 0) ? 16'hffff : 16'($urandom);
      b16 = (t == 0) ? 16'hffff : 16'($urandom);
      a32 = (t == 0) ? 32'hffff_ffff : $urandom;
      b32 = (t == 0) ? 32'hffff_ffff : $urandom;
      #1;
      chk(y16 == 32'(a16) * 32'(b16), $sformatf("16-bit %0d * %0d = %0d", a16, b16, y16));
      chk(y32 == 64'(a32) * 64'(b32), $sformatf("32-bit %0d * %0d = %0d", a32, b32, y32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

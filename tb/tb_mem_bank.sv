// tb_mem_bank: random writes and reads on a 16 x 8 dual-port bank against a
// model array: read data one clock after the address, and a read of the
// word written in the same clock returns the old word.
module tb_mem_bank;
  logic clk = 1'b0, we = 1'b0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  mem_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_q;
    // fill
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 4'(i); wdata = 8'(i * 37 + 11); model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 4'($urandom);
      raddr = (t % 5 == 0) ? waddr : 4'($urandom);
      wdata = 8'($urandom);
      expect_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata != expect_q) begin
        failures++;
        $display("FAIL: read %0d got %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

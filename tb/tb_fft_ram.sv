// tb_fft_ram: the eight banks of the memory unit work independently: each
// clock writes a random subset of banks at random addresses and reads all
// eight at different addresses, checked against a model one clock later.
module tb_fft_ram;
  logic clk = 1'b0;
  logic we [8];
  logic [3:0] waddr [8], raddr [8];
  logic [7:0] wdata [8], rdata [8];
  logic [7:0] model [8][16];
  int checks = 0, failures = 0;

  fft_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_q [8];
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      for (int b = 0; b < 8; b++) begin
        we[b] = 1'b1; waddr[b] = 4'(i); raddr[b] = '0;
        wdata[b] = 8'(b * 16 + i); model[b][i] = wdata[b];
      end
    end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int b = 0; b < 8; b++) begin
        raddr[b] = 4'($urandom);
        expect_q[b] = model[b][raddr[b]];
        we[b] = 1'($urandom);
        waddr[b] = 4'($urandom);
        wdata[b] = 8'($urandom);
        if (we[b]) model[b][waddr[b]] = wdata[b];
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (rdata[b] != expect_q[b]) begin
          failures++;
          $display("FAIL: bank %0d read %0d got %h expected %h", b, raddr[b], rdata[b], expect_q[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_commutator2: while loading, every bank gets the input sample (real
// part to even banks, imaginary to odd); otherwise the banks get the
// butterfly data; the output is the real/imaginary pair of lane out_lane.
module tb_commutator2;
  import fft_pkg::*;
  logic load;
  cplx_t din, dout;
  logic [7:0] bfly_wdata [8], bank_wdata [8], bank_rdata [8];
  logic [1:0] out_lane;
  int checks = 0, failures = 0;

  commutator2 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      load = 1'($urandom);
      din  = cplx_t'($urandom);
      out_lane = 2'($urandom);
      foreach (bfly_wdata[b]) begin bfly_wdata[b] = 8'($urandom); bank_rdata[b] = 8'($urandom); end
      #1;
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (bank_wdata[b] != (load ? ((b % 2) ? din.im : din.re) : bfly_wdata[b])) begin
          failures++;
          $display("FAIL: load %0d bank %0d", load, b);
        end
      end
      checks++;
      if (dout.re != bank_rdata[2*out_lane] || dout.im != bank_rdata[2*out_lane+1]) begin
        failures++;
        $display("FAIL: out_lane %0d", out_lane);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

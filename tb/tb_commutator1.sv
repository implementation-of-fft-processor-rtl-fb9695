// tb_commutator1: for every rotation and random data, butterfly input m
// must carry lane (rot + m) mod 4 (real part from bank 2l, imaginary from
// bank 2l+1), and bank pair l must receive butterfly output
// (l - rot) mod 4.
module tb_commutator1;
  logic [1:0] rd_rot, wr_rot;
  logic [7:0] bank_rdata [8], bank_wdata [8];
  logic signed [7:0] a_re [4], a_im [4], y_re [4], y_im [4];
  int checks = 0, failures = 0;

  commutator1 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      rd_rot = 2'($urandom);
      wr_rot = 2'($urandom);
      foreach (bank_rdata[b]) bank_rdata[b] = 8'($urandom);
      foreach (y_re[m]) begin y_re[m] = 8'($urandom); y_im[m] = 8'($urandom); end
      #1;
      for (int m = 0; m < 4; m++) begin
        int l;
        l = (int'(rd_rot) + m) % 4;
        checks++;
        if (a_re[m] != bank_rdata[2*l] || a_im[m] != bank_rdata[2*l+1]) begin
          failures++;
          $display("FAIL: rd_rot %0d leg %0d", rd_rot, m);
        end
        l = (int'(wr_rot) + m) % 4;
        checks++;
        if (bank_wdata[2*l] != y_re[m] || bank_wdata[2*l+1] != y_im[m]) begin
          failures++;
          $display("FAIL: wr_rot %0d leg %0d", wr_rot, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

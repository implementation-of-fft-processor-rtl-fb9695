// commutator1: routes the memory banks to the butterfly inputs and the
// butterfly outputs back to the banks.
//
// The four points of a butterfly lie in the four complex lanes (bank pairs)
// rotated by the lane of leg 0: leg m lives in lane (rot + m) mod 4, where
// lane l is bank 2l (real part) and bank 2l+1 (imaginary part). The read
// side turns the bank outputs so that leg m reaches butterfly input m; the
// write side turns butterfly output m back into lane (rot + m) mod 4, the
// place its input came from (in-place storage). Each side is eight 8-to-1
// multiplexers whose selects follow from the rotation the address
// generation unit gives: rd_rot for the data now leaving the banks, wr_rot
// for the results now leaving the processing unit. Combinational.
// Its role and its 8-to-1 multiplexers follow the source design; describing
// the routing as a lane rotation is this design's choice.
module commutator1
  import fft_pkg::*;
(
  input  logic [1:0]               rd_rot,
  input  logic [DATA_W-1:0]        bank_rdata [N_BANKS],
  output logic signed [DATA_W-1:0] a_re [N_LANES],
  output logic signed [DATA_W-1:0] a_im [N_LANES],
  input  logic [1:0]               wr_rot,
  input  logic signed [DATA_W-1:0] y_re [N_LANES],
  input  logic signed [DATA_W-1:0] y_im [N_LANES],
  output logic [DATA_W-1:0]        bank_wdata [N_BANKS]
);

  logic [2:0]        rsel [N_BANKS], wsel [N_BANKS];
  logic [DATA_W-1:0] rout [N_BANKS], win [N_BANKS];

  always_comb begin
    for (int j = 0; j < N_BANKS; j++) begin
      // read: output 2m+part takes bank 2*((rd_rot+m) mod 4)+part
      rsel[j] = {2'(rd_rot + 2'(j >> 1)), 1'(j)};
      // write: bank 2l+part takes output 2*((l-wr_rot) mod 4)+part
      wsel[j] = {2'(2'(j >> 1) - wr_rot), 1'(j)};
    end
    for (int m = 0; m < N_LANES; m++) begin
      win[2*m]   = y_re[m];
      win[2*m+1] = y_im[m];
    end
  end

  comm_xbar #(.N(N_BANKS), .W(DATA_W)) u_rd (.in(bank_rdata), .sel(rsel), .out(rout));
  comm_xbar #(.N(N_BANKS), .W(DATA_W)) u_wr (.in(win), .sel(wsel), .out(bank_wdata));

  always_comb begin
    for (int m = 0; m < N_LANES; m++) begin
      a_re[m] = rout[2*m];
      a_im[m] = rout[2*m+1];
    end
  end

endmodule

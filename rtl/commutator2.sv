// commutator2: routes the input samples into the banks while the FFT loads
// and the bank outputs to the result port while it unloads.
//
// While load is high, every bank's write data is the incoming sample (real
// part to even banks, imaginary part to odd banks); the address generation
// unit enables the write of the one bank pair that owns the sample. While
// load is low, the banks take the butterfly results from commutator1.
// On the output side an 8-to-1 multiplexer per part picks bank pair
// out_lane, so dout is the sample read from that lane. Combinational.
// Its role follows the source design; the broadcast-plus-enable form of
// the input routing is this design's choice.
module commutator2
  import fft_pkg::*;
(
  input  logic               load,
  input  cplx_t              din,
  input  logic [DATA_W-1:0]  bfly_wdata [N_BANKS],
  output logic [DATA_W-1:0]  bank_wdata [N_BANKS],
  input  logic [1:0]         out_lane,
  input  logic [DATA_W-1:0]  bank_rdata [N_BANKS],
  output cplx_t              dout
);

  logic [2:0]        osel [N_BANKS];
  logic [DATA_W-1:0] oval [N_BANKS];

  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      if (load) bank_wdata[b] = b[0] ? din.im : din.re;
      else      bank_wdata[b] = bfly_wdata[b];
      osel[b] = {out_lane, 1'(b)};
    end
  end

  comm_xbar #(.N(N_BANKS), .W(DATA_W)) u_out (.in(bank_rdata), .sel(osel), .out(oval));

  assign dout.re = oval[0];
  assign dout.im = oval[1];

endmodule

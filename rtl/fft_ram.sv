// fft_ram: memory unit of the FFT, eight dual-port banks used in place.
//
// Bank 2*l holds the real parts and bank 2*l+1 the imaginary parts of the
// 16 samples of complex lane l (l = 0..3), so the four legs of a butterfly
// are read, and its four results written back over them, in one clock
// through eight independent read and eight independent write ports. Each
// bank has its own read address, write address and write enable, driven by
// the address generation unit. Timing is that of mem_bank: read data one
// clock after the read address. Eight 8-bit dual-port banks with in-place
// use follow the source design; the real/imaginary split of a sample over a
// bank pair is this design's choice.
module fft_ram
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              we    [N_BANKS],
  input  logic [ADDR_W-1:0] waddr [N_BANKS],
  input  logic [DATA_W-1:0] wdata [N_BANKS],
  input  logic [ADDR_W-1:0] raddr [N_BANKS],
  output logic [DATA_W-1:0] rdata [N_BANKS]
);

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    mem_bank #(.W(DATA_W), .DEPTH(BANK_DEPTH)) u_bank (
      .clk  (clk),
      .we   (we[b]),
      .waddr(waddr[b]),
      .wdata(wdata[b]),
      .raddr(raddr[b]),
      .rdata(rdata[b])
    );
  end

endmodule

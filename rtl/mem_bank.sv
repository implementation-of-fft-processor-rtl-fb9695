// mem_bank: one dual-port memory bank of the FFT's in-place store.
//
// DEPTH words of W bits with one write port and one read port that work in
// the same clock. The read is synchronous: rdata holds mem[raddr] one clock
// after raddr. A read of the word being written in the same clock returns
// the old word. The contents are not reset; the FFT always writes all 64
// samples before it reads any. Eight 8-bit dual-port banks follow the source
// design; the depth of 16 (64 samples over four bank pairs) and the
// read-before-write behaviour are this design's choices.
module mem_bank #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

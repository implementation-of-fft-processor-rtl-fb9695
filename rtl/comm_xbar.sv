// comm_xbar: the switch a commutator is made of, N outputs each driven by
// an N-to-1 multiplexer: out[j] = in[sel[j]]. With N = 8 these are the
// 8-to-1 multiplexers of the source design's commutators. Combinational.
module comm_xbar #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic [W-1:0]  in  [N],
  input  logic [SW-1:0] sel [N],
  output logic [W-1:0]  out [N]
);

  always_comb begin
    for (int j = 0; j < N; j++) out[j] = in[sel[j]];
  end

endmodule

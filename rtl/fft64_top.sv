// fft64_top: 64-point radix-4 FFT processor, memory based, with Vedic
// (Urdhva-Tiryakbhyam) multipliers and CORDIC-generated twiddles.
//
// Data path: the control unit sequences load, three stages of 16
// butterflies, and unload; the address generation unit turns its counters
// into bank addresses and routing controls; eight dual-port 8-bit banks
// hold the 64 complex samples in place; commutator2 steers input samples
// into the banks and results out; commutator1 steers the four legs of each
// butterfly from the banks into the radix-4 processing unit and its four
// results back over them; the twiddle generator computes the three
// twiddles of each butterfly by CORDIC.
//
// Interface and timing:
//   start      one-clock pulse in idle; the 64 samples are taken on din in
//              the 64 clocks after it, sample n in the n-th clock.
//   dit        sampled with start: 0 selects decimation in frequency, 1
//              decimation in time. Both give the same transform and the
//              same timing; they differ in the order of the stages, where
//              the twiddles are applied, and the rounding error.
//   busy       high while the butterflies run and the results are read out.
//   dout, dout_valid, dout_index
//              X[0..63] in natural order, one per clock, 119 clocks after
//              the last sample (54 of compute, 65 of unload).
//   done       one-clock pulse with X[63].
// The result is the DFT X[k] = sum x[n] exp(-j*2*pi*n*k/64) scaled by 1/64
// (1/4 per stage), parts rounded to 8-bit two's complement. The block
// structure follows the source design; the scaling, the sample format and
// the exact cycle timing are this design's choices.
module fft64_top
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             dit,
  input  cplx_t            din,
  output logic             busy,
  output cplx_t            dout,
  output logic             dout_valid,
  output logic [IDX_W-1:0] dout_index,
  output logic             done
);

  phase_e            phase;
  logic [IDX_W-1:0]  cnt;
  logic [1:0]        stage;
  logic              dit_mode;

  control_unit u_ctrl (
    .clk, .rst_n, .start, .dit, .dit_mode,
    .phase, .cnt, .stage, .busy
  );

  logic [ADDR_W-1:0] raddr [N_BANKS];
  logic [ADDR_W-1:0] waddr [N_BANKS];
  logic              we    [N_BANKS];
  logic              load, pu_en;
  logic [IDX_W-1:0]  tw_p;
  logic [1:0]        rd_rot, wr_rot, out_lane;

  agu u_agu (
    .clk, .rst_n, .phase, .cnt, .stage, .dit(dit_mode),
    .raddr, .waddr, .we, .load, .tw_p,
    .rd_rot, .pu_en, .wr_rot,
    .out_lane, .out_valid(dout_valid), .out_index(dout_index)
  );

  logic [DATA_W-1:0] bank_rdata [N_BANKS];
  logic [DATA_W-1:0] bank_wdata [N_BANKS];
  logic [DATA_W-1:0] bfly_wdata [N_BANKS];

  fft_ram u_ram (
    .clk, .we, .waddr, .wdata(bank_wdata), .raddr, .rdata(bank_rdata)
  );

  logic signed [TW_W-1:0] tw_re [3], tw_im [3];

  twiddle_gen u_twiddle (
    .clk, .rst_n, .p(tw_p), .tw_re, .tw_im
  );

  logic signed [DATA_W-1:0] a_re [N_LANES], a_im [N_LANES];
  logic signed [DATA_W-1:0] y_re [N_LANES], y_im [N_LANES];

  radix4_pu u_pu (
    .clk, .rst_n, .en(pu_en), .dit(dit_mode),
    .a_re, .a_im, .w_re(tw_re), .w_im(tw_im),
    .y_re, .y_im
  );

  commutator1 u_comm1 (
    .rd_rot, .bank_rdata, .a_re, .a_im,
    .wr_rot, .y_re, .y_im, .bank_wdata(bfly_wdata)
  );

  commutator2 u_comm2 (
    .load, .din, .bfly_wdata, .bank_wdata,
    .out_lane, .bank_rdata, .dout
  );

  assign done = dout_valid && (dout_index == IDX_W'(N_POINTS - 1));

endmodule

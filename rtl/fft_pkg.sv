// fft_pkg: types and constants shared by the 64-point radix-4 FFT processor.
//
// The processor transforms 64 complex samples with three radix-4 stages of
// 16 butterflies each, held in place in eight dual-port banks. Every bank is
// DATA_W = 8 bits wide; a complex sample takes two banks (real and
// imaginary), so the eight banks form four complex lanes, one per butterfly
// leg. The 64 points, the radix, the eight banks and their 8-bit width follow
// the source design. The twiddle width, the sample format (two's complement)
// and the bank numbering are this implementation's choices.
package fft_pkg;

  localparam int unsigned N_POINTS  = 64;              // transform length
  localparam int unsigned RADIX     = 4;
  localparam int unsigned N_STAGES  = 3;               // log4(64)
  localparam int unsigned N_BFLY    = N_POINTS / RADIX; // butterflies per stage
  localparam int unsigned N_BANKS   = 8;               // 8-bit banks
  localparam int unsigned N_LANES   = N_BANKS / 2;     // complex lanes
  localparam int unsigned BANK_DEPTH = N_POINTS / N_LANES; // 16 words
  localparam int unsigned ADDR_W    = $clog2(BANK_DEPTH);  // 4
  localparam int unsigned IDX_W     = $clog2(N_POINTS);    // 6
  localparam int unsigned DATA_W    = 8;   // bits of one real or imaginary part
  localparam int unsigned TW_W      = 8;   // bits of one twiddle part
  localparam int unsigned TW_FRAC   = TW_W - 2; // twiddle fraction bits: 1.0 = 64
  // Clocks from a butterfly's read address to its write into the banks:
  // bank read (1), processing unit register (1). The control unit waits
  // this long between stages so that a stage never reads stale data.
  localparam int unsigned PIPE_DEPTH = 2;

  // One complex sample as it is stored: real part in bank 2*lane,
  // imaginary part in bank 2*lane+1.
  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW_W-1:0] re;
    logic signed [TW_W-1:0] im;
  } twid_t;

  // Phases of a transform, set by the control unit.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_LOAD   = 3'd1,   // 64 samples clocked into the banks
    PH_CALC   = 3'd2,   // 16 butterflies of one stage are issued
    PH_DRAIN  = 3'd3,   // pipeline empties before the next stage
    PH_UNLOAD = 3'd4    // 64 results read out in natural order
  } phase_e;

  // Complex lane (bank pair) that holds point idx: the sum of its three
  // base-4 digits modulo 4. The four points of any butterfly differ in
  // exactly one digit, so they always sit in four different lanes.
  function automatic logic [1:0] lane_of(input logic [IDX_W-1:0] idx);
    return idx[5:4] + idx[3:2] + idx[1:0];
  endfunction

  // Word address of point idx inside its lane.
  function automatic logic [ADDR_W-1:0] addr_of(input logic [IDX_W-1:0] idx);
    return idx[5:2];
  endfunction

  // Base-4 digit reversal: a DIF transform leaves X[k] at digit_rev(k).
  function automatic logic [IDX_W-1:0] digit_rev(input logic [IDX_W-1:0] idx);
    return {idx[1:0], idx[3:2], idx[5:4]};
  endfunction

endpackage

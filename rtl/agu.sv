// agu: address generation unit. From the control unit's phase, counter and
// stage it drives the eight read and eight write address buses of the
// banks, their write enables, the commutator controls and the twiddle
// exponent, each delayed to the clock in which it is used.
//
// Storage map: point i (0..63, base-4 digits d2 d1 d0) lives in complex
// lane (d2 + d1 + d0) mod 4 at word i[5:2] of that lane; see fft_pkg.
// Load (clock t): sample cnt is written at once into its lane (DIF).
// Compute: in stage s butterfly k (= cnt[3:0]) takes the four points whose
// digit 2-s is m = 0..3 and whose other digits are those of k. They lie in
// lanes (rot + m) mod 4 with rot the lane of leg 0, so every lane is read
// once. The twiddle exponent of leg 1 is p = n * 4^s, where n is the value
// of the digits below digit 2-s; it never exceeds 15, so tw_p[5:4] is
// always zero (the twiddle generator forms 2p and 3p itself). Read addresses and p are given at clock t,
// rd_rot and pu_en at t+1 (data out of the banks), write addresses,
// enables and wr_rot at t+2 (result out of the processing unit).
// Unload (clock t): result X[cnt] is read from position digit_rev(cnt)
// (DIF);
// out_lane, out_valid and out_index follow at t+1 with the data.
//
// Decimation in time (dit = 1) runs the same three address patterns in the
// opposite order (stage s of DIT uses the pattern of DIF stage 2-s, with
// the same exponents), loads sample n at position digit_rev(n) and reads
// result X[k] from position k.
//
// The AGU's role, its 8 + 8 address buses and the in-place write-back
// follow the source design; the storage map, the stage order and the
// pipeline alignment are this design's choices.
module agu
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  phase_e            phase,
  input  logic [IDX_W-1:0]  cnt,
  input  logic [1:0]        stage,
  input  logic              dit,
  output logic [ADDR_W-1:0] raddr [N_BANKS],
  output logic [ADDR_W-1:0] waddr [N_BANKS],
  output logic              we    [N_BANKS],
  output logic              load,          // commutator2 input routing
  output logic [IDX_W-1:0]  tw_p,          // twiddle exponent, clock t
  output logic [1:0]        rd_rot,        // clock t+1
  output logic              pu_en,         // clock t+1
  output logic [1:0]        wr_rot,        // clock t+2
  output logic [1:0]        out_lane,      // clock t+1
  output logic              out_valid,     // clock t+1
  output logic [IDX_W-1:0]  out_index      // clock t+1
);

  logic [3:0]        k;
  logic [1:0]        pat;                   // address pattern (DIF stage)
  logic [IDX_W-1:0]  in_pos;
  logic [IDX_W-1:0]  leg_idx [N_LANES];
  logic [1:0]        rot;
  logic [ADDR_W-1:0] lane_addr [N_LANES];   // compute address per lane
  logic              calc;
  logic [IDX_W-1:0]  out_pos;

  assign k    = cnt[3:0];
  assign pat  = dit ? 2'(2'd2 - stage) : stage;
  assign calc = (phase == PH_CALC);
  assign load = (phase == PH_LOAD);

  always_comb begin
    for (int m = 0; m < N_LANES; m++) begin
      unique case (pat)
        2'd0:    leg_idx[m] = {2'(m), k[3:2], k[1:0]};
        2'd1:    leg_idx[m] = {k[3:2], 2'(m), k[1:0]};
        default: leg_idx[m] = {k[3:2], k[1:0], 2'(m)};
      endcase
    end
    rot = lane_of(leg_idx[0]);
    // lane l holds leg (l - rot) mod 4
    for (int l = 0; l < N_LANES; l++) begin
      lane_addr[l] = addr_of(leg_idx[2'(2'(l) - rot)]);
    end
    unique case (pat)
      2'd0:    tw_p = {2'b00, k};
      2'd1:    tw_p = {2'b00, k[1:0], 2'b00};
      default: tw_p = '0;
    endcase
    out_pos = dit ? cnt : digit_rev(cnt);
    in_pos  = dit ? digit_rev(cnt) : cnt;
  end

  // Read addresses, clock t.
  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      if (calc) raddr[b] = lane_addr[b >> 1];
      else      raddr[b] = addr_of(out_pos);
    end
  end

  // Pipeline of the compute write-back and of the unload.
  logic              v1, v2;
  logic [1:0]        rot1, rot2;
  logic [ADDR_W-1:0] wa1 [N_LANES], wa2 [N_LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0;
      rot1 <= '0; rot2 <= '0;
      for (int l = 0; l < N_LANES; l++) begin
        wa1[l] <= '0;
        wa2[l] <= '0;
      end
      out_lane  <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
    end else begin
      v1   <= calc;
      v2   <= v1;
      rot1 <= rot;
      rot2 <= rot1;
      wa1  <= lane_addr;
      wa2  <= wa1;
      out_lane  <= lane_of(out_pos);
      out_valid <= (phase == PH_UNLOAD);
      out_index <= cnt;
    end
  end

  assign rd_rot = rot1;
  assign pu_en  = v1;
  assign wr_rot = rot2;

  // Write addresses and enables: load at clock t, compute at t+2.
  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      if (load) begin
        waddr[b] = addr_of(in_pos);
        we[b]    = (2'(b >> 1) == lane_of(in_pos));
      end else begin
        waddr[b] = wa2[b >> 1];
        we[b]    = v2;
      end
    end
  end

  // The four legs of a butterfly always fall in four different lanes.
  a_lanes_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    calc |-> lane_of(leg_idx[1]) == 2'(rot + 2'd1) &&
             lane_of(leg_idx[2]) == 2'(rot + 2'd2) &&
             lane_of(leg_idx[3]) == 2'(rot + 2'd3));

endmodule

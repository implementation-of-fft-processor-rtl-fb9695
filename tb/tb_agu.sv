// tb_agu: drives the address generation unit through a load, the three
// stages with their drain clocks, and an unload, and checks every output
// against a reference storage map written from the radix-4 index
// arithmetic: in stage s (span 16, 4, 1) butterfly k = g*span + n takes
// points g*4*span + n + m*span with twiddle exponent n*4^s; point i sits
// in lane (i/16 + i/4 + i) mod 4 of its digits at word i/4; result k is
// read from the base-4 digit reversal of k. In decimation in time the stage
// patterns run in the opposite order, sample n is loaded at the digit
// reversal of n and result k is read from k. Both modes are run.
// Registered outputs are checked one (read side, unload) or two
// (write-back) clocks later.
module tb_agu;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  phase_e phase = PH_IDLE;
  logic [5:0] cnt = '0;
  logic [1:0] stage = '0;
  logic dit = 1'b0;
  logic [3:0] raddr [8], waddr [8];
  logic we [8];
  logic load, pu_en, out_valid;
  logic [5:0] tw_p, out_index;
  logic [1:0] rd_rot, wr_rot, out_lane;
  int checks = 0, failures = 0;

  agu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_lane(input int i);
    return (i / 16 + (i / 4) % 4 + i % 4) % 4;
  endfunction

  function automatic int ref_rev(input int k);
    return (k % 4) * 16 + ((k / 4) % 4) * 4 + k / 16;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // schedule
  phase_e sph [300];
  int     scn [300], sst [300];
  int     ns = 0;

  // expectations per clock
  int exp_rot [300], exp_addr [300][4];
  bit exp_calc [300], exp_unl [300];
  int exp_lane_out [300], exp_idx [300];

  initial begin
    sph[ns] = PH_IDLE; scn[ns] = 0; sst[ns] = 0; ns++;
    for (int i = 0; i < 64; i++) begin sph[ns] = PH_LOAD; scn[ns] = i; sst[ns] = 0; ns++; end
    for (int s = 0; s < 3; s++) begin
      for (int k = 0; k < 16; k++) begin sph[ns] = PH_CALC; scn[ns] = k; sst[ns] = s; ns++; end
      for (int d = 0; d < 2; d++) begin sph[ns] = PH_DRAIN; scn[ns] = 0; sst[ns] = s; ns++; end
    end
    for (int k = 0; k < 64; k++) begin sph[ns] = PH_UNLOAD; scn[ns] = k; sst[ns] = 2; ns++; end
    for (int d = 0; d < 3; d++) begin sph[ns] = PH_IDLE; scn[ns] = 0; sst[ns] = 0; ns++; end

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++)
    for (int c = 0; c < ns; c++) begin
      int pat, in_pos, out_pos;
      @(negedge clk);
      phase = sph[c]; cnt = 6'(scn[c]); stage = 2'(sst[c]); dit = 1'(pass);
      #1;
      pat     = pass ? 2 - sst[c] : sst[c];
      in_pos  = pass ? ref_rev(scn[c]) : scn[c];
      out_pos = pass ? scn[c] : ref_rev(scn[c]);
      exp_calc[c] = 1'b0;
      exp_unl[c]  = 1'b0;
      // outputs of clock c
      chk(load == (phase == PH_LOAD), $sformatf("clock %0d load", c));
      if (phase == PH_LOAD) begin
        for (int b = 0; b < 8; b++)
          chk(we[b] == (b / 2 == ref_lane(in_pos)) && waddr[b] == 4'(in_pos / 4),
              $sformatf("load sample %0d bank %0d", scn[c], b));
      end
      if (phase == PH_CALC) begin
        int span, g, n, idx, seen;
        span = 16 >> (2 * pat);
        g = scn[c] / span;
        n = scn[c] % span;
        seen = 0;
        for (int m = 0; m < 4; m++) begin
          idx = g * 4 * span + n + m * span;
          seen |= 1 << ref_lane(idx);
          exp_addr[c][ref_lane(idx)] = idx / 4;
          chk(raddr[2 * ref_lane(idx)] == 4'(idx / 4) && raddr[2 * ref_lane(idx) + 1] == 4'(idx / 4),
              $sformatf("stage %0d bfly %0d leg %0d read address", sst[c], scn[c], m));
        end
        chk(seen == 15, $sformatf("stage %0d bfly %0d lanes not distinct", sst[c], scn[c]));
        chk(int'(tw_p) == n * (1 << (2 * pat)), $sformatf("stage %0d bfly %0d exponent %0d", sst[c], scn[c], tw_p));
        exp_rot[c]  = ref_lane(g * 4 * span + n);
        exp_calc[c] = 1'b1;
      end
      if (phase == PH_UNLOAD) begin
        for (int b = 0; b < 8; b++)
          chk(raddr[b] == 4'(out_pos / 4), $sformatf("unload %0d read address", scn[c]));
        exp_unl[c] = 1'b1;
        exp_lane_out[c] = ref_lane(out_pos);
        exp_idx[c] = scn[c];
      end
      // read-side outputs for clock c-1
      if (c >= 1) begin
        chk(pu_en == exp_calc[c-1], $sformatf("clock %0d pu_en", c));
        if (exp_calc[c-1]) chk(int'(rd_rot) == exp_rot[c-1], $sformatf("clock %0d rd_rot", c));
        chk(out_valid == exp_unl[c-1], $sformatf("clock %0d out_valid", c));
        if (exp_unl[c-1]) chk(int'(out_lane) == exp_lane_out[c-1] && int'(out_index) == exp_idx[c-1],
                              $sformatf("clock %0d out_lane/out_index", c));
      end
      // write-back for clock c-2
      if (c >= 2 && phase != PH_LOAD) begin
        for (int b = 0; b < 8; b++) begin
          chk(we[b] == exp_calc[c-2], $sformatf("clock %0d we[%0d]", c, b));
          if (exp_calc[c-2]) chk(int'(waddr[b]) == exp_addr[c-2][b / 2], $sformatf("clock %0d waddr[%0d]", c, b));
        end
        if (exp_calc[c-2]) chk(int'(wr_rot) == exp_rot[c-2], $sformatf("clock %0d wr_rot", c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

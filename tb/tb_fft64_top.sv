// tb_fft64_top: end-to-end test of the 64-point FFT processor at its
// default sizes.
//
// Runs several complete transforms (impulse, DC, single tones, random
// samples, back to back), each in decimation in frequency and again in
// decimation in time, and compares every result with a
// double-precision DFT divided by 64, allowing TOL LSBs of rounding error
// per part. It also checks the cycle timing (64 load clocks, 3 x 16
// butterflies, 64 results in consecutive clocks in natural order, the same
// for both modes), that
// busy covers the run, and that the mechanisms of the design each happen:
// input load, the three stages with their pipeline drain, twiddles from
// every quadrant the transform uses, the in-order unload, a start pulse
// ignored while busy, and both DIF and DIT transforms.
module tb_fft64_top;
  import fft_pkg::*;

  localparam int TOL = 3;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, dit = 1'b0;
  cplx_t din = '0;
  logic busy, dout_valid, done;
  cplx_t dout;
  logic [IDX_W-1:0] dout_index;

  fft64_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_bfly [3] = '{0, 0, 0};
  int n_dit = 0, n_dif = 0, n_drain = 0, n_quad [4] = '{0, 0, 0, 0}, n_loaded = 0, n_out = 0, n_ignored = 0;

  // Watchdog.
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled on every clock.
  always @(posedge clk) if (rst_n) begin
    if (dut.phase == PH_CALC) n_bfly[dut.stage]++;
    if (dut.phase == PH_DRAIN) n_drain++;
    if (dut.phase == PH_LOAD) n_loaded++;
    if (dut.phase == PH_CALC) for (int m = 1; m < 4; m++) n_quad[2'(IDX_W'(m * dut.tw_p) >> 4)]++;
    if (dut.phase == PH_CALC || dut.phase == PH_DRAIN) begin
      checks++;
      if (!busy) begin failures++; $display("busy low during compute"); end
    end
  end

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int xr [64], xi [64];

  task automatic run_fft(input string name, input bit poke_start);
    for (int mode = 0; mode < 2; mode++) run_one($sformatf("%s/%s", name, (mode != 0) ? "dit" : "dif"), poke_start && mode == 0, 1'(mode));
  endtask

  task automatic run_one(input string name, input bit poke_start, input bit use_dit);
    real er, ei, ang;
    int  cyc, first_out, got_r, got_i, expect_idx;
    // start pulse
    @(negedge clk);
    start = 1'b1;
    dit   = use_dit;
    @(negedge clk);
    start = 1'b0;
    dit   = ~use_dit;   // must have been sampled with start
    if (use_dit) n_dit++; else n_dif++;
    cyc = 1;
    for (int n = 0; n < 64; n++) begin
      din.re = 8'(xr[n]);
      din.im = 8'(xi[n]);
      @(negedge clk);
      cyc++;
    end
    din = '0;
    // wait for results, poking start once while busy
    expect_idx = 0;
    first_out  = -1;
    while (expect_idx < 64) begin
      if (poke_start && busy && cyc == 80) begin
        start = 1'b1;
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(posedge clk);
      #1;
      cyc++;
      if (dout_valid) begin
        if (first_out < 0) first_out = cyc;
        check(dout_index == IDX_W'(expect_idx), $sformatf("%s: index %0d, expected %0d", name, dout_index, expect_idx));
        er = 0.0; ei = 0.0;
        for (int n = 0; n < 64; n++) begin
          ang = -2.0 * PI * real'(n * expect_idx) / 64.0;
          er += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
          ei += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
        end
        er /= 64.0; ei /= 64.0;
        got_r = int'(dout.re);
        got_i = int'(dout.im);
        check(fabs(real'(got_r) - er) <= real'(TOL) && fabs(real'(got_i) - ei) <= real'(TOL),
              $sformatf("%s: X[%0d] = (%0d,%0d), expected (%0.2f,%0.2f)", name, expect_idx, got_r, got_i, er, ei));
        check(done == (expect_idx == 63), $sformatf("%s: done at %0d", name, expect_idx));
        check(first_out + expect_idx == cyc, $sformatf("%s: results not in consecutive clocks", name));
        expect_idx++;
        n_out++;
      end
      @(negedge clk);
    end
    start = 1'b0;
    // latency: clocks from the start edge to the first result
    check(first_out == 1 + 64 + 3 * (N_BFLY + PIPE_DEPTH) + 1,
          $sformatf("%s: first result after %0d clocks", name, first_out));
    @(negedge clk);
    check(!busy && dut.phase == PH_IDLE, $sformatf("%s: not idle after the unload", name));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // impulse
    for (int n = 0; n < 64; n++) begin xr[n] = (n == 0) ? 127 : 0; xi[n] = 0; end
    run_fft("impulse", 1'b0);
    // DC
    for (int n = 0; n < 64; n++) begin xr[n] = 100; xi[n] = -50; end
    run_fft("dc", 1'b0);
    // complex tones at bins 1, 5 and 37
    foreach (xr[n]) begin
      xr[n] = int'(100.0 * $cos(2.0 * PI * 5.0 * n / 64.0));
      xi[n] = int'(100.0 * $sin(2.0 * PI * 5.0 * n / 64.0));
    end
    run_fft("tone5", 1'b1);
    foreach (xr[n]) begin
      xr[n] = int'(60.0 * $cos(2.0 * PI * 1.0 * n / 64.0) + 40.0 * $cos(2.0 * PI * 37.0 * n / 64.0));
      xi[n] = int'(60.0 * $sin(2.0 * PI * 1.0 * n / 64.0) + 40.0 * $sin(2.0 * PI * 37.0 * n / 64.0));
    end
    run_fft("tone1_37", 1'b0);
    // random samples, two transforms back to back
    for (int t = 0; t < 4; t++) begin
      foreach (xr[n]) begin
        xr[n] = int'($urandom_range(200)) - 100;
        xi[n] = int'($urandom_range(200)) - 100;
      end
      run_fft($sformatf("random%0d", t), 1'b0);
    end

    // mechanisms
    for (int s = 0; s < 3; s++)
      check(n_bfly[s] == 16 * 16, $sformatf("stage %0d ran %0d butterflies in 16 transforms", s, n_bfly[s]));
    check(n_drain == 16 * 3 * PIPE_DEPTH, $sformatf("drain clocks %0d", n_drain));
    check(n_loaded == 16 * 64, $sformatf("loaded %0d samples", n_loaded));
    check(n_out == 16 * 64, $sformatf("unloaded %0d results", n_out));
    check(n_quad[0] > 0 && n_quad[1] > 0 && n_quad[2] > 0, "twiddle quadrants 0..2 all used");
    check(n_ignored == 1, "start pulse while busy exercised");
    check(n_dif == 8 && n_dit == 8, "both DIF and DIT transforms run");
    $display("modes: DIF %0d, DIT %0d", n_dif, n_dit);
    $display("mechanisms: butterflies %0d/%0d/%0d, drain %0d, loads %0d, outputs %0d, quadrants %0d/%0d/%0d/%0d, ignored starts %0d",
             n_bfly[0], n_bfly[1], n_bfly[2], n_drain, n_loaded, n_out,
             n_quad[0], n_quad[1], n_quad[2], n_quad[3], n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_control_unit: checks the sequence of one transform clock by clock:
// after the start pulse 64 load clocks with the counter 0..63, then for
// each of the three stages 16 butterfly clocks (counter 0..15) and
// PIPE_DEPTH drain clocks, then 64 unload clocks, then idle; busy exactly
// over compute and unload; a start pulse while busy is ignored; and two
// transforms run back to back; the mode on dit is taken with the start
// pulse and held through the transform.
module tb_control_unit;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, dit = 1'b0;
  logic dit_mode;
  phase_e phase;
  logic [5:0] cnt;
  logic [1:0] stage;
  logic busy;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_clock(input phase_e ph, input int c, input int s, input bit b, input string what);
    @(negedge clk);
    checks++;
    if (phase != ph || int'(cnt) != c || (ph == PH_CALC && int'(stage) != s) || busy != b ||
        (ph != PH_IDLE && dit_mode != mode_q)) begin
      failures++;
      $display("FAIL: %s: phase %0d cnt %0d stage %0d busy %0d, expected %0d %0d %0d %0d",
               what, phase, cnt, stage, busy, ph, c, s, b);
    end
  endtask

  bit mode_q;

  task automatic one_transform(input bit poke, input bit mode);
    start = 1'b1;
    dit = mode;
    mode_q = mode;
    @(negedge clk);
    start = 1'b0;
    dit = ~mode;
    // the clock in which start was sampled has passed; now loading
    checks++;
    if (phase != PH_LOAD || cnt != 0) begin failures++; $display("FAIL: no load after start"); end
    for (int i = 1; i < 64; i++) expect_clock(PH_LOAD, i, 0, 1'b0, "load");
    for (int s = 0; s < 3; s++) begin
      for (int k = 0; k < 16; k++) begin
        if (poke && s == 1 && k == 3) start = 1'b1;
        expect_clock(PH_CALC, k, s, 1'b1, "calc");
        start = 1'b0;
      end
      for (int d = 0; d < PIPE_DEPTH; d++) expect_clock(PH_DRAIN, 0, s, 1'b1, "drain");
    end
    for (int i = 0; i < 64; i++) expect_clock(PH_UNLOAD, i, 0, 1'b1, "unload");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) expect_clock(PH_IDLE, 0, 0, 1'b0, "idle after reset");
    one_transform(1'b1, 1'b1);
    expect_clock(PH_IDLE, 0, 0, 1'b0, "idle after transform");
    one_transform(1'b0, 1'b0);
    repeat (3) expect_clock(PH_IDLE, 0, 0, 1'b0, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

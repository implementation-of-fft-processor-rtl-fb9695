// control_unit: sequences one 64-point transform from Start to the last
// result, and drives Busy.
//
// A one-clock start pulse in IDLE opens the load phase: a 6-bit counter
// steps through the 64 input samples, one per clock, in the 64 clocks that
// follow the pulse. Busy then rises and the three radix-4 stages run: in
// each stage the counter issues the 16 butterflies, one per clock, and the
// unit waits PIPE_DEPTH clocks for the last results to reach the banks
// before the next stage starts. The unload phase then steps the counter
// through the 64 results, one per clock, and the unit returns to IDLE.
// Busy is high from the first butterfly to the last read of the unload.
// A start pulse outside IDLE is ignored. The dit input is sampled with
// the start pulse and held in dit_mode for the whole transform (0:
// decimation in frequency, 1: decimation in time).
//
// Timing: load 64 clocks, compute 3 * (16 + PIPE_DEPTH) = 54 clocks, unload
// 64 clocks; the results leave the processor one clock after their reads.
// Start, Busy, the 6-bit load counter, the 16 butterflies per stage and
// the choice of DIF or DIT follow the source design; the drain wait and the unload phase are this
// design's choices.
module control_unit
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             dit,
  output logic             dit_mode,
  output phase_e           phase,
  output logic [IDX_W-1:0] cnt,     // sample index, or butterfly in cnt[3:0]
  output logic [1:0]       stage,   // 0 .. N_STAGES-1
  output logic             busy
);

  localparam int unsigned DW_CNT = $clog2(PIPE_DEPTH + 1);

  logic [DW_CNT-1:0] drain_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      cnt       <= '0;
      stage     <= '0;
      drain_cnt <= '0;
      dit_mode  <= 1'b0;
    end else begin
      unique case (phase)
        PH_IDLE: begin
          cnt   <= '0;
          stage <= '0;
          if (start) begin
            phase    <= PH_LOAD;
            dit_mode <= dit;
          end
        end
        PH_LOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == IDX_W'(N_POINTS - 1)) phase <= PH_CALC;
        end
        PH_CALC: begin
          drain_cnt <= '0;
          if (cnt == IDX_W'(N_BFLY - 1)) begin
            cnt   <= '0;
            phase <= PH_DRAIN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        PH_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == DW_CNT'(PIPE_DEPTH - 1)) begin
            if (stage == 2'(N_STAGES - 1)) begin
              phase <= PH_UNLOAD;
            end else begin
              stage <= stage + 1'b1;
              phase <= PH_CALC;
            end
          end
        end
        PH_UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == IDX_W'(N_POINTS - 1)) phase <= PH_IDLE;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign busy = (phase == PH_CALC) || (phase == PH_DRAIN) || (phase == PH_UNLOAD);

  // The butterfly counter never leaves 0..15 while a stage runs.
  a_calc_range: assert property (@(posedge clk) disable iff (!rst_n)
    phase == PH_CALC |-> cnt < IDX_W'(N_BFLY));

endmodule

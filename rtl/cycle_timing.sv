// cycle_timing: sequences the work of one sample.
//
// Waits in PH_IDLE for a sample tick. If the sample starts a pitch period
// and the memory buffer holds a complete frame, it first spends 20 clocks in
// PH_LOAD shifting the new coefficients into the coefficient memory, 'xfer'
// on the last of them handing over the frame header. Then 20 clocks in PH_RUN,
// one arithmetic step each: section 0..9, first and second step. Then one
// clock in PH_DONE ('step'), which ends the sample, then back to PH_IDLE. A
// sample therefore takes 22 clocks, or 42 with a load, from the tick to the
// return to idle. A tick that arrives while a sample is still in progress is
// dropped and sets the sticky 'overrun' flag (cleared by 'clear'). The
// document names this block and gives the 20-step sequence (two steps per
// section, ten sections); the state machine, the load phase and the overrun
// flag are this design's.
module cycle_timing
  import fs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_tick,
  input  logic    period_start,
  input  logic    frame_full,
  input  logic    clear,
  output au_ctl_t ctl,
  output logic    load,
  output logic    xfer,
  output logic    run,
  output logic    step,
  output logic    overrun
);
  phase_e            phase;
  logic [STEP_W-1:0] cnt;

  assign ctl.phase  = phase;
  assign ctl.sect   = SECT_W'(cnt >> 1);
  assign ctl.second = cnt[0];
  assign load       = (phase == PH_LOAD);
  assign xfer       = load && (cnt == STEP_W'(N_STEP - 1));
  assign run        = (phase == PH_RUN);
  assign step       = (phase == PH_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= PH_IDLE;
      cnt     <= '0;
      overrun <= 1'b0;
    end else begin
      if (clear) overrun <= 1'b0;
      if (sample_tick && phase != PH_IDLE) overrun <= 1'b1;
      unique case (phase)
        PH_IDLE: if (sample_tick) begin
          cnt   <= '0;
          phase <= (period_start && frame_full) ? PH_LOAD : PH_RUN;
        end
        PH_LOAD: begin
          cnt <= (cnt == STEP_W'(N_STEP - 1)) ? '0 : cnt + 1'b1;
          if (cnt == STEP_W'(N_STEP - 1)) phase <= PH_RUN;
        end
        PH_RUN: begin
          cnt <= (cnt == STEP_W'(N_STEP - 1)) ? '0 : cnt + 1'b1;
          if (cnt == STEP_W'(N_STEP - 1)) phase <= PH_DONE;
        end
        PH_DONE: phase <= PH_IDLE;
        default: phase <= PH_IDLE;
      endcase
    end
  end
endmodule

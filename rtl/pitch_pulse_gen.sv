// pitch_pulse_gen: marks one sample in every P as the start of a pitch period.
//
// A down-counter holds the samples left in the current period. While it is
// zero the current sample is a period start: 'pulse' is high, the unit pulse
// is emitted and the synthesizer may load new parameters. At the end of the
// sample ('step'), the counter reloads with P-1 from 'pitch' (the period just
// loaded) or counts down. P = 0 is taken as 1. The document gives the function
// (a unit pulse once every P samples, parameters changed at the start of each
// period); the counter is this design's own.
//
// Timing: 'pulse' is valid for the whole sample; 'step' is one clock at its end.
module pitch_pulse_gen
  import fs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  input  word_t pitch,
  output logic  pulse
);
  word_t cnt;

  assign pulse = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt <= '0;
    else if (step)  cnt <= pulse ? ((pitch == '0) ? '0 : pitch - 1'b1) : cnt - 1'b1;
  end
endmodule

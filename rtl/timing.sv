// timing: derives the sample rate from the external clock.
//
// The sampling rate is set by an external clock, so it can be changed without
// touching the synthesizer, as the document describes. That clock is brought
// into the system clock domain through a two-flop synchronizer; each rising
// edge gives one 'sample_tick' pulse, one system clock long, two to three
// clocks after the edge. The synchronizer and edge detector are this
// design's. The system clock must run at least four times faster than the
// external clock.
module timing (
  input  logic clk,
  input  logic rst_n,
  input  logic ext_clk,
  output logic sample_tick
);
  logic [2:0] sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], ext_clk};
  end

  assign sample_tick = sync[1] && !sync[2];
endmodule

// pulse_noise_gen: the two excitation sources and their amplitude controls.
//
// Holds the pitch period P, the voice amplitude A_V, the noise amplitude A_N
// and the whisper switch, all taken from the memory buffer on 'xfer'. It
// contains the pitch pulse generator and the noise generator and forms:
//   exc_voiced = A_V on the first sample of each pitch period, else 0;
//                with 'whisper' set, +A_V or -A_V from the noise bit instead
//   exc_noise  = +A_N or -A_N from the noise bit
// A 16-bit amplitude sits in the top 16 of the 24 signal bits (scaled by 2^8).
// Because the sources are a unit pulse and a +/-1 pulse stream, the two
// amplitude "multipliers" reduce to select and negate. The sources, the
// switch and the amplitudes follow the document; the scaling and the reset
// values (P = 100, amplitudes 0) are this design's choice.
//
// Timing: outputs are stable for a whole sample; 'step' (one clock at the end
// of a sample) advances the pitch counter and the noise register.
module pulse_noise_gen
  import fs_pkg::*;
#(
  parameter word_t RESET_PITCH = 16'd100
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       xfer,        // new frame header valid this clock
  input  frame_hdr_t hdr,
  input  logic       step,        // end of sample
  output logic       period_start,
  output sample_t    exc_voiced,
  output sample_t    exc_noise
);
  localparam int unsigned SHIFT = DATA_W - COEF_W;

  word_t pitch_q;
  coef_t av_q, an_q;
  logic  whisper_q;
  logic  nbit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pitch_q   <= RESET_PITCH;
      av_q      <= '0;
      an_q      <= '0;
      whisper_q <= 1'b0;
    end else if (xfer) begin
      pitch_q   <= hdr.pitch;
      av_q      <= hdr.av;
      an_q      <= hdr.an;
      whisper_q <= hdr.mode.whisper;
    end
  end

  pitch_pulse_gen u_pitch (
    .clk, .rst_n, .step, .pitch(pitch_q), .pulse(period_start)
  );

  noise_gen u_noise (
    .clk, .rst_n, .advance(step), .bit_o(nbit)
  );

  sample_t av_s, an_s;
  assign av_s = sample_t'({av_q, SHIFT'(0)});
  assign an_s = sample_t'({an_q, SHIFT'(0)});

  always_comb begin
    exc_noise = nbit ? an_s : -an_s;
    if (whisper_q)         exc_voiced = nbit ? av_s : -av_s;
    else if (period_start) exc_voiced = av_s;
    else                   exc_voiced = '0;
  end
endmodule

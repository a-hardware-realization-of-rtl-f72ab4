// vf_modulator: voiced fricative modulation of the noise.
//
// For voiced fricatives the noise that excites the unvoiced path must come in
// a short burst once per pitch period rather than as a steady stream. The
// document gives that function and takes the voiced signal from the output of
// the second two-pole filter, but does not give the circuit. This design's
// circuit is a gate: with 'vf_en' set, the noise passes only while the top 16
// bits of that voiced signal exceed the threshold 'thr', and is zero
// otherwise; the threshold sets what fraction of the period is open. With
// 'vf_en' clear the noise passes unchanged. 'vf_en' and 'thr' are taken from
// the frame header on 'xfer'.
//
// Timing: combinational from 'voiced' and 'noise_in'; 'gate_open' shows the
// gate state.
module vf_modulator
  import fs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       xfer,
  input  frame_hdr_t hdr,
  input  sample_t    voiced,
  input  sample_t    noise_in,
  output sample_t    noise_out,
  output logic       gate_open
);
  logic  vf_en_q;
  coef_t thr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vf_en_q <= 1'b0;
      thr_q   <= '0;
    end else if (xfer) begin
      vf_en_q <= hdr.mode.vf_en;
      thr_q   <= hdr.vf_thr;
    end
  end

  coef_t v_top;
  assign v_top     = coef_t'(voiced >>> (DATA_W - COEF_W));
  assign gate_open = !vf_en_q || (v_top > thr_q);
  assign noise_out = gate_open ? noise_in : '0;
endmodule

// formant_synth: digital formant speech synthesizer with one shared
// arithmetic unit.
//
// Signal flow. The voiced path runs an excitation (a pulse of height A_V once
// per pitch period, or A_V-scaled noise when whispering) through six two-pole
// resonators and one two-zero filter; the sixth resonator and the zero model
// a nasal pole-zero pair and cancel each other for non-nasal sounds, and one
// of the resonators serves as the spectral compensation. The unvoiced path
// runs A_N-scaled noise, optionally gated by the voiced signal after the
// second resonator (voiced fricatives), through two two-pole filters and one
// two-zero filter. The two path outputs are summed: the top 16 bits return to
// the computer and 12 selectable bits drive the D/A converter.
//
// Hardware. All ten sections share one arithmetic unit (subtractor,
// multiplier, three-input adder). Their coefficients circulate in a 20-word
// shift register and their delayed variables in another; the cycle timing
// steps the unit through the sections, two steps each, once per sample.
// Control words arrive over a valid/ready word port into the memory buffer
// and take effect at the start of the next pitch period.
//
// Timing. The external clock 'ext_clk' sets the sample rate; each of its
// rising edges starts a sample, which takes 22 system clocks (42 when a new
// frame is loaded). 'out_valid' pulses when 'digital_out' and 'dac_code'
// carry the new sample. 'overflow' (the overflow light) is sticky until
// 'clear'; so is 'overrun', set if a sample starts before the last ended.
//
// The structure (ten sections, 24-bit signals, 16-bit coefficients, 20-word
// shift registers, 16-bit return, 12-bit D/A, bit selector, overflow light)
// follows the document; the step schedule, word layout and handshakes are
// this design's.
module formant_synth
  import fs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ext_clk,
  // control words from the computer
  input  word_t             word_in,
  input  logic              word_valid,
  output logic              word_ready,
  // outputs
  input  logic [3:0]        dac_lsb,
  output logic [OUT_W-1:0]  digital_out,
  output logic              out_valid,
  output logic [DAC_W-1:0]  dac_code,
  output real               analog_out,
  // status
  input  logic              clear,
  output logic              overflow,
  output logic              overrun
);
  // timing
  logic sample_tick;
  timing u_timing (.clk, .rst_n, .ext_clk, .sample_tick);

  // control
  au_ctl_t    ctl;
  logic       load, xfer, run, step, frame_full, period_start;
  coef_t      buf_coef;
  frame_hdr_t hdr;

  memory_buffer u_buf (
    .clk, .rst_n, .word_in, .word_valid, .word_ready, .full(frame_full),
    .load, .xfer, .coef_out(buf_coef), .hdr
  );

  cycle_timing u_cyc (
    .clk, .rst_n, .sample_tick, .period_start, .frame_full, .clear,
    .ctl, .load, .xfer, .run, .step, .overrun
  );

  // excitation
  sample_t exc_voiced, exc_noise, exc_unvoiced, v_tap;
  logic    gate_open;

  pulse_noise_gen u_exc (
    .clk, .rst_n, .xfer, .hdr, .step, .period_start, .exc_voiced, .exc_noise
  );

  vf_modulator u_vf (
    .clk, .rst_n, .xfer, .hdr, .voiced(v_tap), .noise_in(exc_noise),
    .noise_out(exc_unvoiced), .gate_open
  );

  // arithmetic unit and its memories
  sample_t x, d, result, prev_out, new_val;
  coef_t   k;
  logic    au_ovf, acc_ovf, sect_done;

  input_mux u_mux (
    .sect(ctl.sect), .exc_voiced, .exc_unvoiced, .prev_out, .x
  );

  coef_sr u_coef (
    .clk, .rst_n, .shift(run), .load, .load_word(buf_coef), .head(k)
  );

  assign new_val = sect_is_zero(ctl.sect) ? x : result;

  delay_sr u_delay (
    .clk, .rst_n, .shift(run), .second(ctl.second), .new_val, .head(d)
  );

  arith_unit u_au (
    .clk, .rst_n, .en(run), .second(ctl.second), .x, .d, .k, .result,
    .ovf(au_ovf)
  );

  assign sect_done = run && ctl.second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_out <= '0;
      v_tap    <= '0;
    end else if (sect_done) begin
      prev_out <= result;
      if (ctl.sect == SECT_W'(SEC_V_TAP)) v_tap <= result;
    end
  end

  // output
  accumulator u_acc (
    .clk, .rst_n,
    .load_v(sect_done && ctl.sect == SECT_W'(SEC_V_LAST)),
    .add_u (sect_done && ctl.sect == SECT_W'(SEC_U_LAST)),
    .y(result), .dac_lsb, .digital_out, .dac_code, .out_valid, .ovf(acc_ovf)
  );

  dac12 u_dac (.clk, .load(out_valid), .code(dac_code), .vout(analog_out));

  // overflow light
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           overflow <= 1'b0;
    else if ((run && au_ovf) || acc_ovf)  overflow <= 1'b1;
    else if (clear)                       overflow <= 1'b0;
  end
endmodule

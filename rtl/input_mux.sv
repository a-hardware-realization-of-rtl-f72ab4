// input_mux: chooses the input sample of the section being served.
//
// The first voiced section takes the voiced excitation, the first unvoiced
// section takes the (possibly gated) noise, and every other section takes the
// output of the section before it, which the datapath holds in a register.
// The document names the multiplexer and its sources; the selection rule
// follows from the section order of this design.
//
// Timing: combinational; the selected value is held for both steps of a
// section.
module input_mux
  import fs_pkg::*;
(
  input  logic [SECT_W-1:0] sect,
  input  sample_t           exc_voiced,
  input  sample_t           exc_unvoiced,
  input  sample_t           prev_out,
  output sample_t           x
);
  always_comb begin
    if (sect == SECT_W'(SEC_V_FIRST))      x = exc_voiced;
    else if (sect == SECT_W'(SEC_U_FIRST)) x = exc_unvoiced;
    else                                   x = prev_out;
  end
endmodule

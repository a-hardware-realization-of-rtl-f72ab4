// delay_sr: shift register delay for the delayed filter variables.
//
// Twenty 24-bit words (480 bits, as in the document), two per section: for
// each section the older value d2 (two samples back) sits ahead of the newer
// value d1 (one sample back). The register moves by one word on every
// arithmetic step, so the head is always the delayed value the step needs.
//   first step of a section  (second = 0): head is d2; the word entering the
//       tail is d1, read from the next position, and becomes next sample's d2
//   second step              (second = 1): head is d1; the word entering the
//       tail is 'new_val' (the section's new output, or for a two-zero
//       section its input) and becomes next sample's d1
// After twenty steps every word is back in place for the next sample. The
// word count comes from the document; the ordering and the look-ahead tap
// are this design's way of updating both delays with one word moved per step.
module delay_sr
  import fs_pkg::*;
#(
  parameter int unsigned DEPTH = N_STEP
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    shift,
  input  logic    second,
  input  sample_t new_val,
  output sample_t head
);
  sample_t mem [DEPTH];

  assign head = mem[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (shift) begin
      for (int i = 0; i < DEPTH - 1; i++) mem[i] <= mem[i+1];
      mem[DEPTH-1] <= second ? new_val : mem[1];
    end
  end
endmodule

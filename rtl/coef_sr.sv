// coef_sr: shift register memory for the filter coefficients.
//
// Twenty 16-bit words (320 bits, as in the document) in a circulating shift
// register. The head word is the coefficient for the current arithmetic step.
// On 'shift' the register moves by one word and the head re-enters at the
// tail, so the word order repeats every 20 steps, one sample. On 'load' the
// register also moves by one word but takes 'load_word' at the tail: twenty
// loads in a row replace the whole contents, first word ending at the head.
// If both are high, 'load' wins. Reset clears the words, which makes every
// section pass its input unchanged.
module coef_sr
  import fs_pkg::*;
#(
  parameter int unsigned DEPTH = N_STEP
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  shift,
  input  logic  load,
  input  coef_t load_word,
  output coef_t head
);
  coef_t mem [DEPTH];

  assign head = mem[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (load || shift) begin
      for (int i = 0; i < DEPTH - 1; i++) mem[i] <= mem[i+1];
      mem[DEPTH-1] <= load ? load_word : mem[0];
    end
  end
endmodule

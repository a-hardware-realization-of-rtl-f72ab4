// noise_gen: pseudorandom excitation bit generator.
//
// A 16-bit shift register holds the last 16 generated bits, x[0] being the
// newest. On each advance a new bit is formed as the mod-2 sum of the tapped
// bits, shifted in, and the bit generated 16 advances earlier falls out. The
// default taps are the ones the document prints, X(n) = X(n-1) ^ X(n-2) ^
// X(n-14) ^ X(n-15); these give a sequence of period 32767. The document also
// calls the sequence 16-bit maximal length (65535), which the printed taps do
// not give, so the taps are a parameter (bit i-1 set selects X(n-i)).
//
// Interface: 'advance' steps the register once (once per sample here);
// 'bit_o' is the newest bit (1 = positive pulse, 0 = negative pulse).
// Reset loads a non-zero seed. 
module noise_gen #(
  parameter logic [15:0] TAPS = 16'b0110_0000_0000_0011,
  parameter logic [15:0] SEED = 16'h0001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic advance,
  output logic bit_o
);
  logic [15:0] x;
  logic        fb;

  assign fb    = ^(x & TAPS);
  assign bit_o = x[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       x <= SEED;
    else if (advance) x <= {x[14:0], fb};
  end
endmodule

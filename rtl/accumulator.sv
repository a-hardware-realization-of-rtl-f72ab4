// accumulator: sums the voiced and unvoiced outputs and forms the outputs.
//
// 'load_v' takes the voiced path output (end of the voiced two-zero section);
// 'add_u' adds the unvoiced path output to it (end of the unvoiced two-zero
// section) and registers the 24-bit sum. From that sum it forms the digital
// return, its 16 most significant bits, and the D/A code: 12 consecutive bits
// whose lowest is bit 'dac_lsb' (bit selector switches; 12, the default,
// gives the 12 most significant bits, values above 12 count as 12).
// 'out_valid' pulses with each new sum. A sum that does not fit 24 bits wraps
// and raises 'ovf' for that clock. The sum, the 16-bit return, the 12-bit D/A
// and the bit selector follow the document; the wrap is this design's.
module accumulator
  import fs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load_v,
  input  logic              add_u,
  input  sample_t           y,
  input  logic [3:0]        dac_lsb,
  output logic [OUT_W-1:0]  digital_out,
  output logic [DAC_W-1:0]  dac_code,
  output logic              out_valid,
  output logic              ovf
);
  sample_t                voiced_q, sum_q;
  logic signed [DATA_W:0] sum_full;
  logic [3:0]             lsb;

  assign sum_full = (DATA_W+1)'(voiced_q) + (DATA_W+1)'(y);
  assign ovf      = add_u && (sum_full[DATA_W] != sum_full[DATA_W-1]);
  assign lsb      = (dac_lsb > 4'd12) ? 4'd12 : dac_lsb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      voiced_q  <= '0;
      sum_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= add_u;
      if (load_v) voiced_q <= y;
      if (add_u)  sum_q    <= sample_t'(sum_full);
    end
  end

  assign digital_out = sum_q[DATA_W-1 -: OUT_W];
  assign dac_code    = DAC_W'(sum_q >> lsb);
endmodule

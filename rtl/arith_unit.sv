// arith_unit: the single arithmetic unit shared by all filter sections.
//
// Each section computes y = x + k_old*(x - d2) + k_new*(x - d1) in two steps,
// where x is the section input, d1 and d2 its delayed values one and two
// samples back and k_old, k_new its two coefficients. With d = past outputs
// this is a two-pole filter y = G*x + B*y1 - C*y2 with k_new = -B, k_old = C
// and the unit-DC-gain factor G = 1 - B + C built in; with d = past inputs it
// is a two-zero filter (1 - B z^-1 + C z^-2)/(1 - B + C) with k_new = B/G,
// k_old = -C/G. So every section costs two additions, two subtractions and two
// multiplications per sample, as the document counts.
//
// One step: the subtractor forms x - d (d from the delay register), the
// multiplier scales it by the coefficient k (Q3.13, truncated toward minus
// infinity), and the three-input adder sums
//   first step : x       + product        -> held in the partial register
//   second step: partial + product        -> section output y
// The adder, subtractor and multiplier follow the document; the step split,
// the coefficient format and the truncation are this design's choices.
// 'ovf' is high for a step whose sum does not fit 24 bits; the result then
// wraps, as two's complement hardware does.
//
// Timing: 'result' is combinational; the partial register loads on 'en' with
// 'second' low.
module arith_unit
  import fs_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    second,
  input  sample_t x,
  input  sample_t d,
  input  coef_t   k,
  output sample_t result,
  output logic    ovf
);
  localparam int unsigned DIFF_W = DATA_W + 1;
  localparam int unsigned PROD_W = DIFF_W + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + 2;

  logic signed [DIFF_W-1:0] diff;
  logic signed [PROD_W-1:0] prod;
  logic signed [SUM_W-1:0]  scaled, sum, in1, in3;
  sample_t partial;

  always_comb begin
    diff   = DIFF_W'(x) - DIFF_W'(d);
    prod   = PROD_W'(diff) * PROD_W'(k);
    scaled = SUM_W'(prod) >>> COEF_FRAC;
    in1    = second ? '0 : SUM_W'(x);
    in3    = second ? SUM_W'(partial) : '0;
    sum    = in1 + scaled + in3;
    result = sample_t'(sum);
    ovf    = (SUM_W'(result) != sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              partial <= '0;
    else if (en && !second)  partial <= result;
  end
endmodule

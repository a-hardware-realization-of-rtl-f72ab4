// tb_arith_unit: random section inputs, delayed values and coefficients,
// plus edge values; checks each two-step computation against
// y = x + floor(k_old*(x-d2)/2^13) + floor(k_new*(x-d1)/2^13) computed with
// 64-bit integers, including the overflow flag and the 24-bit wrap.
module tb_arith_unit;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, second = 0, ovf;
  sample_t x, d, result;
  coef_t k;
  int checks = 0, failures = 0, ovf_seen = 0;

  arith_unit dut (.clk, .rst_n, .en, .second, .x, .d, .k, .result, .ovf);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fl(input longint a);   // floor(a / 2^13)
    return (a >= 0) ? a / 8192 : -((-a + 8191) / 8192);
  endfunction

  function automatic longint wrap24(input longint a);
    longint m = a & 64'hFF_FFFF;
    return (m >= 64'h80_0000) ? m - 64'h100_0000 : m;
  endfunction

  initial begin
    x = '0; d = '0; k = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      longint xv, d2v, d1v, k2, k1, p1, y, yfull;
      bit big;
      big = (i % 4 == 0);
      xv  = big ? $signed(24'($urandom)) : $signed(24'($urandom)) / 64;
      d2v = big ? $signed(24'($urandom)) : $signed(24'($urandom)) / 64;
      d1v = big ? $signed(24'($urandom)) : $signed(24'($urandom)) / 64;
      k2  = $signed(16'($urandom));
      k1  = $signed(16'($urandom));
      if (i == 0) begin xv = 8388607; d2v = -8388608; d1v = -8388608; k2 = -32768; k1 = -32768; end
      if (i == 1) begin xv = 100; d2v = 0; d1v = 0; k2 = 0; k1 = 8192; end
      // first step
      @(negedge clk);
      en = 1; second = 0; x = sample_t'(xv); d = sample_t'(d2v); k = coef_t'(k2);
      #1;
      p1 = xv + fl(k2 * (xv - d2v));
      checks++;
      if (result !== sample_t'(wrap24(p1)) || ovf !== (p1 != wrap24(p1))) begin
        failures++;
        $display("step1 x=%0d d=%0d k=%0d: %0d/%0b expected %0d", xv, d2v, k2, result, ovf, p1);
      end
      if (ovf) ovf_seen++;
      // second step
      @(negedge clk);
      second = 1; d = sample_t'(d1v); k = coef_t'(k1);
      #1;
      yfull = wrap24(p1) + fl(k1 * (xv - d1v));
      y = wrap24(yfull);
      checks++;
      if (result !== sample_t'(y) || ovf !== (yfull != y)) begin
        failures++;
        $display("step2 x=%0d d=%0d k=%0d: %0d/%0b expected %0d", xv, d1v, k1, result, ovf, yfull);
      end
      if (i == 1 && result !== sample_t'(200)) begin failures++; end
    end
    @(negedge clk);
    en = 0;
    checks++;
    if (ovf_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dac12: loads codes across the range and checks the settled voltage,
// code/2048 * 5 V, and that the output holds while 'load' is low.
module tb_dac12;
  logic clk = 0, load = 0;
  logic [11:0] code;
  real vout, expv;
  int checks = 0, failures = 0;

  dac12 dut (.clk, .load, .code, .vout);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code = '0;
    for (int i = 0; i < 300; i++) begin
      int c;
      c = (i == 0) ? 2047 : (i == 1) ? -2048 : $urandom_range(0, 4095) - 2048;
      @(negedge clk);
      code = 12'(c); load = 1;
      @(negedge clk);
      load = 0;
      expv = c * 5.0 / 2048.0;
      checks++;
      if (vout > expv + 1e-9 || vout < expv - 1e-9) begin
        failures++;
        $display("code %0d: %f expected %f", c, vout, expv);
      end
      code = 12'($urandom);
      @(negedge clk);
      checks++;
      if (vout > expv + 1e-9 || vout < expv - 1e-9) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_accumulator: random voiced and unvoiced outputs; checks the registered
// sum, its top 16 bits, the 12-bit D/A window for every bit selector setting
// (above 12 counting as 12), the valid pulse and the overflow flag.
module tb_accumulator;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, load_v = 0, add_u = 0, out_valid, ovf;
  sample_t y;
  logic [3:0] dac_lsb;
  logic [15:0] digital_out;
  logic [11:0] dac_code;
  int checks = 0, failures = 0, ovfs = 0;

  accumulator dut (.clk, .rst_n, .load_v, .add_u, .y, .dac_lsb, .digital_out,
                   .dac_code, .out_valid, .ovf);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y = '0; dac_lsb = 4'd12;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      longint v, u, s, sw;
      int lsb;
      bit big;
      big = (i % 3 == 0);
      v = big ? $signed(24'($urandom)) : $signed(24'($urandom)) / 4;
      u = big ? $signed(24'($urandom)) : $signed(24'($urandom)) / 4;
      s = v + u;
      sw = s & 64'hFF_FFFF;
      @(negedge clk);
      load_v = 1; y = sample_t'(v);
      @(negedge clk);
      load_v = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      add_u = 1; y = sample_t'(u);
      #1;
      checks++;
      if (ovf !== (s > 8388607 || s < -8388608)) begin failures++; $display("ovf %0d", s); end
      if (ovf) ovfs++;
      @(negedge clk);
      add_u = 0;
      checks++;
      if (!out_valid) failures++;
      checks++;
      if (digital_out !== 16'(sw >> 8)) begin
        failures++;
        $display("digital_out %h expected %h", digital_out, 16'(sw >> 8));
      end
      for (int l = 0; l < 16; l++) begin
        dac_lsb = 4'(l);
        lsb = (l > 12) ? 12 : l;
        #1;
        checks++;
        if (dac_code !== 12'(sw >> lsb)) begin
          failures++;
          $display("lsb %0d: dac %h expected %h", l, dac_code, 12'(sw >> lsb));
        end
      end
      dac_lsb = 4'd12;
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    checks++;
    if (ovfs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

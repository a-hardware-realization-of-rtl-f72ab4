// tb_delay_sr: drives the register through many samples of the 20-step
// cycle with random new values and compares the head on every step with a
// model that keeps, for each of the ten sections, its last two new values:
// the first step of a section must show the value from two samples back, the
// second step the value from one sample back.
module tb_delay_sr;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0, second = 0;
  sample_t new_val, head;
  sample_t d1 [10], d2 [10];
  int checks = 0, failures = 0;

  delay_sr dut (.clk, .rst_n, .shift, .second, .new_val, .head);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    new_val = '0;
    for (int s = 0; s < 10; s++) begin d1[s] = '0; d2[s] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      for (int s = 0; s < 10; s++) begin
        for (int ph = 0; ph < 2; ph++) begin
          @(negedge clk);
          shift = 0;
          if (n % 5 == 2 && s == 4 && ph == 0) @(negedge clk);  // a pause must hold
          second = ph[0];
          new_val = sample_t'($urandom);
          checks++;
          if (head !== (ph == 0 ? d2[s] : d1[s])) begin
            failures++;
            $display("n=%0d s=%0d ph=%0d head=%0d expected %0d", n, s, ph, head,
                     ph == 0 ? d2[s] : d1[s]);
          end
          if (ph == 1) begin d2[s] = d1[s]; d1[s] = new_val; end
          shift = 1;
        end
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

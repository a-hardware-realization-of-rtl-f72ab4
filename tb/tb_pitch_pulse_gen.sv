// tb_pitch_pulse_gen: steps the generator sample by sample for several pitch
// periods (including P = 0 and P = 1) and checks that the pulses fall exactly
// P samples apart, with the first one on the first sample after reset.
module tb_pitch_pulse_gen;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, step = 0, pulse;
  word_t pitch;
  int checks = 0, failures = 0;

  pitch_pulse_gen dut (.clk, .rst_n, .step, .pitch, .pulse);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_period(input int p, input int periods);
    int eff = (p == 0) ? 1 : p;
    pitch = word_t'(p);
    for (int k = 0; k < periods; k++)
      for (int s = 0; s < eff; s++) begin
        @(negedge clk);
        checks++;
        if (pulse !== (s == 0)) begin
          failures++;
          $display("P=%0d sample %0d: pulse=%0b", p, s, pulse);
        end
        step = 1;
        @(negedge clk);
        step = 0;
      end
  endtask

  initial begin
    pitch = 16'd7;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_period(7, 3);
    run_period(1, 4);
    run_period(0, 3);
    run_period(13, 2);
    for (int i = 0; i < 10; i++) run_period(2 + $urandom_range(0, 150), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cycle_timing: checks the step sequence of samples with and without a
// coefficient load: the load phase lasts 20 clocks with 'xfer' on its last,
// the run phase visits sections 0..9 with first and second steps in order,
// a sample takes 22 clocks (42 with a load) from the tick, a load happens
// only when a period starts with a full frame, and a tick during a sample
// sets 'overrun' until 'clear'.
module tb_cycle_timing;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, sample_tick = 0, period_start = 0, frame_full = 0, clear = 0;
  au_ctl_t ctl;
  logic load, xfer, run, step, overrun;
  int checks = 0, failures = 0, loads = 0, plain = 0;

  cycle_timing dut (.clk, .rst_n, .sample_tick, .period_start, .frame_full, .clear,
                    .ctl, .load, .xfer, .run, .step, .overrun);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("fail: %s", what); end
  endtask

  task automatic one_sample(input bit ps, input bit ff, input bit extra_tick);
    int clocks = 0;
    bit exp_load = ps && ff;
    period_start = ps; frame_full = ff;
    @(negedge clk); sample_tick = 1;
    @(negedge clk); sample_tick = 0; clocks = 1;
    if (exp_load) begin
      for (int i = 0; i < 20; i++) begin
        chk(load && !run && xfer == (i == 19), $sformatf("load step %0d", i));
        @(negedge clk); clocks++;
      end
      loads++;
    end else plain++;
    for (int i = 0; i < 20; i++) begin
      chk(run && !load && ctl.sect == SECT_W'(i / 2) && ctl.second == i[0],
          $sformatf("run step %0d", i));
      if (extra_tick && i == 5) sample_tick = 1;
      @(negedge clk); clocks++;
      sample_tick = 0;
    end
    chk(step && !run && !load, "done step");
    @(negedge clk); clocks++;
    chk(ctl.phase == PH_IDLE && !step, "idle");
    chk(clocks == (exp_load ? 42 : 22), $sformatf("sample took %0d clocks", clocks));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(ctl.phase == PH_IDLE && !overrun, "reset state");
    for (int i = 0; i < 40; i++) begin
      one_sample(i[0], i[1], 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    chk(!overrun, "no overrun yet");
    one_sample(0, 0, 1);
    chk(overrun, "overrun set");
    one_sample(1, 1, 0);
    chk(overrun, "overrun sticky");
    clear = 1; @(negedge clk); clear = 0;
    chk(!overrun, "overrun cleared");
    chk(loads > 0 && plain > 0, "both sample kinds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_coef_sr: after reset all words read zero; twenty loads replace the
// contents in order; shifting then presents the words in the same order,
// repeating every twenty shifts; a clock with neither input high holds.
module tb_coef_sr;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0, load = 0;
  coef_t load_word, head;
  coef_t ref_w [20];
  int checks = 0, failures = 0;

  coef_sr dut (.clk, .rst_n, .shift, .load, .load_word, .head);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input coef_t e, input string what);
    checks++;
    if (head !== e) begin
      failures++;
      $display("%s: head=%0d expected %0d", what, head, e);
    end
  endtask

  initial begin
    load_word = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); chk('0, "reset"); shift = 1;
    end
    @(negedge clk); shift = 0;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 20; i++) ref_w[i] = coef_t'($urandom);
      for (int i = 0; i < 20; i++) begin
        load = 1; shift = round[0]; load_word = ref_w[i];
        @(negedge clk);
      end
      load = 0; shift = 0;
      for (int i = 0; i < 60; i++) begin
        chk(ref_w[i % 20], "circulate");
        if (i % 7 == 3) begin       // idle clock: must hold
          @(negedge clk);
          chk(ref_w[i % 20], "hold");
        end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_memory_buffer: sends random frames with gaps in 'word_valid', checks
// that exactly 25 words are taken and 'full' then rises, that further words
// are refused, that a load presents the 20 coefficients in the order sent,
// that the header fields carry words 0..4, and that 'xfer' empties the buffer.
module tb_memory_buffer;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, word_valid = 0, word_ready, full, load = 0, xfer = 0;
  word_t word_in;
  coef_t coef_out;
  frame_hdr_t hdr;
  word_t frame [25];
  int checks = 0, failures = 0;

  memory_buffer dut (.clk, .rst_n, .word_in, .word_valid, .word_ready, .full,
                     .load, .xfer, .coef_out, .hdr);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("fail: %s", what); end
  endtask

  initial begin
    word_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 5; f++) begin
      int sent;
      sent = 0;
      for (int i = 0; i < 25; i++) frame[i] = word_t'($urandom);
      @(negedge clk);
      chk(!full && word_ready, "empty at frame start");
      while (sent < 25) begin
        word_valid = ($urandom_range(0, 3) != 0);
        word_in = frame[sent];
        #1;
        if (word_valid && word_ready) sent++;
        @(negedge clk);
        chk(full == (sent == 25), "full flag");
      end
      // a surplus word must be refused
      word_valid = 1; word_in = 16'hDEAD;
      @(negedge clk);
      chk(!word_ready, "ready low when full");
      word_valid = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
      chk(hdr.pitch == frame[0] && hdr.av == coef_t'(frame[1]) && hdr.an == coef_t'(frame[2]) &&
          hdr.mode == mode_t'(frame[3]) && hdr.vf_thr == coef_t'(frame[4]), "header words");
      for (int i = 0; i < 20; i++) begin
        load = 1; xfer = (i == 19);
        word_valid = 1; word_in = 16'hBEEF;   // must not be taken during load
        #1;
        chk(!word_ready, "not ready during load");
        chk(coef_out == coef_t'(frame[5+i]), $sformatf("coefficient %0d", i));
        @(negedge clk);
      end
      load = 0; xfer = 0; word_valid = 0;
      @(negedge clk);
      chk(!full && word_ready, "empty after transfer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_input_mux: for every section number and random inputs, checks that the
// first voiced section gets the voiced excitation, the first unvoiced section
// the unvoiced excitation and all others the previous section's output.
module tb_input_mux;
  import fs_pkg::*;
  logic [SECT_W-1:0] sect;
  sample_t exc_voiced, exc_unvoiced, prev_out, x, expv;
  int checks = 0, failures = 0;

  input_mux dut (.sect, .exc_voiced, .exc_unvoiced, .prev_out, .x);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++)
      for (int s = 0; s < 10; s++) begin
        sect = SECT_W'(s);
        exc_voiced = sample_t'($urandom);
        exc_unvoiced = sample_t'($urandom);
        prev_out = sample_t'($urandom);
        #1;
        expv = (s == 0) ? exc_voiced : (s == 7) ? exc_unvoiced : prev_out;
        checks++;
        if (x !== expv) begin
          failures++;
          $display("sect %0d: x=%0d expected %0d", s, x, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vf_modulator: random voiced signals, noise and thresholds; checks that
// the noise passes unchanged with the modulation off, and with it on passes
// only while the top 16 bits of the voiced signal exceed the threshold.
module tb_vf_modulator;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, xfer = 0, gate_open;
  frame_hdr_t hdr;
  sample_t voiced, noise_in, noise_out;
  int checks = 0, failures = 0, opened = 0, closed = 0;

  vf_modulator dut (.clk, .rst_n, .xfer, .hdr, .voiced, .noise_in, .noise_out, .gate_open);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hdr = '0;
    voiced = '0; noise_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 8; round++) begin
      bit en;
      int thr;
      en = round[0];
      thr = $signed(16'($urandom_range(0, 65535))) / 4;
      @(negedge clk);
      hdr.mode.vf_en = en;
      hdr.vf_thr = coef_t'(thr);
      hdr.av = coef_t'($urandom);   // other fields must not matter
      xfer = 1;
      @(negedge clk);
      xfer = 0;
      hdr = '0;                     // latched copy must stay
      for (int i = 0; i < 200; i++) begin
        int v, nz;
        bit open_exp;
        v = $signed(24'($urandom));
        nz = $signed(24'($urandom));
        voiced = sample_t'(v);
        noise_in = sample_t'(nz);
        #1;
        open_exp = !en || ((v >>> 8) > thr);
        checks++;
        if (noise_out !== (open_exp ? sample_t'(nz) : sample_t'(0)) || gate_open !== open_exp) begin
          failures++;
          $display("en=%0b thr=%0d v=%0d noise=%0d out=%0d", en, thr, v, nz, noise_out);
        end
        if (en && open_exp) opened++;
        if (en && !open_exp) closed++;
      end
    end
    checks++;
    if (opened == 0 || closed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pulse_noise_gen: loads headers with various pitch periods, amplitudes
// and whisper settings and steps samples; checks the voiced excitation (A_V
// scaled by 2^8 on period starts only, or +/-A_V from the noise bit when
// whispering) and the noise excitation (+/-A_N), with the noise bit taken
// from an independent model of the recurrence.
module tb_pulse_noise_gen;
  import fs_pkg::*;
  logic clk = 0, rst_n = 0, xfer = 0, step = 0, period_start;
  frame_hdr_t hdr;
  sample_t exc_voiced, exc_noise;
  bit hist [0:20000];
  int n;
  int checks = 0, failures = 0, pulses = 0, whisper_samples = 0;

  pulse_noise_gen dut (.clk, .rst_n, .xfer, .hdr, .step, .period_start, .exc_voiced, .exc_noise);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint av, an, nb, ev, en;
    int p, left;
    hdr = '0;
    for (int i = 0; i < 16; i++) hist[i] = (i == 15);
    n = 16;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // reset values: P = 100, amplitudes zero
    checks++;
    if (!period_start || exc_voiced !== '0 || exc_noise !== '0) failures++;
    p = 100; av = 0; an = 0; left = 0;
    for (int f = 0; f < 30; f++) begin
      bit wh;
      wh = (f % 4 == 3);
      for (int s = 0; s < p; s++) begin
        nb = hist[n-1];
        ev = wh ? (nb ? av : -av) * 256 : ((s == 0) ? av * 256 : 0);
        en = (nb ? an : -an) * 256;
        #1;
        checks++;
        if (period_start !== (s == 0) || exc_voiced !== sample_t'(ev) || exc_noise !== sample_t'(en)) begin
          failures++;
          $display("f=%0d s=%0d ps=%0b v=%0d/%0d n=%0d/%0d", f, s, period_start, exc_voiced, ev, exc_noise, en);
        end
        if (s == 0) pulses++;
        if (wh) whisper_samples++;
        step = 1;
        @(negedge clk);
        step = 0;
        hist[n] = hist[n-1] ^ hist[n-2] ^ hist[n-14] ^ hist[n-15]; n++;
        if (s == p - 1) begin
          // next sample starts a period: hand over a new header first
          hdr.pitch = word_t'($urandom_range(1, 40));
          hdr.av = coef_t'($urandom);
          hdr.an = coef_t'($urandom);
          hdr.mode.whisper = ((f + 1) % 4 == 3);
          xfer = 1;
          @(negedge clk);
          xfer = 0;
          p = hdr.pitch; av = $signed(hdr.av); an = $signed(hdr.an);
          hdr = '0;
          break;
        end
      end
    end
    checks++;
    if (pulses < 30 || whisper_samples == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

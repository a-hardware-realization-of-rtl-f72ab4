// tb_formant_synth: end-to-end test of the synthesizer at its default size.
//
// The testbench plays the computer: it sends control frames (pitch period,
// amplitudes, mode, threshold and 20 coefficients worked out from formant
// frequencies and bandwidths at a 10 kHz sampling rate) and runs the external
// sampling clock. Alongside, a sample-by-sample model of the synthesizer,
// written with plain integer arithmetic and per-section state (no shift
// registers, no multiplexing), predicts every output:
//   each section  y = x + floor(k_old*(x-d2)/2^13) + floor(k_new*(x-d1)/2^13)
//   (24-bit wrap after each step), pole sections keep past outputs, zero
//   sections past inputs; voiced chain 0..6, unvoiced chain 7..9, sum of both.
// It compares the 16-bit digital return, the 12-bit D/A code for a bit
// selector setting that changes every sample, the analog level, the overflow
// light and the clocks from the external clock edge to the output.
// Mechanisms counted, each of which must occur: frame loaded at a period
// start, period started with no new frame (parameters kept), whisper
// excitation, voiced fricative gate closed and open, nasal pole-zero
// cancellation frames, overflow (and its clear), D/A bit selection below the
// top bits, and a sample overrun. After 4000 samples at 100 clocks per
// sample it runs 2000 more at 78.125 clocks per sample, the maximum rate of
// 12.8 kHz with a 1 MHz system clock, with the external clock not aligned
// to the system clock, and requires that no sample overruns.
module tb_formant_synth;
  import fs_pkg::*;

  localparam int EXT_HALF = 50;       // system clocks per half external period
  localparam int N_SAMPLES = 4000;
  localparam int N_RT = 2000;         // samples at 78.125 clocks per sample

  logic clk = 0, rst_n = 0, ext_clk = 0;
  word_t word_in = '0;
  logic word_valid = 0, word_ready;
  logic [3:0] dac_lsb = 4'd12;
  logic [15:0] digital_out;
  logic out_valid;
  logic [11:0] dac_code;
  real analog_out;
  logic clear = 0, overflow, overrun;

  formant_synth dut (
    .clk, .rst_n, .ext_clk, .word_in, .word_valid, .word_ready, .dac_lsb,
    .digital_out, .out_valid, .dac_code, .analog_out, .clear, .overflow, .overrun
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_loads = 0, n_repeats = 0, n_whisper = 0, n_gate_closed = 0, n_gate_open = 0;
  int n_nasal_cancel = 0, n_overflow = 0, n_lowbits = 0, n_overrun = 0, n_rt = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  longint m_d1 [10], m_d2 [10];
  longint m_k_old [10], m_k_new [10];
  longint m_p, m_av, m_an, m_thr, m_cnt;
  bit     m_whisper, m_vfen;
  bit     m_hist [0:8191];        // noise bits, newest last (index modulo 8192)
  int     m_n;
  bit     m_ovf;
  // the frame most recently sent completely, and whether it is still pending
  word_t  pend [25];
  bit     pend_valid;

  function automatic longint fl13(input longint a);
    return (a >= 0) ? a / 8192 : -((-a + 8191) / 8192);
  endfunction

  function automatic longint wrap24(input longint a);
    longint m;
    m = a & 64'hFF_FFFF;
    return (m >= 64'h80_0000) ? m - 64'h100_0000 : m;
  endfunction

  function automatic longint s16(input word_t w);
    return longint'($signed(w));
  endfunction

  function automatic bit hbit(input int i);
    return m_hist[i & 8191];
  endfunction

  // one section of the model; returns its output and updates its state
  function automatic longint m_section(input int s, input longint x);
    longint p1, yf, y;
    bit is_zero;
    is_zero = (s == 6) || (s == 9);
    p1 = x + fl13(m_k_old[s] * (x - m_d2[s]));
    if (p1 != wrap24(p1)) m_ovf = 1;
    p1 = wrap24(p1);
    yf = p1 + fl13(m_k_new[s] * (x - m_d1[s]));
    y = wrap24(yf);
    if (yf != y) m_ovf = 1;
    m_d2[s] = m_d1[s];
    m_d1[s] = is_zero ? x : y;
    return y;
  endfunction

  // model of one sample: returns the 24-bit sum; sets 'loaded' and 'start'
  function automatic longint m_sample(output bit loaded, output bit start);
    longint ev, en, y, yv, yu, vtap, sum;
    bit nb, gate;
    start = (m_cnt == 0);
    loaded = 0;
    if (start && pend_valid) begin
      m_p = pend[0]; m_av = s16(pend[1]); m_an = s16(pend[2]);
      m_whisper = pend[3][0]; m_vfen = pend[3][1]; m_thr = s16(pend[4]);
      for (int s = 0; s < 10; s++) begin
        m_k_old[s] = s16(pend[5 + 2*s]);
        m_k_new[s] = s16(pend[6 + 2*s]);
      end
      pend_valid = 0;
      loaded = 1;
    end
    nb = hbit(m_n - 1);
    en = (nb ? m_an : -m_an) * 256;
    if (m_whisper) ev = (nb ? m_av : -m_av) * 256;
    else           ev = start ? m_av * 256 : 0;
    y = ev;
    vtap = 0;
    for (int s = 0; s <= 6; s++) begin
      y = m_section(s, y);
      if (s == 1) vtap = y;
    end
    yv = y;
    gate = !m_vfen || ((vtap >>> 8) > m_thr);
    if (m_vfen && !gate) n_gate_closed++;
    if (m_vfen && gate) n_gate_open++;
    if (m_whisper) n_whisper++;
    y = gate ? en : 0;
    for (int s = 7; s <= 9; s++) y = m_section(s, y);
    yu = y;
    sum = yv + yu;
    if (sum != wrap24(sum)) m_ovf = 1;
    // end of sample
    m_cnt = start ? ((m_p == 0) ? 0 : m_p - 1) : m_cnt - 1;
    m_hist[m_n & 8191] = hbit(m_n - 1) ^ hbit(m_n - 2) ^ hbit(m_n - 14) ^ hbit(m_n - 15);
    m_n++;
    return wrap24(sum);
  endfunction

  // ------------------------------------------------------- frame building
  localparam real FS = 10000.0;
  localparam real PI = 3.14159265358979;

  // coefficient in Q3.13; a value outside the format is a testbench error
  function automatic word_t q13(input real v);
    if (v >= 4.0 || v < -4.0) begin
      failures++;
      $display("coefficient %f outside the Q3.13 range", v);
    end
    return word_t'($rtoi(v * 8192.0));
  endfunction

  // two-pole resonator with unit DC gain: k_new = -2 r cos(theta), k_old = r^2
  task automatic pole(input real f, input real bw, output word_t k_old, output word_t k_new);
    real r, th;
    r  = $exp(-PI * bw / FS);
    th = 2.0 * PI * f / FS;
    k_new = q13(-2.0 * r * $cos(th));
    k_old = q13(r * r);
  endtask

  // two-zero filter with unit DC gain: k_new = B/G, k_old = -C/G
  task automatic zero(input real f, input real bw, output word_t k_old, output word_t k_new);
    real r, th, b, c, g;
    r  = $exp(-PI * bw / FS);
    th = 2.0 * PI * f / FS;
    b = 2.0 * r * $cos(th);
    c = r * r;
    g = 1.0 - b + c;
    k_new = q13(b / g);
    k_old = q13(-c / g);
  endtask

  // spectral compensation: real poles at +pa and -pb
  task automatic realpoles(input real pa, input real pb, output word_t k_old, output word_t k_new);
    k_new = q13(-(pa - pb));
    k_old = q13(-(pa * pb));
  endtask

  word_t fr [25];

  task automatic make_frame(input int kind);
    // kind: 0 vowel, 1 nasal, 2 whisper, 3 voiced fricative, 4 unvoiced, 5 overload
    real f1, f2, f3, fn;
    f1 = 300.0 + $urandom_range(0, 500);
    f2 = 900.0 + $urandom_range(0, 1300);
    f3 = 2300.0 + $urandom_range(0, 600);
    fn = (kind == 1) ? 250.0 + $urandom_range(0, 100) : 1300.0 + $urandom_range(0, 500);
    fr[0] = word_t'($urandom_range(20, 120));                              // P
    fr[1] = (kind == 4) ? 16'd0 : (kind == 5) ? 16'h7FFF
                        : word_t'($urandom_range(200, 1500));               // A_V
    fr[2] = (kind == 4 || kind == 3) ? word_t'($urandom_range(50, 600))
                        : (kind == 2) ? 16'd0 : word_t'($urandom_range(0, 40)); // A_N
    fr[3] = {14'd0, (kind == 3), (kind == 2)};                             // mode
    fr[4] = word_t'($urandom_range(0, 300));                               // VF threshold
    pole(f1, 60.0, fr[5], fr[6]);
    pole(f2, 90.0, fr[7], fr[8]);
    pole(f3, 150.0, fr[9], fr[10]);
    pole(3500.0, 200.0, fr[11], fr[12]);
    // sixth resonator and the two-zero filter: nasal pair, equal when non-nasal
    pole(fn, 100.0, fr[15], fr[16]);
    if (kind == 1) zero(1300.0 + $urandom_range(0, 700), 100.0, fr[17], fr[18]);
    else begin
      zero(fn, 100.0, fr[17], fr[18]);
      n_nasal_cancel++;
    end
    // fifth two-pole filter: spectral compensation S(z)
    realpoles(0.9, 0.3, fr[13], fr[14]);
    // unvoiced path: pole, spectral compensation, zero
    pole(2500.0 + $urandom_range(0, 2000), 400.0, fr[19], fr[20]);
    realpoles(0.85, 0.2, fr[21], fr[22]);
    zero(1500.0 + $urandom_range(0, 1000), 300.0, fr[23], fr[24]);
  endtask

  task automatic send_frame(input bit gaps);
    for (int i = 0; i < 25; i++) begin
      word_in = fr[i];
      word_valid = 1;
      @(posedge clk);
      while (!word_ready) @(posedge clk);
      #1;
      if (gaps && $urandom_range(0, 7) == 0) begin
        word_valid = 0;
        @(posedge clk); #1;
      end
    end
    word_valid = 0;
    for (int i = 0; i < 25; i++) pend[i] = fr[i];
    pend_valid = 1;
  endtask

  // ------------------------------------------------------ external clock
  int  cyc = 0;
  int  edge_cyc = 0;
  bit  ext_run = 0;
  bit  fast = 0;
  bit  rt = 0;           // real-time phase: 12.8 kHz against a 1 MHz system clock
  always @(posedge clk) cyc++;

  initial begin
    wait (ext_run);
    forever begin
      if (rt) begin
        // 78.125 system clocks per sample: 12.8 kHz if the clock is 1 MHz
        #390.625;
        ext_clk = 1;
        edge_cyc = cyc;
        #390.625;
        ext_clk = 0;
      end else begin
        repeat (fast ? 7 : EXT_HALF) @(negedge clk);
        ext_clk = 1;
        edge_cyc = cyc;
        repeat (fast ? 7 : EXT_HALF) @(negedge clk);
        ext_clk = 0;
      end
    end
  end

  // ---------------------------------------------------------------- main
  initial begin
    longint expv;
    bit loaded, start;
    int lat, lat_plain, lat_load;
    int kind, frames_sent;
    word_t exp16;
    logic [11:0] exp12;
    int lsb;

    for (int s = 0; s < 10; s++) begin
      m_d1[s] = 0; m_d2[s] = 0; m_k_old[s] = 0; m_k_new[s] = 0;
    end
    m_p = 100; m_av = 0; m_an = 0; m_thr = 0; m_cnt = 0; m_whisper = 0; m_vfen = 0;
    for (int i = 0; i < 8192; i++) m_hist[i] = 0;
    m_hist[0] = 1;  // seed: newest bit 1, the fifteen before it 0
    for (int i = 1; i < 16; i++) m_hist[8192 - i] = 0;
    m_n = 1;
    m_ovf = 0;
    pend_valid = 0;
    lat_plain = -1; lat_load = -1;
    frames_sent = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(word_ready && !overflow && !overrun && digital_out == '0, "reset outputs");

    // first frame before the first sample
    make_frame(0);
    send_frame(1);
    frames_sent++;
    ext_run = 1;

    for (int k = 0; k < N_SAMPLES + N_RT; k++) begin
      if (k == N_SAMPLES) begin
        // switch to the real-time rate between samples
        wait (ext_clk == 1);
        rt = 1;
        wait (ext_clk == 0);
      end
      lsb = (k % 5 == 0) ? $urandom_range(0, 15) : 12;
      dac_lsb = 4'(lsb);
      if (lsb > 12) lsb = 12;
      if (lsb < 12) n_lowbits++;
      expv = m_sample(loaded, start);
      if (loaded) n_loads++;
      if (start && !loaded) n_repeats++;
      @(posedge clk);
      while (!out_valid) @(posedge clk);
      lat = cyc - edge_cyc;
      #1;
      exp16 = word_t'(expv >>> 8);
      exp12 = 12'((expv & 64'hFF_FFFF) >> lsb);
      chk(digital_out == exp16,
          $sformatf("sample %0d: digital_out %0d expected %0d", k, $signed(digital_out), $signed(exp16)));
      chk(dac_code == exp12, $sformatf("sample %0d: dac_code %h expected %h (lsb %0d)", k, dac_code, exp12, lsb));
      if (!rt) begin
        if (loaded) begin
          if (lat_load < 0) lat_load = lat;
          chk(lat == lat_load, $sformatf("load sample latency %0d, first %0d", lat, lat_load));
        end else begin
          if (lat_plain < 0) lat_plain = lat;
          chk(lat == lat_plain, $sformatf("sample latency %0d, first %0d", lat, lat_plain));
        end
      end else begin
        n_rt++;
        chk(lat <= (loaded ? lat_load : lat_plain) + 1, $sformatf("real-time latency %0d", lat));
      end
      @(negedge clk); @(negedge clk);
      begin
        real ev;
        ev = real'($signed(dac_code)) * 5.0 / 2048.0;
        chk(analog_out < ev + 1e-9 && analog_out > ev - 1e-9, "analog level");
      end
      chk(overflow == m_ovf, $sformatf("sample %0d: overflow light %0b expected %0b", k, overflow, m_ovf));
      if (m_ovf) begin
        n_overflow++;
        clear = 1; @(negedge clk); clear = 0;
        m_ovf = 0;
        chk(!overflow, "overflow cleared");
      end
      // a new frame now and then; at the real-time rate only after a sample
      // without a load, so that it is complete before the next sample starts
      if (!pend_valid && $urandom_range(0, 99) < 3 && !(rt && loaded)) begin
        kind = (frames_sent % 12 == 11) ? 5 : $urandom_range(0, 4);
        make_frame(kind);
        send_frame(!rt);
        frames_sent++;
      end
    end
    chk(n_rt == N_RT, "real-time samples");
    chk(!overrun, "no overrun at 100 or 78.125 clocks per sample");
    chk(lat_load - lat_plain == 20, $sformatf("load adds %0d clocks", lat_load - lat_plain));
    chk(lat_plain <= 2 * EXT_HALF, "sample fits the external period");

    // run the external clock too fast: a sample must overrun
    wait (ext_clk == 1);
    rt = 0;
    wait (ext_clk == 0);
    fast = 1;
    repeat (300) @(negedge clk);
    fast = 0;
    if (overrun) n_overrun++;
    clear = 1; @(negedge clk); clear = 0;
    @(negedge clk);
    chk(!overrun, "overrun cleared");

    $display("loads=%0d repeats=%0d whisper=%0d gate_closed=%0d gate_open=%0d nasal_cancel=%0d overflow=%0d lowbits=%0d overrun=%0d realtime=%0d latency=%0d/%0d",
             n_loads, n_repeats, n_whisper, n_gate_closed, n_gate_open, n_nasal_cancel,
             n_overflow, n_lowbits, n_overrun, n_rt, lat_plain, lat_load);
    chk(n_loads > 0, "a frame was loaded");
    chk(n_repeats > 0, "a period kept its parameters");
    chk(n_whisper > 0, "whisper excitation");
    chk(n_gate_closed > 0, "voiced fricative gate closed");
    chk(n_gate_open > 0, "voiced fricative gate open");
    chk(n_nasal_cancel > 0, "nasal pole-zero cancellation");
    chk(n_overflow > 0, "overflow");
    chk(n_lowbits > 0, "bit selector below the top bits");
    chk(n_overrun > 0, "overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

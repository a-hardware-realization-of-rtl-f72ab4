// tb_noise_gen: checks the noise generator bit by bit against the recurrence
// X(n) = X(n-1) ^ X(n-2) ^ X(n-14) ^ X(n-15), kept as a plain history array,
// and checks that the sequence repeats after 32767 steps and not before.
module tb_noise_gen;
  logic clk = 0, rst_n = 0, advance = 0, bit_o;
  int checks = 0, failures = 0;
  bit hist [0:40000];
  int n;
  int first_repeat;

  noise_gen dut (.clk, .rst_n, .advance, .bit_o);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // seed 16'h0001: newest bit 1, the fifteen before it 0
    for (int i = 0; i < 16; i++) hist[i] = (i == 15);
    n = 16;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if (bit_o !== 1'b1) failures++;
    checks++;
    advance = 1;
    first_repeat = -1;
    for (int s = 0; s < 33000; s++) begin
      @(negedge clk);
      hist[n] = hist[n-1] ^ hist[n-2] ^ hist[n-14] ^ hist[n-15];
      if (bit_o !== hist[n]) begin
        failures++;
        if (failures < 5) $display("step %0d: got %0b expected %0b", s, bit_o, hist[n]);
      end
      checks++;
      n++;
    end
    advance = 0;
    // period of the 15-bit recurrence: the last 15 bits recur after 32767
    for (int p = 1; p <= 32767 && first_repeat < 0; p++) begin
      bit same;
      same = 1;
      for (int j = 0; j < 15 && same; j++)
        if (hist[n-1-j] != hist[n-1-j-p]) same = 0;
      if (same) first_repeat = p;
    end
    checks++;
    if (first_repeat != 32767) begin
      failures++;
      $display("period %0d, expected 32767", first_repeat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

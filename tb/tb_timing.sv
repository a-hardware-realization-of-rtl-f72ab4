// tb_timing: runs an external clock of varying period (changing between
// system clock edges) and checks one tick per rising edge, never one without
// an edge, each exactly two system clocks after the edge.
module tb_timing;
  logic clk = 0, rst_n = 0, ext_clk = 0, sample_tick;
  int checks = 0, failures = 0, edges = 0, ticks = 0;
  int last_edge_cyc = -100, cyc = 0;

  timing dut (.clk, .rst_n, .ext_clk, .sample_tick);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && sample_tick) begin
    ticks++;
    checks++;
    if (cyc - last_edge_cyc != 2) begin
      failures++;
      $display("tick %0d cycles after edge", cyc - last_edge_cyc);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int half;
      half = $urandom_range(2, 30);
      repeat (half + $urandom_range(0, 3)) @(negedge clk);
      ext_clk = 1; edges++; last_edge_cyc = cyc;
      repeat (half) @(negedge clk);
      ext_clk = 0;
    end
    repeat (10) @(posedge clk);
    checks++;
    if (ticks != edges) begin
      failures++;
      $display("ticks %0d edges %0d", ticks, edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

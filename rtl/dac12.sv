// dac12: behavioural model of the 12-bit digital-to-analog converter.
//
// Not synthesizable logic: a model of the converter that turns the selected
// 12 output bits into the monitoring voltage. The code is two's complement;
// on each clock with 'load' high the output settles to code/2048 * VREF after
// a settling delay. Only the 12-bit resolution comes from the document; the
// reference voltage, the code format and the delay are assumed.
module dac12 #(
  parameter real VREF = 5.0
) (
  input  logic        clk,
  input  logic        load,
  input  logic [11:0] code,
  output real         vout
);
  logic signed [11:0] scode;

  assign scode = code;

  initial vout = 0.0;

  always @(posedge clk) begin
    if (load) vout <= #1 real'(scode) / 2048.0 * VREF;
  end
endmodule

// pwm_counter: the 8-bit PWM period counter.
//
// count advances by one on each clk where tick is high and wraps from 255 to 0, so one PWM
// period is 256 ticks. wrap is high (combinationally) in the tick that takes count from 255
// to 0; overflow is a registered flag that is high for the one clk after that, while count is
// 0. Reset clears both. The 8-bit width and the overflow output follow the document; the
// tick enable and the exact overflow timing are this design's choices.
module pwm_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  output logic [7:0] count,
  output logic       wrap,
  output logic       overflow
);

  assign wrap = tick && (count == 8'hFF);

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (tick) count <= count + 8'd1;
      overflow <= wrap;
    end
  end

endmodule

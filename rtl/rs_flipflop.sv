// rs_flipflop: clocked RS flip-flop whose Q is the PWM output.
//
// At each rising clk edge Q is cleared when r is high, else set when s is high, else kept:
// reset wins when both are high. Reset clears Q. In the motor controller s is the counter
// Overflow and r the comparator Equal, as in the motor control block diagram; the reset
// priority is this design's choice.
module rs_flipflop (
  input  logic clk,
  input  logic rst,
  input  logic s,
  input  logic r,
  output logic q
);

  always_ff @(posedge clk) begin
    if (rst)    q <= 1'b0;
    else if (r) q <= 1'b0;
    else if (s) q <= 1'b1;
  end

endmodule

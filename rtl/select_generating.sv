// select_generating: chooses the rotation direction and captures the speed command.
//
// On every clk it registers the 8-bit speed Motor_in as duty, and turns the enable input
// into a one-hot direction select: enable = 1 selects clockwise (dir_sel = 2'b01), enable = 0
// counter-clockwise (dir_sel = 2'b10). The registered outputs keep the asynchronous
// processor port timing away from the PWM datapath. That the enable signal chooses between
// clockwise and counter-clockwise rotation follows the document; which value means which
// direction, and the one-hot form, are this design's choices. Reset gives duty 0, clockwise.
module select_generating (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] motor_in,
  input  logic       enable,
  output logic [7:0] duty,
  output logic [1:0] dir_sel      // bit 0: clockwise, bit 1: counter-clockwise
);

  always_ff @(posedge clk) begin
    if (rst) begin
      duty    <= '0;
      dir_sel <= 2'b01;
    end else begin
      duty    <= motor_in;
      dir_sel <= enable ? 2'b01 : 2'b10;
    end
  end

endmodule

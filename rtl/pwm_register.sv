// pwm_register: holds the duty value and direction used during one PWM period.
//
// When load is high (the counter is about to wrap to 0) it takes duty_in and dir_in; at all
// other times it keeps its value, so the comparator sees a steady value for a whole period and
// a speed or direction change never cuts a pulse short. Reset gives duty 0, clockwise.
// Reloading at period boundaries is this design's reading of the document's pwm register.
module pwm_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] duty_in,
  input  logic [1:0] dir_in,
  output logic [7:0] duty,
  output logic [1:0] dir
);

  always_ff @(posedge clk) begin
    if (rst) begin
      duty <= '0;
      dir  <= 2'b01;
    end else if (load) begin
      duty <= duty_in;
      dir  <= dir_in;
    end
  end

endmodule

// motor_control: PWM drive for a DC motor, 256 speed steps in two directions.
//
// select_generating registers the 8-bit speed Motor_in and turns enable into a clockwise /
// counter-clockwise select. The pwm register takes both at the start of every PWM period.
// The 8-bit counter advances once every PWM_DIV clocks (a tick) and wraps every 256 ticks;
// its Overflow flag sets the RS flip-flop just after the wrap, and the comparator's Equal
// (counter == duty) resets it, reset winning. pwm_out is therefore high for duty ticks out
// of every 256 (duty 0: always low, duty 255: 255/256), beginning one clock after the
// counter wraps. motor_out steers the pulse to the bridge side of the selected direction:
// motor_out[0] for clockwise, motor_out[1] for counter-clockwise. A new speed reaches
// pwm_out at the next period boundary, at most 256 ticks plus two clocks later.
// The blocks and their wiring (select_generating, pwm register, comparator, counter, RS
// flip-flop set by Overflow and reset by Equal) follow the document's motor control block
// diagram; PWM_DIV, the period-boundary reload and the two-line motor_out are this design's.
module motor_control #(
  parameter int unsigned PWM_DIV = 1     // clocks per counter tick
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] motor_in,
  input  logic       enable,
  output logic       pwm_out,
  output logic [1:0] motor_out
);

  logic [7:0] sel_duty, duty, count;
  logic [1:0] sel_dir, dir;
  logic       tick, wrap, overflow, equal;

  // Tick generator for the counter.
  if (PWM_DIV <= 1) begin : g_tick_every_clock
    assign tick = 1'b1;
  end else begin : g_tick_divider
    logic [$clog2(PWM_DIV)-1:0] div;
    always_ff @(posedge clk) begin
      if (rst) div <= '0;
      else     div <= (div == $bits(div)'(PWM_DIV - 1)) ? '0 : div + 1'b1;
    end
    assign tick = (div == $bits(div)'(PWM_DIV - 1));
  end

  select_generating u_select (
    .clk      (clk),
    .rst      (rst),
    .motor_in (motor_in),
    .enable   (enable),
    .duty     (sel_duty),
    .dir_sel  (sel_dir)
  );

  pwm_register u_pwm_reg (
    .clk     (clk),
    .rst     (rst),
    .load    (wrap),
    .duty_in (sel_duty),
    .dir_in  (sel_dir),
    .duty    (duty),
    .dir     (dir)
  );

  pwm_counter u_counter (
    .clk      (clk),
    .rst      (rst),
    .tick     (tick),
    .count    (count),
    .wrap     (wrap),
    .overflow (overflow)
  );

  pwm_comparator u_cmp (
    .duty  (duty),
    .count (count),
    .equal (equal)
  );

  rs_flipflop u_rsff (
    .clk (clk),
    .rst (rst),
    .s   (overflow),
    .r   (equal),
    .q   (pwm_out)
  );

  assign motor_out = dir & {2{pwm_out}};

  a_dir_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(dir));

endmodule

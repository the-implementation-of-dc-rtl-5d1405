// tb_motor_control: measures the PWM output of the motor control module.
//
// Two instances run side by side: PWM_DIV = 1 (counter advances every clock) and PWM_DIV = 3.
// For duty values 0, 1, 2, 127, 128, 254, 255 and random ones, in both directions, it
// counts the high clocks of pwm_out over one full period (256 * PWM_DIV clocks) and expects
// duty * PWM_DIV, checks that only the motor line of the selected direction pulses, that a
// pulse starts one clock after the counter wraps, and that a duty change made in the middle
// of a period leaves that period's pulse unchanged.
module tb_motor_control;
  logic       clk = 0, rst = 1;
  logic [7:0] motor_in = 0;
  logic       enable = 1;
  logic       pwm1, pwm3;
  logic [1:0] mo1, mo3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  motor_control #(.PWM_DIV(1)) dut1 (.clk (clk), .rst (rst), .motor_in (motor_in),
                                     .enable (enable), .pwm_out (pwm1), .motor_out (mo1));
  motor_control #(.PWM_DIV(3)) dut3 (.clk (clk), .rst (rst), .motor_in (motor_in),
                                     .enable (enable), .pwm_out (pwm3), .motor_out (mo3));

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // pulse start: pwm1 rises only when the counter has just wrapped (count == 1 now)
  logic pwm1_d = 0;
  always @(posedge clk) begin
    if (!rst && pwm1 && !pwm1_d) check("pulse starts one clock after wrap", dut1.u_counter.count, 1);
    pwm1_d <= pwm1;
  end

  task automatic measure(logic [7:0] duty, logic dir);
    int h1 = 0, h3 = 0, wrong1 = 0, wrong3 = 0;
    @(negedge clk);
    motor_in = duty; enable = dir;
    repeat (256 * 3 * 3) @(posedge clk);        // settle: at least two periods of each
    for (int i = 0; i < 256 * 3; i++) begin
      @(negedge clk);
      if (i < 256) h1 += int'(pwm1);
      h3 += int'(pwm3);
      if (mo1 != (dir ? {1'b0, pwm1} : {pwm1, 1'b0})) wrong1++;
      if (mo3 != (dir ? {1'b0, pwm3} : {pwm3, 1'b0})) wrong3++;
    end
    check($sformatf("high clocks, duty %0d, PWM_DIV 1", duty), h1, int'(duty));
    check($sformatf("high clocks, duty %0d, PWM_DIV 3", duty), h3, 3 * int'(duty));
    check("motor line of the selected direction only (1)", wrong1, 0);
    check("motor line of the selected direction only (3)", wrong3, 0);
  endtask

  initial begin
    logic [7:0] duties [7] = '{8'd0, 8'd1, 8'd2, 8'd127, 8'd128, 8'd254, 8'd255};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    foreach (duties[i]) begin
      measure(duties[i], 1'b1);
      measure(duties[i], 1'b0);
    end
    for (int n = 0; n < 10; n++) measure(8'($urandom), 1'($urandom));
    // mid-period change: the current period keeps its pulse width
    begin
      int h = 0;
      measure(8'd100, 1'b1);
      wait (dut1.u_counter.count == 8'd0);
      @(negedge clk);
      for (int i = 0; i < 256; i++) begin
        if (i == 40) motor_in = 8'd10;           // change during the pulse
        h += int'(pwm1);
        @(negedge clk);
      end
      check("period after mid-pulse change keeps old width", h, 100);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_motor_con_top: end-to-end test of the motor controller with every parameter at its
// default (the real firmware, 2048-word ROM, PWM counter at the system clock).
//
// The host side sets a speed on port A and a direction on port C bit 1. The firmware copies
// them to the motor control module; the test then measures pwm_out over one PWM period
// (256 clocks) and expects exactly `speed` high clocks, on motor_out[0] for clockwise and
// motor_out[1] for counter-clockwise only. It counts how often each mechanism happened and
// fails if one never did: taken and not-taken skips in the firmware, GOTO, both rotation
// directions, direction reversals, duty changes taking effect at a period boundary, the
// counter overflow setting and the comparator resetting the RS flip-flop, and the extreme
// duties 0 and 255.
module tb_motor_con_top;
  logic       clk = 0, rst = 1;
  logic [7:0] pa_in = 0, pb_in = 0, pc_in = 0;
  logic [7:0] pa_out, pb_out, pc_out, trisa, trisb, trisc, rtcc, status, fsr;
  logic [10:0] romaddr;
  logic       pwm_out;
  logic [1:0] motor_out;
  int checks = 0, failures = 0;
  int n_skip = 0, n_noskip = 0, n_goto = 0, n_set = 0, n_reset = 0, n_reload = 0;
  int n_cw = 0, n_ccw = 0, n_reverse = 0, n_zero = 0, n_full = 0;

  always #125 clk = ~clk;     // 4 MHz

  motor_con_top dut (.clk (clk), .rst (rst), .porta_in (pa_in), .portb_in (pb_in),
    .portc_in (pc_in), .porta_out (pa_out), .portb_out (pb_out), .portc_out (pc_out),
    .trisa (trisa), .trisb (trisb), .trisc (trisc), .rtcc (rtcc), .status (status),
    .fsr (fsr), .romaddr (romaddr), .pwm_out (pwm_out), .motor_out (motor_out));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  // Mechanism counters, observed inside the design.
  always @(posedge clk) if (!rst) begin
    if (dut.u_proc.u_core.u_ctrl.q4) begin
      if (dut.u_proc.u_core.u_ctrl.ctrl.op == pic_pkg::I_BTFSS)
        if (dut.u_proc.u_core.alu_z) n_noskip++; else n_skip++;
      if (dut.u_proc.u_core.u_ctrl.ctrl.jump) n_goto++;
    end
    if (dut.u_motor.overflow && !dut.u_motor.equal) n_set++;
    if (dut.u_motor.equal && pwm_out) n_reset++;
    if (dut.u_motor.wrap && dut.u_motor.sel_duty != dut.u_motor.duty) n_reload++;
    if (dut.u_motor.wrap && dut.u_motor.sel_dir != dut.u_motor.dir) n_reverse++;
  end

  task automatic run_case(logic [7:0] speed, logic cw);
    int high = 0, wrong = 0;
    @(negedge clk);
    pa_in = speed; pc_in = {6'($urandom), cw, 1'($urandom)};
    // firmware loop (<= 40 clocks) + select register + wait for the next period + one period
    repeat (40 + 2 + 256 + 256) @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      high += int'(pwm_out);
      if (motor_out != (cw ? {1'b0, pwm_out} : {pwm_out, 1'b0})) wrong++;
    end
    check($sformatf("pwm high clocks for speed %0d", speed), high, int'(speed));
    check("pulse on the selected motor line only", wrong, 0);
    check("port B holds the speed", pb_out, speed);
    if (cw) n_cw++; else n_ccw++;
    if (speed == 0) n_zero++;
    if (speed == 255) n_full++;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (40) @(posedge clk);
    check("port B set as output by firmware", trisb, 8'h00);
    check("port C bit 0 set as output by firmware", trisc, 8'hFE);
    run_case(8'd0, 1'b1);
    run_case(8'd255, 1'b1);
    run_case(8'd128, 1'b0);
    run_case(8'd1, 1'b0);
    run_case(8'd64, 1'b1);
    for (int n = 0; n < 20; n++) run_case(8'($urandom), 1'($urandom));
    $display("skip=%0d noskip=%0d goto=%0d set=%0d reset=%0d reload=%0d cw=%0d ccw=%0d rev=%0d zero=%0d full=%0d",
             n_skip, n_noskip, n_goto, n_set, n_reset, n_reload, n_cw, n_ccw, n_reverse, n_zero, n_full);
    check("skip taken happened", int'(n_skip > 0), 1);
    check("skip not taken happened", int'(n_noskip > 0), 1);
    check("GOTO happened", int'(n_goto > 0), 1);
    check("RS flip-flop set by overflow happened", int'(n_set > 0), 1);
    check("RS flip-flop reset by equal happened", int'(n_reset > 0), 1);
    check("duty reload at period boundary happened", int'(n_reload > 0), 1);
    check("clockwise happened", int'(n_cw > 0), 1);
    check("counter-clockwise happened", int'(n_ccw > 0), 1);
    check("direction reversal happened", int'(n_reverse > 0), 1);
    check("duty 0 happened", int'(n_zero > 0), 1);
    check("duty 255 happened", int'(n_full > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

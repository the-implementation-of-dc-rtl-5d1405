// tb_select_generating: checks that the speed is registered and enable turns into the
// one-hot direction select (1: clockwise 2'b01, 0: counter-clockwise 2'b10), and the reset
// values.
module tb_select_generating;
  logic       clk = 0, rst = 1, enable = 0;
  logic [7:0] motor_in = 8'h33, duty;
  logic [1:0] dir_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  select_generating dut (.clk (clk), .rst (rst), .motor_in (motor_in), .enable (enable),
                         .duty (duty), .dir_sel (dir_sel));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check("reset duty", duty, 0);
    check("reset direction", dir_sel, 2'b01);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      logic [7:0] s;
      logic e;
      s = 8'($urandom); e = 1'($urandom);
      @(negedge clk); motor_in = s; enable = e;
      #1 check("duty not before the clock", int'(duty == s && n > 0 && s != duty), 0);
      @(negedge clk);
      check("duty", duty, s);
      check("direction", dir_sel, e ? 2'b01 : 2'b10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

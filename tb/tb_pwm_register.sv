// tb_pwm_register: the register must keep its value until load and take duty_in and dir_in
// on the load clock only.
module tb_pwm_register;
  logic       clk = 0, rst = 1, load = 0;
  logic [7:0] duty_in = 0, duty;
  logic [1:0] dir_in = 2'b10, dir;
  logic [7:0] held_duty;
  logic [1:0] held_dir;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  pwm_register dut (.clk (clk), .rst (rst), .load (load), .duty_in (duty_in), .dir_in (dir_in),
                    .duty (duty), .dir (dir));

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
    #1 rst = 0;
    check("reset duty", duty, 0);
    check("reset dir", dir, 2'b01);
    held_duty = 0; held_dir = 2'b01;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      duty_in = 8'($urandom); dir_in = $urandom_range(0, 1) ? 2'b01 : 2'b10;
      load = ($urandom_range(0, 3) == 0);
      if (load) begin held_duty = duty_in; held_dir = dir_in; end
      @(negedge clk);
      load = 0;
      check("duty", duty, held_duty);
      check("dir", dir, held_dir);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

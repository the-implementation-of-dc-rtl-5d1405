// tb_pwm_counter: with a random tick pattern the count must follow a model counter, wrap
// must be high exactly on the tick that leaves 255, and overflow exactly one clock later.
module tb_pwm_counter;
  logic       clk = 0, rst = 1, tick = 0;
  logic [7:0] count;
  logic       wrap, overflow;
  int checks = 0, failures = 0, wraps = 0;
  int model = 0, wrap_prev = 0;

  always #5 clk = ~clk;
  pwm_counter dut (.clk (clk), .rst (rst), .tick (tick), .count (count), .wrap (wrap),
                   .overflow (overflow));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      tick = ($urandom_range(0, 3) != 0);
      #1;
      check("count", count, model);
      check("wrap", wrap, int'(tick && model == 255));
      check("overflow one clock after wrap", overflow, wrap_prev);
      wrap_prev = int'(tick && model == 255);
      if (wrap_prev != 0) wraps++;
      if (tick) model = (model + 1) % 256;
    end
    check("counter wrapped", int'(wraps > 5), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

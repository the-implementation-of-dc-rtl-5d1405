// tb_clock_divider: checks that q1..q4 are one-hot, come in the order q1, q2, q3, q4 with a
// period of four clocks, and that q1 is the first phase after reset.
module tb_clock_divider;
  logic clk = 0, rst = 1;
  logic q1, q2, q3, q4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  clock_divider dut (.clk (clk), .rst (rst), .q1 (q1), .q2 (q2), .q3 (q3), .q4 (q4));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  initial begin
    for (int r = 0; r < 3; r++) begin
      rst = 1;
      repeat (2 + r) @(posedge clk);
      #1 rst = 0;
      check("first phase after reset", {q4, q3, q2, q1}, 4'b0001);
      for (int i = 1; i < 4 * (50 + r); i++) begin
        @(posedge clk); #1;
        check("phase", {q4, q3, q2, q1}, 4'b0001 << (i % 4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

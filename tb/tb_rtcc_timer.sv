// tb_rtcc_timer: checks the RTCC count rate for every prescaler setting, the stop bit T0CS,
// the PSA bypass, and that a write loads the count and restarts the prescaler.
module tb_rtcc_timer;
  logic       clk = 0, rst = 1, tick = 0, we = 0;
  logic [5:0] option = 6'h3F;
  logic [7:0] wdata = 0, rtcc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rtcc_timer dut (.clk (clk), .rst (rst), .tick (tick), .option (option), .we (we),
                  .wdata (wdata), .rtcc (rtcc));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic ticks(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) tick = 1;
      @(negedge clk) tick = 0;
    end
  endtask

  task automatic load(logic [7:0] v);
    @(negedge clk) we = 1; wdata = v;
    @(negedge clk) we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    ticks(10);
    check("stopped after reset (T0CS=1)", rtcc, 0);
    option = 6'b001000;            // T0CS=0, PSA=1: every cycle
    ticks(37);
    check("PSA=1 counts every cycle", rtcc, 37);
    for (int ps = 0; ps < 8; ps++) begin
      automatic int ratio = 2 << ps;
      option = 6'(ps);             // T0CS=0, PSA=0
      load(8'd0);
      ticks(ratio - 1);
      check($sformatf("ps=%0d just before first increment", ps), rtcc, 0);
      ticks(1);
      check($sformatf("ps=%0d first increment", ps), rtcc, 1);
      ticks(ratio * 2);
      check($sformatf("ps=%0d rate", ps), rtcc, 3);
    end
    option = 6'b000000;
    load(8'hFE);
    ticks(1);
    load(8'hFE);                   // restarts the prescaler
    ticks(1);
    check("write restarts prescaler", rtcc, 8'hFE);
    ticks(1);
    check("count after restart", rtcc, 8'hFF);
    ticks(2);
    check("wraps to 0", rtcc, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pic_processor: runs the motor control program from the program ROM.
//
// After the setup instructions port B must be all outputs and port C bit 0 an output. Then
// for random speed values on port A and direction values on port C bit 1 it checks that
// port B follows port A and port C bit 0 follows port C bit 1 within one pass of the
// program loop (at most 10 instruction cycles of 4 clocks), that both direction branches
// ran, and that the fetch address moves once per four clocks.
module tb_pic_processor;
  logic       clk = 0, rst = 1;
  logic [7:0] pa_in = 0, pb_in = 0, pc_in = 0;
  logic [7:0] pa_out, pb_out, pc_out, trisa, trisb, trisc, rtcc, status, fsr;
  logic [10:0] romaddr;
  logic       cycle_end, asleep;
  int checks = 0, failures = 0, cw = 0, ccw = 0;

  always #5 clk = ~clk;
  pic_processor dut (.clk (clk), .rst (rst), .porta_in (pa_in), .portb_in (pb_in),
    .portc_in (pc_in), .porta_out (pa_out), .portb_out (pb_out), .portc_out (pc_out),
    .trisa (trisa), .trisb (trisb), .trisc (trisc), .rtcc (rtcc), .status (status),
    .fsr (fsr), .romaddr (romaddr), .cycle_end (cycle_end), .asleep (asleep));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // fetch address changes only at q1, i.e. every 4 clocks at most
  int last_change = 0, clocks = 0;
  logic [10:0] last_addr;
  always @(posedge clk) begin
    clocks++;
    if (!rst && romaddr != last_addr) begin
      if (last_change != 0) begin
        checks++;
        if ((clocks - last_change) % 4 != 0) begin failures++; $display("FAIL fetch timing"); end
      end
      last_change = clocks;
    end
    last_addr = romaddr;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (4 * 8) @(posedge clk);
    check("port B configured as output", trisb, 8'h00);
    check("port C bit 0 configured as output", trisc, 8'hFE);
    for (int n = 0; n < 300; n++) begin
      logic [7:0] speed;
      logic dir;
      speed = 8'($urandom); dir = 1'($urandom);
      @(negedge clk);
      pa_in = speed; pc_in = {6'($urandom), dir, 1'($urandom)};
      repeat (4 * 10) @(posedge clk);
      #1;
      check("port B follows port A", pb_out, speed);
      check("port C bit 0 follows port C bit 1", pc_out[0], dir);
      if (dir) cw++; else ccw++;
    end
    check("both directions exercised", int'(cw > 0 && ccw > 0), 1);
    check("not asleep", asleep, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

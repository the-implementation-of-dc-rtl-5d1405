// tb_program_counter: drives q1/q4 phases by hand and checks the program counter.
//
// Checks: reset to 0x7FF, increment with wrap to 0, GOTO with page bits, CALL pushing the
// return address, two-level stack order on RETLW, PCL write, and hold (no load at q1).
module tb_program_counter;
  logic        clk = 0, rst = 1;
  logic        q1 = 0, q4 = 0, hold = 0, jump = 0, call = 0, ret = 0, pcl_we = 0;
  logic [8:0]  target = 0;
  logic [7:0]  pcl_data = 0;
  logic [1:0]  page = 0;
  logic [10:0] pc, pc_plus1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  program_counter dut (.clk (clk), .rst (rst), .q1 (q1), .q4 (q4), .hold (hold), .jump (jump),
                       .call (call), .ret (ret), .target (target), .pcl_we (pcl_we),
                       .pcl_data (pcl_data), .page (page), .pc (pc), .pc_plus1 (pc_plus1));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [10:0] got, logic [10:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // One instruction cycle: q1 (load), two idle clocks, q4 with the given control.
  task automatic cycle(bit j = 0, bit c = 0, bit r = 0, bit pw = 0, logic [8:0] t = 0,
                       logic [7:0] pd = 0, logic [1:0] pg = 0);
    q1 = 1; @(posedge clk); #1 q1 = 0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    q4 = 1; jump = j; call = c; ret = r; pcl_we = pw; target = t; pcl_data = pd; page = pg;
    @(posedge clk); #1;
    q4 = 0; jump = 0; call = 0; ret = 0; pcl_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check("reset value", pc, 11'h7FF);
    cycle();  check("pc at reset vector", pc, 11'h7FF);
    cycle();  check("wrap to 0", pc, 11'h000);
    cycle();  check("increment", pc, 11'h001);
    cycle(.j(1), .t(9'h155), .pg(2'b10)); check("before goto", pc, 11'h002);
    cycle();  check("goto target with page", pc, 11'h555);
    cycle(.c(1), .t(9'h1AB), .pg(2'b01)); check("call executes", pc, 11'h556);
    cycle();  check("call target, bit 8 cleared", pc, 11'h2AB);
    cycle(.c(1), .t(9'h010), .pg(2'b11)); check("second call", pc, 11'h2AC);
    cycle();  check("second call target", pc, 11'h610);
    cycle(.r(1)); check("retlw executes", pc, 11'h611);
    cycle();  check("return to second call site + 1", pc, 11'h2AD);
    cycle(.r(1)); check("second retlw executes", pc, 11'h2AE);
    cycle();  check("return to first call site + 1", pc, 11'h557);
    cycle(.pw(1), .pd(8'hC3), .pg(2'b01)); check("pcl write executes", pc, 11'h558);
    cycle();  check("pcl write target", pc, 11'h2C3);
    hold = 1;
    cycle();  check("hold", pc, 11'h2C3);
    cycle();  check("hold again", pc, 11'h2C3);
    hold = 0;
    cycle();  check("after hold", pc, 11'h2C4);
    check("pc_plus1", pc_plus1, 11'h2C5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

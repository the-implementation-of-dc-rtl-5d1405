// tb_control_unit: runs a short program through fetch and decode and checks, for every
// instruction cycle, the fetch address and the instruction executed at q4.
//
// Covers sequential fetch from the reset vector 0x7FF with wrap to 0, GOTO, CALL, RETLW, a
// taken skip on zero (DECFSZ) and on non-zero (BTFSS), where the next instruction must
// execute as a NOP, a skip not taken, SLEEP (the
// program counter must stop), the one-instruction-per-four-clocks rate, and that the
// phases q1..q4 are one-hot.
module tb_control_unit;
  import pic_pkg::*;

  logic        clk = 0, rst = 1;
  logic [11:0] prog [2048];
  logic [11:0] romdata, ir;
  logic [10:0] romaddr, pc_plus1;
  logic        alu_zero, q1, q2, q3, q4, asleep;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign romdata  = prog[romaddr];
  assign alu_zero = (ctrl.op == I_DECFSZ) || (ctrl.op == I_BTFSS && ctrl.fsel == 5'h10);

  control_unit dut (.clk (clk), .rst (rst), .romdata (romdata), .alu_zero (alu_zero),
                    .pcl_we (1'b0), .pcl_data (8'h00), .page (2'b00), .romaddr (romaddr),
                    .pc_plus1 (pc_plus1), .ctrl (ctrl), .q1 (q1), .q2 (q2), .q3 (q3), .q4 (q4),
                    .asleep (asleep), .ir (ir));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    int addr_exp [14] = '{'h7FF, 0, 1, 5, 'h20, 6, 7, 8, 9, 'hA, 'hB, 'hB, 'hB, 'hB};
    instr_t op_exp [14] = '{I_NOP, I_MOVLW, I_GOTO, I_CALL, I_RETLW, I_DECFSZ, I_NOP,
                            I_BTFSS, I_BTFSS, I_NOP, I_SLEEP, I_NOP, I_NOP, I_NOP};
    int t_prev;
    foreach (prog[i]) prog[i] = 12'h000;
    prog[0]    = 12'hC01;  // MOVLW 1
    prog[1]    = 12'hA05;  // GOTO 5
    prog[5]    = 12'h920;  // CALL 0x20
    prog['h20] = 12'h803;  // RETLW 3
    prog[6]    = 12'h2F0;  // DECFSZ 0x10,1 (zero -> skip)
    prog[7]    = 12'hC09;  // MOVLW 9 (skipped)
    prog[8]    = 12'h710;  // BTFSS 0x10,0 (zero -> no skip)
    prog[9]    = 12'h711;  // BTFSS 0x11,0 (not zero -> skip)
    prog['hA]  = 12'hC0A;  // MOVLW 0x0A (skipped)
    prog['hB]  = 12'h003;  // SLEEP
    prog['hC]  = 12'hC0C;  // never executed
    repeat (3) @(posedge clk);
    #1 rst = 0;
    t_prev = -1;
    for (int c = 0; c < 14; c++) begin
      do begin
        @(negedge clk);
        check("one-hot phases", int'($onehot({q1, q2, q3, q4})), 1);
      end while (!q4);
      check($sformatf("cycle %0d fetch address", c), int'(romaddr), addr_exp[c]);
      check($sformatf("cycle %0d instruction", c), int'(ctrl.op), int'(op_exp[c]));
      if (t_prev >= 0) check("four clocks per instruction", int'($time) - t_prev, 40);
      t_prev = int'($time);
    end
    check("asleep", int'(asleep), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

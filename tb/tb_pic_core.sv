// tb_pic_core: checks the processor core instruction by instruction against pic_iss.
//
// The program memory is a testbench array driven onto romdata. Three phases:
//   1. a hand-checked program: MOVLW 0xFD; MOVWF 0x0A; INCF 0x0A,1 (expects W=0xFD and
//      register 0x0A = 0xFE), a CALL/RETLW pair and a taken skip;
//   2. random programs over all 33 instructions (SLEEP excluded) run in lock step with the
//      reference model: after every instruction cycle W, STATUS, FSR, RTCC, OPTION, port
//      latches, TRIS registers and the next program address are compared, and at the end of
//      each program the whole data memory;
//   3. SLEEP: the program counter must stop and TO/PD must read 1/0.
// It also checks that every instruction cycle is exactly four clocks, and counts a failure
// for any instruction type, taken skip, PCL write, indirect or banked access that never ran.
module tb_pic_core;
  import pic_pkg::*;
  import pic_iss_pkg::*;

  logic        clk = 0, rst = 1;
  logic [10:0] romaddr;
  logic [11:0] romdata;
  logic [7:0]  pin[3];
  logic [7:0]  porta_out, portb_out, portc_out, trisa, trisb, trisc, rtcc, status, fsr;
  logic        cycle_end, asleep;
  logic [11:0] prog [2048];

  int checks = 0, failures = 0;
  int seen [34];
  pic_iss iss;

  always #5 clk = ~clk;
  assign romdata = prog[romaddr];

  pic_core dut (
    .clk (clk), .rst (rst), .romaddr (romaddr), .romdata (romdata),
    .porta_in (pin[0]), .portb_in (pin[1]), .portc_in (pin[2]),
    .porta_out (porta_out), .portb_out (portb_out), .portc_out (portc_out),
    .trisa (trisa), .trisb (trisb), .trisc (trisc),
    .rtcc (rtcc), .status (status), .fsr (fsr), .cycle_end (cycle_end), .asleep (asleep)
  );

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Instruction class of a word, for coverage: 0..32 as instr_t order, 33 = unused NOP.
  function automatic int classify(logic [11:0] ir);
    casez (ir)
      12'h000: return 0;
      12'h002: return 22; 12'h003: return 23; 12'h004: return 24;
      12'h005, 12'h006, 12'h007: return 25;
      12'b0000_000?_????: return 33;
      12'b0000_001?_????: return 1;
      12'b0000_010?_????: return 2;
      12'b0000_011?_????: return 3;
      12'b00??_????_????: return 4 + int'(ir[9:6]) - 2;   // SUBWF .. INCFSZ
      12'b01??_????_????: return 18 + int'(ir[9:8]);
      12'b1000_????_????: return 26;
      12'b1001_????_????: return 27;
      12'b101?_????_????: return 28;
      default:            return 29 + int'(ir[9:8]);     // MOVLW IORLW ANDLW XORLW
    endcase
  endfunction

  function automatic logic [11:0] random_word();
    int c = $urandom_range(0, 99);
    logic [11:0] v = 12'($urandom);
    if (c < 55)      return {2'b00, 4'($urandom_range(2, 15)), v[5:0]};  // byte-oriented ALU
    else if (c < 60) return {6'b000000, v[5:0]} & 12'h03F;              // MOVWF/NOP/OPTION/TRIS...
    else if (c < 64) return {6'b000001, v[5:0]};                          // CLRW/CLRF
    else if (c < 78) return {2'b01, v[9:0]};                              // bit-oriented
    else if (c < 80) begin                                                // OPTION/TRIS/CLRWDT
      logic [11:0] s[5] = '{12'h002, 12'h004, 12'h005, 12'h006, 12'h007};
      return s[$urandom_range(0, 4)];
    end
    else if (c < 83) return {4'b1000, v[7:0]};                            // RETLW
    else if (c < 86) return {4'b1001, v[7:0]};                            // CALL
    else if (c < 88) return {3'b101, v[8:0]};                             // GOTO
    else             return {2'b11, v[9:0]};                              // literal ALU
  endfunction

  // Copy the DUT's (uninitialised) data memory into the model.
  task automatic sync_ram();
    for (int i = 0; i < 80; i++) iss.ram[i] = dut.u_regs.u_rf.mem[i];
  endtask

  task automatic do_reset();
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    iss.reset();
    sync_ram();
  endtask

  // Runs n instruction cycles in lock step with the model.
  task automatic run_lockstep(int n, bit randomize_pins);
    int t_start, t_last;
    t_last = -1;
    for (int i = 0; i < n; i++) begin
      // wait for the q4 edge of this cycle
      do @(posedge clk); while (!dut.u_ctrl.q4);
      // feed the model the word fetched in this cycle
      if (!iss.asleep && !iss.skip) seen[classify(prog[iss.pc])]++;
      iss.port_in[0] = pin[0]; iss.port_in[1] = pin[1]; iss.port_in[2] = pin[2];
      iss.step(prog[iss.pc]);
      #1;
      if (t_last >= 0) check("cycle length", 32'($time - t_last), 32'd40);
      t_last = int'($time);
      check("W", dut.u_regs.w, iss.w);
      check("STATUS", status, iss.status);
      check("FSR", fsr, iss.fsr);
      check("RTCC", rtcc, iss.rtcc);
      check("OPTION", dut.u_regs.option, iss.option);
      check("PORTA", porta_out, iss.port_out[0]);
      check("PORTB", portb_out, iss.port_out[1]);
      check("PORTC", portc_out, iss.port_out[2]);
      check("TRIS", {trisa, trisb, trisc}, {iss.tris[0], iss.tris[1], iss.tris[2]});
      if (!iss.asleep) check("next PC", dut.u_ctrl.u_pc.next_pc, iss.pc);
      if (randomize_pins && $urandom_range(0, 7) == 0)
        for (int p = 0; p < 3; p++) pin[p] = 8'($urandom);
    end
    for (int i = 0; i < 80; i++) check("RAM", dut.u_regs.u_rf.mem[i], iss.ram[i]);
  endtask

  initial begin
    iss = new();
    foreach (pin[i]) pin[i] = 8'($urandom);

    // ---- 1. hand-checked program ----
    foreach (prog[i]) prog[i] = 12'h000;
    prog[0] = 12'hCFD;   // MOVLW 0xFD
    prog[1] = 12'h02A;   // MOVWF 0x0A
    prog[2] = 12'h2AA;   // INCF 0x0A,1
    prog[3] = 12'h910;   // CALL 0x10
    prog[4] = 12'h2EA;   // DECFSZ 0x0A,1  (0xFE -> 0xFD, no skip)
    prog[5] = 12'h669;   // BTFSC 0x09,3 : 0x09 holds 0x00 -> skip taken
    prog[6] = 12'hC11;   // MOVLW 0x11 (skipped)
    prog[7] = 12'hA07;   // GOTO 7 (spin)
    prog[16] = 12'h069;  // CLRF 0x09
    prog[17] = 12'h85A;  // RETLW 0x5A
    do_reset();
    run_lockstep(12, 0);
    check("hand: W after RETLW", dut.u_regs.w, 8'h5A);
    check("hand: reg 0x0A", dut.u_regs.u_rf.mem[10], 8'hFD);
    check("hand: reg 0x09", dut.u_regs.u_rf.mem[9], 8'h00);
    check("hand: spinning at 7", romaddr, 11'd7);

    // ---- 2. random programs ----
    for (int p = 0; p < 12; p++) begin
      foreach (prog[i]) begin
        prog[i] = random_word();
        if (prog[i] == 12'h003) prog[i] = 12'h000;   // no SLEEP here
      end
      do_reset();
      run_lockstep(6000, 1);
    end

    // ---- 3. SLEEP ----
    foreach (prog[i]) prog[i] = 12'h000;
    prog[0] = 12'hC07;   // MOVLW 7
    prog[1] = 12'h002;   // OPTION: timer on, prescaler 1:256
    prog[2] = 12'h003;   // SLEEP
    prog[3] = 12'hC99;   // MOVLW 0x99 (never reached)
    do_reset();
    run_lockstep(40, 0);
    seen[classify(12'h003)]++;
    check("sleep: asleep", asleep, 1'b1);
    check("sleep: TO/PD", status[4:3], 2'b10);
    check("sleep: W kept", dut.u_regs.w, 8'h07);
    check("sleep: PC held", romaddr, 11'd2);

    // ---- coverage ----
    for (int i = 0; i < 33; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL instruction class %0d never ran", i); end
    end
    checks++; if (iss.skips_taken == 0)  begin failures++; $display("FAIL no skip taken"); end
    checks++; if (iss.pcl_writes == 0)   begin failures++; $display("FAIL no PCL write"); end
    checks++; if (iss.indirect_ops == 0) begin failures++; $display("FAIL no indirect access"); end
    checks++; if (iss.banked_ops == 0)   begin failures++; $display("FAIL no banked access"); end
    $display("skips=%0d squashed=%0d pcl_writes=%0d indirect=%0d banked=%0d",
             iss.skips_taken, iss.squashed, iss.pcl_writes, iss.indirect_ops, iss.banked_ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

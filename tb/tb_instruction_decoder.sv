// tb_instruction_decoder: decodes all 4096 instruction words and checks the control word.
//
// The expected instruction, destination, flag updates, skip kind, constant/bit mask, branch
// target and TRIS port are worked out here from the PIC16C5x opcode table. It also checks
// that the instruction register only loads at q2, the control word only at q3, and that
// kill loads a NOP.
module tb_instruction_decoder;
  import pic_pkg::*;

  logic        clk = 0, rst = 1, q2 = 0, q3 = 0, kill = 0;
  logic [11:0] romdata = 0, ir;
  ctrl_t       ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  instruction_decoder dut (.clk (clk), .rst (rst), .q2 (q2), .q3 (q3), .kill (kill),
                           .romdata (romdata), .ir (ir), .ctrl (ctrl));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp, logic [11:0] word);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s for %h: got %0d exp %0d", what, word, got, exp);
    end
  endtask

  // Expected decoding: {op, we_w, we_f, z, c, dc, skip_z, skip_nz}
  typedef struct { instr_t op; bit we_w, we_f, z, c, dc, sz, snz; } exp_t;

  function automatic exp_t expect_of(logic [11:0] x);
    exp_t e;
    instr_t byte_ops [16] = '{I_NOP, I_NOP, I_SUBWF, I_DECF, I_IORWF, I_ANDWF, I_XORWF, I_ADDWF,
                              I_MOVF, I_COMF, I_INCF, I_DECFSZ, I_RRF, I_RLF, I_SWAPF, I_INCFSZ};
    instr_t lit_ops [4] = '{I_MOVLW, I_IORLW, I_ANDLW, I_XORLW};
    e = '{I_NOP, 0, 0, 0, 0, 0, 0, 0};
    if (x[11:10] == 2'b00) begin
      if (x[9:6] == 4'd0) begin
        if (x[5])            begin e.op = I_MOVWF; e.we_f = 1; end
        else if (x == 12'h002) e.op = I_OPTION;
        else if (x == 12'h003) e.op = I_SLEEP;
        else if (x == 12'h004) e.op = I_CLRWDT;
        else if (x >= 12'h005 && x <= 12'h007) e.op = I_TRIS;
      end else if (x[9:6] == 4'd1) begin
        e.op = x[5] ? I_CLRF : I_CLRW; e.we_w = !x[5]; e.we_f = x[5]; e.z = 1;
      end else begin
        e.op = byte_ops[x[9:6]]; e.we_w = !x[5]; e.we_f = x[5];
        e.z  = !(e.op inside {I_DECFSZ, I_INCFSZ, I_RRF, I_RLF, I_SWAPF});
        e.c  = e.op inside {I_SUBWF, I_ADDWF, I_RRF, I_RLF};
        e.dc = e.op inside {I_SUBWF, I_ADDWF};
        e.sz = e.op inside {I_DECFSZ, I_INCFSZ};
      end
    end else if (x[11:10] == 2'b01) begin
      case (x[9:8])
        2'd0: begin e.op = I_BCF; e.we_f = 1; end
        2'd1: begin e.op = I_BSF; e.we_f = 1; end
        2'd2: begin e.op = I_BTFSC; e.sz = 1; end
        default: begin e.op = I_BTFSS; e.snz = 1; end
      endcase
    end else if (x[11:8] == 4'b1000) begin e.op = I_RETLW; e.we_w = 1; end
    else if (x[11:8] == 4'b1001) e.op = I_CALL;
    else if (x[11:9] == 3'b101) e.op = I_GOTO;
    else begin e.op = lit_ops[x[9:8]]; e.we_w = 1; e.z = (x[9:8] != 0); end
    return e;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 4096; i++) begin
      exp_t e;
      logic [11:0] word;
      word = 12'(i);
      e = expect_of(word);
      romdata = word;
      @(negedge clk);
      check("ir before q2 unchanged", int'(ir == word), (i == 0) ? 1 : 0, word);
      q2 = 1; @(negedge clk); q2 = 0;
      romdata = ~word;                      // must not matter after q2
      check("ir after q2", int'(ir), int'(word), word);
      q3 = 1; @(negedge clk); q3 = 0;
      check("op", int'(ctrl.op), int'(e.op), word);
      check("we_w", int'(ctrl.we_w), int'(e.we_w), word);
      check("we_f", int'(ctrl.we_f), int'(e.we_f), word);
      check("upd_z", int'(ctrl.upd_z), int'(e.z), word);
      check("upd_c", int'(ctrl.upd_c), int'(e.c), word);
      check("upd_dc", int'(ctrl.upd_dc), int'(e.dc), word);
      check("skip_z", int'(ctrl.skip_z), int'(e.sz), word);
      check("skip_nz", int'(ctrl.skip_nz), int'(e.snz), word);
      check("fsel", int'(ctrl.fsel), int'(word[4:0]), word);
      check("jump", int'(ctrl.jump), int'(e.op == I_GOTO), word);
      check("call", int'(ctrl.call), int'(e.op == I_CALL), word);
      check("ret", int'(ctrl.ret), int'(e.op == I_RETLW), word);
      check("sleep", int'(ctrl.sleep), int'(e.op == I_SLEEP), word);
      check("clrwdt", int'(ctrl.clrwdt), int'(e.op == I_CLRWDT), word);
      check("option", int'(ctrl.we_option), int'(e.op == I_OPTION), word);
      check("tris", int'(ctrl.we_tris), int'(e.op == I_TRIS), word);
      if (e.op == I_TRIS) check("tris port", int'(ctrl.tris_sel), int'(word[2:0]) - 5, word);
      if (e.op == I_GOTO) check("goto target", int'(ctrl.target), int'(word[8:0]), word);
      if (e.op inside {I_CALL, I_MOVLW, I_IORLW, I_ANDLW, I_XORLW, I_RETLW}) begin
        check("literal k", int'(ctrl.k), int'(word[7:0]), word);
        if (e.op != I_CALL) check("literal operand from k", int'(ctrl.sel_a), int'(SRC_K), word);
      end
      if (e.op inside {I_BSF, I_BTFSC, I_BTFSS})
        check("bit mask", int'(ctrl.k), 1 << word[7:5], word);
      if (e.op == I_BCF) check("clear mask", int'(ctrl.k), 255 - (1 << word[7:5]), word);
      if (e.op inside {I_BCF, I_BSF, I_BTFSC, I_BTFSS})
        check("bit ops take k on mux_b", int'(ctrl.sel_b), int'(SRC_K), word);
      if (e.op inside {I_SUBWF, I_ADDWF, I_ANDWF, I_IORWF, I_XORWF})
        check("f op w", int'({ctrl.sel_a, ctrl.sel_b}), int'({SRC_F, SRC_W}), word);
    end
    romdata = 12'hC55; kill = 1;
    q2 = 1; @(negedge clk); q2 = 0; kill = 0;
    check("kill loads NOP", int'(ir), 0, 12'hC55);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_alu_module: checks aluop_gen and the operand muxes of the ALU module.
//
// For each of the 33 instructions the generated aluop is compared with a table written from
// the instruction set, and for random operands and every mux_a/mux_b source pair the result
// of ADD, SUB (a - b), AND and PASS is checked against the selected operands.
module tb_alu_module;
  import pic_pkg::*;

  instr_t      op;
  src_t        sa, sb;
  logic [7:0]  w, f, k, y;
  logic        cin, cout, dc, zero;
  aluop_t      aluop;
  int checks = 0, failures = 0;

  alu_module dut (.opcode_func (op), .sel_a (sa), .sel_b (sb), .w (w), .f (f), .k (k),
                  .carry_in (cin), .aluop (aluop), .alu_out (y), .carry_out (cout),
                  .dc_out (dc), .zero (zero));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic aluop_t expected_op(instr_t i);
    case (i)
      I_ADDWF:                               return ALU_ADD;
      I_SUBWF:                               return ALU_SUB;
      I_ANDWF, I_ANDLW, I_BCF, I_BTFSC, I_BTFSS: return ALU_AND;
      I_IORWF, I_IORLW, I_BSF:               return ALU_IOR;
      I_XORWF, I_XORLW:                      return ALU_XOR;
      I_COMF:                                return ALU_COM;
      I_INCF, I_INCFSZ:                      return ALU_INC;
      I_DECF, I_DECFSZ:                      return ALU_DEC;
      I_RRF:                                 return ALU_RR;
      I_RLF:                                 return ALU_RL;
      I_SWAPF:                               return ALU_SWAP;
      I_CLRW, I_CLRF:                        return ALU_CLR;
      default:                               return ALU_PASS;
    endcase
  endfunction

  initial begin
    logic [7:0] src [3];
    cin = 0;
    for (int i = 0; i <= int'(I_XORLW); i++) begin
      op = instr_t'(i); sa = SRC_W; sb = SRC_W; w = 8'h5; f = 8'h3; k = 8'h9;
      #1;
      check($sformatf("aluop of %s", op.name()), int'(aluop), int'(expected_op(op)));
    end
    for (int n = 0; n < 2000; n++) begin
      w = 8'($urandom); f = 8'($urandom); k = 8'($urandom);
      src[0] = w; src[1] = f; src[2] = k;
      for (int x = 0; x < 3; x++) begin
        for (int z = 0; z < 3; z++) begin
          sa = src_t'(x); sb = src_t'(z);
          op = I_ADDWF; #1; check("add", int'(y), (int'(src[x]) + int'(src[z])) % 256);
          op = I_SUBWF; #1; check("sub", int'(y), (int'(src[x]) - int'(src[z]) + 256) % 256);
          check("sub carry", int'(cout), src[x] >= src[z] ? 1 : 0);
          op = I_ANDLW; #1; check("and", int'(y), int'(src[x] & src[z]));
          op = I_MOVF;  #1; check("pass", int'(y), int'(src[x]));
          check("zero", int'(zero), src[x] == 0 ? 1 : 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

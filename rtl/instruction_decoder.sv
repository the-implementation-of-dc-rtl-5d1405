// instruction_decoder: instruction register and decoder of the 33 twelve-bit instructions.
//
// At q2 the instruction register takes romdata, or a NOP when kill is high (the instruction
// after a taken skip, or while the processor sleeps). At q3 the decoded control word is
// registered into ctrl, which stays valid through q4, when the ALU result is written back.
// Decoding covers the three instruction formats: byte-oriented (bits 11:6 opcode, bit 5
// destination d, bits 4:0 register address f; d=0 writes W, d=1 writes f), bit-oriented
// (bits 11:8 opcode, bits 7:5 bit number b, bits 4:0 f) and literal (bits 11:8 opcode, bits
// 7:0 k; GOTO takes 9 bits). It also picks the operand muxes, the constant k (immediate or
// bit mask) and which status flags change. The formats follow the document's instruction
// table; the opcode values are the PIC16C5x ones. Unused encodings execute as NOP (this
// design's choice).
module instruction_decoder
  import pic_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               q2,
  input  logic               q3,
  input  logic               kill,
  input  logic [INSTR_W-1:0] romdata,
  output logic [INSTR_W-1:0] ir,
  output ctrl_t              ctrl
);

  ctrl_t dec;

  always_comb begin
    logic [7:0] mask;
    mask = 8'd1 << ir[7:5];

    dec           = '0;
    dec.op        = I_NOP;
    dec.sel_a     = SRC_F;
    dec.sel_b     = SRC_W;
    dec.fsel      = ir[4:0];
    dec.k         = ir[7:0];
    dec.target    = ir[8:0];

    casez (ir)
      12'b0000_0000_0000: dec.op = I_NOP;
      12'b0000_0000_0010: begin dec.op = I_OPTION; dec.sel_a = SRC_W; dec.we_option = 1'b1; end
      12'b0000_0000_0011: begin dec.op = I_SLEEP;  dec.sleep  = 1'b1; end
      12'b0000_0000_0100: begin dec.op = I_CLRWDT; dec.clrwdt = 1'b1; end
      12'b0000_0000_0101,
      12'b0000_0000_0110,
      12'b0000_0000_0111: begin
        dec.op = I_TRIS; dec.sel_a = SRC_W; dec.we_tris = 1'b1;
        dec.tris_sel = ir[1:0] - 2'd1;
      end
      12'b0000_001?_????: begin dec.op = I_MOVWF; dec.sel_a = SRC_W; dec.we_f = 1'b1; end
      12'b0000_010?_????: begin dec.op = I_CLRW;  dec.we_w = 1'b1; dec.upd_z = 1'b1; end
      12'b0000_011?_????: begin dec.op = I_CLRF;  dec.we_f = 1'b1; dec.upd_z = 1'b1; end
      12'b0000_10??_????: begin dec.op = I_SUBWF; {dec.upd_z, dec.upd_c, dec.upd_dc} = '1; end
      12'b0000_11??_????: begin dec.op = I_DECF;  dec.upd_z = 1'b1; end
      12'b0001_00??_????: begin dec.op = I_IORWF; dec.upd_z = 1'b1; end
      12'b0001_01??_????: begin dec.op = I_ANDWF; dec.upd_z = 1'b1; end
      12'b0001_10??_????: begin dec.op = I_XORWF; dec.upd_z = 1'b1; end
      12'b0001_11??_????: begin dec.op = I_ADDWF; {dec.upd_z, dec.upd_c, dec.upd_dc} = '1; end
      12'b0010_00??_????: begin dec.op = I_MOVF;  dec.upd_z = 1'b1; end
      12'b0010_01??_????: begin dec.op = I_COMF;  dec.upd_z = 1'b1; end
      12'b0010_10??_????: begin dec.op = I_INCF;  dec.upd_z = 1'b1; end
      12'b0010_11??_????: begin dec.op = I_DECFSZ; dec.skip_z = 1'b1; end
      12'b0011_00??_????: begin dec.op = I_RRF;   dec.upd_c = 1'b1; end
      12'b0011_01??_????: begin dec.op = I_RLF;   dec.upd_c = 1'b1; end
      12'b0011_10??_????: dec.op = I_SWAPF;
      12'b0011_11??_????: begin dec.op = I_INCFSZ; dec.skip_z = 1'b1; end
      12'b0100_????_????: begin dec.op = I_BCF; dec.sel_b = SRC_K; dec.k = ~mask; dec.we_f = 1'b1; end
      12'b0101_????_????: begin dec.op = I_BSF; dec.sel_b = SRC_K; dec.k = mask;  dec.we_f = 1'b1; end
      12'b0110_????_????: begin dec.op = I_BTFSC; dec.sel_b = SRC_K; dec.k = mask; dec.skip_z  = 1'b1; end
      12'b0111_????_????: begin dec.op = I_BTFSS; dec.sel_b = SRC_K; dec.k = mask; dec.skip_nz = 1'b1; end
      12'b1000_????_????: begin dec.op = I_RETLW; dec.sel_a = SRC_K; dec.we_w = 1'b1; dec.ret = 1'b1; end
      12'b1001_????_????: begin dec.op = I_CALL;  dec.call = 1'b1; end
      12'b101?_????_????: begin dec.op = I_GOTO;  dec.jump = 1'b1; end
      12'b1100_????_????: begin dec.op = I_MOVLW; dec.sel_a = SRC_K; dec.we_w = 1'b1; end
      12'b1101_????_????: begin dec.op = I_IORLW; dec.sel_a = SRC_K; dec.we_w = 1'b1; dec.upd_z = 1'b1; end
      12'b1110_????_????: begin dec.op = I_ANDLW; dec.sel_a = SRC_K; dec.we_w = 1'b1; dec.upd_z = 1'b1; end
      12'b1111_????_????: begin dec.op = I_XORLW; dec.sel_a = SRC_K; dec.we_w = 1'b1; dec.upd_z = 1'b1; end
      default:            dec.op = I_NOP;
    endcase

    // Byte-oriented arithmetic/logic instructions: d selects the destination.
    if (ir[11:10] == 2'b00 && ir[9:6] != 4'b0000) begin
      dec.we_w = ~ir[5];
      dec.we_f =  ir[5];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ir      <= NOP_WORD;
      ctrl    <= '0;
      ctrl.op <= I_NOP;
    end else begin
      if (q2) ir   <= kill ? NOP_WORD : romdata;
      if (q3) ctrl <= dec;
    end
  end

endmodule

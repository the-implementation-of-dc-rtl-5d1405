// alu_module: aluop_gen, mux_a, mux_b and the ALU.
//
// aluop_gen maps the decoded instruction (opcode_func) to one of the 13 ALU operations.
// mux_a and mux_b each pick one operand from the working register w, the addressed register
// f, or the decoder's constant k (immediate data, or the bit mask of BCF/BSF/BTFSC/BTFSS).
// The result alu_out goes to both the working register and the register file; the register
// module decides which one is written. Purely combinational: the control unit holds the
// control word steady from phase q3, and the register module samples the result at q4.
// The structure (aluop_gen, two operand muxes, flags carry/dc/zero) follows the block
// diagram of the ALU module; the operation chosen for each instruction is the PIC16C5x
// instruction set's.
module alu_module
  import pic_pkg::*;
(
  input  instr_t            opcode_func,
  input  src_t              sel_a,
  input  src_t              sel_b,
  input  logic [DATA_W-1:0] w,
  input  logic [DATA_W-1:0] f,
  input  logic [DATA_W-1:0] k,
  input  logic              carry_in,
  output aluop_t            aluop,
  output logic [DATA_W-1:0] alu_out,
  output logic              carry_out,
  output logic              dc_out,
  output logic              zero
);

  logic [DATA_W-1:0] mux_a, mux_b;

  // aluop_gen
  always_comb begin
    unique case (opcode_func)
      I_ADDWF:                     aluop = ALU_ADD;
      I_SUBWF:                     aluop = ALU_SUB;
      I_ANDWF, I_ANDLW, I_BCF,
      I_BTFSC, I_BTFSS:            aluop = ALU_AND;
      I_IORWF, I_IORLW, I_BSF:     aluop = ALU_IOR;
      I_XORWF, I_XORLW:            aluop = ALU_XOR;
      I_COMF:                      aluop = ALU_COM;
      I_INCF, I_INCFSZ:            aluop = ALU_INC;
      I_DECF, I_DECFSZ:            aluop = ALU_DEC;
      I_RRF:                       aluop = ALU_RR;
      I_RLF:                       aluop = ALU_RL;
      I_SWAPF:                     aluop = ALU_SWAP;
      I_CLRW, I_CLRF:              aluop = ALU_CLR;
      default:                     aluop = ALU_PASS;  // MOVF, MOVWF, MOVLW, RETLW, OPTION, TRIS, NOP
    endcase
  end

  // mux_a / mux_b
  always_comb begin
    unique case (sel_a)
      SRC_W:   mux_a = w;
      SRC_F:   mux_a = f;
      default: mux_a = k;
    endcase
    unique case (sel_b)
      SRC_W:   mux_b = w;
      SRC_F:   mux_b = f;
      default: mux_b = k;
    endcase
  end

  alu u_alu (
    .aluop     (aluop),
    .a         (mux_a),
    .b         (mux_b),
    .carry_in  (carry_in),
    .y         (alu_out),
    .carry_out (carry_out),
    .dc_out    (dc_out),
    .zero      (zero)
  );

endmodule

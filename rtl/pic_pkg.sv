// pic_pkg: types and constants shared by the 8-bit PIC16C57-style processor.
//
// The processor executes the 33 twelve-bit instructions of the PIC16C5x family in three
// formats: byte-oriented (opcode, d, 5-bit f), bit-oriented (opcode, 3-bit b, 5-bit f) and
// literal (opcode, 8- or 9-bit k). The decoder turns an instruction into an instr_t and a
// ctrl_t control word; the ALU module turns the instr_t into one of 13 ALU operations.
// Register addresses of status (0x03), fsr (0x04) and port C (0x07) are the PIC16C57 ones;
// ports A and B sit at 0x0B and 0x0C, as in this design's register selection table. All of
// them are parameters of the register module.
package pic_pkg;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned INSTR_W = 12;
  localparam int unsigned PC_W    = 11;   // 2048-word program memory
  localparam int unsigned FSEL_W  = 5;

  // The 13 ALU operations, selected by aluop[3:0].
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,   // a + b
    ALU_SUB  = 4'd1,   // a - b (two's complement), carry = no borrow
    ALU_AND  = 4'd2,
    ALU_IOR  = 4'd3,
    ALU_XOR  = 4'd4,
    ALU_COM  = 4'd5,   // ~a
    ALU_INC  = 4'd6,   // a + 1
    ALU_DEC  = 4'd7,   // a - 1
    ALU_RR   = 4'd8,   // rotate right through carry
    ALU_RL   = 4'd9,   // rotate left through carry
    ALU_SWAP = 4'd10,  // swap nibbles
    ALU_PASS = 4'd11,  // a
    ALU_CLR  = 4'd12   // 0
  } aluop_t;

  // Operand sources of mux_a and mux_b.
  typedef enum logic [1:0] {
    SRC_W = 2'd0,   // working register
    SRC_F = 2'd1,   // addressed register file / SFR
    SRC_K = 2'd2    // immediate data or bit mask from the decoder
  } src_t;

  // The 33 instructions (opcode_func).
  typedef enum logic [5:0] {
    I_NOP, I_MOVWF, I_CLRW, I_CLRF, I_SUBWF, I_DECF, I_IORWF, I_ANDWF, I_XORWF, I_ADDWF,
    I_MOVF, I_COMF, I_INCF, I_DECFSZ, I_RRF, I_RLF, I_SWAPF, I_INCFSZ,
    I_BCF, I_BSF, I_BTFSC, I_BTFSS,
    I_OPTION, I_SLEEP, I_CLRWDT, I_TRIS, I_RETLW, I_CALL, I_GOTO, I_MOVLW, I_IORLW,
    I_ANDLW, I_XORLW
  } instr_t;

  // Control word produced by the instruction decoder.
  typedef struct packed {
    instr_t              op;        // opcode_func, decoded instruction
    src_t                sel_a;     // mux_a select
    src_t                sel_b;     // mux_b select
    logic [DATA_W-1:0]   k;         // immediate data, or bit mask for bit instructions
    logic [FSEL_W-1:0]   fsel;      // register file address f
    logic                we_w;      // result to the working register
    logic                we_f;      // result to the addressed register
    logic                upd_z;     // instruction updates Z
    logic                upd_c;     // instruction updates C
    logic                upd_dc;    // instruction updates DC
    logic                skip_z;    // skip next instruction if the result is zero
    logic                skip_nz;   // skip next instruction if the result is not zero
    logic                jump;      // GOTO
    logic                call;      // CALL
    logic                ret;       // RETLW
    logic [8:0]          target;    // GOTO/CALL target bits
    logic                we_option; // OPTION
    logic                we_tris;   // TRIS
    logic [1:0]          tris_sel;  // 0: port A, 1: port B, 2: port C
    logic                sleep;     // SLEEP
    logic                clrwdt;    // CLRWDT
  } ctrl_t;

  localparam logic [INSTR_W-1:0] NOP_WORD = 12'h000;

  // Fixed special function register addresses (PIC16C57 map).
  localparam logic [FSEL_W-1:0] ADDR_INDF   = 5'h00;
  localparam logic [FSEL_W-1:0] ADDR_RTCC   = 5'h01;
  localparam logic [FSEL_W-1:0] ADDR_PCL    = 5'h02;
  localparam logic [FSEL_W-1:0] ADDR_STATUS = 5'h03;
  localparam logic [FSEL_W-1:0] ADDR_FSR    = 5'h04;

  // STATUS bit positions.
  localparam int unsigned ST_C  = 0;
  localparam int unsigned ST_DC = 1;
  localparam int unsigned ST_Z  = 2;
  localparam int unsigned ST_PD = 3;
  localparam int unsigned ST_TO = 4;

endpackage

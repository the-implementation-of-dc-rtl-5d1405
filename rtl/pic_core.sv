// pic_core: the 8-bit RISC processor without its program memory.
//
// A Harvard machine modelled on the PIC16C57: 12-bit instructions arrive on romdata from
// the address on romaddr, 8-bit data lives in the register module. The control unit fetches
// and decodes (q1-q3), the ALU module computes on two operands chosen from W, the addressed
// register f and the decoder's constant k (the two buses into the ALU), and the register
// module writes the result at q4. One instruction takes four clk cycles (1 us at 4 MHz);
// a taken skip, GOTO, CALL or RETLW also takes one cycle, a skipped instruction becomes a NOP
// cycle. romdata must hold the word at romaddr from the second clock of each instruction
// cycle (q2); a combinational ROM does that. Outputs: three 8-bit ports with their TRIS
// registers, and rtcc, status and fsr as in the processor's block diagram.
module pic_core
  import pic_pkg::*;
#(
  parameter logic [PC_W-1:0]   RESET_VECTOR = 11'h7FF,
  parameter logic [FSEL_W-1:0] PORTA_ADDR   = 5'h0B,
  parameter logic [FSEL_W-1:0] PORTB_ADDR   = 5'h0C,
  parameter logic [FSEL_W-1:0] PORTC_ADDR   = 5'h07,
  parameter int unsigned       BANKS        = 4
) (
  input  logic               clk,
  input  logic               rst,
  output logic [PC_W-1:0]    romaddr,
  input  logic [INSTR_W-1:0] romdata,
  input  logic [DATA_W-1:0]  porta_in,
  input  logic [DATA_W-1:0]  portb_in,
  input  logic [DATA_W-1:0]  portc_in,
  output logic [DATA_W-1:0]  porta_out,
  output logic [DATA_W-1:0]  portb_out,
  output logic [DATA_W-1:0]  portc_out,
  output logic [DATA_W-1:0]  trisa,
  output logic [DATA_W-1:0]  trisb,
  output logic [DATA_W-1:0]  trisc,
  output logic [DATA_W-1:0]  rtcc,
  output logic [DATA_W-1:0]  status,
  output logic [DATA_W-1:0]  fsr,
  output logic               cycle_end,   // q4: last clock of an instruction cycle
  output logic               asleep
);

  ctrl_t             ctrl;
  logic              q1, q2, q3, q4;
  logic [PC_W-1:0]   pc_plus1;
  logic [INSTR_W-1:0] ir;
  logic [DATA_W-1:0] w, f_rdata, alu_out;
  logic              alu_c, alu_dc, alu_z, pcl_we;
  logic [5:0]        option;
  aluop_t            aluop;

  assign cycle_end = q4;

  control_unit #(.RESET_VECTOR(RESET_VECTOR)) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .romdata  (romdata),
    .alu_zero (alu_z),
    .pcl_we   (pcl_we),
    .pcl_data (alu_out),
    .page     (status[6:5]),
    .romaddr  (romaddr),
    .pc_plus1 (pc_plus1),
    .ctrl     (ctrl),
    .q1       (q1),
    .q2       (q2),
    .q3       (q3),
    .q4       (q4),
    .asleep   (asleep),
    .ir       (ir)
  );

  alu_module u_alu (
    .opcode_func (ctrl.op),
    .sel_a       (ctrl.sel_a),
    .sel_b       (ctrl.sel_b),
    .w           (w),
    .f           (f_rdata),
    .k           (ctrl.k),
    .carry_in    (status[ST_C]),
    .aluop       (aluop),
    .alu_out     (alu_out),
    .carry_out   (alu_c),
    .dc_out      (alu_dc),
    .zero        (alu_z)
  );

  register_module #(
    .PORTA_ADDR (PORTA_ADDR),
    .PORTB_ADDR (PORTB_ADDR),
    .PORTC_ADDR (PORTC_ADDR),
    .BANKS      (BANKS)
  ) u_regs (
    .clk       (clk),
    .rst       (rst),
    .q4        (q4),
    .ctrl      (ctrl),
    .alu_out   (alu_out),
    .alu_c     (alu_c),
    .alu_dc    (alu_dc),
    .alu_z     (alu_z),
    .pcl       (pc_plus1[7:0]),
    .porta_in  (porta_in),
    .portb_in  (portb_in),
    .portc_in  (portc_in),
    .w         (w),
    .f_rdata   (f_rdata),
    .status    (status),
    .fsr       (fsr),
    .rtcc      (rtcc),
    .option    (option),
    .porta_out (porta_out),
    .portb_out (portb_out),
    .portc_out (portc_out),
    .trisa     (trisa),
    .trisb     (trisb),
    .trisc     (trisc),
    .pcl_we    (pcl_we)
  );

endmodule

// pic_processor: the 8-bit RISC processor with its 2048 x 12 program ROM.
//
// pic_core fetches from program_rom over romaddr[10:0] / romdata[11:0]. The ROM contents
// come from ROM_FILE. Port, rtcc, status and fsr outputs are those of pic_core; see there
// for timing (four clocks per instruction).
module pic_processor
  import pic_pkg::*;
#(
  parameter string             ROM_FILE     = "rtl/motor_firmware.hex",
  parameter logic [PC_W-1:0]   RESET_VECTOR = 11'h7FF,
  parameter logic [FSEL_W-1:0] PORTA_ADDR   = 5'h0B,
  parameter logic [FSEL_W-1:0] PORTB_ADDR   = 5'h0C,
  parameter logic [FSEL_W-1:0] PORTC_ADDR   = 5'h07
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] porta_in,
  input  logic [DATA_W-1:0] portb_in,
  input  logic [DATA_W-1:0] portc_in,
  output logic [DATA_W-1:0] porta_out,
  output logic [DATA_W-1:0] portb_out,
  output logic [DATA_W-1:0] portc_out,
  output logic [DATA_W-1:0] trisa,
  output logic [DATA_W-1:0] trisb,
  output logic [DATA_W-1:0] trisc,
  output logic [DATA_W-1:0] rtcc,
  output logic [DATA_W-1:0] status,
  output logic [DATA_W-1:0] fsr,
  output logic [PC_W-1:0]   romaddr,
  output logic              cycle_end,
  output logic              asleep
);

  logic [INSTR_W-1:0] romdata;

  program_rom #(.DEPTH(1 << PC_W), .ROM_FILE(ROM_FILE)) u_rom (
    .romaddr (romaddr),
    .romdata (romdata)
  );

  pic_core #(
    .RESET_VECTOR (RESET_VECTOR),
    .PORTA_ADDR   (PORTA_ADDR),
    .PORTB_ADDR   (PORTB_ADDR),
    .PORTC_ADDR   (PORTC_ADDR)
  ) u_core (
    .clk       (clk),
    .rst       (rst),
    .romaddr   (romaddr),
    .romdata   (romdata),
    .porta_in  (porta_in),
    .portb_in  (portb_in),
    .portc_in  (portc_in),
    .porta_out (porta_out),
    .portb_out (portb_out),
    .portc_out (portc_out),
    .trisa     (trisa),
    .trisb     (trisb),
    .trisc     (trisc),
    .rtcc      (rtcc),
    .status    (status),
    .fsr       (fsr),
    .cycle_end (cycle_end),
    .asleep    (asleep)
  );

endmodule

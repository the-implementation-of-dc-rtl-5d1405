// motor_con_top: DC motor controller on one chip, a small processor plus a PWM module.
//
// The processor (pic_processor, a PIC16C57-style 8-bit RISC machine with a 2048 x 12
// program ROM) runs the motor control program in ROM_FILE. Its port B output register is the
// speed command Motor_in of the motor control module, and bit 0 of its port C output register
// is the direction enable (1: clockwise). The motor control module turns these into a PWM
// pulse of duty/256 and steers it to one of the two motor lines. All ports, rtcc, status and
// fsr are brought out as in the system block diagram. One clock domain, clk (4 MHz gives a
// 1 us instruction cycle and a 15.6 kHz PWM with PWM_DIV = 1); rst is synchronous, active
// high.
// The split into processor and motor control module, the outputs and the use of processor
// ports to drive the motor module follow the document; which port bits drive Motor_in and
// enable is this design's choice, as is the supplied firmware: it configures port B and
// bit 0 of port C as outputs, then loops copying port A (speed) to port B and port C bit 1
// (direction) to port C bit 0.
module motor_con_top
  import pic_pkg::*;
#(
  parameter string       ROM_FILE = "rtl/motor_firmware.hex",
  parameter int unsigned PWM_DIV  = 1
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
  output logic              pwm_out,
  output logic [1:0]        motor_out
);

  logic cycle_end, asleep;

  pic_processor #(.ROM_FILE(ROM_FILE)) u_proc (
    .clk       (clk),
    .rst       (rst),
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
    .romaddr   (romaddr),
    .cycle_end (cycle_end),
    .asleep    (asleep)
  );

  motor_control #(.PWM_DIV(PWM_DIV)) u_motor (
    .clk       (clk),
    .rst       (rst),
    .motor_in  (portb_out),
    .enable    (portc_out[0]),
    .pwm_out   (pwm_out),
    .motor_out (motor_out)
  );

endmodule

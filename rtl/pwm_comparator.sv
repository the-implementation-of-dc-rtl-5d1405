// pwm_comparator: compares the pwm register with the PWM counter.
//
// equal is high while the 8-bit counter value equals the duty value. Combinational. It
// drives the reset input of the RS flip-flop, which ends the output pulse. The comparator and
// its Equal output are the document's.
module pwm_comparator (
  input  logic [7:0] duty,
  input  logic [7:0] count,
  output logic       equal
);

  assign equal = (duty == count);

endmodule

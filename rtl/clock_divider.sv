// clock_divider: splits each instruction cycle into four system-clock phases q1..q4.
//
// A 2-bit phase counter advances on every rising edge of clk; exactly one of q1..q4 is high
// in each clock, in the order q1, q2, q3, q4, q1, ... With a 4 MHz clk one instruction cycle
// is 1 us. The phases are used as clock enables in the single clk domain rather than as
// separate clocks (this design's choice). rst is synchronous and active high; the first
// clock after reset is q1. cycle_end is q4, the last phase of an instruction cycle.
module clock_divider (
  input  logic clk,
  input  logic rst,
  output logic q1,
  output logic q2,
  output logic q3,
  output logic q4
);

  logic [1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) phase <= 2'd0;
    else     phase <= phase + 2'd1;
  end

  always_comb begin
    q1 = (phase == 2'd0);
    q2 = (phase == 2'd1);
    q3 = (phase == 2'd2);
    q4 = (phase == 2'd3);
  end

  property p_onehot;
    @(posedge clk) disable iff (rst) $onehot({q1, q2, q3, q4});
  endproperty
  a_onehot: assert property (p_onehot);

endmodule

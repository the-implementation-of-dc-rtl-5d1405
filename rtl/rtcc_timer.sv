// rtcc_timer: the 8-bit real-time clock/counter register (RTCC, register address 0x01).
//
// It counts instruction cycles (tick, one pulse per cycle at q4) through a prescaler set by
// the OPTION register: option[5] (T0CS) = 1 stops counting, since the design has no external
// counter pin; option[3] (PSA) = 1 counts every cycle; otherwise the count advances once every
// 2^(option[2:0]+1) cycles. A write (we) loads wdata and clears the prescaler. rtcc is
// brought out of the chip. After reset the count and prescaler are 0. The OPTION bit layout
// is the PIC16C57's; the document names the rtcc output and the OPTION instruction only.
module rtcc_timer
  import pic_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              tick,
  input  logic [5:0]        option,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rtcc
);

  logic [7:0] prescale;
  logic [7:0] limit;
  logic       inc;

  always_comb begin
    limit = (8'd2 << option[2:0]) - 8'd1;
    inc   = 1'b0;
    if (tick && !option[5]) inc = option[3] || (prescale == limit);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rtcc     <= '0;
      prescale <= '0;
    end else if (we) begin
      rtcc     <= wdata;
      prescale <= '0;
    end else if (tick && !option[5]) begin
      if (inc) rtcc <= rtcc + 8'd1;
      if (!option[3]) prescale <= (prescale == limit) ? 8'd0 : prescale + 8'd1;
    end
  end

endmodule

// alu: the 8-bit arithmetic/logic core of the processor.
//
// Performs one of 13 operations, chosen by aluop[3:0], on operands a and b (selected by
// mux_a and mux_b in the ALU module). Subtraction is a - b in two's complement: a + ~b + 1,
// and carry_out is then the PIC convention "no borrow" (1 when a >= b). dc_out is the carry
// (or no-borrow) out of bit 3 for ADD and SUB. Rotates go through carry_in/carry_out. For
// other operations carry_out repeats carry_in and dc_out is 0; the register module only takes
// the flags an instruction is defined to change. zero is 1 when the result is 0.
// Purely combinational. The set of operations follows the document's count of 13 operations
// and the instruction set; their encoding is this design's choice.
module alu
  import pic_pkg::*;
(
  input  aluop_t            aluop,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              carry_in,
  output logic [DATA_W-1:0] y,
  output logic              carry_out,
  output logic              dc_out,
  output logic              zero
);

  logic [DATA_W:0] sum;
  logic [4:0]      nib;

  always_comb begin
    y         = '0;
    carry_out = carry_in;
    dc_out    = 1'b0;
    sum       = '0;
    nib       = '0;
    unique case (aluop)
      ALU_ADD: begin
        sum       = {1'b0, a} + {1'b0, b};
        nib       = {1'b0, a[3:0]} + {1'b0, b[3:0]};
        y         = sum[DATA_W-1:0];
        carry_out = sum[DATA_W];
        dc_out    = nib[4];
      end
      ALU_SUB: begin
        sum       = {1'b0, a} + {1'b0, ~b} + 9'd1;
        nib       = {1'b0, a[3:0]} + {1'b0, ~b[3:0]} + 5'd1;
        y         = sum[DATA_W-1:0];
        carry_out = sum[DATA_W];
        dc_out    = nib[4];
      end
      ALU_AND:  y = a & b;
      ALU_IOR:  y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_COM:  y = ~a;
      ALU_INC:  y = a + 8'd1;
      ALU_DEC:  y = a - 8'd1;
      ALU_RR: begin
        y         = {carry_in, a[DATA_W-1:1]};
        carry_out = a[0];
      end
      ALU_RL: begin
        y         = {a[DATA_W-2:0], carry_in};
        carry_out = a[DATA_W-1];
      end
      ALU_SWAP: y = {a[3:0], a[7:4]};
      ALU_PASS: y = a;
      ALU_CLR:  y = '0;
      default:  y = a;
    endcase
    zero = (y == '0);
  end

endmodule

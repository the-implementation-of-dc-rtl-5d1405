// program_counter: the 11-bit program counter (romaddr[10:0]) and the two-level call stack.
//
// pc is the address of the instruction being fetched; it is loaded from next_pc at q1.
// next_pc is settled at q4 of the executing instruction:
//   GOTO      next_pc = {page, k[8:0]}
//   CALL      next_pc = {page, 0, k[7:0]}, the return address pc+1 is pushed
//   RETLW     next_pc = top of stack, the stack pops (the lower level is kept)
//   PCL write next_pc = {page, 0, data}
//   otherwise next_pc = pc + 1
// page is STATUS<6:5>. hold (sleep) stops the load at q1. After reset pc and next_pc are
// RESET_VECTOR. The branch rules, stack depth and 0x7FF reset vector are those of the
// PIC16C57 the processor is modelled on; the q1 load follows the control module's timing.
module program_counter
  import pic_pkg::*;
#(
  parameter logic [PC_W-1:0] RESET_VECTOR = 11'h7FF
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            q1,
  input  logic            q4,
  input  logic            hold,
  input  logic            jump,
  input  logic            call,
  input  logic            ret,
  input  logic [8:0]      target,
  input  logic            pcl_we,
  input  logic [7:0]      pcl_data,
  input  logic [1:0]      page,
  output logic [PC_W-1:0] pc,
  output logic [PC_W-1:0] pc_plus1
);

  logic [PC_W-1:0] next_pc;
  logic [PC_W-1:0] stack [2];

  assign pc_plus1 = pc + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= RESET_VECTOR;
      next_pc  <= RESET_VECTOR;
      stack[0] <= '0;
      stack[1] <= '0;
    end else begin
      if (q1 && !hold) pc <= next_pc;
      if (q4) begin
        if (jump) begin
          next_pc <= {page, target};
        end else if (call) begin
          next_pc  <= {page, 1'b0, target[7:0]};
          stack[0] <= pc_plus1;
          stack[1] <= stack[0];
        end else if (ret) begin
          next_pc  <= stack[0];
          stack[0] <= stack[1];
        end else if (pcl_we) begin
          next_pc <= {page, 1'b0, pcl_data};
        end else begin
          next_pc <= pc_plus1;
        end
      end
    end
  end

  a_one_branch: assert property (@(posedge clk) disable iff (rst)
    q4 |-> $onehot0({jump, call, ret}));

endmodule

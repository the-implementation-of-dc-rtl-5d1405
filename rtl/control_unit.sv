// control_unit: clock divider, program counter and instruction decoder.
//
// Each instruction takes one instruction cycle of four clocks:
//   q1  the program counter loads the address of the instruction to fetch (romaddr)
//   q2  the instruction register takes romdata
//   q3  the decoded control word is registered and drives the ALU and register module
//   q4  the register module writes the result; the program counter settles the next address
// Skips (DECFSZ, INCFSZ, BTFSC, BTFSS) are resolved at q4 from the ALU zero flag: the next
// fetched instruction is then replaced by a NOP, so a taken skip costs one extra cycle. SLEEP
// stops the program counter and feeds NOPs until reset. This phase schedule follows the
// control module's description; squashing skipped instructions and the reset-only wake-up
// are this design's choices (the processor has no watchdog timer).
module control_unit
  import pic_pkg::*;
#(
  parameter logic [PC_W-1:0] RESET_VECTOR = 11'h7FF
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [INSTR_W-1:0] romdata,
  input  logic               alu_zero,
  input  logic               pcl_we,
  input  logic [7:0]         pcl_data,
  input  logic [1:0]         page,
  output logic [PC_W-1:0]    romaddr,
  output logic [PC_W-1:0]    pc_plus1,
  output ctrl_t              ctrl,
  output logic               q1,
  output logic               q2,
  output logic               q3,
  output logic               q4,
  output logic               asleep,
  output logic [INSTR_W-1:0] ir
);

  logic                skip_pending;

  clock_divider u_clkdiv (
    .clk (clk), .rst (rst), .q1 (q1), .q2 (q2), .q3 (q3), .q4 (q4)
  );

  program_counter #(.RESET_VECTOR(RESET_VECTOR)) u_pc (
    .clk      (clk),
    .rst      (rst),
    .q1       (q1),
    .q4       (q4),
    .hold     (asleep),
    .jump     (ctrl.jump),
    .call     (ctrl.call),
    .ret      (ctrl.ret),
    .target   (ctrl.target),
    .pcl_we   (pcl_we),
    .pcl_data (pcl_data),
    .page     (page),
    .pc       (romaddr),
    .pc_plus1 (pc_plus1)
  );

  instruction_decoder u_dec (
    .clk     (clk),
    .rst     (rst),
    .q2      (q2),
    .q3      (q3),
    .kill    (skip_pending || asleep),
    .romdata (romdata),
    .ir      (ir),
    .ctrl    (ctrl)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      skip_pending <= 1'b0;
      asleep       <= 1'b0;
    end else if (q4) begin
      skip_pending <= (ctrl.skip_z && alu_zero) || (ctrl.skip_nz && !alu_zero);
      if (ctrl.sleep) asleep <= 1'b1;
    end
  end

endmodule

// program_rom: the 2048 x 12 program memory (P_ROM).
//
// An asynchronous-read ROM: romdata is the word at romaddr. Its contents are the assembled
// program, read at elaboration from the hex file ROM_FILE (one 12-bit word per line, address
// 0 first); words the file does not give are 0, the NOP instruction. The size is the
// document's; loading from a hex file instead of a constant table is this design's choice.
module program_rom
  import pic_pkg::*;
#(
  parameter int unsigned DEPTH    = 2048,
  parameter string       ROM_FILE = "rtl/motor_firmware.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] romaddr,
  output logic [INSTR_W-1:0]       romdata
);

  logic [INSTR_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = NOP_WORD;
    if (ROM_FILE != "") $readmemh(ROM_FILE, rom);
  end

  assign romdata = rom[romaddr];

endmodule

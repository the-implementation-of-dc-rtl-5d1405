// register_file: the general-purpose data memory of the processor.
//
// Register addresses 0x00-0x0F map to 16 common bytes (the low ones are shadowed by the
// special function registers in the register module and never used). Addresses 0x10-0x1F map
// to one of BANKS banks of 16 bytes, chosen by bank = FSR<6:5>. With the default 4 banks the
// memory holds 80 bytes, of which the PIC16C57 map uses 72. Reads are combinational; a write
// takes effect at the rising edge of clk when we is high. Contents are not reset. Bank
// selection by FSR<6:5> follows the document; the memory organisation is the PIC16C57's.
module register_file
  import pic_pkg::*;
#(
  parameter int unsigned BANKS = 4
) (
  input  logic              clk,
  input  logic              we,
  input  logic [FSEL_W-1:0] addr,
  input  logic [1:0]        bank,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = 16 + 16 * BANKS;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] index;

  always_comb begin
    if (addr[4]) index = $clog2(DEPTH)'(16 + 16 * (int'(bank) % BANKS) + int'(addr[3:0]));
    else         index = $clog2(DEPTH)'(addr[3:0]);
  end

  assign rdata = mem[index];

  always_ff @(posedge clk) begin
    if (we) mem[index] <= wdata;
  end

endmodule

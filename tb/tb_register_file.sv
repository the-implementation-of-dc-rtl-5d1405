// tb_register_file: writes random data to every address of every bank and reads it back
// against a model memory; addresses below 0x10 must be shared by all banks, addresses
// 0x10-0x1F must be separate per bank.
module tb_register_file;
  logic       clk = 0, we = 0;
  logic [4:0] addr = 0;
  logic [1:0] bank = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [4][32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  register_file dut (.clk (clk), .we (we), .addr (addr), .bank (bank), .wdata (wdata), .rdata (rdata));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1; bank = 2'($urandom); addr = 5'($urandom); wdata = 8'($urandom);
      if (addr < 16) for (int b = 0; b < 4; b++) model[b][addr] = wdata;
      else model[bank][addr] = wdata;
      @(negedge clk); we = 0;
    end
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < 32; a++) begin
        bank = 2'(b); addr = 5'(a); #1;
        checks++;
        if (rdata !== model[b][a]) begin
          failures++; $display("FAIL bank %0d addr %h: got %h exp %h", b, a, rdata, model[b][a]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

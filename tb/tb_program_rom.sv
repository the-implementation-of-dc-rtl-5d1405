// tb_program_rom: reads every one of the 2048 words of the program ROM and compares it with
// the motor control program listed here (addresses 0-11) and NOP everywhere else.
module tb_program_rom;
  logic [10:0] romaddr = 0;
  logic [11:0] romdata;
  int checks = 0, failures = 0;
  logic [11:0] listing [12] = '{12'hC00, 12'h006, 12'hCFE, 12'h007, 12'h20B, 12'h02C,
                                12'h727, 12'hA0A, 12'h507, 12'hA04, 12'h407, 12'hA04};

  program_rom dut (.romaddr (romaddr), .romdata (romdata));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2048; a++) begin
      logic [11:0] exp;
      romaddr = 11'(a);
      #1;
      exp = (a < 12) ? listing[a] : 12'h000;
      checks++;
      if (romdata !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL address %h: got %h exp %h", a, romdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

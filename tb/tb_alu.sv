// tb_alu: exhaustive check of the 13 ALU operations.
//
// For every operation and every pair of 8-bit operands (carry_in random) the result and
// flags are compared with values computed here in integer arithmetic: carry/no-borrow and
// digit carry for ADD and SUB, the rotated-out bit for RR and RL, zero for all.
module tb_alu;
  import pic_pkg::*;

  aluop_t      aluop;
  logic [7:0]  a, b, y;
  logic        cin, cout, dc, zero;
  int checks = 0, failures = 0;

  alu dut (.aluop (aluop), .a (a), .b (b), .carry_in (cin), .y (y), .carry_out (cout),
           .dc_out (dc), .zero (zero));

  initial begin : watchdog
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s op=%0d a=%h b=%h: got %h exp %h", what, aluop, a, b, got, exp);
    end
  endtask

  initial begin
    for (int op = 0; op < 13; op++) begin
      for (int ia = 0; ia < 256; ia++) begin
        for (int ib = 0; ib < 256; ib++) begin
          int ey, ec, edc;
          aluop = aluop_t'(op); a = 8'(ia); b = 8'(ib); cin = 1'($urandom);
          #1;
          ec = int'(cin); edc = -1;
          case (op)
            0:  begin ey = (ia + ib) % 256; ec = (ia + ib) > 255 ? 1 : 0;
                      edc = ((ia % 16) + (ib % 16)) > 15 ? 1 : 0; end
            1:  begin ey = (ia - ib + 256) % 256; ec = ia >= ib ? 1 : 0;
                      edc = (ia % 16) >= (ib % 16) ? 1 : 0; end
            2:  ey = ia & ib;
            3:  ey = ia | ib;
            4:  ey = ia ^ ib;
            5:  ey = 255 - ia;
            6:  ey = (ia + 1) % 256;
            7:  ey = (ia + 255) % 256;
            8:  begin ey = ia / 2 + 128 * int'(cin); ec = ia % 2; end
            9:  begin ey = (ia * 2) % 256 + int'(cin); ec = ia / 128; end
            10: ey = (ia % 16) * 16 + ia / 16;
            11: ey = ia;
            default: ey = 0;
          endcase
          check("y", int'(y), ey);
          check("carry", int'(cout), ec);
          if (edc >= 0) check("dc", int'(dc), edc);
          check("zero", int'(zero), ey == 0 ? 1 : 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pwm_comparator: exhaustive check of Equal over all duty/count pairs.
module tb_pwm_comparator;
  logic [7:0] duty, count;
  logic       equal;
  int checks = 0, failures = 0;

  pwm_comparator dut (.duty (duty), .count (count), .equal (equal));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++)
      for (int c = 0; c < 256; c++) begin
        duty = 8'(d); count = 8'(c);
        #1;
        checks++;
        if (int'(equal) != int'(d == c)) begin
          failures++;
          if (failures < 10) $display("FAIL duty %0d count %0d: equal %b", d, c, equal);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

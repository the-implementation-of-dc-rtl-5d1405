// tb_rs_flipflop: all four s/r combinations from both states; reset wins over set.
module tb_rs_flipflop;
  logic clk = 0, rst = 1, s = 0, r = 0, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rs_flipflop dut (.clk (clk), .rst (rst), .s (s), .r (r), .q (q));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 0; model = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      s = 1'($urandom); r = 1'($urandom);
      model = r ? 1'b0 : (s ? 1'b1 : model);
      @(negedge clk);
      s = 0; r = 0;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%b expected %b", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

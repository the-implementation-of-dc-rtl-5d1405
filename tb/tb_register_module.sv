// tb_register_module: drives control words directly into the register module and checks
// W, the register file, STATUS (direct write then flag update), FSR indirect addressing and
// bank selection, port latches with TRIS-controlled read-back, the PCL write strobe, RTCC
// load, OPTION, SLEEP/CLRWDT effects on TO/PD, and that nothing is written outside q4.
module tb_register_module;
  import pic_pkg::*;

  logic       clk = 0, rst = 1, q4 = 0;
  ctrl_t      ctrl;
  logic [7:0] alu_out = 0, pcl = 8'h3C;
  logic       alu_c = 0, alu_dc = 0, alu_z = 0;
  logic [7:0] pa_in = 8'h11, pb_in = 8'h3C, pc_in = 8'h77;
  logic [7:0] w, f_rdata, status, fsr, rtcc, pa_out, pb_out, pc_out, trisa, trisb, trisc;
  logic [5:0] option;
  logic       pcl_we;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  register_module dut (.clk (clk), .rst (rst), .q4 (q4), .ctrl (ctrl), .alu_out (alu_out),
    .alu_c (alu_c), .alu_dc (alu_dc), .alu_z (alu_z), .pcl (pcl), .porta_in (pa_in),
    .portb_in (pb_in), .portc_in (pc_in), .w (w), .f_rdata (f_rdata), .status (status),
    .fsr (fsr), .rtcc (rtcc), .option (option), .porta_out (pa_out), .portb_out (pb_out),
    .portc_out (pc_out), .trisa (trisa), .trisb (trisb), .trisc (trisc), .pcl_we (pcl_we));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic ctrl_t nop();
    ctrl_t c = '0;
    c.op = I_NOP;
    return c;
  endfunction

  // Apply a control word and result for one q4 clock.
  task automatic exec(ctrl_t c, logic [7:0] r);
    @(negedge clk);
    ctrl = c; alu_out = r; q4 = 1;
    @(negedge clk);
    q4 = 0; ctrl = nop();
  endtask

  task automatic write_f(logic [4:0] a, logic [7:0] v);
    ctrl_t c = nop();
    c.fsel = a; c.we_f = 1;
    exec(c, v);
  endtask

  task automatic check_f(string what, logic [4:0] a, int exp);
    ctrl.fsel = a;
    #1;
    check(what, f_rdata, exp);
  endtask

  initial begin
    ctrl_t c;
    ctrl = nop();
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check("reset status", status, 8'h18);
    check("reset tris", {trisa, trisb, trisc}, 24'hFFFFFF);
    check("reset option", option, 6'h3F);
    // W
    c = nop(); c.we_w = 1; exec(c, 8'h5A);
    check("W write", w, 8'h5A);
    // no write outside q4
    @(negedge clk); ctrl = nop(); ctrl.we_w = 1; alu_out = 8'h99;
    @(negedge clk); ctrl = nop();
    check("no write without q4", w, 8'h5A);
    // RAM common and banked
    write_f(5'h08, 8'hA1);
    write_f(5'h15, 8'hB0);              // bank 0
    write_f(5'h04, 8'h20);              // FSR: bank 1
    write_f(5'h15, 8'hB1);              // bank 1
    check_f("bank 1 read", 5'h15, 8'hB1);
    check_f("common read in bank 1", 5'h08, 8'hA1);
    write_f(5'h04, 8'h15);              // FSR: bank 0, points to 0x15
    check_f("bank 0 read", 5'h15, 8'hB0);
    check_f("indirect read", 5'h00, 8'hB0);
    write_f(5'h00, 8'hC3);              // indirect write
    check_f("indirect write", 5'h15, 8'hC3);
    write_f(5'h04, 8'h00);
    check_f("INDF with FSR=0 reads 0", 5'h00, 0);
    // STATUS: direct write then flag update
    c = nop(); c.fsel = 5'h03; c.we_f = 1; c.upd_z = 1;
    alu_z = 0; exec(c, 8'hFF);
    check("status write keeps TO/PD, then Z", status, 8'hFB);
    c = nop(); c.upd_c = 1; c.upd_dc = 1; alu_c = 0; alu_dc = 0; exec(c, 8'h00);
    check("C and DC update", status, 8'hF8);
    c = nop(); c.sleep = 1; exec(c, 8'h00);
    check("SLEEP: TO=1 PD=0", status[4:3], 2'b10);
    c = nop(); c.clrwdt = 1; exec(c, 8'h00);
    check("CLRWDT: TO=1 PD=1", status[4:3], 2'b11);
    c = nop(); c.sleep = 1; exec(c, 8'h00);
    write_f(5'h03, 8'h07);
    check("direct STATUS write cannot change TO/PD", status, 8'h17);
    // Ports
    c = nop(); c.we_tris = 1; c.tris_sel = 2'd1; exec(c, 8'h0F);
    check("TRIS B", trisb, 8'h0F);
    write_f(5'h0C, 8'hA5);
    check("port B latch", pb_out, 8'hA5);
    check_f("port B read-back mixes pins and latch", 5'h0C, 8'hAC);
    check_f("port A read (all inputs)", 5'h0B, 8'h11);
    write_f(5'h07, 8'h42);
    check("port C latch", pc_out, 8'h42);
    c = nop(); c.we_tris = 1; c.tris_sel = 2'd2; exec(c, 8'h00);
    check_f("port C read (all outputs)", 5'h07, 8'h42);
    c = nop(); c.we_tris = 1; c.tris_sel = 2'd0; exec(c, 8'hF0);
    check("TRIS A", trisa, 8'hF0);
    // PCL, RTCC, OPTION
    check_f("PCL read", 5'h02, 8'h3C);
    @(negedge clk); ctrl = nop(); ctrl.fsel = 5'h02; ctrl.we_f = 1; q4 = 1; #1;
    check("PCL write strobe", pcl_we, 1);
    @(negedge clk); q4 = 0; ctrl = nop();
    write_f(5'h01, 8'h80);
    check("RTCC load", rtcc, 8'h80);
    c = nop(); c.we_option = 1; exec(c, 8'h28);
    check("OPTION", option, 6'h28);
    check("W unchanged", w, 8'h5A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

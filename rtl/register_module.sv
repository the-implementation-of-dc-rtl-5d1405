// register_module: working register W, register file and special function registers.
//
// The module stores what the ALU computes. At q4, mux_win loads alu_out into W when the
// instruction's destination is W, and mux_fin loads alu_out into the register selected by
// the effective address when the destination is f. The effective address is fsel, or
// FSR<4:0> when fsel is 0 (indirect addressing through INDF); FSR<6:5> selects the bank of
// addresses 0x10-0x1F. The special function registers are:
//   0x01 RTCC (rtcc_timer), 0x02 PCL (low byte of the program counter; a write redirects the
//   program counter), 0x03 STATUS {PA2, PA1, PA0, TO, PD, Z, DC, C}, 0x04 FSR, and the three
//   8-bit I/O ports at PORTA_ADDR, PORTB_ADDR, PORTC_ADDR.
// Reading a port gives, bit by bit, the input pin when its TRIS bit is 1 (input) and the
// output latch when it is 0. The TRIS instruction loads a port's TRIS register from W; OPTION
// loads the 6-bit OPTION register. Status flags Z, DC and C are updated only by instructions
// defined to change them, after any direct write of STATUS; TO and PD change only through
// SLEEP and CLRWDT. f_rdata is combinational for the ALU's mux inputs.
// Reset: W=0, STATUS=0x18, FSR=0, port latches 0, TRIS=0xFF, OPTION=0x3F.
// The register set, the selection of status, fsr and ports by fsel and the port addresses
// follow the document; reset values and port read-back are the PIC16C57's.
module register_module
  import pic_pkg::*;
#(
  parameter logic [FSEL_W-1:0] PORTA_ADDR = 5'h0B,
  parameter logic [FSEL_W-1:0] PORTB_ADDR = 5'h0C,
  parameter logic [FSEL_W-1:0] PORTC_ADDR = 5'h07,
  parameter int unsigned       BANKS      = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              q4,
  input  ctrl_t             ctrl,
  input  logic [DATA_W-1:0] alu_out,
  input  logic              alu_c,
  input  logic              alu_dc,
  input  logic              alu_z,
  input  logic [7:0]        pcl,          // low byte of the address of the next instruction
  input  logic [DATA_W-1:0] porta_in,
  input  logic [DATA_W-1:0] portb_in,
  input  logic [DATA_W-1:0] portc_in,
  output logic [DATA_W-1:0] w,
  output logic [DATA_W-1:0] f_rdata,
  output logic [DATA_W-1:0] status,
  output logic [DATA_W-1:0] fsr,
  output logic [DATA_W-1:0] rtcc,
  output logic [5:0]        option,
  output logic [DATA_W-1:0] porta_out,
  output logic [DATA_W-1:0] portb_out,
  output logic [DATA_W-1:0] portc_out,
  output logic [DATA_W-1:0] trisa,
  output logic [DATA_W-1:0] trisb,
  output logic [DATA_W-1:0] trisc,
  output logic              pcl_we
);

  // One-hot register selection decoded from the effective address.
  typedef struct packed {
    logic indf, rtcc, pcl, status, fsr, porta, portb, portc, ram;
  } regsel_t;

  logic [FSEL_W-1:0] ea;
  regsel_t           sel;
  logic [DATA_W-1:0] ram_rdata;
  logic              wr_f;
  logic [DATA_W-1:0] status_d;

  assign ea   = (ctrl.fsel == ADDR_INDF) ? fsr[FSEL_W-1:0] : ctrl.fsel;
  assign wr_f = q4 && ctrl.we_f;

  always_comb begin
    sel = '0;
    if      (ea == ADDR_INDF)   sel.indf   = 1'b1;
    else if (ea == ADDR_RTCC)   sel.rtcc   = 1'b1;
    else if (ea == ADDR_PCL)    sel.pcl    = 1'b1;
    else if (ea == ADDR_STATUS) sel.status = 1'b1;
    else if (ea == ADDR_FSR)    sel.fsr    = 1'b1;
    else if (ea == PORTA_ADDR)  sel.porta  = 1'b1;
    else if (ea == PORTB_ADDR)  sel.portb  = 1'b1;
    else if (ea == PORTC_ADDR)  sel.portc  = 1'b1;
    else                        sel.ram    = 1'b1;
  end

  always_comb begin
    unique case (1'b1)
      sel.indf:   f_rdata = '0;
      sel.rtcc:   f_rdata = rtcc;
      sel.pcl:    f_rdata = pcl;
      sel.status: f_rdata = status;
      sel.fsr:    f_rdata = fsr;
      sel.porta:  f_rdata = (trisa & porta_in) | (~trisa & porta_out);
      sel.portb:  f_rdata = (trisb & portb_in) | (~trisb & portb_out);
      sel.portc:  f_rdata = (trisc & portc_in) | (~trisc & portc_out);
      default:    f_rdata = ram_rdata;
    endcase
  end

  register_file #(.BANKS(BANKS)) u_rf (
    .clk   (clk),
    .we    (wr_f && sel.ram),
    .addr  (ea),
    .bank  (fsr[6:5]),
    .wdata (alu_out),
    .rdata (ram_rdata)
  );

  rtcc_timer u_rtcc (
    .clk    (clk),
    .rst    (rst),
    .tick   (q4),
    .option (option),
    .we     (wr_f && sel.rtcc),
    .wdata  (alu_out),
    .rtcc   (rtcc)
  );

  assign pcl_we = wr_f && sel.pcl;

  // Next STATUS: direct write first, then the flags the instruction changes.
  always_comb begin
    status_d = status;
    if (ctrl.we_f && sel.status) status_d = {alu_out[7:5], status[4:3], alu_out[2:0]};
    if (ctrl.upd_z)  status_d[ST_Z]  = alu_z;
    if (ctrl.upd_dc) status_d[ST_DC] = alu_dc;
    if (ctrl.upd_c)  status_d[ST_C]  = alu_c;
    if (ctrl.sleep)  begin status_d[ST_TO] = 1'b1; status_d[ST_PD] = 1'b0; end
    if (ctrl.clrwdt) begin status_d[ST_TO] = 1'b1; status_d[ST_PD] = 1'b1; end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      w         <= '0;
      status    <= 8'h18;
      fsr       <= '0;
      option    <= 6'h3F;
      porta_out <= '0;
      portb_out <= '0;
      portc_out <= '0;
      trisa     <= '1;
      trisb     <= '1;
      trisc     <= '1;
    end else if (q4) begin
      if (ctrl.we_w) w <= alu_out;           // mux_win
      status <= status_d;
      if (ctrl.we_f) begin                    // mux_fin
        if (sel.fsr)   fsr       <= alu_out;
        if (sel.porta) porta_out <= alu_out;
        if (sel.portb) portb_out <= alu_out;
        if (sel.portc) portc_out <= alu_out;
      end
      if (ctrl.we_option) option <= alu_out[5:0];
      if (ctrl.we_tris) begin
        unique case (ctrl.tris_sel)
          2'd0:    trisa <= alu_out;
          2'd1:    trisb <= alu_out;
          default: trisc <= alu_out;
        endcase
      end
    end
  end

  a_sel_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(sel));

endmodule

// pic_iss_pkg: instruction-level reference model of the PIC16C57-style processor, for
// testbenches.
//
// pic_iss executes one instruction cycle per call of step(): a NOP in place of a skipped
// instruction, nothing while asleep, otherwise the instruction at pc. It is written from the
// instruction set definition and shares no code with the RTL. The register map (ports A, B, C
// at 0x0B, 0x0C, 0x07, four banks of 16 bytes above 0x10) matches the RTL defaults. The timer
// counts at the end of every cycle with the OPTION value that held during the cycle.
package pic_iss_pkg;

  class pic_iss;
    bit [10:0] pc;
    bit [7:0]  w, status, fsr, rtcc;
    bit [5:0]  option;
    bit [7:0]  tris[3], port_out[3], port_in[3];
    bit [7:0]  ram[80];
    bit [10:0] stack[2];
    bit [7:0]  prescale;
    bit        skip, asleep;
    bit [7:0]  port_addr[3] = '{8'h0B, 8'h0C, 8'h07};
    // statistics
    int unsigned skips_taken, pcl_writes, indirect_ops, banked_ops, squashed;

    function new();
      reset();
    endfunction

    function void reset();
      pc = 11'h7FF; w = 0; status = 8'h18; fsr = 0; rtcc = 0; option = 6'h3F;
      foreach (tris[i]) begin tris[i] = 8'hFF; port_out[i] = 0; end
      stack[0] = 0; stack[1] = 0; prescale = 0; skip = 0; asleep = 0;
    endfunction

    function int ram_index(bit [4:0] a);
      if (a[4]) return 16 + 16 * int'(fsr[6:5]) + int'(a[3:0]);
      return int'(a[3:0]);
    endfunction

    function bit [7:0] rd(bit [4:0] a, bit [10:0] npc);
      if (a == 0) return 0;
      if (a == 1) return rtcc;
      if (a == 2) return npc[7:0];
      if (a == 3) return status;
      if (a == 4) return fsr;
      for (int i = 0; i < 3; i++)
        if (a == port_addr[i][4:0]) return (tris[i] & port_in[i]) | (~tris[i] & port_out[i]);
      return ram[ram_index(a)];
    endfunction

    // Returns 1 when the timer register was written.
    function bit wr(bit [4:0] a, bit [7:0] v, ref bit [10:0] npc);
      if (a == 0) return 0;
      if (a == 1) begin rtcc = v; prescale = 0; return 1; end
      if (a == 2) begin npc = {status[6:5], 1'b0, v}; pcl_writes++; return 0; end
      if (a == 3) begin status = {v[7:5], status[4:3], v[2:0]}; return 0; end
      if (a == 4) begin fsr = v; return 0; end
      for (int i = 0; i < 3; i++)
        if (a == port_addr[i][4:0]) begin port_out[i] = v; return 0; end
      ram[ram_index(a)] = v;
      return 0;
    endfunction

    function void tick(bit [5:0] opt, bit written);
      int unsigned ratio;
      if (written || opt[5]) return;
      if (opt[3]) begin rtcc++; return; end
      ratio = 2 << opt[2:0];
      prescale++;
      if (int'(prescale) == ratio || (ratio == 256 && prescale == 0)) begin
        prescale = 0; rtcc++;
      end
    endfunction

    // One instruction cycle; ir is the word the program memory holds at pc.
    function void step(bit [11:0] word);
      bit [11:0] ir;
      bit [10:0] npc;
      bit [4:0]  f, ea;
      bit [7:0]  fv, r, k, mask;
      bit [8:0]  t;
      bit        d, written, z;
      bit [5:0]  opt;
      opt = option;
      written = 0;
      if (asleep) begin tick(opt, 0); return; end
      ir = word;
      if (skip) begin ir = 12'h000; skip = 0; squashed++; end
      npc = pc + 1;
      f = ir[4:0]; d = ir[5]; k = ir[7:0];
      ea = (f == 0) ? fsr[4:0] : f;
      if (ir[11:10] == 2'b00 && f == 0 && !(ir[11:6] == 0 && ir[5] == 0)) indirect_ops++;
      if (ea[4] && fsr[6:5] != 0 && ir[11:10] == 2'b00) banked_ops++;
      fv = rd(ea, npc);
      mask = 8'd1 << ir[7:5];
      casez (ir)
        12'b0000_0000_0000: ;
        12'b0000_0000_0010: option = w[5:0];
        12'b0000_0000_0011: begin status[4] = 1; status[3] = 0; asleep = 1; end
        12'b0000_0000_0100: begin status[4] = 1; status[3] = 1; end
        12'b0000_0000_0101: tris[0] = w;
        12'b0000_0000_0110: tris[1] = w;
        12'b0000_0000_0111: tris[2] = w;
        12'b0000_000?_????: ;
        12'b0000_001?_????: written = wr(ea, w, npc);
        12'b0000_01??_????: begin
          if (d) written = wr(ea, 0, npc); else w = 0;
          status[2] = 1;
        end
        12'b0100_????_????: written = wr(ea, fv & ~mask, npc);
        12'b0101_????_????: written = wr(ea, fv | mask, npc);
        12'b0110_????_????: if ((fv & mask) == 0) begin skip = 1; skips_taken++; end
        12'b0111_????_????: if ((fv & mask) != 0) begin skip = 1; skips_taken++; end
        12'b1000_????_????: begin w = k; npc = stack[0]; stack[0] = stack[1]; end
        12'b1001_????_????: begin
          stack[1] = stack[0]; stack[0] = npc; npc = {status[6:5], 1'b0, k};
        end
        12'b101?_????_????: npc = {status[6:5], ir[8:0]};
        12'b1100_????_????: w = k;
        12'b1101_????_????: begin w = k | w; status[2] = (w == 0); end
        12'b1110_????_????: begin w = k & w; status[2] = (w == 0); end
        12'b1111_????_????: begin w = k ^ w; status[2] = (w == 0); end
        default: begin
          // byte-oriented arithmetic and logic, opcode ir[11:6] from 000010 to 001111
          bit c, dc, setz, setc, setdc, sk;
          c = status[0]; dc = status[1]; setz = 0; setc = 0; setdc = 0; sk = 0;
          case (ir[11:6])
            6'b000010: begin r = fv - w; c = (fv >= w); dc = (fv[3:0] >= w[3:0]);
                             setz = 1; setc = 1; setdc = 1; end
            6'b000011: begin r = fv - 1; setz = 1; end
            6'b000100: begin r = fv | w; setz = 1; end
            6'b000101: begin r = fv & w; setz = 1; end
            6'b000110: begin r = fv ^ w; setz = 1; end
            6'b000111: begin t = {1'b0, fv} + {1'b0, w}; r = t[7:0]; c = t[8];
                             dc = (({1'b0, fv[3:0]} + {1'b0, w[3:0]}) > 15);
                             setz = 1; setc = 1; setdc = 1; end
            6'b001000: begin r = fv; setz = 1; end
            6'b001001: begin r = ~fv; setz = 1; end
            6'b001010: begin r = fv + 1; setz = 1; end
            6'b001011: begin r = fv - 1; sk = (r == 0); end
            6'b001100: begin r = {status[0], fv[7:1]}; c = fv[0]; setc = 1; end
            6'b001101: begin r = {fv[6:0], status[0]}; c = fv[7]; setc = 1; end
            6'b001110: r = {fv[3:0], fv[7:4]};
            default:   begin r = fv + 1; sk = (r == 0); end
          endcase
          z = (r == 0);
          if (d) written = wr(ea, r, npc); else w = r;
          if (setz)  status[2] = z;
          if (setdc) status[1] = dc;
          if (setc)  status[0] = c;
          if (sk) begin skip = 1; skips_taken++; end
        end
      endcase
      pc = npc;
      tick(opt, written);
    endfunction
  endclass

endpackage

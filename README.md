# DC motor controller on a chip: PIC16C57-style processor + PWM driver

This design puts a small 8-bit RISC processor and a PWM motor driver on one chip. The
processor runs the control program. The driver turns an 8-bit speed value and a direction bit
into a pulse train for an H-bridge. The processor is a clean-room model of the Microchip
PIC16C57, with 12-bit instructions, 33 instructions, a Harvard bus split and 2048 words of
program ROM. The program reads a speed and a direction from the input ports and writes them to
the port registers that feed the driver. The driver runs at 256 speed steps (0 to 255), one
step per counter count, in either direction.

```
             +-------------------------- pic_processor ---------------------------+
 porta_in -->|  program_rom   romdata   control_unit      alu_module              |
 portb_in -->|  (2048 x 12) ----------> (clock_divider,   (aluop_gen, mux_a,      |
 portc_in -->|                <-------- program_counter,   mux_b, alu)            |
             |                romaddr   instruction_decoder)       |              |
             |                          register_module <----------+              |
             |                          (W, register_file, STATUS, FSR, RTCC,     |
             |                           OPTION, TRIS, port latches)              |
             +--------------------------------------------------------------------+
                  portb_out[7:0] = speed        portc_out[0] = direction
                          |                            |
             +------------v--------- motor_control ----v--------------------------+
             | select_generating -> pwm_register -> pwm_comparator -(Equal)-> R   |
             |                       pwm_counter ----------------(Overflow)-> S   |
             |                                                     rs_flipflop Q ---> pwm_out
             |                                    dir & pwm_out -----------------------> motor_out[1:0]
             +--------------------------------------------------------------------+
```

The top is `motor_con_top`. Its ports are the clock, a synchronous active-high `rst`, the three
8-bit port pin inputs, and a set of outputs:
- the port latches and TRIS registers,
- `rtcc`, `status` and `fsr`,
- the fetch address `romaddr`,
- `pwm_out` and `motor_out[1:0]`. Bit 0 of `motor_out` is the clockwise line and bit 1 the
  counter-clockwise line.

## The instruction cycle: four phases of one clock

The hardest part of the processor is its timing. Everything runs on one clock, `clk`, nominally
4 MHz. `clock_divider` is a 2-bit counter that decodes into four one-hot phase enables,
`q1`..`q4`. Each instruction takes exactly one four-phase cycle, so one instruction per µs at
4 MHz. This holds for branches and skips too. The phases are clock enables, not derived clocks,
so the whole chip is a single clock domain.

| phase | what happens |
|-------|--------------|
| q1 | the program counter loads the next address computed in the previous q4; `romaddr` changes |
| q2 | the instruction register loads `romdata` (or a NOP, see below) |
| q3 | the decoder registers a control word (`ctrl_t` in `pic_pkg`): ALU operation, operand selects, destination, flag updates, branch kind |
| q4 | the ALU result is written to W or to the addressed register, flags update, and the next PC is computed |

The machine is not pipelined. The ROM is read combinationally during the cycle in which the
instruction executes, so a GOTO or CALL costs one cycle like everything else. On the real
PIC16C57 a branch costs two cycles. Here the two-cycle behaviour appears only where the
instruction set defines it for skips.

**Skips.** DECFSZ, INCFSZ, BTFSC and BTFSS evaluate their condition at q4 from the ALU's zero
output. If the skip is taken, a `skip_pending` flag is set. The next q2 then loads a NOP instead
of the fetched word, so the skipped instruction costs a full cycle and changes nothing.

**SLEEP.** SLEEP sets TO=1 and PD=0, then stops the program counter and feeds NOPs until reset.
There is no watchdog timer. CLRWDT only sets TO and PD, as the instruction set requires.

**Reset.** Reset puts the PC at the PIC16C57 reset vector 0x7FF. Unused ROM words are NOP
(0x000), so execution wraps to address 0 one cycle later, where the program starts. Reset
values are:
- STATUS 0x18,
- OPTION 0x3F,
- all TRIS registers 0xFF (all inputs),
- W, FSR, the port latches, RTCC and the call stack 0.

The general-purpose registers are not reset.

## Instruction set and register map

The three instruction formats and the opcode values are those of the PIC16C5x family:
- byte-oriented: opcode[11:6], d[5], f[4:0]; d=0 writes W, d=1 writes the register;
- bit-oriented: opcode[11:8], b[7:5], f[4:0];
- literal: opcode[11:8], k[7:0]; GOTO has a 9-bit target.

All 33 instructions are decoded. Encodings that are not instructions run as NOP.

The ALU (`alu`) has 13 operations: ADD, SUB, AND, IOR, XOR, COM, INC, DEC, RR, RL, SWAP, PASS
and CLR. SUB computes `a + ~b + 1`, so its carry means "no borrow", as on the PIC. `mux_a` and
`mux_b` each pick W, the addressed register `f`, or the literal `k`. Bit instructions run as
AND or OR with a mask that the decoder puts on `k`. `aluop_gen` maps the decoded instruction to
an ALU operation.

| address | register | notes |
|---------|----------|-------|
| 0x00 | INDF | indirect: the access goes to the register FSR points at |
| 0x01 | RTCC | 8-bit timer |
| 0x02 | PCL | low byte of the PC; writing it jumps (bit 8 cleared, page bits from STATUS<6:5>) |
| 0x03 | STATUS | C, DC, Z, PD, TO, page bits PA1:PA0 in bits 6:5 |
| 0x04 | FSR | indirect pointer; bits 6:5 select the register bank |
| 0x07 | port C | `PORTC_ADDR` |
| 0x0B | port A | `PORTA_ADDR` |
| 0x0C | port B | `PORTB_ADDR` |
| 0x08-0x0F (others) | general purpose | shared by all banks |
| 0x10-0x1F | general purpose | one of four banks, chosen by FSR<6:5> |

**Port addresses.** The port addresses are **not** those of a real PIC16C57, which has ports A and
B at 0x05 and 0x06. This design follows the register-select decode it was specified with:
port A at 0x0B, B at 0x0C and C at 0x07. Registers 0x05 and 0x06 are then ordinary RAM. All three
addresses are parameters of `pic_processor`, `pic_core` and `register_module`. Set them to
0x05, 0x06 and 0x07 to run code assembled for a real part. Register 0x0B and 0x0C are then
ordinary RAM, and the firmware must change to match.

**Ports.** Writing a port sets its output latch. Reading returns the pin for bits whose TRIS bit is
1 and the latch for bits whose TRIS bit is 0. As on the PIC, BSF and BCF on a port therefore
copy the pins of input bits into the latch. The TRIS instruction loads the direction register of
the port named by f=5, 6 or 7 (A, B, C). TRIS uses these numbers, not the register addresses.

**RTCC.** RTCC counts instruction cycles. There is no external counter pin, so T0CS=1 (the reset
value of OPTION) stops it, and clearing T0CS starts it. With PSA=1 it counts every cycle.
Otherwise it counts once every 2^(PS+1) cycles. Writing RTCC clears the prescaler.

**Stack.** The call stack has two levels. CALL pushes PC+1. RETLW pops and loads W with its
literal. CALL targets are in the lower half of a 512-word page, as on the PIC.

## The PWM driver

`motor_control` takes an 8-bit speed `motor_in` and a direction bit `enable`. It produces
`pwm_out` and the two steered lines `motor_out`.

1. `select_generating` registers the speed as `duty`. It turns `enable` into a one-hot direction:
   1 gives clockwise (`2'b01`), 0 gives counter-clockwise (`2'b10`).
2. `pwm_register` holds the duty and direction used for the current period. It loads new values
   only when the counter wraps from 255 to 0. A speed change never cuts a pulse short or
   stretches it, and a reversal never happens in the middle of a pulse.
3. `pwm_counter` is a free-running 8-bit counter. Its `overflow` output is registered. It is high
   for the one count after each wrap, while the count is 0.
4. `pwm_comparator` raises `equal` while `duty == count`.
5. `rs_flipflop` is clocked. `overflow` sets it and `equal` resets it. When both are high, reset
   wins.

The counter advances once every `PWM_DIV` clocks (default 1). One period is therefore
256 × `PWM_DIV` clocks: 64 µs, or 15.6 kHz, at 4 MHz. Within each period `pwm_out` is high for
exactly `duty × PWM_DIV` clocks:
- duty 0 never rises, because set and reset arrive together and reset wins;
- duty 255 is high for 255 of 256 counts.

`motor_out = dir & {2{pwm_out}}`. Only the line for the selected direction ever pulses.

## Firmware

`rtl/motor_firmware.hex` holds 12 words, one per line, loaded at address 0. The rest of the ROM is NOP.

```
000 C00  MOVLW 0x00
001 006  TRIS  PORTB          ; port B all outputs (speed to the driver)
002 CFE  MOVLW 0xFE
003 007  TRIS  PORTC          ; port C bit 0 output (direction), others inputs
004 20B  loop: MOVF  0x0B,W   ; read speed from port A pins
005 02C        MOVWF 0x0C     ; drive port B = driver speed
006 727        BTFSS 0x07,1   ; direction request on port C pin 1
007 A0A        GOTO  ccw
008 507        BSF   0x07,0   ; clockwise
009 A04        GOTO  loop
00A 407  ccw:  BCF   0x07,0   ; counter-clockwise
00B A04        GOTO  loop
```

At the top level, `motor_control` takes `motor_in = portb_out` and `enable = portc_out[0]`. The
loop takes 6 instruction cycles (6 µs), far shorter than one 64 µs PWM period. To run another
program, pass a different hex file through the `ROM_FILE` parameter. The file holds one 12-bit
word per line in `$readmemh` format. The path is relative to the simulator's working directory.

## Departures and choices

Where the specification was silent or ambiguous, these are the choices made:

- **Port register addresses.** 0x0B, 0x0C and 0x07, as described above, instead of the PIC's
  0x05, 0x06 and 0x07.
- **Timing.** One cycle per instruction, branches included. Phases are clock enables in a single
  clock domain.
- **Processor details taken from the PIC16C57.** The specification names the part but gives
  neither opcodes, reset vector, stack depth nor bank layout. These include:
  - the reset vector 0x7FF,
  - the two-level stack,
  - four banks of 16 registers,
  - the TO/PD flags.
- **No watchdog timer and no external RTCC pin.** CLRWDT and SLEEP exist as instructions. SLEEP
  waits for reset.
- **PWM polarity.** The comparator and flip-flop are wired as a set-on-wrap, reset-on-match
  modulator. The pulse width is proportional to `duty`. A literal reading of "output high when
  equal" would give a single count-wide pulse whatever the speed.
- **RS flip-flop priority.** Reset-dominant, so duty 0 means off.
- **Reload timing.** The PWM register loads at the period boundary.
- **Direction.** `enable = 1` means clockwise. `motor_out` has one line per direction.
- **PWM clock.** Counter clock divisor `PWM_DIV`, default 1.
- **Top wiring.** Port B drives the speed and port C bit 0 the direction.
- **Firmware.** The control program is this design's own. The specification shows only that a
  program of its own was assembled into the 2048×12 ROM.
- **Target.** The design is written for a generic FPGA or ASIC flow. The ROM is an array that
  synthesis can map to memory or logic. About 210 flip-flops are needed besides the 80-byte
  register file and the ROM.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **`alu`** is checked exhaustively over all operations, operands and carry-in (2.7 million
  checks).
- **`instruction_decoder`** is checked for all 4096 instruction words.
- **`pic_core`** runs a hand-written program. It then runs 12 random programs of 6000
  instructions each, in lock step with an independent instruction-set model. The model is the
  `pic_iss` class in `tb/pic_iss_pkg.sv`. For every instruction the testbench compares:
  - the PC, W, STATUS, FSR and port latches,
  - the whole register file.

  It also checks the four-clock cycle length and that each of the 33 instructions was executed.
- **`motor_control`** and its parts check the pulse width and period, reload timing, the
  direction lines, duty 0 and duty 255, for `PWM_DIV` of 1 and 3.
- **`tb_motor_con_top`** runs the whole chip at its default parameters with a 4 MHz clock. It
  drives 25 speed and direction settings on the pins and measures `pwm_out` and `motor_out` over
  whole PWM periods. It also counts the mechanisms it sees:
  - skips taken and not taken,
  - GOTOs,
  - flip-flop sets and resets,
  - period reloads,
  - both directions and reversals,
  - duty 0 and duty 255.

  A mechanism that never occurs counts as a failure.

Each testbench was also run against a deliberately broken copy of its module and reported
failures.

What is not verified: behaviour on real hardware or an FPGA, timing closure, and compatibility
with binaries for a real PIC16C57. The port addresses and one-cycle branches differ from the
real part.

## Simulating

Run from the project root, because the firmware path `rtl/motor_firmware.hex` is relative. With
Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/pic_pkg.sv tb/pic_iss_pkg.sv \
    tb/tb_motor_con_top.sv -y rtl -y tb --top-module tb_motor_con_top
./obj_dir/Vtb_motor_con_top
```

Replace `tb_motor_con_top` with any other `tb_<module>`. Only the processor testbenches need
`tb/pic_iss_pkg.sv`, but listing it does no harm. Uninitialised state starts at random values
in Verilator. Everything that is read is reset or written first, so results do not depend on
the seed.

## Files

- `rtl/pic_pkg.sv`: widths, instruction and ALU-operation enums, the control-word struct and the
  SFR addresses.
- Processor: `clock_divider`, `program_counter`, `instruction_decoder`, `control_unit`, `alu`,
  `alu_module`, `register_file`, `rtcc_timer`, `register_module`, `pic_core`, `program_rom`,
  `pic_processor`.
- PWM driver: `select_generating`, `pwm_register`, `pwm_counter`, `pwm_comparator`,
  `rs_flipflop`, `motor_control`.
- Top: `motor_con_top`, with `rtl/motor_firmware.hex`.
- `tb/`: one testbench per module, plus the instruction-set model package.

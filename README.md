# M++ — a microprogrammed 8-bit CPU in SystemVerilog

M++ is a small teaching processor. It has an 8-bit accumulator, four general registers, a 16-bit
program counter and a 256-byte data RAM that also holds the call stack. Program memory is separate
from data memory (a Harvard arrangement). Every unit hangs on one shared 8-bit data bus.
There is no hard-wired instruction decoder. A micro-instruction counter steps through two 16-bit
control memories, and every bit of a control word drives one control line of the data path:
"put the accumulator on the bus", "load the register bank", "step the stack pointer down", and so
on. An instruction is a short routine in those memories. The CPU's behaviour is therefore defined
by a table of micro-instructions as much as by the RTL.

This RTL ports the M++ from a schematic-level simulator to an FPGA. The FPGA target is an Intel
Cyclone V, and the clock must run above 10 kHz. The block structure and the control-line names
follow the original M++ design, as do the decoder table, the ALU operation codes and the bit
fields of the instruction byte. The microprogram, the instruction encodings beyond the instruction
byte's fields, and the stack discipline are this design's own. The section
[What is original and what is not](#what-is-original-and-what-is-not) lists every such point.

## Block diagram

```
                 +-------------------- ctrl_module -----------------------+
 program byte -->| RI --> ram_decode (16x8) --+                           |
  (bus)          |                            v                           |
                 | IC <-- SelRI mux <-- IC+1 / start address               |
                 |  |                                                      |
                 |  +--> ram_control_a (256x16) --> PC-load gate (Z, C) --+--> word A
                 |  +--> ram_control_b (256x16) ---------------------------+--> word B
                 +---------------------------------------------------------+
                                     8-bit data bus
   +-----------+-----------+-----------+-----------+-----------+-----------+----------+
   |           |           |           |           |           |           |          |
 program   program_     reg_bank   accumulator  BUF -> alu   ram_addresser  in port  out port
 memory    addresser    B C D E        A   --------^ (Z, C)  DIR | SP -> ram_storage  (buffer_reg)
 (ROMrd)   PCH / PCL                                          (SelSP)     256 x 8
```

`mpp` is the core. `mpp_fpga` is the top: the core plus `program_memory`, which is written
through a load port while the CPU is held in reset.

## How one instruction runs

The micro-sequencer is the heart of the design and the part that needs the most care when
changing anything.

* **IC** is the 8-bit micro-instruction counter. Both control memories are read combinationally
  at address IC, so every control line is steady for one whole clock cycle. Every load it orders
  happens at the rising edge that ends the cycle.
* **Next IC.** IC returns to 0 if the word sets `ICres` (end of instruction) or `rst` is high.
  Otherwise IC takes the decoder output if the word sets `SelRI`, and IC+1 if it does not.
* **RI** is the instruction register. It is loaded from the bus when the word sets `RIcar`. Its
  fields are:
  `RI[2:0]` = opcode, `RI[4:3]` = register (0 B, 1 C, 2 D, 3 E), `RI[7:5]` = ALU operation.
* **ram_decode** turns `{High Decoder, RI[2:0]}` into the start address of a routine. The table is
  `03 08 0D 14 19 1E 25 2A | 2C 31 36 3D 46 50 59 6C`.
* **Fetch.** It occupies micro-addresses 0x00 and 0x01, two cycles. Word 0x00 reads the program
  byte onto the bus, loads RI and increments the PC. Word 0x01 dispatches (`SelRI`).
* **Prefix byte.** Opcode 7 is a prefix, and its routine (0x2A–0x2B) takes two cycles. It reads the
  next byte into RI, then dispatches with `High Decoder` set, so the second byte selects one of the
  eight routines in the upper half of the table. This doubles the instruction space without a wider
  opcode field. The ALU and register fields of the second byte still apply.
* **End of instruction.** The last word of each routine sets `ICres`. `eoi` (top-level port,
  `out_signals[4]` of the core) is high during that cycle.

### Instruction set and timing

Cycle counts are exact and are checked by the testbenches: 2 cycles of fetch, plus 2 for the
prefix where there is one, plus the routine.

| Bytes | Mnemonic | Effect | Flags | Cycles |
|---|---|---|---|---|
| `00 rr 000` | MOV A,Rn | Rn ← A | – | 3 |
| `00 rr 001` | MOV Rn,A | A ← Rn | – | 3 |
| `ooo rr 010` | ALU Rn | A ← A op Rn | Z C | 4 |
| `xxxxx 011` | IN | A ← input port | – | 3 |
| `xxxxx 100` | RET | PC ← return address, SP += 4 | – | 6 |
| `ooo xx 101` | ALU A | A ← A op A (NOT A, INC A, A+A …) | Z C | 4 |
| `xx pp 110` | OUT | output port ← A | – | 3 |
| `07`, `ooo xx 000`, imm | ALU #imm | A ← A op imm; op 110 is `MOV #imm,A` | Z C | 6 |
| `07`, `ooo rr 001`, imm | ALU #imm,Rn | Rn ← A op imm; op 110 is `MOV #imm,Rn` | Z C | 6 |
| `07`, `xxxxx 010`, a | STA a | RAM[a] ← A | – | 6 |
| `07`, `xxxxx 011`, h, l | JMP hl | PC ← hl | – | 8 |
| `07`, `xxxxx 100`, h, l | JZ hl | if Z: PC ← hl | – | 10 |
| `07`, `xxxxx 101`, h, l | JC hl | if C: PC ← hl | – | 10 |
| `07`, `xxxxx 110`, h, l | CALL hl | push a 4-byte frame, PC ← hl | – | 19 |
| `07`, `xxxxx 111`, a | LDA a | A ← RAM[a] | – | 6 |

ALU operations (`ooo`), with A the accumulator and B the ALU buffer:

| Code | Operation |
|---|---|
| 000 | A+B |
| 001 | A−B |
| 010 | A&B |
| 011 | A\|B |
| 100 | A^B |
| 101 | ~B |
| 110 | B |
| 111 | B+1 |

The flags are flip-flops. They update only in the cycle that puts the ALU result on the bus:
* Z is set when the result is zero.
* C is the carry out of A+B and of B+1, and the borrow (A < B) of A−B.
* C is 0 after the logic operations.

Because of this, `MOV #imm,A` (which passes through the ALU) clears C and sets Z if the value is 0.
`MOV Rn,A`, IN and LDA leave the flags alone.

The port field `pp` of OUT exists in the encoding: `MOV A,OUT1` assembles to `0E`. This build has a
single input port and a single output port, so the field is ignored.

Example: the demonstration loop assembles to
`07 C0 55 | 07 C1 66 | 02 | 00 | 0E | 07 06 00 11 | 07 03 00 00 | 04`. It leaves 0xBB on the
output port. One pass of the loop takes 55 cycles.

## The data bus

At most one source drives the bus in any cycle. The selector takes the first active one, in this
order:

1. program byte (`ROMrd`)
2. data RAM (`RAMcs`·`RAMrd`)
3. PC high
4. PC low
5. register bank
6. accumulator
7. ALU
8. input port

With no source active, the bus reads 0. An assertion in `mpp` checks that the microprogram never
enables two sources at once. `tb_ram_control_b` checks the same property statically over all 256
words. Any number of units may load from the bus in the same cycle. Every load is synchronous to
the single clock.

## Jumps, calls and the stack

The PC is two 8-bit halves. `PCLcar` and `PCHcar` load them, and `SeldataPC` picks the source:
PC+1 or the bus. Raising both strobes with `SeldataPC` = 0 increments the full 16 bits. There is
no temporary register for a 16-bit target. Loading the high half first would move the PC away
from the low byte before it has been read, so every jump parks bytes on the stack:

* **JMP** pushes the high byte, loads PC low straight from the program, then pops the high byte
  into PC high. SP ends where it started, but the byte just below SP is overwritten.
* **JZ / JC** park both target bytes and step the PC past them. They then pop both into the PC
  with the load strobes made conditional. The PC-load gate in `ctrl_module` passes `PCLcar` and
  `PCHcar` only in these cases:
  * neither `ICresZ` nor `ICresC` is set in the word;
  * `ICresZ` is set and Z = 1;
  * `ICresC` is set and C = 1.

  So a JZ or JC that is not taken leaves the PC on the next instruction.
* **CALL** pushes the target (high, then low), then the return address (high, then low). It
  moves SP back up, pops the target into the PC, and leaves SP on the return address.
* **RET** pops the low and then the high byte of the return address into the PC, and then drops
  the two target bytes. SP rises by 4 in total.

SP resets to 0, and a push pre-decrements it. A call from the top level therefore occupies RAM
0xFC–0xFF:

| Address | Contents |
|---|---|
| 0xFC | return low |
| 0xFD | return high |
| 0xFE | target low |
| 0xFF | target high |

Up to 64 calls can nest before the stack meets itself. Nothing checks for overflow. `STA` and
`LDA` address the RAM through the DIR buffer (`SelSP` = 0). Data therefore shares the RAM with
the stack, and programs should keep data below the stack.

## Program memory and start-up

`program_memory` holds 2^16 bytes. While the core's `ROMcs` is high, it returns the byte at the PC
combinationally. The published core also gets its program byte within the same micro-cycle, so
there are no wait states. To load a program:

1. Hold `rst` high.
2. Write one byte per clock through `prog_we` / `prog_waddr` / `prog_wdata`.
3. Release `rst`. The CPU starts at address 0 with A, B–E, PC, SP and the flags cleared.

The data RAM is not cleared.

## What is original and what is not

These follow the original M++ design:
* the block structure and signal names;
* the 16-entry decoder table;
* the RI bit fields;
* the IC next-address rule;
* control-word A bits 0–12 (ICres, ICresZ, ICresC, RIcar, SelRI, High Decoder, ROMrd, ROMcs,
  PCHbus, PCLbus, PCHcar, PCLcar, SeldataPC);
* the ALU operation codes;
* the four-register bank B–E;
* the DIR/SP address multiplexer (SelSP = 0 selects DIR);
* the 256 × 16 control memories;
* the bus-source order;
* the byte sequences `07 C0 55` (MOV 55,A), `07 C1 66` (MOV 66,B), `07 06 hh ll` (CALL),
  `07 03 hh ll` (JMP) and `04` (RET).

These are this design's choices, made where the original gives no detail:
* The complete microprogram (`mpp_pkg::ucode`). Each routine fits inside the address slot that the
  decoder table gives it.
* Control-word A bits 13–15 (DIRcar, SPcar, SPinc/dec) and the whole bit layout of word B.
* The opcodes the original lists without encodings: MOV A,Rn, MOV Rn,A, ALU Rn, IN, ALU A, OUT,
  ALU #imm,Rn, STA, JZ, JC, LDA. The result is 15 instructions; the original counts 14.
* The conditional-jump mechanism. The PC-load gate combines the original NOR of ICresZ and ICresC
  with the Z and C flags.
* The stack discipline and the 4-byte call frame.
* The carry/borrow rule.
* `~B` for ALU code 101. The original writes a logical rather than a bitwise negation.
* Synchronous loads on the system clock everywhere. The original clocks several registers from
  control-signal edges and uses simulation delays to order bus transfers.
* A single input and output port.
* The `rst` input.
* The loadable program memory. In the original's test, the program store is a table in the
  testbench.
* The meaning of `out_signals[4:2]`.

None of the board-level parts are here: pin assignment, switches, LEDs, clock source.

## Files

| File | Contents |
|---|---|
| `rtl/mpp_pkg.sv` | control-word structs and bit masks, opcode / ALU enums, decoder table, microprogram |
| `rtl/mpp_fpga.sv` | top: core + program memory + load port |
| `rtl/mpp.sv` | core: bus selector, unit instances, bus assertions |
| `rtl/ctrl_module.sv` | RI, IC, SelRI mux, PC-load gate |
| `rtl/ram_decode.sv` | 16 × 8 decoder ROM |
| `rtl/ram_control_a.sv`, `rtl/ram_control_b.sv` | 256 × 16 control memories, filled from the package |
| `rtl/program_addresser.sv` | 16-bit PC in two halves |
| `rtl/ram_addresser.sv`, `rtl/inc_dec_counter.sv` | DIR buffer, stack pointer, address mux |
| `rtl/ram_storage.sv` | 256 × 8 data RAM |
| `rtl/reg_bank.sv` | registers B–E |
| `rtl/accumulator.sv` | A |
| `rtl/alu.sv` | ALU and flags |
| `rtl/buffer_reg.sv` | 8-bit load/reset register (BUF, DIR, RI, output port) |
| `rtl/program_memory.sv` | 64 KiB program store |

To change an instruction, edit its routine in `mpp_pkg::ucode`. Keep it within its slot, or move
the slot in `decode_entry`. Then update the reference model in `tb/tb_mpp_fpga.sv`.

## Simulation

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. Build and
run one with Verilator 5 (the package goes first):

```
verilator --binary --timing --assert -Irtl rtl/mpp_pkg.sv tb/tb_mpp_fpga.sv --top-module tb_mpp_fpga
./obj_dir/Vtb_mpp_fpga
```

* `tb_mpp_fpga` runs the top at its default size. It loads programs through the load port, and
  after every instruction it compares A, B–E, PC, SP, flags, the output port and the whole data
  RAM with an instruction-level model in the testbench. It also checks each instruction's cycle
  count. The programs are:
  * the demonstration loop;
  * the original stimulus program (`07 C0 55 07 C1 66 07 06 00 0E 07 03 00 00 04`);
  * a call-stack loop;
  * a directed program that reaches every opcode, JZ and JC both taken and not taken, nested
    calls and every ALU operation;
  * 20 random straight-line programs.

  It fails if any of those mechanisms never occurred.
* `tb_mpp` runs the core against a testbench ROM. It checks the 22-cycle latency to the first OUT,
  the 55-cycle loop period, the call frame and IN.
* One testbench per unit: `tb_ctrl_module` (IC traces, conditional gating), `tb_ram_control_a` /
  `_b` (hand-assembled words, routine termination, single bus source), `tb_ram_decode`, `tb_alu`,
  `tb_program_addresser`, `tb_ram_addresser`, `tb_inc_dec_counter`, `tb_ram_storage`,
  `tb_reg_bank`, `tb_accumulator`, `tb_buffer_reg`, `tb_program_memory`.

Verification covers these testbenches only. Timing and area on the Cyclone V have not been
measured. The original reports about 90 MHz and 129 logic elements for its own implementation.

// mpp_pkg -- shared definitions of the M++ microprogrammed 8-bit CPU.
//
// The M++ control unit reads two 16-bit control memories (A and B) at the
// address held in the micro-instruction counter IC. Every bit of the two words
// is one control line of the data path. This package gives:
//   * the bit position of every control line (ctrl_a_t / ctrl_b_t and the
//     32-bit U_* masks, word A in bits 15:0 and word B in bits 31:16),
//   * the instruction decoder table (16 microroutine start addresses),
//   * the microprogram itself (function ucode), from which both control
//     memories are built at elaboration time.
//
// Control word A, bits 0..12, and the decoder table follow the published M++
// FPGA implementation. Bits 13..15 of word A, the layout of word B and the whole
// microprogram are this design's own: only the names of the lines and the start
// address of each routine are published, not the micro-instructions.
//
// Instruction format: RI[2:0] opcode, RI[4:3] register B/C/D/E, RI[7:5] ALU
// operation. Opcode 7 is a prefix: the next byte is decoded through the upper
// half of the decoder table.
//
//   byte(s)        routine   operation
//   00 rr 000      0x03      MOV A,Rn      Rn <- A
//   00 rr 001      0x08      MOV Rn,A      A  <- Rn
//   ooo rr 010     0x0D      ALU Rn        A  <- A op Rn        (flags)
//   xx xx 011      0x14      IN            A  <- in
//   xx xx 100      0x19      RET           pop return address, drop frame
//   ooo xx 101     0x1E      ALU A         A  <- A op A         (flags)
//   xx pp 110      0x25      OUT           out <- A
//   07, ooo xx 000 0x2C      ALU #imm      A  <- A op imm (op 110 = MOV #imm,A)
//   07, ooo rr 001 0x31      ALU #imm,Rn   Rn <- A op imm (op 110 = MOV #imm,Rn)
//   07, xx 010, a  0x36      STA a         RAM[a] <- A
//   07, xx 011,h,l 0x3D      JMP hl
//   07, xx 100,h,l 0x46      JZ hl         jump if Z
//   07, xx 101,h,l 0x50      JC hl         jump if C
//   07, xx 110,h,l 0x59      CALL hl       push 4-byte frame, jump
//   07, xx 111, a  0x6C      LDA a         A <- RAM[a]
//
// Every instruction starts with the 2-cycle fetch at micro-address 0x00/0x01;
// the prefix adds 2 more cycles (0x2A/0x2B). The last micro-instruction of a
// routine sets ICres, which returns IC to 0.
//
// Stack: SP resets to 0 and pushes pre-decrement, so the first frame occupies
// RAM 0xFC..0xFF. CALL leaves [SP]=return low, [SP+1]=return high and, above
// them, the two target bytes it used as scratch; RET pops all four.
package mpp_pkg;

  // ---------------------------------------------------------------- word A
  typedef struct packed {
    logic sp_dec;      // 15 SPinc/dec: 1 = decrement
    logic sp_car;      // 14 SPcar: count SP
    logic dir_car;     // 13 DIRcar: load DIR from bus
    logic sel_data_pc; // 12 selDataPC: PC halves load from bus (1) or PC+1 (0)
    logic pcl_car;     // 11 PCLcar
    logic pch_car;     // 10 PCHcar
    logic pcl_bus;     //  9 PCLbus
    logic pch_bus;     //  8 PCHbus
    logic rom_cs;      //  7 ROMcs
    logic rom_rd;      //  6 ROMrd: program byte to bus
    logic high_dec;    //  5 High Decoder: decoder address bit 3
    logic sel_ri;      //  4 SelRI: IC <- decoder output
    logic ri_car;      //  3 RIcar: RI <- bus
    logic ic_res_c;    //  2 ICresC: PC loads only if C
    logic ic_res_z;    //  1 ICresZ: PC loads only if Z
    logic ic_res;      //  0 ICres: IC <- 0 (end of instruction)
  } ctrl_a_t;

  // ---------------------------------------------------------------- word B
  typedef struct packed {
    logic [3:0] spare; // 15:12 unused
    logic out_car;     // 11 OUTcar: output port <- bus
    logic in_bus;      // 10 INbus: input port to bus
    logic ram_cs;      //  9 RAMcs
    logic ram_wr;      //  8 RAMwr
    logic ram_rd;      //  7 RAMrd: RAM to bus
    logic reg_car;     //  6 REGcar: Rn <- bus
    logic reg_bus;     //  5 REGbus: Rn to bus
    logic ac_car;      //  4 ACcar: A <- bus
    logic ac_bus;      //  3 ACbus: A to bus
    logic buf_car;     //  2 BUFcar: BUF <- bus
    logic ula_bus;     //  1 ULAbus: ALU result to bus, flags update
    logic sel_sp;      //  0 SelSP: RAM address from SP (1) or DIR (0)
  } ctrl_b_t;

  typedef logic [31:0] uword_t;  // {B, A}

  localparam uword_t U_ICRES   = 32'd1 << 0;
  localparam uword_t U_ICRESZ  = 32'd1 << 1;
  localparam uword_t U_ICRESC  = 32'd1 << 2;
  localparam uword_t U_RICAR   = 32'd1 << 3;
  localparam uword_t U_SELRI   = 32'd1 << 4;
  localparam uword_t U_HIGHDEC = 32'd1 << 5;
  localparam uword_t U_ROMRD   = 32'd1 << 6;
  localparam uword_t U_ROMCS   = 32'd1 << 7;
  localparam uword_t U_PCHBUS  = 32'd1 << 8;
  localparam uword_t U_PCLBUS  = 32'd1 << 9;
  localparam uword_t U_PCHCAR  = 32'd1 << 10;
  localparam uword_t U_PCLCAR  = 32'd1 << 11;
  localparam uword_t U_SELDPC  = 32'd1 << 12;
  localparam uword_t U_DIRCAR  = 32'd1 << 13;
  localparam uword_t U_SPCAR   = 32'd1 << 14;
  localparam uword_t U_SPDEC   = 32'd1 << 15;
  localparam uword_t U_SELSP   = 32'd1 << 16;
  localparam uword_t U_ULABUS  = 32'd1 << 17;
  localparam uword_t U_BUFCAR  = 32'd1 << 18;
  localparam uword_t U_ACBUS   = 32'd1 << 19;
  localparam uword_t U_ACCAR   = 32'd1 << 20;
  localparam uword_t U_REGBUS  = 32'd1 << 21;
  localparam uword_t U_REGCAR  = 32'd1 << 22;
  localparam uword_t U_RAMRD   = 32'd1 << 23;
  localparam uword_t U_RAMWR   = 32'd1 << 24;
  localparam uword_t U_RAMCS   = 32'd1 << 25;
  localparam uword_t U_INBUS   = 32'd1 << 26;
  localparam uword_t U_OUTCAR  = 32'd1 << 27;

  // Composite actions used by the microprogram.
  localparam uword_t U_ROM     = U_ROMCS | U_ROMRD;             // program byte -> bus
  localparam uword_t U_PCINC   = U_PCLCAR | U_PCHCAR;           // PC <- PC + 1
  localparam uword_t U_PCLLD   = U_PCLCAR | U_SELDPC;           // PC[7:0]  <- bus
  localparam uword_t U_PCHLD   = U_PCHCAR | U_SELDPC;           // PC[15:8] <- bus
  localparam uword_t U_SPINC   = U_SPCAR;                       // SP <- SP + 1
  localparam uword_t U_SPDECR  = U_SPCAR | U_SPDEC;             // SP <- SP - 1
  localparam uword_t U_RDSP    = U_RAMCS | U_RAMRD | U_SELSP;   // RAM[SP] -> bus
  localparam uword_t U_WRSP    = U_RAMCS | U_RAMWR | U_SELSP;   // RAM[SP] <- bus

  // Opcodes (RI[2:0]) and prefixed opcodes.
  typedef enum logic [2:0] {
    OP_MOV_A_R = 3'd0, OP_MOV_R_A = 3'd1, OP_ALU_R = 3'd2, OP_IN = 3'd3,
    OP_RET     = 3'd4, OP_ALU_A   = 3'd5, OP_OUT   = 3'd6, OP_PREFIX = 3'd7
  } opcode_t;

  typedef enum logic [2:0] {
    XOP_ALU_IMM = 3'd0, XOP_ALU_IMM_R = 3'd1, XOP_STA = 3'd2, XOP_JMP = 3'd3,
    XOP_JZ      = 3'd4, XOP_JC        = 3'd5, XOP_CALL = 3'd6, XOP_LDA = 3'd7
  } xopcode_t;

  // ALU operations (RI[7:5]).
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR  = 3'd3,
    ALU_XOR = 3'd4, ALU_NOT = 3'd5, ALU_PASS = 3'd6, ALU_INC = 3'd7
  } alu_op_t;

  // Instruction decoder table: start address of each microroutine, indexed
  // by {High Decoder, RI[2:0]}.
  function automatic logic [7:0] decode_entry(input logic [3:0] a);
    case (a)
      4'h0: return 8'h03;  4'h1: return 8'h08;  4'h2: return 8'h0D;  4'h3: return 8'h14;
      4'h4: return 8'h19;  4'h5: return 8'h1E;  4'h6: return 8'h25;  4'h7: return 8'h2A;
      4'h8: return 8'h2C;  4'h9: return 8'h31;  4'hA: return 8'h36;  4'hB: return 8'h3D;
      4'hC: return 8'h46;  4'hD: return 8'h50;  4'hE: return 8'h59;  default: return 8'h6C;
    endcase
  endfunction

  // The microprogram. Unused addresses hold ICres so that a stray IC value
  // returns to the fetch routine.
  function automatic uword_t ucode(input logic [7:0] a);
    case (a)
      // fetch: RI <- program byte, PC++; then dispatch through the decoder
      8'h00: return U_ROM | U_RICAR | U_PCINC;
      8'h01: return U_SELRI;
      // MOV A,Rn
      8'h03: return U_ACBUS | U_REGCAR | U_ICRES;
      // MOV Rn,A
      8'h08: return U_REGBUS | U_ACCAR | U_ICRES;
      // ALU Rn: BUF <- Rn, A <- A op BUF
      8'h0D: return U_REGBUS | U_BUFCAR;
      8'h0E: return U_ULABUS | U_ACCAR | U_ICRES;
      // IN
      8'h14: return U_INBUS | U_ACCAR | U_ICRES;
      // RET: PC <- {RAM[SP+1], RAM[SP]}, SP += 4
      8'h19: return U_RDSP | U_PCLLD | U_SPINC;
      8'h1A: return U_RDSP | U_PCHLD | U_SPINC;
      8'h1B: return U_SPINC;
      8'h1C: return U_SPINC | U_ICRES;
      // ALU A: BUF <- A, A <- A op BUF
      8'h1E: return U_ACBUS | U_BUFCAR;
      8'h1F: return U_ULABUS | U_ACCAR | U_ICRES;
      // OUT
      8'h25: return U_ACBUS | U_OUTCAR | U_ICRES;
      // prefix: RI <- next byte, dispatch through the upper decoder half
      8'h2A: return U_ROM | U_RICAR | U_PCINC;
      8'h2B: return U_SELRI | U_HIGHDEC;
      // ALU #imm: BUF <- imm, A <- A op BUF
      8'h2C: return U_ROM | U_BUFCAR | U_PCINC;
      8'h2D: return U_ULABUS | U_ACCAR | U_ICRES;
      // ALU #imm,Rn: BUF <- imm, Rn <- A op BUF
      8'h31: return U_ROM | U_BUFCAR | U_PCINC;
      8'h32: return U_ULABUS | U_REGCAR | U_ICRES;
      // STA a: DIR <- a, RAM[DIR] <- A
      8'h36: return U_ROM | U_DIRCAR | U_PCINC;
      8'h37: return U_ACBUS | U_RAMCS | U_RAMWR | U_ICRES;
      // JMP h,l: high byte parked on the stack while the low half is loaded
      8'h3D: return U_SPDECR;
      8'h3E: return U_ROM | U_PCINC | U_WRSP;
      8'h3F: return U_ROM | U_PCLLD;
      8'h40: return U_RDSP | U_PCHLD | U_SPINC | U_ICRES;
      // JZ h,l: both bytes parked, PC passes them, loads happen only if Z
      8'h46: return U_SPDECR;
      8'h47: return U_ROM | U_PCINC | U_WRSP;
      8'h48: return U_SPDECR;
      8'h49: return U_ROM | U_PCINC | U_WRSP;
      8'h4A: return U_RDSP | U_PCLLD | U_SPINC | U_ICRESZ;
      8'h4B: return U_RDSP | U_PCHLD | U_SPINC | U_ICRESZ | U_ICRES;
      // JC h,l: as JZ with the carry flag
      8'h50: return U_SPDECR;
      8'h51: return U_ROM | U_PCINC | U_WRSP;
      8'h52: return U_SPDECR;
      8'h53: return U_ROM | U_PCINC | U_WRSP;
      8'h54: return U_RDSP | U_PCLLD | U_SPINC | U_ICRESC;
      8'h55: return U_RDSP | U_PCHLD | U_SPINC | U_ICRESC | U_ICRES;
      // CALL h,l: push target (scratch) then return address, load PC from
      // the scratch bytes, leave SP on the return address
      8'h59: return U_SPDECR;
      8'h5A: return U_ROM | U_PCINC | U_WRSP;          // [S-1] = h
      8'h5B: return U_SPDECR;
      8'h5C: return U_ROM | U_PCINC | U_WRSP;          // [S-2] = l
      8'h5D: return U_SPDECR;
      8'h5E: return U_PCHBUS | U_WRSP;                 // [S-3] = ret h
      8'h5F: return U_SPDECR;
      8'h60: return U_PCLBUS | U_WRSP;                 // [S-4] = ret l
      8'h61: return U_SPINC;
      8'h62: return U_SPINC;
      8'h63: return U_RDSP | U_PCLLD | U_SPINC;        // PC[7:0]  <- l
      8'h64: return U_RDSP | U_PCHLD;                  // PC[15:8] <- h
      8'h65: return U_SPDECR;
      8'h66: return U_SPDECR;
      8'h67: return U_SPDECR | U_ICRES;                // SP = S-4
      // LDA a: DIR <- a, A <- RAM[DIR]
      8'h6C: return U_ROM | U_DIRCAR | U_PCINC;
      8'h6D: return U_RAMCS | U_RAMRD | U_ACCAR | U_ICRES;
      default: return U_ICRES;
    endcase
  endfunction

  // The two halves of a micro-instruction, one per control memory.
  function automatic logic [15:0] ucode_a(input logic [7:0] a);
    uword_t w;
    w = ucode(a);
    return w[15:0];
  endfunction

  function automatic logic [15:0] ucode_b(input logic [7:0] a);
    uword_t w;
    w = ucode(a);
    return w[31:16];
  endfunction

endpackage

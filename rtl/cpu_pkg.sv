// cpu_pkg: types and constants shared by the blocks of the simple 8-bit processor.
//
// The processor executes 16-bit instructions of three formats that all keep the 5-bit
// opcode in bits 15..11:
//   register format  : opcode | Rj (10..9) | unused (8..2)   | Ri (1..0)
//   immediate format : opcode | Rj (10..9) | unused (8)      | const8 (7..0)
//   branch format    : opcode | offset11 (10..0), signed two's complement
// The opcode values, the grouping of opcodes by their top three bits and the fact that the
// ALU function select FS equals the opcode all follow the instruction set this design
// implements. The data widths (8-bit registers and data memory, 16-bit instruction and
// address) follow it too. The struct layouts and names are this design's own.
package cpu_pkg;

  localparam int unsigned DATA_W  = 8;   // register file and data memory width
  localparam int unsigned INSTR_W = 16;  // instruction word width
  localparam int unsigned ADDR_W  = 16;  // PC and data address width ({R0, Rx} / {Rj, Ri})
  localparam int unsigned NREGS   = 4;   // R0..R3
  localparam int unsigned RADDR_W = 2;   // register address width
  localparam int unsigned FS_W    = 5;   // ALU function select width
  localparam int unsigned OFFS_W  = 11;  // branch offset width

  // Opcodes (bits 15..11). JMP is 111xx; OP_JMP is its canonical form.
  typedef enum logic [4:0] {
    OP_INC  = 5'b00000,
    OP_ADD  = 5'b00001,
    OP_ADDC = 5'b00010,
    OP_SUB  = 5'b00011,
    OP_DEC  = 5'b00100,
    OP_LDR  = 5'b00101,
    OP_SHR  = 5'b00110,
    OP_SHL  = 5'b00111,
    OP_AND  = 5'b01000,
    OP_OR   = 5'b01001,
    OP_XOR  = 5'b01010,
    OP_NOT  = 5'b01011,
    OP_ST   = 5'b01100,
    OP_LD   = 5'b01101,
    OP_STI  = 5'b01110,
    OP_LDI  = 5'b01111,
    OP_BNZ  = 5'b10000,
    OP_BNC  = 5'b10001,
    OP_BNV  = 5'b10010,
    OP_BNN  = 5'b10011,
    OP_BZ   = 5'b10100,
    OP_BC   = 5'b10101,
    OP_BV   = 5'b10110,
    OP_BN   = 5'b10111,
    OP_JMP  = 5'b11100
  } opcode_e;

  // Branch condition code BC = opcode bits 13..11.
  typedef enum logic [2:0] {
    BC_NZ = 3'b000,  // branch if Z = 0
    BC_NC = 3'b001,  // branch if C = 0
    BC_NV = 3'b010,  // branch if V = 0
    BC_NN = 3'b011,  // branch if N = 0
    BC_Z  = 3'b100,  // branch if Z = 1
    BC_C  = 3'b101,  // branch if C = 1
    BC_V  = 3'b110,  // branch if V = 1
    BC_N  = 3'b111   // branch if N = 1
  } branch_cond_e;

  // Status bits, in the order V, C, N, Z.
  typedef struct packed {
    logic v;
    logic c;
    logic n;
    logic z;
  } status_t;

  // Datapath control word.
  typedef struct packed {
    logic [RADDR_W-1:0] da;  // destination register
    logic [RADDR_W-1:0] aa;  // source register A
    logic [RADDR_W-1:0] ba;  // source register B
    logic               mb;  // 1: constant as operand B
    logic [FS_W-1:0]    fs;  // ALU function select
    logic               md;  // 1: write back data memory output
    logic               wr;  // register file write enable
    logic               mw;  // data memory write enable
    logic               sl;  // load status register
  } ctrl_word_t;

  // Signals from the instruction decoder to the branch control unit.
  typedef struct packed {
    logic       pl;  // PC load may be needed (jump or branch)
    logic       jb;  // 1: jump, 0: branch
    logic [2:0] bc;  // branch condition
  } branch_ctrl_t;

endpackage

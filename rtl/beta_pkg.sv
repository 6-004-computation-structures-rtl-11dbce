// beta_pkg: types and constants shared by the Beta datapath, its control
// logic and its testbenches.
//
// The Beta executes fixed 32-bit instructions. Fields: opcode <31:26>,
// Rc <25:21>, Ra <20:16>, Rb <15:11>, 16-bit literal <15:0>. The opcodes of
// ADD (0x20) and ADDC (0x30) follow from the instruction words given for the
// example program (0xC01F0001 = ADDC(R31,1,R0), 0x80400800 = ADD(R0,R1,R2));
// the other opcode values are the standard Beta assignments, in which the
// literal form of an operate instruction is the register form plus 0x10.
//
// The ALU function code (ALUFN) is a design choice of this implementation:
//   ALUFN[5:4] = 00 arithmetic, ALUFN[0] = 1 subtracts
//   ALUFN[5:4] = 01 Boolean, ALUFN[3:0] is the truth table indexed by {B,A}
//   ALUFN[5:4] = 10 shift,   ALUFN[1:0] = 00 SHL, 01 SHR, 11 SRA
//   ALUFN[5:4] = 11 compare, ALUFN[2:1] = 01 EQ, 10 LT, 11 LE (ALUFN[0] = 1)
//
// The control word holds the twelve control-ROM outputs in the order
// ra2sel, bsel, alufn[5:0], wdsel, werf, moe, xwr (most significant first).
package beta_pkg;

  typedef enum logic [5:0] {
    OP_LD     = 6'h18,
    OP_ST     = 6'h19,
    OP_ADD    = 6'h20,
    OP_SUB    = 6'h21,
    OP_CMPEQ  = 6'h24,
    OP_CMPLT  = 6'h25,
    OP_CMPLE  = 6'h26,
    OP_AND    = 6'h28,
    OP_OR     = 6'h29,
    OP_XOR    = 6'h2A,
    OP_SHL    = 6'h2C,
    OP_SHR    = 6'h2D,
    OP_SRA    = 6'h2E,
    OP_ADDC   = 6'h30,
    OP_SUBC   = 6'h31,
    OP_CMPEQC = 6'h34,
    OP_CMPLTC = 6'h35,
    OP_CMPLEC = 6'h36,
    OP_ANDC   = 6'h38,
    OP_ORC    = 6'h39,
    OP_XORC   = 6'h3A,
    OP_SHLC   = 6'h3C,
    OP_SHRC   = 6'h3D,
    OP_SRAC   = 6'h3E
  } opcode_e;

  typedef logic [5:0] alufn_t;

  localparam alufn_t ALUFN_ADD   = 6'b00_0000;
  localparam alufn_t ALUFN_SUB   = 6'b00_0001;
  localparam alufn_t ALUFN_AND   = 6'b01_1000;
  localparam alufn_t ALUFN_OR    = 6'b01_1110;
  localparam alufn_t ALUFN_XOR   = 6'b01_0110;
  localparam alufn_t ALUFN_SHL   = 6'b10_0000;
  localparam alufn_t ALUFN_SHR   = 6'b10_0001;
  localparam alufn_t ALUFN_SRA   = 6'b10_0011;
  localparam alufn_t ALUFN_CMPEQ = 6'b11_0011;
  localparam alufn_t ALUFN_CMPLT = 6'b11_0101;
  localparam alufn_t ALUFN_CMPLE = 6'b11_0111;

  // Number of control-ROM outputs and ROM locations (one per opcode).
  localparam int unsigned CTL_WIDTH = 12;
  localparam int unsigned CTL_NLOC  = 64;

  typedef struct packed {
    logic   ra2sel;  // 1: second register port reads Rc instead of Rb
    logic   bsel;    // 1: ALU B operand is the sign-extended literal
    alufn_t alufn;   // ALU function
    logic   wdsel;   // 1: register write data comes from memory read data
    logic   werf;    // register file write enable
    logic   moe;     // data memory output enable
    logic   xwr;     // data memory write request, before reset gating
  } ctl_word_t;

  // Register index that always reads as zero.
  localparam logic [4:0] R31 = 5'd31;

endpackage

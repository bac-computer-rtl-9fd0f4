// bac_pkg: types and constants shared by the BAC CPU.
//
// An instruction is 16 bits: bits 15:10 are the operation code, bit 9 (INDX)
// and bit 8 (NLIT) pick the addressing mode, and bits 7:0 are a literal or a
// direct address. The operation codes, the addressing-mode bits and the ALU
// operations are those of the BAC instruction set. The binary values of the
// ALU operations are the ones the original design used (any permutation
// works). The control-word struct groups the decoder outputs; its layout is
// this implementation's own.
package bac_pkg;

  // Operation codes, instruction bits 15:10.
  localparam logic [5:0] OP_LDA   = 6'b0100_00;
  localparam logic [5:0] OP_IN    = 6'b0100_01;
  localparam logic [5:0] OP_LDX   = 6'b0100_10;
  localparam logic [5:0] OP_LDPG  = 6'b0100_11;
  localparam logic [5:0] OP_STA   = 6'b0101_00;
  localparam logic [5:0] OP_OUT   = 6'b0101_01;
  localparam logic [5:0] OP_TAX   = 6'b0101_10;
  localparam logic [5:0] OP_ADDA  = 6'b1000_00;
  localparam logic [5:0] OP_ADDM  = 6'b1000_01;
  localparam logic [5:0] OP_ADCA  = 6'b1000_10;
  localparam logic [5:0] OP_ADCM  = 6'b1000_11;
  localparam logic [5:0] OP_SUBA  = 6'b1001_00;
  localparam logic [5:0] OP_SUBM  = 6'b1001_01;
  localparam logic [5:0] OP_SBCA  = 6'b1001_10;
  localparam logic [5:0] OP_SBCM  = 6'b1001_11;
  localparam logic [5:0] OP_CMP   = 6'b1010_00;
  localparam logic [5:0] OP_TST   = 6'b1010_01;
  localparam logic [5:0] OP_ROR   = 6'b1010_10;
  localparam logic [5:0] OP_ANDA  = 6'b1011_00;
  localparam logic [5:0] OP_ANDM  = 6'b1011_01;
  localparam logic [5:0] OP_ORA   = 6'b1011_10;
  localparam logic [5:0] OP_ORM   = 6'b1011_11;
  localparam logic [5:0] OP_XORA  = 6'b1100_00;
  localparam logic [5:0] OP_XORM  = 6'b1100_01;
  localparam logic [5:0] OP_INC   = 6'b1101_00;
  localparam logic [5:0] OP_INCA  = 6'b1101_01;
  localparam logic [5:0] OP_INCX  = 6'b1101_10;
  localparam logic [5:0] OP_INCAX = 6'b1101_11;
  localparam logic [5:0] OP_DEC   = 6'b1110_00;
  localparam logic [5:0] OP_DECA  = 6'b1110_01;
  localparam logic [5:0] OP_DECX  = 6'b1110_10;
  localparam logic [5:0] OP_DECAX = 6'b1110_11;

  // Instruction field positions.
  localparam int unsigned BIT_NLIT = 8;   // 1: operand from memory (or input bus)
  localparam int unsigned BIT_INDX = 9;   // 1: memory address is X (or PG:X)
  localparam int unsigned BIT_JDEL = 10;  // on jumps, 1: delayed jump

  // ALU operations.
  typedef enum logic [1:0] {
    ALU_AND = 2'd0,
    ALU_SUM = 2'd1,
    ALU_OR  = 2'd2,
    ALU_XOR = 2'd3
  } alu_op_e;

  // Decoder outputs. Write enables, in and out are already gated by opvalid.
  typedef struct packed {
    alu_op_e aop;   // ALU operation
    logic    ror;   // ALU output is operand B rotated right through carry
    logic    za;    // force operand A (accumulator side) to zero
    logic    ia;    // invert operand A
    logic    zb;    // force operand B to zero
    logic    ci;    // adder carry input
    logic    wrm;   // write data RAM
    logic    wra;   // write Acc
    logic    wrx;   // write X
    logic    wrpg;  // write PG
    logic    wrc;   // write C flag
    logic    wrz;   // write Z and N flags
    logic    in;    // peripheral read pulse, operand B taken from din
    logic    out;   // peripheral write pulse
    logic    jmp;   // load the program counter
  } bac_ctrl_t;

endpackage

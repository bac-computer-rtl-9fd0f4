// bac_jump_logic: conditional execution of BAC jumps and the opvalid flag.
//
// Instruction bits 13:11 select one of eight conditions: never (0), always
// (1), C==0, C==1, Z==0, Z==1, N==0, N==1. The selected condition, qualified
// by opcode bits 15:14 being 00 and by opvalid, is 'jmp', which loads the
// program counter. Because the program ROM is synchronous, the instruction
// after a jump has already been fetched when the jump executes: for a normal
// jump (bit 10 = 0) opvalid is cleared for one cycle so that instruction is
// executed as a NOP; for a delayed jump (bit 10 = 1) opvalid stays set and the
// following instruction runs. Reset clears opvalid, so the unknown word in the
// ROM output register after reset is never executed.
//
// Timing: jmp is combinational from op and the flags; opvalid is a flip-flop
// with asynchronous reset. All of this follows the design's jump-logic figure.
module bac_jump_logic (
  input  logic       clk,
  input  logic       reset,    // asynchronous, active high
  input  logic [5:0] opc,      // instruction bits 15:10
  input  logic       c_flag,
  input  logic       z_flag,
  input  logic       n_flag,
  output logic       jmp,
  output logic       opvalid
);

  logic [7:0] cond;
  logic       sel_cond;

  assign cond     = {n_flag, ~n_flag, z_flag, ~z_flag, c_flag, ~c_flag, 1'b1, 1'b0};
  assign sel_cond = cond[opc[3:1]];
  assign jmp      = sel_cond & ~opc[5] & ~opc[4] & opvalid;

  always_ff @(posedge clk or posedge reset)
    if (reset) opvalid <= 1'b0;
    else       opvalid <= ~jmp | opc[0];

endmodule

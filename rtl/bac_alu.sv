// bac_alu: the BAC arithmetic/logic unit, "ALU+ROR".
//
// A ripple adder with carry in, and bitwise AND, OR and XOR, selected by aop.
// A multiplexer after it replaces the result by operand B rotated right
// through the carry flag (result {c_flag, b[7:1]}, carry out b[0]) when ror is
// set. Zero and negative are taken from the final result. Operand gating
// (forcing A or B to zero, inverting A) happens outside, in the core.
// Purely combinational.
//
// The operation set and the rotate multiplexer follow the design; a carry out
// of 0 for the logic operations is this implementation's choice (the flag is
// never written by those instructions).
module bac_alu
  import bac_pkg::*;
(
  input  alu_op_e    aop,
  input  logic       ror,
  input  logic [7:0] a,       // accumulator-side operand (already gated)
  input  logic [7:0] b,       // memory/literal-side operand (already gated)
  input  logic       ci,      // adder carry input
  input  logic       c_flag,  // current carry flag, shifted in by ROR
  output logic [7:0] y,
  output logic       co,
  output logic       z,
  output logic       n
);

  logic [7:0] r;
  logic       c;

  always_comb begin
    c = 1'b0;
    unique case (aop)
      ALU_SUM: {c, r} = {1'b0, a} + {1'b0, b} + {8'd0, ci};
      ALU_AND: r = a & b;
      ALU_OR:  r = a | b;
      ALU_XOR: r = a ^ b;
      default: r = a | b;
    endcase
  end

  assign y  = ror ? {c_flag, b[7:1]} : r;
  assign co = ror ? b[0] : c;
  assign z  = (y == 8'd0);
  assign n  = y[7];

endmodule

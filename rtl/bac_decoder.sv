// bac_decoder: the BAC instruction decoder.
//
// Two parts, as in the design: the jump logic (bac_jump_logic), which produces
// 'jmp' and the 'opvalid' flag, and a PLA-like table that maps the 6-bit
// operation code to the datapath controls. Every write enable and the in/out
// pulses are ANDed with opvalid, so an invalidated instruction changes nothing.
//
// How each instruction uses the datapath (A = accumulator side, B = operand):
//   jumps, LDA, IN, LDX, LDPG : A forced to 0, OR   -> result = operand
//   STA, OUT, TAX             : B forced to 0, OR   -> result = Acc
//   ADD/ADC                   : SUM, ci = 0 / C
//   SUB/SBC/CMP               : A inverted, SUM, ci = 1 / C  -> op - Acc
//   INCs                      : A = 0, SUM, ci = 1  -> op + 1
//   DECs                      : A = 0 inverted (0xFF), SUM, ci = 0 -> op - 1
//   ROR                       : rotate multiplexer, C <= op[0]
// LDPG decodes only when HAS_PG is set (program or data space above 256).
// Operation codes the instruction set does not define execute as NOPs, a
// choice of this implementation. Purely combinational apart from opvalid.
module bac_decoder
  import bac_pkg::*;
#(
  parameter bit HAS_PG = 1'b0
) (
  input  logic       clk,
  input  logic       reset,
  input  logic [5:0] opc,      // instruction bits 15:10
  input  logic       c_flag,
  input  logic       z_flag,
  input  logic       n_flag,
  output bac_ctrl_t  ctrl,
  output logic       opvalid
);

  logic jmp;

  bac_jump_logic u_jump (
    .clk, .reset, .opc, .c_flag, .z_flag, .n_flag, .jmp, .opvalid
  );

  // Ungated table output
  bac_ctrl_t t;

  always_comb begin
    t     = '0;
    t.aop = ALU_OR;
    unique casez (opc)
      6'b00??_??: t.za = 1'b1;                                      // jumps, NOP
      OP_LDA:     begin t.za = 1'b1; t.wra = 1'b1; t.wrz = 1'b1; end
      OP_IN:      begin t.za = 1'b1; t.wra = 1'b1; t.wrz = 1'b1; t.in = 1'b1; end
      OP_LDX:     begin t.za = 1'b1; t.wrx = 1'b1; end
      OP_LDPG:    begin t.za = 1'b1; t.wrpg = HAS_PG; end
      OP_STA:     begin t.zb = 1'b1; t.wrm = 1'b1; end
      OP_OUT:     begin t.zb = 1'b1; t.out = 1'b1; end
      OP_TAX:     begin t.zb = 1'b1; t.wrx = 1'b1; end
      OP_ADDA, OP_ADDM, OP_ADCA, OP_ADCM: begin
        t.aop = ALU_SUM;
        t.ci  = opc[1] & c_flag;
        t.wrm = opc[0];
        t.wra = ~opc[0];
        t.wrc = 1'b1; t.wrz = 1'b1;
      end
      OP_SUBA, OP_SUBM, OP_SBCA, OP_SBCM: begin
        t.aop = ALU_SUM;
        t.ia  = 1'b1;
        t.ci  = opc[1] ? c_flag : 1'b1;
        t.wrm = opc[0];
        t.wra = ~opc[0];
        t.wrc = 1'b1; t.wrz = 1'b1;
      end
      OP_CMP:     begin t.aop = ALU_SUM; t.ia = 1'b1; t.ci = 1'b1; t.wrc = 1'b1; t.wrz = 1'b1; end
      OP_TST:     begin t.aop = ALU_AND; t.wrz = 1'b1; end
      OP_ROR:     begin t.ror = 1'b1; t.wrm = 1'b1; t.wrc = 1'b1; t.wrz = 1'b1; end
      OP_ANDA:    begin t.aop = ALU_AND; t.wra = 1'b1; t.wrz = 1'b1; end
      OP_ANDM:    begin t.aop = ALU_AND; t.wrm = 1'b1; t.wrz = 1'b1; end
      OP_ORA:     begin t.aop = ALU_OR;  t.wra = 1'b1; t.wrz = 1'b1; end
      OP_ORM:     begin t.aop = ALU_OR;  t.wrm = 1'b1; t.wrz = 1'b1; end
      OP_XORA:    begin t.aop = ALU_XOR; t.wra = 1'b1; t.wrz = 1'b1; end
      OP_XORM:    begin t.aop = ALU_XOR; t.wrm = 1'b1; t.wrz = 1'b1; end
      OP_INC, OP_INCA, OP_INCX, OP_INCAX: begin
        t.aop = ALU_SUM; t.za = 1'b1; t.ci = 1'b1;
        t.wrm = 1'b1; t.wra = opc[0]; t.wrx = opc[1]; t.wrz = 1'b1;
      end
      OP_DEC, OP_DECA, OP_DECX, OP_DECAX: begin
        t.aop = ALU_SUM; t.za = 1'b1; t.ia = 1'b1;
        t.wrm = 1'b1; t.wra = opc[0]; t.wrx = opc[1]; t.wrz = 1'b1;
      end
      default:    ;                                                 // undefined: NOP
    endcase
  end

  always_comb begin
    ctrl      = t;
    ctrl.wrm  = t.wrm  & opvalid;
    ctrl.wra  = t.wra  & opvalid;
    ctrl.wrx  = t.wrx  & opvalid;
    ctrl.wrpg = t.wrpg & opvalid;
    ctrl.wrc  = t.wrc  & opvalid;
    ctrl.wrz  = t.wrz  & opvalid;
    ctrl.in   = t.in   & opvalid;
    ctrl.out  = t.out  & opvalid;
    ctrl.jmp  = jmp;
  end

endmodule

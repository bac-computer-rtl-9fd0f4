// tb_bac_decoder: self-checking test of the BAC instruction decoder.
//
// For every operation code, with random Acc, operand and carry, the decoder's
// controls drive a small datapath model here (operand gating, adder, logic
// operations, rotate). The resulting value, carry and set of written
// registers are compared with what the instruction set says the instruction
// does. Then the test takes a normal jump and checks that in the following
// cycle every write enable and the in/out pulses are held low (the squashed
// slot), and that a delayed jump does not squash.
module tb_bac_decoder;
  import bac_pkg::*;
  import bac_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       reset;
  logic [5:0] opc;
  logic       c_flag, z_flag, n_flag, opvalid;
  bac_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  bac_decoder #(.HAS_PG(1'b1)) dut (.clk, .reset, .opc, .c_flag, .z_flag, .n_flag, .ctrl, .opvalid);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("mismatch %s for opc %b", what, opc);
    end
  endtask

  // datapath driven by the controls
  function automatic bit [8:0] run(bac_ctrl_t k, bit [7:0] acc, bit [7:0] op, bit c);
    bit [7:0] a = (k.za ? 8'h00 : acc) ^ (k.ia ? 8'hFF : 8'h00);
    bit [7:0] b = k.zb ? 8'h00 : op;
    bit [8:0] s = {1'b0, a} + {1'b0, b} + {8'h00, k.ci};
    if (k.ror) return {b[0], c, b[7:1]};
    case (k.aop)
      ALU_SUM: return s;
      ALU_AND: return {1'b0, a & b};
      ALU_OR:  return {1'b0, a | b};
      default: return {1'b0, a ^ b};
    endcase
  endfunction

  function automatic bit jcond(bit [2:0] sel, bit c, bit z, bit n);
    case (sel)
      3'd0: return 0;
      3'd1: return 1;
      3'd2: return !c;
      3'd3: return c;
      3'd4: return !z;
      3'd5: return z;
      3'd6: return !n;
      default: return n;
    endcase
  endfunction

  initial begin
    bit [7:0] acc, op, r;
    bit [8:0] got;
    bit       c, exp_c;
    bit [5:0] wr;   // {m, a, x, pg, c, z}
    bit       chk_c;
    int       t;
    reset = 1; opc = LDA; {c_flag, z_flag, n_flag} = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    @(negedge clk);
    for (int rep = 0; rep < 200; rep++)
      for (int o = 0; o < 64; o++) begin
        opc = 6'(o);
        acc = 8'($urandom); op = 8'($urandom); c = 1'($urandom);
        c_flag = c; z_flag = 1'($urandom); n_flag = 1'($urandom);
        #1;
        chk(opvalid, "opvalid stays set");
        wr = 6'b000000; chk_c = 0; r = 0; exp_c = 0;
        case (opc)
          LDA, IN:  begin wr = 6'b010001; r = op; end
          LDX:      begin wr = 6'b001000; r = op; end
          LDPG:     begin wr = 6'b000100; r = op; end
          STA:      begin wr = 6'b100000; r = acc; end
          OUT:      begin r = acc; end
          TAX:      begin wr = 6'b001000; r = acc; end
          ADDA, ADDM, ADCA, ADCM: begin
            t = op + acc + ((opc[1] && c) ? 1 : 0); r = t[7:0]; exp_c = t > 255; chk_c = 1;
            wr = opc[0] ? 6'b100011 : 6'b010011;
          end
          SUBA, SUBM, SBCA, SBCM, CMP: begin
            t = op - acc - ((opc[1] && !c) ? 1 : 0); r = t[7:0]; exp_c = t >= 0; chk_c = 1;
            wr = (opc == CMP) ? 6'b000011 : opc[0] ? 6'b100011 : 6'b010011;
          end
          TST:  begin wr = 6'b000001; r = op & acc; end
          ROR:  begin wr = 6'b100011; r = {c, op[7:1]}; exp_c = op[0]; chk_c = 1; end
          ANDA: begin wr = 6'b010001; r = op & acc; end
          ANDM: begin wr = 6'b100001; r = op & acc; end
          ORA:  begin wr = 6'b010001; r = op | acc; end
          ORM:  begin wr = 6'b100001; r = op | acc; end
          XORA: begin wr = 6'b010001; r = op ^ acc; end
          XORM: begin wr = 6'b100001; r = op ^ acc; end
          INC, INCA, INCX, INCAX: begin wr = {1'b1, opc[0], opc[1], 3'b001}; r = op + 1; end
          DEC, DECA, DECX, DECAX: begin wr = {1'b1, opc[0], opc[1], 3'b001}; r = op - 1; end
          default: ;
        endcase
        got = run(ctrl, acc, op, c);
        chk({ctrl.wrm, ctrl.wra, ctrl.wrx, ctrl.wrpg, ctrl.wrc, ctrl.wrz} == wr, "write enables");
        if (wr != 0 || opc == OUT) chk(got[7:0] == r, "result");
        if (chk_c) chk(got[8] == exp_c, "carry");
        chk(ctrl.in == (opc == IN), "in pulse");
        chk(ctrl.out == (opc == OUT), "out pulse");
        if (opc[5:4] == 2'b00) chk(ctrl.jmp == jcond(opc[3:1], c, z_flag, n_flag), "jmp");
        else chk(!ctrl.jmp, "no jmp");
        if (opc[5:4] == 2'b00) chk(got[7:0] == op, "jump target");
        opc = LDA;          // keep opvalid set for the next case
        @(negedge clk);
      end
    // squashed slot after a normal jump, not after a delayed one
    opc = JMP; #1;
    chk(ctrl.jmp, "JMP taken");
    @(negedge clk);
    opc = ADDM; #1;
    chk(!opvalid, "slot squashed");
    chk({ctrl.wrm, ctrl.wra, ctrl.wrx, ctrl.wrpg, ctrl.wrc, ctrl.wrz, ctrl.in, ctrl.out} == 0, "no writes in squashed slot");
    opc = OUT; #1;
    chk(!ctrl.out, "no out pulse in squashed slot");
    opc = JMP; #1;
    chk(!ctrl.jmp, "no jump in squashed slot");
    @(negedge clk);
    opc = JMPD; #1;
    chk(ctrl.jmp, "JMPD taken");
    @(negedge clk);
    opc = ADDM; #1;
    chk(opvalid && ctrl.wrm, "delayed slot executes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

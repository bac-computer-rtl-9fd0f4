// tb_bac_alu: self-checking test of the BAC ALU.
//
// Drives random operands, carry input and carry flag through every ALU
// operation and through the rotate path, and compares result, carry, zero
// and negative with values computed here with integer arithmetic. The ALU is
// combinational; a free-running clock only paces the test and the watchdog.
module tb_bac_alu;
  import bac_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  alu_op_e    aop;
  logic       ror, ci, c_flag, co, z, n;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  bac_alu dut (.aop, .ror, .a, .b, .ci, .c_flag, .y, .co, .z, .n);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch %s: aop=%0d ror=%0b a=%h b=%h ci=%0b c=%0b -> y=%h co=%0b",
                                  what, aop, ror, a, b, ci, c_flag, y, co);
    end
  endtask

  initial begin
    int unsigned exp_y, exp_c;
    for (int i = 0; i < 20000; i++) begin
      @(posedge clk);
      a = 8'($urandom); b = 8'($urandom); ci = 1'($urandom); c_flag = 1'($urandom);
      aop = alu_op_e'($urandom_range(3));
      ror = ($urandom_range(7) == 0);
      #1;
      if (ror) begin
        exp_y = (int'(c_flag) << 7) | (int'(b) >> 1);
        exp_c = b & 1;
        chk(co == exp_c[0], "ror carry");
      end else begin
        case (aop)
          ALU_SUM: begin
            exp_y = (int'(a) + int'(b) + int'(ci)) % 256;
            exp_c = (int'(a) + int'(b) + int'(ci)) / 256;
            chk(co == exp_c[0], "sum carry");
          end
          ALU_AND: exp_y = a & b;
          ALU_OR:  exp_y = a | b;
          default: exp_y = a ^ b;
        endcase
      end
      chk(y == exp_y[7:0], "result");
      chk(z == (exp_y == 0), "zero");
      chk(n == exp_y[7], "negative");
    end
    // the carry corner cases
    a = 8'hFF; b = 8'h00; ci = 1; aop = ALU_SUM; ror = 0; #1;
    chk(y == 8'h00 && co && z && !n, "0xFF+0+1");
    a = 8'h7F; b = 8'h00; ci = 1; #1;
    chk(y == 8'h80 && !co && !z && n, "0x7F+1");
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

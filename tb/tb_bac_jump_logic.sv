// tb_bac_jump_logic: self-checking test of the BAC jump logic.
//
// Applies random operation codes and flags every cycle. The expected 'jmp' is
// worked out from the condition table (never, always, NC, C, NZ, Z, PL, MI)
// and a reference copy of the opvalid flag is kept here: after reset it is 0,
// after a taken normal jump 0, otherwise 1. Also checks that a jump is never
// taken while opvalid is 0 and that asynchronous reset clears opvalid.
module tb_bac_jump_logic;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       reset;
  logic [5:0] opc;
  logic       c_flag, z_flag, n_flag, jmp, opvalid;
  bit         ref_valid, exp_jmp, cond;
  int checks = 0, failures = 0, n_taken = 0, n_squash = 0, n_delayed = 0;

  bac_jump_logic dut (.clk, .reset, .opc, .c_flag, .z_flag, .n_flag, .jmp, .opvalid);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch %s at %0t opc=%b", what, $time, opc);
    end
  endtask

  initial begin
    reset = 1; opc = 0; {c_flag, z_flag, n_flag} = 0;
    repeat (2) @(posedge clk);
    #1;
    chk(opvalid == 0, "opvalid after reset");
    @(negedge clk);
    reset = 0;
    ref_valid = 0;
    for (int i = 0; i < 20000; i++) begin
      // bias toward jump opcodes
      opc = ($urandom_range(3) != 0) ? {2'b00, 4'($urandom)} : 6'($urandom);
      {c_flag, z_flag, n_flag} = 3'($urandom);
      #1;
      case (opc[3:1])
        3'd0: cond = 0;
        3'd1: cond = 1;
        3'd2: cond = !c_flag;
        3'd3: cond = c_flag;
        3'd4: cond = !z_flag;
        3'd5: cond = z_flag;
        3'd6: cond = !n_flag;
        default: cond = n_flag;
      endcase
      exp_jmp = ref_valid && opc[5:4] == 2'b00 && cond;
      chk(opvalid == ref_valid, "opvalid");
      chk(jmp == exp_jmp, "jmp");
      if (!ref_valid) n_squash++;
      if (exp_jmp && opc[0]) n_delayed++;
      if (exp_jmp && !opc[0]) n_taken++;
      @(posedge clk);
      ref_valid = !exp_jmp || opc[0];
      @(negedge clk);
    end
    // asynchronous reset in mid-cycle
    #2 reset = 1;
    #1 chk(opvalid == 0, "async reset");
    checks++;
    if (n_taken == 0 || n_squash == 0 || n_delayed == 0) failures++;
    $display("taken=%0d delayed=%0d squashed=%0d", n_taken, n_delayed, n_squash);
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

// tb_bac_pc: self-checking test of the BAC program counter.
//
// Two instances: a plain 8-bit PC and a 10-bit paged PC with a 2-bit PG
// input. Random jumps, targets and PG writes are applied each cycle and the
// PC is compared with a reference: +1 (carrying into the page bits) without a
// jump; low byte = target with the page unchanged on a jump; page = PG on a
// jump in the cycle right after a PG write (long jump). Counts page
// crossings and long jumps and requires both to happen.
module tb_bac_pc;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       reset, jmp, wrpg;
  logic [7:0] target;
  logic [1:0] pg;
  logic [7:0] pc8;
  logic [9:0] pc10;
  int checks = 0, failures = 0, n_long = 0, n_cross = 0;
  int unsigned r8, r10;
  bit ref_ljmp;

  bac_pc #(.PAW(8), .PGW(1))  u8  (.clk, .reset, .jmp, .target, .wrpg, .pg(pg[0]), .pc(pc8));
  bac_pc #(.PAW(10), .PGW(2)) u10 (.clk, .reset, .jmp, .target, .wrpg, .pg, .pc(pc10));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch %s at %0t: pc8=%h/%h pc10=%h/%h", what, $time, pc8, r8, pc10, r10);
    end
  endtask

  initial begin
    reset = 1; jmp = 0; wrpg = 0; target = 0; pg = 0;
    repeat (2) @(posedge clk);
    #1 chk(pc8 == 0 && pc10 == 0, "reset");
    @(negedge clk) reset = 0;
    r8 = 0; r10 = 0; ref_ljmp = 0;
    for (int i = 0; i < 30000; i++) begin
      jmp    = ($urandom_range(15) == 0);
      wrpg   = ($urandom_range(3) == 0);
      target = 8'($urandom);
      pg     = 2'($urandom);
      @(posedge clk);
      if (jmp) begin
        r8 = target;
        if (ref_ljmp) begin r10 = (int'(pg) << 8) | target; n_long++; end
        else r10 = (r10 & 32'h300) | target;
      end else begin
        r8 = (r8 + 1) % 256;
        if ((r10 & 8'hFF) == 8'hFF) n_cross++;
        r10 = (r10 + 1) % 1024;
      end
      ref_ljmp = wrpg;
      #1;
      chk(pc8 == r8[7:0], "pc8");
      chk(pc10 == r10[9:0], "pc10");
      @(negedge clk);
    end
    checks++;
    if (n_long == 0 || n_cross == 0) failures++;
    $display("long jumps=%0d page crossings=%0d", n_long, n_cross);
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

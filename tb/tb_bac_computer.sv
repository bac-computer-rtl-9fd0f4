// tb_bac_computer: self-checking test of the BAC core.
//
// Two cores run random programs against the reference model: one at the
// default size (256-word program, 256-byte data memory, no PG register) and
// one with the 64K extension enabled (1024-word program, 512-byte data
// memory), which exercises LDPG, PG:X addressing and long jumps. The test
// also requires that normal jumps (with their squashed slot), delayed jumps,
// long jumps, IN and OUT each happened at least once.
module tb_bac_computer;

  logic clk = 0;
  always #5 clk = ~clk;

  int c0, f0, t0, s0, d0, l0, i0, o0, p0;
  int c1, f1, t1, s1, d1, l1, i1, o1, p1;
  bit done0, done1;
  int checks, failures;

  bac_core_harness #(.ROMSIZE(256), .RAMSIZE(256), .NPROG(30), .NCYC(400)) h0 (
    .clk, .checks(c0), .failures(f0), .n_taken(t0), .n_squash(s0), .n_delayed(d0),
    .n_long(l0), .n_in(i0), .n_out(o0), .n_ldpg(p0), .done(done0)
  );

  bac_core_harness #(.ROMSIZE(1024), .RAMSIZE(512), .NPROG(30), .NCYC(1000)) h1 (
    .clk, .checks(c1), .failures(f1), .n_taken(t1), .n_squash(s1), .n_delayed(d1),
    .n_long(l1), .n_in(i1), .n_out(o1), .n_ldpg(p1), .done(done1)
  );

  task automatic need(int count, string what);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  never happened: %s", what);
    end
  endtask

  initial begin
    wait (done0 && done1);
    checks   = c0 + c1;
    failures = f0 + f1;
    $display("mechanisms (default / 64K):");
    need(t0, "normal jump taken (256)");
    need(s0, "squashed slot (256)");
    need(d0, "delayed jump taken (256)");
    need(i0, "IN (256)");
    need(o0, "OUT (256)");
    need(t1, "normal jump taken (64K)");
    need(d1, "delayed jump taken (64K)");
    need(l1, "long jump (64K)");
    need(p1, "LDPG (64K)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

endmodule

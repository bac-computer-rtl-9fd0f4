// tb_bac_system_64k: the BAC system with the 64K extension enabled.
//
// Builds the system with ROMSIZE = 1024 and RAMSIZE = 8192 (5-bit PG
// register) and runs three programs in a row:
//   0. a single indexed store of 0xFF to data address 0x1234 (PG = 0x12,
//      X = 0x34);
//   1. a far call: the caller in page 0 saves its return page, loads PG with
//      the routine's page and jumps (a long jump, right after LDPG) to a
//      routine at 0x1FC, whose code runs on across the page boundary into
//      0x200. The routine pushes the return address and page on a stack in
//      page 0, sets the LEDs to 6, and returns with LDPG + JMPD [X] (another
//      long jump) and the stack pop in the delay slot;
//   2. a fill of the 512 bytes 0x100..0x2FF through PG:X indexed writes,
//      counting X down in a zero-page pointer with delayed jumps.
// Checks the byte at 0x1234 and its neighbours, the LED values, every byte of the filled range, untouched bytes
// just outside it, the restored stack pointer, and that long jumps, PG
// writes and a page crossing by increment all happened.
module tb_bac_system_64k;
  import bac_tb_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       reset, uart_rxd, uart_txd;
  logic [2:0] leds;

  bac_system #(.ROMSIZE(1024), .RAMSIZE(8192)) dut (.clk, .reset, .uart_rxd, .uart_txd, .leds);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  bit [15:0] prog [1024];
  int        here;
  int L_ret, L_l1, L_done, L_routine;
  localparam bit [7:0] SP = 8'h1F, RPG = 8'h30, PTR = 8'h40, FILL = 8'hA5;

  function automatic void e(bit [5:0] opc, bit [1:0] mode, int lit);
    prog[here] = enc(opc, mode, 8'(lit));
    here++;
  endfunction

  function automatic void assemble();
    for (int i = 0; i < 1024; i++) prog[i] = 16'h0000;
    here = 0;
    // [0x1234] = 0xFF
    e(LDA, M_LIT, 8'hFF);          e(LDPG, M_LIT, 8'h12);
    e(LDX, M_LIT, 8'h34);          e(STA, M_IDX, 0);
    e(LDA, M_LIT, 8'hF0);          e(STA, M_DIR, SP);
    // far call
    e(LDA, M_LIT, L_ret >> 8);     e(STA, M_DIR, RPG);        // return page
    e(LDA, M_LIT, L_ret & 255);                               // return address
    e(LDPG, M_LIT, L_routine >> 8);
    e(JMP, M_LIT, L_routine & 255);                           // long jump
    L_ret = here;
    // fill 0x100..0x2FF
    e(LDA, M_LIT, 0);              e(STA, M_DIR, PTR);
    e(LDA, M_LIT, 2);              e(STA, M_DIR, PTR + 1);
    e(LDPG, M_DIR, PTR + 1);
    e(LDA, M_LIT, FILL);
    L_l1 = here;
    e(DECX, M_DIR, PTR);
    e(JNZD, M_LIT, L_l1);
    e(STA, M_IDX, 0);                                         // dmem[PG:X] = Acc
    e(DEC, M_DIR, PTR + 1);
    e(JNZD, M_LIT, L_l1);
    e(LDPG, M_DIR, PTR + 1);
    e(LDA, M_LIT, 3);              e(OUT, M_DIR, 2);          // LEDs = 3
    L_done = here;
    e(JMP, M_LIT, L_done);
    // the routine, straddling 0x1FF/0x200
    L_routine = 12'h1FC;
    here = L_routine;
    e(LDPG, M_LIT, 0);                                        // stack on page 0
    e(DECX, M_DIR, SP);            e(STA, M_IDX, 0);          // push return address
    e(DECX, M_DIR, SP);
    e(LDA, M_DIR, RPG);            e(STA, M_IDX, 0);          // push return page
    e(LDA, M_LIT, 6);              e(OUT, M_DIR, 2);          // LEDs = 6
    e(LDX, M_DIR, SP);             e(LDA, M_IDX, 0);          // pop return page
    e(STA, M_DIR, RPG);
    e(INCX, M_DIR, SP);
    e(LDPG, M_DIR, RPG);
    e(JMPD, M_IDX, 0);                                        // long return
    e(INC, M_DIR, SP);                                        // (delay slot)
  endfunction

  int n_long = 0, n_ldpg = 0, n_cross = 0, n_led = 0;
  bit [2:0] led_vals [4];
  bit running = 0;

  always @(posedge clk) if (running) begin
    if (dut.u_core.ctrl.jmp && dut.u_core.u_pc.g_page.ljmp) n_long++;
    if (dut.u_core.ctrl.wrpg) n_ldpg++;
    if (!dut.u_core.ctrl.jmp && dut.u_core.pc[7:0] == 8'hFF) n_cross++;
    if (dut.u_core.out && dut.u_core.addr == 2) begin
      if (n_led < 4) led_vals[n_led] = dut.u_core.dout[2:0];
      n_led++;
    end
  end

  initial begin
    uart_rxd = 1;
    reset = 1;
    L_ret = 0; L_l1 = 0; L_done = 0; L_routine = 0;
    assemble();
    assemble();
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 1024; i++) dut.u_core.u_rom.mem[i] = prog[i];
    for (int i = 0; i < 8192; i++) dut.u_core.u_ram.mem[i] = 8'h5A;
    @(negedge clk);
    reset = 0;
    running = 1;
    wait (n_led == 2);
    repeat (5) @(posedge clk);
    #1;
    chk(dut.u_core.u_ram.mem[16'h1234] == 8'hFF, "[0x1234] = 0xFF");
    chk(dut.u_core.u_ram.mem[16'h1233] == 8'h5A && dut.u_core.u_ram.mem[16'h1235] == 8'h5A,
        "neighbours of 0x1234 untouched");
    chk(dut.u_core.u_ram.mem[16'h0034] == 8'h5A, "0x0034 untouched (no aliasing)");
    chk(led_vals[0] == 3'd6, "LEDs = 6 inside the far routine");
    chk(led_vals[1] == 3'd3, "LEDs = 3 after the fill");
    chk(leds == 3'd3, "LED pins");
    for (int a = 12'h100; a < 12'h300; a++)
      chk(dut.u_core.u_ram.mem[a] == FILL, $sformatf("filled byte %h", a));
    chk(dut.u_core.u_ram.mem[12'h0FF] == 8'h5A, "byte below the range untouched");
    chk(dut.u_core.u_ram.mem[12'h300] == 8'h5A, "byte above the range untouched");
    chk(dut.u_core.u_ram.mem[SP] == 8'hF0, "stack pointer restored");
    chk(dut.u_core.u_ram.mem[8'hEF] == 8'(L_ret), "return address on the stack");
    chk(dut.u_core.pc[9:8] == 2'd0, "back in page 0");
    $display("long jumps=%0d PG writes=%0d page crossings=%0d", n_long, n_ldpg, n_cross);
    chk(n_long == 2, "two long jumps (call and return)");
    chk(n_ldpg >= 4, "PG written");
    chk(n_cross >= 1, "page crossed by increment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_bac_system: end-to-end test of the BAC system at its default size.
//
// Assembles a program into the 256-word ROM and runs it on the full system
// (core, UART, LEDs). The program:
//   1. sets the LEDs to 5 (OUT to address 2);
//   2. calls a string-print subroutine through a software stack in data RAM
//      (DECX/STA [X] push, JMPD [X] return with INC [sp] in the delay slot).
//      The subroutine fetches characters stored in program memory as
//      "LDA 'c'" words with two back-to-back delayed jumps, polls the UART's
//      TRDY bit and sends "Hello";
//   3. waits for a byte from the UART (polling DV), adds 1 and sends it back;
//   4. sums 10+9+...+1 with ADDM/DEC/JNZ and writes the sum (55) to the LEDs.
// The serial line is decoded here at 32 clocks per bit and a byte is sent to
// the receiver. Checks: the characters sent, the LED values, the loop's cycle
// count (a taken jump costs 2 cycles, a jump not taken 1: the OUT to the
// LEDs comes 55 cycles after the echo), and that each mechanism happened:
// taken normal jump with its squashed slot, jump not taken, delayed jump,
// IN, OUT, indexed RAM write, TRDY polling, UART transmit and receive.
module tb_bac_system;
  import bac_tb_pkg::*;

  localparam int BIT = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       reset, uart_rxd, uart_txd;
  logic [2:0] leds;

  bac_system dut (.clk, .reset, .uart_rxd, .uart_txd, .leds);

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ assembler
  bit [15:0] prog [256];
  int        here;
  int L_ret1, L_rxw, L_txw2, L_lp, L_done, L_pputs, L_pp1, L_pp2, L_ppw, L_txt;
  localparam bit [7:0] SP = 8'h1F, PAR1 = 8'h20, TMP = 8'h21, CNT = 8'h22, SUM = 8'h23;

  function automatic void e(bit [5:0] opc, bit [1:0] mode, int lit);
    prog[here] = enc(opc, mode, 8'(lit));
    here++;
  endfunction

  function automatic void assemble();
    here = 0;
    e(LDA, M_LIT, 8'hF0);  e(STA, M_DIR, SP);         // stack pointer
    e(LDA, M_LIT, 5);      e(OUT, M_DIR, 2);          // LEDs = 5
    e(LDA, M_LIT, L_txt);  e(STA, M_DIR, PAR1);       // string pointer
    e(LDA, M_LIT, L_ret1); e(JMP, M_LIT, L_pputs);    // call pputs
    L_ret1 = here;
    L_rxw = here;
    e(IN, M_DIR, 1);       e(TST, M_LIT, 1);          // wait for DV
    e(JZ, M_LIT, L_rxw);
    e(IN, M_DIR, 0);       e(ADDA, M_LIT, 1);  e(STA, M_DIR, TMP);
    L_txw2 = here;
    e(IN, M_DIR, 1);       e(TST, M_LIT, 8'h80);      // wait for TRDY
    e(JZ, M_LIT, L_txw2);
    e(LDA, M_DIR, TMP);    e(OUT, M_DIR, 0);          // echo byte + 1
    e(LDA, M_LIT, 10);     e(STA, M_DIR, CNT);
    e(LDA, M_LIT, 0);      e(STA, M_DIR, SUM);
    L_lp = here;
    e(LDA, M_DIR, CNT);    e(ADDM, M_DIR, SUM);       // sum += cnt
    e(DEC, M_DIR, CNT);    e(JNZ, M_LIT, L_lp);
    e(LDA, M_DIR, SUM);    e(OUT, M_DIR, 2);          // LEDs = sum
    L_done = here;
    e(JMP, M_LIT, L_done);
    // print the string whose program address is in [PAR1]
    L_pputs = here;
    e(DECX, M_DIR, SP);    e(STA, M_IDX, 0);          // push return address
    L_pp1 = here;
    e(JMPD, M_DIR, PAR1);                             // run "LDA c" from the table
    e(JMPD, M_LIT, here + 1);                         // ... and come straight back
    e(JZD, M_LIT, L_pp2);                             // end of string?
    e(INC, M_DIR, PAR1);                              // (delay slot) pointer++
    e(STA, M_DIR, TMP);
    L_ppw = here;
    e(IN, M_DIR, 1);       e(TST, M_LIT, 8'h80);
    e(JZ, M_LIT, L_ppw);
    e(LDA, M_DIR, TMP);
    e(JMPD, M_LIT, L_pp1);
    e(OUT, M_DIR, 0);                                 // (delay slot) send char
    L_pp2 = here;
    e(LDX, M_DIR, SP);
    e(JMPD, M_IDX, 0);                                // return
    e(INC, M_DIR, SP);                                // (delay slot) pop
    L_txt = here;
    e(LDA, M_LIT, "H"); e(LDA, M_LIT, "e"); e(LDA, M_LIT, "l");
    e(LDA, M_LIT, "l"); e(LDA, M_LIT, "o"); e(LDA, M_LIT, 0);
    while (here < 256) e(NOP, M_LIT, 0);
  endfunction

  // ------------------------------------------------------------ serial line
  string rx_text = "";
  int    n_tx = 0;

  initial begin : uart_monitor
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (BIT / 2) @(posedge clk);
      if (uart_txd == 0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (BIT) @(posedge clk);
          b[i] = uart_txd;
        end
        repeat (BIT) @(posedge clk);
        chk(uart_txd == 1, "stop bit");
        rx_text = {rx_text, string'(b)};
        n_tx++;
      end
    end
  end

  task automatic serial_send(logic [7:0] d);
    logic [10:0] frame = {2'b11, d, 1'b0};
    for (int i = 0; i < 11; i++) begin
      uart_rxd = frame[i];
      repeat (BIT) @(posedge clk);
    end
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_jmp = 0, n_squash = 0, n_notaken = 0, n_delayed = 0, n_in = 0, n_out = 0;
  int n_idx_wr = 0, n_trdy_wait = 0, n_led = 0, n_rx = 0;
  longint cycle = 0, t_echo = -1, t_leds = -1;
  bit running = 0;

  always @(posedge clk) if (running) begin
    cycle++;
    if (dut.u_core.ctrl.jmp && !dut.u_core.romout[10]) n_jmp++;
    if (dut.u_core.ctrl.jmp && dut.u_core.romout[10]) n_delayed++;
    if (!dut.u_core.opvalid) n_squash++;
    if (dut.u_core.opvalid && dut.u_core.romout[15:14] == 2'b00 &&
        dut.u_core.romout[13:11] != 3'd0 && !dut.u_core.ctrl.jmp) n_notaken++;
    if (dut.u_core.in) n_in++;
    if (dut.u_core.out) n_out++;
    if (dut.u_core.ctrl.wrm && dut.u_core.romout[9]) n_idx_wr++;
    if (dut.u_core.in && dut.u_core.addr == 1 && !dut.u_core.din[7]) n_trdy_wait++;
    if (dut.u_core.in && dut.u_core.addr == 0) n_rx++;
    if (dut.u_core.out && dut.u_core.addr == 2) begin
      n_led++;
      if (n_led == 2) t_leds = cycle;
    end
    if (dut.u_core.out && dut.u_core.addr == 0 && n_tx >= 5 && t_echo < 0) t_echo = cycle;
  end

  task automatic need(int count, string what);
    $display("  %-32s %0d", what, count);
    chk(count > 0, {"mechanism happened: ", what});
  endtask

  initial begin
    uart_rxd = 1;
    reset = 1;
    L_ret1 = 0; L_rxw = 0; L_txw2 = 0; L_lp = 0; L_done = 0;
    L_pputs = 0; L_pp1 = 0; L_pp2 = 0; L_ppw = 0; L_txt = 0;
    assemble();      // first pass finds the labels
    assemble();
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 256; i++) dut.u_core.u_rom.mem[i] = prog[i];
    @(negedge clk);
    reset = 0;
    running = 1;
    // after reset, before anything is written
    #1 chk(leds == 3'd0, "LEDs off after reset");
    wait (dut.u_core.out && dut.u_core.addr == 2);
    @(posedge clk); #1;
    chk(leds == 3'd5, "LEDs = 5");
    wait (n_tx == 5);
    chk(rx_text == "Hello", {"text sent: ", rx_text});
    repeat (100) @(posedge clk);
    serial_send("A");
    wait (n_tx == 6);
    chk(rx_text == "HelloB", {"echo: ", rx_text});
    wait (t_leds >= 0);
    @(posedge clk); #1;
    chk(leds == 3'(55), "LEDs = 55 mod 8");
    chk(dut.u_core.u_ram.mem[SUM] == 8'd55, "sum in RAM");
    chk(t_leds - t_echo == 55, $sformatf("loop timing: %0d cycles", t_leds - t_echo));
    repeat (20) @(posedge clk);
    chk(dut.u_core.pc == 8'(L_done) || dut.u_core.pc == 8'(L_done + 1), "parked in final loop");
    chk(dut.u_core.u_ram.mem[SP] == 8'hF0, "stack pointer restored");
    $display("mechanisms (cycles %0d):", cycle);
    need(n_jmp, "normal jump taken");
    need(n_squash, "squashed slot");
    need(n_notaken, "conditional jump not taken");
    need(n_delayed, "delayed jump taken");
    need(n_in, "IN");
    need(n_out, "OUT");
    need(n_idx_wr, "indexed RAM write");
    need(n_trdy_wait, "TRDY polled while busy");
    need(n_tx, "UART byte sent");
    need(n_rx, "UART byte read");
    need(n_led, "LED write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired: text so far '%s'", rx_text);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_bac_uart: self-checking test of the BAC UART.
//
// Transmit: writes bytes to the data register and samples 'txd' in the middle
// of every bit time, expecting a start bit, 8 data bits LSB first and two stop
// bits; checks that TRDY is low for exactly 11 * CLKS_PER_BIT = 352 cycles and
// that a write while busy is ignored. Receive: a serializer here drives 'rxd'
// and the test checks DV, the received byte, that reading clears DV and OV, an
// overrun (two bytes without a read) and a framing error (stop bit 0).
module tb_bac_uart;

  localparam int BIT = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       reset, cs, reg_sel, wr, rd, rxd, txd;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;
  int busy;

  // cycles with TRDY low, sampled after every rising edge
  always @(posedge clk) #1 if (!dut.trdy) busy++;

  bac_uart #(.CLKS_PER_BIT(BIT)) dut (
    .clk, .reset, .cs, .reg_sel, .wr, .rd, .wdata, .rdata, .rxd, .txd
  );

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch %s at %0t rdata=%h", what, $time, rdata);
    end
  endtask

  task automatic bus_write(bit sel, logic [7:0] d);
    @(negedge clk);
    cs = 1; reg_sel = sel; wr = 1; wdata = d;
    @(negedge clk);
    cs = 0; wr = 0;
  endtask

  task automatic bus_read(bit sel, output logic [7:0] d);
    @(negedge clk);
    cs = 1; reg_sel = sel; rd = 1;
    #1 d = rdata;
    @(negedge clk);
    cs = 0; rd = 0;
  endtask

  task automatic serial_send(logic [7:0] d, bit stop);
    logic [9:0] frame = {stop, d, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = frame[i];
      repeat (BIT) @(posedge clk);
    end
    rxd = 1;
    repeat (BIT) @(posedge clk);
  endtask

  initial begin
    logic [7:0] st, d, b;
    reset = 1; cs = 0; reg_sel = 0; wr = 0; rd = 0; wdata = 0; rxd = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    chk(txd == 1, "idle line high");
    bus_read(1, st);
    chk(st == 8'h80, "status after reset: TRDY only");
    // ---- transmit
    for (int k = 0; k < 4; k++) begin
      b = 8'($urandom);
      @(negedge clk);
      cs = 1; reg_sel = 0; wr = 1; wdata = b;
      busy = 0;
      @(posedge clk);
      #1 cs = 0; wr = 0;
      for (int i = 0; i < 11; i++) begin
        repeat (BIT / 2) @(posedge clk);
        #1;
        chk(txd == ((i == 0) ? 1'b0 : (i <= 8) ? b[i-1] : 1'b1), "tx bit");
        if (i == 3 && k == 0) begin
          // a write while busy must not disturb the frame
          @(negedge clk); cs = 1; wr = 1; wdata = ~b; @(negedge clk); cs = 0; wr = 0;
          repeat (BIT / 2 - 2) @(posedge clk);
        end else begin
          repeat (BIT / 2) @(posedge clk);
        end
      end
      repeat (4) @(posedge clk);
      #2;
      chk(busy == 11 * BIT, "TRDY low for 352 cycles");
      if (busy != 11 * BIT) $display("busy %0d", busy);
    end
    // ---- receive
    b = 8'h3C;
    serial_send(b, 1);
    bus_read(1, st);
    chk(st[0] == 1 && st[1] == 0 && st[2] == 0, "DV after one byte");
    bus_read(0, d);
    chk(d == b, "received byte");
    bus_read(1, st);
    chk(st[0] == 0, "DV cleared by read");
    // overrun
    serial_send(8'hA1, 1);
    serial_send(8'h5E, 1);
    bus_read(1, st);
    chk(st[0] == 1 && st[2] == 1, "OV after two bytes");
    bus_read(0, d);
    chk(d == 8'h5E, "latest byte kept");
    bus_read(1, st);
    chk(st[0] == 0 && st[2] == 0, "DV and OV cleared");
    // framing error
    serial_send(8'h77, 0);
    bus_read(1, st);
    chk(st[1] == 1 && st[0] == 1, "FE on stop bit 0");
    bus_read(0, d);
    serial_send(8'h12, 1);
    bus_read(1, st);
    chk(st[1] == 0, "FE cleared by a good frame");
    for (int k = 0; k < 20; k++) begin
      b = 8'($urandom);
      serial_send(b, 1);
      bus_read(0, d);
      chk(d == b, "random byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_bac_led_reg: self-checking test of the LED output register.
//
// Random bus cycles with random addresses; a reference copy of the LEDs is
// updated only on writes to the register's address (0x02) and compared with
// the outputs after every edge. Also checks reset.
module tb_bac_led_reg;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       reset, wr;
  logic [7:0] addr, wdata;
  logic [2:0] leds, ref_leds;
  int checks = 0, failures = 0, n_hit = 0;

  bac_led_reg #(.WIDTH(3), .ADDR(8'h02)) dut (.clk, .reset, .addr, .wdata, .wr, .leds);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch %s at %0t leds=%b ref=%b", what, $time, leds, ref_leds);
    end
  endtask

  initial begin
    reset = 1; wr = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    #1 chk(leds == 0, "reset");
    @(negedge clk) reset = 0;
    ref_leds = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      addr  = ($urandom_range(3) == 0) ? 8'h02 : 8'($urandom);
      wdata = 8'($urandom);
      wr    = 1'($urandom);
      @(posedge clk);
      if (wr && addr == 8'h02) begin ref_leds = wdata[2:0]; n_hit++; end
      #1 chk(leds == ref_leds, "leds");
    end
    checks++;
    if (n_hit == 0) failures++;
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

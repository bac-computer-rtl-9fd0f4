// tb_bac_data_ram: self-checking test of the BAC data RAM.
//
// Uses the memory the way the CPU does: an address is applied after the
// rising edge, the read data must be valid after the falling edge, and a
// value computed from it (here read + 1, an INC) is written at the next
// rising edge. A shadow array kept here gives the expected contents. Also
// checks that nothing is written while 'we' is low.
module tb_bac_data_ram;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0] addr;
  logic       we;
  logic [7:0] wdata, rdata;
  logic [7:0] shadow [512];
  int checks = 0, failures = 0;

  bac_data_ram #(.DEPTH(512), .AW(9)) dut (.clk, .addr, .we, .wdata, .rdata);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch %s at %0t addr=%h rdata=%h exp=%h", what, $time, addr, rdata, shadow[addr]);
    end
  endtask

  assign wdata = rdata + 8'd1;

  initial begin
    we = 0; addr = 0;
    for (int i = 0; i < 512; i++) begin
      shadow[i] = 8'($urandom);
      dut.mem[i] = shadow[i];
    end
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      #1;
      addr = 9'($urandom);
      we   = 1'($urandom);
      @(negedge clk);
      #1;
      chk(rdata == shadow[addr], "read at falling edge");
      @(posedge clk);
      if (we) shadow[addr] = shadow[addr] + 8'd1;
    end
    #1 we = 0;
    for (int i = 0; i < 512; i++) chk(dut.mem[i] == shadow[i], "final contents");
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

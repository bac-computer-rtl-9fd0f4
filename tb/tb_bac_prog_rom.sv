// tb_bac_prog_rom: self-checking test of the BAC program ROM.
//
// Fills the memory with a pattern computed here (w = i * 0x9E37 ^ 0x5A5A),
// then reads random addresses and checks that each word appears on the
// output exactly one rising edge after its address was applied, and not
// before. A second instance loads the five-word example image
// tb/bac_rom_example.hex ($readmemh format with @address markers) through
// INIT_FILE and checks those words.
module tb_bac_prog_rom;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  addr;
  logic [15:0] q;
  int checks = 0, failures = 0;

  bac_prog_rom #(.DEPTH(256), .AW(8)) dut (.clk, .addr, .q);

  logic [7:0]  faddr;
  logic [15:0] fq;
  bac_prog_rom #(.DEPTH(256), .AW(8), .INIT_FILE("tb/bac_rom_example.hex")) u_file (
    .clk, .addr(faddr), .q(fq)
  );

  function automatic logic [15:0] pattern(int i);
    return 16'(i * 16'h9E37) ^ 16'h5A5A;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch %s at %0t addr=%h q=%h", what, $time, addr, q);
    end
  endtask

  localparam logic [7:0]  exp_a [5] = '{8'h00, 8'h01, 8'h02, 8'h10, 8'h11};
  localparam logic [15:0] exp_w [5] = '{16'h40FF, 16'h4DFF, 16'h4D05, 16'h0818, 16'hE505};

  initial begin
    logic [7:0] prev;
    faddr = 0;
    for (int i = 0; i < 256; i++) dut.mem[i] = pattern(i);
    addr = 0;
    @(posedge clk);
    #1;
    prev = addr;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = 8'($urandom);
      #1;
      chk(q == pattern(prev), "output holds until the edge");
      @(posedge clk);
      #1;
      chk(q == pattern(addr), "word after one edge");
      prev = addr;
    end
    // words loaded from the file
    foreach (exp_a[k]) begin
      @(negedge clk) faddr = exp_a[k];
      @(posedge clk);
      #1 chk(fq == exp_w[k], "word from file");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    // words loaded from the file
    foreach (exp_a[k]) begin
      @(negedge clk) faddr = exp_a[k];
      @(posedge clk);
      #1 chk(fq == exp_w[k], "word from file");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

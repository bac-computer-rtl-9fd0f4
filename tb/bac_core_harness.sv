// bac_core_harness: runs random programs on one bac_computer and compares it,
// cycle by cycle, with the reference model in bac_tb_pkg.
//
// For each program the ROM and RAM are filled with random contents (the same
// in the core and in the model), the core is reset and run for NCYC cycles.
// Every cycle the peripheral pulses, address and output data are compared
// before the rising edge, and PC, opvalid, Acc, X, PG and the flags after it.
// At the end of each program the whole data RAM is compared. The harness also
// counts how often the mechanisms of interest happened.
module bac_core_harness
  import bac_tb_pkg::*;
#(
  parameter int unsigned ROMSIZE = 256,
  parameter int unsigned RAMSIZE = 256,
  parameter int unsigned NPROG   = 20,
  parameter int unsigned NCYC    = 400
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_taken,
  output int   n_squash,
  output int   n_delayed,
  output int   n_long,
  output int   n_in,
  output int   n_out,
  output int   n_ldpg,
  output bit   done
);

  logic       reset;
  logic [7:0] din, addr, dout;
  logic       out, in;

  bac_computer #(.ROMSIZE(ROMSIZE), .RAMSIZE(RAMSIZE)) dut (
    .clk, .reset, .din, .addr, .dout, .out, .in
  );

  assign din = din_of(addr);

  bac_model m;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("[%0d/%0d] mismatch: %s at %0t", ROMSIZE, RAMSIZE, what, $time);
    end
  endtask

  function automatic bit [15:0] rand_instr();
    bit [5:0] opc = DEFINED[$urandom_range(47)];
    bit [1:0] mode;
    case ($urandom_range(3))
      0: mode = M_LIT;
      1: mode = M_DIR;
      2: mode = M_IDX;
      default: mode = 2'b10;
    endcase
    return enc(opc, mode, 8'($urandom));
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    n_taken = 0; n_squash = 0; n_delayed = 0; n_long = 0; n_in = 0; n_out = 0; n_ldpg = 0;
    reset = 1;
    m = new(ROMSIZE, RAMSIZE);
    for (int p = 0; p < NPROG; p++) begin
      // program: random words; often an LDPG right before a jump
      for (int i = 0; i < ROMSIZE; i++) m.rom[i] = rand_instr();
      for (int i = 0; i + 1 < ROMSIZE; i++)
        if ($urandom_range(9) == 0) begin
          m.rom[i]   = enc(LDPG, M_LIT, 8'($urandom));
          m.rom[i+1] = enc(6'($urandom_range(2, 15)), M_LIT, 8'($urandom));
        end
      reset = 1;
      @(posedge clk);
      #1;
      for (int i = 0; i < ROMSIZE; i++) dut.u_rom.mem[i] = m.rom[i];
      for (int i = 0; i < RAMSIZE; i++) begin
        m.ram[i] = 8'($urandom);
        dut.u_ram.mem[i] = m.ram[i];
      end
      repeat (2) @(posedge clk);
      @(negedge clk);
      reset = 0;
      m.do_reset();
      for (int cyc = 0; cyc < NCYC; cyc++) begin
        #1;
        m.step();
        chk(out == m.out_p, "out pulse");
        chk(in == m.in_p, "in pulse");
        if (m.out_p || m.in_p) chk(addr == m.io_addr, "io addr");
        if (m.out_p) chk(dout == m.io_dout, "io dout");
        if (m.taken && !m.delayed_taken) n_taken++;
        if (m.delayed_taken) n_delayed++;
        if (m.squashed && cyc > 0) n_squash++;
        if (m.long_jump) n_long++;
        if (m.in_p) n_in++;
        if (m.out_p) n_out++;
        if (m.ljmp) n_ldpg++;
        @(posedge clk);
        #1;
        chk(dut.pc == m.pc[$bits(dut.pc)-1:0], "pc");
        chk(dut.opvalid == m.opvalid, "opvalid");
        chk(dut.acc == m.acc, "acc");
        chk(dut.xreg == m.x, "x");
        chk({dut.n_flag, dut.z_flag, dut.c_flag} == {m.n, m.z, m.c}, "flags");
        @(negedge clk);
      end
      for (int i = 0; i < RAMSIZE; i++) chk(dut.u_ram.mem[i] == m.ram[i], "ram contents");
    end
    done = 1;
  end

endmodule

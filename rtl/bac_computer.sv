// bac_computer: the BAC CPU with its program ROM and data RAM.
//
// An 8-bit accumulator machine with a Harvard memory layout. Each 16-bit
// instruction holds a 6-bit operation code, two addressing-mode bits
// (NLIT = bit 8, INDX = bit 9) and an 8-bit literal. One instruction executes
// per clock cycle:
//   rising edge   the ROM output register takes the word at PC, PC advances
//   high phase    decoder and RAM address settle (literal or X / PG:X)
//   falling edge  the data RAM is read
//   low phase     the ALU computes from the gated operands
//   rising edge   results are written to Acc, X, PG, flags, RAM or PC
// Operand A is Acc, optionally forced to zero and/or inverted. Operand B is
// the literal, the RAM output or the peripheral input 'din', optionally forced
// to zero. Jumps load the ALU output into PC; since the next word is already
// in the ROM register, a normal jump squashes it (one-cycle stall) while a
// delayed jump lets it execute.
//
// With ROMSIZE or RAMSIZE above 256 the 64K extension is generated: the PG
// register (LDPG), PG:X indexed addressing for data, paged program counter
// and long jumps right after LDPG. With both at 256 PG does not exist.
//
// Peripheral interface: 'addr' is the low byte of the RAM address, 'dout' the
// ALU output (Acc for OUT), 'out' a one-cycle write pulse during OUT, 'in' a
// one-cycle read pulse during IN, when 'din' is sampled into Acc at the
// cycle's end. All of this is the design's. Resetting Acc, X, PG and the
// flags is this implementation's addition, for deterministic start-up.
module bac_computer
  import bac_pkg::*;
#(
  parameter int unsigned ROMSIZE  = 256,   // program words, power of two >= 256
  parameter int unsigned RAMSIZE  = 256,   // data bytes, power of two >= 256
  parameter string       ROM_INIT = ""     // optional $readmemh file for the ROM
) (
  input  logic       clk,
  input  logic       reset,    // asynchronous, active high
  input  logic [7:0] din,
  output logic [7:0] addr,
  output logic [7:0] dout,
  output logic       out,
  output logic       in
);

  localparam int unsigned PAW    = $clog2(ROMSIZE);
  localparam int unsigned DAW    = $clog2(RAMSIZE);
  localparam bit          HAS_PG = (PAW > 8) || (DAW > 8);
  localparam int unsigned PGW    = HAS_PG ? ((PAW > DAW ? PAW : DAW) - 8) : 1;

  initial begin
    assert (ROMSIZE >= 256 && (1 << PAW) == ROMSIZE)
      else $error("ROMSIZE must be a power of two, at least 256");
    assert (RAMSIZE >= 256 && (1 << DAW) == RAMSIZE)
      else $error("RAMSIZE must be a power of two, at least 256");
  end

  // ---------------------------------------------------------------- memories
  logic [PAW-1:0] pc;
  logic [15:0]    romout;
  logic [DAW-1:0] aram;
  logic [7:0]     ramout;
  logic [7:0]     aluout;
  bac_ctrl_t      ctrl;

  bac_prog_rom #(.DEPTH(ROMSIZE), .AW(PAW), .INIT_FILE(ROM_INIT)) u_rom (
    .clk, .addr(pc), .q(romout)
  );

  bac_data_ram #(.DEPTH(RAMSIZE), .AW(DAW)) u_ram (
    .clk, .addr(aram), .we(ctrl.wrm), .wdata(aluout), .rdata(ramout)
  );

  // ---------------------------------------------------------------- registers
  logic [7:0]     acc, xreg;
  logic [PGW-1:0] pg;
  logic           c_flag, z_flag, n_flag;
  logic           opvalid;
  logic           alu_co, alu_z, alu_n;

  always_ff @(posedge clk or posedge reset)
    if (reset)         acc <= 8'd0;
    else if (ctrl.wra) acc <= aluout;

  always_ff @(posedge clk or posedge reset)
    if (reset)         xreg <= 8'd0;
    else if (ctrl.wrx) xreg <= aluout;

  if (HAS_PG) begin : g_pg
    always_ff @(posedge clk or posedge reset)
      if (reset)          pg <= '0;
      else if (ctrl.wrpg) pg <= aluout[PGW-1:0];
  end else begin : g_no_pg
    assign pg = '0;
  end

  always_ff @(posedge clk or posedge reset)
    if (reset)         c_flag <= 1'b0;
    else if (ctrl.wrc) c_flag <= alu_co;

  always_ff @(posedge clk or posedge reset)
    if (reset)         {n_flag, z_flag} <= 2'b00;
    else if (ctrl.wrz) {n_flag, z_flag} <= {alu_n, alu_z};

  bac_pc #(.PAW(PAW), .PGW(PGW)) u_pc (
    .clk, .reset, .jmp(ctrl.jmp), .target(aluout), .wrpg(ctrl.wrpg), .pg, .pc
  );

  // ---------------------------------------------------------------- decoder
  bac_decoder #(.HAS_PG(HAS_PG)) u_dec (
    .clk, .reset, .opc(romout[15:10]), .c_flag, .z_flag, .n_flag, .ctrl, .opvalid
  );

  // ---------------------------------------------------------------- datapath
  logic       nlit, indx;
  logic [7:0] lit, alua, alub;

  assign nlit = romout[BIT_NLIT];
  assign indx = romout[BIT_INDX];
  assign lit  = romout[7:0];

  assign alub = ctrl.zb ? 8'd0 : (nlit ? (ctrl.in ? din : ramout) : lit);
  assign alua = (ctrl.za ? 8'd0 : acc) ^ {8{ctrl.ia}};

  if (DAW > 8) begin : g_wide_ram
    assign aram = indx ? {pg[DAW-9:0], xreg} : {{(DAW-8){1'b0}}, lit};
  end else begin : g_zp_ram
    assign aram = indx ? xreg : lit;
  end

  bac_alu u_alu (
    .aop(ctrl.aop), .ror(ctrl.ror), .a(alua), .b(alub), .ci(ctrl.ci),
    .c_flag, .y(aluout), .co(alu_co), .z(alu_z), .n(alu_n)
  );

  // ---------------------------------------------------------------- I/O
  assign dout = aluout;
  assign addr = aram[7:0];
  assign out  = ctrl.out;
  assign in   = ctrl.in;

endmodule

// bac_tb_pkg: testbench helpers for the BAC CPU.
//
// - Operation codes and an instruction encoder, written from the instruction
//   set table (not from the RTL package), used to assemble test programs.
// - bac_model: a cycle-level reference model of the CPU written from the
//   instruction descriptions (Acc = op - Acc, flags, delayed jumps, the
//   synchronous ROM's one-word prefetch, PG and long jumps). It keeps its own
//   copy of program and data memory. step() advances it by one clock cycle.
package bac_tb_pkg;

  // mnemonic opcodes (bits 15:10)
  localparam bit [5:0] NOP = 6'h00, JMP = 6'h02, JMPD = 6'h03, JNC = 6'h04, JNCD = 6'h05,
    JC = 6'h06, JCD = 6'h07, JNZ = 6'h08, JNZD = 6'h09, JZ = 6'h0A, JZD = 6'h0B,
    JPL = 6'h0C, JPLD = 6'h0D, JMI = 6'h0E, JMID = 6'h0F,
    LDA = 6'h10, IN = 6'h11, LDX = 6'h12, LDPG = 6'h13, STA = 6'h14, OUT = 6'h15, TAX = 6'h16,
    ADDA = 6'h20, ADDM = 6'h21, ADCA = 6'h22, ADCM = 6'h23,
    SUBA = 6'h24, SUBM = 6'h25, SBCA = 6'h26, SBCM = 6'h27,
    CMP = 6'h28, TST = 6'h29, ROR = 6'h2A,
    ANDA = 6'h2C, ANDM = 6'h2D, ORA = 6'h2E, ORM = 6'h2F, XORA = 6'h30, XORM = 6'h31,
    INC = 6'h34, INCA = 6'h35, INCX = 6'h36, INCAX = 6'h37,
    DEC = 6'h38, DECA = 6'h39, DECX = 6'h3A, DECAX = 6'h3B;

  // addressing modes, bits {INDX,NLIT}
  localparam bit [1:0] M_LIT = 2'b00, M_DIR = 2'b01, M_IDX = 2'b11;

  function automatic bit [15:0] enc(bit [5:0] opc, bit [1:0] mode, bit [7:0] lit);
    return {opc, mode, lit};
  endfunction

  // list of opcodes the instruction set defines (LDPG only with the extension)
  localparam bit [5:0] DEFINED [48] = '{
    NOP, 6'h01, JMP, JMPD, JNC, JNCD, JC, JCD, JNZ, JNZD, JZ, JZD, JPL, JPLD, JMI, JMID,
    LDA, IN, LDX, LDPG, STA, OUT, TAX, ADDA, ADDM, ADCA, ADCM, SUBA, SUBM, SBCA, SBCM,
    CMP, TST, ROR, ANDA, ANDM, ORA, ORM, XORA, XORM, INC, INCA, INCX, INCAX,
    DEC, DECA, DECX, DECAX};

  // value the testbenches put on the peripheral input bus for an address
  function automatic bit [7:0] din_of(bit [7:0] a);
    return (a * 8'd37) ^ 8'hA5;
  endfunction

  class bac_model;
    int unsigned romsize, ramsize, pagebits, pgmask;
    bit          has_pg;
    bit [15:0]   rom [];
    bit [7:0]    ram [];
    // architectural state
    int unsigned pc;
    bit [15:0]   ir;
    bit          opvalid, ljmp;
    bit [7:0]    acc, x, pg;
    bit          c, z, n;
    // what the last step did
    bit          out_p, in_p, taken, squashed, delayed_taken, long_jump;
    bit [7:0]    io_addr, io_dout;

    function new(int unsigned romsize_i, int unsigned ramsize_i);
      int unsigned paw = $clog2(romsize_i), daw = $clog2(ramsize_i);
      romsize  = romsize_i;
      ramsize  = ramsize_i;
      has_pg   = (paw > 8) || (daw > 8);
      pagebits = ((paw > daw) ? paw : daw) - 8;
      pgmask   = (1 << pagebits) - 1;
      rom      = new[romsize];
      ram      = new[ramsize];
      do_reset();
    endfunction

    function void do_reset();
      pc = 0; opvalid = 0; ljmp = 0; acc = 0; x = 0; pg = 0; c = 0; z = 0; n = 0;
    endfunction

    function void set_nz(bit [7:0] r);
      n = r[7];
      z = (r == 0);
    endfunction

    // one clock cycle: execute the word in ir (if valid), fetch the next one
    function void step();
      bit [5:0]    opc  = ir[15:10];
      bit          indx = ir[9], nlit = ir[8];
      bit [7:0]    lit  = ir[7:0];
      int unsigned maddr;
      bit [7:0]    op, r;
      int          t;
      bit          cond, wrpg;
      out_p = 0; in_p = 0; taken = 0; squashed = !opvalid; delayed_taken = 0; long_jump = 0;
      wrpg  = 0;
      maddr = indx ? ((int'(pg) << 8) | x) % ramsize : lit;
      io_addr = maddr[7:0];
      io_dout = acc;
      op = nlit ? ((opc == IN) ? din_of(io_addr) : ram[maddr]) : lit;
      if (opvalid) begin
        if (opc[5:4] == 2'b00) begin
          case (opc[3:1])
            3'd0: cond = 0;
            3'd1: cond = 1;
            3'd2: cond = !c;
            3'd3: cond = c;
            3'd4: cond = !z;
            3'd5: cond = z;
            3'd6: cond = !n;
            default: cond = n;
          endcase
          taken = cond;
        end else begin
          case (opc)
            LDA:  begin acc = op; set_nz(op); end
            IN:   begin in_p = 1; acc = op; set_nz(op); end
            LDX:  x = op;
            LDPG: if (has_pg) begin pg = op & pgmask; wrpg = 1; end
            STA:  ram[maddr] = acc;
            OUT:  out_p = 1;
            TAX:  x = acc;
            ADDA, ADDM, ADCA, ADCM: begin
              t = int'(op) + int'(acc) + ((opc[1] && c) ? 1 : 0);
              r = t[7:0]; c = t > 255; set_nz(r);
              if (opc[0]) ram[maddr] = r; else acc = r;
            end
            SUBA, SUBM, SBCA, SBCM, CMP: begin
              t = int'(op) - int'(acc) - ((opc[1] && !c) ? 1 : 0);
              r = t[7:0]; c = (t >= 0); set_nz(r);
              if (opc != CMP) begin
                if (opc[0]) ram[maddr] = r; else acc = r;
              end
            end
            TST:  set_nz(op & acc);
            ROR:  begin r = {c, op[7:1]}; c = op[0]; set_nz(r); ram[maddr] = r; end
            ANDA: begin acc = op & acc; set_nz(acc); end
            ANDM: begin r = op & acc; ram[maddr] = r; set_nz(r); end
            ORA:  begin acc = op | acc; set_nz(acc); end
            ORM:  begin r = op | acc; ram[maddr] = r; set_nz(r); end
            XORA: begin acc = op ^ acc; set_nz(acc); end
            XORM: begin r = op ^ acc; ram[maddr] = r; set_nz(r); end
            INC, INCA, INCX, INCAX, DEC, DECA, DECX, DECAX: begin
              r = (opc[3:2] == 2'b01) ? op + 8'd1 : op - 8'd1;
              ram[maddr] = r; set_nz(r);
              if (opc[0]) acc = r;
              if (opc[1]) x = r;
            end
            default: ;
          endcase
        end
      end
      // fetch and program counter
      ir = rom[pc];
      if (taken) begin
        delayed_taken = opc[0];
        long_jump     = ljmp && romsize > 256;
        if (long_jump) pc = ((int'(pg) & ((romsize >> 8) - 1)) << 8) | op;
        else           pc = (pc & ~32'hFF) | op;
      end else begin
        pc = (pc + 1) % romsize;
      end
      opvalid = !taken || opc[0];
      ljmp    = wrpg;
    endfunction
  endclass

endpackage

# BAC: a minimal 8-bit computer for small FPGAs

BAC is an 8-bit CPU designed to be about as small as a useful processor can
be. The target is fewer than 300 logic cells in an iCE40HX FPGA, with program
and data kept in the FPGA's block RAMs. It is an accumulator machine with a
Harvard layout: 16-bit instructions live in a program ROM and bytes in a
separate data RAM. Every instruction takes exactly one clock cycle. There is
no multi-cycle control and no state machine. A 6-bit operation code drives a
table of control signals for one small datapath.

This repository holds synthesizable SystemVerilog for the CPU core and each of
its parts. It also has a small system around the core: a UART and a 3-bit LED
register. Every module has a self-checking testbench.

## Programmer's model

| register | width | role |
|---|---|---|
| PC    | 8 (more with the 64K extension) | program address. Write-only, advances every cycle and is loaded by jumps |
| Acc   | 8 | accumulator: one operand of two-operand instructions, and usually the destination |
| X     | 8 | index register, a pointer into data memory (write-only) |
| C Z N | 1 each | carry, zero, negative |
| PG    | 1..8 | page register. Exists only with the 64K extension |

Instruction format:

```
 15            10   9     8    7              0
+----------------+------+------+----------------+
| operation code | INDX | NLIT |    literal     |
+----------------+------+------+----------------+
```

| INDX,NLIT | mode | operand | memory address |
|---|---|---|---|
| x0 | literal  | bits 7:0 | (X if INDX=1) |
| 01 | direct   | RAM[literal] | literal |
| 11 | indexed  | RAM[X] | X |

Instructions (operation code = bits 15:10, written `bbbb.bb`):

| code | mnemonics | effect | flags |
|---|---|---|---|
| 0000.0x | NOP | nothing | |
| 0000.1d ... 0011.1d | JMP, JNC, JC, JNZ, JZ, JPL, JMI | PC[7:0] = op if the condition holds. Bits 13:11 select never/always/NC/C/NZ/Z/PL/MI. `d` (bit 10) = 1 gives the delayed form (JMPD, JNCD, ...) | |
| 0100.00 / .01 / .10 / .11 | LDA, IN, LDX, LDPG | Acc = op, Acc = input bus, X = op, PG = op | N Z for LDA and IN |
| 0101.00 / .01 / .10 | STA, OUT, TAX | RAM = Acc, output bus = Acc, X = Acc | |
| 1000.0m / 1000.1m | ADD, ADC | dest = op + Acc (+ C) | N Z C |
| 1001.0m / 1001.1m | SUB, SBC | dest = op - Acc (- not C) | N Z C |
| 1010.00 / .01 / .10 | CMP, TST, ROR | flags of op - Acc; flags of op & Acc; RAM = {C, op[7:1]}, C = op[0] | |
| 1011.0m / 1011.1m / 1100.0m | AND, OR, XOR | dest = op (and/or/xor) Acc | N Z |
| 1101.ax | INC, INCA, INCX, INCAX | RAM = op + 1, also copied to Acc (a) and/or X (x) | N Z |
| 1110.ax | DEC, DECA, DECX, DECAX | RAM = op - 1, also copied to Acc (a) and/or X (x) | N Z |

For arithmetic and logic, `m` = 0 writes the result to Acc and `m` = 1
writes it back to the memory operand. Note the order of subtraction:
**Acc is what is subtracted** (`op - Acc`). C = 1 means "no borrow", so after
`CMP op`, C = 1 means op >= Acc. N is bit 7 of the result. IN and OUT put the
low byte of the operand address on the peripheral address bus.

## One instruction per clock: using both clock edges

Both memories are synchronous block RAMs, and an instruction such as
`INC [pos]` must read RAM, add, and write RAM back in one cycle. BAC does this
by using both clock edges. Block RAMs have separate read and write clocks, so
the data RAM's read clock is the inverted CPU clock:

```
           rising edge         falling edge           rising edge
clk   ______/~~~~~~~~~~~~~~~~~~~~\_____________________/~~~~
ROM   word at PC latched --> decoder, RAM address settle
RAM                              read at RAM address --> ALU --> written here
PC    n+1 (fetching the next word)
```

* **Rising edge.** The program ROM registers the word at PC. PC moves on.
  All registers, flags and the RAM take the results of the instruction that
  has just finished.
* **Clock high.** The control signals and the RAM address (literal, X or
  PG:X) settle.
* **Falling edge.** The data RAM is read.
* **Clock low.** The operand passes through the gating and the ALU and must
  reach the RAM data input before the next rising edge.

The low half-cycle holds the long path (RAM read, 8-bit carry chain, RAM
write setup). The high half-cycle only holds the ROM and the address
multiplexer. An asymmetric clock, with less time high than low, therefore
runs faster than a square one.

In the RTL, `bac_prog_rom` reads on `posedge clk` and `bac_data_ram` reads on
`negedge clk` and writes on `posedge clk`. To the rest of the core the RAM
looks like one with asynchronous read.

## Jumps, the prefetched word and `opvalid`

Because the ROM output is registered, the CPU always executes the word that
was fetched one cycle earlier. When a jump executes, PC already points past
the jump, and the word after the jump is already in the ROM register. BAC
handles this with one flip-flop, `opvalid` (`bac_jump_logic`):

* `jmp = cond[op[13:11]] & ~op[15] & ~op[14] & opvalid`. The condition
  multiplexer's inputs are, in order: 0, 1, ~C, C, ~Z, Z, ~N, N.
* On the next edge, `opvalid <= ~jmp | op[10]`.
* While `opvalid` is 0 every write enable and the `in`/`out` pulses are held
  low, so the instruction in the ROM register acts as a NOP.
* Reset clears `opvalid`, because the ROM register holds an unknown word
  after reset.

The result:

| jump | taken | cycles | next word |
|---|---|---|---|
| normal (bit 10 = 0) | yes | 2 | squashed |
| normal | no | 1 | executed |
| delayed (bit 10 = 1) | yes | 1 + the delay slot | **executed**, then the target |

Delayed jumps let a useful instruction sit after the jump. The classic case
is a subroutine return that pops the stack in the delay slot:

```
        LDX  [sp]
        JMPD [X]     ; return
        INC  [sp]    ; still executed
```

They also allow constant tables in program memory. Store each byte as an
`LDA c` instruction and jump into the table with two delayed jumps back to
back:

```
pp1:    JMPD [ptr]   ; to the table entry "LDA c"
        JMPD .+1     ; its delay slot: jump back to the next line
        JZD  done    ; runs after the table's LDA c has loaded Acc
        INC  [ptr]   ; delay slot
```

The end-to-end testbench uses exactly this pattern to print a string.

## Datapath and decoder

The datapath is built around one ALU (`bac_alu`). The ALU adds with carry-in,
ANDs, ORs and XORs. A final multiplexer rotates operand B right through the
carry for ROR. The operands are gated before the ALU:

* A = (Acc, or 0 if `za`) XOR (0xFF if `ia`)
* B = 0 if `zb`, otherwise the literal (NLIT = 0), the RAM output, or the
  input bus during IN

Every instruction is one setting of `aop, za, ia, zb, ci` plus write enables.
These settings come from a combinational table in `bac_decoder`:

| instructions | A | B | ALU | result |
|---|---|---|---|---|
| jumps, LDA, IN, LDX, LDPG | 0 | op | OR | op |
| STA, OUT, TAX | Acc | 0 | OR | Acc |
| ADD / ADC | Acc | op | SUM, ci = 0 / C | op + Acc |
| SUB / SBC / CMP | ~Acc | op | SUM, ci = 1 / C / 1 | op - Acc |
| INC* | 0 | op | SUM, ci = 1 | op + 1 |
| DEC* | 0xFF | op | SUM, ci = 0 | op - 1 |
| AND, TST / OR / XOR | Acc | op | AND / OR / XOR | |
| ROR | - | op | rotate | {C, op[7:1]} |

The ALU output goes to Acc, X, PG, PC (the jump target), the RAM data input
and the peripheral output bus (`dout`). Operation codes the instruction set
does not define decode as NOPs.

## The 64K extension (PG register, pages, long jumps)

`bac_computer` has the parameters `ROMSIZE` and `RAMSIZE`, both 256 by
default. At 256 the core is the original 8-bit-address machine and PG does
not exist. If either size is larger, the following logic is generated:

* **PG register.** Loaded by `LDPG op` (code 0100.11). Its width is the
  larger of the program and data address widths minus 8.
* **Data.** Indexed addressing uses `{PG, X}`. Direct addressing still
  reaches only the first 256 bytes, which act as a "zero page".
* **Program.** PC gets page bits above bit 7. They count on from the low
  byte. An ordinary jump loads only the low byte, so it stays in the current
  page. The page is that of PC, which is already one word past the jump
  instruction. A jump executed in the cycle right after an LDPG is a **long
  jump**: the page bits are copied from PG. A flip-flop (`ljmp` in `bac_pc`)
  remembers that PG was written in the previous cycle.

A far call therefore looks like `LDPG >target` followed directly by
`JMP <target`.

There is a pitfall on the way back. A far return loads PG with the caller's
page and then executes `JMPD [X]`. That jump reads its target from `{PG, X}`,
which is already the caller's page. The saved return address must therefore
be reachable there, so keep the stack in the caller's page (page 0 in the
test program). A jump located at the last word of a page jumps within the
next page, because PC has already moved on when the jump executes.

## The system: UART and LEDs

`bac_system` puts the core on an I/O bus with two peripherals:

| address | read | write |
|---|---|---|
| 0x00 | UART received byte (clears DV, OV) | UART byte to send |
| 0x01 | UART status: bit 0 DV, bit 1 FE, bit 2 OV, bit 7 TRDY | - |
| 0x02 | - | LEDs (3 bits) |
| other | 0 | - |

The UART (`bac_uart`) has a fixed divisor of `CLKS_PER_BIT` = 32 clocks per
bit. It sends 1 start bit, 8 data bits (LSB first) and 2 stop bits, so TRDY
stays low for 352 cycles per byte. Software must poll TRDY. A write while
TRDY is 0 is ignored. The receiver sets DV when a byte has arrived. It sets
OV if a new byte arrives while DV is still set, and FE if a stop bit is
sampled 0.

In an FPGA a PLL would produce the clock. Here `clk` is simply a port.

## Files

| file | content |
|---|---|
| `rtl/bac_pkg.sv` | operation codes, ALU operation enum, decoder control-word struct |
| `rtl/bac_alu.sv` | ALU with the rotate multiplexer |
| `rtl/bac_jump_logic.sv` | condition multiplexer, `jmp`, `opvalid` |
| `rtl/bac_decoder.sv` | jump logic + control table, writes gated by `opvalid` |
| `rtl/bac_pc.sv` | program counter with pages and long jumps |
| `rtl/bac_prog_rom.sv` | synchronous program ROM (optional `$readmemh` file) |
| `rtl/bac_data_ram.sv` | data RAM, read at the falling edge, write at the rising edge |
| `rtl/bac_computer.sv` | the core: registers, operand gating, memories |
| `rtl/bac_uart.sv`, `rtl/bac_led_reg.sv` | peripherals |
| `rtl/bac_system.sv` | top level |
| `tb/bac_tb_pkg.sv` | instruction encoder and a cycle-level reference model of the CPU |
| `tb/bac_core_harness.sv` | random-program comparison of one core against the model |
| `tb/tb_*.sv` | one self-checking testbench per module |

The core's interface is `clk`, `reset` (active high, asynchronous), `din[7:0]`,
`addr[7:0]`, `dout[7:0]`, and the one-cycle pulses `out` and `in`. During OUT,
`dout` holds Acc and a peripheral should latch it at the rising edge that ends
the cycle. During IN, `din` must be valid before that edge.

Program memory is loaded either from a `$readmemh` file (parameter
`ROM_INIT`, one 16-bit hex word per line, `@addr` markers allowed) or, in
simulation, by writing `u_rom.mem[]` hierarchically as the testbenches do.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/bac_pkg.sv tb/bac_tb_pkg.sv \
    rtl/bac_*.sv tb/bac_core_harness.sv tb/tb_bac_computer.sv \
    --top-module tb_bac_computer -o sim
./obj_dir/sim
```

Replace the last testbench file and the top module to run another one.

What the testbenches check:

* **`tb_bac_computer`.** Runs 30 random programs on two cores. One is the
  default 256/256 core. The other has `ROMSIZE=1024, RAMSIZE=512`, which
  enables PG and long jumps. Each core is compared cycle by cycle with the
  reference model in `bac_tb_pkg`: PC, `opvalid`, Acc, X, flags, the
  peripheral pulses, address and data, and finally the whole data RAM. The
  model is written from the instruction descriptions, not from the RTL.
* **`tb_bac_system`.** Full-size, default parameters. It assembles a program
  that prints "Hello" with the table trick above, echoes a received byte plus
  one, and sums 10..1 into the LEDs. It checks the serial output, the LEDs and
  the loop's cycle count: a taken jump costs 2 cycles, a jump not taken 1. It
  also requires that every mechanism happened: squashed slot, delayed jump,
  IN/OUT, indexed writes, TRDY polling.
* **`tb_bac_system_64k`.** Builds the system with `ROMSIZE = 1024` and
  `RAMSIZE = 8192`, which gives a 5-bit PG. It first stores 0xFF at data
  address 0x1234 (PG = 0x12, X = 0x34) and checks that the neighbouring bytes
  and 0x0034 are untouched. It then runs a far call to a routine that straddles a page boundary: long jump
  after LDPG, stack in page 0, long return with LDPG + JMPD [X]. It then fills
  0x100..0x2FF through PG:X and checks every byte, the bytes around the range
  and the restored stack pointer.
* **Unit testbenches.** Each one compares its module against values computed
  in the testbench. This covers edge timing for the memories and the exact
  352-cycle TRDY window for the UART. `tb_bac_prog_rom` also loads the
  small image `tb/bac_rom_example.hex` through `INIT_FILE` (run from the
  repository root, since the path is relative).

## Choices this implementation makes

These points are not fixed by the original description of the machine:

* **Defaults.** Both memory sizes default to 256, so the PG extension is off.
  Sizes must be powers of two of at least 256.
* **Reset.** Reset clears Acc, X, PG, the flags and `ljmp` as well as PC and
  `opvalid`, for deterministic start-up. This costs a few cells.
* **Undefined operation codes** execute as NOPs.
* **Carry out** of AND/OR/XOR is 0. It is never written to C.
* **N flag.** N is bit 7 of the result for every instruction, including CMP.
  So after CMP, N is the sign of `op - Acc`, not an unsigned "less than".
  Use C for unsigned comparisons.
* **FE** is set when the received stop bit is 0.
* **I/O addresses.** The status register is at 1 and the LEDs at 2.
* **UART details.** The receiver's sampling scheme and ignoring writes while
  busy are this design's own.
* **PLL.** None is included.
* **Timing.** The RTL is functionally exact but says nothing about timing
  closure. The two-edge RAM timing needs the low clock phase to cover the
  RAM-to-ALU-to-RAM path.

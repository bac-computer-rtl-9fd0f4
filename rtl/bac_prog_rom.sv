// bac_prog_rom: the BAC program memory, 16-bit words, synchronous read.
//
// Modelled on an FPGA block RAM used as ROM: the word at 'addr' appears on
// 'q' after the rising clock edge, so the CPU always executes the word fetched
// one cycle earlier. The contents come from a $readmemh file named by
// INIT_FILE (empty: no file, contents left to be loaded by other means such as
// a testbench writing 'mem'). A synchronous read and 16-bit words are the
// design's; the INIT_FILE mechanism is this implementation's.
module bac_prog_rom #(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned AW        = 8,
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [15:0]   q
);

  logic [15:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk)
    q <= mem[addr];

endmodule

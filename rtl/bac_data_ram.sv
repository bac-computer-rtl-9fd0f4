// bac_data_ram: the BAC data memory, 8-bit words, read on the falling edge.
//
// An FPGA block RAM with separate read and write clocks, here the inverted
// and the true CPU clock. The address, set up during the high half of the
// cycle, is read at the falling edge; the data to write, computed during the
// low half from what was read, is written at the next rising edge. A
// read-modify-write instruction such as INC [pos] thus completes in one
// cycle, and to the rest of the CPU the memory looks like one with
// asynchronous read. This arrangement is the design's; the port names are
// this implementation's.
module bac_data_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(negedge clk)
    rdata <= mem[addr];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

endmodule

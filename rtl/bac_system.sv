// bac_system: a small BAC computer system with a UART and LEDs.
//
// The BAC core (CPU, program ROM, data RAM) with two peripherals on its 8-bit
// I/O bus, which the program reaches with IN [addr] and OUT [addr]:
//   0x00  UART data   (write: transmit, read: received byte)
//   0x01  UART status (read: bit 0 DV, bit 1 FE, bit 2 OV, bit 7 TRDY)
//   0x02  LED register, 3 bits (write)
// Reads of other addresses return 0. The clock comes straight from the 'clk'
// port; in an FPGA a PLL would produce it. The peripheral set follows the
// design; the addresses of the status and LED registers and the read value of
// unused addresses are this implementation's choices (the UART data register
// at address 0 is the design's).
module bac_system #(
  parameter int unsigned ROMSIZE      = 256,
  parameter int unsigned RAMSIZE      = 256,
  parameter int unsigned CLKS_PER_BIT = 32,
  parameter string       ROM_INIT     = ""
) (
  input  logic       clk,
  input  logic       reset,     // asynchronous, active high
  input  logic       uart_rxd,
  output logic       uart_txd,
  output logic [2:0] leds
);

  localparam logic [7:0] UART_BASE = 8'h00;  // data; status at +1
  localparam logic [7:0] LED_ADDR  = 8'h02;

  logic [7:0] io_addr, io_dout, io_din, uart_rdata;
  logic       io_out, io_in, uart_cs;

  bac_computer #(.ROMSIZE(ROMSIZE), .RAMSIZE(RAMSIZE), .ROM_INIT(ROM_INIT)) u_core (
    .clk, .reset, .din(io_din), .addr(io_addr), .dout(io_dout), .out(io_out), .in(io_in)
  );

  assign uart_cs = (io_addr[7:1] == UART_BASE[7:1]);

  bac_uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .reset, .cs(uart_cs), .reg_sel(io_addr[0]), .wr(io_out), .rd(io_in),
    .wdata(io_dout), .rdata(uart_rdata), .rxd(uart_rxd), .txd(uart_txd)
  );

  bac_led_reg #(.WIDTH(3), .ADDR(LED_ADDR)) u_leds (
    .clk, .reset, .addr(io_addr), .wdata(io_dout), .wr(io_out), .leds
  );

  assign io_din = uart_cs ? uart_rdata : 8'h00;

endmodule

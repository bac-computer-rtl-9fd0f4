// bac_led_reg: a small output register on the BAC I/O bus, shown on LEDs.
//
// When the CPU executes OUT to address ADDR, the low WIDTH bits of the output
// bus are stored at the end of that cycle and drive the LED pins until the
// next such write. Reset (asynchronous, active high) turns all LEDs off. The
// 3-bit width is the design's; the address and the reset value are this
// implementation's choices.
module bac_led_reg #(
  parameter int unsigned WIDTH = 3,
  parameter logic [7:0]  ADDR  = 8'h02
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [7:0]       addr,
  input  logic [7:0]       wdata,
  input  logic             wr,
  output logic [WIDTH-1:0] leds
);

  always_ff @(posedge clk or posedge reset)
    if (reset)                     leds <= '0;
    else if (wr && addr == ADDR)   leds <= wdata[WIDTH-1:0];

endmodule

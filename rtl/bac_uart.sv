// bac_uart: a simple UART peripheral for the BAC I/O bus.
//
// Two registers, selected by 'reg_sel' while 'cs' is high:
//   reg_sel 0  write: byte to transmit      read: last byte received
//   reg_sel 1  read only, status:
//                bit 0 DV   a received byte is waiting
//                bit 1 FE   framing error, the last stop bit was sampled 0
//                bit 2 OV   overrun, a byte arrived while DV was still set
//                bit 7 TRDY transmitter ready
// Reading the data register ('rd' with reg_sel 0) clears DV and OV.
//
// The baud rate is fixed: one bit lasts CLKS_PER_BIT clock cycles. The
// transmitter sends 1 start bit, 8 data bits LSB first and 2 stop bits, so
// TRDY is low for 11 * CLKS_PER_BIT cycles after a write (352 cycles at the
// default 32). A write while TRDY is low is ignored. The receiver
// synchronises 'rxd' with two flip-flops, checks the start bit at its
// middle and samples every bit at its middle. The register map and the
// 11-bit, divide-by-32 frame follow the design; the receiver's sampling
// scheme and ignoring writes while busy are this implementation's choices.
module bac_uart #(
  parameter int unsigned CLKS_PER_BIT = 32
) (
  input  logic       clk,
  input  logic       reset,     // asynchronous, active high
  input  logic       cs,        // this peripheral is addressed
  input  logic       reg_sel,   // 0: data, 1: status
  input  logic       wr,        // write pulse
  input  logic       rd,        // read pulse
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  input  logic       rxd,
  output logic       txd
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // ------------------------------------------------------------ transmitter
  logic [10:0]   tx_shift;
  logic [3:0]    tx_bits;     // bits still to send
  logic [CW-1:0] tx_cnt;
  logic          trdy;

  assign trdy = (tx_bits == 4'd0);

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      tx_shift <= '1;
      tx_bits  <= 4'd0;
      tx_cnt   <= '0;
    end else if (trdy) begin
      if (cs && wr && !reg_sel) begin
        tx_shift <= {2'b11, wdata, 1'b0};
        tx_bits  <= 4'd11;
        tx_cnt   <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (tx_cnt == '0) begin
      tx_shift <= {1'b1, tx_shift[10:1]};
      tx_bits  <= tx_bits - 4'd1;
      tx_cnt   <= CW'(CLKS_PER_BIT - 1);
    end else begin
      tx_cnt   <= tx_cnt - 1'b1;
    end

  assign txd = tx_shift[0];

  // ------------------------------------------------------------ receiver
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e     rx_state;
  logic [1:0]    rx_sync;
  logic [CW-1:0] rx_cnt;
  logic [2:0]    rx_bit;
  logic [7:0]    rx_shift, rx_data;
  logic          dv, fe, ov;
  logic          rd_data;

  assign rd_data = cs && rd && !reg_sel;

  always_ff @(posedge clk or posedge reset)
    if (reset) rx_sync <= 2'b11;
    else       rx_sync <= {rx_sync[0], rxd};

  always_ff @(posedge clk or posedge reset)
    if (reset) begin
      rx_state <= RX_IDLE;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_shift <= '0;
      rx_data  <= '0;
      dv       <= 1'b0;
      fe       <= 1'b0;
      ov       <= 1'b0;
    end else begin
      if (rd_data) begin
        dv <= 1'b0;
        ov <= 1'b0;
      end
      unique case (rx_state)
        RX_IDLE:
          if (!rx_sync[1]) begin
            rx_state <= RX_START;
            rx_cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
          end
        RX_START:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else if (rx_sync[1]) rx_state <= RX_IDLE;     // glitch, not a start bit
          else begin
            rx_state <= RX_DATA;
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
            rx_bit   <= '0;
          end
        RX_DATA:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_shift <= {rx_sync[1], rx_shift[7:1]};
            rx_cnt   <= CW'(CLKS_PER_BIT - 1);
            rx_bit   <= rx_bit + 1'b1;
            if (rx_bit == 3'd7) rx_state <= RX_STOP;
          end
        RX_STOP:
          if (rx_cnt != '0) rx_cnt <= rx_cnt - 1'b1;
          else begin
            rx_state <= RX_IDLE;
            rx_data  <= rx_shift;
            fe       <= ~rx_sync[1];
            dv       <= 1'b1;
            if (dv && !rd_data) ov <= 1'b1;
          end
        default: rx_state <= RX_IDLE;
      endcase
    end

  assign rdata = reg_sel ? {trdy, 4'b0000, ov, fe, dv} : rx_data;

endmodule

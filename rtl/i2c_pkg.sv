// i2c_pkg: register map and shared constants of the AXI4 I2C controller.
//
// The controller is programmed through seven 32-bit registers at byte
// offsets 0x00..0x18 of its AXI4 window. The map and bit assignments are
// this design's own choice:
//   0x00 CTRL       [0] enable  [1] start (write 1 to launch)  [2] rw (1 = read)
//                   [3] flush TX FIFO (write 1)  [4] flush RX FIFO (write 1)
//   0x04 STATUS     [0] busy [1] done* [2] nack* [3] tx_overflow*
//                   [4] tx_full [5] tx_empty [6] rx_full [7] rx_empty
//                   (* sticky, cleared by writing 1)
//   0x08 SLAVE_ADDR [6:0] 7-bit target address
//   0x0C LENGTH     [7:0] number of data bytes in the transfer
//   0x10 PRESCALE   [15:0] SCL period = 4 * (PRESCALE + 1) clocks
//   0x14 TXDATA     write: push [7:0] into the TX FIFO
//   0x18 RXDATA     read: pop one byte from the RX FIFO into [7:0]
package i2c_pkg;

  localparam int unsigned REG_ADDR_W = 8;

  localparam logic [REG_ADDR_W-1:0] REG_CTRL       = 8'h00;
  localparam logic [REG_ADDR_W-1:0] REG_STATUS     = 8'h04;
  localparam logic [REG_ADDR_W-1:0] REG_SLAVE_ADDR = 8'h08;
  localparam logic [REG_ADDR_W-1:0] REG_LENGTH     = 8'h0C;
  localparam logic [REG_ADDR_W-1:0] REG_PRESCALE   = 8'h10;
  localparam logic [REG_ADDR_W-1:0] REG_TXDATA     = 8'h14;
  localparam logic [REG_ADDR_W-1:0] REG_RXDATA     = 8'h18;

  localparam int unsigned CTRL_EN       = 0;
  localparam int unsigned CTRL_START    = 1;
  localparam int unsigned CTRL_RW       = 2;
  localparam int unsigned CTRL_TX_FLUSH = 3;
  localparam int unsigned CTRL_RX_FLUSH = 4;

  // STATUS register, bit 0 is the LSB (last field).
  typedef struct packed {
    logic rx_empty;     // [7]
    logic rx_full;      // [6]
    logic tx_empty;     // [5]
    logic tx_full;      // [4]
    logic tx_overflow;  // [3]
    logic nack;         // [2]
    logic done;         // [1]
    logic busy;         // [0]
  } i2c_status_t;

  localparam int unsigned PRESCALE_W = 16;

endpackage

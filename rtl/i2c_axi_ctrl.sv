// i2c_axi_ctrl: AXI4-attached I2C master controller.
//
// The processor reaches this controller through its AXI4 slave port. Each
// AXI beat becomes a register access (axi4_slave_if); the registers
// (i2c_regs) hold the transfer's slave address, direction, byte count and
// bit-rate prescale, and feed bytes to the TX FIFO or take them from the RX
// FIFO (two i2c_fifo). The control unit (i2c_master_fsm), paced by the
// programmable clock divider (i2c_clk_div), runs START / address / data /
// STOP on the two-wire bus, so the processor only sets up a transfer and
// collects the result. The sensed bus levels pass through a two-flop
// synchroniser (i2c_sync) before the control unit uses them.
//
// Interface: axi_req/axi_rsp form the AXI4 slave port (types in axi4_pkg;
// only the low 8 address bits select a register, map in i2c_pkg). The I2C
// lines are open drain: scl_oe/sda_oe = 1 pull the line low, scl_i/sda_i
// are the sensed levels; the pads and pull-ups are outside. stretch and
// stall are status strobes from the control unit (a tick spent waiting for
// a slave holding SCL low; a clock spent waiting on an empty TX or full RX
// FIFO). Synchronous active-low reset.
//
// The split into AXI4 interface, registers, TX FIFO, RX FIFO and control
// unit follows the design's block diagram; FIFO depth and reset prescale
// are this design's choice.
module i2c_axi_ctrl
  import axi4_pkg::*;
  import i2c_pkg::*;
#(
  parameter int unsigned             FIFO_DEPTH     = 16,
  parameter logic [PRESCALE_W-1:0]   RESET_PRESCALE = 16'd249
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t axi_req,
  output axi_rsp_t axi_rsp,
  input  logic     scl_i,
  input  logic     sda_i,
  output logic     scl_oe,
  output logic     sda_oe,
  output logic     stretch,
  output logic     stall
);

  // register bus
  logic                  reg_wr, reg_rd;
  logic [REG_ADDR_W-1:0] reg_waddr, reg_raddr;
  logic [31:0]           reg_wdata, reg_rdata;
  logic [3:0]            reg_wstrb;

  // control unit
  logic                  fsm_start, fsm_rw, fsm_busy, fsm_done, fsm_nack, clk_en, tick;
  logic [6:0]            fsm_addr;
  logic [7:0]            fsm_len;
  logic [PRESCALE_W-1:0] prescale;

  // FIFOs
  logic                  tx_push, tx_pop, tx_clr, tx_full, tx_empty;
  logic                  rx_push, rx_pop, rx_clr, rx_full, rx_empty;
  logic [7:0]            tx_wdata, tx_rdata, rx_wdata, rx_rdata;
  logic [$clog2(FIFO_DEPTH+1)-1:0] tx_count, rx_count;

  axi4_slave_if #(.REG_ADDR_W(REG_ADDR_W)) u_axi (
    .clk, .rst_n, .axi_req, .axi_rsp,
    .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb,
    .reg_rd, .reg_raddr, .reg_rdata
  );

  i2c_regs #(.RESET_PRESCALE(RESET_PRESCALE)) u_regs (
    .clk, .rst_n,
    .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb,
    .reg_rd, .reg_raddr, .reg_rdata,
    .fsm_start, .fsm_rw, .fsm_addr, .fsm_len, .prescale,
    .fsm_busy, .fsm_done, .fsm_nack,
    .tx_push, .tx_wdata, .tx_clr, .tx_full, .tx_empty,
    .rx_pop, .rx_rdata, .rx_clr, .rx_full, .rx_empty
  );

  i2c_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .clr(tx_clr),
    .push(tx_push), .wdata(tx_wdata), .pop(tx_pop), .rdata(tx_rdata),
    .full(tx_full), .empty(tx_empty), .count(tx_count)
  );

  i2c_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .clr(rx_clr),
    .push(rx_push), .wdata(rx_wdata), .pop(rx_pop), .rdata(rx_rdata),
    .full(rx_full), .empty(rx_empty), .count(rx_count)
  );

  i2c_clk_div #(.PRESCALE_W(PRESCALE_W)) u_clk_div (
    .clk, .rst_n, .en(clk_en), .prescale, .tick
  );

  // Bus lines into the clock domain.
  logic scl_s, sda_s;
  i2c_sync #(.WIDTH(2), .STAGES(2)) u_sync (
    .clk, .rst_n, .d({scl_i, sda_i}), .q({scl_s, sda_s})
  );

  i2c_master_fsm u_fsm (
    .clk, .rst_n, .tick,
    .start(fsm_start), .rw(fsm_rw), .slave_addr(fsm_addr), .length(fsm_len),
    .tx_data(tx_rdata), .tx_empty, .tx_pop,
    .rx_full, .rx_data(rx_wdata), .rx_push,
    .scl_i(scl_s), .sda_i(sda_s), .scl_oe, .sda_oe,
    .busy(fsm_busy), .clk_en, .done(fsm_done), .nack(fsm_nack),
    .stretch, .stall
  );

endmodule

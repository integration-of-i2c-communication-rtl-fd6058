// i2c_regs: memory-mapped registers of the I2C controller.
//
// Software programs a transfer by writing SLAVE_ADDR, LENGTH and (for a
// write) the data bytes to TXDATA, then writing CTRL with enable, rw and
// start set. It then polls STATUS until done and, for a read, pops the
// received bytes from RXDATA. The register map is listed in i2c_pkg.
//
// Interface and timing: a simple register bus, driven by the AXI4 slave
// port. reg_wr writes reg_wdata (byte lanes in reg_wstrb) at reg_waddr on
// the clock edge. reg_rd with reg_raddr returns reg_rdata in the same
// clock; a read of RXDATA pops the RX FIFO at the end of that clock (an
// empty FIFO reads as 0 and is not popped). A write of TXDATA pushes the TX
// FIFO in the same clock; a push into a full FIFO is dropped and sets the
// sticky tx_overflow flag. Writing CTRL with start=1 and enable=1 while the
// control unit is idle gives a one-clock fsm_start pulse on the next clock.
// done, nack and tx_overflow in STATUS are sticky and cleared by writing 1.
//
// That the processor drives the controller through memory-mapped control
// and status registers is from the design description; the map, the flag
// behaviour and the reset values are this design's choice. RESET_PRESCALE
// 249 gives 100 kbit/s from a 100 MHz clock.
module i2c_regs
  import i2c_pkg::*;
#(
  parameter logic [PRESCALE_W-1:0] RESET_PRESCALE = 16'd249
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // register bus
  input  logic                  reg_wr,
  input  logic [REG_ADDR_W-1:0] reg_waddr,
  input  logic [31:0]           reg_wdata,
  input  logic [3:0]            reg_wstrb,
  input  logic                  reg_rd,
  input  logic [REG_ADDR_W-1:0] reg_raddr,
  output logic [31:0]           reg_rdata,
  // control unit
  output logic                  fsm_start,
  output logic                  fsm_rw,
  output logic [6:0]            fsm_addr,
  output logic [7:0]            fsm_len,
  output logic [PRESCALE_W-1:0] prescale,
  input  logic                  fsm_busy,
  input  logic                  fsm_done,
  input  logic                  fsm_nack,
  // TX FIFO write side
  output logic                  tx_push,
  output logic [7:0]            tx_wdata,
  output logic                  tx_clr,
  input  logic                  tx_full,
  input  logic                  tx_empty,
  // RX FIFO read side
  output logic                  rx_pop,
  input  logic [7:0]            rx_rdata,
  output logic                  rx_clr,
  input  logic                  rx_full,
  input  logic                  rx_empty
);

  logic        ctrl_en, ctrl_rw;
  logic        done_q, nack_q, ovf_q;
  logic        start_q;
  i2c_status_t status;

  logic wr_ctrl, wr_status, wr_tx;
  assign wr_ctrl   = reg_wr && reg_waddr == REG_CTRL   && reg_wstrb[0];
  assign wr_status = reg_wr && reg_waddr == REG_STATUS && reg_wstrb[0];
  assign wr_tx     = reg_wr && reg_waddr == REG_TXDATA && reg_wstrb[0];

  assign tx_push  = wr_tx && !tx_full;
  assign tx_wdata = reg_wdata[7:0];
  assign tx_clr   = wr_ctrl && reg_wdata[CTRL_TX_FLUSH];
  assign rx_clr   = wr_ctrl && reg_wdata[CTRL_RX_FLUSH];
  assign rx_pop   = reg_rd && reg_raddr == REG_RXDATA && !rx_empty;

  assign fsm_start = start_q;
  assign fsm_rw    = ctrl_rw;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl_en  <= 1'b0;
      ctrl_rw  <= 1'b0;
      fsm_addr <= '0;
      fsm_len  <= '0;
      prescale <= RESET_PRESCALE;
      done_q   <= 1'b0;
      nack_q   <= 1'b0;
      ovf_q    <= 1'b0;
      start_q  <= 1'b0;
    end else begin
      start_q <= 1'b0;
      if (wr_ctrl) begin
        ctrl_en <= reg_wdata[CTRL_EN];
        ctrl_rw <= reg_wdata[CTRL_RW];
        start_q <= reg_wdata[CTRL_START] && reg_wdata[CTRL_EN] && !fsm_busy && !start_q;
      end
      if (reg_wr && reg_waddr == REG_SLAVE_ADDR && reg_wstrb[0]) fsm_addr <= reg_wdata[6:0];
      if (reg_wr && reg_waddr == REG_LENGTH && reg_wstrb[0])     fsm_len  <= reg_wdata[7:0];
      if (reg_wr && reg_waddr == REG_PRESCALE) begin
        if (reg_wstrb[0]) prescale[7:0]  <= reg_wdata[7:0];
        if (reg_wstrb[1]) prescale[15:8] <= reg_wdata[15:8];
      end
      // Sticky flags: a new event wins over a clear in the same clock.
      done_q <= fsm_done || (done_q && !(wr_status && reg_wdata[1]));
      nack_q <= fsm_nack || (nack_q && !(wr_status && reg_wdata[2]));
      ovf_q  <= (wr_tx && tx_full) || (ovf_q && !(wr_status && reg_wdata[3]));
    end
  end

  always_comb begin
    status = '{busy: fsm_busy || start_q, done: done_q, nack: nack_q,
               tx_overflow: ovf_q, tx_full: tx_full, tx_empty: tx_empty,
               rx_full: rx_full, rx_empty: rx_empty};
    unique case (reg_raddr)
      REG_CTRL:       reg_rdata = 32'({ctrl_rw, 1'b0, ctrl_en});
      REG_STATUS:     reg_rdata = 32'(status);
      REG_SLAVE_ADDR: reg_rdata = 32'(fsm_addr);
      REG_LENGTH:     reg_rdata = 32'(fsm_len);
      REG_PRESCALE:   reg_rdata = 32'(prescale);
      REG_RXDATA:     reg_rdata = rx_empty ? 32'd0 : 32'(rx_rdata);
      default:        reg_rdata = 32'd0;
    endcase
  end

endmodule

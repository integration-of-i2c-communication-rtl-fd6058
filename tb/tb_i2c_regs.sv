// tb_i2c_regs: register block of the I2C controller, driven directly on its
// register bus. Checks reset values, read-back masks, byte strobes, the
// start pulse and its guards (enable, busy), TX push and overflow flag, RX
// pop, sticky done/nack flags with write-1-to-clear, FIFO status bits and
// the flush strobes.
module tb_i2c_regs;
  import i2c_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_wr = 0, reg_rd = 0;
  logic [7:0] reg_waddr = 0, reg_raddr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [3:0] reg_wstrb = 0;
  logic fsm_start, fsm_rw;
  logic [6:0] fsm_addr;
  logic [7:0] fsm_len;
  logic [15:0] prescale;
  logic fsm_busy = 0, fsm_done = 0, fsm_nack = 0;
  logic tx_push, tx_clr, tx_full = 0, tx_empty = 1;
  logic [7:0] tx_wdata;
  logic rx_pop, rx_clr, rx_full = 0, rx_empty = 1;
  logic [7:0] rx_rdata = 0;
  int checks = 0, failures = 0;
  int n_start = 0;

  i2c_regs dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (fsm_start) n_start++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write one register; returns with the write done (after the edge).
  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    reg_wr = 1; reg_waddr = a; reg_wdata = d; reg_wstrb = s;
    @(negedge clk);
    reg_wr = 0;
  endtask

  // Read one register (combinational read, sampled mid-cycle).
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_rd = 1; reg_raddr = a;
    #1 d = reg_rdata;
    @(negedge clk);
    reg_rd = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;

    rd(REG_PRESCALE, d);   check(d == 249, "PRESCALE reset value 249");
    rd(REG_CTRL, d);       check(d == 0, "CTRL reset value");
    rd(REG_STATUS, d);     check(d == 32'hA0, $sformatf("STATUS after reset %h", d));

    wr(REG_SLAVE_ADDR, 32'h1D5);
    rd(REG_SLAVE_ADDR, d); check(d == 32'h55 && fsm_addr == 7'h55, "SLAVE_ADDR 7 bits");
    wr(REG_LENGTH, 32'h1234);
    rd(REG_LENGTH, d);     check(d == 32'h34 && fsm_len == 8'h34, "LENGTH 8 bits");
    wr(REG_PRESCALE, 32'h0000_ABCD, 4'b0001);
    rd(REG_PRESCALE, d);   check(d == 32'h00CD, "PRESCALE low byte strobe");
    wr(REG_PRESCALE, 32'h0000_1200, 4'b0010);
    check(prescale == 16'h12CD, "PRESCALE high byte strobe");

    // TX push in the write clock.
    @(negedge clk);
    reg_wr = 1; reg_waddr = REG_TXDATA; reg_wdata = 32'hEE5A; reg_wstrb = 4'hF;
    #1 check(tx_push && tx_wdata == 8'h5A, "TXDATA push");
    @(negedge clk); reg_wr = 0;
    #1 check(!tx_push, "push only during write");
    // Overflow when full.
    tx_full = 1;
    @(negedge clk);
    reg_wr = 1; reg_waddr = REG_TXDATA; reg_wdata = 32'h77;
    #1 check(!tx_push, "no push while TX FIFO full");
    @(negedge clk); reg_wr = 0;
    rd(REG_STATUS, d);     check(d[3] && d[4], "tx_overflow and tx_full set");
    tx_full = 0;
    wr(REG_STATUS, 32'h8);
    rd(REG_STATUS, d);     check(!d[3], "tx_overflow cleared by W1C");

    // Start pulse: needs enable; one clock; rw follows CTRL.
    n_start = 0;
    wr(REG_CTRL, 32'h2);   // start without enable
    repeat (2) @(negedge clk);
    check(n_start == 0, "start ignored while disabled");
    wr(REG_CTRL, 32'h7);   // enable, start, read
    repeat (2) @(negedge clk);
    check(n_start == 1 && fsm_rw, "one start pulse with rw=1");
    fsm_busy = 1;
    wr(REG_CTRL, 32'h3);
    repeat (2) @(negedge clk);
    check(n_start == 1, "start ignored while busy");
    check(!fsm_rw, "rw follows CTRL write");
    rd(REG_CTRL, d);       check(d == 32'h1, "CTRL read back (start reads 0)");
    rd(REG_STATUS, d);     check(d[0], "busy in STATUS");

    // done / nack sticky.
    @(negedge clk); fsm_done = 1; fsm_nack = 1; fsm_busy = 0;
    @(negedge clk); fsm_done = 0; fsm_nack = 0;
    repeat (3) @(negedge clk);
    rd(REG_STATUS, d);     check(d[1] && d[2] && !d[0], "done and nack sticky");
    wr(REG_STATUS, 32'h2);
    rd(REG_STATUS, d);     check(!d[1] && d[2], "done cleared alone");
    wr(REG_STATUS, 32'h4);
    rd(REG_STATUS, d);     check(!d[2], "nack cleared");

    // RX pop.
    rx_empty = 0; rx_rdata = 8'hC7; rx_full = 1; tx_empty = 0;
    rd(REG_STATUS, d);     check(d[7:4] == 4'b0100, "FIFO flags in STATUS");
    @(negedge clk);
    reg_rd = 1; reg_raddr = REG_RXDATA;
    #1 check(rx_pop && reg_rdata == 32'hC7, "RXDATA read pops");
    @(negedge clk); reg_rd = 0;
    rx_empty = 1;
    @(negedge clk);
    reg_rd = 1; reg_raddr = REG_RXDATA;
    #1 check(!rx_pop && reg_rdata == 0, "empty RX reads 0 without pop");
    @(negedge clk); reg_rd = 0;

    // Flush strobes.
    @(negedge clk);
    reg_wr = 1; reg_waddr = REG_CTRL; reg_wdata = 32'h18; reg_wstrb = 4'hF;
    #1 check(tx_clr && rx_clr, "flush strobes");
    @(negedge clk); reg_wr = 0;
    #1 check(!tx_clr && !rx_clr, "flush strobes end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

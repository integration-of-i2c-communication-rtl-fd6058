// tb_i2c_master_fsm: the I2C control unit against a behavioural I2C slave.
// The testbench makes its own quarter-bit tick (every P+1 clocks) and plays
// both FIFOs with queues. Checked: written bytes arrive in the slave,
// read bytes match the slave's memory, address NACK and data NACK end the
// transfer with STOP and a nack pulse, a length-0 probe, clock stretching,
// waiting on an empty TX / full RX FIFO, the exact number of ticks a
// transfer takes (8 + 36 per byte incl. the address byte) and the SCL
// period of 4 ticks.
module tb_i2c_master_fsm;
  localparam int P = 3;
  logic clk = 0, rst_n = 0, tick = 0;
  logic start = 0, rw = 0;
  logic [6:0] slave_addr = 0;
  logic [7:0] length = 0;
  logic [7:0] tx_data;
  logic tx_empty, tx_pop, rx_full = 0, rx_push;
  logic [7:0] rx_data;
  logic scl_oe, sda_oe, busy, clk_en, done, nack, stretch, stall;
  logic s_scl_oe, s_sda_oe, scl, sda;
  int unsigned stretch_cycles = 0;
  logic nack_data = 0;

  int checks = 0, failures = 0;
  logic [7:0] txq[$], rxq[$];
  int tick_cnt, n_stretch, n_stall, n_nack, n_done, n_pops;
  int last_rise, min_period, max_period;

  assign scl = !(scl_oe || s_scl_oe);
  assign sda = !(sda_oe || s_sda_oe);
  assign tx_data  = (txq.size() != 0) ? txq[0] : 8'h00;
  assign tx_empty = (txq.size() == 0);

  i2c_master_fsm dut (
    .clk, .rst_n, .tick, .start, .rw, .slave_addr, .length,
    .tx_data, .tx_empty, .tx_pop, .rx_full, .rx_data, .rx_push,
    .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe,
    .busy, .clk_en, .done, .nack, .stretch, .stall
  );

  i2c_slave_model #(.ADDR(7'h50)) slave (
    .clk, .scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe),
    .stretch_cycles, .nack_data
  );

  always #5 clk = ~clk;

  // Quarter-bit tick, free running.
  int tdiv = 0;
  always @(posedge clk) begin
    tdiv <= (tdiv == P) ? 0 : tdiv + 1;
    tick <= (tdiv == P);
  end

  int cyc = 0;
  logic scl_q = 1;
  bit pop_pend = 0;
  // Monitors sample in mid-cycle, where every DUT output is settled.
  always @(negedge clk) begin
    cyc <= cyc + 1;
    scl_q <= scl;
    if (tick && busy) tick_cnt++;
    if (stretch) n_stretch++;
    if (stall) n_stall++;
    if (nack) n_nack++;
    if (done) n_done++;
    // A pop seen now is taken by the DUT at the next rising edge; the
    // queue head is removed after that edge.
    if (pop_pend) begin void'(txq.pop_front()); n_pops++; end
    pop_pend = tx_pop;
    if (rx_push) rxq.push_back(rx_data);
    if (scl && !scl_q) begin
      if (last_rise >= 0) begin
        if (cyc - last_rise < min_period) min_period = cyc - last_rise;
        if (cyc - last_rise > max_period) max_period = cyc - last_rise;
      end
      last_rise = cyc;
    end
    if (!busy) last_rise = -1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Launch a transfer and wait for done; returns ticks used.
  task automatic xfer(input logic r, input logic [6:0] a, input logic [7:0] n,
                      output int ticks);
    @(negedge clk);
    rw = r; slave_addr = a; length = n; start = 1;
    tick_cnt = 0; min_period = 1 << 30; max_period = 0;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    ticks = tick_cnt;
    repeat (3) @(negedge clk);
    check(!busy && scl && sda, "bus released after transfer");
  endtask

  initial begin
    int t, n0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(scl && sda && !busy, "idle bus after reset");

    // 1. Write pointer 0x10 and three bytes.
    txq = {8'h10, 8'h11, 8'h22, 8'h33};
    n_nack = 0; n_done = 0;
    xfer(0, 7'h50, 4, t);
    check(slave.mem[8'h10] == 8'h11 && slave.mem[8'h11] == 8'h22 &&
          slave.mem[8'h12] == 8'h33, "write data in slave");
    check(t == 8 + 36 * 5, $sformatf("write ticks %0d expected %0d", t, 8 + 36 * 5));
    check(min_period == 4 * (P + 1) && max_period == 4 * (P + 1),
          $sformatf("SCL period %0d..%0d expected %0d", min_period, max_period, 4 * (P + 1)));
    check(n_nack == 0 && n_done == 1, "write: one done, no nack");
    check(txq.size() == 0 && n_pops == 4, "write: TX queue drained");
    check(slave.n_start == 1 && slave.n_stop == 1, "START and STOP seen by slave");

    // 2. Set pointer 0x20, then read 3 bytes.
    txq = {8'h20};
    xfer(0, 7'h50, 1, t);
    rxq = {};
    xfer(1, 7'h50, 3, t);
    check(rxq.size() == 3, "read: three bytes pushed");
    for (int i = 0; i < 3; i++)
      check(rxq.size() > i && rxq[i] == (8'(8'h20 + i) ^ 8'hA5), $sformatf("read byte %0d", i));
    check(t == 8 + 36 * 4, $sformatf("read ticks %0d", t));
    check(slave.n_rd_bytes == 3, "slave sent 3 bytes (master NACKed the last)");

    // 3. Address NACK: wrong address, TX bytes must stay.
    txq = {8'h01, 8'h02};
    n_nack = 0; n_pops = 0;
    xfer(0, 7'h51, 2, t);
    check(n_nack == 1, "address NACK reported");
    check(n_pops == 0 && txq.size() == 2, "no byte taken after address NACK");
    check(t == 8 + 36, "address NACK ends after the address byte");
    txq = {};

    // 4. Data NACK from the slave.
    nack_data = 1; n_nack = 0; n_pops = 0;
    txq = {8'h05, 8'h06, 8'h07};
    xfer(0, 7'h50, 3, t);
    check(n_nack == 1 && n_pops == 1, "data NACK stops after first byte");
    nack_data = 0; txq = {};

    // 5. Length-0 probe.
    n_nack = 0;
    xfer(1, 7'h50, 0, t);
    check(n_nack == 0 && t == 8 + 36, "probe: address only, acknowledged");

    // 6. Clock stretching by the slave.
    stretch_cycles = 57; n_stretch = 0;
    txq = {8'h40, 8'hC3, 8'h3C};
    xfer(0, 7'h50, 3, t);
    check(n_stretch > 0, "clock stretching observed");
    check(t > 8 + 36 * 4, "stretching lengthens the transfer");
    check(slave.mem[8'h40] == 8'hC3 && slave.mem[8'h41] == 8'h3C, "data correct with stretching");
    stretch_cycles = 0;

    // 7. TX FIFO runs empty mid-transfer: master waits with SCL low.
    n_stall = 0;
    txq = {8'h50, 8'h9A};
    fork
      xfer(0, 7'h50, 4, t);
      begin
        while (n_stall < 200) @(negedge clk);
        check(!scl, "SCL held low while waiting for TX data");
        txq.push_back(8'hBC); txq.push_back(8'hDE);
      end
    join
    check(n_stall >= 200, "TX stall observed");
    check(slave.mem[8'h50] == 8'h9A && slave.mem[8'h51] == 8'hBC && slave.mem[8'h52] == 8'hDE,
          "data correct after TX stall");

    // 8. RX FIFO full mid-read: master waits until there is room.
    txq = {8'h50};
    xfer(0, 7'h50, 1, t);
    rxq = {}; n_stall = 0;
    fork
      xfer(1, 7'h50, 3, t);
      begin
        while (rxq.size() < 1) @(negedge clk);
        rx_full = 1;
        repeat (300) @(negedge clk);
        rx_full = 0;
      end
    join
    check(n_stall > 0, "RX stall observed");
    check(rxq.size() == 3 && rxq[0] == 8'h9A && rxq[1] == 8'hBC && rxq[2] == 8'hDE,
          "data correct after RX stall");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

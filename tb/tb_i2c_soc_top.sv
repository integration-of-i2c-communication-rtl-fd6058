// tb_i2c_soc_top: end-to-end test of the I2C subsystem at its default
// parameters. A testbench AXI4 master plays the processor; two behavioural
// I2C slaves (addresses 0x50 and 0x68) share the open-drain bus; a
// register-array AXI4 slave sits on the second interconnect port.
//
// Software-style sequences program the controller at 0x4000_0000 and check
// the data on both sides. Each mechanism of the design is counted and must
// occur at least once: write and read transfers, two devices addressed,
// address NACK, data NACK, clock stretching, waits on an empty TX FIFO and
// a full RX FIFO, TX overflow and flush, the three bus rates (SCL period
// 4*(PRESCALE+1) clocks: 1000, 252 and 100 clocks, i.e. 100 kbit/s,
// ~400 kbit/s and 1 Mbit/s at 100 MHz), FIXED and INCR bursts, AXI
// back-pressure, routing to the second port and DECERR for an unmapped
// address.
module tb_i2c_soc_top;
  import axi4_pkg::*;
  import i2c_pkg::*;
  localparam logic [31:0] I2C = 32'h4000_0000;
  localparam logic [31:0] MEM = 32'h8000_0000;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  axi_req_t cpu_req, mem_req;
  axi_rsp_t cpu_rsp, mem_rsp;
  logic scl_oe, sda_oe, scl, sda;
  logic s0_scl_oe, s0_sda_oe, s1_scl_oe, s1_sda_oe;
  int unsigned stretch_cycles = 0;
  logic nack_data = 0;
  int checks = 0, failures = 0;

  assign scl = !(scl_oe || s0_scl_oe || s1_scl_oe);
  assign sda = !(sda_oe || s0_sda_oe || s1_sda_oe);

  i2c_soc_top dut (
    .clk, .rst_n, .cpu_req, .cpu_rsp, .mem_req, .mem_rsp,
    .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe
  );
  axi4_master_bfm cpu (.clk, .req(cpu_req), .rsp(cpu_rsp));
  i2c_slave_model #(.ADDR(7'h50)) eeprom (
    .clk, .scl, .sda, .scl_oe(s0_scl_oe), .sda_oe(s0_sda_oe), .stretch_cycles, .nack_data);
  i2c_slave_model #(.ADDR(7'h68)) rtc (
    .clk, .scl, .sda, .scl_oe(s1_scl_oe), .sda_oe(s1_sda_oe),
    .stretch_cycles(0), .nack_data(1'b0));

  // Memory on the second interconnect port.
  logic [31:0] mem [64];
  logic m_wr, m_rd;
  logic [7:0] m_waddr, m_raddr;
  logic [31:0] m_wdata, m_rdata;
  logic [3:0] m_wstrb;
  axi4_slave_if #(.REG_ADDR_W(8)) mem_port (
    .clk, .rst_n, .axi_req(mem_req), .axi_rsp(mem_rsp),
    .reg_wr(m_wr), .reg_waddr(m_waddr), .reg_wdata(m_wdata), .reg_wstrb(m_wstrb),
    .reg_rd(m_rd), .reg_raddr(m_raddr), .reg_rdata(m_rdata));
  assign m_rdata = mem[m_raddr[7:2]];
  always @(posedge clk) if (m_wr) mem[m_waddr[7:2]] <= m_wdata;

  always #5 clk = ~clk;

  // Monitors.
  typedef enum int {
    M_WRITE, M_READ, M_TWO_DEVICES, M_ADDR_NACK, M_DATA_NACK, M_STRETCH,
    M_TX_STALL, M_RX_STALL, M_TX_OVERFLOW, M_RATE_100K, M_RATE_400K, M_RATE_1M,
    M_FIXED_BURST, M_INCR_BURST, M_BACKPRESSURE, M_MEM_PORT, M_DECERR, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"write transfer", "read transfer", "two devices",
    "address NACK", "data NACK", "clock stretching", "TX FIFO empty wait",
    "RX FIFO full wait", "TX overflow", "100 kbit/s", "400 kbit/s", "1 Mbit/s",
    "FIXED burst", "INCR burst", "AXI back-pressure", "second port", "DECERR"};

  // Bus observers only: stretching is SCL low while the master has let it
  // go; a FIFO wait is the master holding SCL low far longer than a bit.
  int cyc = 0, last_rise = -1, min_p, max_p, low_run = 0, phase = 0;
  logic scl_q = 1;
  always @(negedge clk) begin
    cyc++;
    scl_q <= scl;
    if (!scl_oe && !scl) mech[M_STRETCH]++;
    low_run = (scl_oe && !scl) ? low_run + 1 : 0;
    if (low_run > 200 && phase == 1) mech[M_TX_STALL]++;
    if (low_run > 200 && phase == 2) mech[M_RX_STALL]++;
    if (scl && !scl_q) begin
      if (last_rise >= 0) begin
        if (cyc - last_rise < min_p) min_p = cyc - last_rise;
        if (cyc - last_rise > max_p) max_p = cyc - last_rise;
      end
      last_rise = cyc;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    axi_resp_e r;
    cpu.wr32(I2C | 32'(a), d, r);
    check(r == RESP_OKAY, "register write OKAY");
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    axi_resp_e r;
    cpu.rd32(I2C | 32'(a), d, r);
  endtask
  task automatic push(input logic [31:0] bytes[$]);
    axi_resp_e r;
    cpu.write_burst(I2C | 32'(REG_TXDATA), bytes, BURST_FIXED, r);
    mech[M_FIXED_BURST]++;
  endtask
  // Start a transfer and wait until STATUS.done; returns STATUS, flags cleared.
  task automatic run(input logic [6:0] a, input bit rd_not_wr, input int n,
                     output logic [31:0] st);
    wr(REG_SLAVE_ADDR, 32'(a));
    wr(REG_LENGTH, 32'(n));
    min_p = 1 << 30; max_p = 0; last_rise = -1;
    wr(REG_CTRL, rd_not_wr ? 32'h7 : 32'h3);
    do rd(REG_STATUS, st); while (!st[1]);
    wr(REG_STATUS, 32'h6);
  endtask
  task automatic pop(input int n, output logic [31:0] q[$]);
    axi_resp_e r;
    bit l;
    cpu.read_burst(I2C | 32'(REG_RXDATA), n, BURST_FIXED, q, r, l);
    mech[M_FIXED_BURST]++;
    check(l && r == RESP_OKAY, "RXDATA burst RLAST/OKAY");
  endtask

  initial begin
    logic [31:0] st, d, q[$];
    axi_resp_e r;
    bit l;
    repeat (5) @(negedge clk);
    rst_n = 1;

    // --- Standard mode (reset prescale): write two bytes to the EEPROM.
    rd(REG_PRESCALE, d);
    check(d == 249, "reset PRESCALE 249");
    push('{32'h10, 32'hDE, 32'hAD});
    run(7'h50, 0, 3, st);
    check(!st[2], "write acknowledged");
    check(eeprom.mem[8'h10] == 8'hDE && eeprom.mem[8'h11] == 8'hAD, "EEPROM written");
    check(min_p == 1000 && max_p == 1000, $sformatf("100 kbit/s SCL period %0d..%0d", min_p, max_p));
    if (min_p == 1000) mech[M_RATE_100K]++;
    mech[M_WRITE]++;

    // --- Fast mode: set pointer and read back.
    wr(REG_PRESCALE, 32'd62);
    push('{32'h10});
    run(7'h50, 0, 1, st);
    run(7'h50, 1, 2, st);
    check(min_p == 252 && max_p == 252, $sformatf("400 kbit/s SCL period %0d..%0d", min_p, max_p));
    if (min_p == 252) mech[M_RATE_400K]++;
    pop(2, q);
    check(q.size() == 2 && q[0] == 32'hDE && q[1] == 32'hAD, "read back from EEPROM");
    mech[M_READ]++;

    // --- Fast-mode Plus: second device, an RTC at 0x68.
    wr(REG_PRESCALE, 32'd24);
    push('{32'h03, 32'h59});
    run(7'h68, 0, 2, st);
    check(!st[2] && rtc.mem[8'h03] == 8'h59 && eeprom.mem[8'h03] == (8'h03 ^ 8'hA5),
          "RTC written, EEPROM untouched");
    check(min_p == 100 && max_p == 100, $sformatf("1 Mbit/s SCL period %0d..%0d", min_p, max_p));
    if (min_p == 100) mech[M_RATE_1M]++;
    push('{32'h03});
    run(7'h68, 0, 1, st);
    run(7'h68, 1, 1, st);
    pop(1, q);
    check(q.size() == 1 && q[0] == 32'h59, "RTC read back");
    if (q.size() == 1 && q[0] == 32'h59) mech[M_TWO_DEVICES]++;

    // --- Address NACK: nobody at 0x2A.
    run(7'h2A, 0, 0, st);
    check(st[2], "NACK for absent device");
    if (st[2]) mech[M_ADDR_NACK]++;

    // --- Data NACK.
    nack_data = 1;
    push('{32'h20, 32'h21});
    run(7'h50, 0, 2, st);
    check(st[2], "NACK for refused data");
    if (st[2]) mech[M_DATA_NACK]++;
    nack_data = 0;
    wr(REG_CTRL, 32'h8);   // flush the unsent byte

    // --- Clock stretching by the EEPROM.
    stretch_cycles = 333;
    push('{32'h40, 32'h12, 32'h34, 32'h56});
    run(7'h50, 0, 4, st);
    check(!st[2] && eeprom.mem[8'h40] == 8'h12 && eeprom.mem[8'h41] == 8'h34 &&
          eeprom.mem[8'h42] == 8'h56, "write with clock stretching");
    check(mech[M_STRETCH] > 0, "stretching seen");
    stretch_cycles = 0;

    // --- TX FIFO runs dry: 5-byte write with only 2 bytes queued.
    push('{32'h50, 32'hA1});
    wr(REG_SLAVE_ADDR, 32'h50);
    wr(REG_LENGTH, 32'd5);
    phase = 1;
    wr(REG_CTRL, 32'h3);
    while (mech[M_TX_STALL] < 500) @(negedge clk);
    phase = 0;
    push('{32'hA2, 32'hA3, 32'hA4});
    do rd(REG_STATUS, st); while (!st[1]);
    wr(REG_STATUS, 32'h6);
    check(eeprom.mem[8'h50] == 8'hA1 && eeprom.mem[8'h51] == 8'hA2 &&
          eeprom.mem[8'h52] == 8'hA3 && eeprom.mem[8'h53] == 8'hA4, "write across TX wait");

    // --- RX FIFO fills: read 20 bytes with a 16-entry FIFO.
    push('{32'h00});
    run(7'h50, 0, 1, st);
    wr(REG_LENGTH, 32'd20);
    phase = 2;
    wr(REG_CTRL, 32'h7);
    while (mech[M_RX_STALL] < 200) @(negedge clk);
    phase = 0;
    rd(REG_STATUS, st);
    check(st[6], "RX FIFO full while waiting");
    pop(DEPTH, q);
    for (int i = 0; i < DEPTH; i++)
      check(q.size() > i && q[i][7:0] == eeprom.mem[8'(i)], $sformatf("RX byte %0d", i));
    do rd(REG_STATUS, st); while (!st[1]);
    wr(REG_STATUS, 32'h6);
    pop(4, q);
    for (int i = 0; i < 4; i++)
      check(q.size() > i && q[i][7:0] == eeprom.mem[8'(DEPTH + i)], $sformatf("RX byte %0d", DEPTH + i));

    // --- TX overflow.
    q = {};
    for (int i = 0; i <= DEPTH; i++) q.push_back(32'(i));
    push(q);
    rd(REG_STATUS, st);
    check(st[3] && st[4], "TX overflow flagged");
    if (st[3]) mech[M_TX_OVERFLOW]++;
    wr(REG_CTRL, 32'h8);
    wr(REG_STATUS, 32'h8);
    rd(REG_STATUS, st);
    check(st[5] && !st[3], "TX flushed, overflow cleared");

    // --- INCR burst over four registers, with back-pressure.
    cpu.bp_pct = 40;
    cpu.read_burst(I2C | 32'(REG_STATUS), 4, BURST_INCR, q, r, l);
    check(l && q.size() == 4 && q[1] == 32'h50 && q[2] == 32'd20 && q[3] == 32'd24,
          "INCR burst over SLAVE_ADDR, LENGTH, PRESCALE");
    mech[M_INCR_BURST]++;

    // --- Second interconnect port and an unmapped address.
    q = {32'h1111, 32'h2222, 32'h3333};
    cpu.write_burst(MEM | 32'h20, q, BURST_INCR, r);
    check(r == RESP_OKAY && mem[8] == 32'h1111 && mem[10] == 32'h3333, "write via second port");
    cpu.read_burst(MEM | 32'h20, 3, BURST_INCR, q, r, l);
    check(r == RESP_OKAY && l && q.size() == 3 && q[1] == 32'h2222, "read via second port");
    if (q.size() == 3 && q[1] == 32'h2222) mech[M_MEM_PORT]++;
    cpu.rd32(32'h2000_0000, d, r);
    check(r == RESP_DECERR, "DECERR for unmapped address");
    if (r == RESP_DECERR) mech[M_DECERR]++;
    if (cpu.bp_cycles > 0) mech[M_BACKPRESSURE]++;
    cpu.bp_pct = 0;

    check(eeprom.n_start == eeprom.n_stop, "every START matched by a STOP");
    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-20s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism never happened: ", mech_name[m]});
    end
    $display("simulated %0d clocks", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

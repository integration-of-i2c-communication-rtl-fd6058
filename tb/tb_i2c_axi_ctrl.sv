// tb_i2c_axi_ctrl: the AXI4 I2C controller programmed over AXI4 as
// software would, talking to a behavioural I2C slave on the open-drain bus.
// Checks a write transfer (bytes pushed with a FIXED burst into TXDATA),
// a read transfer (bytes popped with a FIXED burst from RXDATA), the done
// and nack flags, the SCL period set by PRESCALE, TX overflow and flush,
// and that STATUS reports the FIFO levels.
module tb_i2c_axi_ctrl;
  import axi4_pkg::*;
  import i2c_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  axi_req_t req;
  axi_rsp_t rsp;
  logic scl_oe, sda_oe, s_scl_oe, s_sda_oe, scl, sda, stretch, stall;
  int checks = 0, failures = 0;

  assign scl = !(scl_oe || s_scl_oe);
  assign sda = !(sda_oe || s_sda_oe);

  i2c_axi_ctrl #(.FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .axi_req(req), .axi_rsp(rsp),
    .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe, .stretch, .stall
  );
  axi4_master_bfm bfm (.clk, .req, .rsp);
  i2c_slave_model #(.ADDR(7'h50)) slave (
    .clk, .scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe),
    .stretch_cycles(0), .nack_data(1'b0)
  );

  always #5 clk = ~clk;

  int cyc = 0, last_rise = -1, min_p = 1 << 30, max_p = 0;
  logic scl_q = 1;
  always @(negedge clk) begin
    cyc++;
    scl_q <= scl;
    if (scl && !scl_q) begin
      if (last_rise >= 0 && cyc - last_rise < 1000) begin
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    axi_resp_e r;
    bfm.wr32(32'(a), d, r);
    check(r == RESP_OKAY, "write OKAY");
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    axi_resp_e r;
    bfm.rd32(32'(a), d, r);
  endtask
  task automatic wait_done(output logic [31:0] st);
    do rd(REG_STATUS, st); while (!st[1]);
    wr(REG_STATUS, 32'h6);
  endtask

  initial begin
    logic [31:0] st, d, q[$], rq[$];
    axi_resp_e r;
    bit l;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Write: pointer 0x30 and data 5A C3 0F.
    wr(REG_PRESCALE, 32'd4);
    wr(REG_SLAVE_ADDR, 32'h50);
    q = {32'h30, 32'h5A, 32'hC3, 32'h0F};
    bfm.write_burst(32'(REG_TXDATA), q, BURST_FIXED, r);
    rd(REG_STATUS, st);
    check(!st[5] && !st[4], "TX FIFO holds bytes");
    wr(REG_LENGTH, 32'd4);
    min_p = 1 << 30; max_p = 0;
    wr(REG_CTRL, 32'h3);
    wait_done(st);
    check(!st[2], "write acknowledged");
    check(slave.mem[8'h30] == 8'h5A && slave.mem[8'h31] == 8'hC3 && slave.mem[8'h32] == 8'h0F,
          "bytes written to the slave");
    check(min_p == 20 && max_p == 20, $sformatf("SCL period %0d..%0d, expected 20", min_p, max_p));

    // Read back: set pointer, then read 3.
    wr(REG_TXDATA, 32'h30);
    wr(REG_LENGTH, 32'd1);
    wr(REG_CTRL, 32'h3);
    wait_done(st);
    wr(REG_LENGTH, 32'd3);
    wr(REG_CTRL, 32'h7);
    wait_done(st);
    rd(REG_STATUS, st);
    check(!st[7], "RX FIFO not empty after read");
    bfm.read_burst(32'(REG_RXDATA), 3, BURST_FIXED, rq, r, l);
    check(l && rq.size() == 3 && rq[0] == 32'h5A && rq[1] == 32'hC3 && rq[2] == 32'h0F,
          "read data popped from RXDATA");
    rd(REG_STATUS, st);
    check(st[7], "RX FIFO empty after pops");

    // Address NACK.
    wr(REG_SLAVE_ADDR, 32'h23);
    wr(REG_LENGTH, 32'd0);
    wr(REG_CTRL, 32'h3);
    do rd(REG_STATUS, st); while (!st[1]);
    check(st[2], "nack flag for absent address");
    wr(REG_STATUS, 32'h6);
    rd(REG_STATUS, st);
    check(!st[1] && !st[2], "flags cleared");

    // TX overflow and flush.
    q = {};
    for (int i = 0; i < DEPTH + 1; i++) q.push_back(32'(i));
    bfm.write_burst(32'(REG_TXDATA), q, BURST_FIXED, r);
    rd(REG_STATUS, st);
    check(st[4] && st[3], "TX full and overflow");
    wr(REG_CTRL, 32'h8);
    rd(REG_STATUS, st);
    check(st[5] && !st[4], "TX flushed");

    // Register read-back through AXI.
    rd(REG_PRESCALE, d);
    check(d == 4, "PRESCALE read back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

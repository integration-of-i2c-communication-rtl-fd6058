// tb_i2c_example_rw: the example operation of the subsystem at default
// parameters: the processor writes one data byte 0x5A to the I2C device
// at address 0x17 and reads it back, in standard mode (reset PRESCALE,
// 100 kbit/s at 100 MHz). Each I2C transfer is checked to take its exact
// bus time: 8 quarter-periods of START/STOP plus 36 per byte, 250 clocks
// each, i.e. 9,000 clocks (90 us) per byte.
module tb_i2c_example_rw;
  import axi4_pkg::*;
  import i2c_pkg::*;
  localparam logic [31:0] I2C = 32'h4000_0000;
  logic clk = 0, rst_n = 0;
  axi_req_t cpu_req, mem_req;
  axi_rsp_t cpu_rsp, mem_rsp;
  logic scl_oe, sda_oe, s_scl_oe, s_sda_oe, scl, sda;
  int checks = 0, failures = 0;

  assign scl = !(scl_oe || s_scl_oe);
  assign sda = !(sda_oe || s_sda_oe);
  assign mem_rsp = '0;

  i2c_soc_top dut (
    .clk, .rst_n, .cpu_req, .cpu_rsp, .mem_req, .mem_rsp,
    .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe
  );
  axi4_master_bfm cpu (.clk, .req(cpu_req), .rsp(cpu_rsp));
  i2c_slave_model #(.ADDR(7'h17)) dev (
    .clk, .scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe),
    .stretch_cycles(0), .nack_data(1'b0));

  always #5 clk = ~clk;

  // Bus time of a transfer: first SDA fall (START) to last SDA rise (STOP).
  int cyc = 0, t_start = 0, t_stop = 0;
  logic sda_q = 1;
  always @(negedge clk) begin
    cyc++;
    sda_q <= sda;
    if (scl && sda_q && !sda) t_start = cyc;
    if (scl && !sda_q && sda) t_stop = cyc;
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

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    axi_resp_e r;
    cpu.wr32(I2C | 32'(a), d, r);
    check(r == RESP_OKAY, "AXI write OKAY");
  endtask
  task automatic xfer(input bit rd_not_wr, input int n);
    logic [31:0] st;
    axi_resp_e r;
    wr(REG_SLAVE_ADDR, 32'h17);
    wr(REG_LENGTH, 32'(n));
    wr(REG_CTRL, rd_not_wr ? 32'h7 : 32'h3);
    do cpu.rd32(I2C | 32'(REG_STATUS), st, r); while (!st[1]);
    check(!st[2], "acknowledged");
    wr(REG_STATUS, 32'h6);
    // START's SDA edge is one quarter in, STOP's one quarter before the end.
    check(t_stop - t_start == 250 * (8 + 36 * (n + 1) - 2),
          $sformatf("bus time %0d clocks, expected %0d", t_stop - t_start,
                    250 * (8 + 36 * (n + 1) - 2)));
  endtask

  initial begin
    logic [31:0] d;
    axi_resp_e r;
    repeat (5) @(negedge clk);
    rst_n = 1;
    cpu.wr32(I2C | 32'(REG_TXDATA), 32'h00, r);   // device register pointer
    cpu.wr32(I2C | 32'(REG_TXDATA), 32'h5A, r);   // data
    xfer(0, 2);
    check(dev.mem[0] == 8'h5A, "0x5A stored in the device");
    cpu.wr32(I2C | 32'(REG_TXDATA), 32'h00, r);
    xfer(0, 1);
    xfer(1, 1);
    cpu.rd32(I2C | 32'(REG_RXDATA), d, r);
    check(r == RESP_OKAY && d == 32'h5A, $sformatf("read back %h", d));
    $display("simulated %0d clocks", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

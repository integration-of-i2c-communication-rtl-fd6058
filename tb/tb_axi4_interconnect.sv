// tb_axi4_interconnect: routing and arbitration of the AXI4 interconnect.
// Two register-array slaves sit behind it (each an axi4_slave_if with a
// testbench array). With one master active it checks that writes and reads
// reach only the slave whose window holds the address, that bursts pass
// through with RLAST, that a write and a read can run at the same time, and
// that an unmapped address gets DECERR on B and on every R beat without
// reaching any slave. Then three masters compete: simultaneous writes and
// reads from all of them must complete, land in the right place and be
// granted in round-robin order (each master followed by the next)
module tb_axi4_interconnect;
  import axi4_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t [2:0] s_req;
  axi_rsp_t [2:0] s_rsp;
  axi_req_t [1:0] m_req;
  axi_rsp_t [1:0] m_rsp;
  int checks = 0, failures = 0;

  logic [31:0] regs [2][64];
  int n_aw [2], n_ar [2];

  axi4_interconnect #(.NUM_MASTERS(3), .NUM_SLAVES(2)) dut (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp);
  axi4_master_bfm bfm  (.clk, .req(s_req[0]), .rsp(s_rsp[0]));
  axi4_master_bfm bfm1 (.clk, .req(s_req[1]), .rsp(s_rsp[1]));
  axi4_master_bfm bfm2 (.clk, .req(s_req[2]), .rsp(s_rsp[2]));

  for (genvar g = 0; g < 2; g++) begin : g_slv
    logic reg_wr, reg_rd;
    logic [7:0] reg_waddr, reg_raddr;
    logic [31:0] reg_wdata, reg_rdata;
    logic [3:0] reg_wstrb;
    axi4_slave_if #(.REG_ADDR_W(8)) slv (
      .clk, .rst_n, .axi_req(m_req[g]), .axi_rsp(m_rsp[g]),
      .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb, .reg_rd, .reg_raddr, .reg_rdata
    );
    assign reg_rdata = regs[g][reg_raddr[7:2]];
    always @(posedge clk) if (reg_wr) regs[g][reg_waddr[7:2]] <= reg_wdata;
    always @(negedge clk) begin
      if (m_req[g].aw_valid && m_rsp[g].aw_ready) n_aw[g]++;
      if (m_req[g].ar_valid && m_rsp[g].ar_ready) n_ar[g]++;
    end
  end

  // Order in which the masters' AW and AR handshakes complete.
  int aw_order[$], ar_order[$];
  always @(negedge clk)
    for (int m = 0; m < 3; m++) begin
      if (s_req[m].aw_valid && s_rsp[m].aw_ready) aw_order.push_back(m);
      if (s_req[m].ar_valid && s_rsp[m].ar_ready) ar_order.push_back(m);
    end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    axi_resp_e resp, resp2;
    logic [31:0] d, wq[$], rq[$];
    bit last_ok;
    for (int s = 0; s < 2; s++) for (int i = 0; i < 64; i++) regs[s][i] = 32'(s * 256 + i);
    n_aw = '{0, 0}; n_ar = '{0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    bfm.bp_pct = 30;

    bfm.wr32(32'h4000_0010, 32'hAAAA_0001, resp);
    check(resp == RESP_OKAY && regs[0][4] == 32'hAAAA_0001 && regs[1][4] == 32'(256 + 4),
          "write to window 0 only");
    bfm.wr32(32'h8123_4410, 32'hBBBB_0002, resp);
    check(resp == RESP_OKAY && regs[1][4] == 32'hBBBB_0002 && regs[0][4] == 32'hAAAA_0001,
          "write to window 1 only");
    check(n_aw[0] == 1 && n_aw[1] == 1, "one AW per slave");
    bfm.rd32(32'h4000_0010, d, resp);
    check(resp == RESP_OKAY && d == 32'hAAAA_0001, "read from window 0");
    bfm.rd32(32'h8000_0010, d, resp);
    check(resp == RESP_OKAY && d == 32'hBBBB_0002, "read from window 1");

    // Bursts through the interconnect.
    wq = {32'h1, 32'h2, 32'h3, 32'h4};
    bfm.write_burst(32'h8000_0080, wq, BURST_INCR, resp);
    bfm.read_burst(32'h8000_0080, 4, BURST_INCR, rq, resp, last_ok);
    check(resp == RESP_OKAY && last_ok && rq == wq, "burst through window 1");

    // Unmapped addresses: DECERR, no slave touched.
    n_aw = '{0, 0}; n_ar = '{0, 0};
    bfm.write_burst(32'h1000_0000, wq, BURST_INCR, resp);
    check(resp == RESP_DECERR, "unmapped write DECERR");
    bfm.read_burst(32'h4000_1000, 3, BURST_INCR, rq, resp, last_ok);
    check(resp == RESP_DECERR && last_ok && rq.size() == 3, "unmapped read: 3 DECERR beats, RLAST");
    check(n_aw[0] + n_aw[1] + n_ar[0] + n_ar[1] == 0, "no slave saw the unmapped accesses");

    // Write to slave 0 while reading slave 1 from the same master.
    wq = {32'h55, 32'h66};
    fork
      bfm.write_burst(32'h4000_0040, wq, BURST_INCR, resp);
      bfm.read_burst(32'h8000_0084, 2, BURST_INCR, rq, resp2, last_ok);
    join
    check(resp == RESP_OKAY && regs[0][16] == 32'h55 && regs[0][17] == 32'h66, "concurrent write");
    check(resp2 == RESP_OKAY && rq.size() == 2 && rq[0] == 32'h2 && rq[1] == 32'h3, "concurrent read");

    // Three masters at once: four writes and four reads each.
    aw_order = {}; ar_order = {};
    bfm.bp_pct = 0;
    fork
      for (int k = 0; k < 4; k++) begin
        axi_resp_e r0;
        bfm.wr32(32'h4000_0080 + 32'(4 * k), 32'hA000 + 32'(k), r0);
        check(r0 == RESP_OKAY, "master 0 write");
      end
      for (int k = 0; k < 4; k++) begin
        axi_resp_e r1;
        bfm1.wr32(32'h4000_00C0 + 32'(4 * k), 32'hB000 + 32'(k), r1);
        check(r1 == RESP_OKAY, "master 1 write");
      end
      for (int k = 0; k < 4; k++) begin
        axi_resp_e r2;
        bfm2.wr32(32'h8000_00C0 + 32'(4 * k), 32'hC000 + 32'(k), r2);
        check(r2 == RESP_OKAY, "master 2 write");
      end
    join
    for (int k = 0; k < 4; k++) begin
      check(regs[0][32 + k] == 32'hA000 + 32'(k), $sformatf("master 0 data %0d", k));
      check(regs[0][48 + k] == 32'hB000 + 32'(k), $sformatf("master 1 data %0d", k));
      check(regs[1][48 + k] == 32'hC000 + 32'(k), $sformatf("master 2 data %0d", k));
    end
    check(aw_order.size() == 12, "twelve writes granted");
    for (int k = 0; k + 1 < aw_order.size(); k++)
      check(aw_order[k + 1] == (aw_order[k] + 1) % 3,
            $sformatf("write grant %0d went to master %0d after master %0d", k + 1,
                      aw_order[k + 1], aw_order[k]));
    fork
      for (int k = 0; k < 4; k++) begin
        logic [31:0] d0;
        axi_resp_e r0;
        bfm.rd32(32'h4000_00C0 + 32'(4 * k), d0, r0);
        check(r0 == RESP_OKAY && d0 == 32'hB000 + 32'(k), "master 0 reads master 1's data");
      end
      for (int k = 0; k < 4; k++) begin
        logic [31:0] d1;
        axi_resp_e r1;
        bfm1.rd32(32'h8000_0080, d1, r1);
        check(r1 == RESP_OKAY && d1 == 32'h1, "master 1 reads window 1");
      end
      for (int k = 0; k < 4; k++) begin
        logic [31:0] d2;
        axi_resp_e r2;
        bfm2.rd32(32'h3000_0000, d2, r2);
        check(r2 == RESP_DECERR, "master 2 gets DECERR");
      end
    join
    check(ar_order.size() == 12, "twelve reads granted");
    for (int k = 0; k + 1 < ar_order.size(); k++)
      check(ar_order[k + 1] == (ar_order[k] + 1) % 3,
            $sformatf("read grant %0d went to master %0d after master %0d", k + 1,
                      ar_order[k + 1], ar_order[k]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

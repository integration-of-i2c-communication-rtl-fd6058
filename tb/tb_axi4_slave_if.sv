// tb_axi4_slave_if: AXI4 slave port against a testbench register array.
// Checks single and burst writes and reads (INCR and FIXED), byte strobes
// reaching the register bus, exactly one register access per beat, RLAST
// on the last beat, echoed IDs and OKAY responses, with and without
// BREADY/RREADY back-pressure.
module tb_axi4_slave_if;
  import axi4_pkg::*;
  logic clk = 0, rst_n = 0;
  axi_req_t req;
  axi_rsp_t rsp;
  logic reg_wr, reg_rd;
  logic [7:0] reg_waddr, reg_raddr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [3:0] reg_wstrb;
  int checks = 0, failures = 0;

  logic [31:0] regs [64];
  logic [7:0] wr_log[$], rd_log[$];

  axi4_slave_if #(.REG_ADDR_W(8)) dut (
    .clk, .rst_n, .axi_req(req), .axi_rsp(rsp),
    .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb, .reg_rd, .reg_raddr, .reg_rdata
  );
  axi4_master_bfm bfm (.clk, .req, .rsp);

  always #5 clk = ~clk;

  assign reg_rdata = regs[reg_raddr[7:2]];
  always @(posedge clk) begin
    if (reg_wr) begin
      for (int b = 0; b < 4; b++)
        if (reg_wstrb[b]) regs[reg_waddr[7:2]][8*b +: 8] <= reg_wdata[8*b +: 8];
      wr_log.push_back(reg_waddr);
    end
    if (reg_rd) rd_log.push_back(reg_raddr);
  end

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
    axi_resp_e resp;
    logic [31:0] d;
    logic [31:0] wq[$], rq[$];
    bit last_ok;
    for (int i = 0; i < 64; i++) regs[i] = 32'h1000 + i;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int pass = 0; pass < 2; pass++) begin
      bfm.bp_pct = pass * 50;
      // Single beat.
      bfm.wr32(32'h4000_0008, 32'hCAFE_0000 + pass, resp);
      check(resp == RESP_OKAY && rsp.b.id == 4'h3, "single write OKAY, BID");
      check(regs[2] == 32'hCAFE_0000 + pass, "single write data");
      bfm.rd32(32'h4000_0008, d, resp);
      check(resp == RESP_OKAY && d == 32'hCAFE_0000 + pass, "single read");

      // INCR burst of 6 words from 0x20.
      wq = {};
      for (int i = 0; i < 6; i++) wq.push_back($urandom);
      wr_log = {};
      bfm.write_burst(32'h4000_0020, wq, BURST_INCR, resp);
      check(resp == RESP_OKAY, "INCR write resp");
      check(wr_log.size() == 6, "INCR write: six register writes");
      for (int i = 0; i < 6; i++)
        check(regs[8 + i] == wq[i] && wr_log.size() > i && wr_log[i] == 8'(32 + 4 * i),
              $sformatf("INCR write beat %0d", i));
      rd_log = {};
      bfm.read_burst(32'h4000_0020, 6, BURST_INCR, rq, resp, last_ok);
      check(resp == RESP_OKAY && last_ok, "INCR read: OKAY, RLAST and RID");
      check(rd_log.size() == 6, "INCR read: one register read per beat");
      for (int i = 0; i < 6; i++) check(rq.size() > i && rq[i] == wq[i], $sformatf("INCR read beat %0d", i));

      // FIXED bursts hit one register repeatedly.
      wq = {32'h11, 32'h22, 32'h33};
      wr_log = {};
      bfm.write_burst(32'h4000_0014, wq, BURST_FIXED, resp);
      check(wr_log.size() == 3 && wr_log[0] == 8'h14 && wr_log[1] == 8'h14 && wr_log[2] == 8'h14,
            "FIXED write stays on one register");
      check(regs[5] == 32'h33, "FIXED write keeps last value");
      rd_log = {};
      bfm.read_burst(32'h4000_0018, 5, BURST_FIXED, rq, resp, last_ok);
      check(last_ok && rd_log.size() == 5, "FIXED read: five accesses, RLAST on fifth");
      foreach (rd_log[i]) check(rd_log[i] == 8'h18, "FIXED read address");
    end

    // Byte strobes.
    bfm.wr32(32'h4000_0000, 32'hFFFF_FFFF, resp);
    @(negedge clk);
    req.aw.addr = 32'h0; req.aw.len = 0; req.aw.size = 2; req.aw.burst = BURST_INCR;
    req.aw_valid = 1;
    #1 while (!rsp.aw_ready) begin @(negedge clk); #1; end
    @(negedge clk); req.aw_valid = 0;
    req.w.data = 32'h1234_5678; req.w.strb = 4'b0101; req.w.last = 1; req.w_valid = 1;
    #1 while (!rsp.w_ready) begin @(negedge clk); #1; end
    @(negedge clk); req.w_valid = 0; req.b_ready = 1;
    #1 while (!rsp.b_valid) begin @(negedge clk); #1; end
    @(negedge clk); req.b_ready = 0;
    check(regs[0] == 32'hFF34_FF78, "byte strobes");
    check(bfm.bp_cycles > 0, "back-pressure exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

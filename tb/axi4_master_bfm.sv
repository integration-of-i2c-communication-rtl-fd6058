// axi4_master_bfm: testbench AXI4 master standing in for the processor.
//
// Tasks issue one write or read burst and return the response. All driving
// and sampling happen one time unit after the falling clock edge, so a
// VALID/READY pair seen high there completes on the next rising edge.
// `bp_pct` sets how often (percent) BREADY/RREADY are held low for a cycle,
// to exercise back-pressure.
module axi4_master_bfm
  import axi4_pkg::*;
(
  input  logic     clk,
  output axi_req_t req,
  input  axi_rsp_t rsp
);

  int unsigned bp_pct = 0;
  int unsigned beats_w = 0, beats_r = 0, bp_cycles = 0;

  initial req = '0;

  task automatic write_burst(input logic [AXI_ADDR_W-1:0] addr,
                             input logic [AXI_DATA_W-1:0] data[$],
                             input axi_burst_e burst,
                             output axi_resp_e resp);
    @(negedge clk);
    req.aw.id    = 4'h3;
    req.aw.addr  = addr;
    req.aw.len   = 8'(data.size() - 1);
    req.aw.size  = 3'd2;
    req.aw.burst = burst;
    req.aw_valid = 1'b1;
    #1;
    while (!rsp.aw_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.aw_valid = 1'b0;
    for (int i = 0; i < data.size(); i++) begin
      req.w.data  = data[i];
      req.w.strb  = '1;
      req.w.last  = (i == data.size() - 1);
      req.w_valid = 1'b1;
      #1;
      while (!rsp.w_ready) begin @(negedge clk); #1; end
      beats_w++;
      @(negedge clk);
    end
    req.w_valid = 1'b0;
    req.w.last  = 1'b0;
    forever begin
      req.b_ready = ($urandom_range(99) >= bp_pct);
      if (!req.b_ready) bp_cycles++;
      #1;
      if (rsp.b_valid && req.b_ready) break;
      @(negedge clk);
    end
    resp = rsp.b.resp;
    @(negedge clk);
    req.b_ready = 1'b0;
  endtask

  task automatic read_burst(input logic [AXI_ADDR_W-1:0] addr,
                            input int unsigned nbeats,
                            input axi_burst_e burst,
                            output logic [AXI_DATA_W-1:0] data[$],
                            output axi_resp_e resp,
                            output bit last_ok);
    data    = {};
    last_ok = 1'b1;
    resp    = RESP_OKAY;
    @(negedge clk);
    req.ar.id    = 4'h5;
    req.ar.addr  = addr;
    req.ar.len   = 8'(nbeats - 1);
    req.ar.size  = 3'd2;
    req.ar.burst = burst;
    req.ar_valid = 1'b1;
    #1;
    while (!rsp.ar_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.ar_valid = 1'b0;
    while (data.size() < nbeats) begin
      req.r_ready = ($urandom_range(99) >= bp_pct);
      if (!req.r_ready) bp_cycles++;
      #1;
      if (rsp.r_valid && req.r_ready) begin
        data.push_back(rsp.r.data);
        if (rsp.r.resp != RESP_OKAY) resp = rsp.r.resp;
        if (rsp.r.last != (data.size() == nbeats)) last_ok = 1'b0;
        if (rsp.r.id != 4'h5) last_ok = 1'b0;
        beats_r++;
      end
      @(negedge clk);
    end
    req.r_ready = 1'b0;
  endtask

  // Single-beat helpers.
  task automatic wr32(input logic [AXI_ADDR_W-1:0] addr, input logic [31:0] d,
                      output axi_resp_e resp);
    logic [AXI_DATA_W-1:0] q[$];
    q = {d};
    write_burst(addr, q, BURST_INCR, resp);
  endtask

  task automatic rd32(input logic [AXI_ADDR_W-1:0] addr, output logic [31:0] d,
                      output axi_resp_e resp);
    logic [AXI_DATA_W-1:0] q[$];
    bit l;
    read_burst(addr, 1, BURST_INCR, q, resp, l);
    d = q[0];
  endtask

endmodule

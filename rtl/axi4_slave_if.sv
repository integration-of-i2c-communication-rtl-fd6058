// axi4_slave_if: AXI4 slave port of the I2C controller.
//
// Turns AXI4 write and read bursts into single-beat accesses on the
// controller's register bus, one register access per data beat. A FIXED
// burst repeats the same register (handy for pushing several bytes into
// TXDATA or popping several from RXDATA in one burst); an INCR burst steps
// the address by the beat size. WRAP bursts are handled as INCR.
//
// Write channel: AW is accepted in idle (awready high), then each W beat is
// accepted (wready high) and written in the clock of its handshake; after
// the beat with WLAST, BVALID is raised with OKAY until BREADY.
// Read channel: AR is accepted in idle; each beat takes two clocks, one to
// read the register (reg_rd, so a FIFO register is popped exactly once per
// beat) and one or more with RVALID high until RREADY. RLAST marks the
// beat number ARLEN. Writes and reads run independently; one burst of each
// is in flight at a time. Reset is synchronous and active low.
//
// The AXI4 handshakes (AWVALID/WVALID/BVALID, ARVALID/RVALID/RLAST) follow
// the AXI4 protocol as the design description requires; the two-clock read
// beat and the one-burst-at-a-time policy are this design's choice.
module axi4_slave_if
  import axi4_pkg::*;
#(
  parameter int unsigned REG_ADDR_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  axi_req_t              axi_req,
  output axi_rsp_t              axi_rsp,
  // register bus
  output logic                  reg_wr,
  output logic [REG_ADDR_W-1:0] reg_waddr,
  output logic [31:0]           reg_wdata,
  output logic [3:0]            reg_wstrb,
  output logic                  reg_rd,
  output logic [REG_ADDR_W-1:0] reg_raddr,
  input  logic [31:0]           reg_rdata
);

  typedef enum logic [1:0] {W_ADDR, W_DATA, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_ADDR, R_FETCH, R_DATA} rstate_e;

  wstate_e               wstate;
  rstate_e               rstate;
  logic [AXI_ADDR_W-1:0] waddr, raddr;
  axi_burst_e            wburst, rburst;
  logic [2:0]            wsize, rsize;
  logic [AXI_ID_W-1:0]   wid, rid;
  logic [7:0]            rlen, rcnt;
  logic [31:0]           rdata_q;

  function automatic logic [AXI_ADDR_W-1:0] next_addr(
      input logic [AXI_ADDR_W-1:0] a, input axi_burst_e b, input logic [2:0] s);
    return (b == BURST_FIXED) ? a : a + (AXI_ADDR_W'(1) << s);
  endfunction

  // Write channel
  logic w_hs;
  assign w_hs = (wstate == W_DATA) && axi_req.w_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstate <= W_ADDR;
      waddr  <= '0;
      wburst <= BURST_INCR;
      wsize  <= '0;
      wid    <= '0;
    end else begin
      unique case (wstate)
        W_ADDR: if (axi_req.aw_valid) begin
          waddr  <= axi_req.aw.addr;
          wburst <= axi_req.aw.burst;
          wsize  <= axi_req.aw.size;
          wid    <= axi_req.aw.id;
          wstate <= W_DATA;
        end
        W_DATA: if (w_hs) begin
          waddr <= next_addr(waddr, wburst, wsize);
          if (axi_req.w.last) wstate <= W_RESP;
        end
        W_RESP: if (axi_req.b_ready) wstate <= W_ADDR;
        default: wstate <= W_ADDR;
      endcase
    end
  end

  assign reg_wr    = w_hs;
  assign reg_waddr = waddr[REG_ADDR_W-1:0];
  assign reg_wdata = axi_req.w.data;
  assign reg_wstrb = axi_req.w.strb;

  // Read channel
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rstate  <= R_ADDR;
      raddr   <= '0;
      rburst  <= BURST_INCR;
      rsize   <= '0;
      rid     <= '0;
      rlen    <= '0;
      rcnt    <= '0;
      rdata_q <= '0;
    end else begin
      unique case (rstate)
        R_ADDR: if (axi_req.ar_valid) begin
          raddr  <= axi_req.ar.addr;
          rburst <= axi_req.ar.burst;
          rsize  <= axi_req.ar.size;
          rid    <= axi_req.ar.id;
          rlen   <= axi_req.ar.len;
          rcnt   <= '0;
          rstate <= R_FETCH;
        end
        R_FETCH: begin
          rdata_q <= reg_rdata;
          rstate  <= R_DATA;
        end
        R_DATA: if (axi_req.r_ready) begin
          if (rcnt == rlen) begin
            rstate <= R_ADDR;
          end else begin
            rcnt   <= rcnt + 1'b1;
            raddr  <= next_addr(raddr, rburst, rsize);
            rstate <= R_FETCH;
          end
        end
        default: rstate <= R_ADDR;
      endcase
    end
  end

  assign reg_rd    = (rstate == R_FETCH);
  assign reg_raddr = raddr[REG_ADDR_W-1:0];

  always_comb begin
    axi_rsp          = '0;
    axi_rsp.aw_ready = (wstate == W_ADDR);
    axi_rsp.w_ready  = (wstate == W_DATA);
    axi_rsp.b_valid  = (wstate == W_RESP);
    axi_rsp.b.id     = wid;
    axi_rsp.b.resp   = RESP_OKAY;
    axi_rsp.ar_ready = (rstate == R_ADDR);
    axi_rsp.r_valid  = (rstate == R_DATA);
    axi_rsp.r.id     = rid;
    axi_rsp.r.data   = rdata_q;
    axi_rsp.r.resp   = RESP_OKAY;
    axi_rsp.r.last   = (rcnt == rlen);
  end

  // AXI4 rule: a raised VALID stays up, with stable payload, until READY.
  b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    axi_rsp.b_valid && !axi_req.b_ready |=> axi_rsp.b_valid && $stable(axi_rsp.b));
  r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    axi_rsp.r_valid && !axi_req.r_ready |=> axi_rsp.r_valid && $stable(axi_rsp.r));

endmodule

// axi4_interconnect: AXI4 interconnect with NUM_MASTERS masters and
// NUM_SLAVES address-decoded slaves.
//
// Write and read directions are handled independently, each carrying one
// transaction at a time:
//   1. Arbitration: when idle, the masters with AWVALID (ARVALID) are
//      served round-robin, starting after the last master served. The grant
//      is registered, so the chosen master's address is presented to the
//      slave one clock later and stays there until the handshake (the
//      slave never sees VALID drop).
//   2. Routing: the address is compared with each slave window
//      (addr & SLAVE_MASK[i]) == SLAVE_BASE[i]; W/B (R) are then forwarded
//      combinationally between the granted master and that slave until the
//      B handshake (the R beat with RLAST).
//   3. An address in no window goes to a built-in error slave that takes
//      every W beat and answers DECERR on B, or on ARLEN+1 R beats.
// Masters that are not granted see all READY and VALID signals low.
// A write and a read can be in progress at once, also from different
// masters or to different slaves. IDs pass unchanged, since a direction
// carries one transaction at a time.
//
// Interface: s_req[m]/s_rsp[m] are the slave ports facing masters,
// m_req[i]/m_rsp[i] the master ports facing slaves. Defaults: two masters;
// slave 0 (the I2C controller) at 0x4000_0000, 4 KiB, and slave 1 (memory
// or further peripherals) at 0x8000_0000, 256 MiB. Synchronous,
// active-low reset.
//
// Routing and arbitration between masters and slaves are the interconnect's
// duties in the design description; the round-robin policy, the
// one-transaction-per-direction limit, the address map and the DECERR
// slave are this design's choice.
module axi4_interconnect
  import axi4_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 2,
  parameter int unsigned NUM_SLAVES  = 2,
  parameter logic [NUM_SLAVES-1:0][AXI_ADDR_W-1:0] SLAVE_BASE =
      {32'h8000_0000, 32'h4000_0000},
  parameter logic [NUM_SLAVES-1:0][AXI_ADDR_W-1:0] SLAVE_MASK =
      {32'hF000_0000, 32'hFFFF_F000}
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  axi_req_t [NUM_MASTERS-1:0]  s_req,
  output axi_rsp_t [NUM_MASTERS-1:0]  s_rsp,
  output axi_req_t [NUM_SLAVES-1:0]   m_req,
  input  axi_rsp_t [NUM_SLAVES-1:0]   m_rsp
);

  localparam int unsigned SEL_W = $clog2(NUM_SLAVES + 1);
  localparam int unsigned MST_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;
  localparam logic [SEL_W-1:0] ERR = SEL_W'(NUM_SLAVES);

  function automatic logic [SEL_W-1:0] decode(input logic [AXI_ADDR_W-1:0] a);
    logic [SEL_W-1:0] s;
    s = ERR;
    for (int i = NUM_SLAVES - 1; i >= 0; i--)
      if ((a & SLAVE_MASK[i]) == SLAVE_BASE[i]) s = SEL_W'(i);
    return s;
  endfunction

  // Round-robin choice among `req`, starting after `last`.
  function automatic logic [MST_W-1:0] rr_pick(input logic [NUM_MASTERS-1:0] req,
                                               input logic [MST_W-1:0] last);
    logic [MST_W-1:0] pick;
    pick = last;
    for (int k = NUM_MASTERS; k >= 1; k--) begin
      int unsigned c;
      c = (int'(last) + k) % NUM_MASTERS;
      if (req[c]) pick = MST_W'(c);
    end
    return pick;
  endfunction

  typedef enum logic [1:0] {W_IDLE, W_ADDR, W_DATA, W_RESP} wstate_e;
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} rstate_e;

  wstate_e          wstate;
  rstate_e          rstate;
  logic [MST_W-1:0] wm, rm;          // granted masters
  logic [SEL_W-1:0] wsel, rsel;      // routed slaves
  logic [AXI_ID_W-1:0] err_wid, err_rid;
  logic [7:0]       err_rlen, err_rcnt;

  logic [NUM_MASTERS-1:0] aw_req, ar_req;
  always_comb
    for (int m = 0; m < NUM_MASTERS; m++) begin
      aw_req[m] = s_req[m].aw_valid;
      ar_req[m] = s_req[m].ar_valid;
    end

  axi_req_t wq, rq;       // requests of the granted masters
  assign wq = s_req[wm];
  assign rq = s_req[rm];

  logic [SEL_W-1:0] wtgt, rtgt;
  assign wtgt = (wstate == W_ADDR) ? decode(wq.aw.addr) : wsel;
  assign rtgt = (rstate == R_ADDR) ? decode(rq.ar.addr) : rsel;

  // Slave-side handshake signals of the current write and read.
  logic aw_rdy, w_rdy, b_vld, ar_rdy, r_vld;
  axi_b_t b_pl;
  axi_r_t r_pl;

  always_comb begin
    // Towards the slaves.
    for (int i = 0; i < NUM_SLAVES; i++) begin
      m_req[i]          = '0;
      m_req[i].aw       = wq.aw;
      m_req[i].w        = wq.w;
      m_req[i].ar       = rq.ar;
      m_req[i].aw_valid = wq.aw_valid && (wstate == W_ADDR) && (wtgt == SEL_W'(i));
      m_req[i].w_valid  = wq.w_valid  && (wstate == W_DATA) && (wtgt == SEL_W'(i));
      m_req[i].b_ready  = wq.b_ready  && (wstate == W_RESP) && (wtgt == SEL_W'(i));
      m_req[i].ar_valid = rq.ar_valid && (rstate == R_ADDR) && (rtgt == SEL_W'(i));
      m_req[i].r_ready  = rq.r_ready  && (rstate == R_DATA) && (rtgt == SEL_W'(i));
    end
    // Write responses from the routed slave or the error slave.
    aw_rdy = 1'b0; w_rdy = 1'b0; b_vld = 1'b0; b_pl = '0;
    if (wtgt == ERR) begin
      aw_rdy = 1'b1;
      w_rdy  = 1'b1;
      b_vld  = 1'b1;
      b_pl   = '{id: err_wid, resp: RESP_DECERR};
    end else begin
      for (int i = 0; i < NUM_SLAVES; i++) if (wtgt == SEL_W'(i)) begin
        aw_rdy = m_rsp[i].aw_ready;
        w_rdy  = m_rsp[i].w_ready;
        b_vld  = m_rsp[i].b_valid;
        b_pl   = m_rsp[i].b;
      end
    end
    // Read responses.
    ar_rdy = 1'b0; r_vld = 1'b0; r_pl = '0;
    if (rtgt == ERR) begin
      ar_rdy = 1'b1;
      r_vld  = 1'b1;
      r_pl   = '{id: err_rid, data: '0, resp: RESP_DECERR, last: (err_rcnt == err_rlen)};
    end else begin
      for (int i = 0; i < NUM_SLAVES; i++) if (rtgt == SEL_W'(i)) begin
        ar_rdy = m_rsp[i].ar_ready;
        r_vld  = m_rsp[i].r_valid;
        r_pl   = m_rsp[i].r;
      end
    end
    // Towards the masters: only the granted ones see handshakes.
    for (int m = 0; m < NUM_MASTERS; m++) begin
      s_rsp[m]   = '0;
      s_rsp[m].b = b_pl;
      s_rsp[m].r = r_pl;
      if (wm == MST_W'(m)) begin
        s_rsp[m].aw_ready = aw_rdy && (wstate == W_ADDR);
        s_rsp[m].w_ready  = w_rdy  && (wstate == W_DATA);
        s_rsp[m].b_valid  = b_vld  && (wstate == W_RESP);
      end
      if (rm == MST_W'(m)) begin
        s_rsp[m].ar_ready = ar_rdy && (rstate == R_ADDR);
        s_rsp[m].r_valid  = r_vld  && (rstate == R_DATA);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wstate   <= W_IDLE;
      rstate   <= R_IDLE;
      wm       <= MST_W'(NUM_MASTERS - 1);
      rm       <= MST_W'(NUM_MASTERS - 1);
      wsel     <= '0;
      rsel     <= '0;
      err_wid  <= '0;
      err_rid  <= '0;
      err_rlen <= '0;
      err_rcnt <= '0;
    end else begin
      unique case (wstate)
        W_IDLE: if (|aw_req) begin
          wm     <= rr_pick(aw_req, wm);
          wstate <= W_ADDR;
        end
        W_ADDR: if (wq.aw_valid && aw_rdy) begin
          wsel    <= wtgt;
          err_wid <= wq.aw.id;
          wstate  <= W_DATA;
        end
        W_DATA: if (wq.w_valid && w_rdy && wq.w.last) wstate <= W_RESP;
        W_RESP: if (b_vld && wq.b_ready) wstate <= W_IDLE;
        default: wstate <= W_IDLE;
      endcase
      unique case (rstate)
        R_IDLE: if (|ar_req) begin
          rm     <= rr_pick(ar_req, rm);
          rstate <= R_ADDR;
        end
        R_ADDR: if (rq.ar_valid && ar_rdy) begin
          rsel     <= rtgt;
          err_rid  <= rq.ar.id;
          err_rlen <= rq.ar.len;
          err_rcnt <= '0;
          rstate   <= R_DATA;
        end
        R_DATA: if (r_vld && rq.r_ready) begin
          err_rcnt <= err_rcnt + 1'b1;
          if (r_pl.last) rstate <= R_IDLE;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // A granted master keeps its address valid until the handshake.
  aw_held: assert property (@(posedge clk) disable iff (!rst_n)
    wstate == W_ADDR |-> wq.aw_valid);
  ar_held: assert property (@(posedge clk) disable iff (!rst_n)
    rstate == R_ADDR |-> rq.ar_valid);

endmodule

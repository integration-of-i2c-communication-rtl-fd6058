// i2c_soc_top: I2C subsystem of an A2O-based SoC.
//
// The processor's AXI4 master port (the A2O core with its caches is not part
// of this RTL) enters on cpu_req/cpu_rsp and goes through an AXI4
// interconnect configured with that one master (its arbiter then always
// grants the processor, at one clock per address phase). Interconnect port 0 is the AXI4 I2C controller at
// 0x4000_0000 (4 KiB window, registers at offsets 0x00..0x18); port 1 is
// brought out as mem_req/mem_rsp for memory or further peripherals at
// 0x8000_0000 (256 MiB). Any other address is answered with DECERR.
// The controller drives the open-drain I2C bus: scl_oe/sda_oe = 1 pull the
// line low, scl_i/sda_i are the sensed levels; pads and pull-ups are
// outside.
//
// Timing: one clock domain, synchronous active-low reset. The I2C bit rate
// is clk / (4 * (PRESCALE + 1)); the reset value 249 gives 100 kbit/s at
// 100 MHz.
//
// The arrangement processor -> AXI4 interconnect -> I2C controller -> SCL/SDA
// follows the design description; the address map, FIFO depth and reset
// prescale are this design's choice.
module i2c_soc_top
  import axi4_pkg::*;
  import i2c_pkg::*;
#(
  parameter int unsigned           FIFO_DEPTH     = 16,
  parameter logic [PRESCALE_W-1:0] RESET_PRESCALE = 16'd249
) (
  input  logic     clk,
  input  logic     rst_n,
  // AXI4 port of the processor
  input  axi_req_t cpu_req,
  output axi_rsp_t cpu_rsp,
  // second interconnect port (memory / other slaves)
  output axi_req_t mem_req,
  input  axi_rsp_t mem_rsp,
  // I2C bus
  input  logic     scl_i,
  input  logic     sda_i,
  output logic     scl_oe,
  output logic     sda_oe
);

  axi_req_t [1:0] m_req;
  axi_rsp_t [1:0] m_rsp;
  logic           i2c_stretch, i2c_stall;

  // The processor is the only bus master of this subsystem.
  axi_req_t [0:0] s_req;
  axi_rsp_t [0:0] s_rsp;
  assign s_req[0] = cpu_req;
  assign cpu_rsp  = s_rsp[0];

  axi4_interconnect #(.NUM_MASTERS(1), .NUM_SLAVES(2)) u_xbar (
    .clk, .rst_n,
    .s_req, .s_rsp,
    .m_req, .m_rsp
  );

  i2c_axi_ctrl #(
    .FIFO_DEPTH(FIFO_DEPTH), .RESET_PRESCALE(RESET_PRESCALE)
  ) u_i2c (
    .clk, .rst_n,
    .axi_req(m_req[0]), .axi_rsp(m_rsp[0]),
    .scl_i, .sda_i, .scl_oe, .sda_oe,
    .stretch(i2c_stretch), .stall(i2c_stall)
  );

  assign mem_req  = m_req[1];
  assign m_rsp[1] = mem_rsp;

endmodule

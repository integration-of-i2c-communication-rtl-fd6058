// i2c_sync: multi-flop synchroniser for the sensed I2C lines.
//
// SCL and SDA come from the board, unrelated to the system clock; each bit
// passes through STAGES flip-flops before the control unit looks at it, so
// a level that changes near a clock edge cannot reach the logic
// half-settled. The chain resets to 1, the idle level of both lines.
//
// Interface: d is the raw line level (bit 1 SCL, bit 0 SDA in the
// controller), q the synchronised copy; synchronous active-low reset.
//
// Timing: the output follows the input STAGES clocks later. The control
// unit samples SDA two quarter-bits after releasing SCL and waits for SCL
// to read high before ending a quarter, so this delay only matters for
// prescale values below STAGES, where it lengthens the SCL high time.
// Synchronising the inputs is this design's reading of the "synchronization"
// the design description asks the controller to maintain.
module i2c_sync #(
  parameter int unsigned WIDTH  = 2,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [STAGES-1:0][WIDTH-1:0] chain;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) chain[s] <= '1;
    end else begin
      chain[0] <= d;
      for (int s = 1; s < STAGES; s++) chain[s] <= chain[s-1];
    end
  end

  assign q = chain[STAGES-1];

endmodule

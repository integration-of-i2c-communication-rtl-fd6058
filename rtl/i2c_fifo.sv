// i2c_fifo: synchronous first-word-fall-through FIFO.
//
// The I2C controller uses two of these: the TX FIFO, filled by register
// writes and drained by the control unit one byte per transmitted I2C
// byte, and the RX FIFO, filled by the control unit and drained by register
// reads. Storage is a register array with read and write pointers one bit
// wider than the index, so full and empty are told apart by the extra bit.
//
// Interface and timing: rdata always shows the oldest entry (valid while
// !empty). push and pop take effect on the rising clock edge; a push while
// full and a pop while empty are ignored. push and pop in the same cycle are
// both performed. clr empties the FIFO on the next edge (it wins over push).
// Reset is synchronous and active low.
//
// The two FIFOs follow the block diagram of the controller; their width
// (one I2C byte) and depth (16) are this design's choice.
module i2c_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clr,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  // Pointer to index: pointers run over 0..2*DEPTH-1.
  function automatic logic [AW-1:0] idx(input logic [AW:0] p);
    return (p >= (AW+1)'(DEPTH)) ? AW'(p - (AW+1)'(DEPTH)) : AW'(p);
  endfunction

  function automatic logic [AW:0] nxt(input logic [AW:0] p);
    return (p == (AW+1)'(2*DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= nxt(wptr);
      if (do_pop)  rptr <= nxt(rptr);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !clr) mem[idx(wptr)] <= wdata;
  end

  always_comb begin
    logic [AW:0] diff;
    diff  = (wptr >= rptr) ? (wptr - rptr) : (wptr + (AW+1)'(2*DEPTH) - rptr);
    count = ($clog2(DEPTH+1))'(diff);
  end

  assign empty = (wptr == rptr);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rdata = mem[idx(rptr)];

endmodule

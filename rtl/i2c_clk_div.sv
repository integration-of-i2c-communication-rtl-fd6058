// i2c_clk_div: programmable prescaler for the I2C bit clock.
//
// A down-counter reloads with `prescale` and emits `tick` for one clock each
// time it reaches zero, so ticks come every prescale+1 clocks. The control
// unit spends one tick on each quarter of an SCL period, so the SCL period
// is 4*(prescale+1) clocks when no slave stretches the clock. With a 100 MHz
// clock, prescale 249, 62 and 24 give the 100 kbit/s, 400 kbit/s and
// 1 Mbit/s bus rates.
//
// Interface and timing: while `en` is low the counter is loaded with
// `prescale` and no tick is produced; the first tick comes prescale+1 clocks
// after `en` rises. A new prescale value is taken at the next reload.
// That the controller has a programmable clock divider is given by the
// design description; the counting law is this design's choice.
module i2c_clk_div #(
  parameter int unsigned PRESCALE_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [PRESCALE_W-1:0] prescale,
  output logic                  tick
);

  logic [PRESCALE_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || !en) begin
      cnt  <= prescale;
      tick <= 1'b0;
    end else if (cnt == '0) begin
      cnt  <= prescale;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt - 1'b1;
      tick <= 1'b0;
    end
  end

endmodule

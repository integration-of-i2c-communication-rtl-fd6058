// i2c_master_fsm: control unit of the I2C controller (bus master side).
//
// One transfer is: START, the 7-bit slave address with the R/W bit, the
// slave's acknowledge, then `length` data bytes, then STOP. In a write the
// bytes come from the TX FIFO and the slave acknowledges each; in a read
// the bytes go into the RX FIFO and the master acknowledges every byte but
// the last, which it answers with NACK. A NACK from the slave (to the
// address or to a written byte) ends the transfer at once with STOP and
// raises `nack`. With length 0 only the address is sent (a probe).
//
// Bit timing: every bit (and START and STOP) takes four quarters, each
// ended by a `tick` from i2c_clk_div:
//   q0  SCL low, SDA changes      q1  SCL released
//   q2  SCL high; waits here while a slave still holds SCL low (clock
//       stretching, `stretch` is high on each such tick)
//   q3  SDA sampled, SCL pulled low again
// Before each data byte the unit checks the FIFO; if the TX FIFO is empty
// (write) or the RX FIFO full (read) it holds SCL low and waits (`stall`)
// until software has refilled or drained it.
//
// Interface: scl_oe/sda_oe = 1 pull the open-drain lines low, scl_i/sda_i
// are the lines as sensed. start is a one-clock pulse accepted only in idle;
// rw, slave_addr and length are sampled with it. busy is high from start
// to the end of STOP; done (and nack, when the slave did not acknowledge)
// pulse for one clock at the end of STOP. clk_en runs the clock divider.
// tx_pop takes the FIFO head in the same clock; rx_push is registered.
//
// The sequence START / address / acknowledge / data / STOP, clock stretching
// and the use of address, direction and length come from the design
// description; the four-quarter bit timing, the NACK and FIFO-wait
// behaviour are this design's choice. Prescale 0 adds one quarter before
// each data byte (the FIFO check takes a clock); with prescale >= 1 the
// bit rate is exact.
module i2c_master_fsm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  // command
  input  logic       start,
  input  logic       rw,
  input  logic [6:0] slave_addr,
  input  logic [7:0] length,
  // TX FIFO read side
  input  logic [7:0] tx_data,
  input  logic       tx_empty,
  output logic       tx_pop,
  // RX FIFO write side
  input  logic       rx_full,
  output logic [7:0] rx_data,
  output logic       rx_push,
  // open-drain bus
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       scl_oe,
  output logic       sda_oe,
  // status
  output logic       busy,
  output logic       clk_en,
  output logic       done,
  output logic       nack,
  output logic       stretch,
  output logic       stall
);

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_ADDR, S_ADDR_ACK, S_PREP,
    S_WR_BYTE, S_WR_ACK, S_RD_BYTE, S_RD_ACK, S_STOP
  } state_e;

  state_e      state;
  logic [1:0]  q;          // quarter within the current bit
  logic [2:0]  bitcnt;
  logic [7:0]  sh;         // shift register
  logic [7:0]  remaining;  // data bytes still to move
  logic        rw_q;
  logic        nack_q;

  logic bit_state;
  assign bit_state = (state != S_IDLE) && (state != S_PREP);

  // Before a data byte: can the FIFO take part?
  logic prep_go;
  assign prep_go = rw_q ? !rx_full : !tx_empty;
  assign tx_pop  = (state == S_PREP) && !rw_q && !tx_empty;
  assign stall   = (state == S_PREP) && !prep_go;
  assign stretch = tick && bit_state && (q == 2'd2) && !scl_i;

  assign busy   = (state != S_IDLE);
  assign clk_en = busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      q         <= '0;
      bitcnt    <= '0;
      sh        <= '0;
      remaining <= '0;
      rw_q      <= 1'b0;
      nack_q    <= 1'b0;
      scl_oe    <= 1'b0;
      sda_oe    <= 1'b0;
      done      <= 1'b0;
      nack      <= 1'b0;
      rx_push   <= 1'b0;
      rx_data   <= '0;
    end else begin
      done    <= 1'b0;
      nack    <= 1'b0;
      rx_push <= 1'b0;

      if (state == S_IDLE) begin
        scl_oe <= 1'b0;
        sda_oe <= 1'b0;
        if (start) begin
          state     <= S_START;
          q         <= '0;
          rw_q      <= rw;
          remaining <= length;
          sh        <= {slave_addr, rw};
          nack_q    <= 1'b0;
        end
      end else if (state == S_PREP) begin
        // Runs every clock, not only on ticks; SCL is held low meanwhile.
        if (prep_go) begin
          state  <= rw_q ? S_RD_BYTE : S_WR_BYTE;
          q      <= '0;
          bitcnt <= '0;
          if (!rw_q) sh <= tx_data;
        end
      end else if (tick) begin
        unique case (q)
          2'd0: begin
            q <= 2'd1;
            unique case (state)
              S_START:               begin sda_oe <= 1'b0; scl_oe <= 1'b0; end
              S_ADDR, S_WR_BYTE:     sda_oe <= ~sh[7];
              S_ADDR_ACK, S_WR_ACK,
              S_RD_BYTE:             sda_oe <= 1'b0;
              S_RD_ACK:              sda_oe <= (remaining != 8'd1); // ACK unless last
              S_STOP:                sda_oe <= 1'b1;
              default: ;
            endcase
          end
          2'd1: begin
            q <= 2'd2;
            if (state == S_START) sda_oe <= 1'b1;   // SDA falls, SCL high
            else                  scl_oe <= 1'b0;   // release SCL
          end
          2'd2: begin
            // Clock stretching: wait until SCL is really high.
            if (scl_i) q <= 2'd3;
          end
          2'd3: begin
            q <= 2'd0;
            unique case (state)
              S_START: begin
                scl_oe <= 1'b1;
                state  <= S_ADDR;
                bitcnt <= '0;
              end
              S_ADDR, S_WR_BYTE: begin
                scl_oe <= 1'b1;
                sh     <= {sh[6:0], 1'b0};
                bitcnt <= bitcnt + 1'b1;
                if (bitcnt == 3'd7)
                  state <= (state == S_ADDR) ? S_ADDR_ACK : S_WR_ACK;
              end
              S_ADDR_ACK: begin
                scl_oe <= 1'b1;
                if (sda_i) begin
                  nack_q <= 1'b1;
                  state  <= S_STOP;
                end else if (remaining == 8'd0) begin
                  state  <= S_STOP;
                end else begin
                  state  <= S_PREP;
                end
              end
              S_WR_ACK: begin
                scl_oe    <= 1'b1;
                remaining <= remaining - 1'b1;
                if (sda_i) begin
                  nack_q <= 1'b1;
                  state  <= S_STOP;
                end else if (remaining == 8'd1) begin
                  state  <= S_STOP;
                end else begin
                  state  <= S_PREP;
                end
              end
              S_RD_BYTE: begin
                scl_oe <= 1'b1;
                sh     <= {sh[6:0], sda_i};
                bitcnt <= bitcnt + 1'b1;
                if (bitcnt == 3'd7) begin
                  rx_data <= {sh[6:0], sda_i};
                  rx_push <= 1'b1;
                  state   <= S_RD_ACK;
                end
              end
              S_RD_ACK: begin
                scl_oe    <= 1'b1;
                remaining <= remaining - 1'b1;
                state     <= (remaining == 8'd1) ? S_STOP : S_PREP;
              end
              S_STOP: begin
                sda_oe <= 1'b0;                     // SDA rises, SCL high
                state  <= S_IDLE;
                done   <= 1'b1;
                nack   <= nack_q;
              end
              default: state <= S_IDLE;
            endcase
          end
          default: q <= '0;
        endcase
      end
    end
  end

  // The master only changes SDA while it holds SCL low, except for the
  // START and STOP edges.
  sda_only_when_scl_low: assert property (@(posedge clk) disable iff (!rst_n)
    ($changed(sda_oe) && state != S_IDLE && state != S_START) |-> $past(scl_oe));

endmodule

// i2c_slave_model: behavioural I2C slave device for the testbenches
// (an EEPROM-like register file of 256 bytes).
//
// It oversamples the bus lines on the system clock. After START it
// receives an address byte; if the 7-bit address equals ADDR it
// acknowledges. In a write, the first data byte sets the internal pointer
// and each further byte is stored at the pointer, which then increments.
// In a read, it sends mem[pointer] and increments, continuing while the
// master acknowledges. Memory starts as mem[i] = i ^ 8'hA5.
// stretch_cycles > 0 makes it hold SCL low that many clocks after each
// acknowledge clock (clock stretching); nack_data = 1 makes it refuse
// written data bytes. Counters report what it saw.
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h50
) (
  input  logic        clk,
  input  logic        scl,
  input  logic        sda,
  output logic        scl_oe,
  output logic        sda_oe,
  input  int unsigned stretch_cycles,
  input  logic        nack_data
);

  typedef enum {IDLE, RX_BYTE, ACK, TX_BYTE, RACK} st_e;

  logic [7:0]  mem [256];
  logic [7:0]  ptr;
  st_e         st;
  logic        scl_q, sda_q;
  logic [7:0]  sh;
  int          cnt;
  logic        first, addr_phase, rw, acked, mack;
  int unsigned stretch_cnt;

  int unsigned n_start, n_stop, n_wr_bytes, n_rd_bytes, n_addr_ack, n_addr_nack,
               n_stretch, n_data_nack;

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 8'(i) ^ 8'hA5;
    st = IDLE; scl_q = 1; sda_q = 1; sh = 0; cnt = 0; ptr = 0;
    first = 0; addr_phase = 0; rw = 0; acked = 0; mack = 0; stretch_cnt = 0;
    scl_oe = 0; sda_oe = 0;
    n_start = 0; n_stop = 0; n_wr_bytes = 0; n_rd_bytes = 0;
    n_addr_ack = 0; n_addr_nack = 0; n_stretch = 0; n_data_nack = 0;
  end

  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda;
    if (stretch_cnt != 0) begin
      stretch_cnt <= stretch_cnt - 1;
      if (stretch_cnt == 1) scl_oe <= 1'b0;
    end
    if (scl && scl_q && sda_q && !sda) begin            // START
      n_start++;
      st <= RX_BYTE; cnt <= 0; addr_phase <= 1; first <= 1; sda_oe <= 0;
    end else if (scl && scl_q && !sda_q && sda) begin   // STOP
      n_stop++;
      st <= IDLE; sda_oe <= 0;
    end else if (scl && !scl_q) begin                   // SCL rising
      case (st)
        RX_BYTE: begin sh <= {sh[6:0], sda}; cnt <= cnt + 1; end
        TX_BYTE: cnt <= cnt + 1;
        RACK:    mack <= !sda;
        default: ;
      endcase
    end else if (!scl && scl_q) begin                   // SCL falling
      case (st)
        RX_BYTE: if (cnt == 8) begin
          if (addr_phase) begin
            addr_phase <= 0;
            if (sh[7:1] == ADDR) begin
              n_addr_ack++;
              rw <= sh[0]; sda_oe <= 1; st <= ACK;
            end else begin
              n_addr_nack++;
              st <= IDLE;
            end
          end else begin
            n_wr_bytes++;
            if (nack_data) begin
              n_data_nack++;
              st <= ACK;
            end else begin
              if (first) ptr <= sh;
              else begin mem[ptr] <= sh; ptr <= ptr + 1; end
              first <= 0;
              sda_oe <= 1; st <= ACK;
            end
          end
        end
        ACK: begin
          sda_oe <= 0;
          if (stretch_cycles != 0) begin
            scl_oe <= 1; stretch_cnt <= stretch_cycles; n_stretch++;
          end
          if (rw) begin
            sh <= mem[ptr]; sda_oe <= !mem[ptr][7]; cnt <= 0; st <= TX_BYTE;
          end else begin
            cnt <= 0; st <= RX_BYTE;
          end
        end
        TX_BYTE: if (cnt == 8) begin
          sda_oe <= 0; st <= RACK; n_rd_bytes++; ptr <= ptr + 1;
        end else begin
          sda_oe <= !sh[7 - cnt];
        end
        RACK: if (mack) begin
          sh <= mem[ptr]; sda_oe <= !mem[ptr][7]; cnt <= 0; st <= TX_BYTE;
        end else begin
          st <= IDLE;
        end
        default: ;
      endcase
    end
  end

endmodule

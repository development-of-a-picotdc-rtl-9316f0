// i2c_master_fsm: I2C master logic driving SCL and SDA for one transfer at
// a time.
//
// A write transfer (start_wr) sends START, the 7-bit device address with
// R/W = 0, one data byte taken from the TX FIFO, and STOP. A read transfer
// (start_rd, rd_len bytes) sends START, the address with R/W = 1, then
// clocks in rd_len bytes, pushing each into the RX FIFO; the master
// acknowledges every byte but the last, which it leaves unacknowledged
// before STOP. A slave that does not acknowledge the address or the data
// byte ends the transfer with STOP and sets ack_err (sticky until the next
// transfer starts). This frame set is general enough for the LIROC's
// three-frame register access and for the PicoTDC's register access, which
// are built in software from single transfers.
//
// Timing from the prescaler register: scl_len is the length of each SCL
// half period (low and high) in clock cycles; data_setup is the number of
// cycles after SCL falls at which SDA changes. SDA is sampled on the last
// cycle of each SCL high phase. Lines are open drain: scl_oe / sda_oe high
// pull the line low; sda_i is the line level. No clock stretching.
// Synchronous active-high reset.
module i2c_master_fsm (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] scl_len,
  input  logic [15:0] data_setup,
  input  logic [6:0]  dev_addr,
  input  logic        start_wr,
  input  logic        start_rd,
  input  logic [8:0]  rd_len,
  // TX FIFO (first word fall through)
  input  logic [7:0]  tx_data,
  input  logic        tx_empty,
  output logic        tx_pop,
  // RX FIFO
  output logic [7:0]  rx_data,
  output logic        rx_push,
  // status
  output logic        busy,
  output logic        ack_err,
  // I2C lines
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_i
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_LOW, S_HIGH, S_STOP1, S_STOP2, S_STOP3} state_e;
  state_e state;

  logic [15:0] tcnt;
  logic [8:0]  shreg;       // 8 bits + acknowledge slot, MSB first
  logic [3:0]  bitn;        // 0..8 within the byte
  logic        reading;     // transfer is a read
  logic        in_data;     // past the address byte
  logic        rx_byte;     // current byte is received from the slave
  logic [8:0]  left;        // bytes still to read
  logic        sda_q;       // level to drive (1 = release)
  logic        scl_q;

  assign scl_oe = !scl_q;
  assign sda_oe = !sda_q;
  assign busy   = (state != S_IDLE);

  logic half_done;
  assign half_done = (tcnt == scl_len - 16'd1) || (scl_len == 16'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      tcnt    <= '0;
      shreg   <= '1;
      bitn    <= '0;
      reading <= 1'b0;
      in_data <= 1'b0;
      rx_byte <= 1'b0;
      left    <= '0;
      sda_q   <= 1'b1;
      scl_q   <= 1'b1;
      ack_err <= 1'b0;
      tx_pop  <= 1'b0;
      rx_push <= 1'b0;
      rx_data <= '0;
    end else begin
      tx_pop  <= 1'b0;
      rx_push <= 1'b0;
      case (state)
        S_IDLE: begin
          scl_q <= 1'b1;
          sda_q <= 1'b1;
          tcnt  <= '0;
          if (start_rd || (start_wr && !tx_empty)) begin
            reading <= start_rd;
            left    <= rd_len;
            ack_err <= 1'b0;
            in_data <= 1'b0;
            rx_byte <= 1'b0;
            shreg   <= {dev_addr, start_rd, 1'b1};
            bitn    <= '0;
            state   <= S_START;
          end
        end
        // SDA falls while SCL is high; after a half period SCL falls.
        S_START: begin
          sda_q <= 1'b0;
          tcnt  <= tcnt + 1'b1;
          if (half_done) begin
            tcnt  <= '0;
            scl_q <= 1'b0;
            state <= S_LOW;
          end
        end
        S_LOW: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == data_setup) sda_q <= shreg[8];
          if (half_done) begin
            tcnt  <= '0;
            scl_q <= 1'b1;
            state <= S_HIGH;
          end
        end
        S_HIGH: begin
          tcnt <= tcnt + 1'b1;
          if (half_done) begin
            tcnt  <= '0;
            scl_q <= 1'b0;
            shreg <= {shreg[7:0], sda_i};
            if (bitn != 4'd8) begin
              bitn  <= bitn + 1'b1;
              state <= S_LOW;
            end else begin
              // acknowledge slot sampled
              bitn <= '0;
              if (!rx_byte && sda_i) begin
                ack_err <= 1'b1;              // slave did not acknowledge
                state   <= S_STOP1;
              end else if (rx_byte) begin
                rx_data <= shreg[7:0];
                rx_push <= 1'b1;
                left    <= left - 1'b1;
                if (left == 9'd1) begin
                  state <= S_STOP1;
                end else begin
                  shreg <= {8'hFF, left == 9'd2};   // release; ACK unless next is last
                  state <= S_LOW;
                end
              end else if (!in_data) begin
                in_data <= 1'b1;
                if (reading) begin
                  if (left == 9'd0) begin
                    state <= S_STOP1;
                  end else begin
                    rx_byte <= 1'b1;
                    shreg   <= {8'hFF, left == 9'd1};
                    state   <= S_LOW;
                  end
                end else begin
                  shreg  <= {tx_data, 1'b1};
                  tx_pop <= 1'b1;
                  state  <= S_LOW;
                end
              end else begin
                state <= S_STOP1;             // written byte acknowledged
              end
            end
          end
        end
        // STOP: SDA low while SCL low, SCL rises, then SDA rises.
        S_STOP1: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == data_setup) sda_q <= 1'b0;
          if (half_done) begin
            tcnt  <= '0;
            scl_q <= 1'b1;
            state <= S_STOP2;
          end
        end
        S_STOP2: begin
          tcnt <= tcnt + 1'b1;
          if (half_done) begin
            tcnt  <= '0;
            sda_q <= 1'b1;
            state <= S_STOP3;
          end
        end
        S_STOP3: begin
          tcnt <= tcnt + 1'b1;
          if (half_done) begin
            tcnt  <= '0;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

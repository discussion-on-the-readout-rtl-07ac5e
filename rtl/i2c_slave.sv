// i2c_slave: I2C target (slave) for the slow-control bus, 7-bit address.
//
// SCL and SDA are sampled with the system clock through two-flop
// synchronisers (the 100 MHz clock oversamples the 400 kHz bus); START and
// STOP are SDA edges while SCL is high, data are sampled on SCL rising edges
// and SDA is changed only after SCL falling edges.  Bytes go MSB first and
// each is followed by an acknowledge bit.
// Transactions (register map in slow_ctrl_regs):
//   write: S addr+W A reg A data A [data A ...] P
//          every data byte is written to the same register (streaming)
//   read:  S addr+W A reg A Sr addr+R A data A/N ... P
//          the same register is read again while the master acknowledges
// wr_stb pulses for one clock after a data byte has been received.  The
// slave never stretches SCL.  sda_oe = 1 pulls SDA low through the external
// open-drain / tri-state pad.
module i2c_slave #(
  parameter logic [6:0] ADDR = 7'h2A
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       sda_oe,
  output logic [7:0] reg_addr,
  output logic       wr_stb,
  output logic [7:0] wr_data,
  input  logic [7:0] rd_data
);

  typedef enum logic [2:0] {
    ST_IDLE, ST_ADDR, ST_REG, ST_WDATA, ST_ACK, ST_RDATA, ST_RACK
  } i2c_state_e;

  i2c_state_e state, next_after_ack;
  logic [1:0] scl_s, sda_s;
  logic       scl_q, sda_q;
  logic [7:0] sr, tx;
  logic [3:0] bitcnt;
  logic       scl_rise, scl_fall, start_c, stop_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 2'b11; sda_s <= 2'b11; scl_q <= 1'b1; sda_q <= 1'b1;
    end else begin
      scl_s <= {scl_s[0], scl_i};
      sda_s <= {sda_s[0], sda_i};
      scl_q <= scl_s[1];
      sda_q <= sda_s[1];
    end
  end

  assign scl_rise = scl_s[1] && !scl_q;
  assign scl_fall = !scl_s[1] && scl_q;
  assign start_c  = scl_s[1] && scl_q && !sda_s[1] && sda_q;
  assign stop_c   = scl_s[1] && scl_q && sda_s[1] && !sda_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE; next_after_ack <= ST_IDLE;
      sr <= '0; tx <= '0; bitcnt <= '0; sda_oe <= 1'b0;
      reg_addr <= '0; wr_stb <= 1'b0; wr_data <= '0;
    end else begin
      wr_stb <= 1'b0;
      if (start_c) begin
        state <= ST_ADDR; bitcnt <= '0; sda_oe <= 1'b0;
      end else if (stop_c) begin
        state <= ST_IDLE; sda_oe <= 1'b0;
      end else if (scl_rise) begin
        unique case (state)
          ST_ADDR, ST_REG, ST_WDATA: begin
            sr <= {sr[6:0], sda_s[1]};
            bitcnt <= bitcnt + 1'b1;
          end
          ST_RDATA: bitcnt <= bitcnt + 1'b1;
          ST_RACK:  if (sda_s[1]) next_after_ack <= ST_IDLE;  // NACK: done
                    else          next_after_ack <= ST_RDATA;
          default: ;
        endcase
      end else if (scl_fall) begin
        unique case (state)
          ST_ADDR: if (bitcnt == 8) begin
            if (sr[7:1] == ADDR) begin
              sda_oe <= 1'b1;
              state  <= ST_ACK;
              next_after_ack <= sr[0] ? ST_RDATA : ST_REG;
            end else state <= ST_IDLE;
          end
          ST_REG: if (bitcnt == 8) begin
            reg_addr <= sr; sda_oe <= 1'b1;
            state <= ST_ACK; next_after_ack <= ST_WDATA;
          end
          ST_WDATA: if (bitcnt == 8) begin
            wr_data <= sr; wr_stb <= 1'b1; sda_oe <= 1'b1;
            state <= ST_ACK; next_after_ack <= ST_WDATA;
          end
          ST_ACK, ST_RACK: begin
            bitcnt <= '0;
            state  <= next_after_ack;
            if (next_after_ack == ST_RDATA) begin
              tx     <= {rd_data[6:0], 1'b0};
              sda_oe <= !rd_data[7];
            end else sda_oe <= 1'b0;
          end
          ST_RDATA: if (bitcnt == 8) begin
            sda_oe <= 1'b0;
            state  <= ST_RACK;
          end else begin
            sda_oe <= !tx[7];
            tx     <= {tx[6:0], 1'b0};
          end
          default: ;
        endcase
      end
    end
  end

endmodule

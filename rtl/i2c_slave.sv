// i2c_slave: I2C configuration port of the TDS (10-bit addressing,
// single-byte read and write).
//
// SCL and SDA are sampled with the chip clock (two-stage synchroniser),
// so the clock must be much faster than SCL (the port runs at 100 kb/s to
// 1 Mb/s). The TDS never drives SCL; it pulls SDA low (sda_oe = 1) to
// acknowledge and to send read data. One transfer is three bytes, each
// followed by an acknowledge bit:
//   byte 1 (master): 1 1 1 1 0 A9 A8 R/W
//   byte 2 (master): A7 .. A0
//   byte 3: data, from the master (write) or from the TDS (read)
// A9..A7 must equal chip_id (wired on the board); A6..A0 is the register
// address. Byte 1 with another prefix, or byte 2 for another chip, is not
// acknowledged and the port waits for the next START. A write gives one
// wr_en strobe with reg_addr/wr_data; a read sends rd_data, which must be
// valid from the acknowledge of byte 2 on (it is taken at that SCL fall).
// A STOP or a new START always returns to the address phase.
//
// 10-bit addressing, the 3-bit chip ID + 7-bit register split, the three
// bytes and single-byte access are the TDS's; the placement of A9..A8 in
// byte 1 follows the I2C 10-bit address format, and reading without a
// repeated START is this design's reading of the three-byte format.
module i2c_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] chip_id,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,
  output logic [6:0] reg_addr,
  output logic       wr_en,
  output logic [7:0] wr_data,
  input  logic [7:0] rd_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_ADDR1, S_ACK1, S_ADDR2, S_ACK2, S_WDATA, S_ACK3, S_RDATA, S_RACK
  } state_t;

  state_t     state;
  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_det, stop_det;
  logic [7:0] sh;
  logic [2:0] cnt;
  logic       got;     // 8 bits of the current byte received
  logic       rw;
  logic [1:0] a98;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= 3'b111;
      sda_s <= 3'b111;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end

  assign scl_rise  = (scl_s[2:1] == 2'b01);
  assign scl_fall  = (scl_s[2:1] == 2'b10);
  assign start_det = scl_s[2] && scl_s[1] && (sda_s[2:1] == 2'b10);
  assign stop_det  = scl_s[2] && scl_s[1] && (sda_s[2:1] == 2'b01);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sh       <= '0;
      cnt      <= '0;
      got      <= 1'b0;
      rw       <= 1'b0;
      a98      <= '0;
      sda_oe   <= 1'b0;
      reg_addr <= '0;
      wr_en    <= 1'b0;
      wr_data  <= '0;
    end else begin
      wr_en <= 1'b0;
      if (start_det) begin
        state  <= S_ADDR1;
        cnt    <= '0;
        got    <= 1'b0;
        sda_oe <= 1'b0;
      end else if (stop_det) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_ADDR1, S_ADDR2, S_WDATA: begin
            if (scl_rise) begin
              sh  <= {sh[6:0], sda_s[1]};
              cnt <= cnt + 3'd1;
              if (cnt == 3'd7) got <= 1'b1;
            end else if (scl_fall && got) begin
              got <= 1'b0;
              cnt <= '0;
              if (state == S_ADDR1) begin
                if (sh[7:3] == 5'b11110) begin
                  rw     <= sh[0];
                  a98    <= sh[2:1];
                  sda_oe <= 1'b1;
                  state  <= S_ACK1;
                end else begin
                  state <= S_IDLE;
                end
              end else if (state == S_ADDR2) begin
                if ({a98, sh[7]} == chip_id) begin
                  reg_addr <= sh[6:0];
                  sda_oe   <= 1'b1;
                  state    <= S_ACK2;
                end else begin
                  state <= S_IDLE;
                end
              end else begin
                wr_data <= sh;
                wr_en   <= 1'b1;
                sda_oe  <= 1'b1;
                state   <= S_ACK3;
              end
            end
          end
          S_ACK1: if (scl_fall) begin
            sda_oe <= 1'b0;
            state  <= S_ADDR2;
          end
          S_ACK2: if (scl_fall) begin
            if (rw) begin
              sh     <= rd_data;
              sda_oe <= ~rd_data[7];
              cnt    <= '0;
              state  <= S_RDATA;
            end else begin
              sda_oe <= 1'b0;
              state  <= S_WDATA;
            end
          end
          S_ACK3: if (scl_fall) begin
            sda_oe <= 1'b0;
            state  <= S_IDLE;
          end
          S_RDATA: if (scl_fall) begin
            if (cnt == 3'd7) begin
              sda_oe <= 1'b0;
              state  <= S_RACK;
            end else begin
              cnt    <= cnt + 3'd1;
              sda_oe <= ~sh[6];
              sh     <= {sh[6:0], 1'b0};
            end
          end
          S_RACK: if (scl_fall) state <= S_IDLE;
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule

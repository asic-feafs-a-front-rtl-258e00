// i2c_slave: serial slow-control interface (I2C slave, 7-bit address).
//
// SCL and SDA are sampled by the system clock (the LHC clock, far faster than
// the I2C bit rate) through two-flip-flop synchronisers; START, STOP and the
// SCL edges are detected on the sampled lines. The slave drives SDA only low
// (sda_oe = 1 pulls the open-drain line down).
// Transactions, register pointer auto-incremented after every data byte:
//   write: S  addr+W  A  ptr  A  data  A  data  A ... P
//   read : S  addr+W  A  ptr  A  Sr  addr+R  A  data  A ... data  N  P
// Every received data byte gives a one-cycle reg_wr pulse with reg_addr =
// the pointer; reg_rdata is sampled at the SCL falling edge that starts a read
// byte. An address that is not DEV_ADDR is not acknowledged. The document
// only names an I2C interface; the protocol details, the pointer scheme and
// the default address are this design's choices.
module i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda_i,
  output logic       sda_oe,
  output logic [7:0] reg_addr,
  output logic       reg_wr,
  output logic [7:0] reg_wdata,
  input  logic [7:0] reg_rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_ACK_ADDR, S_REG, S_ACK_REG, S_WR, S_ACK_WR, S_RD
  } state_e;

  logic [2:0] scl_sr, sda_sr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      scl_sr <= 3'b111;
      sda_sr <= 3'b111;
    end else begin
      scl_sr <= {scl_sr[1:0], scl};
      sda_sr <= {sda_sr[1:0], sda_i};
    end

  logic scl_s, sda_s, scl_rise, scl_fall, start_c, stop_c;
  assign scl_s    = scl_sr[1];
  assign sda_s    = sda_sr[1];
  assign scl_rise =  scl_sr[1] & ~scl_sr[2];
  assign scl_fall = ~scl_sr[1] &  scl_sr[2];
  assign start_c  = scl_s & scl_sr[2] & ~sda_sr[1] &  sda_sr[2];
  assign stop_c   = scl_s & scl_sr[2] &  sda_sr[1] & ~sda_sr[2];

  state_e     state;
  logic [7:0] sh;
  logic [3:0] cnt;
  logic       rw, rd_ack_phase, nack;

  assign reg_wdata = sh;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state        <= S_IDLE;
      sh           <= '0;
      cnt          <= '0;
      rw           <= 1'b0;
      rd_ack_phase <= 1'b0;
      nack         <= 1'b0;
      sda_oe       <= 1'b0;
      reg_addr     <= '0;
      reg_wr       <= 1'b0;
    end else begin
      reg_wr <= 1'b0;
      if (start_c) begin
        state  <= S_ADDR;
        cnt    <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ADDR, S_REG, S_WR: begin
            if (scl_rise) begin
              sh  <= {sh[6:0], sda_s};
              cnt <= cnt + 4'd1;
            end else if (scl_fall && cnt == 4'd8) begin
              cnt <= '0;
              if (state == S_ADDR) begin
                if (sh[7:1] == DEV_ADDR) begin
                  rw     <= sh[0];
                  sda_oe <= 1'b1;
                  state  <= S_ACK_ADDR;
                end else begin
                  state  <= S_IDLE;
                end
              end else if (state == S_REG) begin
                reg_addr <= sh;
                sda_oe   <= 1'b1;
                state    <= S_ACK_REG;
              end else begin
                reg_wr   <= 1'b1;
                sda_oe   <= 1'b1;
                state    <= S_ACK_WR;
              end
            end
          end
          S_ACK_ADDR: if (scl_fall) begin
            cnt <= '0;
            if (rw) begin
              sh           <= reg_rdata;
              sda_oe       <= ~reg_rdata[7];
              rd_ack_phase <= 1'b0;
              state        <= S_RD;
            end else begin
              sda_oe <= 1'b0;
              state  <= S_REG;
            end
          end
          S_ACK_REG: if (scl_fall) begin
            sda_oe <= 1'b0;
            state  <= S_WR;
          end
          S_ACK_WR: if (scl_fall) begin
            sda_oe   <= 1'b0;
            reg_addr <= reg_addr + 8'd1;
            state    <= S_WR;
          end
          S_RD: begin
            if (!rd_ack_phase) begin
              if (scl_fall) begin
                if (cnt == 4'd7) begin
                  sda_oe       <= 1'b0;
                  rd_ack_phase <= 1'b1;
                  reg_addr     <= reg_addr + 8'd1;
                end else begin
                  sh     <= {sh[6:0], 1'b0};
                  sda_oe <= ~sh[6];
                  cnt    <= cnt + 4'd1;
                end
              end
            end else begin
              if (scl_rise) nack <= sda_s;
              else if (scl_fall) begin
                if (nack) begin
                  state <= S_IDLE;
                end else begin
                  sh           <= reg_rdata;
                  sda_oe       <= ~reg_rdata[7];
                  cnt          <= '0;
                  rd_ack_phase <= 1'b0;
                end
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end

endmodule

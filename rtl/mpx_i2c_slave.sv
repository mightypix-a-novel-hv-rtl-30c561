// I2C slave for debugging access to the register file (up to 1 Mbps, sampled
// with the 40 MHz reference clock).
//
// SCL and SDA pass two-flop synchronizers; START, STOP and SCL edges are
// detected on the synchronized levels. A transfer starts with the 7-bit
// device address DEV_ADDR and the R/W bit. In a write, the first byte sets
// the register pointer and every further byte is written to the pointed
// register, after which the pointer advances. In a read, bytes are sent from
// the pointer onward while the master acknowledges. The slave drives SDA low
// through sda_oe (open drain) for its ACKs and its zero data bits; data
// changes after SCL falls. The document only gives the interface's existence,
// speed and connection; the transaction format is the common I2C register
// access and this design's choice.
module mpx_i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h2A
) (
  input  logic       clk,       // 40 MHz
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_oe,    // 1 = pull SDA low
  output logic       reg_we,
  output logic [7:0] reg_addr,
  output logic [7:0] reg_wdata,
  input  logic [7:0] reg_rdata
);
  typedef enum logic [2:0] {I_IDLE, I_ADDR, I_ACK_ADDR, I_WR, I_ACK_WR, I_RD, I_RD_ACK} i2c_st_t;

  i2c_st_t    st;
  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start, stop;
  logic [7:0] sh, tx;
  logic [3:0] bitcnt;
  logic       rw, first, ack, inc_pend;

  assign scl_rise = scl_s[1] && !scl_s[2];
  assign scl_fall = !scl_s[1] && scl_s[2];
  assign start    = scl_s[1] && scl_s[2] && !sda_s[1] && sda_s[2];
  assign stop     = scl_s[1] && scl_s[2] && sda_s[1] && !sda_s[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1; sda_s <= '1;
      st <= I_IDLE; sh <= '0; tx <= '0; bitcnt <= '0;
      rw <= 1'b0; first <= 1'b0; ack <= 1'b0; inc_pend <= 1'b0;
      sda_oe <= 1'b0; reg_we <= 1'b0; reg_addr <= '0; reg_wdata <= '0;
    end else begin
      scl_s  <= {scl_s[1:0], scl};
      sda_s  <= {sda_s[1:0], sda};
      reg_we <= 1'b0;
      if (inc_pend) begin
        reg_addr <= reg_addr + 1'b1;
        inc_pend <= 1'b0;
      end
      if (start) begin
        st <= I_ADDR; bitcnt <= '0; sda_oe <= 1'b0;
      end else if (stop) begin
        st <= I_IDLE; sda_oe <= 1'b0;
      end else begin
        unique case (st)
          I_IDLE: ;
          I_ADDR: begin
            if (scl_rise) begin sh <= {sh[6:0], sda_s[1]}; bitcnt <= bitcnt + 1'b1; end
            if (scl_fall && bitcnt == 4'd8) begin
              if (sh[7:1] == DEV_ADDR) begin
                sda_oe <= 1'b1; rw <= sh[0]; st <= I_ACK_ADDR;
              end else st <= I_IDLE;
            end
          end
          I_ACK_ADDR: if (scl_fall) begin
            bitcnt <= '0;
            if (rw) begin
              tx <= reg_rdata; sda_oe <= !reg_rdata[7]; bitcnt <= 4'd1; st <= I_RD;
            end else begin
              sda_oe <= 1'b0; first <= 1'b1; st <= I_WR;
            end
          end
          I_WR: begin
            if (scl_rise) begin sh <= {sh[6:0], sda_s[1]}; bitcnt <= bitcnt + 1'b1; end
            if (scl_fall && bitcnt == 4'd8) begin
              sda_oe <= 1'b1;
              st     <= I_ACK_WR;
              if (first) begin
                reg_addr <= sh;
                first    <= 1'b0;
              end else begin
                reg_we    <= 1'b1;
                reg_wdata <= sh;
                inc_pend  <= 1'b1;
              end
            end
          end
          I_ACK_WR: if (scl_fall) begin
            sda_oe <= 1'b0; bitcnt <= '0; st <= I_WR;
          end
          I_RD: if (scl_fall) begin
            if (bitcnt < 4'd8) begin
              sda_oe <= !tx[3'd7 - 3'(bitcnt)];
              bitcnt <= bitcnt + 1'b1;
            end else begin
              sda_oe   <= 1'b0;
              inc_pend <= 1'b1;
              st       <= I_RD_ACK;
            end
          end
          I_RD_ACK: begin
            if (scl_rise) ack <= !sda_s[1];
            if (scl_fall) begin
              if (ack) begin
                tx <= reg_rdata; sda_oe <= !reg_rdata[7]; bitcnt <= 4'd1; st <= I_RD;
              end else st <= I_IDLE;
            end
          end
          default: st <= I_IDLE;
        endcase
      end
    end
  end

endmodule

// ECS downlink command decoder (40 MHz): executes register reads and writes
// received over the 10 Mbps 8b10b downlink and queues the reply for the uplink.
//
// Command frame (symbols from mpx_ecs_rx): K28.1 start, header byte
// {read, burst, chip_id[5:0]}, register address, then for a write the data
// byte(s), for a burst read a byte count; K28.5 (idle) ends the frame. Frames
// whose chip ID differs from this chip's are ignored, so several chips can
// share one downlink. A write stores its first data byte, or with burst set
// every data byte at consecutive addresses. A symbol error aborts the frame.
// At the end of a frame for this chip the reply is queued: K28.1, header,
// address, for reads the N register bytes (N = 1 without burst), then K28.5.
// The reply doubles as the acknowledgement of every command. The document
// gives the header contents and the acknowledge; the byte order, the framing
// symbols and the burst count are this design's choice.
module mpx_ecs_downlink (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [5:0] chip_id,
  input  logic       sym_valid,
  input  logic [7:0] sym_data,
  input  logic       sym_k,
  input  logic       sym_err,
  output logic       reg_we,
  output logic [7:0] reg_addr,
  output logic [7:0] reg_wdata,
  input  logic [7:0] reg_rdata,
  output logic       q_push,
  output logic [8:0] q_sym,      // {k, data}
  input  logic       q_full
);
  localparam logic [7:0] K281 = 8'h3C;
  localparam logic [7:0] K285 = 8'hBC;

  typedef enum logic [2:0] {E_IDLE, E_HDR, E_ADDR, E_BODY, E_SKIP, E_RESP} ecs_st_t;

  ecs_st_t    st;
  logic [7:0] hdr, addr, cnt, ptr;
  logic       first;
  logic [2:0] rstep;
  logic       eof, sof;

  assign sof = sym_valid && sym_k && sym_data == K281;
  assign eof = sym_valid && sym_k && sym_data == K285;

  assign reg_addr = ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; hdr <= '0; addr <= '0; cnt <= '0; ptr <= '0; first <= 1'b0;
      rstep <= '0; reg_we <= 1'b0; reg_wdata <= '0; q_push <= 1'b0; q_sym <= '0;
    end else begin
      reg_we <= 1'b0;
      q_push <= 1'b0;
      if (reg_we && hdr[6]) ptr <= ptr + 1'b1;
      if (st != E_RESP && sym_valid && sym_err) st <= E_IDLE;
      else unique case (st)
        E_IDLE: if (sof) st <= E_HDR;
        E_HDR:  if (sym_valid) begin
                  hdr <= sym_data;
                  st  <= (sym_k || sym_data[5:0] != chip_id) ? E_SKIP : E_ADDR;
                end
        E_ADDR: if (sym_valid) begin
                  if (sym_k) st <= E_IDLE;
                  else begin
                    addr <= sym_data; ptr <= sym_data; cnt <= 8'd1; first <= 1'b1; st <= E_BODY;
                  end
                end
        E_BODY: if (sym_valid) begin
                  if (eof) begin
                    ptr <= addr; rstep <= '0; st <= E_RESP;
                  end else if (sym_k) st <= E_IDLE;
                  else begin
                    first <= 1'b0;
                    if (hdr[7]) begin
                      if (hdr[6] && first) cnt <= sym_data;
                    end else if (first || hdr[6]) begin
                      reg_we    <= 1'b1;
                      reg_wdata <= sym_data;
                    end
                  end
                end
        E_SKIP: if (eof) st <= E_IDLE;
        E_RESP: if (!q_full && !q_push) begin
                  q_push <= 1'b1;
                  unique case (rstep)
                    3'd0: begin q_sym <= {1'b1, K281}; rstep <= 3'd1; end
                    3'd1: begin q_sym <= {1'b0, hdr};  rstep <= 3'd2; end
                    3'd2: begin q_sym <= {1'b0, addr}; rstep <= (hdr[7] && cnt != 0) ? 3'd3 : 3'd4; end
                    3'd3: begin
                      q_sym <= {1'b0, reg_rdata};
                      ptr   <= ptr + 1'b1;
                      cnt   <= cnt - 1'b1;
                      if (cnt == 8'd1) rstep <= 3'd4;
                    end
                    default: begin q_sym <= {1'b1, K285}; st <= E_IDLE; end
                  endcase
                end
        default: st <= E_IDLE;
      endcase
    end
  end

endmodule

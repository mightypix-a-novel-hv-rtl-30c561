// Link data multiplexer: builds the 32-bit frame {header, 30-bit payload}
// that is scrambled and serialized.
//
// Sources: hit data from the gearbox (header 01), an idle frame when no data
// is waiting, the time-alignment sync frame, and a PRBS-7 (x^7 + x^6 + 1)
// test sequence, 30 bits per frame (header 10 for all but data). With src =
// SRC_DATA a sync_req pulse (TFC time-alignment command) queues exactly one
// sync frame ahead of the data. The document lists the sources; header
// values, idle/sync patterns and the PRBS polynomial are this design's choice.
// frame is valid every cycle; take consumes it (and a gearbox payload, if one
// was used). Clock: 80 MHz link clock.
module mpx_data_mux
  import mpx_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  src_t               src,
  input  logic               sync_req,
  input  logic               pay_valid,
  input  logic [PAY_W-1:0]   pay_data,
  output logic               pay_ready,
  output logic [FRAME_W-1:0] frame,
  input  logic               take,
  output logic               sent_sync
);

  logic [6:0]       prbs;
  logic [PAY_W-1:0] prbs_word;
  logic [6:0]       prbs_next;
  logic             sync_pend;

  always_comb begin
    logic [6:0] s;
    s = prbs;
    for (int i = PAY_W - 1; i >= 0; i--) begin
      prbs_word[i] = s[6];
      s = {s[5:0], s[6] ^ s[5]};
    end
    prbs_next = s;
  end

  always_comb begin
    pay_ready = 1'b0;
    sent_sync = 1'b0;
    unique case (src)
      SRC_SYNC: begin frame = {HDR_CTRL, PAY_SYNC}; sent_sync = take; end
      SRC_PRBS: frame = {HDR_CTRL, prbs_word};
      default: begin
        if (sync_pend) begin
          frame     = {HDR_CTRL, PAY_SYNC};
          sent_sync = take;
        end else if (pay_valid) begin
          frame     = {HDR_DATA, pay_data};
          pay_ready = take;
        end else begin
          frame = {HDR_CTRL, PAY_IDLE};
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prbs      <= 7'h7F;
      sync_pend <= 1'b0;
    end else begin
      if (src == SRC_PRBS && take) prbs <= prbs_next;
      if (sync_req)                       sync_pend <= 1'b1;
      else if (take && src == SRC_DATA)   sync_pend <= 1'b0;
    end
  end

endmodule

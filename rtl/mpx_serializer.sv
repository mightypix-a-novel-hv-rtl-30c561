// First serializer stage: a 32-bit shift register in the 320 MHz domain that
// sends 1, 2 or 4 bits per cycle for link rates of 320, 640 or 1280 Mbps.
//
// The frame is sent most significant bit first. dout[3] is always the earliest
// bit of the cycle; with 2 bits per cycle dout[3:2] are used, with 1 bit dout[3]
// (unused bits are zero). When the last bits of a frame leave, the next frame
// is loaded from the clock-crossing FIFO (frame_rd pops it); if that FIFO is
// empty an unscrambled idle frame is sent instead. dout is registered: it
// shows the first bits of a frame one cycle after the frame is loaded.
// Rates and the shift-register principle follow the document.
module mpx_serializer
  import mpx_pkg::*;
(
  input  logic               clk,       // 320 MHz
  input  logic               rst_n,
  input  rate_t              rate,
  input  logic [FRAME_W-1:0] frame,
  input  logic               frame_empty,
  output logic               frame_rd,
  output logic [3:0]         dout
);

  logic [FRAME_W-1:0] sr;
  logic [5:0]         left;
  logic [2:0]         k;

  always_comb begin
    unique case (rate)
      RATE_640:  k = 3'd2;
      RATE_1280: k = 3'd4;
      default:   k = 3'd1;
    endcase
  end

  assign frame_rd = (left <= 6'(k)) && !frame_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= {HDR_CTRL, PAY_IDLE};
      left <= 6'(FRAME_W);
      dout <= '0;
    end else begin
      unique case (k)
        3'd4:    dout <= sr[FRAME_W-1 -: 4];
        3'd2:    dout <= {sr[FRAME_W-1 -: 2], 2'b00};
        default: dout <= {sr[FRAME_W-1], 3'b000};
      endcase
      if (left <= 6'(k)) begin
        sr   <= frame_empty ? {HDR_CTRL, PAY_IDLE} : frame;
        left <= 6'(FRAME_W);
      end else begin
        sr   <= sr << k;
        left <= left - 6'(k);
      end
    end
  end

endmodule

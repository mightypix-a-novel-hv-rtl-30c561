// One output link (the design has four): link FIFO, gearbox, data
// multiplexer, scrambler, clock crossing to 320 MHz and the serializer tree.
//
// 80 MHz part: readout words enter the link FIFO (mpx_sync_fifo), are packed
// into 30-bit payloads (mpx_gearbox), framed with a 2-bit header or replaced by
// idle, sync or PRBS frames (mpx_data_mux), scrambled (mpx_scrambler) and
// written into a small dual-clock FIFO whenever it has room, so the
// serializer always finds a frame. 320 MHz part: the shift-register
// serializer sends 1, 2 or 4 bits per cycle. For 1.28 Gbps the 4-bit word is
// split into 2-bit words at 640 MHz and sent by a DDR stage clocked at
// 640 MHz; for 640 Mbps a DDR stage at 320 MHz sends the 2 bits; for 320 Mbps
// the single bit goes out directly. tx is the serial output, first bit of a
// frame = header MSB. This chain and the rates are the document's; the clock
// crossing FIFO is this design's choice.
module mpx_link
  import mpx_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              clk80,
  input  logic              rst80_n,
  input  logic              clk320,
  input  logic              rst320_n,
  input  logic              clk640,
  input  logic              rst640_n,
  input  logic              ph320,
  input  src_t              src,
  input  rate_t             rate,
  input  logic              sync_req,
  input  logic              wr,
  input  logic [WORD_W-1:0] wdata,
  output logic              full,
  output logic              sent_sync,
  output logic              sent_data,
  output logic              tx
);

  logic              lf_empty, lf_rd;
  logic [WORD_W-1:0] lf_data;
  logic [$clog2(FIFO_DEPTH):0] lf_count;
  logic              gb_in_ready, pay_valid, pay_ready;
  logic [PAY_W-1:0]  pay_data;
  logic [FRAME_W-1:0] frame, sframe, ser_frame;
  logic              cdc_full, cdc_empty, cdc_rd, take;
  logic [3:0]        d4;
  logic [1:0]        d2;
  logic              q640, q320;
  logic              d1_q;

  mpx_sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_lfifo (
    .clk(clk80), .rst_n(rst80_n), .wr, .wdata, .full,
    .rd(lf_rd), .rdata(lf_data), .empty(lf_empty), .count(lf_count));

  assign lf_rd = gb_in_ready && !lf_empty;

  mpx_gearbox #(.IN_W(WORD_W), .OUT_W(PAY_W)) u_gb (
    .clk(clk80), .rst_n(rst80_n),
    .in_valid(!lf_empty), .in_data(lf_data), .in_ready(gb_in_ready),
    .out_valid(pay_valid), .out_data(pay_data), .out_ready(pay_ready));

  assign take = !cdc_full;

  mpx_data_mux u_mux (
    .clk(clk80), .rst_n(rst80_n), .src, .sync_req,
    .pay_valid, .pay_data, .pay_ready,
    .frame, .take, .sent_sync);

  assign sent_data = pay_ready;

  mpx_scrambler u_scr (
    .clk(clk80), .rst_n(rst80_n), .frame_in(frame), .advance(take), .frame_out(sframe));

  mpx_async_fifo #(.WIDTH(FRAME_W), .DEPTH(4)) u_cdc (
    .wclk(clk80), .wrst_n(rst80_n), .wr(take), .wdata(sframe), .full(cdc_full),
    .rclk(clk320), .rrst_n(rst320_n), .rd(cdc_rd), .rdata(ser_frame), .empty(cdc_empty));

  mpx_serializer u_ser (
    .clk(clk320), .rst_n(rst320_n), .rate,
    .frame(ser_frame), .frame_empty(cdc_empty), .frame_rd(cdc_rd), .dout(d4));

  mpx_ser_stage2 u_s2 (.clk(clk640), .rst_n(rst640_n), .ph320, .d4, .d2);

  mpx_ddr_stage u_ddr640 (.clk(clk640), .rst_n(rst640_n), .d(d2),      .q(q640));
  mpx_ddr_stage u_ddr320 (.clk(clk320), .rst_n(rst320_n), .d(d4[3:2]), .q(q320));

  always_ff @(posedge clk320 or negedge rst320_n) begin
    if (!rst320_n) d1_q <= 1'b0;
    else           d1_q <= d4[3];
  end

  always_comb begin
    unique case (rate)
      RATE_1280: tx = q640;
      RATE_640:  tx = q320;
      default:   tx = d1_q;
    endcase
  end

endmodule

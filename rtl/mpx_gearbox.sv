// Gearbox: packs the 32-bit readout words into a continuous stream of 30-bit
// frame payloads, so that a word may straddle two frames.
//
// A 62-bit buffer holds the not yet sent bits, oldest bit at the top. When it
// holds 30 or more bits, out_valid is high and out_data is the oldest 30
// bits; out_ready consumes them. A new word is accepted (in_ready) whenever the
// buffer, after this cycle's output, has room for 32 more bits. Bits left in
// the buffer wait for the next word, but not indefinitely: when bits of a
// readout word have waited FLUSH_CYC cycles with no new word offered, the
// gearbox inserts one filler word of all ones, which pushes them out. The
// rest of the filler stays in the buffer, ahead of the next word. The filler cannot be a hit (row 511 does not exist) and is
// dropped by the receiver. This bounds the latency of the last hit of a
// burst. The document says the gearbox splits data
// words longer than 30 bits into the 30-bit format (the diagram labels it
// 45:30); packing 32-bit words back to back is this design's choice.
// Clock: 80 MHz link clock. One word in and one payload out per cycle at most.
module mpx_gearbox #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 30,
  parameter int unsigned FLUSH_CYC = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_data,
  input  logic             out_ready
);
  localparam int unsigned BW = IN_W + OUT_W;
  localparam int unsigned CW = $clog2(BW + 1);

  logic [BW-1:0] sbuf, buf_after;
  logic [CW-1:0] cnt, cnt_after;
  logic          take_out, fill, has_data;
  logic [$clog2(FLUSH_CYC+1)-1:0] wait_cnt;  // idle cycles with a word waiting

  assign out_valid = (cnt >= CW'(OUT_W));
  assign out_data  = sbuf[BW-1 -: OUT_W];
  assign take_out  = out_valid && out_ready;
  assign buf_after = take_out ? (sbuf << OUT_W) : sbuf;
  assign cnt_after = take_out ? cnt - CW'(OUT_W) : cnt;
  assign in_ready  = (cnt_after <= CW'(OUT_W));

  localparam int unsigned WW = $clog2(FLUSH_CYC + 1);
  assign fill = !in_valid && in_ready && has_data && cnt_after != '0 && wait_cnt == WW'(FLUSH_CYC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_cnt <= '0;
      has_data <= 1'b0;
    end else begin
      if (in_valid && in_ready)         has_data <= 1'b1;
      else if (fill || cnt_after == '0) has_data <= 1'b0;
      if (in_valid || !has_data || fill || cnt_after == '0) wait_cnt <= '0;
      else if (wait_cnt != WW'(FLUSH_CYC))                   wait_cnt <= wait_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sbuf <= '0;
      cnt  <= '0;
    end else if ((in_valid || fill) && in_ready) begin
      sbuf <= buf_after | ({(fill ? {IN_W{1'b1}} : in_data), {OUT_W{1'b0}}} >> cnt_after);
      cnt  <= cnt_after + CW'(IN_W);
    end else begin
      sbuf <= buf_after;
      cnt  <= cnt_after;
    end
  end

endmodule

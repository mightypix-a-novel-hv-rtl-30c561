// Parallel multiplicative (self-synchronizing) scrambler for the 30-bit frame
// payloads; the 2-bit header passes unscrambled.
//
// Over the continuous stream of payload bits, oldest bit first (bit 29 of a
// payload), each output bit is s[n] = d[n] ^ s[n-39] ^ s[n-58]
// (polynomial x^58 + x^39 + 1). All 30 bits of a frame are computed in one
// cycle from the 58 previously sent scrambled bits. The document calls for a
// parallel multiplicative scrambler; the polynomial is this design's choice.
// A receiver descrambles with d[n] = s[n] ^ s[n-39] ^ s[n-58] and needs no
// seed. Combinational output; advance (frame accepted) updates the history.
module mpx_scrambler
  import mpx_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [FRAME_W-1:0] frame_in,
  input  logic               advance,
  output logic [FRAME_W-1:0] frame_out
);

  logic [57:0] hist, hist_next;   // hist[0] is the most recent scrambled bit

  always_comb begin
    logic [57:0] h;
    h = hist;
    frame_out[FRAME_W-1 -: 2] = frame_in[FRAME_W-1 -: 2];
    for (int i = PAY_W - 1; i >= 0; i--) begin
      frame_out[i] = frame_in[i] ^ h[38] ^ h[57];
      h = {h[56:0], frame_out[i]};
    end
    hist_next = h;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       hist <= '0;
    else if (advance) hist <= hist_next;
  end

endmodule

// Testbench-only receiver for one serial output link. It samples tx on the
// rising (and, with both_edges, also the falling) edges of sclk, which the
// testbench places in the middle of each bit. analyze() finds the frame
// boundary from the 2-bit headers (01 data, 10 control), descrambles the
// payload stream with x^58 + x^39 + 1, counts sync frames and cuts the data
// payloads, in order, back into 32-bit readout words, dropping the
// all-ones filler words the gearbox inserts to flush a partial word. Payload bits left
// over after the last complete word are kept in `leftover`; a testbench
// that restarts reception on the same link (for example after a rate
// change) copies them into `carry` of the next receiver, because the link
// packs words across frames without regard to such restarts.
module mpx_tb_serial_rx (
  input logic sclk,
  input logic both_edges,
  input logic en,
  input logic tx
);
  import mpx_pkg::*;
  bit          bits [$];
  logic [31:0] words [$];
  int          n_sync, n_data_frames, n_frames, offset, n_fill;
  bit          carry [$], leftover [$];

  always @(posedge sclk) if (en) bits.push_back(tx);
  always @(negedge sclk) if (en && both_edges) bits.push_back(tx);

  function automatic void analyze();
    int best;
    bit pay [$], hist [$], dbits [$];
    words.delete();
    dbits = carry;
    n_sync = 0; n_fill = 0; n_data_frames = 0; n_frames = 0; offset = -1;
    for (int off = 0; off < 32 && offset < 0; off++) begin
      int good, tot;
      good = 0; tot = 0;
      for (int f = 4; off + 32 * f + 32 <= bits.size(); f++) begin
        bit h1, h0;
        h1 = bits[off + 32 * f]; h0 = bits[off + 32 * f + 1];
        tot++;
        if (h1 != h0) good++;
      end
      if (tot > 8 && good == tot) offset = off;
    end
    if (offset < 0) return;
    for (int f = 0; offset + 32 * f + 32 <= bits.size(); f++) begin
      int base;
      bit is_data;
      logic [PAY_W-1:0] p;
      base = offset + 32 * f;
      is_data = !bits[base] && bits[base + 1];
      for (int i = 0; i < PAY_W; i++) begin
        bit s, a, b;
        s = bits[base + 2 + i];
        a = (hist.size() >= 39) ? hist[hist.size() - 39] : 1'b0;
        b = (hist.size() >= 58) ? hist[hist.size() - 58] : 1'b0;
        hist.push_back(s);
        p[PAY_W - 1 - i] = s ^ a ^ b;
      end
      n_frames++;
      if (f >= 2 && !is_data && p == PAY_SYNC) n_sync++;
      if (is_data) begin
        n_data_frames++;
        for (int i = PAY_W - 1; i >= 0; i--) dbits.push_back(p[i]);
      end
    end
    for (int w = 0; 32 * w + 32 <= dbits.size(); w++) begin
      logic [31:0] v;
      for (int i = 0; i < 32; i++) v[31 - i] = dbits[32 * w + i];
      if (v != '1) words.push_back(v); else n_fill++;
    end
    leftover.delete();
    for (int i = 32 * (dbits.size() / 32); i < dbits.size(); i++) leftover.push_back(dbits[i]);
  endfunction
endmodule

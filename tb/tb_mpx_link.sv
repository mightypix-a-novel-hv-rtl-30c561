// Testbench for mpx_link at 320 Mbps, 640 Mbps and 1.28 Gbps. Clocks come
// from mpx_clock_gen as on chip. Random readout words are written into the
// link; a bit-level receiver (mpx_tb_serial_rx) recovers them from tx after
// framing, scrambling, serialization, the second stage and the DDR stage.
// Checked per rate: every word arrives intact and in order, sync requests
// produce sync frames, and the link carries one 32-bit frame per 32 bit
// times (frame count against elapsed time).
`timescale 1ps/1ps
module tb_mpx_link;
  import mpx_pkg::*;
  int checks = 0, failures = 0;
  logic vco = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #780 vco = ~vco;
  logic c320, c106, c80, c40, ph, r640, r320, r106, r80;
  mpx_clock_gen cg (.clk_vco(vco), .rst_n, .clk_320(c320), .clk_106(c106), .clk_80(c80),
    .clk_fb40(c40), .ph320(ph), .rst_640_n(r640), .rst_320_n(r320), .rst_106_n(r106), .rst_80_n(r80));

  rate_t rate = RATE_1280;
  logic sync_req = 0, wr = 0, full, sent_sync, sent_data, tx;
  logic [WORD_W-1:0] wdata = '0;
  mpx_link dut (.clk80(c80), .rst80_n(r80), .clk320(c320), .rst320_n(r320), .clk640(vco), .rst640_n(r640),
    .ph320(ph), .src(SRC_DATA), .rate, .sync_req, .wr, .wdata, .full, .sent_sync, .sent_data, .tx);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // sampling clock in the middle of each bit
  logic sclk = 0, both = 1, en = 0;
  always @(vco) if (rate == RATE_1280) #390 sclk = vco;
  always @(c320) if (rate == RATE_640) #780 sclk = c320;
  always @(posedge c320) if (rate == RATE_320) begin #1560 sclk = 1; #1000 sclk = 0; end
  mpx_tb_serial_rx rx (.sclk, .both_edges(both), .en, .tx);

  logic [31:0] sent [$];
  initial begin
    for (int r = 2; r >= 0; r--) begin
      int nw, nsync;
      realtime t0;
      rate = rate_t'(r); both = (r != 0);
      rst_n = 0; en = 0; sent.delete(); rx.bits.delete();
      #20000 rst_n = 1;
      repeat (20) @(posedge c80);
      en = 1; t0 = $realtime;
      nw = (r == 2) ? 150 : (r == 1) ? 75 : 40;
      for (int i = 0; i < nw; i++) begin
        @(posedge c80); #10;
        while (full) begin @(posedge c80); #10; end
        wr = 1; wdata = $urandom; sent.push_back(wdata);
        if (i == nw / 2) sync_req = 1;
        @(posedge c80); #10 wr = 0; sync_req = 0;
        repeat ($urandom % 6) @(posedge c80);
      end
      repeat (400 << (2 - r)) @(posedge c80);
      en = 0;
      rx.analyze();
      check(rx.offset >= 0, $sformatf("rate %0d: frame alignment found", r));
      nsync = rx.n_sync;
      check(nsync == 1, $sformatf("rate %0d: one sync frame (%0d)", r, nsync));
      check(rx.words.size() >= nw - 1, $sformatf("rate %0d: words received %0d of %0d", r, rx.words.size(), nw));
      for (int i = 0; i < rx.words.size() && i < sent.size(); i++)
        if (rx.words[i] != sent[i]) begin check(0, $sformatf("rate %0d: word %0d %h != %h", r, i, rx.words[i], sent[i])); break; end
      // bit rate: bits collected over the enabled time
      begin
        real expected;
        expected = ($realtime - t0) / (1560.0 * 2.0 / real'(1 << r));
        check(rx.bits.size() > expected * 0.99 && rx.bits.size() < expected * 1.01,
              $sformatf("rate %0d: %0d bits, %0.0f expected", r, rx.bits.size(), expected));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

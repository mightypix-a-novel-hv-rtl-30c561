// Testbench for mpx_readout_mux in the four modes 4:4, 4:3, 4:2 and 4:1.
// Four source FIFO models hold tagged words; every word must reach link
// (source mod n) exactly once and in source order, unused links stay silent,
// a full link is not written, and sources sharing a link alternate.
`timescale 1ns/1ps
module tb_mpx_readout_mux;
  import mpx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #6.25 clk = ~clk;

  logic [1:0] nl = 0;
  logic [3:0] s_empty, s_rd, d_full, d_wr;
  logic [3:0][WORD_W-1:0] s_data, d_data;

  mpx_readout_mux dut (.clk, .rst_n, .n_links_m1(nl), .src_empty(s_empty), .src_data(s_data),
    .src_rd(s_rd), .dst_full(d_full), .dst_wr(d_wr), .dst_data(d_data));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  int head [4], left [4], nexp [4];
  int last_src [4];
  int alternations;
  always_comb for (int s = 0; s < 4; s++) begin
    s_empty[s] = (left[s] == 0);
    s_data[s]  = WORD_W'((s << 16) | head[s]);
  end
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 4; l++) if (d_wr[l]) begin
      int s, n;
      s = int'(d_data[l] >> 16);
      n = int'(nl) + 1;
      check(!d_full[l], "no write into a full link");
      check(l < n && (s % n) == l, $sformatf("source %0d on link %0d with %0d links", s, l, n));
      check((d_data[l] & 16'hFFFF) == 32'(nexp[s]), "source order");
      nexp[s]++;
      if (last_src[l] >= 0 && last_src[l] != s) alternations++;
      last_src[l] = s;
    end
    for (int s = 0; s < 4; s++) if (s_rd[s]) begin
      check(left[s] > 0, "no read of an empty source");
      head[s] <= head[s] + 1; left[s] <= left[s] - 1;
    end
    d_full <= 4'($urandom) & 4'($urandom);
  end

  initial begin
    for (int mode = 0; mode < 4; mode++) begin
      rst_n = 0; nl = 2'(3 - mode);
      for (int s = 0; s < 4; s++) begin head[s] = 0; nexp[s] = 0; left[s] = 20; last_src[s] = -1; end
      alternations = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      repeat (200) @(posedge clk);
      for (int s = 0; s < 4; s++) check(nexp[s] == 20, $sformatf("mode 4:%0d all words of source %0d", 4 - mode, s));
      if (mode > 0) check(alternations > 10, "shared link alternates between sources");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

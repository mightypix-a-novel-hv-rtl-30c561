// Hit-rate test of mpx_top at full size (122 columns x 388 rows, default
// parameters). Poisson-distributed hits at 35 MHz/cm2 over the whole matrix,
// each a comparator pulse of 2 us (a worst-case time over threshold), for
// 20 us, with the default configuration (4 links at 1.28 Gbps). The matrix
// area is taken as 4.30 cm2 (pixels of 55 um x 165 um), which gives one hit
// every 6.65 ns. A pulse that starts while the pixel's comparator is still
// high merges with it and is not a new hit.
// Checked: every word written into a group FIFO belongs to an injected hit
// with its ToA within 6 counts of the leading edge; at least 99 % of the hits
// are read out; no hit takes longer than the 12.8 us ToA range from its
// leading edge to the FIFO; and every word written into the FIFOs arrives on
// the four serial links. Efficiency and mean and maximum readout time are
// printed.
`timescale 1ps/1ps
module tb_mpx_top_rate;
  import mpx_pkg::*;
  localparam int NROWS = 388;
  localparam int NCOLS = 122;
  localparam int OFFA[4] = '{0, 31, 62, 92};
  localparam real MEAN_DT_PS = 6650.0;
  localparam time TOT = 2000000;

  int checks = 0, failures = 0;
  logic vco = 0, ck_ref = 0, ck_ts = 0, rst_n = 1;
  always #780   vco = ~vco;
  always #12500 ck_ref = ~ck_ref;
  always #1563  ck_ts = ~ck_ts;
  initial #1 rst_n = 0;

  logic [NCOLS-1:0][NROWS-1:0] comp = '0;
  logic sda_oe, ecs_up_out, calib, fe_rst, fb40;
  logic [3:0] tx;

  mpx_top dut (
    .clk_vco(vco), .ck_ref, .ck_ts, .rst_n, .clk_fb40(fb40), .comp_in(comp), .tfc_in(1'b0),
    .scl(1'b1), .sda(1'b1), .sda_oe, .ecs_dn(1'b0), .ecs_up_in(1'b0), .ecs_up_out,
    .calib_pulse(calib), .fe_reset(fe_rst), .tx);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  function automatic int g2b(input logic [11:0] gv);
    logic [11:0] b;
    b[11] = gv[11];
    for (int i = 10; i >= 0; i--) b[i] = b[i+1] ^ gv[i];
    return int'(b);
  endfunction

  // pending hits per pixel key {group, col, row}: ToA and time of the leading edge
  typedef struct { int toa; time t; } pend_t;
  pend_t pend [int][$];
  int n_hits = 0, n_read = 0, n_bad = 0, n_fifo = 0;
  real sum_lat = 0.0, max_lat = 0.0;

  function automatic int key(input int g, input int c, input int r);
    return (g << 16) | (c << 9) | r;
  endfunction

  for (genvar g = 0; g < 4; g++) begin : g_mon
    always @(posedge dut.clk_106) if (dut.g_grp[g].fwr && !dut.g_grp[g].ffull) begin
      word_t w;
      int k;
      w = dut.g_grp[g].fdata;
      k = key(int'(w.grp), int'(w.hit.col), int'(w.hit.row));
      n_fifo++;
      if (pend.exists(k) && pend[k].size() > 0) begin
        pend_t p;
        int d;
        real lat;
        p = pend[k].pop_front();
        d = (g2b(w.hit.toa) - p.toa + 4096) % 4096;
        if (d > 6) n_bad++;
        lat = real'($time - p.t) / 1.0e6;
        sum_lat += lat;
        if (lat > max_lat) max_lat = lat;
        n_read++;
      end else n_bad++;
    end
  end

  logic sA = 0, enA = 0;
  always @(vco) #390 sA = vco;
  mpx_tb_serial_rx rx0 (.sclk(sA), .both_edges(1'b1), .en(enA), .tx(tx[0]));
  mpx_tb_serial_rx rx1 (.sclk(sA), .both_edges(1'b1), .en(enA), .tx(tx[1]));
  mpx_tb_serial_rx rx2 (.sclk(sA), .both_edges(1'b1), .en(enA), .tx(tx[2]));
  mpx_tb_serial_rx rx3 (.sclk(sA), .both_edges(1'b1), .en(enA), .tx(tx[3]));

  task automatic hit(input int c, input int r);
    int g;
    g = (c >= OFFA[3]) ? 3 : (c >= OFFA[2]) ? 2 : (c >= OFFA[1]) ? 1 : 0;
    if (comp[c][r]) return;                 // comparator still high: merges
    comp[c][r] = 1;
    pend[key(g, c - OFFA[g], r)].push_back('{int'(dut.u_bx.toa_bin), $time});
    n_hits++;
    fork
      automatic int cc = c, rr = r;
      begin #TOT comp[cc][rr] = 0; end
    join_none
  endtask

  initial begin
    time t_end;
    int n_link;
    #50000 rst_n = 1;
    #3000000;
    enA = 1;
    #1000000;
    t_end = $time + 64'd20000000;
    while ($time < t_end) begin
      real u;
      u = (real'($urandom) + 1.0) / 4294967297.0;
      #(time'(-MEAN_DT_PS * $ln(u)));
      hit($urandom % NCOLS, $urandom % NROWS);
    end
    #25000000;
    enA = 0;
    rx0.analyze(); rx1.analyze(); rx2.analyze(); rx3.analyze();
    n_link = rx0.words.size() + rx1.words.size() + rx2.words.size() + rx3.words.size();
    $display("hits %0d, read %0d (efficiency %0.2f %%), wrong words %0d, readout time mean %0.2f us max %0.2f us, words on links %0d",
             n_hits, n_read, 100.0 * n_read / n_hits, n_bad, sum_lat / n_read, max_lat, n_link);
    check(n_hits > 2500, "about 3000 hits injected");
    check(n_bad == 0, "every FIFO word is an injected hit with the right ToA");
    check(real'(n_read) >= 0.99 * n_hits, "readout efficiency at least 99 %");
    check(max_lat < 12.8, "readout time below the 12.8 us ToA range");
    check(n_link == n_fifo, $sformatf("all %0d FIFO words sent on the links (%0d)", n_fifo, n_link));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

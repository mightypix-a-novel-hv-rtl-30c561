// Testbench for mpx_top with every parameter at its default (122 columns x 388 rows).
//
// End-to-end test of mpx_top at full size. Clocks: 640 MHz VCO input, 40 MHz
// reference (asynchronous to it) and 320 MHz timestamp clock. The test
// configures the chip over I2C and ECS, sends TFC commands, injects
// comparator pulses into pixels of all four readout groups and receives the
// four serial links with a bit-level receiver (mpx_tb_serial_rx).
// Phase A runs 4 links at 1.28 Gbps (mode 4:4); phase B switches, over I2C,
// to one link at 320 Mbps (mode 4:1) and injects a burst that backs up the
// FIFOs. Every injected hit must come out exactly once with its group,
// column and row and a ToA within a few counts of the timestamp at its
// leading edge; a second pulse on a pixel still holding a hit is lost
// (pile-up). Counted mechanisms, each of which must occur: LdCol wait
// shortened by preloading, LdCol wait skipped, readout stalled by a full
// FIFO, both link modes, sync frames, ToA reset, calibration and front-end
// reset pulses, pile-up, ECS and I2C register access.
`timescale 1ps/1ps
module tb_mpx_top_full;
  import mpx_pkg::*;
  localparam int NROWS = 388, NC0 = 31, NC1 = 31, NC2 = 30, NC3 = 30;
  localparam int NCOLS = NC0 + NC1 + NC2 + NC3;
  localparam int NCA[4]  = '{NC0, NC1, NC2, NC3};
  localparam int OFFA[4] = '{0, NC0, NC0 + NC1, NC0 + NC1 + NC2};

  int checks = 0, failures = 0;
  logic vco = 0, ck_ref = 0, ck_ts = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #780   vco = ~vco;
  always #12500 ck_ref = ~ck_ref;
  always #1563  ck_ts = ~ck_ts;

  logic [NCOLS-1:0][NROWS-1:0] comp = '0;
  logic tfc_in = 0, scl = 1, sda_m = 1, sda_oe, ecs_dn = 0, ecs_up_out, calib, fe_rst, fb40;
  logic [3:0] tx;
  wire sda = sda_m & !sda_oe;

  mpx_top dut (
    .clk_vco(vco), .ck_ref, .ck_ts, .rst_n, .clk_fb40(fb40), .comp_in(comp), .tfc_in,
    .scl, .sda, .sda_oe, .ecs_dn, .ecs_up_in(1'b0), .ecs_up_out,
    .calib_pulse(calib), .fe_reset(fe_rst), .tx);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // ---------------- mechanism counters
  int n_short = 0, n_skip = 0, n_stall = 0, n_toa_rst = 0, n_cal = 0, n_fe = 0, n_pileup = 0;
  int n_ecs = 0, n_i2c = 0;
  for (genvar g = 0; g < 4; g++) begin : g_mon
    ro_state_t prev;
    int run;
    always @(posedge dut.clk_106) begin
      ro_state_t s;
      s = dut.g_grp[g].st;
      if (s == prev) run++; else begin
        if (prev == S_LDCOL1 && run < 12 && run > 1) n_short++;
        if (prev == S_LDCOL1 && run == 1) n_skip++;
        if (prev == S_RDCOL2 && run > 1) n_stall++;
        run = 1;
      end
      prev = s;
    end
  end
  always @(posedge dut.clk_320) begin n_cal += calib; n_fe += fe_rst; end

  // ---------------- TFC sender (idle unless a command is queued)
  int tfc_q [$];
  logic [7:0] code_of [64];
  initial begin
    int n; n = 0;
    for (int b = 0; b < 256 && n < 64; b++) if ($countones(8'(b)) == 4) begin code_of[n] = 8'(b); n++; end
  end
  always begin
    logic [7:0] w;
    w = (tfc_q.size() > 0) ? code_of[tfc_q.pop_front()] : code_of[0];
    for (int i = 7; i >= 0; i--) begin @(posedge dut.clk_320); #100 tfc_in = w[i]; end
  end

  // ---------------- I2C master (1 Mbps)
  localparam time Q = 250000;
  task automatic i2c_start(); sda_m = 1; #Q scl = 1; #Q sda_m = 0; #Q scl = 0; #Q; endtask
  task automatic i2c_stop();  sda_m = 0; #Q scl = 1; #Q sda_m = 1; #(2*Q); endtask
  task automatic i2c_wbit(input bit b); sda_m = b; #Q scl = 1; #(2*Q) scl = 0; #Q; endtask
  task automatic i2c_rbit(output bit b); sda_m = 1; #Q scl = 1; #Q b = sda; #Q scl = 0; #Q; endtask
  task automatic i2c_wbyte(input logic [7:0] v); bit a; for (int i = 7; i >= 0; i--) i2c_wbit(v[i]); i2c_rbit(a);
    check(!a, "I2C ACK"); endtask
  task automatic i2c_write(input logic [7:0] a, input logic [7:0] v);
    i2c_start(); i2c_wbyte({7'h2A, 1'b0}); i2c_wbyte(a); i2c_wbyte(v); i2c_stop(); n_i2c++;
  endtask
  task automatic i2c_read(input logic [7:0] a, output logic [7:0] v);
    bit b;
    i2c_start(); i2c_wbyte({7'h2A, 1'b0}); i2c_wbyte(a);
    i2c_start(); i2c_wbyte({7'h2A, 1'b1});
    for (int i = 7; i >= 0; i--) begin i2c_rbit(b); v[i] = b; end
    i2c_wbit(1); i2c_stop(); n_i2c++;
  endtask

  // ---------------- ECS downlink sender and uplink receiver
  logic ek, erd_i, erd_o; logic [7:0] ed; logic [9:0] ecode; bit rd_dn = 0;
  mpx_enc8b10b tb_enc (.k(ek), .d(ed), .rd_in(erd_i), .code(ecode), .rd_out(erd_o));
  logic [8:0] ecs_q [$];
  task automatic ecs_sym(input bit kk, input logic [7:0] v);
    ek = kk; ed = v; erd_i = rd_dn; #1000; rd_dn = erd_o;
    for (int b = 9; b >= 0; b--) begin ecs_dn = ecode[b]; #100000; end
  endtask
  always begin
    logic [8:0] s;
    s = (ecs_q.size() > 0) ? ecs_q.pop_front() : 9'h1BC;
    ecs_sym(s[8], s[7:0]);
  end
  task automatic ecs_frame(input logic [7:0] b []);
    ecs_q.push_back(9'h13C);
    foreach (b[i]) ecs_q.push_back({1'b0, b[i]});
    ecs_q.push_back(9'h1BC);
  endtask
  logic u_v, u_k, u_e, u_al; logic [7:0] u_d;
  mpx_ecs_rx tb_urx (.clk(ck_ref), .rst_n, .din(ecs_up_out), .aligned(u_al), .sym_valid(u_v),
                     .sym_data(u_d), .sym_k(u_k), .sym_err(u_e));
  logic [8:0] ecs_got [$];
  always @(posedge ck_ref) if (u_v && !u_e && !(u_k && u_d == 8'hBC)) ecs_got.push_back({u_k, u_d});

  // ---------------- link receivers: phase A (4 links, 1.28 Gbps), phase B (link 0, 320 Mbps)
  logic sA = 0, sB = 0, enA = 0, enB = 0;
  always @(vco) #390 sA = vco;
  always @(posedge dut.clk_320) begin #1560 sB = 1; #1000 sB = 0; end
  mpx_tb_serial_rx rxa0 (.sclk(sA), .both_edges(1'b1), .en(enA), .tx(tx[0]));
  mpx_tb_serial_rx rxa1 (.sclk(sA), .both_edges(1'b1), .en(enA), .tx(tx[1]));
  mpx_tb_serial_rx rxa2 (.sclk(sA), .both_edges(1'b1), .en(enA), .tx(tx[2]));
  mpx_tb_serial_rx rxa3 (.sclk(sA), .both_edges(1'b1), .en(enA), .tx(tx[3]));
  mpx_tb_serial_rx rxb0 (.sclk(sB), .both_edges(1'b0), .en(enB), .tx(tx[0]));

  // ---------------- hit injection and scoreboard
  typedef struct { int g; int c; int r; int toa; } exp_t;
  exp_t expq [$];
  bit busy [NCOLS][NROWS];
  task automatic pulse(input int g, input int c, input int r, input time w, input bit expect_hit);
    int gc;
    gc = OFFA[g] + c;
    comp[gc][r] = 1;
    if (expect_hit) expq.push_back('{g, c, r, int'(dut.u_bx.toa_bin)});
    #w comp[gc][r] = 0;
  endtask
  task automatic inject_random(input int n, input time spread);
    for (int i = 0; i < n; i++) begin
      int g, c, r;
      g = $urandom % 4; c = $urandom % NCA[g]; r = $urandom % NROWS;
      if (busy[OFFA[g] + c][r]) continue;
      busy[OFFA[g] + c][r] = 1;
      fork
        automatic int gg = g, cc = c, rr = r;
        automatic time d = time'($urandom % int'(spread / 1000)) * 1000;
        automatic time w = time'(50 + $urandom % 250) * 1000;
        begin #d pulse(gg, cc, rr, w, 1); end
      join_none
    end
  endtask

  function automatic int g2b(input logic [11:0] gv);
    logic [11:0] b;
    b[11] = gv[11];
    for (int i = 10; i >= 0; i--) b[i] = b[i+1] ^ gv[i];
    return int'(b);
  endfunction

  task automatic match_words(input logic [31:0] ws [$], input string tag);
    foreach (ws[i]) begin
      word_t w;
      int idx;
      w = ws[i];
      idx = -1;
      foreach (expq[j]) if (idx < 0 && expq[j].g == int'(w.grp) && expq[j].c == int'(w.hit.col) &&
                            expq[j].r == int'(w.hit.row)) idx = j;
      check(idx >= 0, $sformatf("%s: word %h matches an injected hit", tag, ws[i]));
      if (idx >= 0) begin
        int d;
        d = (g2b(w.hit.toa) - expq[idx].toa + 4096) % 4096;
        check(d <= 6, $sformatf("%s: ToA of group %0d column %0d row %0d within 6 counts of the leading edge (%0d, expected %0d)",
                                tag, w.grp, w.hit.col, w.hit.row, g2b(w.hit.toa), expq[idx].toa));
        expq.delete(idx);
      end
    end
  endtask

  initial begin
    logic [7:0] v;
    int nA, nB, nsync;
    #50000 rst_n = 1;
    #3000000;
    // ---- slow control
    i2c_write(8'h02, 8'h01);               // CLPEND = 1 over I2C
    i2c_read(8'h02, v);
    check(v == 8'h01, "I2C write/read back");
    i2c_read(8'h08, v);
    check(v == 8'h01, "status shows TFC lock");
    ecs_got.delete();
    ecs_frame('{8'h00, 8'h02, 8'h02});     // chip 0, write CLPEND = 2
    #12000000;
    check(ecs_got.size() == 3 && ecs_got[0] == 9'h13C && ecs_got[1] == 9'h000, "ECS write acknowledged");
    ecs_got.delete();
    ecs_frame('{8'hC0, 8'h00, 8'h04});     // burst read of registers 0..3
    #16000000;
    check(ecs_got.size() == 7 && ecs_got[3] == 9'h017 && ecs_got[4] == 9'h00B &&
          ecs_got[5] == 9'h002 && ecs_got[6] == 9'h001, "ECS burst read returns the register file");
    n_ecs = 2;
    // ---- fast control: ToA reset, calibration, front-end reset
    tfc_q.push_back(1);
    #200000;
    check(dut.u_bx.toa_bin < 12'd200, "ToA counter reset by TFC");
    n_toa_rst += (dut.u_bx.toa_bin < 12'd200);
    tfc_q.push_back(4); tfc_q.push_back(0); tfc_q.push_back(8);
    #300000;
    // ---- phase A: 4 links at 1.28 Gbps
    enA = 1;
    #2000000;
    // dense round: every column of group 0 hit at once (preload skips the wait)
    for (int c = 0; c < NCA[0]; c++) begin
      busy[OFFA[0] + c][0] = 1;
      fork automatic int cc = c; pulse(0, cc, 0, 100000, 1); join_none
    end
    #3000000;
    // pile-up: two pulses on one pixel before it can be read
    busy[OFFA[1]][1] = 1;
    pulse(1, 0, 1, 60000, 1);
    #40000;
    pulse(1, 0, 1, 60000, 0);
    n_pileup++;
    inject_random(300, 20000000);
    #5000000;
    tfc_q.push_back(2);                    // time alignment: sync frames
    #40000000;
    enA = 0;
    // ---- phase B: one link at 320 Mbps, burst
    i2c_write(8'h00, 8'h01);
    #2000000;
    enB = 1;
    #2000000;
    foreach (busy[c, r]) busy[c][r] = 0;
    inject_random(120, 500000);
    #30000000;
    enB = 0;
    // ---- analysis
    rxa0.analyze(); rxa1.analyze(); rxa2.analyze(); rxa3.analyze();
    rxb0.carry = rxa0.leftover;
    rxb0.analyze();
    nA = rxa0.words.size() + rxa1.words.size() + rxa2.words.size() + rxa3.words.size();
    nB = rxb0.words.size();
    check(rxa0.words.size() > 0 && rxa1.words.size() > 0 && rxa2.words.size() > 0 && rxa3.words.size() > 0,
          "mode 4:4: all four links carry hits");
    check(nB > 0, "mode 4:1: link 0 carries hits");
    nsync = rxa0.n_sync + rxa1.n_sync + rxa2.n_sync + rxa3.n_sync;
    check(nsync == 4, $sformatf("one sync frame per link (%0d)", nsync));
    match_words(rxa0.words, "A0"); match_words(rxa1.words, "A1");
    match_words(rxa2.words, "A2"); match_words(rxa3.words, "A3");
    match_words(rxb0.words, "B0");
    foreach (expq[i]) $display("missing: group %0d column %0d row %0d ToA %0d", expq[i].g, expq[i].c, expq[i].r, expq[i].toa);
    check(expq.size() == 0, $sformatf("every injected hit read out (%0d missing)", expq.size()));
    $display("words: phase A %0d, phase B %0d; mechanisms: preload-shortened %0d, wait-skipped %0d, FIFO-full stall %0d, pile-up %0d, sync %0d, ToA reset %0d, calib %0d, FE reset %0d, ECS %0d, I2C %0d",
             nA, nB, n_short, n_skip, n_stall, n_pileup, nsync, n_toa_rst, n_cal, n_fe, n_ecs, n_i2c);
    check(n_short > 0, "LdCol wait shortened by preloading");
    check(n_skip > 0, "LdCol wait skipped after a long read");
    check(n_stall > 0, "readout stalled by a full FIFO");
    check(n_pileup > 0, "pile-up");
    check(n_cal == 1 && n_fe == 1, "calibration and front-end reset pulses");
    check(n_ecs > 0 && n_i2c > 0, "slow control used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

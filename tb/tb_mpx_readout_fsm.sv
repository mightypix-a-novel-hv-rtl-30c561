// Testbench for mpx_readout_fsm. A small behavioural matrix stub holds a
// number of pending hits that become readable at LdPix, as the hit buffers
// do. Checked against the state graph: the LdCol1 and LdPix1 wait lengths,
// the control outputs of every state, one read per two cycles, the shortened
// LdCol1 wait after preloading (2*crd, capped at clcend), the FIFO-full stall
// and the order and content of the words written.
`timescale 1ns/1ps
module tb_mpx_readout_fsm;
  import mpx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, enable = 0;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #4.6875 clk = ~clk;

  mctrl_t ctrl;
  logic prio, fifo_wr, fifo_full;
  logic [HIT_W-1:0] bus;
  logic [WORD_W-1:0] fifo_data;
  ro_state_t st;

  mpx_readout_fsm #(.GRP_ID(2'd2)) dut (
    .clk, .rst_n, .enable, .clcend(6'd11), .clpend(6'd2),
    .ctrl, .prio, .bus_data(bus), .fifo_wr, .fifo_data, .fifo_full, .state_o(st));

  // matrix stub
  int pending = 0, avail = 0, next_val = 100;
  assign prio = (avail > 0);
  assign bus  = ctrl.rd_col ? HIT_W'(next_val) : '0;
  always @(posedge clk) begin
    if (ctrl.ld_pix) begin avail <= avail + pending; pending <= 0; end
    if (ctrl.rd_col && avail > 0) begin avail <= avail - 1; next_val <= next_val + 1; end
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // expected control outputs per state (from the state diagram)
  always @(negedge clk) if (rst_n) begin
    check(ctrl.pull_down == (st == S_PD1 || st == S_LDPIX1), "PullDown");
    check(ctrl.ld_col == (st == S_LDCOL1 || st == S_RDCOL1 || st == S_RDCOL2), "LdCol");
    check(ctrl.ld_pix == (st == S_LDPIX1), "LdPix");
    check(ctrl.rd_col == (st == S_RDCOL1), "RdCol");
  end

  // dwell counters
  int ldcol1_len, ldpix1_len, run;
  ro_state_t prev;
  int exp_word = 100, nwritten = 0;
  int last_wr_cycle = -1, cyc = 0, min_gap = 1000;
  always @(posedge clk) begin
    cyc++;
    prev <= st;
    if (st == prev) run <= run + 1; else run <= 1;
    if (st != prev && prev == S_LDCOL1) ldcol1_len = run;
    if (st != prev && prev == S_LDPIX1) ldpix1_len = run;
    if (fifo_wr) begin
      check(!fifo_full, "no write while full");
      check(fifo_data == {2'd2, HIT_W'(exp_word)}, "word content/order");
      exp_word++; nwritten++;
      if (last_wr_cycle >= 0 && cyc - last_wr_cycle < min_gap) min_gap = cyc - last_wr_cycle;
      last_wr_cycle = cyc;
    end
  end

  task automatic wait_state(input ro_state_t s);
    int n = 0;
    while (st != s && n < 1000) begin @(posedge clk); #1; n++; end
  endtask
  task automatic wait_leave(input ro_state_t s);
    int n = 0;
    while (st == s && n < 1000) begin @(posedge clk); #1; n++; end
  endtask

  initial begin
    fifo_full = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1 check(st == S_IDLE, "idle without enable");
    enable = 1;
    // first pass, no hits: LdCol1 dwells clc = 0..11, LdPix1 dwells clp = 0..2
    wait_state(S_PD1);  @(posedge clk); #1 check(st == S_PD2, "PD1->PD2");
    @(posedge clk); #1 check(st == S_LDCOL1, "PD2->LdCol1");
    wait_leave(S_LDCOL1); check(st == S_LDCOL2, "LdCol1->LdCol2");
    @(posedge clk); #1; check(ldcol1_len == 12, $sformatf("LdCol1 wait 12, got %0d", ldcol1_len));
    check(st == S_LDPIX1, "LdCol2->LdPix1");
    wait_leave(S_LDPIX1); @(posedge clk); #1;
    check(ldpix1_len == 3, $sformatf("LdPix1 wait 3 with no Prio, got %0d", ldpix1_len));
    // six hits: read loop, then LdCol1 starts at 2*5 = 10 -> 2 cycles
    pending = 6;
    wait_state(S_RDCOL1);
    wait_state(S_LDCOL1); wait_leave(S_LDCOL1); @(posedge clk); #1;
    check(nwritten == 6, "six words read");
    check(min_gap == 2, "one read every two cycles (53 MHz at 106.67 MHz)");
    check(ldcol1_len == 2, $sformatf("LdCol1 after 6 reads: 2 cycles, got %0d", ldcol1_len));
    // eight hits: 2*7 = 14 >= 11 -> LdCol1 left at once
    pending = 8;
    wait_state(S_RDCOL1);
    wait_state(S_LDCOL1); wait_leave(S_LDCOL1); @(posedge clk); #1;
    check(nwritten == 14, "fourteen words read");
    check(ldcol1_len == 1, $sformatf("LdCol1 after 8 reads: 1 cycle, got %0d", ldcol1_len));
    // one hit: 2*0 = 0 -> full wait of 12
    pending = 1;
    wait_state(S_RDCOL1);
    wait_state(S_LDCOL1); wait_leave(S_LDCOL1); @(posedge clk); #1;
    check(ldcol1_len == 12, $sformatf("LdCol1 after 1 read: 12 cycles, got %0d", ldcol1_len));
    // FIFO full stall: RdCol2 holds
    pending = 3;
    wait_state(S_RDCOL2);
    fifo_full = 1;
    repeat (5) begin @(posedge clk); #1 check(st == S_RDCOL2, "RdCol2 holds while FIFO full"); end
    fifo_full = 0;
    wait_state(S_LDCOL1); @(posedge clk);
    check(nwritten == 18, "all words written after stall");
    // Prio with full FIFO at LdPix2 goes back to LdCol1
    fifo_full = 1; pending = 1;
    wait_state(S_LDPIX2); @(posedge clk); #1 check(st == S_LDCOL1, "LdPix2 -> LdCol1 when FIFO full");
    fifo_full = 0;
    wait_state(S_RDCOL1); wait_state(S_LDCOL1);
    check(nwritten == 19, "word read after FIFO frees");
    enable = 0;
    repeat (3) @(posedge clk); #1 check(st == S_IDLE, "disable returns to IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

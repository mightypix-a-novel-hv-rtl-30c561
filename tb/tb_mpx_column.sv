// Testbench for the mpx_column behavioural model (8 rows). Drives comparator
// pulses and the FSM control lines by hand and checks: ToA stored at the
// leading edge and ToT at the trailing edge, pile-up loss, visibility only
// after LdPix, lowest row first, loading only with charged bitlines, the
// DR1 -> DR2 transfer at LdPix (preloading), prio, the scan chain and the bus.
`timescale 1ns/1ps
module tb_mpx_column;
  import mpx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #5 clk = ~clk;

  logic [7:0] comp = '0;
  logic [TOA_W-1:0] toa = '0;
  logic [TOT_W-1:0] tot = '0;
  mctrl_t ctrl = '0;
  logic charged = 0, scan_in = 1, scan_out, prio;
  logic [HIT_W-1:0] bus;

  mpx_column #(.NROWS(8), .COL_ID(5)) dut (
    .clk, .rst_n, .comp, .toa_ts(toa), .tot_ts(tot), .ctrl, .bl_charged(charged),
    .scan_in, .scan_out, .prio, .bus_out(bus));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic pulse(input int row, input int t_lead, input int t_trail);
    toa = TOA_W'(t_lead); comp[row] = 1; tick();
    toa = TOA_W'(t_lead + 7); tot = TOT_W'(t_trail); comp[row] = 0; tick();
  endtask
  task automatic ldpix(); ctrl = '{pull_down:1, ld_col:0, ld_pix:1, rd_col:0}; tick(); ctrl = '0; endtask
  task automatic ldcol(input bit ch); ctrl.ld_col = 1; charged = ch; tick(); ctrl.ld_col = 0; charged = 0; endtask
  function automatic logic [HIT_W-1:0] exp(input int row, input int ta, input int tt);
    hit_t h;
    h.col = 5'd5; h.row = 9'(row); h.toa = 12'(ta); h.tot = 4'(tt);
    return h;
  endfunction
  task automatic rdcol(input logic [HIT_W-1:0] e, input string msg);
    ctrl.rd_col = 1; #1; check(bus == e, msg); tick(); ctrl.rd_col = 0;
  endtask

  initial begin
    repeat (2) tick();
    rst_n = 1; tick();
    check(!prio && bus == '0 && scan_out, "empty after reset");
    pulse(5, 100, 3);
    pulse(2, 200, 9);
    // second pulse on row 5 while occupied is lost
    pulse(5, 300, 1);
    // not yet visible: LdCol with charged lines loads nothing
    ldcol(1); ldpix();
    check(!prio, "nothing in EoC before first LdPix");
    // uncharged bitlines: nothing loaded
    ldcol(0); ldpix();
    check(!prio, "no load with uncharged bitlines");
    // charged: row 2 (lowest) loaded into DR1, moved to DR2 at LdPix
    ldcol(1);
    check(!prio, "prio waits for LdPix (DL3)");
    ctrl.ld_pix = 1; #1 check(prio, "prio during LdPix"); tick(); ctrl.ld_pix = 0;
    check(prio && !scan_out, "DR2 holds data, scan chain blocked");
    // preload row 5 into DR1 while DR2 is still unread
    ldcol(1);
    scan_in = 0; ctrl.rd_col = 1; #1 check(bus == '0, "no bus drive without scan token"); tick(); ctrl.rd_col = 0; scan_in = 1;
    check(prio, "data kept when not selected");
    rdcol(exp(2, 200, 9), "row 2 first with its ToA/ToT");
    check(!prio && scan_out, "DR2 released after read");
    ldpix();
    check(prio, "preloaded row 5 moved to DR2");
    rdcol(exp(5, 100, 3), "row 5 second, first pulse kept (pile-up lost)");
    ldcol(1); ldpix();
    check(!prio, "column empty at the end");
    check(bus == '0, "bus idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

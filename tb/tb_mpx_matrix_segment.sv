// Testbench for mpx_matrix_segment (4 columns x 6 rows) read out by
// mpx_readout_fsm. Random comparator pulses are injected over several rounds;
// every hit must be read exactly once, with its column, row and the ToA/ToT
// timestamps present at its edges. A scoreboard built from the stimulus is the reference.
`timescale 1ns/1ps
module tb_mpx_matrix_segment;
  import mpx_pkg::*;
  localparam int NC = 4, NR = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #4.6875 clk = ~clk;

  logic [NC-1:0][NR-1:0] comp = '0;
  logic [TOA_W-1:0] toa = '0;
  logic [TOT_W-1:0] tot = '0;
  mctrl_t ctrl;
  logic prio, fwr;
  logic [HIT_W-1:0] bus;
  logic [WORD_W-1:0] fdata;
  ro_state_t st;

  mpx_matrix_segment #(.NCOL(NC), .NROWS(NR), .T_CHARGE(11)) dut (
    .clk, .rst_n, .comp, .toa_ts(toa), .tot_ts(tot), .ctrl, .prio, .bus_data(bus));
  mpx_readout_fsm #(.GRP_ID(2'd1)) fsm (
    .clk, .rst_n, .enable(1'b1), .clcend(6'd11), .clpend(6'd2),
    .ctrl, .prio, .bus_data(bus), .fifo_wr(fwr), .fifo_data(fdata), .fifo_full(1'b0), .state_o(st));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  always @(posedge clk) begin toa <= toa + 1'b1; if (toa[2:0] == 0) tot <= tot + 1'b1; end

  logic [HIT_W-1:0] expected [$];
  int nread = 0;
  always @(posedge clk) if (fwr) begin
    int idx;
    idx = -1;
    foreach (expected[i]) if (expected[i] == fdata[HIT_W-1:0]) idx = i;
    check(fdata[WORD_W-1 -: 2] == 2'd1, "group id");
    check(idx >= 0, $sformatf("read word %h was injected", fdata));
    if (idx >= 0) expected.delete(idx);
    nread++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // choose hits: each pixel hit with probability ~1/4
      logic [NC-1:0][NR-1:0] sel;
      for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++) sel[c][r] = ($urandom % 4 == 0);
      @(posedge clk); #1;
      for (int c = 0; c < NC; c++) for (int r = 0; r < NR; r++)
        if (sel[c][r]) begin
          hit_t h;
          h.col = 5'(c); h.row = 9'(r); h.toa = toa; h.tot = '0;
          expected.push_back(h);
        end
      comp = sel;
      repeat (1 + $urandom % 5) @(posedge clk);
      #1;
      foreach (expected[i]) expected[i][TOT_W-1:0] = tot;  // trailing edge now
      comp = '0;
      repeat (150) @(posedge clk);
      check(expected.size() == 0, $sformatf("round %0d: all hits read (%0d left)", round, expected.size()));
      expected.delete();
    end
    check(nread > 10, "hits were read");
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

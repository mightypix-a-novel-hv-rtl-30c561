// Testbench for mpx_sync_fifo: random writes and reads against a reference
// queue; checks order, content, count, full at the depth and empty.
`timescale 1ns/1ps
module tb_mpx_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #6.25 clk = ~clk;
  logic wr = 0, rd = 0, full, empty;
  logic [15:0] wdata = 0, rdata;
  logic [3:0] count;
  mpx_sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.clk, .rst_n, .wr, .wdata, .full, .rd, .rdata, .empty, .count);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [15:0] q [$];
  int phase = 0;
  always @(posedge clk) if (rst_n) begin
    check(count == 4'(q.size()), "count");
    check(full == (q.size() == 8) && empty == (q.size() == 0), "full/empty flags");
    if (rd && !empty) check(rdata == q.pop_front(), "order and content");
    if (wr && !full) q.push_back(wdata);
    wr <= (phase == 0) ? ($urandom % 4 != 0) : (phase == 1) ? ($urandom % 4 == 0) : ($urandom % 2 == 0);
    rd <= (phase == 0) ? ($urandom % 4 == 0) : (phase == 1) ? ($urandom % 4 != 0) : ($urandom % 2 == 0);
    wdata <= 16'($urandom);
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6; i++) begin phase = i % 3; repeat (100) @(posedge clk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

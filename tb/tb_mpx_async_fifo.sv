// Testbench for mpx_async_fifo: 106.67 MHz writer, 80 MHz reader, random
// write and read enables. A queue is the reference: every word must arrive
// once, in order; full and empty must never let a word be lost or invented,
// and the FIFO must fill to its depth when the reader stops.
`timescale 1ns/1ps
module tb_mpx_async_fifo;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #4.6875 wclk = ~wclk;
  always #6.25   rclk = ~rclk;
  logic wr = 0, rd = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  mpx_async_fifo #(.WIDTH(32), .DEPTH(8)) dut (.wclk, .wrst_n(rst_n), .wr, .wdata, .full,
    .rclk, .rrst_n(rst_n), .rd, .rdata, .empty);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [31:0] q [$];
  int nwr = 0, nrd = 0, maxfill = 0;
  bit rd_en = 1;
  always @(posedge wclk) if (rst_n) begin
    if (wr && !full) begin q.push_back(wdata); nwr++; end
    if (q.size() > maxfill) maxfill = q.size();
    wr <= ($urandom % 3 != 0) && nwr < 400;
    wdata <= $urandom;
  end
  always @(posedge rclk) if (rst_n) begin
    if (rd && !empty) begin
      check(q.size() > 0, "no word invented");
      if (q.size() > 0) check(rdata == q.pop_front(), "order and content");
      nrd++;
    end
    rd <= rd_en && ($urandom % 2 == 0);
  end

  initial begin
    repeat (3) @(posedge rclk);
    rst_n = 1;
    repeat (300) @(posedge rclk);
    rd_en = 0;
    repeat (60) @(posedge rclk);
    check(maxfill == 8, $sformatf("fills to depth 8 (max %0d)", maxfill));
    rd_en = 1;
    repeat (2000) @(posedge rclk);
    check(nwr == 400 && nrd == 400, $sformatf("all words through (%0d/%0d)", nwr, nrd));
    check(empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

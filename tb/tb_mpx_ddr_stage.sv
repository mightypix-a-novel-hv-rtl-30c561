// Testbench for mpx_ddr_stage: random 2-bit words at every rising edge; the
// output, sampled in the middle of each half period, must show d[1] while
// the clock is high and d[0] while it is low, one cycle after the word is
// taken.
`timescale 1ps/1ps
module tb_mpx_ddr_stage;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #800 clk = ~clk;
  logic [1:0] d = 0, dq;
  logic q;
  mpx_ddr_stage dut (.clk, .rst_n, .d, .q);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #100 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      dq = d;             // word taken at this edge
      #100 d = 2'($urandom);
      #300 check(q == dq[1], "first bit while clock high");
      #800 check(q == dq[0], "second bit while clock low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

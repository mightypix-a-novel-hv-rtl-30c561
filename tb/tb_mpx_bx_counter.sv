// Testbench for mpx_bx_counter (ToT divider 8): after decoding the Gray
// outputs, ToA must count every cycle and wrap after 4096 cycles (12.8 us at
// 320 MHz), ToT must advance every 8 cycles, only one Gray bit may change per
// step, and toa_reset must clear both.
`timescale 1ps/1ps
module tb_mpx_bx_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, toa_reset = 0;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #1562 clk = ~clk;
  logic [11:0] tg, tb_;
  logic [3:0] og;
  mpx_bx_counter #(.TOT_DIV(8)) dut (.clk, .rst_n, .toa_reset, .toa_gray(tg), .tot_gray(og), .toa_bin(tb_));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask
  function automatic int g2b(input logic [11:0] g);
    logic [11:0] b;
    b[11] = g[11];
    for (int i = 10; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return int'(b);
  endfunction

  int cyc = 0, wraps = 0;
  logic [11:0] tg_q;
  logic [3:0] og_q;
  initial begin
    repeat (2) @(posedge clk);
    #10 rst_n = 1;
    @(posedge clk); #10; tg_q = tg; og_q = og;
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk); #10; cyc++;
      check(g2b(tg) == ((g2b(tg_q) + 1) % 4096), "ToA counts by one");
      check($countones(tg ^ tg_q) == 1, "one Gray bit per step");
      if (g2b(tg) == 0) wraps++;
      if (og != og_q) check(g2b({8'b0, og}) == (g2b({8'b0, og_q}) + 1) % 16 && (g2b(tg) % 8) == 0, "ToT every 8 ToA counts");
      tg_q = tg; og_q = og;
    end
    check(wraps == 1, "wraps after 4096 counts");
    toa_reset = 1; @(posedge clk); #10 toa_reset = 0;
    check(tg == 0 && og == 0 && tb_ == 0, "toa_reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for mpx_ser_stage2: a 320 MHz register (clocked by a divided
// 640 MHz clock, as on chip) presents random 4-bit words; at the 640 MHz edge
// in the middle of a 320 MHz period the output must take bits 3:2 of the word,
// and at the next edge bits 1:0.
`timescale 1ps/1ps
module tb_mpx_ser_stage2;
  int checks = 0, failures = 0;
  logic clk640 = 0, clk320 = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #781 clk640 = ~clk640;
  always @(posedge clk640) clk320 <= ~clk320;
  logic [3:0] d4 = 0;
  logic [1:0] d2;
  mpx_ser_stage2 dut (.clk(clk640), .rst_n, .ph320(clk320), .d4, .d2);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [1:0] held = '0;
  int n = 0;
  always @(posedge clk320) d4 <= 4'($urandom);
  always @(posedge clk640) begin
    logic ph_pre;
    logic [3:0] d4_pre;
    ph_pre = clk320;  // values just before the edge
    d4_pre = d4;
    #10;
    if (rst_n) begin
      if (ph_pre) check(d2 == d4_pre[3:2], "upper pair first");
      else        check(d2 == held, "lower pair second");
      n++;
    end
    if (ph_pre) held = d4_pre[1:0];
  end

  initial begin
    repeat (4) @(posedge clk640);
    rst_n = 1;
    repeat (400) @(posedge clk640);
    check(n > 380, $sformatf("output words seen (%0d)", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

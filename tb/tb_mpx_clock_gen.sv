// Testbench for mpx_clock_gen: from a 640 MHz input, measures the periods of
// the generated clocks (320, 106.67, 80 and 40 MHz), the 50 % duty cycle of
// the /6 clock, and checks that each domain reset is released only after
// the chip reset rises and is asserted at once when it falls.
`timescale 1ps/1ps
module tb_mpx_clock_gen;
  int checks = 0, failures = 0;
  logic vco = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #780 vco = ~vco;   // 1560 ps period
  logic c320, c106, c80, c40, ph, r640, r320, r106, r80;
  mpx_clock_gen dut (.clk_vco(vco), .rst_n, .clk_320(c320), .clk_106(c106), .clk_80(c80),
    .clk_fb40(c40), .ph320(ph), .rst_640_n(r640), .rst_320_n(r320), .rst_106_n(r106), .rst_80_n(r80));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  realtime t320[$], t106[$], t80[$], t40[$], f106[$];
  always @(posedge c320) t320.push_back($realtime);
  always @(posedge c106) t106.push_back($realtime);
  always @(negedge c106) f106.push_back($realtime);
  always @(posedge c80)  t80.push_back($realtime);
  always @(posedge c40)  t40.push_back($realtime);

  initial begin
    #5000;
    check(!r640 && !r320 && !r106 && !r80, "domains held in reset");
    rst_n = 1;
    #100000;
    check(r640 && r320 && r106 && r80, "domains released");
    check(t320[$] - t320[$-1] == 2 * 1560, "320 MHz = VCO/2");
    check(t106[$] - t106[$-1] == 6 * 1560, "106.67 MHz = VCO/6");
    check(t80[$]  - t80[$-1]  == 8 * 1560, "80 MHz = VCO/8");
    check(t40[$]  - t40[$-1]  == 16 * 1560, "40 MHz = VCO/16");
    check(f106[$] - t106[$] == 3 * 1560 || t106[$] - f106[$] == 3 * 1560, "106.67 MHz duty 50 %");
    check(ph == c320, "ph320 follows the 320 MHz clock");
    rst_n = 0; #1;
    check(!r640 && !r320 && !r106 && !r80, "asynchronous reset assertion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

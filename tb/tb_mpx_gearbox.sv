// Testbench for mpx_gearbox: random 32-bit words with random back-pressure
// on both sides. The concatenation of all 30-bit payloads must equal the
// concatenation of the input words (as far as complete payloads exist), and
// at full rate close to one payload leaves per cycle. When the input stops
// with part of a word in the buffer, a filler word of all ones must push it
// out.
`timescale 1ns/1ps
module tb_mpx_gearbox;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #6.25 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data = 0;
  logic [29:0] out_data;
  mpx_gearbox dut (.clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  bit inbits [$], outbits [$];
  int nin = 0, nout = 0, limit = 300;
  bit random_mode = 1;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      for (int i = 31; i >= 0; i--) inbits.push_back(in_data[i]);
      nin++;
    end
    if (out_valid && out_ready) begin
      for (int i = 29; i >= 0; i--) outbits.push_back(out_data[i]);
      nout++;
    end
    if (!in_valid || in_ready) begin
      in_valid <= (nin + (in_valid && in_ready) < limit) && (random_mode ? ($urandom % 3 != 0) : 1'b1);
      in_data  <= $urandom;
    end
    out_ready <= random_mode ? ($urandom % 2 == 0) : 1'b1;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2000) @(posedge clk);
    check(nin == 300, "all words accepted");
    check(nout == 320, $sformatf("300 words give 320 payloads, got %0d", nout));
    for (int i = 0; i < outbits.size(); i++) if (outbits[i] != inbits[i]) begin
      check(0, $sformatf("bit %0d differs", i)); break;
    end
    check(outbits.size() == 9600, "payload bit count");
    // full rate: about one payload per cycle
    random_mode = 0; limit = 340;
    begin
      int n0;
      n0 = nout;
      repeat (32) @(posedge clk);
      check(nout - n0 >= 30, $sformatf("one payload per cycle at full rate (%0d)", nout - n0));
    end
    // 340 words leave 8 bits of a word in the buffer: they must be flushed
    repeat (100) @(posedge clk);
    check(nin == 340, "input stopped after 340 words");
    check(outbits.size() > inbits.size() && outbits.size() < inbits.size() + 32,
          $sformatf("partial word flushed by a filler (%0d of %0d bits out)", outbits.size(), inbits.size()));
    begin
      bit ok;
      ok = 1;
      for (int i = 0; i < outbits.size(); i++)
        if (outbits[i] != ((i < inbits.size()) ? inbits[i] : 1'b1)) ok = 0;
      check(ok, "payloads are the words followed by filler ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

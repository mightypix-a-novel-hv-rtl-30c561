// Testbench for mpx_scrambler: random frames are scrambled; a bit-serial
// reference scrambler (x^58 + x^39 + 1) must give the same bits, a
// bit-serial descrambler must recover the payloads, and the header must pass
// unchanged. Frames not accepted (advance low) must not change the state.
`timescale 1ns/1ps
module tb_mpx_scrambler;
  import mpx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #6.25 clk = ~clk;
  logic [FRAME_W-1:0] fin = '0, fout;
  logic adv = 0;
  mpx_scrambler dut (.clk, .rst_n, .frame_in(fin), .advance(adv), .frame_out(fout));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  bit sbits [$];   // scrambled history, reference
  bit dhist [$];   // descrambler history
  function automatic bit sref(input bit d);
    bit s, a, b;
    a = (sbits.size() >= 39) ? sbits[sbits.size() - 39] : 1'b0;
    b = (sbits.size() >= 58) ? sbits[sbits.size() - 58] : 1'b0;
    s = d ^ a ^ b;
    sbits.push_back(s);
    return s;
  endfunction
  function automatic bit dref(input bit s);
    bit a, b;
    a = (dhist.size() >= 39) ? dhist[dhist.size() - 39] : 1'b0;
    b = (dhist.size() >= 58) ? dhist[dhist.size() - 58] : 1'b0;
    dhist.push_back(s);
    return s ^ a ^ b;
  endfunction

  initial begin
    logic [FRAME_W-1:0] e;
    logic [PAY_W-1:0] rec;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      fin = $urandom; adv = ($urandom % 4 != 0);
      #1;
      check(fout[31:30] == fin[31:30], "header unscrambled");
      if (adv) begin
        e[31:30] = fin[31:30];
        for (int b = PAY_W - 1; b >= 0; b--) e[b] = sref(fin[b]);
        check(fout == e, "matches serial reference");
        for (int b = PAY_W - 1; b >= 0; b--) rec[b] = dref(fout[b]);
        check(rec == fin[PAY_W-1:0], "descrambles");
      end
      @(posedge clk); #1;
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

// Testbench for mpx_rr_arbiter (4 requesters). A reference model keeps the
// last granted index and picks the first requester after it; checked on
// random request patterns, plus the rotation 0,1,2,3,0 with all requesting.
`timescale 1ns/1ps
module tb_mpx_rr_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #5 clk = ~clk;
  logic [3:0] req = '0, gnt;
  logic [1:0] idx;
  logic adv = 1;
  mpx_rr_arbiter #(.N(4)) dut (.clk, .rst_n, .req, .advance(adv), .gnt, .gnt_idx(idx));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  int last = 3;
  function automatic int model(input logic [3:0] r);
    for (int k = 1; k <= 4; k++) if (r[(last + k) % 4]) return (last + k) % 4;
    return -1;
  endfunction

  initial begin
    int e;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    req = 4'hF;
    for (int i = 0; i < 8; i++) begin
      #1 check(idx == 2'(i % 4) && gnt == 4'(1 << (i % 4)), $sformatf("rotation with all requesting i=%0d idx=%0d gnt=%b last=%0d", i, idx, gnt, dut.last));
      last = i % 4;
      @(posedge clk);
    end
    for (int i = 0; i < 300; i++) begin
      #1 req = 4'($urandom); adv = ($urandom % 4 != 0);
      #1 e = model(req);
      if (e < 0) check(gnt == '0, "no grant without request");
      else check(gnt == 4'(1 << e) && idx == 2'(e), "grant matches model");
      if (e >= 0 && adv) last = e;
      @(posedge clk);
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

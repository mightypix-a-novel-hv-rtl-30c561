// Testbench for mpx_data_mux: data frames carry the gearbox payload with
// header 01, idle frames fill gaps, a sync request inserts exactly one sync
// frame, SRC_SYNC sends only sync frames, and SRC_PRBS sends a PRBS-7
// sequence that is compared with an independent bit-serial LFSR.
`timescale 1ns/1ps
module tb_mpx_data_mux;
  import mpx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #6.25 clk = ~clk;
  src_t src = SRC_DATA;
  logic sync_req = 0, pay_valid = 0, pay_ready, take = 0, sent_sync;
  logic [PAY_W-1:0] pay_data = '0;
  logic [FRAME_W-1:0] frame;
  mpx_data_mux dut (.clk, .rst_n, .src, .sync_req, .pay_valid, .pay_data, .pay_ready, .frame, .take, .sent_sync);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [6:0] lfsr = 7'h7F;
  function automatic logic [PAY_W-1:0] ref_prbs();
    logic [PAY_W-1:0] w;
    for (int i = PAY_W - 1; i >= 0; i--) begin
      w[i] = lfsr[6];
      lfsr = {lfsr[5:0], lfsr[6] ^ lfsr[5]};
    end
    return w;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1; take = 1;
    #1 check(frame == {HDR_CTRL, PAY_IDLE} && !pay_ready, "idle frame when no data");
    pay_valid = 1; pay_data = 30'h1234567;
    #1 check(frame == {HDR_DATA, 30'h1234567} && pay_ready, "data frame");
    take = 0; #1 check(!pay_ready, "payload not consumed without take");
    take = 1;
    @(posedge clk); #1 sync_req = 1; @(posedge clk); #1 sync_req = 0;
    check(frame == {HDR_CTRL, PAY_SYNC} && !pay_ready && sent_sync, "sync frame inserted ahead of data");
    @(posedge clk); #1 check(frame == {HDR_DATA, 30'h1234567}, "data resumes after one sync frame");
    src = SRC_SYNC; #1 check(frame == {HDR_CTRL, PAY_SYNC} && !pay_ready, "SRC_SYNC");
    src = SRC_PRBS;
    for (int i = 0; i < 40; i++) begin
      #1 check(frame == {HDR_CTRL, ref_prbs()}, "PRBS-7 payload");
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

// Testbench for mpx_tfc. An independent encoder builds the 6b8b table (the
// v-th byte with four ones) and sends idle words and commands bit-serially.
// Checked: lock on the idle word at an arbitrary bit offset, each command
// bit producing its own pulse exactly once, every codeword balanced, a single
// bit error reported and not executed, loss of lock after repeated errors and
// relock (three errors in a row are tolerated), and a flipped bit in one copy of the triplicated lock state being
// outvoted.
`timescale 1ps/1ps
module tb_mpx_tfc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, din = 0;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #1562 clk = ~clk;
  logic locked, err, c_toa, c_sync, c_cal, c_fe;
  mpx_tfc dut (.clk, .rst_n, .din, .locked, .code_err(err), .cmd_toa_reset(c_toa),
               .cmd_sync(c_sync), .cmd_calib(c_cal), .cmd_fe_reset(c_fe));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [7:0] code_of [64];
  int n_toa = 0, n_sync = 0, n_cal = 0, n_fe = 0, n_err = 0;
  always @(posedge clk) begin
    n_toa += c_toa; n_sync += c_sync; n_cal += c_cal; n_fe += c_fe; n_err += err;
  end

  task automatic send_bits(input logic [7:0] w);
    for (int i = 7; i >= 0; i--) begin din = w[i]; @(posedge clk); #10; end
  endtask
  task automatic send(input int v); send_bits(code_of[v]); endtask

  initial begin
    int n;
    n = 0;
    for (int b = 0; b < 256 && n < 64; b++) if ($countones(8'(b)) == 4) begin code_of[n] = 8'(b); n++; end
    check(code_of[0] == 8'h0F, "idle codeword");
    repeat (2) @(posedge clk);
    #10 rst_n = 1;
    // bit offset 3, then idles
    for (int i = 0; i < 3; i++) begin din = 1; @(posedge clk); #10; end
    check(!locked, "not locked before idle");
    repeat (4) send(0);
    check(locked, "locked on idle");
    send(1); send(0);
    check(n_toa == 1 && n_sync == 0 && n_cal == 0 && n_fe == 0, "value 1: ToA reset only");
    send(2); send(0);
    check(n_toa == 1 && n_sync == 1 && n_cal == 0 && n_fe == 0, "value 2: sync only");
    send(4); send(0);
    check(n_toa == 1 && n_sync == 1 && n_cal == 1 && n_fe == 0, "value 4: calibration only");
    send(8); send(0);
    check(n_toa == 1 && n_sync == 1 && n_cal == 1 && n_fe == 1, "value 8: front-end reset only");
    send(15); repeat (3) send(0);
    check(n_toa == 2 && n_sync == 2 && n_cal == 2 && n_fe == 2, "one pulse per command bit");
    check(n_err == 0, "no errors on clean stream");
    // single bit error on a ToA-reset command
    send_bits(code_of[1] ^ 8'h10); send(0); send(0);
    check(n_err == 1 && n_toa == 2, "single-bit error detected, command dropped");
    // upset one copy of the lock state: still locked, commands still work
    dut.u_lock.r[1] = 1'b0;
    send(1); send(0);
    check(locked && n_toa == 3, "TMR outvotes a single upset");
    // three errors in a row keep the lock, four drop it
    repeat (3) send_bits(8'hFF);
    send(0);
    check(locked, "lock kept after three errors");
    repeat (4) send_bits(8'hFF);
    repeat (2) @(posedge clk); #10;
    check(!locked, "lock lost after repeated errors");
    repeat (3) send(0);
    check(locked, "relocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

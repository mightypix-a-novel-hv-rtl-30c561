// Testbench for the ECS interface (mpx_ecs: oversampling receiver, command
// decoder and daisy-chain uplink) with a register array behind it. The
// downlink is driven 8b10b-coded at a bit period 0.5 % off the nominal
// 100 ns, so the receiver must track the phase. The uplink is decoded by a
// second receiver. Checked: single write, foreign chip ID ignored, burst
// write, burst read returning the written bytes, the reply (acknowledge)
// format, a symbol error aborting a frame, and a frame from the previous
// chip forwarded unchanged.
`timescale 1ns/1ps
module tb_mpx_ecs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #12.5 clk = ~clk;
  logic dn = 0, upin = 0, upout;
  logic we;
  logic [7:0] addr, wdata;
  logic [7:0] regs [256];
  always @(posedge clk) if (we) regs[addr] <= wdata;
  mpx_ecs dut (.clk, .rst_n, .chip_id(6'd5), .dn_in(dn), .up_in(upin), .up_out(upout),
               .reg_we(we), .reg_addr(addr), .reg_wdata(wdata), .reg_rdata(regs[addr]));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // transmit side: encoder shared by the two tb senders (one at a time)
  logic ek, erd_i, erd_o;
  logic [7:0] ed;
  logic [9:0] ecode;
  mpx_enc8b10b tx_enc (.k(ek), .d(ed), .rd_in(erd_i), .code(ecode), .rd_out(erd_o));
  bit rd_dn = 0, rd_up = 0;
  task automatic send_sym(input bit chain, input bit kk, input logic [7:0] v, input bit corrupt = 0);
    logic [9:0] c;
    ek = kk; ed = v; erd_i = chain ? rd_up : rd_dn; #1;
    c = ecode;
    if (corrupt) c[9:4] = 6'b111111;
    if (chain) rd_up = erd_o; else rd_dn = erd_o;
    for (int b = 9; b >= 0; b--) begin
      if (chain) upin = c[b]; else dn = c[b];
      #100.5;
    end
  endtask
  task automatic idle(input bit chain, input int n); repeat (n) send_sym(chain, 1, 8'hBC); endtask
  task automatic frame(input bit chain, input logic [7:0] b [], input int bad = -1);
    send_sym(chain, 1, 8'h3C);
    foreach (b[i]) send_sym(chain, 0, b[i], i == bad);
    send_sym(chain, 1, 8'hBC);
  endtask

  // uplink decoder
  logic r_v, r_k, r_e, r_al;
  logic [7:0] r_d;
  mpx_ecs_rx up_rx (.clk, .rst_n, .din(upout), .aligned(r_al), .sym_valid(r_v), .sym_data(r_d), .sym_k(r_k), .sym_err(r_e));
  logic [8:0] got [$];
  bit infr = 0;
  always @(posedge clk) if (r_v && !r_e) begin
    if ({r_k, r_d} == 9'h13C) infr = 1;
    if (infr) got.push_back({r_k, r_d});
    if ({r_k, r_d} == 9'h1BC) infr = 0;
  end
  task automatic expect_reply(input logic [8:0] e [], input string msg);
    bit ok;
    ok = (got.size() == e.size());
    if (ok) foreach (e[i]) if (got[i] != e[i]) ok = 0;
    check(ok, $sformatf("%s (%0d symbols)", msg, got.size()));
    got.delete();
  endtask

  initial begin
    foreach (regs[i]) regs[i] = 8'(i);
    repeat (4) @(posedge clk);
    rst_n = 1;
    fork idle(0, 4); idle(1, 4); join
    // single write
    frame(0, '{8'h05, 8'h03, 8'h42, 8'h43}); idle(0, 8);
    check(regs[3] == 8'h42 && regs[4] == 8'h04, "single write stores first byte only");
    expect_reply('{9'h13C, 9'h005, 9'h003, 9'h1BC}, "write acknowledge");
    // other chip
    frame(0, '{8'h07, 8'h03, 8'h99}); idle(0, 8);
    check(regs[3] == 8'h42, "foreign chip ID ignored");
    expect_reply('{}, "no reply to foreign frame");
    // burst write
    frame(0, '{8'h45, 8'h10, 8'hA1, 8'hA2, 8'hA3}); idle(0, 8);
    check(regs[16] == 8'hA1 && regs[17] == 8'hA2 && regs[18] == 8'hA3, "burst write");
    got.delete();
    // burst read of 4
    frame(0, '{8'hC5, 8'h0F, 8'h04}); idle(0, 12);
    expect_reply('{9'h13C, 9'h0C5, 9'h00F, 9'h00F, 9'h0A1, 9'h0A2, 9'h0A3, 9'h1BC}, "burst read reply");
    // single read
    frame(0, '{8'h85, 8'h03}); idle(0, 8);
    expect_reply('{9'h13C, 9'h085, 9'h003, 9'h042, 9'h1BC}, "single read reply");
    // corrupted symbol aborts
    frame(0, '{8'h05, 8'h20, 8'h77}, 2); idle(0, 8);
    check(regs[32] == 8'h20, "frame with symbol error not executed");
    expect_reply('{}, "no reply to corrupt frame");
    // daisy chain forwarding
    idle(1, 3);  // links idle with K28.5 between frames
    frame(1, '{8'h11, 8'h22, 8'h33}); idle(1, 10);
    expect_reply('{9'h13C, 9'h011, 9'h022, 9'h033, 9'h1BC}, "chain frame forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

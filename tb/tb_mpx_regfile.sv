// Testbench for mpx_regfile: reset defaults, writes and reads on both ports,
// ECS priority on a simultaneous write to the same address, read-only status
// bytes, zero for unused addresses, and repair of a single upset copy.
`timescale 1ns/1ps
module tb_mpx_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #12.5 clk = ~clk;
  logic ew = 0, iw = 0;
  logic [7:0] ea = 0, ed = 0, er, ia = 0, id = 0, ir;
  logic [7:0][7:0] cfg;
  logic [1:0][7:0] status = '{8'hA5, 8'h3C};
  mpx_regfile #(.NCFG(8), .NSTAT(2)) dut (.clk, .rst_n, .ecs_we(ew), .ecs_addr(ea), .ecs_wdata(ed), .ecs_rdata(er),
    .i2c_we(iw), .i2c_addr(ia), .i2c_wdata(id), .i2c_rdata(ir), .cfg, .status);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [7:0] model [8];
  initial begin
    model = '{8'h17, 8'd11, 8'd2, 8'h01, 0, 0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int a = 0; a < 8; a++) begin ea = 8'(a); #1 check(er == model[a] && cfg[a] == model[a], "reset default"); end
    for (int i = 0; i < 200; i++) begin
      ew = $urandom % 2; iw = $urandom % 2;
      ea = 8'($urandom % 11); ia = ($urandom % 3 == 0) ? ea : 8'($urandom % 11);
      ed = $urandom; id = $urandom;
      @(posedge clk); #1;
      if (iw && ia < 8 && !(ew && ea == ia)) model[ia] = id;
      if (ew && ea < 8) model[ea] = ed;
      ew = 0; iw = 0;
      for (int a = 0; a < 11; a++) begin
        logic [7:0] e;
        e = (a < 8) ? model[a] : (a == 8) ? 8'h3C : (a == 9) ? 8'hA5 : 8'h00;
        ea = 8'(a); ia = 8'(10 - a);
        #1 check(er == e, "ECS read");
        e = (10 - a < 8) ? model[10 - a] : (10 - a == 8) ? 8'h3C : (10 - a == 9) ? 8'hA5 : 8'h00;
        check(ir == e, "I2C read");
      end
    end
    dut.g_reg[1].u_reg.r[2] = 8'hFF;
    #1 check(cfg[1] == model[1], "single upset outvoted");
    @(posedge clk); #1 check(dut.g_reg[1].u_reg.r[2] == model[1], "upset copy scrubbed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

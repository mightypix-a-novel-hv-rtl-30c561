// Testbench for mpx_i2c_slave at 1 Mbps with a bus-functional I2C master and
// a register array behind the slave. Checks: address ACK, NACK (no response)
// for a foreign address, pointer set and burst write, burst read with master
// ACK/NACK, and that the register array was written with the right values.
`timescale 1ns/1ps
module tb_mpx_i2c_slave;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #12.5 clk = ~clk;
  logic scl = 1, sda_m = 1, sda_oe;
  wire  sda = sda_m & !sda_oe;
  logic we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] regs [256];
  assign rdata = regs[addr];
  always @(posedge clk) if (we) regs[addr] <= wdata;
  mpx_i2c_slave #(.DEV_ADDR(7'h2A)) dut (.clk, .rst_n, .scl, .sda, .sda_oe,
    .reg_we(we), .reg_addr(addr), .reg_wdata(wdata), .reg_rdata(rdata));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  localparam time Q = 250;  // quarter bit at 1 Mbps
  task automatic start_c(); sda_m = 1; #Q scl = 1; #Q sda_m = 0; #Q scl = 0; #Q; endtask
  task automatic stop_c();  sda_m = 0; #Q scl = 1; #Q sda_m = 1; #(2*Q); endtask
  task automatic wbit(input bit b); sda_m = b; #Q scl = 1; #(2*Q) scl = 0; #Q; endtask
  task automatic rbit(output bit b); sda_m = 1; #Q scl = 1; #Q b = sda; #Q scl = 0; #Q; endtask
  task automatic wbyte(input logic [7:0] v, output bit ack);
    bit a;
    for (int i = 7; i >= 0; i--) wbit(v[i]);
    rbit(a); ack = !a;
  endtask
  task automatic rbyte(output logic [7:0] v, input bit ack);
    bit b;
    for (int i = 7; i >= 0; i--) begin rbit(b); v[i] = b; end
    wbit(!ack);
  endtask

  initial begin
    bit ack;
    logic [7:0] v;
    foreach (regs[i]) regs[i] = 8'(i ^ 8'h5A);
    repeat (4) @(posedge clk);
    rst_n = 1;
    #1000;
    // foreign address
    start_c(); wbyte({7'h11, 1'b0}, ack); stop_c();
    check(!ack, "foreign address not acknowledged");
    // write pointer 0x10, then 3 bytes
    start_c(); wbyte({7'h2A, 1'b0}, ack); check(ack, "address ACK (write)");
    wbyte(8'h10, ack); check(ack, "pointer ACK");
    wbyte(8'hC1, ack); check(ack, "data ACK");
    wbyte(8'hC2, ack); wbyte(8'hC3, ack);
    stop_c();
    #200;
    check(regs[8'h10] == 8'hC1 && regs[8'h11] == 8'hC2 && regs[8'h12] == 8'hC3, "burst write");
    check(regs[8'h13] == (8'h13 ^ 8'h5A), "no extra write");
    // set pointer 0x11, repeated start, read 3
    start_c(); wbyte({7'h2A, 1'b0}, ack); wbyte(8'h11, ack);
    start_c(); wbyte({7'h2A, 1'b1}, ack); check(ack, "address ACK (read)");
    rbyte(v, 1); check(v == 8'hC2, "read byte 1");
    rbyte(v, 1); check(v == 8'hC3, "read byte 2");
    rbyte(v, 0); check(v == (8'h13 ^ 8'h5A), "read byte 3");
    stop_c();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for mpx_serializer at all three rates. A FIFO model supplies
// random frames (sometimes running empty, when an idle frame must be sent);
// the collected output bits must equal the frames, most significant bit first,
// and a frame must leave every 32, 16 or 8 cycles for 1, 2 or 4 bits per cycle.
`timescale 1ns/1ps
module tb_mpx_serializer;
  import mpx_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so that asynchronous resets act
  always #1.5625 clk = ~clk;
  rate_t rate = RATE_320;
  logic [FRAME_W-1:0] frame;
  logic empty, rd;
  logic [3:0] dout;
  mpx_serializer dut (.clk, .rst_n, .rate, .frame, .frame_empty(empty), .frame_rd(rd), .dout);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  logic [FRAME_W-1:0] q [$];
  bit exp_bits [$], got_bits [$];
  int k;
  bit collect = 0;
  assign empty = (q.size() == 0);
  assign frame = empty ? '0 : q[0];
  always @(posedge clk) if (rst_n) begin
    bit load, r;
    logic [FRAME_W-1:0] f;
    if (collect) for (int i = 0; i < k; i++) got_bits.push_back(dout[3 - i]);
    load = (dut.left <= 6'(k));
    r    = rd;
    f    = rd ? q[0] : {HDR_CTRL, PAY_IDLE};
    #0.1;
    if (load) begin
      check(r == (q.size() != 0), "pop whenever a frame is available");
      for (int i = 31; i >= 0; i--) exp_bits.push_back(f[i]);
      if (r) void'(q.pop_front());
    end
    if (q.size() < 3 && $urandom % 8 != 0) q.push_back($urandom);
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      rst_n = 0; collect = 0; q.delete(); exp_bits.delete(); got_bits.delete();
      rate = rate_t'(r); k = 1 << r;
      repeat (3) @(posedge clk);
      #0.1 rst_n = 1;
      // the reset frame (idle) is sent first, then frames as popped
      for (int i = 31; i >= 0; i--) exp_bits.push_back(dut.sr[i]);
      @(posedge clk); #0.1 collect = 1;
      begin
        int pops, cyc;
        pops = 0; cyc = 0;
        while (cyc < 32 * 40 / k) begin
          @(posedge clk); #0.1; cyc++;
          if (dut.left == 6'(FRAME_W) && cyc > 1) pops++;
        end
        check(pops == 40 - 1 || pops == 40, $sformatf("rate %0d: one frame per %0d cycles (%0d)", r, 32 / k, pops));
      end
      collect = 0;
      for (int i = 0; i < got_bits.size() && i < exp_bits.size(); i++)
        if (got_bits[i] != exp_bits[i]) begin
          check(0, $sformatf("rate %0d: bit %0d differs", r, i)); break;
        end
      check(got_bits.size() >= 32 * 38, $sformatf("enough bits (%0d)", got_bits.size()));
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

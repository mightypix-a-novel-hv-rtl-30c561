// Testbench for mpx_enc8b10b and mpx_dec8b10b. Known code words (D0.0,
// D10.2, D21.5, K28.1, K28.5 in both disparities) are compared with the
// standard; for all 256 data bytes in both disparities the code must have
// four to six ones, a disparity that matches the running-disparity rule,
// and decode back to the byte; in a long random stream the run length never
// exceeds five and the running disparity stays within +-1; corrupt codes are
// flagged.
`timescale 1ns/1ps
module tb_mpx_8b10b;
  int checks = 0, failures = 0;
  logic k, rdi, rdo, dk, derr;
  logic [7:0] d, dd;
  logic [9:0] code, dcode;
  mpx_enc8b10b enc (.k, .d, .rd_in(rdi), .code, .rd_out(rdo));
  mpx_dec8b10b dec (.code(dcode), .d(dd), .k(dk), .err(derr));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic known(input bit kk, input logic [7:0] v, input bit r, input logic [9:0] e, input string n);
    k = kk; d = v; rdi = r; #1;
    check(code == e, $sformatf("%s rd%0d: got %b", n, r, code));
  endtask

  initial begin
    int run, disp, maxrun;
    bit lastbit;
    known(0, 8'h00, 0, 10'b1001110100, "D0.0");
    known(0, 8'h00, 1, 10'b0110001011, "D0.0");
    known(0, 8'h4A, 0, 10'b0101010101, "D10.2");
    known(0, 8'hB5, 0, 10'b1010101010, "D21.5");
    known(1, 8'hBC, 0, 10'b0011111010, "K28.5");
    known(1, 8'hBC, 1, 10'b1100000101, "K28.5");
    known(1, 8'h3C, 0, 10'b0011111001, "K28.1");
    for (int r = 0; r < 2; r++) for (int v = 0; v < 256; v++) begin
      int ones;
      k = 0; d = 8'(v); rdi = r[0]; #1;
      ones = $countones(code);
      check(ones >= 4 && ones <= 6, "weight");
      if (r == 0) check(ones >= 5, "RD- never gives negative disparity");
      else        check(ones <= 5, "RD+ never gives positive disparity");
      check(rdo == (rdi ^ (ones != 5)), "running disparity update");
      dcode = code; #1;
      check(!derr && !dk && dd == d, $sformatf("decode %02h", v));
    end
    // random stream
    rdi = 0; run = 0; maxrun = 0; disp = 0; lastbit = 0;
    for (int i = 0; i < 3000; i++) begin
      k = ($urandom % 10 == 0); d = k ? 8'hBC : 8'($urandom); #1;
      for (int b = 9; b >= 0; b--) begin
        if (code[b] == lastbit) run++; else run = 1;
        lastbit = code[b];
        if (run > maxrun) maxrun = run;
        disp += code[b] ? 1 : -1;
      end
      check(disp >= -3 && disp <= 3, "bounded disparity");
      dcode = code; #1;
      check(!derr && dk == k && dd == d, "stream decode");
      rdi = rdo;
    end
    check(maxrun <= 5, $sformatf("run length %0d <= 5", maxrun));
    dcode = 10'b1111110000; #1 check(derr, "invalid code flagged");
    dcode = 10'b0000000000; #1 check(derr, "invalid code flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

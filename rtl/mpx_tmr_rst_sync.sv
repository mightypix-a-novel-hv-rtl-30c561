// Triplicated reset synchronizer: three two-flop chains, asserted
// asynchronously by arst_n and released on the second clock edge after it
// rises, followed by a 2-of-3 majority vote so that a single upset flop
// cannot reset or release a clock domain.
module mpx_tmr_rst_sync
  import mpx_pkg::*;
(
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic [2:0] s1, s2;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= '1;
      s2 <= s1;
    end
  end

  assign rst_n = vote(s2[0], s2[1], s2[2]);

endmodule

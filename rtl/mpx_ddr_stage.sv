// Latch-based double-data-rate output multiplexer. Two bits are taken at the
// rising clock edge; d[1] is sent while the clock is high, d[0] while it is
// low. d[0] passes a latch that is transparent while the clock is low, so the
// output never changes in the middle of a half period. The document specifies
// latch-based DDR multiplexers at 640 MHz (1.28 Gbps) and 320 MHz (640 Mbps).
// The intended latch is this module's only circuit warning.
module mpx_ddr_stage (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] d,
  output logic       q
);
  logic first_q, second_q, second_l;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q  <= 1'b0;
      second_q <= 1'b0;
    end else begin
      first_q  <= d[1];
      second_q <= d[0];
    end
  end

  always_latch begin
    if (!clk) second_l = second_q;
  end

  assign q = clk ? first_q : second_l;

endmodule

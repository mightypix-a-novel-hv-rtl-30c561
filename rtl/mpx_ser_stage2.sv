// Second serializer stage: turns the 4-bit word of the 320 MHz stage into two
// 2-bit words at 640 MHz (used for the 1.28 Gbps rate), as the document
// describes. The 4-bit word is sampled at the 640 MHz edge in the middle of the
// 320 MHz period (ph320 high just before it, ph320 being a copy of the 320 MHz
// clock from the clock generator); d4[3:2] go out first, d4[1:0] one 640 MHz
// cycle later. Latency: one 640 MHz cycle after the sample.
module mpx_ser_stage2 (
  input  logic       clk,     // 640 MHz
  input  logic       rst_n,
  input  logic       ph320,
  input  logic [3:0] d4,
  output logic [1:0] d2
);
  logic [1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold <= '0;
      d2   <= '0;
    end else if (ph320) begin
      d2   <= d4[3:2];
      hold <= d4[1:0];
    end else begin
      d2   <= hold;
    end
  end

endmodule

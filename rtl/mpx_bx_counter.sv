// Timestamp (BX) counter. A 12-bit ToA counter runs on the 320 MHz timestamp
// clock and so overflows every 12.8 us, as the document specifies; a 4-bit
// ToT timestamp counter advances once every TOT_DIV ToA ticks. Both are
// distributed to the pixels in Gray code so that a sample taken in another
// clock domain is off by at most one count. toa_reset (TFC command) clears
// both counters. The ToT clock divider and the Gray coding are this design's
// choice.
module mpx_bx_counter
  import mpx_pkg::*;
#(
  parameter int unsigned TOT_DIV = 128
) (
  input  logic             clk,        // 320 MHz timestamp clock
  input  logic             rst_n,
  input  logic             toa_reset,
  output logic [TOA_W-1:0] toa_gray,
  output logic [TOT_W-1:0] tot_gray,
  output logic [TOA_W-1:0] toa_bin
);
  logic [$clog2(TOT_DIV)-1:0] pre;
  logic [TOT_W-1:0]           tot_bin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      toa_bin  <= '0;
      tot_bin  <= '0;
      pre      <= '0;
      toa_gray <= '0;
      tot_gray <= '0;
    end else if (toa_reset) begin
      toa_bin  <= '0;
      tot_bin  <= '0;
      pre      <= '0;
      toa_gray <= '0;
      tot_gray <= '0;
    end else begin
      toa_bin  <= toa_bin + 1'b1;
      toa_gray <= (toa_bin + 1'b1) ^ ((toa_bin + 1'b1) >> 1);
      pre      <= pre + 1'b1;
      if (pre == '1) begin
        tot_bin  <= tot_bin + 1'b1;
        tot_gray <= (tot_bin + 1'b1) ^ ((tot_bin + 1'b1) >> 1);
      end
    end
  end

endmodule

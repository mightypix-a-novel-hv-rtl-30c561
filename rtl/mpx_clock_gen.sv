// Clock manager and reset synchronizers.
//
// From the 640 MHz VCO clock of the PLL it derives, by counters, the 320 MHz
// serializer clock (/2), the 106.67 MHz readout-FSM clock (/6), the 80 MHz
// logic clock (/8) and the 40 MHz PLL feedback clock (/16), as the document
// gives them. ph320 is a register copy of the 320 MHz clock, used as a phase
// flag by 640 MHz logic. Each domain gets its own reset, asserted
// asynchronously and released synchronously; as the document requires for
// reset synchronizers, each is triplicated with a majority vote.
module mpx_clock_gen (
  input  logic clk_vco,
  input  logic rst_n,          // asynchronous chip reset
  output logic clk_320,
  output logic clk_106,
  output logic clk_80,
  output logic clk_fb40,
  output logic ph320,
  output logic rst_640_n,
  output logic rst_320_n,
  output logic rst_106_n,
  output logic rst_80_n
);
  logic [3:0] div16;
  logic [2:0] div6;
  logic       c106;

  always_ff @(posedge clk_vco or negedge rst_n) begin
    if (!rst_n) begin
      div16 <= '0;
      div6  <= '0;
      c106  <= 1'b0;
    end else begin
      div16 <= div16 + 1'b1;
      div6  <= (div6 == 3'd5) ? 3'd0 : div6 + 1'b1;
      c106  <= (div6 == 3'd5) || (div6 < 3'd2);
    end
  end

  assign clk_320  = div16[0];
  assign ph320    = div16[0];
  assign clk_80   = div16[2];
  assign clk_fb40 = div16[3];
  assign clk_106  = c106;

  mpx_tmr_rst_sync u_rs640 (.clk(clk_vco), .arst_n(rst_n), .rst_n(rst_640_n));
  mpx_tmr_rst_sync u_rs320 (.clk(clk_320), .arst_n(rst_n), .rst_n(rst_320_n));
  mpx_tmr_rst_sync u_rs106 (.clk(clk_106), .arst_n(rst_n), .rst_n(rst_106_n));
  mpx_tmr_rst_sync u_rs80  (.clk(clk_80),  .arst_n(rst_n), .rst_n(rst_80_n));

endmodule

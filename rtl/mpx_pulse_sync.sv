// Single-pulse clock-domain crossing: a one-cycle pulse in the source domain
// flips a toggle flop, the toggle passes a two-flop synchronizer and an edge
// detector makes a one-cycle pulse in the destination domain, two to three
// destination cycles later. Source pulses must be further apart than that.
module mpx_pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog;
  logic [2:0] s;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tog <= 1'b0;
    else if (src_pulse) tog <= !tog;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) s <= '0;
    else            s <= {s[1:0], tog};
  end

  assign dst_pulse = s[2] ^ s[1];

endmodule

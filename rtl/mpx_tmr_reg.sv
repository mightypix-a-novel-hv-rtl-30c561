// Triplicated register with majority vote and continuous scrubbing: three
// copies are written together, the output is their 2-of-3 vote, and each
// cycle without a write the voted value is written back, so a single upset
// is outvoted at once and repaired on the next edge. Used for configuration
// registers and the TFC command logic, which the document protects by triple
// modular redundancy.
module mpx_tmr_reg
  import mpx_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] r [3];

  always_comb
    for (int b = 0; b < W; b++) q[b] = vote(r[0][b], r[1][b], r[2][b]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) r[i] <= INIT;
    end else begin
      for (int i = 0; i < 3; i++) r[i] <= we ? d : q;
    end
  end

endmodule

// Round-robin arbiter. Among the requesters, the first one after the last
// granted index wins; the pointer advances only when the grant is used
// (advance high). The document names a round-robin arbiter for fair sharing of
// the links; this rotating-priority form is the simplest that does it.
// Combinational grant, one-hot, zero when nothing requests.
module mpx_rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] last;

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int k = N; k >= 1; k--) begin
      int unsigned i;
      i = (int'(last) + k) % N;
      if (req[i]) begin
        gnt     = '0;
        gnt[i]  = 1'b1;
        gnt_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last <= IW'(N - 1);
    else if (advance && |gnt)  last <= gnt_idx;
  end

endmodule

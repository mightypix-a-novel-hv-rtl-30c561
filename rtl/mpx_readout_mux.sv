// Readout multiplexer: distributes the words of the four readout-group FIFOs
// over the enabled output links (modes 4:4, 4:3, 4:2 and 4:1).
//
// With n links enabled (n_links_m1 = n-1), group FIFO s feeds link s mod n;
// links above n-1 are idle. Each link has its own round-robin arbiter
// (mpx_rr_arbiter) over the FIFOs mapped to it, so groups sharing a link are
// served in turn. The mode names come from the block diagram; the mapping
// rule and one arbiter per link are this design's choice.
// Per 80 MHz cycle each link moves at most one word, from a non-empty source
// FIFO (first-word fall-through) into its link FIFO if that is not full.
module mpx_readout_mux
  import mpx_pkg::*;
#(
  parameter int unsigned NSRC  = 4,
  parameter int unsigned NLINK = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [1:0]                     n_links_m1,
  input  logic [NSRC-1:0]                src_empty,
  input  logic [NSRC-1:0][WORD_W-1:0]    src_data,
  output logic [NSRC-1:0]                src_rd,
  input  logic [NLINK-1:0]               dst_full,
  output logic [NLINK-1:0]               dst_wr,
  output logic [NLINK-1:0][WORD_W-1:0]   dst_data
);

  logic [NLINK-1:0][NSRC-1:0] req, gnt;
  logic [NLINK-1:0][$clog2(NSRC)-1:0] gidx;
  int unsigned n;

  always_comb begin
    n = int'(n_links_m1) + 1;
    if (n > NLINK) n = NLINK;
    for (int l = 0; l < NLINK; l++)
      for (int s = 0; s < NSRC; s++)
        req[l][s] = !src_empty[s] && ((s % n) == l) && (l < n) && !dst_full[l];
  end

  for (genvar l = 0; l < NLINK; l++) begin : g_link
    mpx_rr_arbiter #(.N(NSRC)) u_arb (
      .clk, .rst_n,
      .req     (req[l]),
      .advance (1'b1),
      .gnt     (gnt[l]),
      .gnt_idx (gidx[l])
    );
    assign dst_wr[l]   = |gnt[l];
    assign dst_data[l] = src_data[gidx[l]];
  end

  always_comb begin
    src_rd = '0;
    for (int l = 0; l < NLINK; l++) src_rd |= gnt[l];
  end

endmodule

// Column-drain readout FSM with hit preloading, one per readout group.
//
// The state graph is the document's: IDLE -> PD1 -> PD2 -> LdCol1 (wait until
// clc == clcend) -> LdCol2 -> LdPix1 (wait until Prio or clp == clpend) ->
// LdPix2 -> RdCol1/RdCol2 per hit while Prio is active. Every RdCol pair also
// drives LdCol, so the EoC first latch is preloaded during readout; on leaving
// the read loop the LdCol1 wait counter starts at 2*crd (crd = reads - 1),
// or directly at clcend once that covers the wait. States ending in 2 are
// single wait cycles.
// Control outputs (as in the figure): PullDown in PD1 and LdPix1, LdCol in
// LdCol1, RdCol1 and RdCol2, LdPix in LdPix1, RdCol in RdCol1.
// Data path: the bus word read in RdCol1 is registered and written to the FIFO,
// with the group number in front, when RdCol2 is left; RdCol2 holds while the
// FIFO is full. Own choices: IDLE is left when `enable` is high; LdPix2 with no
// data, or a full FIFO, goes back to LdCol1 with clc unchanged (zero).
// Runs in the 106.67 MHz FSM clock; one hit is read every two cycles (53 MHz).
// The group field of fifo_data is the constant GRP_ID.
module mpx_readout_fsm
  import mpx_pkg::*;
#(
  parameter logic [GRP_W-1:0] GRP_ID = '0,
  parameter int unsigned      CNT_W  = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [CNT_W-1:0] clcend,
  input  logic [CNT_W-1:0] clpend,
  // matrix side
  output mctrl_t           ctrl,
  input  logic             prio,
  input  logic [HIT_W-1:0] bus_data,
  // FIFO side
  output logic             fifo_wr,
  output logic [WORD_W-1:0] fifo_data,
  input  logic             fifo_full,
  output ro_state_t        state_o
);

  ro_state_t        state, state_n;
  logic [CNT_W-1:0] clc, clc_n, clp, clp_n, crd, crd_n;
  logic [HIT_W-1:0] rd_q;
  logic [CNT_W:0]   crd2;

  assign crd2 = {crd, 1'b0};

  always_comb begin
    state_n = state;
    clc_n   = clc;
    clp_n   = clp;
    crd_n   = crd;
    fifo_wr = 1'b0;
    unique case (state)
      S_IDLE:   if (enable) state_n = S_PD1;
      S_PD1:    state_n = S_PD2;
      S_PD2:    state_n = S_LDCOL1;
      S_LDCOL1: if (clc == clcend) begin
                  clc_n   = '0;
                  state_n = S_LDCOL2;
                end else clc_n = clc + 1'b1;
      S_LDCOL2: state_n = S_LDPIX1;
      S_LDPIX1: if (prio || clp == clpend) begin
                  clp_n   = '0;
                  state_n = S_LDPIX2;
                end else clp_n = clp + 1'b1;
      S_LDPIX2: if (prio && !fifo_full) begin
                  crd_n   = '0;
                  state_n = S_RDCOL1;
                end else state_n = S_LDCOL1;
      S_RDCOL1: state_n = S_RDCOL2;
      S_RDCOL2: if (!fifo_full) begin
                  fifo_wr = 1'b1;
                  if (prio) begin
                    crd_n   = crd + 1'b1;
                    state_n = S_RDCOL1;
                  end else begin
                    clc_n   = (crd2 >= {1'b0, clcend}) ? clcend : crd2[CNT_W-1:0];
                    state_n = S_LDCOL1;
                  end
                end
      default:  state_n = S_IDLE;
    endcase
    if (!enable && state != S_RDCOL1 && state != S_RDCOL2) state_n = S_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      clc   <= '0;
      clp   <= '0;
      crd   <= '0;
      rd_q  <= '0;
    end else begin
      state <= state_n;
      clc   <= (state_n == S_IDLE) ? '0 : clc_n;
      clp   <= (state_n == S_IDLE) ? '0 : clp_n;
      crd   <= crd_n;
      if (state == S_RDCOL1) rd_q <= bus_data;
    end
  end

  assign ctrl.pull_down = (state == S_PD1) || (state == S_LDPIX1);
  assign ctrl.ld_col    = (state == S_LDCOL1) || (state == S_RDCOL1) || (state == S_RDCOL2);
  assign ctrl.ld_pix    = (state == S_LDPIX1);
  assign ctrl.rd_col    = (state == S_RDCOL1);
  assign fifo_data      = {GRP_ID, rd_q};
  assign state_o        = state;

endmodule

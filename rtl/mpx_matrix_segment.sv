// Behavioural model of one readout group of the pixel matrix: NCOL columns
// (mpx_column) that share the control lines of one readout FSM, a wired-OR
// data bus and a priority (scan) chain in which column 0 is served first.
//
// Bitline charging: the document states that the DRAM cells need up to 100 ns,
// 11 FSM cycles, to charge the precharged-low bitlines. The model counts LdCol
// cycles since the last PullDown and reports the bitlines as charged from the
// T_CHARGE-th such cycle on; only then can a hit buffer be copied into an EoC.
// Interface: comp is the comparator level of every pixel (column-major),
// ctrl comes from the FSM, prio and bus_data go back to it. Latency: a read
// appears on bus_data combinationally during the RdCol cycle.
module mpx_matrix_segment
  import mpx_pkg::*;
#(
  parameter int unsigned NCOL     = 31,
  parameter int unsigned NROWS    = 388,
  parameter int unsigned T_CHARGE = 11
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NCOL-1:0][NROWS-1:0] comp,
  input  logic [TOA_W-1:0]           toa_ts,
  input  logic [TOT_W-1:0]           tot_ts,
  input  mctrl_t                     ctrl,
  output logic                       prio,
  output logic [HIT_W-1:0]           bus_data
);

  logic [$clog2(T_CHARGE+1)-1:0] charge_cnt;
  logic                          bl_charged;
  logic [NCOL:0]                 scan;
  logic [NCOL-1:0]               col_prio;
  logic [NCOL-1:0][HIT_W-1:0]    col_bus;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  charge_cnt <= '0;
    else if (ctrl.pull_down)     charge_cnt <= '0;
    else if (ctrl.ld_col && !bl_charged) charge_cnt <= charge_cnt + 1'b1;
  end
  assign bl_charged = (charge_cnt >= T_CHARGE - 1) && ctrl.ld_col && !ctrl.pull_down;

  assign scan[0] = 1'b1;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    mpx_column #(.NROWS(NROWS), .COL_ID(c)) u_col (
      .clk, .rst_n,
      .comp      (comp[c]),
      .toa_ts, .tot_ts, .ctrl,
      .bl_charged,
      .scan_in   (scan[c]),
      .scan_out  (scan[c+1]),
      .prio      (col_prio[c]),
      .bus_out   (col_bus[c])
    );
  end

  assign prio = |col_prio;

  always_comb begin
    bus_data = '0;
    for (int c = 0; c < NCOL; c++) bus_data |= col_bus[c];
  end

endmodule

// MightyPix2 digital top: pixel-matrix readout groups, readout control unit
// (RCU) and slow/fast control, as in the chip's block diagram.
//
// Data path: the comparator outputs of the 122 x 388 pixels (comp_in, from
// the analog front end) enter four readout groups of 31, 31, 30 and 30 columns
// (mpx_matrix_segment, a behavioural model of hit buffers and EoCs). Each group
// is drained by its own readout FSM (106.67 MHz), whose words cross into the
// 80 MHz domain through a dual-clock FIFO. The readout multiplexer shares the
// four FIFOs out over 1..4 links with round-robin arbitration; each link
// (mpx_link) packs, frames, scrambles and serializes them onto tx[l].
// Clocks: clk_vco is the 640 MHz PLL output (the PLL itself is not part of
// this RTL); mpx_clock_gen divides it and returns the 40 MHz feedback clock.
// ck_ref (40 MHz) directly clocks the slow control: the I2C slave and the
// register file, so configuration never depends on the PLL. ck_ts (320 MHz)
// clocks the ToA/ToT timestamp counter. The TFC receiver (320 MHz) resets the
// timestamps, requests sync frames on all links and issues calibration and
// front-end reset pulses. ecs_* ports belong to the ECS interface.
// Configuration bytes cross into the other clock domains without
// synchronization: they are static while the readout is enabled.
module mpx_top
  import mpx_pkg::*;
#(
  parameter int unsigned NROWS    = 388,
  parameter int unsigned T_CHARGE = 11,
  parameter int unsigned NCOL0    = 31,
  parameter int unsigned NCOL1    = 31,
  parameter int unsigned NCOL2    = 30,
  parameter int unsigned NCOL3    = 30,
  parameter int unsigned NCOLS    = NCOL0 + NCOL1 + NCOL2 + NCOL3
) (
  input  logic                        clk_vco,
  input  logic                        ck_ref,
  input  logic                        ck_ts,
  input  logic                        rst_n,
  output logic                        clk_fb40,
  input  logic [NCOLS-1:0][NROWS-1:0] comp_in,
  input  logic                        tfc_in,
  input  logic                        scl,
  input  logic                        sda,
  output logic                        sda_oe,
  input  logic                        ecs_dn,
  input  logic                        ecs_up_in,
  output logic                        ecs_up_out,
  output logic                        calib_pulse,
  output logic                        fe_reset,
  output logic [3:0]                  tx
);
  localparam int unsigned NGRP = 4;
  localparam int unsigned NC [NGRP] = '{NCOL0, NCOL1, NCOL2, NCOL3};
  localparam int unsigned OFF[NGRP] = '{0, NCOL0, NCOL0 + NCOL1, NCOL0 + NCOL1 + NCOL2};

  // ---------------- clocks and resets
  logic clk_320, clk_106, clk_80, ph320;
  logic rst_640_n, rst_320_n, rst_106_n, rst_80_n, rst_ref_n, rst_ts_n;

  mpx_clock_gen u_cg (
    .clk_vco, .rst_n, .clk_320, .clk_106, .clk_80, .clk_fb40, .ph320,
    .rst_640_n, .rst_320_n, .rst_106_n, .rst_80_n);
  mpx_tmr_rst_sync u_rs_ref (.clk(ck_ref), .arst_n(rst_n), .rst_n(rst_ref_n));
  mpx_tmr_rst_sync u_rs_ts  (.clk(ck_ts),  .arst_n(rst_n), .rst_n(rst_ts_n));

  // ---------------- slow control
  logic [7:0][7:0] cfg;
  logic [0:0][7:0] status;
  logic       i2c_we, ecs_we;
  logic [7:0] i2c_addr, i2c_wdata, i2c_rdata, ecs_addr, ecs_wdata, ecs_rdata;

  mpx_i2c_slave u_i2c (
    .clk(ck_ref), .rst_n(rst_ref_n), .scl, .sda, .sda_oe,
    .reg_we(i2c_we), .reg_addr(i2c_addr), .reg_wdata(i2c_wdata), .reg_rdata(i2c_rdata));

  mpx_ecs u_ecs (
    .clk(ck_ref), .rst_n(rst_ref_n), .chip_id(6'd0),
    .dn_in(ecs_dn), .up_in(ecs_up_in), .up_out(ecs_up_out),
    .reg_we(ecs_we), .reg_addr(ecs_addr), .reg_wdata(ecs_wdata), .reg_rdata(ecs_rdata));

  mpx_regfile #(.NCFG(8), .NSTAT(1)) u_rf (
    .clk(ck_ref), .rst_n(rst_ref_n),
    .ecs_we, .ecs_addr, .ecs_wdata, .ecs_rdata,
    .i2c_we, .i2c_addr, .i2c_wdata, .i2c_rdata,
    .cfg, .status);

  logic       ro_en, tfc_en;
  logic [1:0] n_links_m1;
  rate_t      rate;
  src_t       src;
  assign ro_en      = cfg[0][0];
  assign n_links_m1 = cfg[0][2:1];
  assign rate       = rate_t'(cfg[0][4:3]);
  assign src        = src_t'(cfg[0][6:5]);
  assign tfc_en     = cfg[3][0];

  // ---------------- fast control
  logic tfc_locked, tfc_err, c_toa_rst, c_sync, c_calib, c_fe_rst;
  logic toa_rst_ts, sync_80;
  logic [1:0] lock_s;

  mpx_tfc u_tfc (
    .clk(clk_320), .rst_n(rst_320_n), .din(tfc_in),
    .locked(tfc_locked), .code_err(tfc_err),
    .cmd_toa_reset(c_toa_rst), .cmd_sync(c_sync),
    .cmd_calib(c_calib), .cmd_fe_reset(c_fe_rst));

  assign calib_pulse = c_calib && tfc_en;
  assign fe_reset    = c_fe_rst && tfc_en;

  mpx_pulse_sync u_ps_toa (.src_clk(clk_320), .src_rst_n(rst_320_n), .src_pulse(c_toa_rst && tfc_en),
                           .dst_clk(ck_ts), .dst_rst_n(rst_ts_n), .dst_pulse(toa_rst_ts));
  mpx_pulse_sync u_ps_syn (.src_clk(clk_320), .src_rst_n(rst_320_n), .src_pulse(c_sync && tfc_en),
                           .dst_clk(clk_80), .dst_rst_n(rst_80_n), .dst_pulse(sync_80));

  always_ff @(posedge ck_ref or negedge rst_ref_n) begin
    if (!rst_ref_n) lock_s <= '0;
    else            lock_s <= {lock_s[0], tfc_locked};
  end
  assign status[0] = {7'b0, lock_s[1]};

  // ---------------- timestamps
  logic [TOA_W-1:0] toa_gray, toa_bin;
  logic [TOT_W-1:0] tot_gray;

  mpx_bx_counter u_bx (
    .clk(ck_ts), .rst_n(rst_ts_n), .toa_reset(toa_rst_ts),
    .toa_gray, .tot_gray, .toa_bin);

  // ---------------- matrix groups and readout FSMs
  logic [NGRP-1:0]             f_empty, f_rd;
  logic [NGRP-1:0][WORD_W-1:0] f_data;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    mctrl_t            ctrl;
    logic              prio, fwr, ffull;
    logic [HIT_W-1:0]  bus;
    logic [WORD_W-1:0] fdata;
    ro_state_t         st;

    mpx_matrix_segment #(.NCOL(NC[g]), .NROWS(NROWS), .T_CHARGE(T_CHARGE)) u_seg (
      .clk(clk_106), .rst_n(rst_106_n),
      .comp(comp_in[OFF[g] +: NC[g]]),
      .toa_ts(toa_gray), .tot_ts(tot_gray),
      .ctrl, .prio, .bus_data(bus));

    mpx_readout_fsm #(.GRP_ID(GRP_W'(g))) u_fsm (
      .clk(clk_106), .rst_n(rst_106_n), .enable(ro_en),
      .clcend(cfg[1][5:0]), .clpend(cfg[2][5:0]),
      .ctrl, .prio, .bus_data(bus),
      .fifo_wr(fwr), .fifo_data(fdata), .fifo_full(ffull), .state_o(st));

    mpx_async_fifo #(.WIDTH(WORD_W), .DEPTH(16)) u_afifo (
      .wclk(clk_106), .wrst_n(rst_106_n), .wr(fwr), .wdata(fdata), .full(ffull),
      .rclk(clk_80), .rrst_n(rst_80_n), .rd(f_rd[g]), .rdata(f_data[g]), .empty(f_empty[g]));
  end

  // ---------------- readout multiplexer and links
  logic [3:0]              l_full, l_wr, sent_sync, sent_data;
  logic [3:0][WORD_W-1:0]  l_data;

  mpx_readout_mux #(.NSRC(NGRP), .NLINK(4)) u_rmux (
    .clk(clk_80), .rst_n(rst_80_n), .n_links_m1,
    .src_empty(f_empty), .src_data(f_data), .src_rd(f_rd),
    .dst_full(l_full), .dst_wr(l_wr), .dst_data(l_data));

  for (genvar l = 0; l < 4; l++) begin : g_link
    mpx_link u_link (
      .clk80(clk_80), .rst80_n(rst_80_n), .clk320(clk_320), .rst320_n(rst_320_n),
      .clk640(clk_vco), .rst640_n(rst_640_n), .ph320,
      .src, .rate, .sync_req(sync_80),
      .wr(l_wr[l]), .wdata(l_data[l]), .full(l_full[l]),
      .sent_sync(sent_sync[l]), .sent_data(sent_data[l]), .tx(tx[l]));
  end

endmodule

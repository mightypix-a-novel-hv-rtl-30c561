// Behavioural model of one pixel column: its hit buffers and the preloading
// End-of-Column (EoC) logic, written as clocked logic in the readout-FSM clock.
//
// In silicon the hit buffers are asynchronous latches with DRAM cells on a
// shared, precharged bitline; this model keeps their behaviour, not their
// circuit:
//   * Hit buffer (one per row): the rising edge of the comparator output stores
//     the 12-bit ToA timestamp, the falling edge the 4-bit ToT timestamp. While
//     a buffer is occupied further pulses of that pixel are lost (pile-up).
//     A complete hit only becomes visible to the priority logic at an LdPix
//     pulse, so hits completing during LdCol wait for the next round.
//   * Priority: the lowest row number among visible hits is loaded first.
//   * EoC, first latch DR1: while LdCol is high, the bitlines have charged
//     (bl_charged, see mpx_matrix_segment) and DR1 is empty, the winning hit
//     buffer is copied into DR1, setting the hit flag, and the buffer is freed.
//   * EoC, second latch DR2: LdPix moves DR1 into DR2 and clears the hit flag,
//     so DR1 can be preloaded while DR2 is read. DR2 is only overwritten once it
//     has been read (an assumption: the document's DR2 is enabled by LdPix alone).
//   * Readout: a column holding data in DR2 blocks the scan (priority) chain;
//     the first such column drives the shared data bus while RdCol is high and
//     releases DR2 at the end of that cycle.
//   * prio is high while DR2 holds data, and already during an LdPix pulse that
//     will move data into DR2.
// Interface: comp[row] comparator levels, toa_ts/tot_ts timestamps, ctrl from
// the readout FSM, scan_in/scan_out priority chain (1 = no earlier column is
// requesting), bus_out is all zero unless this column is being read; its
// column field is the constant COL_ID.
module mpx_column
  import mpx_pkg::*;
#(
  parameter int unsigned NROWS  = 388,
  parameter int unsigned COL_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NROWS-1:0]  comp,
  input  logic [TOA_W-1:0]  toa_ts,
  input  logic [TOT_W-1:0]  tot_ts,
  input  mctrl_t            ctrl,
  input  logic              bl_charged,
  input  logic              scan_in,
  output logic              scan_out,
  output logic              prio,
  output logic [HIT_W-1:0]  bus_out
);

  typedef enum logic [1:0] {HB_EMPTY, HB_LEAD, HB_DONE, HB_READY} hb_t;

  hb_t              hb_st  [NROWS];
  logic [TOA_W-1:0] hb_toa [NROWS];
  logic [TOT_W-1:0] hb_tot [NROWS];
  logic [NROWS-1:0] comp_q;

  logic             any_ready;
  logic [ROW_W-1:0] sel_row;

  hit_t dr1, dr2;
  logic dr1_full, dr2_full;
  logic load_dr1, move_dr2, read_dr2;

  // Priority encoder: lowest ready row wins.
  always_comb begin
    any_ready = 1'b0;
    sel_row   = '0;
    for (int r = NROWS - 1; r >= 0; r--) begin
      if (hb_st[r] == HB_READY) begin
        any_ready = 1'b1;
        sel_row   = ROW_W'(r);
      end
    end
  end

  assign load_dr1 = ctrl.ld_col && bl_charged && !dr1_full && any_ready;
  assign move_dr2 = ctrl.ld_pix && dr1_full && !dr2_full;
  assign read_dr2 = ctrl.rd_col && dr2_full && scan_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_q <= '0;
      for (int r = 0; r < NROWS; r++) begin
        hb_st[r]  <= HB_EMPTY;
        hb_toa[r] <= '0;
        hb_tot[r] <= '0;
      end
    end else begin
      comp_q <= comp;
      for (int r = 0; r < NROWS; r++) begin
        unique case (hb_st[r])
          HB_EMPTY: if (comp[r] && !comp_q[r]) begin
                      hb_st[r]  <= HB_LEAD;
                      hb_toa[r] <= toa_ts;
                    end
          HB_LEAD:  if (!comp[r] && comp_q[r]) begin
                      hb_st[r]  <= HB_DONE;
                      hb_tot[r] <= tot_ts;
                    end
          HB_DONE:  if (ctrl.ld_pix) hb_st[r] <= HB_READY;
          HB_READY: if (load_dr1 && sel_row == ROW_W'(r)) hb_st[r] <= HB_EMPTY;
          default:  hb_st[r] <= HB_EMPTY;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dr1 <= '0; dr2 <= '0; dr1_full <= 1'b0; dr2_full <= 1'b0;
    end else begin
      if (load_dr1) begin
        dr1      <= '{col: COL_W'(COL_ID), row: sel_row,
                      toa: hb_toa[sel_row], tot: hb_tot[sel_row]};
        dr1_full <= 1'b1;
      end else if (move_dr2) begin
        dr1_full <= 1'b0;
      end
      if (move_dr2) begin
        dr2      <= dr1;
        dr2_full <= 1'b1;
      end else if (read_dr2) begin
        dr2_full <= 1'b0;
      end
    end
  end

  assign prio     = dr2_full || move_dr2;
  assign scan_out = scan_in && !dr2_full;
  assign bus_out  = read_dr2 ? dr2 : '0;

endmodule

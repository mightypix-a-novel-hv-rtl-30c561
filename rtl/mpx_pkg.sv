// Shared types and constants of the MightyPix2 digital readout.
//
// A hit leaves the matrix as a 30-bit word {column, row, ToA, ToT}. The readout
// FSM prepends the 2-bit readout-group number, giving the 32-bit word that is
// stored in the FIFOs and cut into 30-bit frame payloads by the gearbox. The
// field widths follow from the matrix size (388 pixels per column, up to 31
// columns per group) and the 12-bit ToA / 4-bit ToT timestamps; the packing
// order is this design's choice.
package mpx_pkg;

  localparam int unsigned TOA_W   = 12;  // 320 MHz ToA, 12.8 us overflow
  localparam int unsigned TOT_W   = 4;   // trailing-edge timestamp
  localparam int unsigned ROW_W   = 9;   // 2 x 194 pixels per column
  localparam int unsigned COL_W   = 5;   // up to 31 columns per group
  localparam int unsigned HIT_W   = COL_W + ROW_W + TOA_W + TOT_W;  // 30
  localparam int unsigned GRP_W   = 2;   // four readout groups
  localparam int unsigned WORD_W  = GRP_W + HIT_W;                  // 32
  localparam int unsigned PAY_W   = 30;  // frame payload
  localparam int unsigned FRAME_W = 32;  // 2-bit header + payload

  typedef struct packed {
    logic [COL_W-1:0] col;
    logic [ROW_W-1:0] row;
    logic [TOA_W-1:0] toa;
    logic [TOT_W-1:0] tot;
  } hit_t;

  typedef struct packed {
    logic [GRP_W-1:0] grp;
    hit_t             hit;
  } word_t;

  // Frame header (sent unscrambled ahead of the 30-bit payload).
  localparam logic [1:0] HDR_DATA = 2'b01;
  localparam logic [1:0] HDR_CTRL = 2'b10;

  // Payloads of control frames.
  localparam logic [PAY_W-1:0] PAY_IDLE = 30'h0F0F_0F0F & 30'h3FFF_FFFF;
  localparam logic [PAY_W-1:0] PAY_SYNC = 30'h2AAA_AAAA & 30'h3FFF_FFFF;

  // Output-link data rate.
  typedef enum logic [1:0] {
    RATE_320  = 2'd0,
    RATE_640  = 2'd1,
    RATE_1280 = 2'd2
  } rate_t;

  // Source selected by the link data multiplexer.
  typedef enum logic [1:0] {
    SRC_DATA = 2'd0,
    SRC_SYNC = 2'd1,
    SRC_PRBS = 2'd2
  } src_t;

  // States of the column-drain readout FSM.
  typedef enum logic [3:0] {
    S_IDLE, S_PD1, S_PD2, S_LDCOL1, S_LDCOL2,
    S_LDPIX1, S_LDPIX2, S_RDCOL1, S_RDCOL2
  } ro_state_t;

  // Control signals from a readout FSM to its matrix group.
  typedef struct packed {
    logic pull_down;
    logic ld_col;
    logic ld_pix;
    logic rd_col;
  } mctrl_t;

  // 2-of-3 majority vote used by the triplicated registers.
  function automatic logic vote(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage

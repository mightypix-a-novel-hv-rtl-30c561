// TFC (Timing and Fast Control) receiver: a 320 Mbps serial command stream,
// one bit per 320 MHz cycle, most significant bit first.
//
// Each 8-bit line word carries a 6-bit value in a 6b8b code: the codeword of
// value v is the v-th byte, in ascending order, with exactly four ones. Every
// codeword is DC balanced and any single bit error changes the weight, so it
// is detected. Value 0 (codeword 8'h0F) is the idle word, and its rotations
// are all different from it, so word alignment is found by searching the bit
// stream for it. Once locked, a word is decoded every 8 cycles; FAIL_LIMIT
// consecutive code errors drop the lock. Value bits 0..3 command ToA-counter
// reset, time alignment (sync frame injection), calibration pulse and
// front-end reset; several bits may be set together.
// As in the document, everything after the deserializer (lock state, error
// counter, command outputs) is triplicated (mpx_tmr_reg); the deserializer is
// not. The command set follows the document; the code table, bit assignment
// and alignment scheme are this design's choice. Command pulses last one
// 320 MHz cycle, one cycle after the word is complete.
module mpx_tfc #(
  parameter int unsigned FAIL_LIMIT = 4
) (
  input  logic clk,          // 320 MHz
  input  logic rst_n,
  input  logic din,
  output logic locked,
  output logic code_err,
  output logic cmd_toa_reset,
  output logic cmd_sync,
  output logic cmd_calib,
  output logic cmd_fe_reset
);
  localparam logic [7:0] IDLE_CODE = 8'h0F;

  logic [7:0] sr;
  logic [2:0] bitcnt;
  logic       word_strobe;
  logic       valid;
  logic [5:0] value;
  logic       lock_d;
  logic [1:0] errc, errc_d;
  logic [4:0] cmd_q;

  // Deserializer (not triplicated).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr     <= '0;
      bitcnt <= '0;
    end else begin
      sr <= {sr[6:0], din};
      if (!locked && {sr[6:0], din} == IDLE_CODE) bitcnt <= '0;
      else                                        bitcnt <= bitcnt + 1'b1;
    end
  end
  assign word_strobe = locked && (bitcnt == 3'd0);

  // 6b8b decoder: rank of the word among the balanced bytes.
  always_comb begin
    int unsigned rank;
    rank  = 0;
    for (int b = 0; b < 256; b++)
      if (b < int'(sr) && $countones(8'(b)) == 4) rank++;
    valid = ($countones(sr) == 4) && (rank < 64);
    value = 6'(rank);
  end

  // Lock / error state (triplicated).
  always_comb begin
    lock_d = locked;
    errc_d = errc;
    if (!locked) begin
      if ({sr[6:0], din} == IDLE_CODE) lock_d = 1'b1;
      errc_d = '0;
    end else if (word_strobe) begin
      if (valid) errc_d = '0;
      else if (errc == 2'(FAIL_LIMIT - 1)) begin
        lock_d = 1'b0;
        errc_d = '0;
      end else errc_d = errc + 1'b1;
    end
  end

  mpx_tmr_reg #(.W(1)) u_lock (.clk, .rst_n, .we(1'b1), .d(lock_d), .q(locked));
  mpx_tmr_reg #(.W(2)) u_errc (.clk, .rst_n, .we(1'b1), .d(errc_d), .q(errc));
  mpx_tmr_reg #(.W(5)) u_cmd  (.clk, .rst_n, .we(1'b1),
    .d(word_strobe ? {!valid, valid ? value[3:0] : 4'b0} : 5'b0), .q(cmd_q));

  assign {code_err, cmd_fe_reset, cmd_calib, cmd_sync, cmd_toa_reset} = cmd_q;

endmodule

// Oversampling 8b10b receiver for the 10 Mbps ECS links, clocked at 40 MHz
// (four samples per bit).
//
// The input passes a two-flop synchronizer. Every level change restarts a
// 2-bit phase counter, and the bit is taken two samples after the last
// change, i.e. near the bit centre, so the receiver follows the sender's
// phase. Received bits shift into a 10-bit window; the K28.5 comma (either
// disparity) fixes the symbol boundary at any time, after which every tenth
// bit completes a symbol that is decoded by mpx_dec8b10b. The document names
// an oversampling receiver with 8b10b; the phase tracking and comma
// alignment are this design's choice.
// sym_valid is a one-cycle strobe with sym_data, sym_k and sym_err.
module mpx_ecs_rx (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din,
  output logic       aligned,
  output logic       sym_valid,
  output logic [7:0] sym_data,
  output logic       sym_k,
  output logic       sym_err
);
  localparam logic [9:0] K285_N = 10'b0011111010;
  localparam logic [9:0] K285_P = 10'b1100000101;

  logic [2:0] s;
  logic [1:0] ph;
  logic [9:0] win, win_n;
  logic [3:0] bcnt;
  logic       take, comma;

  assign take  = (ph == 2'd1) && (s[2] == s[1]);
  assign win_n = {win[8:0], s[2]};
  assign comma = (win_n == K285_N) || (win_n == K285_P);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; ph <= '0; win <= '0; bcnt <= '0; aligned <= 1'b0; sym_valid <= 1'b0;
    end else begin
      s         <= {s[1:0], din};
      ph        <= (s[2] != s[1]) ? 2'd0 : ph + 1'b1;
      sym_valid <= 1'b0;
      if (take) begin
        win <= win_n;
        if (comma) begin
          aligned   <= 1'b1;
          bcnt      <= '0;
          sym_valid <= 1'b1;
        end else if (aligned) begin
          if (bcnt == 4'd9) begin
            bcnt      <= '0;
            sym_valid <= 1'b1;
          end else bcnt <= bcnt + 1'b1;
        end
      end
    end
  end

  mpx_dec8b10b u_dec (.code(win), .d(sym_data), .k(sym_k), .err(sym_err));

endmodule

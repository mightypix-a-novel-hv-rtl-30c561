// 8b10b encoder (combinational), used by the ECS uplink.
//
// Standard IBM 8b10b: the five low bits EDCBA go through the 5b/6b table, the
// three high bits HGF through the 3b/4b table, both chosen by the running
// disparity; code[9] (bit a) is sent first. Control symbols: only K28.y are
// supported (k = 1 with d[4:0] = 28), which is all the ECS framing uses.
// rd_in/rd_out: running disparity, 0 = negative, 1 = positive; rd_out flips
// whenever the 10-bit code is unbalanced.
module mpx_enc8b10b (
  input  logic       k,
  input  logic [7:0] d,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);
  logic [5:0] c6, t6;
  logic [3:0] c4;
  logic       rd6, alt7;
  logic [4:0] x;
  logic [2:0] y;

  assign x = d[4:0];
  assign y = d[7:5];

  always_comb begin
    unique case (x)
      5'd0:  t6 = 6'b100111; 5'd1:  t6 = 6'b011101; 5'd2:  t6 = 6'b101101; 5'd3:  t6 = 6'b110001;
      5'd4:  t6 = 6'b110101; 5'd5:  t6 = 6'b101001; 5'd6:  t6 = 6'b011001; 5'd7:  t6 = 6'b111000;
      5'd8:  t6 = 6'b111001; 5'd9:  t6 = 6'b100101; 5'd10: t6 = 6'b010101; 5'd11: t6 = 6'b110100;
      5'd12: t6 = 6'b001101; 5'd13: t6 = 6'b101100; 5'd14: t6 = 6'b011100; 5'd15: t6 = 6'b010111;
      5'd16: t6 = 6'b011011; 5'd17: t6 = 6'b100011; 5'd18: t6 = 6'b010011; 5'd19: t6 = 6'b110010;
      5'd20: t6 = 6'b001011; 5'd21: t6 = 6'b101010; 5'd22: t6 = 6'b011010; 5'd23: t6 = 6'b111010;
      5'd24: t6 = 6'b110011; 5'd25: t6 = 6'b100110; 5'd26: t6 = 6'b010110; 5'd27: t6 = 6'b110110;
      5'd28: t6 = 6'b001110; 5'd29: t6 = 6'b101110; 5'd30: t6 = 6'b011110; default: t6 = 6'b101011;
    endcase
    alt7 = 1'b0;
    if (k) t6 = 6'b001111;
    // RD- column in t6; the RD+ column is its complement for unbalanced codes and D.7
    c6  = (rd_in && ($countones(t6) != 3 || x == 5'd7)) ? ~t6 : t6;
    rd6 = rd_in ^ ($countones(c6) != 3);
    if (k) begin
      // K28.y, 4b part chosen by the disparity after the 6b part
      unique case (y)
        3'd0: c4 = 4'b1011; 3'd1: c4 = 4'b0110; 3'd2: c4 = 4'b1010; 3'd3: c4 = 4'b1100;
        3'd4: c4 = 4'b1101; 3'd5: c4 = 4'b0101; 3'd6: c4 = 4'b1001; default: c4 = 4'b0111;
      endcase
      if (rd6) c4 = ~c4;
    end else begin
      alt7 = (!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
             ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14));
      unique case (y)
        3'd0: c4 = 4'b1011; 3'd1: c4 = 4'b1001; 3'd2: c4 = 4'b0101; 3'd3: c4 = 4'b1100;
        3'd4: c4 = 4'b1101; 3'd5: c4 = 4'b1010; 3'd6: c4 = 4'b0110;
        default: c4 = alt7 ? 4'b0111 : 4'b1110;
      endcase
      if (rd6 && ($countones(c4) != 2 || y == 3'd3)) c4 = ~c4;
    end
    code   = {c6, c4};
    rd_out = rd6 ^ ($countones(c4) != 2);
  end

endmodule

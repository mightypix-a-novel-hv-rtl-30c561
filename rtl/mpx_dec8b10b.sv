// 8b10b decoder (combinational), used by the ECS downlink and by the uplink's
// daisy-chain receiver. Inverse of mpx_enc8b10b: the 6-bit and 4-bit parts are
// looked up in both disparity columns of the standard tables. k flags a K28.y
// control symbol; err flags a code that is in neither table. Running
// disparity errors are not checked.
module mpx_dec8b10b (
  input  logic [9:0] code,
  output logic [7:0] d,
  output logic       k,
  output logic       err
);
  logic [5:0] c6;
  logic [3:0] c4;
  logic       f6, f4;
  logic [4:0] x;
  logic [2:0] y;

  function automatic logic [5:0] t6(input int unsigned i);
    case (i)
      0:  return 6'b100111; 1:  return 6'b011101; 2:  return 6'b101101; 3:  return 6'b110001;
      4:  return 6'b110101; 5:  return 6'b101001; 6:  return 6'b011001; 7:  return 6'b111000;
      8:  return 6'b111001; 9:  return 6'b100101; 10: return 6'b010101; 11: return 6'b110100;
      12: return 6'b001101; 13: return 6'b101100; 14: return 6'b011100; 15: return 6'b010111;
      16: return 6'b011011; 17: return 6'b100011; 18: return 6'b010011; 19: return 6'b110010;
      20: return 6'b001011; 21: return 6'b101010; 22: return 6'b011010; 23: return 6'b111010;
      24: return 6'b110011; 25: return 6'b100110; 26: return 6'b010110; 27: return 6'b110110;
      28: return 6'b001110; 29: return 6'b101110; 30: return 6'b011110; default: return 6'b101011;
    endcase
  endfunction

  assign c6 = code[9:4];
  assign c4 = code[3:0];

  always_comb begin
    f6 = 1'b0;
    x  = '0;
    k  = (c6 == 6'b001111) || (c6 == 6'b110000);
    for (int i = 0; i < 32; i++)
      if (c6 == t6(i) || (c6 == ~t6(i) && ($countones(t6(i)) != 3 || i == 7))) begin
        f6 = 1'b1;
        x  = 5'(i);
      end
    if (k) begin
      f6 = 1'b1;
      x  = 5'd28;
    end
    f4 = 1'b1;
    y  = '0;
    if (k) begin
      // 4b part of K28.y after 001111 (rd positive) or 110000 (rd negative)
      unique case (c6 == 6'b001111 ? c4 : ~c4)
        4'b0100: y = 3'd0; 4'b1001: y = 3'd1; 4'b0101: y = 3'd2; 4'b0011: y = 3'd3;
        4'b0010: y = 3'd4; 4'b1010: y = 3'd5; 4'b0110: y = 3'd6; 4'b1000: y = 3'd7;
        default: f4 = 1'b0;
      endcase
    end else begin
      unique case (c4)
        4'b1011, 4'b0100: y = 3'd0;
        4'b1001:          y = 3'd1;
        4'b0101:          y = 3'd2;
        4'b1100, 4'b0011: y = 3'd3;
        4'b1101, 4'b0010: y = 3'd4;
        4'b1010:          y = 3'd5;
        4'b0110:          y = 3'd6;
        4'b1110, 4'b0001, 4'b0111, 4'b1000: y = 3'd7;
        default:          f4 = 1'b0;
      endcase
    end
    d   = {y, x};
    err = !(f6 && f4);
  end

endmodule

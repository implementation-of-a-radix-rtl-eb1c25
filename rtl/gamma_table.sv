// gamma_table: coefficients of the scaling factor M = gamma2 - gamma1*d15.
//
// Indexed by the five divisor bits below the leading one (d truncated to six
// fraction bits, d6, gives idx = (d6 - 1/2)*64). The words hold -gamma1 and
// -gamma2 truncated to 13 fraction bits, stored without their constant top bits:
//   -gamma1 = -4 + mgamma1 / 2^13   (15-bit word, value in (-4,-1))
//   -gamma2 = -4 + mgamma2 / 2^13   (14-bit word, value in (-4,-2), i.e. 10x.xxx...)
// with gamma1 = 1/(d6^2 + d6*2^-6 + 2^-15) and gamma2 = (2*d6 + 2^-6)*gamma1,
// each truncated to 13 fraction bits before negation. The 32 entries are the
// document's table; they agree with these formulas entry for entry.
// Purely combinational.
module gamma_table
  import div_pkg::*;
(
  input  logic [4:0]      idx,
  output logic [W_G1-1:0] mgamma1,
  output logic [W_G2-1:0] mgamma2
);

  always_comb begin
    unique case (idx)
      5'd0 : begin mgamma1 = 15'b000001111100101; mgamma2 = 14'b00000111110101; end
      5'd1 : begin mgamma1 = 15'b000101100110010; mgamma2 = 14'b00010110111000; end
      5'd2 : begin mgamma1 = 15'b001000111011110; mgamma2 = 14'b00100101000100; end
      5'd3 : begin mgamma1 = 15'b001011111111101; mgamma2 = 14'b00110010011100; end
      5'd4 : begin mgamma1 = 15'b001110110011100; mgamma2 = 14'b00111111000110; end
      5'd5 : begin mgamma1 = 15'b010001011001001; mgamma2 = 14'b01001011000100; end
      5'd6 : begin mgamma1 = 15'b010011110010001; mgamma2 = 14'b01010110011010; end
      5'd7 : begin mgamma1 = 15'b010101111111101; mgamma2 = 14'b01100001001100; end
      5'd8 : begin mgamma1 = 15'b011000000010110; mgamma2 = 14'b01101011011100; end
      5'd9 : begin mgamma1 = 15'b011001111100100; mgamma2 = 14'b01110101001100; end
      5'd10: begin mgamma1 = 15'b011011101101110; mgamma2 = 14'b01111110011110; end
      5'd11: begin mgamma1 = 15'b011101010111011; mgamma2 = 14'b10000111010110; end
      5'd12: begin mgamma1 = 15'b011110111001111; mgamma2 = 14'b10001111110100; end
      5'd13: begin mgamma1 = 15'b100000010110000; mgamma2 = 14'b10010111111001; end
      5'd14: begin mgamma1 = 15'b100001101100001; mgamma2 = 14'b10011111101001; end
      5'd15: begin mgamma1 = 15'b100010111101000; mgamma2 = 14'b10100111000100; end
      5'd16: begin mgamma1 = 15'b100100001000111; mgamma2 = 14'b10101110001011; end
      5'd17: begin mgamma1 = 15'b100101010000010; mgamma2 = 14'b10110101000000; end
      5'd18: begin mgamma1 = 15'b100110010011011; mgamma2 = 14'b10111011100100; end
      5'd19: begin mgamma1 = 15'b100111010010101; mgamma2 = 14'b11000001110111; end
      5'd20: begin mgamma1 = 15'b101000001110010; mgamma2 = 14'b11000111111011; end
      5'd21: begin mgamma1 = 15'b101001000110101; mgamma2 = 14'b11001101110000; end
      5'd22: begin mgamma1 = 15'b101001111011111; mgamma2 = 14'b11010011011000; end
      5'd23: begin mgamma1 = 15'b101010101110011; mgamma2 = 14'b11011000110010; end
      5'd24: begin mgamma1 = 15'b101011011110001; mgamma2 = 14'b11011110000001; end
      5'd25: begin mgamma1 = 15'b101100001011011; mgamma2 = 14'b11100011000100; end
      5'd26: begin mgamma1 = 15'b101100110110011; mgamma2 = 14'b11100111111011; end
      5'd27: begin mgamma1 = 15'b101101011111010; mgamma2 = 14'b11101100101001; end
      5'd28: begin mgamma1 = 15'b101110000110001; mgamma2 = 14'b11110001001100; end
      5'd29: begin mgamma1 = 15'b101110101011001; mgamma2 = 14'b11110101100110; end
      5'd30: begin mgamma1 = 15'b101111001110010; mgamma2 = 14'b11111001110111; end
      default: begin mgamma1 = 15'b101111101111111; mgamma2 = 14'b11111101111111; end
    endcase
  end

endmodule

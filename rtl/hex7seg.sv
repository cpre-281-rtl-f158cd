// hex7seg: hexadecimal digit to 7-segment pattern.
//
// seg[i] drives segment i of a display numbered 0 top, 1 upper right,
// 2 lower right, 3 bottom, 4 lower left, 5 upper left, 6 middle; 1 means
// lit. Digits 0-9 and A b C d E F use the usual shapes. Combinational.
// The segment numbering follows the published display drawing; the polarity
// (active high) is this design's choice -- invert seg for a common-anode
// board.
module hex7seg (
  input  logic [3:0] nibble,
  output logic [6:0] seg
);

  always_comb begin
    unique case (nibble)
      4'h0: seg = 7'h3F;
      4'h1: seg = 7'h06;
      4'h2: seg = 7'h5B;
      4'h3: seg = 7'h4F;
      4'h4: seg = 7'h66;
      4'h5: seg = 7'h6D;
      4'h6: seg = 7'h7D;
      4'h7: seg = 7'h07;
      4'h8: seg = 7'h7F;
      4'h9: seg = 7'h6F;
      4'hA: seg = 7'h77;
      4'hB: seg = 7'h7C;
      4'hC: seg = 7'h39;
      4'hD: seg = 7'h5E;
      4'hE: seg = 7'h79;
      default: seg = 7'h71;
    endcase
  end

endmodule

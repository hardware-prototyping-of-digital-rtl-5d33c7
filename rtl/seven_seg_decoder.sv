// seven_seg_decoder: one digit to a seven-segment pattern (combinational).
//
// Segments are named a (top) clockwise to f, with g in the middle. With
// A_MSB = 1 the output is {a,b,c,d,e,f,g} (a in bit 6); with A_MSB = 0 it is
// {g,f,e,d,c,b,a} (a in bit 0). ACTIVE_LOW = 0 drives a lit segment with 1,
// ACTIVE_LOW = 1 with 0. The energy and cost displays use the defaults
// (0 shows as 7E, 1 as 30, 5 as 5B); the clock digits use A_MSB = 0 and
// ACTIVE_LOW = 1 (0 shows as 40, 1 as 79, 9 as 10). Those codes are the
// meter's. Codes 10 to 15, which BCD never produces, show the hexadecimal
// letters A, b, C, d, E, F: this design's choice.
module seven_seg_decoder #(
  parameter bit ACTIVE_LOW = 1'b0,
  parameter bit A_MSB      = 1'b1
) (
  input  logic [3:0] digit,
  output logic [6:0] seg
);
  logic [6:0] abcdefg;   // active high, a in bit 6

  always_comb begin
    unique case (digit)
      4'h0: abcdefg = 7'b1111110;
      4'h1: abcdefg = 7'b0110000;
      4'h2: abcdefg = 7'b1101101;
      4'h3: abcdefg = 7'b1111001;
      4'h4: abcdefg = 7'b0110011;
      4'h5: abcdefg = 7'b1011011;
      4'h6: abcdefg = 7'b1011111;
      4'h7: abcdefg = 7'b1110000;
      4'h8: abcdefg = 7'b1111111;
      4'h9: abcdefg = 7'b1111011;
      4'hA: abcdefg = 7'b1110111;
      4'hB: abcdefg = 7'b0011111;
      4'hC: abcdefg = 7'b1001110;
      4'hD: abcdefg = 7'b0111101;
      4'hE: abcdefg = 7'b1001111;
      4'hF: abcdefg = 7'b1000111;
    endcase
    for (int b = 0; b < 7; b++) seg[b] = A_MSB ? abcdefg[b] : abcdefg[6-b];
    if (ACTIVE_LOW) seg = ~seg;
  end
endmodule

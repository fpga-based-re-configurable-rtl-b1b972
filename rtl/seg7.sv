// seg7: hexadecimal seven-segment decoder for one display digit.
//
// Purely combinational: the 4-bit value on binary is shown as 0-9, A, b, C,
// d, E, F. hex[0] drives segment a, hex[1] b, ... hex[6] g (a top, then
// clockwise, g the middle bar). Segments are active low, as on common-anode
// displays such as those of Cyclone II development boards: a 0 lights the
// segment.
//
// Two of these show the high and low nibble of the DAC input word in the
// original design; the segment order, polarity and glyphs are this design's
// own choice.
module seg7
  import dac_pkg::*;
(
  input  logic [3:0] binary,
  output seg7_t      hex
);

  seg7_t lit; // active-high pattern, bit i = segment a+i

  always_comb begin
    unique case (binary)
      4'h0: lit = 7'b0111111;
      4'h1: lit = 7'b0000110;
      4'h2: lit = 7'b1011011;
      4'h3: lit = 7'b1001111;
      4'h4: lit = 7'b1100110;
      4'h5: lit = 7'b1101101;
      4'h6: lit = 7'b1111101;
      4'h7: lit = 7'b0000111;
      4'h8: lit = 7'b1111111;
      4'h9: lit = 7'b1101111;
      4'hA: lit = 7'b1110111;
      4'hB: lit = 7'b1111100;
      4'hC: lit = 7'b0111001;
      4'hD: lit = 7'b1011110;
      4'hE: lit = 7'b1111001;
      4'hF: lit = 7'b1110001;
    endcase
  end

  assign hex = ~lit;

endmodule

// seven_seg: hexadecimal digit to 7-segment display decoder.
//
// Combinational lookup from a 4-bit value to the segments of one directly
// driven display, in the usual hex font: 0-9, A, b, C, d, E, F. Segment
// bit 0 is A (top), then B (top right), C (bottom right), D (bottom),
// E (bottom left), F (top left), and bit 6 is G (middle). With ACTIVE_LOW = 0
// a 1 lights a segment (common-cathode display); ACTIVE_LOW = 1 inverts all
// outputs for a common-anode display. The lab only asks for the result to be
// shown on two 7-segment displays; the font, the bit order and the polarity
// are this design's choice.
module seven_seg #(
  parameter bit ACTIVE_LOW = 1'b0
) (
  input  logic [3:0] digit,
  output logic [6:0] seg     // {G, F, E, D, C, B, A}
);

  logic [6:0] lit;  // 1 = segment on

  always_comb begin
    case (digit)
      4'h0: lit = 7'b011_1111;
      4'h1: lit = 7'b000_0110;
      4'h2: lit = 7'b101_1011;
      4'h3: lit = 7'b100_1111;
      4'h4: lit = 7'b110_0110;
      4'h5: lit = 7'b110_1101;
      4'h6: lit = 7'b111_1101;
      4'h7: lit = 7'b000_0111;
      4'h8: lit = 7'b111_1111;
      4'h9: lit = 7'b110_1111;
      4'hA: lit = 7'b111_0111;
      4'hB: lit = 7'b111_1100;
      4'hC: lit = 7'b011_1001;
      4'hD: lit = 7'b101_1110;
      4'hE: lit = 7'b111_1001;
      4'hF: lit = 7'b111_0001;
      default: lit = 7'b000_0000;
    endcase
  end

  assign seg = ACTIVE_LOW ? ~lit : lit;

endmodule

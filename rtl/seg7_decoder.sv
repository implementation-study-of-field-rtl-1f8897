// seg7_decoder
//
// Decodes one BCD digit to the segment lines of a common-anode 7-segment
// display.  A segment lights when its line is driven low, so the output
// is the complement of the usual active-high pattern.  Bit 0 is segment A
// and bit 6 is segment G (A top, then clockwise B, C, D, E, F, with G in
// the middle).  Read as a hex number, a "0" is 40h (only G dark) and a
// "9" is 10h (only E dark); this "9" has its bottom segment D lit, and a
// "6" has its top segment A lit.  Codes 10 to 15 blank the digit.
//
// Interface and timing: purely combinational, digit_i in, seg_n_o out.
//
// The common-anode polarity and the 40h / 10h codes of "0" and "9" follow
// the design; the shapes of the other digits are this implementation's.
module seg7_decoder
  import distance_safety_pkg::*;
(
  input  bcd_t  digit_i,
  output seg7_t seg_n_o
);

  seg7_t lit;  // active-high pattern, bit 0 = A .. bit 6 = G

  always_comb begin
    unique case (digit_i)
      4'd0:    lit = 7'b011_1111;
      4'd1:    lit = 7'b000_0110;
      4'd2:    lit = 7'b101_1011;
      4'd3:    lit = 7'b100_1111;
      4'd4:    lit = 7'b110_0110;
      4'd5:    lit = 7'b110_1101;
      4'd6:    lit = 7'b111_1101;
      4'd7:    lit = 7'b000_0111;
      4'd8:    lit = 7'b111_1111;
      4'd9:    lit = 7'b110_1111;
      default: lit = 7'b000_0000;
    endcase
    seg_n_o = ~lit;
  end

endmodule

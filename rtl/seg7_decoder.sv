// seg7_decoder: drives one seven-segment digit of the demonstrator board
// from a glyph code (qam_pkg::glyph_t): codes 0..15 show the hexadecimal
// digits 0-9, A, b, C, d, E, F; GLYPH_BLANK turns the digit off and
// GLYPH_MINUS lights only the middle bar. Any other code is blank.
//
// Output seg[0..6] = segments a..g, active low (a segment is lit when its
// bit is 0), as on boards whose displays are wired to the FPGA without
// inverting drivers. Purely combinational. That each digit has its own
// code-to-segment decoder follows the reference demonstrator; the glyph set
// and the active-low polarity are this design's choices.
module seg7_decoder
  import qam_pkg::*;
(
  input  glyph_t      glyph,
  output logic [6:0]  seg
);

  logic [6:0] lit;   // active high, bit 0 = segment a

  always_comb begin
    case (glyph)
      5'd0:    lit = 7'h3F;
      5'd1:    lit = 7'h06;
      5'd2:    lit = 7'h5B;
      5'd3:    lit = 7'h4F;
      5'd4:    lit = 7'h66;
      5'd5:    lit = 7'h6D;
      5'd6:    lit = 7'h7D;
      5'd7:    lit = 7'h07;
      5'd8:    lit = 7'h7F;
      5'd9:    lit = 7'h6F;
      5'd10:   lit = 7'h77;
      5'd11:   lit = 7'h7C;
      5'd12:   lit = 7'h39;
      5'd13:   lit = 7'h5E;
      5'd14:   lit = 7'h79;
      5'd15:   lit = 7'h71;
      GLYPH_MINUS: lit = 7'h40;
      default: lit = 7'h00;
    endcase
    seg = ~lit;
  end

endmodule

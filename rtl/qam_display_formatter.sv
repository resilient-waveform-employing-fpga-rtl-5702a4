// qam_display_formatter: turns a constellation point R + jI into the five
// glyph codes of the demonstrator's display, left to right
//   [4] sign of R   [3] |R|   [2] sign of I   [1] |I|   [0] "F"
// where a sign digit shows "-" for a negative part and is blank otherwise,
// and "F" stands for the imaginary unit. 1-1j reads " 1-1F".
// Magnitudes are one hexadecimal digit, so 256-QAM levels 11, 13 and 15
// show as b, d and F.
//
// glyphs[k] drives display digit k. Purely combinational. The five-digit
// layout (real part, then imaginary part ending in F) follows the reference
// board photos; the hexadecimal magnitudes and the blank plus sign are this
// design's choices.
module qam_display_formatter
  import qam_pkg::*;
(
  input  level_t             re,
  input  level_t             im,
  output glyph_t [4:0]       glyphs
);

  function automatic glyph_t magnitude(level_t v);
    level_t a;
    a = (v < 0) ? -v : v;
    return glyph_t'(unsigned'(a));
  endfunction

  always_comb begin
    glyphs[4] = (re < 0) ? GLYPH_MINUS : GLYPH_BLANK;
    glyphs[3] = magnitude(re);
    glyphs[2] = (im < 0) ? GLYPH_MINUS : GLYPH_BLANK;
    glyphs[1] = magnitude(im);
    glyphs[0] = GLYPH_F;
  end

endmodule

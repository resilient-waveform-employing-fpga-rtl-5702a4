// qam_board_demo: the switches-to-displays modulator demonstrator. The
// format is fixed per build by BITS (2, 4, 6 or 8 bits per symbol for 4-,
// 16-, 64- or 256-QAM); changing the format means rebuilding with another
// BITS while the rest of the hardware stays the same.
//
// sw[BITS-1:0] is the token (sw[BITS-1] the leftmost switch and first bit),
// the other switches are ignored. The token goes through qam_mapper, the
// point through qam_display_formatter, and each of the five glyph codes
// through its own seg7_decoder onto hex4 (left) .. hex0 (right), active
// low. Example: BITS = 8, sw = 11010000 shows " 9-7F".
// Purely combinational. The port set (ten switches, five displays), the
// mapper-formatter-decoder structure and the example points follow the
// reference demonstrator; the glyph layout is described in
// qam_display_formatter.
module qam_board_demo
  import qam_pkg::*;
#(
  parameter int unsigned BITS = 8
) (
  input  logic [9:0] sw,
  output logic [6:0] hex0,
  output logic [6:0] hex1,
  output logic [6:0] hex2,
  output logic [6:0] hex3,
  output logic [6:0] hex4
);

  localparam qam_mode_e MODE = qam_mode_e'(BITS / 2 - 1);

  logic [MAX_BITS-1:0] token;
  level_t              re, im;
  glyph_t [4:0]        glyphs;
  logic [6:0]          seg [5];

  assign token = MAX_BITS'(sw[BITS-1:0]);

  qam_mapper u_mapper (
    .mode (MODE),
    .bits (token),
    .re   (re),
    .im   (im)
  );

  qam_display_formatter u_fmt (
    .re     (re),
    .im     (im),
    .glyphs (glyphs)
  );

  for (genvar d = 0; d < 5; d++) begin : g_digit
    seg7_decoder u_dec (
      .glyph (glyphs[d]),
      .seg   (seg[d])
    );
  end

  assign hex0 = seg[0];
  assign hex1 = seg[1];
  assign hex2 = seg[2];
  assign hex3 = seg[3];
  assign hex4 = seg[4];

endmodule

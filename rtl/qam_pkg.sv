// qam_pkg: types, constants and helper functions shared by the modulator,
// demodulator and display blocks.
//
// A square M-QAM point carries 2*(mode+1) bits: the upper half of the bit
// field selects the real (in-phase) level, the lower half the imaginary
// (quadrature) level. Each half is XORed with a fixed per-format mask and
// then Gray-decoded to a level index i in 0..K-1 (K = sqrt(M)); the level is
// 2*i-(K-1), so levels are the odd integers -(K-1)..(K-1). Neighbouring
// levels differ in one bit (a Gray map). The masks are chosen so that the
// four example points of the reference demonstrator are reproduced:
//   4-QAM  "10"       -> 1-1j      16-QAM  "1010"     -> 3-3j
//   64-QAM "110001"   -> 1-5j      256-QAM "11010000" -> 9-7j
// For 4- and 64-QAM the masks are zero (plain binary-reflected Gray map).
package qam_pkg;

  // Modulation format, selected at run time in the transceiver chain.
  typedef enum logic [1:0] {
    QAM4   = 2'd0,
    QAM16  = 2'd1,
    QAM64  = 2'd2,
    QAM256 = 2'd3
  } qam_mode_e;

  localparam int unsigned MAX_BITS = 8;   // bits per symbol at 256-QAM
  localparam int unsigned AXIS_BITS = 4;  // bits per axis at 256-QAM
  localparam int unsigned LEVEL_W = 5;    // signed level, -15..15

  typedef logic signed [LEVEL_W-1:0] level_t;

  // Glyph codes for one seven-segment digit: 0..15 are hexadecimal digits.
  typedef logic [4:0] glyph_t;
  localparam glyph_t GLYPH_BLANK = 5'd16;
  localparam glyph_t GLYPH_MINUS = 5'd17;
  localparam glyph_t GLYPH_F     = 5'd15;  // the imaginary unit, shown as "F"

  function automatic int unsigned bits_per_symbol(qam_mode_e mode);
    return 2 * (int'(mode) + 1);
  endfunction

  function automatic int unsigned axis_bits(qam_mode_e mode);
    return int'(mode) + 1;
  endfunction

  // Per-format XOR masks on the real and imaginary bit halves.
  function automatic logic [AXIS_BITS-1:0] mask_re(qam_mode_e mode);
    case (mode)
      QAM256:  return 4'b0111;
      default: return 4'b0000;
    endcase
  endfunction

  function automatic logic [AXIS_BITS-1:0] mask_im(qam_mode_e mode);
    case (mode)
      QAM16:   return 4'b0010;
      QAM256:  return 4'b0110;
      default: return 4'b0000;
    endcase
  endfunction

  function automatic logic [AXIS_BITS-1:0] gray_encode(logic [AXIS_BITS-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AXIS_BITS-1:0] gray_decode(logic [AXIS_BITS-1:0] g);
    logic [AXIS_BITS-1:0] b;
    b[AXIS_BITS-1] = g[AXIS_BITS-1];
    for (int k = AXIS_BITS - 2; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  // Level of an axis from its index: 2*i - (K-1).
  function automatic level_t index_to_level(logic [AXIS_BITS-1:0] idx, qam_mode_e mode);
    return level_t'(2 * int'(idx) - ((1 << axis_bits(mode)) - 1));
  endfunction

endpackage

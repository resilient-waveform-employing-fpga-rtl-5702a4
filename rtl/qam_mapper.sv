// qam_mapper: the modulation stage. Turns a token of 2, 4, 6 or 8 bits into
// one square-QAM constellation point (4/16/64/256-QAM) with signed odd
// integer real and imaginary parts (Cartesian form R + jI).
//
// The token is right-aligned in `bits`: for a format with B bits per symbol
// only bits[B-1:0] are used, bits[B-1] being the first (most significant)
// bit. bits[B-1:B/2] select the real level, bits[B/2-1:0] the imaginary
// level, through the per-format Gray map defined in qam_pkg. The format is
// a run-time input, so the same hardware serves every bit loading.
//
// Purely combinational, no latency. The bit-to-point examples and the four
// formats follow the reference design; the bit split, the Gray masks and the
// level scale (odd integers) are this design's choices.
module qam_mapper
  import qam_pkg::*;
(
  input  qam_mode_e            mode,
  input  logic [MAX_BITS-1:0]  bits,
  output level_t               re,
  output level_t               im
);

  logic [AXIS_BITS-1:0] re_bits, im_bits;

  always_comb begin
    re_bits = '0;
    im_bits = '0;
    case (mode)
      QAM4:    begin re_bits[0]   = bits[1];   im_bits[0]   = bits[0];   end
      QAM16:   begin re_bits[1:0] = bits[3:2]; im_bits[1:0] = bits[1:0]; end
      QAM64:   begin re_bits[2:0] = bits[5:3]; im_bits[2:0] = bits[2:0]; end
      default: begin re_bits      = bits[7:4]; im_bits      = bits[3:0]; end
    endcase
    re = index_to_level(gray_decode(re_bits ^ mask_re(mode)), mode);
    im = index_to_level(gray_decode(im_bits ^ mask_im(mode)), mode);
  end

endmodule

// qam_demapper: the demodulation stage. Takes one received complex sample
// (real and imaginary parts scaled by the chain gain 2**GAIN_SHIFT) and
// returns the bits of the nearest constellation point of the selected
// format, the inverse of qam_mapper.
//
// Per axis the slicer computes the level index
//   i = floor((x + K*G) / (2*G)),  clamped to 0..K-1,
// with K = sqrt(M) levels and G = 2**GAIN_SHIFT, which is the nearest odd
// level 2*i-(K-1) to x/G. The index is Gray-encoded and XORed with the
// format's mask (qam_pkg) to give the bit half. Output bits are
// right-aligned as in qam_mapper; unused upper bits are zero.
//
// Purely combinational. That the demodulator follows the modulator's format
// is from the reference design; the slicer and gain handling are this
// design's choices.
module qam_demapper
  import qam_pkg::*;
#(
  parameter int unsigned IN_W       = 12,  // width of the signed input parts
  parameter int unsigned GAIN_SHIFT = 2    // log2 of the chain gain
) (
  input  qam_mode_e                 mode,
  input  logic signed [IN_W-1:0]    re,
  input  logic signed [IN_W-1:0]    im,
  output logic [MAX_BITS-1:0]       bits
);

  localparam int unsigned SUM_W = IN_W + GAIN_SHIFT + 6;

  function automatic logic [AXIS_BITS-1:0] slice(logic signed [IN_W-1:0] x, qam_mode_e m);
    logic signed [SUM_W-1:0] shifted, k_levels, idx;
    k_levels = SUM_W'(1 << axis_bits(m));
    shifted  = (SUM_W'(x) + (k_levels <<< GAIN_SHIFT)) >>> (GAIN_SHIFT + 1);
    idx      = shifted;
    if (idx < 0) idx = '0;
    if (idx > k_levels - 1) idx = k_levels - 1;
    return AXIS_BITS'(idx);
  endfunction

  logic [AXIS_BITS-1:0] re_bits, im_bits;

  always_comb begin
    re_bits = gray_encode(slice(re, mode)) ^ mask_re(mode);
    im_bits = gray_encode(slice(im, mode)) ^ mask_im(mode);
    bits = '0;
    case (mode)
      QAM4:    bits[1:0] = {re_bits[0],   im_bits[0]};
      QAM16:   bits[3:0] = {re_bits[1:0], im_bits[1:0]};
      QAM64:   bits[5:0] = {re_bits[2:0], im_bits[2:0]};
      default: bits[7:0] = {re_bits,      im_bits};
    endcase
  end

endmodule

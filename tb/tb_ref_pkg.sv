// tb_ref_pkg: reference models shared by the testbenches, written
// independently of the RTL. The constellation is described by the level
// order of each axis: level index i (level 2*i-(K-1)) carries the bit
// pattern gray(i) XOR mask, with the per-format masks listed here as
// literals.
package tb_ref_pkg;

  function automatic int ref_axis_bits(int mode);
    return mode + 1;
  endfunction

  function automatic int ref_mask(int mode, bit imag);
    automatic int m_re [4] = '{0, 0, 0, 7};
    automatic int m_im [4] = '{0, 2, 0, 6};
    return imag ? m_im[mode] : m_re[mode];
  endfunction

  // Level carried by pattern b on one axis.
  function automatic int ref_level(int mode, int b, bit imag);
    automatic int k = 1 << ref_axis_bits(mode);
    for (int i = 0; i < k; i++)
      if (((i ^ (i >> 1)) ^ ref_mask(mode, imag)) == b) return 2 * i - (k - 1);
    return 999;
  endfunction

  // Constellation point of a right-aligned token.
  function automatic void ref_map(int mode, int token, output int re, output int im);
    automatic int ab = ref_axis_bits(mode);
    re = ref_level(mode, (token >> ab) & ((1 << ab) - 1), 1'b0);
    im = ref_level(mode, token & ((1 << ab) - 1), 1'b1);
  endfunction

endpackage

// qam_demapper_tb: every token of every format is turned into its
// reference point, scaled by the chain gain 4, disturbed by an offset
// below half the decision distance, and must come back as the same token.
// Points far beyond the outer levels must clamp to the outer level.
module qam_demapper_tb;
  import qam_pkg::*;
  import tb_ref_pkg::*;

  localparam int G = 4;

  qam_mode_e mode;
  logic signed [11:0] re, im;
  logic [7:0] bits;
  int checks = 0, failures = 0;

  qam_demapper #(.IN_W(12), .GAIN_SHIFT(2)) dut (.mode(mode), .re(re), .im(im), .bits(bits));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ere, eim, nre, nim;
    for (int m = 0; m < 4; m++)
      for (int t = 0; t < (1 << (2 * (m + 1))); t++)
        for (int rep = 0; rep < 6; rep++) begin
          ref_map(m, t, ere, eim);
          // offsets in -(G-1) .. G-1 never cross a decision boundary
          nre = (rep == 0) ? 0 : int'($urandom_range(2 * G - 2)) - (G - 1);
          nim = (rep == 0) ? 0 : int'($urandom_range(2 * G - 2)) - (G - 1);
          mode = qam_mode_e'(m);
          re = 12'(ere * G + nre);
          im = 12'(eim * G + nim);
          #1;
          checks++;
          if (int'(bits) != t) begin
            failures++;
            $display("FAIL mode %0d token %0d: in %0d,%0d got %0d", m, t, re, im, bits);
          end
        end
    // Clamping: far outside the constellation.
    for (int m = 0; m < 4; m++) begin
      automatic int k = 1 << (m + 1);
      automatic int ab = m + 1;
      int expect_tok;
      mode = qam_mode_e'(m);
      re = 12'sd1000;
      im = -12'sd1000;
      #1;
      // outer positive real level has index k-1, outer negative imaginary index 0
      expect_tok = ((((k - 1) ^ ((k - 1) >> 1)) ^ ref_mask(m, 0)) << ab) | (0 ^ ref_mask(m, 1));
      checks++;
      if (int'(bits) != expect_tok) begin
        failures++;
        $display("FAIL clamp mode %0d: got %0d expected %0d", m, bits, expect_tok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// qam_display_formatter_tb: every pair of odd levels -15..15 must give the
// digits sign(R), |R|, sign(I), |I|, F from left to right.
module qam_display_formatter_tb;
  import qam_pkg::*;

  level_t re, im;
  glyph_t [4:0] glyphs;
  int checks = 0, failures = 0;

  qam_display_formatter dut (.re(re), .im(im), .glyphs(glyphs));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = -15; r <= 15; r += 2)
      for (int i = -15; i <= 15; i += 2) begin
        int e [5];
        re = level_t'(r);
        im = level_t'(i);
        #1;
        e[4] = (r < 0) ? 17 : 16;
        e[3] = (r < 0) ? -r : r;
        e[2] = (i < 0) ? 17 : 16;
        e[1] = (i < 0) ? -i : i;
        e[0] = 15;
        for (int d = 0; d < 5; d++) begin
          checks++;
          if (int'(glyphs[d]) != e[d]) begin
            failures++;
            $display("FAIL %0d,%0dj digit %0d: %0d expected %0d", r, i, d, glyphs[d], e[d]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

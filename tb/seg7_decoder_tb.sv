// seg7_decoder_tb: every glyph code against a table of lit segments written
// as letters a..g, with the output active low.
module seg7_decoder_tb;
  import qam_pkg::*;

  glyph_t glyph;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  seg7_decoder dut (.glyph(glyph), .seg(seg));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] lit_of(string s);
    automatic logic [6:0] v = '0;
    for (int i = 0; i < s.len(); i++) v[s[i] - "a"] = 1'b1;
    return v;
  endfunction

  initial begin
    string lit [32];
    lit[0] = "abcdef";  lit[1] = "bc";     lit[2] = "abdeg";   lit[3] = "abcdg";
    lit[4] = "bcfg";    lit[5] = "acdfg";  lit[6] = "acdefg";  lit[7] = "abc";
    lit[8] = "abcdefg"; lit[9] = "abcdfg"; lit[10] = "abcefg"; lit[11] = "cdefg";
    lit[12] = "adef";   lit[13] = "bcdeg"; lit[14] = "adefg";  lit[15] = "aefg";
    lit[16] = "";       lit[17] = "g";
    for (int g = 18; g < 32; g++) lit[g] = "";
    for (int g = 0; g < 32; g++) begin
      glyph = glyph_t'(g);
      #1;
      checks++;
      if (seg !== ~lit_of(lit[g])) begin
        failures++;
        $display("FAIL glyph %0d: seg %b expected %b", g, seg, ~lit_of(lit[g]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// qam_board_demo_tb: builds the demonstrator for all four formats, reads
// the five displays back into characters and checks the four worked
// examples (" 1-1F", " 3-3F", " 1-5F", " 9-7F") and every switch setting of
// every format against the reference constellation.
module qam_board_demo_tb;
  import tb_ref_pkg::*;

  logic [9:0] sw;
  logic [6:0] h [4][5];
  int checks = 0, failures = 0;

  qam_board_demo #(.BITS(2)) d4   (.sw(sw), .hex0(h[0][0]), .hex1(h[0][1]), .hex2(h[0][2]), .hex3(h[0][3]), .hex4(h[0][4]));
  qam_board_demo #(.BITS(4)) d16  (.sw(sw), .hex0(h[1][0]), .hex1(h[1][1]), .hex2(h[1][2]), .hex3(h[1][3]), .hex4(h[1][4]));
  qam_board_demo #(.BITS(6)) d64  (.sw(sw), .hex0(h[2][0]), .hex1(h[2][1]), .hex2(h[2][2]), .hex3(h[2][3]), .hex4(h[2][4]));
  qam_board_demo #(.BITS(8)) d256 (.sw(sw), .hex0(h[3][0]), .hex1(h[3][1]), .hex2(h[3][2]), .hex3(h[3][3]), .hex4(h[3][4]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Active-low segment pattern to character; '?' for anything unknown.
  function automatic string char_of(logic [6:0] seg);
    case (~seg)
      7'h00: return " ";
      7'h40: return "-";
      7'h06: return "1";
      7'h4F: return "3";
      7'h6D: return "5";
      7'h07: return "7";
      7'h6F: return "9";
      7'h7C: return "b";
      7'h5E: return "d";
      7'h71: return "F";
      default: return "?";
    endcase
  endfunction

  function automatic string screen(int m);
    automatic string s = "";
    for (int d = 4; d >= 0; d--) s = {s, char_of(h[m][d])};
    return s;
  endfunction

  function automatic string mag(int v);
    automatic string digits = "0123456789abcdeF";
    automatic int a = (v < 0) ? -v : v;
    automatic string c = " ";
    c[0] = digits[a];
    return c;
  endfunction

  task automatic expect_screen(int m, int token, string want);
    sw = 10'(token) | 10'($urandom) << (2 * (m + 1));  // upper switches ignored
    #1;
    checks++;
    if (screen(m) != want) begin
      failures++;
      $display("FAIL format %0d switches %b: '%s' expected '%s'", m, sw, screen(m), want);
    end
  endtask

  initial begin
    int ere, eim;
    expect_screen(0, 'b10, " 1-1F");
    expect_screen(1, 'b1010, " 3-3F");
    expect_screen(2, 'b110001, " 1-5F");
    expect_screen(3, 'b11010000, " 9-7F");
    for (int m = 0; m < 4; m++)
      for (int t = 0; t < (1 << (2 * (m + 1))); t++) begin
        ref_map(m, t, ere, eim);
        expect_screen(m, t, {(ere < 0) ? "-" : " ", mag(ere), (eim < 0) ? "-" : " ", mag(eim), "F"});
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

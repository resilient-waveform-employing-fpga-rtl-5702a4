// qam_mapper_tb: checks every token of every format against the reference
// constellation, the four worked example points of the demonstrator, and
// the Gray property (adjacent levels on an axis differ in exactly one bit).
module qam_mapper_tb;
  import qam_pkg::*;
  import tb_ref_pkg::*;

  qam_mode_e mode;
  logic [7:0] bits;
  level_t re, im;
  int checks = 0, failures = 0;

  qam_mapper dut (.mode(mode), .bits(bits), .re(re), .im(im));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_point(int m, int token, int ere, int eim);
    mode = qam_mode_e'(m);
    bits = 8'(token);
    #1;
    checks++;
    if (int'(re) != ere || int'(im) != eim) begin
      failures++;
      $display("FAIL mode %0d token %b: got %0d,%0dj, expected %0d,%0dj", m, bits, re, im, ere, eim);
    end
  endtask

  initial begin
    int ere, eim;
    // Worked examples of the demonstrator.
    expect_point(0, 'b10, 1, -1);
    expect_point(1, 'b1010, 3, -3);
    expect_point(2, 'b110001, 1, -5);
    expect_point(3, 'b11010000, 9, -7);
    // Full sweep of every format.
    for (int m = 0; m < 4; m++)
      for (int t = 0; t < (1 << (2 * (m + 1))); t++) begin
        ref_map(m, t, ere, eim);
        expect_point(m, t, ere, eim);
      end
    // Gray property, taken from the block's own outputs: the tokens of two
    // neighbouring points differ in one bit.
    for (int m = 0; m < 4; m++) begin
      automatic int n = 1 << (2 * (m + 1));
      automatic int tok_of [int];
      for (int t = 0; t < n; t++) begin
        mode = qam_mode_e'(m);
        bits = 8'(t);
        #1;
        tok_of[(int'(re) + 16) * 64 + (int'(im) + 16)] = t;
      end
      for (int t = 0; t < n; t++) begin
        mode = qam_mode_e'(m);
        bits = 8'(t);
        #1;
        if (tok_of.exists((int'(re) + 18) * 64 + (int'(im) + 16))) begin
          checks++;
          if ($countones(t ^ tok_of[(int'(re) + 18) * 64 + (int'(im) + 16)]) != 1) begin
            failures++;
            $display("FAIL Gray: mode %0d token %0d", m, t);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

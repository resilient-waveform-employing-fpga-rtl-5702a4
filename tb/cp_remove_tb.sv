// cp_remove_tb: a stream of prefixed blocks with random valid gaps; the
// output must be exactly the block samples, in order, one cycle after each,
// with every prefix sample dropped.
module cp_remove_tb;
  localparam int N = 16, CP = 4, NBLK = 20;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [7:0] in_re = 0, in_im = 0, out_re, out_im;
  int checks = 0, failures = 0;
  int exp_re [$], exp_im [$];
  int pos = 0;
  bit keep_d = 0;

  cp_remove #(.N(N), .CP(CP), .W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid != keep_d) begin
      failures++;
      $display("FAIL out_valid %0b expected %0b", out_valid, keep_d);
    end
    if (out_valid) begin
      automatic int er = exp_re.pop_front();
      automatic int ei = exp_im.pop_front();
      checks++;
      if (int'(out_re) != er || int'(out_im) != ei) begin
        failures++;
        $display("FAIL got %0d,%0d expected %0d,%0d", out_re, out_im, er, ei);
      end
    end
    keep_d = in_valid && (pos >= CP);
    if (in_valid) begin
      if (pos >= CP) begin
        exp_re.push_back(int'(in_re));
        exp_im.push_back(int'(in_im));
      end
      pos = (pos + 1) % (N + CP);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (NBLK * (N + CP) * 4 / 3) begin
      @(posedge clk);
      in_valid <= ($urandom_range(3) != 0);
      in_re    <= 8'($urandom);
      in_im    <= 8'($urandom);
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

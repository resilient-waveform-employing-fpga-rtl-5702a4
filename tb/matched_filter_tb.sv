// matched_filter_tb: random samples with random valid gaps through the
// matched filter with an asymmetric pulse; each output must equal the
// convolution with the time-reversed pulse, one cycle after its input.
module matched_filter_tb;
  localparam int NTAPS = 4;
  localparam logic signed [3:0] C [NTAPS] = '{4'sd1, -4'sd2, 4'sd3, 4'sd2};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [7:0] in_re = 0, in_im = 0;
  logic signed [11:0] out_re, out_im;
  int checks = 0, failures = 0;
  int hist_re [$], hist_im [$];
  int exp_re [$], exp_im [$];

  matched_filter #(.NTAPS(NTAPS), .IN_W(8), .COEF_W(4), .OUT_W(12), .COEF(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit was_valid = 0;
  always @(posedge clk) if (rst_n) begin
    // out_valid must follow in_valid by exactly one cycle
    checks++;
    if (out_valid != was_valid) begin
      failures++;
      $display("FAIL latency: out_valid %0b, expected %0b", out_valid, was_valid);
    end
    was_valid = in_valid;
    if (out_valid) begin
      automatic int er = exp_re.pop_front();
      automatic int ei = exp_im.pop_front();
      checks++;
      if (int'(out_re) != er || int'(out_im) != ei) begin
        failures++;
        $display("FAIL got %0d,%0d expected %0d,%0d", out_re, out_im, er, ei);
      end
    end
    if (in_valid) begin
      automatic int zr = 0, zi = 0;
      hist_re.push_front(int'(in_re));
      hist_im.push_front(int'(in_im));
      for (int k = 0; k < NTAPS; k++)
        if (k < hist_re.size()) begin
          zr += int'(C[NTAPS - 1 - k]) * hist_re[k];
          zi += int'(C[NTAPS - 1 - k]) * hist_im[k];
        end
      exp_re.push_back(zr);
      exp_im.push_back(zi);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (600) begin
      @(posedge clk);
      in_valid <= ($urandom_range(3) != 0);
      in_re    <= 8'($signed($urandom_range(120)) - 60);
      in_im    <= 8'($signed($urandom_range(120)) - 60);
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// shaping_filter_tb: drives the filter with an asymmetric set of
// coefficients (so that a reversed or shifted tap shows), random samples,
// random input gaps and random output back-pressure, and compares every
// output with a convolution computed here over the accepted samples.
module shaping_filter_tb;
  localparam int NTAPS = 4;
  localparam logic signed [3:0] C [NTAPS] = '{4'sd1, -4'sd2, 4'sd3, 4'sd2};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [4:0] in_re = 0, in_im = 0;
  logic signed [9:0] out_re, out_im;
  int checks = 0, failures = 0;
  int hist_re [$], hist_im [$];
  int exp_re [$], exp_im [$];

  shaping_filter #(.NTAPS(NTAPS), .IN_W(5), .COEF_W(4), .OUT_W(10), .COEF(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      automatic int yr = 0, yi = 0;
      hist_re.push_front(int'(in_re));
      hist_im.push_front(int'(in_im));
      for (int k = 0; k < NTAPS; k++)
        if (k < hist_re.size()) begin
          yr += int'(C[k]) * hist_re[k];
          yi += int'(C[k]) * hist_im[k];
        end
      exp_re.push_back(yr);
      exp_im.push_back(yi);
    end
    if (out_valid && out_ready) begin
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        automatic int er = exp_re.pop_front();
        automatic int ei = exp_im.pop_front();
        if (int'(out_re) != er || int'(out_im) != ei) begin
          failures++;
          $display("FAIL got %0d,%0d expected %0d,%0d", out_re, out_im, er, ei);
        end
      end
    end
    out_ready <= ($urandom_range(3) != 0);
  end

  initial begin
    automatic int accepted = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (accepted < 500) begin
      @(posedge clk);
      if (in_valid && in_ready) accepted++;
      if (!in_valid || in_ready) begin
        in_valid <= ($urandom_range(4) != 0) && (accepted < 500);
        in_re    <= 5'($signed($urandom_range(30)) - 15);
        in_im    <= 5'($signed($urandom_range(30)) - 15);
      end
    end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_re.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

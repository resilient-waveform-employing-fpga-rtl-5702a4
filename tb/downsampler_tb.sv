// downsampler_tb: random samples with random valid gaps; only every L-th
// valid sample, at position PHASE counted from reset, may come out, one
// cycle later.
module downsampler_tb;
  localparam int L = 4, PHASE = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic signed [11:0] in_re = 0, in_im = 0, out_re, out_im;
  int checks = 0, failures = 0;
  int pos = 0, outputs = 0;
  bit keep_d = 0;
  int kr, ki;

  downsampler #(.L(L), .PHASE(PHASE), .W(12)) dut (.*);

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
      outputs++;
      checks++;
      if (int'(out_re) != kr || int'(out_im) != ki) begin
        failures++;
        $display("FAIL got %0d,%0d expected %0d,%0d", out_re, out_im, kr, ki);
      end
    end
    keep_d = in_valid && (pos == PHASE);
    if (keep_d) begin
      kr = int'(in_re);
      ki = int'(in_im);
    end
    if (in_valid) pos = (pos + 1) % L;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (800) begin
      @(posedge clk);
      in_valid <= ($urandom_range(3) != 0);
      in_re    <= 12'($urandom);
      in_im    <= 12'($urandom);
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (outputs < 100) begin
      failures++;
      $display("FAIL only %0d outputs", outputs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// upsampler_tb: random symbols enter with random gaps and leave under
// random back-pressure; each must come out as the symbol followed by L-1
// zeros, in order, and at full speed one symbol must take exactly L cycles.
module upsampler_tb;
  localparam int L = 4;
  localparam int NSYM = 300;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [4:0] in_re = 0, in_im = 0, out_re, out_im;
  int checks = 0, failures = 0;
  int exp_re [$], exp_im [$];
  bit full_speed = 0;
  int cyc = 0;
  int acc_cyc [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (full_speed && in_valid && in_ready && acc_cyc.size() < 20) acc_cyc.push_back(cyc);
  end

  upsampler #(.L(L), .W(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: expected output sequence built when a symbol is accepted.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      exp_re.push_back(int'(in_re));
      exp_im.push_back(int'(in_im));
      for (int k = 1; k < L; k++) begin
        exp_re.push_back(0);
        exp_im.push_back(0);
      end
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
  end

  always @(posedge clk) out_ready <= full_speed ? 1'b1 : ($urandom_range(3) != 0);

  initial begin
    automatic int accepted = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (accepted < NSYM) begin
      @(posedge clk);
      if (in_valid && in_ready) accepted++;
      if (!in_valid || in_ready) begin
        in_valid <= ($urandom_range(4) != 0) && (accepted < NSYM);
        in_re    <= 5'($signed($urandom_range(30)) - 15);
        in_im    <= 5'($signed($urandom_range(30)) - 15);
      end
    end
    @(posedge clk);
    in_valid <= 0;
    repeat (40) @(posedge clk);
    // Rate: with the sink always ready, consecutive symbols are accepted
    // exactly L cycles apart.
    full_speed = 1;
    repeat (2) @(posedge clk);
    in_valid <= 1;
    wait (acc_cyc.size() == 20);
    @(posedge clk);
    in_valid <= 0;
    checks++;
    if (acc_cyc[19] - acc_cyc[0] != 19 * L) begin
      failures++;
      $display("FAIL rate: %0d cycles for 19 symbol periods", acc_cyc[19] - acc_cyc[0]);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("FAIL %0d samples never came out", exp_re.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

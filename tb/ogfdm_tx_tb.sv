// ogfdm_tx_tb: random tokens in all four formats, with random input gaps
// and random converter back-pressure. The expected converter samples are
// built here: each point held for L samples (rectangular pulse after zero
// insertion), blocks of N samples each preceded by their last CP samples.
// The format is changed between blocks once the chain is empty.
module ogfdm_tx_tb;
  import tb_ref_pkg::*;
  localparam int L = 4, N = 16, CP = 4, BLOCKS_PER_MODE = 6;

  logic clk = 0, rst_n = 0;
  logic [1:0] mode = 0;
  logic in_valid = 0, in_ready, dac_valid, dac_ready = 0;
  logic [7:0] in_bits = 0;
  logic signed [7:0] dac_re, dac_im;
  int checks = 0, failures = 0;
  int blk_re [$], blk_im [$], exp_re [$], exp_im [$];

  ogfdm_tx #(.L(L), .N(N), .CP(CP), .SAMPLE_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .mode(qam_pkg::qam_mode_e'(mode)),
    .in_valid(in_valid), .in_ready(in_ready), .in_bits(in_bits),
    .dac_valid(dac_valid), .dac_ready(dac_ready), .dac_re(dac_re), .dac_im(dac_im));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      int r, i;
      ref_map(int'(mode), int'(in_bits), r, i);
      for (int k = 0; k < L; k++) begin
        blk_re.push_back(r);
        blk_im.push_back(i);
      end
      if (blk_re.size() == N) begin
        for (int k = N - CP; k < N; k++) begin
          exp_re.push_back(blk_re[k]);
          exp_im.push_back(blk_im[k]);
        end
        for (int k = 0; k < N; k++) begin
          exp_re.push_back(blk_re[k]);
          exp_im.push_back(blk_im[k]);
        end
        blk_re.delete();
        blk_im.delete();
      end
    end
    if (dac_valid && dac_ready) begin
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected sample");
      end else begin
        automatic int er = exp_re.pop_front();
        automatic int ei = exp_im.pop_front();
        if (int'(dac_re) != er || int'(dac_im) != ei) begin
          failures++;
          $display("FAIL mode %0d: got %0d,%0d expected %0d,%0d", mode, dac_re, dac_im, er, ei);
        end
      end
    end
    dac_ready <= ($urandom_range(3) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 4; m++) begin
      automatic int accepted = 0;
      mode <= 2'(m);
      while (accepted < BLOCKS_PER_MODE * N / L) begin
        @(posedge clk);
        if (in_valid && in_ready) accepted++;
        if (!in_valid || in_ready) begin
          in_valid <= ($urandom_range(3) != 0) && (accepted < BLOCKS_PER_MODE * N / L);
          in_bits  <= 8'($urandom_range((1 << (2 * (m + 1))) - 1));
        end
      end
      in_valid <= 0;
      // let the chain empty before switching format
      wait (exp_re.size() == 0 && blk_re.size() == 0);
      repeat (4) @(posedge clk);
    end
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("FAIL samples missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

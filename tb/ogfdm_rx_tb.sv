// ogfdm_rx_tb: builds a transmitted sample stream here (each reference
// point held for L samples, blocks of N with a CP-sample prefix), feeds it
// with random gaps into the receiver and checks that the tokens come back
// in order, in all four formats. Each received token must appear three
// cycles after the converter sample that completes its symbol.
module ogfdm_rx_tb;
  import tb_ref_pkg::*;
  localparam int L = 4, N = 16, CP = 4, BLOCKS_PER_MODE = 6;

  logic clk = 0, rst_n = 0;
  logic [1:0] mode = 0;
  logic adc_valid = 0, out_valid;
  logic signed [7:0] adc_re = 0, adc_im = 0;
  logic [7:0] out_bits;
  int checks = 0, failures = 0, received = 0;
  int exp_tok [$];
  int cyc = 0, last_sample_cyc [$];

  ogfdm_rx #(.L(L), .N(N), .CP(CP), .SAMPLE_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .mode(qam_pkg::qam_mode_e'(mode)),
    .adc_valid(adc_valid), .adc_re(adc_re), .adc_im(adc_im),
    .out_valid(out_valid), .out_bits(out_bits));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      int lc;
      received++;
      checks += 2;
      if (exp_tok.size() == 0) begin
        failures++;
        $display("FAIL unexpected token");
      end else begin
        automatic int e = exp_tok.pop_front();
        if (int'(out_bits) != e) begin
          failures++;
          $display("FAIL mode %0d: got %0d expected %0d", mode, out_bits, e);
        end
      end
      lc = last_sample_cyc.pop_front();
      if (cyc - lc != 3) begin
        failures++;
        $display("FAIL latency %0d cycles", cyc - lc);
      end
    end
  end

  task automatic put_sample(int r, int i, bit last_of_symbol);
    while ($urandom_range(3) == 0) begin
      @(posedge clk);
      adc_valid <= 0;
    end
    @(posedge clk);
    adc_valid <= 1;
    adc_re <= 8'(r);
    adc_im <= 8'(i);
    if (last_of_symbol) last_sample_cyc.push_back(cyc + 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 4; m++) begin
      mode <= 2'(m);
      for (int b = 0; b < BLOCKS_PER_MODE; b++) begin
        int r [N], i [N];
        for (int s = 0; s < N / L; s++) begin
          automatic int t = int'($urandom_range((1 << (2 * (m + 1))) - 1));
          int pr, pi;
          ref_map(m, t, pr, pi);
          exp_tok.push_back(t);
          for (int k = 0; k < L; k++) begin
            r[s * L + k] = pr;
            i[s * L + k] = pi;
          end
        end
        for (int k = N - CP; k < N; k++) put_sample(r[k], i[k], 0);
        for (int k = 0; k < N; k++) put_sample(r[k], i[k], (k % L) == L - 1);
      end
      @(posedge clk);
      adc_valid <= 0;
      wait (exp_tok.size() == 0);
      repeat (4) @(posedge clk);
    end
    checks++;
    if (received != 4 * BLOCKS_PER_MODE * N / L) begin
      failures++;
      $display("FAIL received %0d tokens", received);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

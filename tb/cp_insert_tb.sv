// cp_insert_tb: blocks of random samples enter with random gaps and leave
// under random back-pressure; each block must come out as its last CP
// samples followed by the whole block. With both sides always ready one
// block must take exactly N + (N+CP) cycles from first input to last output.
module cp_insert_tb;
  localparam int N = 16, CP = 4, NBLK = 12;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [7:0] in_re = 0, in_im = 0, out_re, out_im;
  int checks = 0, failures = 0;
  int blk_re [$], blk_im [$];
  int exp_re [$], exp_im [$];
  bit full_speed = 0;
  int cyc = 0, first_in = -1, last_out = -1;

  cp_insert #(.N(N), .CP(CP), .W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) begin
      if (full_speed && first_in < 0) first_in = cyc;
      blk_re.push_back(int'(in_re));
      blk_im.push_back(int'(in_im));
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
    if (out_valid && out_ready) begin
      checks++;
      if (full_speed) last_out = cyc;
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
    out_ready <= full_speed ? 1'b1 : ($urandom_range(3) != 0);
  end

  task automatic send(int count, bit gaps);
    automatic int accepted = 0;
    while (accepted < count) begin
      @(posedge clk);
      if (in_valid && in_ready) accepted++;
      if (!in_valid || in_ready) begin
        in_valid <= (!gaps || $urandom_range(3) != 0) && (accepted < count);
        in_re    <= 8'($urandom);
        in_im    <= 8'($urandom);
      end
    end
    in_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    send(N * NBLK, 1);
    repeat (3 * (N + CP)) @(posedge clk);
    full_speed = 1;
    repeat (2) @(posedge clk);
    send(N, 0);
    repeat (2 * (N + CP)) @(posedge clk);
    checks++;
    if (last_out - first_in != N + (N + CP) - 1) begin
      failures++;
      $display("FAIL timing: first in at %0d, last out at %0d", first_in, last_out);
    end
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("FAIL %0d samples missing", exp_re.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// rwfc_top_tb: end-to-end test of the whole design at its default sizes.
// The converter samples are looped back to the receiver (a back-to-back
// link). Random tokens are sent in 4-, 16-, 64- and 256-QAM and again in a
// random order of formats, with random input gaps and random converter
// back-pressure; every token must return unchanged and in order. The
// demonstrator (256-QAM by default) is checked on its worked example and
// on random switch settings. Counted events, each of which must occur:
// format switches, transmitter stalls (token offered while not ready),
// converter back-pressure cycles, cyclic-prefix blocks sent, demonstrator
// readings.
module rwfc_top_tb;
  import tb_ref_pkg::*;
  localparam int L = 4, N = 64, CP = 16, BLOCKS_PER_RUN = 3;

  logic clk = 0, rst_n = 0;
  logic [1:0] mode = 0;
  logic tx_valid = 0, tx_ready, dac_valid, dac_ready = 0, rx_valid;
  logic [7:0] tx_bits = 0, rx_bits;
  logic signed [7:0] dac_re, dac_im;
  logic [9:0] sw = 0;
  logic [6:0] hex0, hex1, hex2, hex3, hex4;
  int checks = 0, failures = 0;
  int exp_tok [$];
  int n_mode_switch = 0, n_tx_stall = 0, n_backpressure = 0, n_blocks = 0, n_demo = 0;
  int dac_count = 0;

  rwfc_top dut (
    .clk(clk), .rst_n(rst_n), .mode(mode),
    .tx_valid(tx_valid), .tx_ready(tx_ready), .tx_bits(tx_bits),
    .dac_valid(dac_valid), .dac_ready(dac_ready), .dac_re(dac_re), .dac_im(dac_im),
    .adc_valid(dac_valid && dac_ready), .adc_re(dac_re), .adc_im(dac_im),
    .rx_valid(rx_valid), .rx_bits(rx_bits),
    .sw(sw), .hex0(hex0), .hex1(hex1), .hex2(hex2), .hex3(hex3), .hex4(hex4));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && !tx_ready) n_tx_stall++;
    if (dac_valid && !dac_ready) n_backpressure++;
    if (dac_valid && dac_ready) begin
      dac_count++;
      if (dac_count % (N + CP) == 0) n_blocks++;
    end
    if (tx_valid && tx_ready) exp_tok.push_back(int'(tx_bits));
    if (rx_valid) begin
      checks++;
      if (exp_tok.size() == 0) begin
        failures++;
        $display("FAIL unexpected token");
      end else begin
        automatic int e = exp_tok.pop_front();
        if (int'(rx_bits) != e) begin
          failures++;
          $display("FAIL mode %0d: got %0d expected %0d", mode, rx_bits, e);
        end
      end
    end
    dac_ready <= ($urandom_range(4) != 0);
  end

  task automatic run_format(int m);
    automatic int accepted = 0;
    automatic int total = BLOCKS_PER_RUN * N / L;
    if (int'(mode) != m) n_mode_switch++;
    mode <= 2'(m);
    @(posedge clk);
    while (accepted < total) begin
      @(posedge clk);
      if (tx_valid && tx_ready) accepted++;
      if (!tx_valid || tx_ready) begin
        tx_valid <= ($urandom_range(5) != 0) && (accepted < total);
        tx_bits  <= 8'($urandom_range((1 << (2 * (m + 1))) - 1));
      end
    end
    tx_valid <= 0;
    // the format may change only once every token has come back
    wait (exp_tok.size() == 0);
    repeat (8) @(posedge clk);
  endtask

  function automatic logic [6:0] seg_of(int v);
    automatic logic [6:0] p [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    return ~p[v];
  endfunction

  task automatic check_demo(int token);
    int r, i;
    logic [6:0] e4, e3, e2, e1, e0;
    sw = 10'(token);
    #1;
    ref_map(3, token, r, i);
    e4 = (r < 0) ? ~7'h40 : ~7'h00;
    e3 = seg_of((r < 0) ? -r : r);
    e2 = (i < 0) ? ~7'h40 : ~7'h00;
    e1 = seg_of((i < 0) ? -i : i);
    e0 = seg_of(15);
    n_demo++;
    checks++;
    if ({hex4, hex3, hex2, hex1, hex0} != {e4, e3, e2, e1, e0}) begin
      failures++;
      $display("FAIL demonstrator switches %b", sw);
    end
  endtask

  initial begin
    int start_cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    check_demo('b11010000);   // shows " 9-7F"
    for (int k = 0; k < 20; k++) check_demo(int'($urandom_range(255)));
    // rising bit loading, then a random order of formats
    for (int m = 0; m < 4; m++) run_format(m);
    for (int k = 0; k < 6; k++) run_format(int'($urandom_range(3)));
    run_format(int'(mode) ^ 1);
    $display("events: mode switches %0d, tx stalls %0d, back-pressure cycles %0d, blocks %0d, demonstrator readings %0d",
             n_mode_switch, n_tx_stall, n_backpressure, n_blocks, n_demo);
    checks += 5;
    if (n_mode_switch == 0) begin failures++; $display("FAIL no format switch"); end
    if (n_tx_stall == 0) begin failures++; $display("FAIL no transmitter stall"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    if (n_blocks == 0) begin failures++; $display("FAIL no block sent"); end
    if (n_demo == 0) begin failures++; $display("FAIL no demonstrator reading"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// shaping_filter: the pulse-shaping stage of the transmitter. A direct-form
// FIR filter with NTAPS real coefficients, applied to the real and the
// imaginary part of the oversampled stream alike:
//   y[n] = sum_{k=0}^{NTAPS-1} COEF[k] * x[n-k].
// The default is a rectangular pulse of one symbol (NTAPS = 4 ones, matching
// the default oversampling factor of 4), which after zero insertion holds
// each symbol for a whole symbol period and leaves no inter-symbol
// interference after the matched filter.
//
// Interface: valid/ready. A sample is taken when in_valid && in_ready; its
// output y[n] appears registered one cycle later and is held until
// out_ready. in_ready = !out_valid || out_ready. The filter state advances
// only on accepted samples, so bubbles do not disturb it. That a shaping
// filter follows the oversampling is from the reference design; the
// coefficients and widths are this design's choices.
// Assertions check the handshake: a stalled output sample is held unchanged.
module shaping_filter #(
  parameter int unsigned NTAPS  = 4,
  parameter int unsigned IN_W   = 5,
  parameter int unsigned COEF_W = 4,
  parameter int unsigned OUT_W  = 8,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = '{default: COEF_W'(1)}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);

  // Delay line: x[n-1] .. x[n-NTAPS+1]
  logic signed [IN_W-1:0] dl_re [NTAPS];
  logic signed [IN_W-1:0] dl_im [NTAPS];
  logic signed [OUT_W-1:0] acc_re, acc_im;

  assign in_ready = !out_valid || out_ready;

  always_comb begin
    acc_re = OUT_W'(COEF[0] * in_re);
    acc_im = OUT_W'(COEF[0] * in_im);
    for (int k = 1; k < NTAPS; k++) begin
      acc_re += OUT_W'(COEF[k] * dl_re[k]);
      acc_im += OUT_W'(COEF[k] * dl_im[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      for (int k = 0; k < NTAPS; k++) begin
        dl_re[k] <= '0;
        dl_im[k] <= '0;
      end
    end else begin
      if (in_valid && in_ready) begin
        out_valid <= 1'b1;
        out_re    <= acc_re;
        out_im    <= acc_im;
        dl_re[0]  <= '0;
        dl_im[0]  <= '0;
        if (NTAPS > 1) begin
          dl_re[1] <= in_re;
          dl_im[1] <= in_im;
        end
        for (int k = 2; k < NTAPS; k++) begin
          dl_re[k] <= dl_re[k-1];
          dl_im[k] <= dl_im[k-1];
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // Handshake rule: a sample offered on the output stays offered and
  // unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_re) && $stable(out_im));

endmodule

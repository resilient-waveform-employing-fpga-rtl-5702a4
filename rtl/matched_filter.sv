// matched_filter: the matching stage of the receiver. A direct-form FIR
// filter whose impulse response is the time-reverse of the transmit pulse
// COEF (pass the shaping filter's coefficients unchanged):
//   z[n] = sum_{k=0}^{NTAPS-1} COEF[NTAPS-1-k] * y[n-k],
// applied to the real and imaginary parts alike. At the symbol sampling
// instant the output is the symbol times sum(COEF[k]**2), which is 4 for
// the default rectangular pulse of four ones.
//
// Interface: one sample per cycle when in_valid is high, no back-pressure.
// The output is registered: z[n] appears one cycle after y[n] with
// out_valid. The filter state advances only on valid samples. That the
// receiver filters with a matched filter is from the reference design; the
// pulse and widths are this design's choices.
module matched_filter #(
  parameter int unsigned NTAPS  = 4,
  parameter int unsigned IN_W   = 8,
  parameter int unsigned COEF_W = 4,
  parameter int unsigned OUT_W  = 12,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = '{default: COEF_W'(1)}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);

  // dl[k] holds y[n-k] for k = 1..NTAPS-1; dl[0] is not used.
  logic signed [IN_W-1:0]  dl_re [NTAPS];
  logic signed [IN_W-1:0]  dl_im [NTAPS];
  logic signed [OUT_W-1:0] acc_re, acc_im;

  always_comb begin
    acc_re = OUT_W'(COEF[NTAPS-1] * in_re);
    acc_im = OUT_W'(COEF[NTAPS-1] * in_im);
    for (int k = 1; k < NTAPS; k++) begin
      acc_re += OUT_W'(COEF[NTAPS-1-k] * dl_re[k]);
      acc_im += OUT_W'(COEF[NTAPS-1-k] * dl_im[k]);
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
      out_valid <= in_valid;
      if (in_valid) begin
        out_re <= acc_re;
        out_im <= acc_im;
        if (NTAPS > 1) begin
          dl_re[1] <= in_re;
          dl_im[1] <= in_im;
        end
        for (int k = 2; k < NTAPS; k++) begin
          dl_re[k] <= dl_re[k-1];
          dl_im[k] <= dl_im[k-1];
        end
      end
    end
  end

endmodule

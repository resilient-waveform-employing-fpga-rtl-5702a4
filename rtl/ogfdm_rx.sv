// ogfdm_rx: the digital part of the receiver, the reverse of ogfdm_tx.
// Samples from the analogue-to-digital converter lose their cyclic prefix
// (cp_remove), pass the matched filter (matched_filter), are reduced to one
// sample per symbol (downsampler, phase L-1) and are sliced back to bits
// (qam_demapper) in the format given by `mode`, which must equal the
// transmitter's.
//
// Interface: one converter sample per cycle when adc_valid is high, with
// no back-pressure; the first sample after reset must be the first prefix
// sample of a block. out_bits (right-aligned) is valid with out_valid, three
// cycles after the converter sample that completes the symbol. The gain of
// the default rectangular pulse pair is L, so GAIN_SHIFT = log2(L) and L
// must be a power of two. Stage order follows the reference receiver; sizes
// and the fixed timing are this design's choices.
module ogfdm_rx
  import qam_pkg::*;
#(
  parameter int unsigned L        = 4,
  parameter int unsigned N        = 64,
  parameter int unsigned CP       = 16,
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned FILT_W   = 12   // matched-filter output width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  qam_mode_e                  mode,
  input  logic                       adc_valid,
  input  logic signed [SAMPLE_W-1:0] adc_re,
  input  logic signed [SAMPLE_W-1:0] adc_im,
  output logic                       out_valid,
  output logic [MAX_BITS-1:0]        out_bits
);

  logic blk_valid;
  logic signed [SAMPLE_W-1:0] blk_re, blk_im;
  logic mf_valid;
  logic signed [FILT_W-1:0] mf_re, mf_im;
  logic signed [FILT_W-1:0] ds_re, ds_im;

  cp_remove #(.N(N), .CP(CP), .W(SAMPLE_W)) u_cprm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (adc_valid),
    .in_re     (adc_re),
    .in_im     (adc_im),
    .out_valid (blk_valid),
    .out_re    (blk_re),
    .out_im    (blk_im)
  );

  matched_filter #(.NTAPS(L), .IN_W(SAMPLE_W), .OUT_W(FILT_W)) u_mf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (blk_valid),
    .in_re     (blk_re),
    .in_im     (blk_im),
    .out_valid (mf_valid),
    .out_re    (mf_re),
    .out_im    (mf_im)
  );

  downsampler #(.L(L), .PHASE(L - 1), .W(FILT_W)) u_ds (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (mf_valid),
    .in_re     (mf_re),
    .in_im     (mf_im),
    .out_valid (out_valid),
    .out_re    (ds_re),
    .out_im    (ds_im)
  );

  qam_demapper #(.IN_W(FILT_W), .GAIN_SHIFT($clog2(L))) u_demap (
    .mode (mode),
    .re   (ds_re),
    .im   (ds_im),
    .bits (out_bits)
  );

endmodule
